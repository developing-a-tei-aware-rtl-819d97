// psc_calc: switched-capacitor converter loss calculator.
//
// The saving bought by a lower supply must exceed what the DC-DC converter
// itself dissipates, which depends on its output current I_SC and on the
// output voltage. This block estimates that loss as
//
//   P_SC(v, i) = (v_in - v) * i + p_q
//
// i.e. the drop from the converter input to its output carried by the load
// current, plus a fixed quiescent/switching loss p_q. v_in, i and p_q are
// programmable. The form of this model is this implementation's choice.
//
//   cycle 1:  d  = v_in - v
//   cycle 2:  m  = d * i
//   cycle 3:  psc = m + p_q
//
// Interface: start is a one-cycle request; inputs must stay stable until
// done. done pulses in the third cycle after start with the result on psc.
module psc_calc
  import pmic_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fp_t  v,
  input  fp_t  i_sc,
  input  fp_t  v_in,
  input  fp_t  p_q,
  output logic busy,
  output logic done,
  output fp_t  psc
);

  typedef enum logic [1:0] {S_IDLE, S_C2, S_C3} state_e;
  state_e st;

  fp_t d, m;
  fp_t mul_p, ad_a, ad_b, ad_s;

  fp_mul u_mul (.a(d),    .b(i_sc), .p(mul_p));
  fp_add u_add (.a(ad_a), .b(ad_b), .s(ad_s));

  always_comb begin
    ad_a = (st == S_IDLE) ? v_in      : m;
    ad_b = (st == S_IDLE) ? fp_neg(v) : p_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      done <= 1'b0;
      d    <= FP_ZERO; m <= FP_ZERO; psc <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          d  <= ad_s;
          st <= S_C2;
        end
        S_C2: begin
          m  <= mul_p;
          st <= S_C3;
        end
        S_C3: begin
          psc  <= ad_s;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("psc_calc: start while busy");

endmodule
