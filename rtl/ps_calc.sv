// ps_calc: TEI-VS power-saving calculator.
//
// Gives the SoC power saved by running at supply voltage v instead of the
// worst-case (coldest-corner) voltage at the same clock frequency:
//
//   PS_TEI-VS(v) = p_ref - (a2 * v^2 + a1 * v)
//
// The bracket is the SoC power model P = alpha*C*f*V^2 + V*I_off, with the
// dynamic term folded into a2 and the leakage current into a1; p_ref is the
// SoC power at the worst-case voltage. All three are programmable so that
// a per-chip characterisation can be loaded; with p_ref = 100 the saving
// comes out in percent. Using a quadratic power model is this
// implementation's reading of how the saving is computed on chip.
//
//   cycle 1:  v2 = v*v           a1v = a1*v
//   cycle 2:  a2v2 = a2*v2
//   cycle 3:  pw = a2v2 + a1v
//   cycle 4:  ps = p_ref - pw
//
// Interface: start is a one-cycle request; inputs must stay stable until
// done. done pulses in the fourth cycle after start with the result on ps.
module ps_calc
  import pmic_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fp_t  v,
  input  fp_t  a2,
  input  fp_t  a1,
  input  fp_t  p_ref,
  output logic busy,
  output logic done,
  output fp_t  ps
);

  typedef enum logic [1:0] {S_IDLE, S_C2, S_C3, S_C4} state_e;
  state_e st;

  fp_t v2, a1v, a2v2, pw;
  fp_t m0_a, m0_b, m0_p, m1_p, ad_a, ad_b, ad_s;

  fp_mul u_mul0 (.a(m0_a), .b(m0_b), .p(m0_p));
  fp_mul u_mul1 (.a(a1),   .b(v),    .p(m1_p));
  fp_add u_add  (.a(ad_a), .b(ad_b), .s(ad_s));

  always_comb begin
    m0_a = (st == S_IDLE) ? v : a2;
    m0_b = (st == S_IDLE) ? v : v2;
    ad_a = (st == S_C4) ? p_ref   : a2v2;
    ad_b = (st == S_C4) ? fp_neg(pw) : a1v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      done <= 1'b0;
      v2   <= FP_ZERO; a1v <= FP_ZERO; a2v2 <= FP_ZERO; pw <= FP_ZERO;
      ps   <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          v2  <= m0_p;
          a1v <= m1_p;
          st  <= S_C2;
        end
        S_C2: begin
          a2v2 <= m0_p;
          st   <= S_C3;
        end
        S_C3: begin
          pw <= ad_s;
          st <= S_C4;
        end
        S_C4: begin
          ps   <= ad_s;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("ps_calc: start while busy");

endmodule
