// vopt_calc: optimal-supply-voltage calculator.
//
// Evaluates the section cubic Vopt = p3*x^3 + p2*x^2 + p1*x + p0 in single
// precision with two multipliers and one adder working in parallel, so that
// the eight operations (five multiplications, three additions) take four
// cycles instead of one per operation:
//
//   cycle 1:  x2   = x*x        p1x  = p1*x
//   cycle 2:  x3   = x2*x       p2x2 = p2*x2     s = p1x + p0
//   cycle 3:  p3x3 = p3*x3                       s = s + p2x2
//   cycle 4:                                     vopt = s + p3x3
//
// The split of the work over the two multipliers and the four-cycle latency
// follow the operation flow of the design; the exact pairing of operations
// per cycle is this implementation's.
//
// Interface: start is a one-cycle request; x and p must stay stable until
// done. done is a one-cycle pulse in the fourth cycle after start, with the
// result on vopt (held until the next result). busy is high in between.
module vopt_calc
  import pmic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  fp_t         x,
  input  coeff_set_t  p,
  output logic        busy,
  output logic        done,
  output fp_t         vopt
);

  typedef enum logic [1:0] {S_IDLE, S_C2, S_C3, S_C4} state_e;
  state_e st;

  fp_t x2, x3, p1x, p2x2, p3x3, s;
  fp_t m0_a, m0_b, m0_p, m1_a, m1_b, m1_p, ad_a, ad_b, ad_s;

  fp_mul u_mul0 (.a(m0_a), .b(m0_b), .p(m0_p));
  fp_mul u_mul1 (.a(m1_a), .b(m1_b), .p(m1_p));
  fp_add u_add  (.a(ad_a), .b(ad_b), .s(ad_s));

  // operand selection per cycle
  always_comb begin
    m0_a = x;    m0_b = x;
    m1_a = p[1]; m1_b = x;
    ad_a = p1x;  ad_b = p[0];
    unique case (st)
      S_IDLE: begin m0_a = x;    m0_b = x;  m1_a = p[1]; m1_b = x;  end
      S_C2:   begin m0_a = x2;   m0_b = x;  m1_a = p[2]; m1_b = x2; ad_a = p1x; ad_b = p[0]; end
      S_C3:   begin m0_a = p[3]; m0_b = x3;                          ad_a = s;   ad_b = p2x2;  end
      S_C4:   begin                                                   ad_a = s;   ad_b = p3x3;  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      done <= 1'b0;
      x2   <= FP_ZERO; x3   <= FP_ZERO;
      p1x  <= FP_ZERO; p2x2 <= FP_ZERO; p3x3 <= FP_ZERO;
      s    <= FP_ZERO; vopt <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          x2  <= m0_p;
          p1x <= m1_p;
          st  <= S_C2;
        end
        S_C2: begin
          x3   <= m0_p;
          p2x2 <= m1_p;
          s    <= ad_s;
          st   <= S_C3;
        end
        S_C3: begin
          p3x3 <= m0_p;
          s    <= ad_s;
          st   <= S_C4;
        end
        S_C4: begin
          vopt <= ad_s;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  // a new request may only arrive while the calculator is idle
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("vopt_calc: start while busy");

endmodule
