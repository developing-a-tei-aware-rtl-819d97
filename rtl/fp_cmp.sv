// fp_cmp: floating-point magnitude comparator (combinational).
//
// Used for the two comparisons of the control algorithm (PS_TEI-VS at Vopt
// against PS_TEI-VS at the present VDD, and the saving at Vopt against the
// converter loss) and for the safety check of Vopt against VDD.
// A float in sign-magnitude form orders like an integer once its sign is
// taken into account: for two positive numbers the larger {exp, frac} is
// the larger number, for two negative numbers the order is reversed, and
// +0 and -0 are equal.
//
// Interface: a, b in; gt = (a > b), eq = (a == b), lt = (a < b).
module fp_cmp
  import pmic_pkg::*;
(
  input  fp_t  a,
  input  fp_t  b,
  output logic gt,
  output logic eq,
  output logic lt
);

  logic a_zero, b_zero;
  logic mag_gt, mag_eq;

  always_comb begin
    a_zero = (a.exp == '0);
    b_zero = (b.exp == '0);
    mag_gt = {a.exp, a.frac} > {b.exp, b.frac};
    mag_eq = {a.exp, a.frac} == {b.exp, b.frac};

    if (a_zero && b_zero) begin
      eq = 1'b1;
      gt = 1'b0;
    end else if (a_zero) begin
      eq = 1'b0;
      gt = b.sign;
    end else if (b_zero) begin
      eq = 1'b0;
      gt = !a.sign;
    end else if (a.sign != b.sign) begin
      eq = 1'b0;
      gt = b.sign;
    end else begin
      eq = mag_eq;
      gt = a.sign ? (!mag_gt && !mag_eq) : mag_gt;
    end
    lt = !gt && !eq;
  end

endmodule
