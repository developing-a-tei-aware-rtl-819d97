// fp_mul: single-precision floating-point multiplier (combinational).
//
// One of the two small FPU building blocks of the Vopt, PS and P_SC
// calculators. The 24-bit significands (hidden one included) are multiplied
// into a 48-bit product, normalised by at most one position and rounded to
// nearest, ties to even, using a guard bit and a sticky bit. Exponents are
// added with the bias removed.
//
// Simplifications chosen for this controller, which only ever sees finite
// values of moderate size: subnormal inputs count as zero, a result below
// the normal range is flushed to a signed zero, a result above it becomes a
// signed infinity, and NaN is never produced.
//
// Interface: a, b in, p = a * b out. Purely combinational; the calculators
// that use it register the result, so each multiplication costs one cycle.
module fp_mul
  import pmic_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t p
);

  logic                sign;
  logic                zero_in;
  logic [23:0]         ma, mb;
  logic [47:0]         prod;
  logic signed [10:0]  exp_sum;
  logic signed [10:0]  exp_n;
  logic [22:0]         frac_n;
  logic                guard, sticky;
  logic [23:0]         frac_r;   // rounded fraction with carry bit
  logic signed [10:0]  exp_r;

  always_comb begin
    sign    = a.sign ^ b.sign;
    zero_in = (a.exp == '0) || (b.exp == '0);
    ma      = {1'b1, a.frac};
    mb      = {1'b1, b.frac};
    prod    = ma * mb;
    exp_sum = $signed({3'b000, a.exp}) + $signed({3'b000, b.exp}) - 11'sd127;

    if (prod[47]) begin
      exp_n  = exp_sum + 11'sd1;
      frac_n = prod[46:24];
      guard  = prod[23];
      sticky = |prod[22:0];
    end else begin
      exp_n  = exp_sum;
      frac_n = prod[45:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end

    frac_r = {1'b0, frac_n} + 24'(guard && (sticky || frac_n[0]));
    exp_r  = frac_r[23] ? exp_n + 11'sd1 : exp_n;

    if (zero_in || exp_r <= 0) begin
      p = '{sign: sign, exp: '0, frac: '0};
    end else if (exp_r >= 255) begin
      p = '{sign: sign, exp: '1, frac: '0};
    end else begin
      p = '{sign: sign, exp: exp_r[7:0], frac: frac_r[22:0]};
    end
  end

endmodule
