// fp_add: single-precision floating-point adder (combinational).
//
// The second FPU building block of the calculators; subtraction is an
// addition with the sign of b flipped (pmic_pkg::fp_neg). The operand with
// the larger magnitude is kept, the other significand is shifted right by
// the exponent difference into a 27-bit field (24 significand bits, guard,
// round and a sticky bit collecting everything shifted further out). The
// significands are then added or subtracted, the sum is normalised (one
// position right after a carry, or left by the leading-zero count after a
// cancellation) and rounded to nearest, ties to even.
//
// Same simplifications as fp_mul: subnormals are zero, underflow flushes to
// zero, overflow gives infinity, no NaN. An exact cancellation returns +0.
//
// Interface: a, b in, s = a + b out. Purely combinational.
module fp_add
  import pmic_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t s
);

  fp_t                 op_big, op_sml;
  logic                a_zero, b_zero;
  logic [7:0]          exp_diff;
  logic [49:0]         aligned;
  logic [26:0]         m_big, m_small;
  logic [27:0]         sum;
  logic [26:0]         norm;
  logic [4:0]          lz;
  logic signed [10:0]  exp_n;
  logic                round_up;
  logic [24:0]         mant_r;   // rounded significand with carry bit
  logic signed [10:0]  exp_r;

  always_comb begin
    a_zero = (a.exp == '0);
    b_zero = (b.exp == '0);

    // order the operands by magnitude
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      op_big   = a;
      op_sml = b;
    end else begin
      op_big   = b;
      op_sml = a;
    end

    exp_diff = op_big.exp - op_sml.exp;
    m_big    = {1'b1, op_big.frac, 3'b000};
    if (exp_diff >= 8'd50) begin
      aligned = '0;
      m_small = 27'd1;                      // only the sticky bit survives
    end else begin
      aligned = {1'b1, op_sml.frac, 26'd0} >> exp_diff;
      m_small = {aligned[49:24], |aligned[23:0]};
    end

    if (op_big.sign == op_sml.sign) sum = {1'b0, m_big} + {1'b0, m_small};
    else                        sum = {1'b0, m_big} - {1'b0, m_small};

    // normalise
    lz = '0;
    for (int i = 0; i <= 26; i++) begin
      if (sum[i]) lz = 5'(26 - i);
    end
    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_n = $signed({3'b000, op_big.exp}) + 11'sd1;
    end else begin
      norm  = sum[26:0] << lz;
      exp_n = $signed({3'b000, op_big.exp}) - $signed({6'b000000, lz});
    end

    // round to nearest even: norm = {1.mantissa[23:0], guard, round, sticky}
    round_up = norm[2] && (norm[1] || norm[0] || norm[3]);
    mant_r   = {1'b0, norm[26:3]} + 25'(round_up);
    exp_r    = mant_r[24] ? exp_n + 11'sd1 : exp_n;

    if (a_zero && b_zero) begin
      s = '{sign: a.sign & b.sign, exp: '0, frac: '0};
    end else if (b_zero) begin
      s = a;
    end else if (a_zero) begin
      s = b;
    end else if (sum == '0 || exp_r <= 0) begin
      s = FP_ZERO;
    end else if (exp_r >= 255) begin
      s = '{sign: op_big.sign, exp: '1, frac: '0};
    end else begin
      s = '{sign: op_big.sign, exp: exp_r[7:0], frac: mant_r[24] ? mant_r[23:1] : mant_r[22:0]};
    end
  end

endmodule
