// int2fp: signed fixed-point to single-precision float conversion
// (combinational helper of temp_segment).
//
// The input is a two's-complement number with FRAC fraction bits. Its
// magnitude is normalised by the position of its leading one, which gives
// the exponent (position - FRAC + bias) and, shifted up to bit 23, the
// fraction. W must not exceed 24 so that the conversion is always exact.
//
// Interface: x in (W bits), f = x * 2^-FRAC out.
module int2fp
  import pmic_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic signed [W-1:0] x,
  output fp_t                 f
);

  logic [W-1:0]  mag;
  logic [23:0]   norm;
  int unsigned   msb;

  always_comb begin
    mag = x[W-1] ? W'(-x) : W'(x);
    msb = 0;
    for (int unsigned i = 0; i < W; i++) begin
      if (mag[i]) msb = i;
    end
    norm = 24'(mag) << (23 - msb);
    if (mag == '0) f = FP_ZERO;
    else           f = '{sign: x[W-1], exp: 8'(EXP_BIAS + msb - FRAC), frac: norm[22:0]};
  end

endmodule
