// temp_segment: spline section selection for a temperature (combinational).
//
// The optimal-voltage curve is a cubic spline through calibration points
// taken every T_STEP degrees from T_MIN, so it has N_SEG sections with their
// own coefficients p3..p0. This block finds the section k that holds the
// temperature T (T_MIN + k*T_STEP <= T < T_MIN + (k+1)*T_STEP) by comparing
// T with every inner breakpoint, and forms the offset x = T - (T_MIN +
// k*T_STEP) at which the section's cubic is evaluated. Below T_MIN section
// 0 is used and above the last breakpoint the last section, so the edge
// cubics are extrapolated (x then leaves [0, T_STEP)); `clamped` flags this.
// The offset is converted to single precision by int2fp.
//
// Interface: temp is signed fixed point with TEMP_FRAC fraction bits (C);
// seg is the section index, x the offset as a float. Combinational.
module temp_segment
  import pmic_pkg::*;
#(
  parameter int unsigned W       = TEMP_W,
  parameter int unsigned FRAC    = TEMP_FRAC,
  parameter int          TMIN    = T_MIN,
  parameter int          TSTEP   = T_STEP,
  parameter int unsigned NSEG    = N_SEG
) (
  input  logic signed [W-1:0]        temp,
  output logic [$clog2(NSEG)-1:0]    seg,
  output fp_t                        x,
  output logic                       clamped
);

  logic signed [W+1:0] t_ext;
  logic signed [W+1:0] base;
  logic signed [W+1:0] offs;

  always_comb begin
    t_ext = (W+2)'(temp);
    seg   = '0;
    for (int k = 1; k < int'(NSEG); k++) begin
      if (t_ext >= (W+2)'((TMIN + k * TSTEP) * (2 ** FRAC))) seg = ($clog2(NSEG))'(k);
    end
    base    = (W+2)'((TMIN + int'(seg) * TSTEP) * (2 ** FRAC));
    offs    = t_ext - base;
    clamped = (t_ext < (W+2)'(TMIN * (2 ** FRAC))) ||
              (t_ext >= (W+2)'((TMIN + int'(NSEG) * TSTEP) * (2 ** FRAC)));
  end

  int2fp #(.W(W + 2), .FRAC(FRAC)) u_conv (
    .x (offs),
    .f (x)
  );

endmodule
