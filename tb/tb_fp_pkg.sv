// tb_fp_pkg: reference conversions between SystemVerilog reals (IEEE double)
// and the controller's single-precision format, used by the testbenches to
// work out expected values independently of the RTL.
//
// to_real is exact. from_real rounds a double to single precision, nearest
// with ties to even, flushing results below the normal range to zero, so
// that an exact double product of two singles rounds to what a correct
// single-precision multiplier returns. ulp_diff gives the distance of two
// same-signed singles in units in the last place.
package tb_fp_pkg;

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] from_real(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] m24;
    int          e;
    logic        g, st;
    if (r == 0.0) return 32'd0;
    d   = $realtobits(r);
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b1, d[51:0]};
    m24 = {1'b0, m[52:29]};
    g   = m[28];
    st  = |m[27:0];
    if (g && (st || m24[0])) m24 = m24 + 25'd1;
    if (m24[24]) begin
      e   = e + 1;
      m24 = m24 >> 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m24[22:0]};
  endfunction

  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    int d;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1 << 30;
    d = int'(a[30:0]) - int'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction

  function automatic real abs_r(input real r);
    return r < 0.0 ? -r : r;
  endfunction

endpackage
