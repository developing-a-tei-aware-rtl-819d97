// tb_vopt_calc: self-checking testbench of the Vopt calculator.
//
// Loads the sections of a natural spline through the 13 calibration points
// and random coefficient sets, evaluates them at random offsets and checks:
//   - the result against the same cubic evaluated step by step in double
//     precision with single-precision rounding after every operation
//     (at most 2 units in the last place apart),
//   - the result against the exact real-valued cubic (relative error 1e-5),
//   - the latency: done exactly 4 cycles after start, busy in between.
module tb_vopt_calc;
  import pmic_pkg::*;
  import tb_fp_pkg::*;
  import tb_spline_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fp_t        x;
  coeff_set_t p;
  logic       busy, done;
  fp_t        vopt;
  int         checks = 0, failures = 0;
  coef_tab_t  tab;

  vopt_calc dut (.clk, .rst_n, .start, .x, .p, .busy, .done, .vopt);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r32(input real v);
    return from_real(v);
  endfunction

  function automatic real rr(input logic [31:0] v);
    return to_real(v);
  endfunction

  task automatic run(input logic [31:0] xv, input logic [31:0] c0, input logic [31:0] c1,
                     input logic [31:0] c2, input logic [31:0] c3);
    logic [31:0] x2, x3, p1x, p2x2, p3x3, s, ref_v;
    real exact;
    int  lat;
    x = xv; p[0] = c0; p[1] = c1; p[2] = c2; p[3] = c3;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 20) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low while computing"); end
      @(negedge clk) lat++;
    end
    x2   = r32(rr(xv) * rr(xv));
    p1x  = r32(rr(c1) * rr(xv));
    x3   = r32(rr(x2) * rr(xv));
    p2x2 = r32(rr(c2) * rr(x2));
    s    = r32(rr(p1x) + rr(c0));
    s    = r32(rr(s) + rr(p2x2));
    p3x3 = r32(rr(c3) * rr(x3));
    ref_v = r32(rr(s) + rr(p3x3));
    exact = rr(c3) * rr(xv) ** 3 + rr(c2) * rr(xv) ** 2 + rr(c1) * rr(xv) + rr(c0);
    checks += 3;
    if (lat != 4) begin
      failures++;
      $display("FAIL latency %0d, expected 4", lat);
    end
    if (ulp_diff(vopt, ref_v) > 2) begin
      failures++;
      $display("FAIL x=%h: got %h expected %h", xv, vopt, ref_v);
    end
    if (abs_r(rr(vopt) - exact) > 1e-5 * abs_r(exact) + 1e-9) begin
      failures++;
      $display("FAIL x=%h: got %f exact %f", xv, rr(vopt), exact);
    end
  endtask

  initial begin
    real xr;
    tab = natural_spline();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      for (int j = 0; j < 8; j++) begin
        xr = 10.0 * real'($urandom_range(1000)) / 1000.0;
        run(r32(xr), r32(tab[k][0]), r32(tab[k][1]), r32(tab[k][2]), r32(tab[k][3]));
      end
      // at the section boundary the spline must reproduce the calibration points
      run(r32(0.0), r32(tab[k][0]), r32(tab[k][1]), r32(tab[k][2]), r32(tab[k][3]));
      checks++;
      if (vopt !== r32(vdd_cal(k))) begin
        failures++;
        $display("FAIL section %0d start: %f", k, rr(vopt));
      end
    end
    for (int i = 0; i < 300; i++) begin
      xr = 10.0 * real'($urandom_range(10000)) / 10000.0;
      run(r32(xr), r32(0.3 + real'($urandom_range(3000)) / 10000.0),
          r32(-0.002 + real'($urandom_range(4000)) / 1.0e6),
          r32(-0.0002 + real'($urandom_range(4000)) / 1.0e7),
          r32(-0.00001 + real'($urandom_range(2000)) / 1.0e8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
