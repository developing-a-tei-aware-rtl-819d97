// tb_ps_calc: self-checking testbench of the TEI-VS power-saving calculator.
//
// Random voltages in the near-threshold range and random power-model
// coefficients. Expected: p_ref - (a2*v^2 + a1*v) evaluated in the same
// order with single-precision rounding after each step (2 ulp allowed) and
// as an exact real (relative 1e-5 of p_ref). Latency: done 4 cycles after
// start. Also checks the default model (saving of ~33.6 % at 0.44 V
// relative to 0.54 V, the dynamic-power-only reading of the measurements).
module tb_ps_calc;
  import pmic_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fp_t  v, a2, a1, p_ref, ps;
  logic busy, done;
  int   checks = 0, failures = 0;

  ps_calc dut (.clk, .rst_n, .start, .v, .a2, .a1, .p_ref, .busy, .done, .ps);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real vr, input real a2r, input real a1r, input real pr);
    logic [31:0] v2, a1v, a2v2, pw, ref_ps;
    real exact;
    int  lat;
    v = from_real(vr); a2 = from_real(a2r); a1 = from_real(a1r); p_ref = from_real(pr);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 20) @(negedge clk) lat++;
    v2     = from_real(to_real(v) * to_real(v));
    a1v    = from_real(to_real(a1) * to_real(v));
    a2v2   = from_real(to_real(a2) * to_real(v2));
    pw     = from_real(to_real(a2v2) + to_real(a1v));
    ref_ps = from_real(to_real(p_ref) - to_real(pw));
    exact  = to_real(p_ref) - (to_real(a2) * to_real(v) ** 2 + to_real(a1) * to_real(v));
    checks += 3;
    if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
    if (ulp_diff(ps, ref_ps) > 2) begin
      failures++; $display("FAIL v=%f: got %h expected %h", vr, ps, ref_ps);
    end
    if (abs_r(to_real(ps) - exact) > 1e-5 * abs_r(to_real(p_ref))) begin
      failures++; $display("FAIL v=%f: got %f exact %f", vr, to_real(ps), exact);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // default model: P = 100 (V/0.54)^2, saving in percent
    run(0.44, to_real(FP_342P9), 0.0, 100.0);
    checks++;
    if (abs_r(to_real(ps) - 33.607) > 0.01) begin
      failures++; $display("FAIL default model at 0.44 V: %f", to_real(ps));
    end
    run(0.54, to_real(FP_342P9), 0.0, 100.0);
    checks++;
    if (abs_r(to_real(ps)) > 1e-3) begin
      failures++; $display("FAIL default model at 0.54 V: %f", to_real(ps));
    end
    for (int i = 0; i < 500; i++)
      run(0.40 + real'($urandom_range(2500)) / 10000.0,
          200.0 + real'($urandom_range(20000)) / 100.0,
          real'($urandom_range(5000)) / 100.0,
          80.0 + real'($urandom_range(4000)) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
