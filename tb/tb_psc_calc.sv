// tb_psc_calc: self-checking testbench of the converter-loss calculator.
//
// Random output voltages, load currents, input voltages and fixed losses.
// Expected: (v_in - v) * i + p_q evaluated in the same order with single
// precision rounding after each step (2 ulp allowed) and as an exact real.
// Latency: done 3 cycles after start.
module tb_psc_calc;
  import pmic_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fp_t  v, i_sc, v_in, p_q, psc;
  logic busy, done;
  int   checks = 0, failures = 0;

  psc_calc dut (.clk, .rst_n, .start, .v, .i_sc, .v_in, .p_q, .busy, .done, .psc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input real vr, input real ir, input real vinr, input real pqr);
    logic [31:0] d, m, ref_p;
    real exact;
    int  lat;
    v = from_real(vr); i_sc = from_real(ir); v_in = from_real(vinr); p_q = from_real(pqr);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 20) @(negedge clk) lat++;
    d     = from_real(to_real(v_in) - to_real(v));
    m     = from_real(to_real(d) * to_real(i_sc));
    ref_p = from_real(to_real(m) + to_real(p_q));
    exact = (to_real(v_in) - to_real(v)) * to_real(i_sc) + to_real(p_q);
    checks += 3;
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
    if (ulp_diff(psc, ref_p) > 2) begin
      failures++; $display("FAIL: got %h expected %h", psc, ref_p);
    end
    if (abs_r(to_real(psc) - exact) > 1e-5 * abs_r(exact) + 1e-7) begin
      failures++; $display("FAIL: got %f exact %f", to_real(psc), exact);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0.44, 10.0, 0.54, 3.0);       // 0.1*10 + 3 = 4
    checks++;
    if (abs_r(to_real(psc) - 4.0) > 1e-5) begin failures++; $display("FAIL 4.0: %f", to_real(psc)); end
    for (int i = 0; i < 500; i++)
      run(0.40 + real'($urandom_range(2500)) / 10000.0,
          real'($urandom_range(10000)) / 100.0,
          0.55 + real'($urandom_range(1000)) / 1000.0,
          real'($urandom_range(1000)) / 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
