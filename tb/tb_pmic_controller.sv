// tb_pmic_controller: end-to-end testbench of the PMIC controller at its
// default configuration (12 spline sections, single precision).
//
// Plays the role of the SoC software: it fits a natural cubic spline to
// the 13 calibration points (-40 C .. 80 C every 10 C), writes the 48
// coefficients over APB, sets the supply to the worst-case 0.54 V and then
// applies 20 random temperatures between -40 C and 80 C, as the reference
// application does, followed by directed cases. For each temperature it
// waits for the interrupt, reads VOPT, VDD and STATUS and compares them
// with a real-arithmetic model of the algorithm; it checks the converter
// set-point port and its update pulse, and the latency from the TEMP write
// to the interrupt. Every mechanism of the design must occur at least
// once: lowering, safety raise, rejection by the 1st and by the 2nd
// comparator, a sensor-started computation, a temperature dropped while
// busy, extrapolation outside the calibrated range and a bus error.
module tb_pmic_controller;
  import pmic_pkg::*;
  import tb_fp_pkg::*;
  import tb_spline_pkg::*;

  localparam int LATENCY = 13;   // clock edges from the TEMP write to irq

  logic clk = 1'b0, rst_n = 1'b0;
  apb_if bus (.clk(clk));
  logic                     sensor_valid = 1'b0;
  logic signed [TEMP_W-1:0] sensor_temp = '0;
  logic [31:0]              vdd_set;
  logic                     vdd_update, irq;

  pmic_controller dut (
    .pclk (clk), .presetn (rst_n),
    .psel (bus.psel), .penable (bus.penable), .pwrite (bus.pwrite), .paddr (bus.paddr),
    .pwdata (bus.pwdata), .prdata (bus.prdata), .pready (bus.pready), .pslverr (bus.pslverr),
    .sensor_valid, .sensor_temp, .vdd_set, .vdd_update, .irq);

  int  checks = 0, failures = 0;
  int  n_lower = 0, n_raise = 0, n_keep1 = 0, n_keep2 = 0;
  int  n_sensor = 0, n_dropped = 0, n_clamped = 0, n_slverr = 0, n_update = 0;
  longint cyc = 0;
  longint t_access;
  coef_tab_t tab;
  logic [31:0] ctab [12][4];
  real vdd_model;
  real pq_model;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (vdd_update) n_update <= n_update + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    logic e;
    bus.write(a, d, e);
    expect_true("write accepted", !e);
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    logic e;
    bus.read(a, d, e);
    expect_true("read accepted", !e);
  endtask

  function automatic real ps_model(input real v);
    return 100.0 - to_real(FP_342P9) * v * v;
  endfunction

  // wait for the interrupt, then compare the results with the model
  task automatic finish_and_check(input int code, input logic by_sensor);
    logic [31:0] d, st, vo_hw, vdd_hw;
    real t, xr, vo, pso, psu, pc;
    int  k, lat;
    logic judge;
    decision_e dexp, dhw;
    while (!irq) @(posedge clk);
    lat = int'(cyc - t_access);
    if (!by_sensor) begin
      checks++;
      if (lat != LATENCY) begin failures++; $display("FAIL latency %0d expected %0d", lat, LATENCY); end
    end
    rd(REG_STATUS, st);
    rd(REG_VOPT, vo_hw);
    rd(REG_VDD, vdd_hw);
    wr(REG_STATUS, 32'h2);        // clear done
    t  = real'(code) / 256.0;
    k  = int'($floor((t + 40.0) / 10.0));
    if (k < 0) k = 0;
    if (k > 11) k = 11;
    xr  = t - (-40.0 + 10.0 * k);
    vo  = to_real(ctab[k][3]) * xr ** 3 + to_real(ctab[k][2]) * xr ** 2
        + to_real(ctab[k][1]) * xr + to_real(ctab[k][0]);
    psu = ps_model(vdd_model);
    pso = ps_model(vo);
    pc  = (0.54 - vo) * 10.0 + pq_model;
    expect_true("Vopt matches the spline", abs_r(to_real(vo_hw) - vo) < 1e-5);
    expect_true("clamped flag", st[6] == (t < -40.0 || t >= 80.0));
    if (st[6]) n_clamped++;
    dhw = decision_e'(st[3:2]);
    judge = 1'b1;
    if (vo > vdd_model + 1e-6) dexp = DEC_RAISE;
    else if (abs_r(vo - vdd_model) < 1e-6 && to_real(vo_hw) != vdd_model) judge = 1'b0;
    else if (pso > psu + 1e-3 && pso > pc + 1e-3) dexp = DEC_LOWER;
    else if (pso > psu + 1e-3 && pso < pc - 1e-3) dexp = DEC_KEEP;
    else if (pso <= psu) dexp = DEC_KEEP;
    else judge = 1'b0;
    if (judge) begin
      checks++;
      if (dhw != dexp) begin
        failures++;
        $display("FAIL T=%f decision %s expected %s", t, dhw.name(), dexp.name());
      end
    end
    if (dhw == DEC_LOWER) n_lower++;
    if (dhw == DEC_RAISE) n_raise++;
    if (dhw == DEC_KEEP && !st[4]) n_keep1++;
    if (dhw == DEC_KEEP && st[4] && !st[5]) n_keep2++;
    if (dhw != DEC_KEEP) begin
      expect_true("VDD follows Vopt", vdd_hw == vo_hw);
      vdd_model = to_real(vo_hw);
    end else begin
      expect_true("VDD kept", to_real(vdd_hw) == vdd_model);
    end
    expect_true("converter set-point", vdd_set == vdd_hw);
  endtask

  task automatic apply_temp(input int code);
    wr(REG_TEMP, 32'(code));
    t_access = cyc;
    finish_and_check(code, 1'b0);
  endtask

  initial begin
    logic [31:0] d;
    logic        e;
    int          code, upd0;
    longint      c0;
    tab = natural_spline();
    for (int k = 0; k < 12; k++) for (int j = 0; j < 4; j++) ctab[k][j] = from_real(tab[k][j]);
    vdd_model = 0.54;
    pq_model  = 3.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // calibration: spline coefficients, converter current, interrupt on
    for (int k = 0; k < 12; k++)
      for (int j = 0; j < 4; j++)
        wr(REG_COEF + 12'(16 * k + 4 * j), ctab[k][j]);
    wr(REG_ISC, from_real(10.0));
    wr(REG_VDD, FP_0P54);
    wr(REG_CTRL, 32'h2);

    // the reference application: 20 random temperatures in -40 .. 80 C
    c0 = cyc;
    for (int i = 0; i < 20; i++) begin
      code = -40 * 256 + int'($urandom_range(120 * 256));
      apply_temp(code);
    end
    $display("20 random temperatures: %0d cycles including bus traffic", cyc - c0);

    // directed: warm (lower), same again (1st comparator), cold (safety raise)
    apply_temp(60 * 256);
    apply_temp(60 * 256);
    apply_temp(-35 * 256);
    // large converter loss: the 2nd comparator rejects lowering
    pq_model = 60.0;
    wr(REG_PQ, from_real(60.0));
    apply_temp(75 * 256);
    pq_model = 3.0;
    wr(REG_PQ, FP_3P0);
    // outside the calibrated range
    apply_temp(-45 * 256);
    apply_temp(85 * 256);

    // a temperature written while busy is dropped
    wr(REG_TEMP, 32'(25 * 256));
    t_access = cyc;
    wr(REG_TEMP, 32'(-20 * 256));
    n_dropped++;
    finish_and_check(25 * 256, 1'b0);
    rd(REG_TEMP, d);
    expect_true("dropped temperature not taken", d == 32'(25 * 256));

    // the sensor port
    wr(REG_CTRL, 32'h3);
    upd0 = n_update;
    @(negedge clk) sensor_valid = 1'b1; sensor_temp = TEMP_W'(-40 * 256 + 7);
    @(negedge clk) sensor_valid = 1'b0;
    n_sensor++;
    finish_and_check(-40 * 256 + 7, 1'b1);
    @(negedge clk);
    expect_true("vdd_update pulsed on a change", n_update > upd0);
    wr(REG_CTRL, 32'h2);

    // bus error
    bus.write(REG_PSC, 32'h0, e);
    if (e) n_slverr++;

    $display("lower=%0d raise=%0d keep(cmp1)=%0d keep(cmp2)=%0d sensor=%0d dropped=%0d clamped=%0d slverr=%0d updates=%0d",
             n_lower, n_raise, n_keep1, n_keep2, n_sensor, n_dropped, n_clamped, n_slverr, n_update);
    expect_true("lowering happened", n_lower > 0);
    expect_true("safety raise happened", n_raise > 0);
    expect_true("1st comparator rejected", n_keep1 > 0);
    expect_true("2nd comparator rejected", n_keep2 > 0);
    expect_true("sensor start happened", n_sensor > 0);
    expect_true("drop while busy happened", n_dropped > 0);
    expect_true("extrapolation happened", n_clamped > 0);
    expect_true("bus error happened", n_slverr > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
