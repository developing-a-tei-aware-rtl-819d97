// tb_pmic_core: self-checking testbench of the TEI-VS algorithm core.
//
// The spline of the 13 calibration points is served to the core by a
// model of the coefficient store. For random temperatures (and repeated
// ones) the testbench tracks the supply voltage like the converter would,
// recomputes Vopt, both savings, the converter loss and the decision with
// real arithmetic, and checks the core's values and its decision. The
// converter's fixed loss is raised for a part of the run so that the 2nd
// comparator rejects otherwise profitable steps. Decisions whose real
// margins are too close to call in single precision are not judged.
// The latency from start to done must be 12 cycles.
module tb_pmic_core;
  import pmic_pkg::*;
  import tb_fp_pkg::*;
  import tb_spline_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [TEMP_W-1:0] temp = '0;
  fp_t        vdd, i_sc, p_ref, a2, a1, v_in, p_q;
  logic [SEG_W-1:0] coeff_seg;
  coeff_set_t coeff;
  logic       busy, done, vdd_we, cmp1, cmp2, clamped;
  fp_t        vdd_new, vopt, ps_opt, ps_cur, psc;
  decision_e  decision;
  int         checks = 0, failures = 0;
  int         n_lower = 0, n_raise = 0, n_keep1 = 0, n_keep2 = 0;
  coef_tab_t  tab;
  logic [31:0] ctab [12][4];

  pmic_core dut (.clk, .rst_n, .start, .temp, .vdd, .i_sc, .p_ref, .a2, .a1, .v_in, .p_q,
                 .coeff_seg, .coeff, .busy, .done, .vdd_we, .vdd_new, .vopt, .ps_opt,
                 .ps_cur, .psc, .decision, .cmp1, .cmp2, .clamped);

  always_comb for (int j = 0; j < 4; j++) coeff[j] = ctab[coeff_seg][j];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ps_model(input real v);
    return to_real(p_ref) - (to_real(a2) * v * v + to_real(a1) * v);
  endfunction

  task automatic run(input int code);
    real t, xr, vo, pso, psu, pc, vd;
    int  k, lat;
    decision_e dexp;
    logic judge;
    temp = TEMP_W'(code);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 40) @(negedge clk) lat++;
    t  = real'(code) / 256.0;
    k  = int'($floor((t + 40.0) / 10.0));
    if (k < 0) k = 0;
    if (k > 11) k = 11;
    xr  = t - (-40.0 + 10.0 * k);
    vo  = to_real(ctab[k][3]) * xr ** 3 + to_real(ctab[k][2]) * xr ** 2
        + to_real(ctab[k][1]) * xr + to_real(ctab[k][0]);
    vd  = to_real(vdd);
    psu = ps_model(vd);
    pso = ps_model(vo);
    pc  = (to_real(v_in) - vo) * to_real(i_sc) + to_real(p_q);
    checks += 5;
    if (lat != 12) begin failures++; $display("FAIL latency %0d", lat); end
    if (abs_r(to_real(vopt) - vo) > 1e-5) begin failures++; $display("FAIL T=%f vopt %f exp %f", t, to_real(vopt), vo); end
    if (abs_r(to_real(ps_cur) - psu) > 1e-3) begin failures++; $display("FAIL ps_cur %f exp %f", to_real(ps_cur), psu); end
    if (abs_r(to_real(ps_opt) - pso) > 1e-3) begin failures++; $display("FAIL ps_opt %f exp %f", to_real(ps_opt), pso); end
    if (abs_r(to_real(psc) - pc) > 1e-3) begin failures++; $display("FAIL psc %f exp %f", to_real(psc), pc); end
    // reference decision
    judge = 1'b1;
    if (vo > vd + 1e-6) dexp = DEC_RAISE;
    else if (vo > vd - 1e-6 && vo < vd + 1e-6 && vopt != vdd) judge = 1'b0;
    else if (pso > psu + 1e-3 && pso > pc + 1e-3) dexp = DEC_LOWER;
    else if (pso > psu + 1e-3 && pso < pc - 1e-3) dexp = DEC_KEEP;
    else if (pso <= psu) dexp = DEC_KEEP;
    else judge = 1'b0;
    if (judge) begin
      checks += 2;
      if (decision != dexp) begin
        failures++; $display("FAIL T=%f decision %s expected %s", t, decision.name(), dexp.name());
      end
      if (vdd_we != (dexp != DEC_KEEP)) begin failures++; $display("FAIL vdd_we %b", vdd_we); end
    end
    if (decision == DEC_LOWER) n_lower++;
    if (decision == DEC_RAISE) n_raise++;
    if (decision == DEC_KEEP && !cmp1) n_keep1++;
    if (decision == DEC_KEEP && cmp1 && !cmp2) n_keep2++;
    if (vdd_we) begin
      checks++;
      if (vdd_new !== vopt) begin failures++; $display("FAIL vdd_new %h vopt %h", vdd_new, vopt); end
      vdd = vdd_new;
    end
  endtask

  initial begin
    int code;
    tab = natural_spline();
    for (int k = 0; k < 12; k++) for (int j = 0; j < 4; j++) ctab[k][j] = from_real(tab[k][j]);
    vdd   = fp_t'(FP_0P54);
    i_sc  = from_real(10.0);
    p_ref = fp_t'(FP_100);
    a2    = fp_t'(FP_342P9);
    a1    = FP_ZERO;
    v_in  = fp_t'(FP_0P54);
    p_q   = fp_t'(FP_3P0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(20 * 256);       // warmer than worst case: lower
    run(20 * 256);       // same temperature: 1st comparator fails, keep
    run(-30 * 256);      // colder: safety raise
    for (int i = 0; i < 150; i++) begin
      code = -40 * 256 + int'($urandom_range(120 * 256));
      run(code);
      if (i % 7 == 0) run(code);
    end
    // a large converter loss makes the 2nd comparator reject lowering
    p_q = from_real(60.0);
    for (int i = 0; i < 40; i++) begin
      run(-40 * 256 + int'($urandom_range(120 * 256)));
    end
    run(-40 * 256);
    run(80 * 256);
    run(-50 * 256);      // outside the calibrated range: extrapolated
    checks += 4;
    if (n_lower == 0) begin failures++; $display("FAIL no lowering seen"); end
    if (n_raise == 0) begin failures++; $display("FAIL no safety raise seen"); end
    if (n_keep1 == 0) begin failures++; $display("FAIL no 1st-comparator reject seen"); end
    if (n_keep2 == 0) begin failures++; $display("FAIL no 2nd-comparator reject seen"); end
    $display("lower=%0d raise=%0d keep(cmp1)=%0d keep(cmp2)=%0d", n_lower, n_raise, n_keep1, n_keep2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
