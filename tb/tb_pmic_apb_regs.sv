// tb_pmic_apb_regs: self-checking testbench of the APB register file.
//
// Checks reset values, write/read-back of every read-write register,
// PSLVERR on read-only and unmapped addresses, the start pulse on a TEMP
// write and on a sensor sample (and that both are dropped while the core is
// busy), the done flag with its write-1-to-clear and interrupt, the core's
// VDD update, the STATUS fields and the coefficient-store port.
module tb_pmic_apb_regs;
  import pmic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  apb_if bus (.clk(clk));

  logic                     sensor_valid = 1'b0;
  logic signed [TEMP_W-1:0] sensor_temp = '0;
  logic                     calc_start;
  logic signed [TEMP_W-1:0] calc_temp;
  fp_t vdd, i_sc, p_ref, a2, a1, v_in, p_q;
  logic core_busy = 1'b0, core_done = 1'b0, vdd_we = 1'b0;
  fp_t  vdd_new = '0, vopt = '0, ps_opt = '0, ps_cur = '0, psc = '0;
  decision_e decision = DEC_KEEP;
  logic cmp1 = 1'b0, cmp2 = 1'b0, clamped = 1'b0;
  logic coef_we;
  logic [$clog2(N_SEG*4)-1:0] coef_addr;
  fp_t  coef_wdata, coef_rdata;
  logic irq;
  int   checks = 0, failures = 0;
  int   starts = 0;
  logic [31:0] cmem [N_SEG*4];

  pmic_apb_regs dut (
    .clk, .rst_n,
    .psel (bus.psel), .penable (bus.penable), .pwrite (bus.pwrite), .paddr (bus.paddr),
    .pwdata (bus.pwdata), .prdata (bus.prdata), .pready (bus.pready), .pslverr (bus.pslverr),
    .sensor_valid, .sensor_temp, .calc_start, .calc_temp,
    .vdd, .i_sc, .p_ref, .a2, .a1, .v_in, .p_q,
    .core_busy, .core_done, .vdd_we, .vdd_new, .vopt, .ps_opt, .ps_cur, .psc,
    .decision, .cmp1, .cmp2, .clamped,
    .coef_we, .coef_addr, .coef_wdata, .coef_rdata, .irq);

  // model of the coefficient store
  always_ff @(posedge clk) if (coef_we) cmem[coef_addr] <= coef_wdata;
  assign coef_rdata = cmem[coef_addr];

  always #5 clk = ~clk;
  always @(posedge clk) if (calc_start) starts++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    logic e;
    bus.read(a, d, e);
    expect_eq("no error on read", 32'(e), 0);
  endtask

  initial begin
    logic [31:0] d;
    logic        e;
    int          s0;
    for (int i = 0; i < N_SEG * 4; i++) cmem[i] = 32'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // reset values
    rd(REG_VDD, d);  expect_eq("reset VDD", d, FP_0P54);
    rd(REG_PREF, d); expect_eq("reset PREF", d, FP_100);
    rd(REG_A2, d);   expect_eq("reset A2", d, FP_342P9);
    rd(REG_PQ, d);   expect_eq("reset PQ", d, FP_3P0);
    rd(REG_STATUS, d); expect_eq("reset STATUS", d, 0);

    // read-write registers
    begin
      logic [11:0] rw [8] = '{REG_ISC, REG_VDD, REG_PREF, REG_A2, REG_A1, REG_VIN, REG_PQ, REG_CTRL};
      logic [31:0] val [8];
      for (int i = 0; i < 8; i++) begin
        val[i] = (i == 7) ? 32'd0 : $urandom;
        bus.write(rw[i], val[i], e);
        expect_eq("no error on write", 32'(e), 0);
      end
      for (int i = 0; i < 8; i++) begin
        rd(rw[i], d);
        expect_eq("read back", d, val[i]);
      end
      expect_eq("i_sc port", i_sc, val[0]);
      expect_eq("vdd port", vdd, val[1]);
      expect_eq("p_q port", p_q, val[6]);
    end

    // errors
    bus.write(REG_VOPT, 32'h1234, e);  expect_eq("write to read-only", 32'(e), 1);
    bus.read(12'h0F0, d, e);           expect_eq("unmapped read", 32'(e), 1);
    bus.write(12'h400, 32'h1, e);      expect_eq("unmapped write", 32'(e), 1);

    // result registers
    vopt = 32'h3EF5C28F; ps_opt = 32'h41A00000; ps_cur = 32'h41200000; psc = 32'h40400000;
    rd(REG_VOPT, d);  expect_eq("VOPT", d, vopt);
    rd(REG_PSOPT, d); expect_eq("PSOPT", d, ps_opt);
    rd(REG_PSCUR, d); expect_eq("PSCUR", d, ps_cur);
    rd(REG_PSC, d);   expect_eq("PSC", d, psc);

    // TEMP write starts a computation
    s0 = starts;
    bus.write(REG_TEMP, 32'h0000_1400, e);   // 20 C
    repeat (2) @(negedge clk);
    expect_eq("one start", 32'(starts - s0), 1);
    expect_eq("calc_temp", 32'(calc_temp), 32'h1400);
    rd(REG_TEMP, d); expect_eq("TEMP read", d, 32'h1400);
    // while busy a new temperature is dropped
    core_busy = 1'b1;
    s0 = starts;
    bus.write(REG_TEMP, 32'h0000_F600, e);   // -10 C
    rd(REG_STATUS, d); expect_eq("busy bit", d & 32'h1, 1);
    expect_eq("dropped while busy", 32'(starts - s0), 0);
    // core finishes: done flag, decision, comparators, VDD update
    @(negedge clk);
    core_busy = 1'b0; core_done = 1'b1; vdd_we = 1'b1; vdd_new = 32'h3EFAE148;
    decision = DEC_LOWER; cmp1 = 1'b1; cmp2 = 1'b1; clamped = 1'b0;
    @(negedge clk);
    core_done = 1'b0; vdd_we = 1'b0;
    expect_eq("vdd updated", vdd, 32'h3EFAE148);
    rd(REG_STATUS, d); expect_eq("STATUS after done", d, 32'h36);
    expect_eq("no irq when disabled", 32'(irq), 0);
    bus.write(REG_CTRL, 32'h2, e);
    expect_eq("irq", 32'(irq), 1);
    bus.write(REG_STATUS, 32'h2, e);
    expect_eq("irq cleared", 32'(irq), 0);
    rd(REG_STATUS, d); expect_eq("done cleared", d & 32'h2, 0);

    // sensor samples start a computation only when enabled
    s0 = starts;
    @(negedge clk) sensor_valid = 1'b1; sensor_temp = 16'sh3200;
    @(negedge clk) sensor_valid = 1'b0;
    expect_eq("sensor ignored when disabled", 32'(starts - s0), 0);
    bus.write(REG_CTRL, 32'h1, e);
    @(negedge clk) sensor_valid = 1'b1; sensor_temp = 16'sh3200;
    @(negedge clk) sensor_valid = 1'b0;
    @(negedge clk);
    expect_eq("sensor start", 32'(starts - s0), 1);
    expect_eq("sensor temp", 32'(calc_temp), 32'h3200);

    // coefficient store
    for (int i = 0; i < N_SEG * 4; i++) begin
      bus.write(REG_COEF + 12'(4 * i), 32'hC0DE0000 + 32'(i), e);
      expect_eq("coef write ok", 32'(e), 0);
    end
    for (int i = 0; i < N_SEG * 4; i++) begin
      expect_eq("coef stored", cmem[i], 32'hC0DE0000 + 32'(i));
      rd(REG_COEF + 12'(4 * i), d);
      expect_eq("coef read", d, 32'hC0DE0000 + 32'(i));
    end
    bus.write(REG_COEF + 12'(N_SEG * 16), 32'h1, e);
    expect_eq("past the coefficient table", 32'(e), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
