// tb_fp_cmp: self-checking testbench of the floating-point comparator.
//
// Random pairs of floats of both signs, equal pairs, +0/-0 and pairs that
// differ only in the last fraction bit; gt/eq/lt are compared with the
// ordering of the same numbers as reals.
module tb_fp_cmp;
  import pmic_pkg::*;
  import tb_fp_pkg::*;

  fp_t  a, b;
  logic gt, eq, lt;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_cmp dut (.a(a), .b(b), .gt(gt), .eq(eq), .lt(lt));

  always #5 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    real rx, ry;
    a = x; b = y;
    #1;
    rx = to_real(x);
    ry = to_real(y);
    checks++;
    if (gt !== (rx > ry) || eq !== (rx == ry) || lt !== (rx < ry)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h ? %h: gt=%b eq=%b lt=%b", x, y, gt, eq, lt);
    end
  endtask

  initial begin
    logic [31:0] r;
    check(32'h00000000, 32'h80000000);
    check(32'h3F800000, 32'h3F800000);
    check(32'hBF800000, 32'h3F800000);
    check(32'h3F800000, 32'h00000000);
    check(32'h00000000, 32'hBF800000);
    check(32'hBF800000, 32'hBF800001);
    for (int i = 0; i < 5000; i++) begin
      r = {1'($urandom), 8'($urandom_range(253) + 1), 23'($urandom)};
      check(r, {1'($urandom), 8'($urandom_range(253) + 1), 23'($urandom)});
      check(r, r);
      check(r, r ^ 32'd1);
      check(r, {r[31], 8'(int'(r[30:23]) == 254 ? 253 : int'(r[30:23]) + 1), r[22:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
