// tb_fp_mul: self-checking testbench of the single-precision multiplier.
//
// Random operands (and a set of edge cases: zeros, signs, rounding carries,
// overflow and underflow) are applied; the expected product is the exact
// double-precision product of the two operands rounded to single precision
// by tb_fp_pkg::from_real, which must match bit for bit.
module tb_fp_mul;
  import pmic_pkg::*;
  import tb_fp_pkg::*;

  fp_t a, b, p;
  int  checks = 0, failures = 0;
  logic clk = 1'b0;
  int  cycles = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rnd_fp(input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp_p;
    a = x; b = y;
    #1;
    exp_p = from_real(to_real(x) * to_real(y));
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h: got %h expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    check(32'h3F800000, 32'h40000000);   // 1 * 2
    check(32'h3F0A3D71, 32'h3F0A3D71);   // 0.54^2
    check(32'h00000000, 32'h40400000);   // 0 * 3
    check(32'hBF800000, 32'h40400000);   // -1 * 3
    check(32'h3FFFFFFF, 32'h3FFFFFFF);   // rounding carry into the exponent
    check(32'h7F000000, 32'h40000000);   // overflow to infinity
    check(32'h00800000, 32'h3F000000);   // underflow to zero
    check(32'h3F800001, 32'h3F800001);
    for (int i = 0; i < 20000; i++) check(rnd_fp(64, 190), rnd_fp(64, 190));
    for (int i = 0; i < 2000; i++)  check(rnd_fp(1, 254), rnd_fp(1, 254));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
