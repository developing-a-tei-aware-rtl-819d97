// tb_fp_add: self-checking testbench of the single-precision adder.
//
// Random operand pairs with close exponents (exercising cancellation and
// left normalisation), far exponents (sticky-only alignment), equal
// magnitudes of opposite sign and zeros. When the exponents differ by less
// than 29 the double-precision sum is exact and the single-precision result
// must match its correct rounding bit for bit; otherwise one unit in the
// last place is allowed for the double rounding of the reference.
module tb_fp_add;
  import pmic_pkg::*;
  import tb_fp_pkg::*;

  fp_t a, b, s;
  int  checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_add dut (.a(a), .b(b), .s(s));

  always #5 clk = ~clk;

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
    logic [31:0] exp_s;
    int          ediff, tol;
    a = x; b = y;
    #1;
    exp_s = from_real(to_real(x) + to_real(y));
    ediff = int'(x[30:23]) - int'(y[30:23]);
    if (ediff < 0) ediff = -ediff;
    tol   = (ediff < 29) ? 0 : 1;
    checks++;
    if (ulp_diff(s, exp_s) > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h: got %h expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    logic [31:0] r;
    check(32'h3F800000, 32'h40000000);   // 1 + 2
    check(32'h3F800000, 32'hBF800000);   // 1 - 1
    check(32'h00000000, 32'h3F0A3D71);   // 0 + 0.54
    check(32'h3F0A3D71, 32'h00000000);
    check(32'h3F800000, 32'hBF7FFFFF);   // deep cancellation
    check(32'h4B7FFFFF, 32'h3F000000);   // carry after rounding
    check(32'h7F7FFFFF, 32'h7F7FFFFF);   // overflow
    check(32'h42C80000, 32'hC1F00000);   // 100 - 30
    for (int i = 0; i < 10000; i++) begin
      r = rnd_fp(100, 150);
      check(r, {1'($urandom), 8'(int'(r[30:23]) - 2 + int'($urandom_range(4))), 23'($urandom)});
    end
    for (int i = 0; i < 5000; i++) check(rnd_fp(60, 190), rnd_fp(60, 190));
    for (int i = 0; i < 2000; i++) begin
      r = rnd_fp(100, 150);
      check(r, {~r[31], r[30:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
