// tb_temp_segment: self-checking testbench of the spline section selector.
//
// Sweeps every temperature code from -60 C to +100 C in steps of 1/256 C
// (covering extrapolation on both sides) and checks the section index,
// the offset inside the section (converted back to a real) and the flag
// for temperatures outside the calibrated range.
module tb_temp_segment;
  import pmic_pkg::*;
  import tb_fp_pkg::*;

  logic signed [TEMP_W-1:0] temp;
  logic [SEG_W-1:0]         seg;
  fp_t                      x;
  logic                     clamped;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  temp_segment dut (.temp, .seg, .x, .clamped);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  k_exp;
    real t, off;
    for (int code = -60 * 256; code <= 100 * 256; code += 3) begin
      temp = TEMP_W'(code);
      #1;
      t     = real'(code) / 256.0;
      k_exp = int'($floor((t + 40.0) / 10.0));
      if (k_exp < 0) k_exp = 0;
      if (k_exp > 11) k_exp = 11;
      off = t - (-40.0 + 10.0 * k_exp);
      checks += 3;
      if (int'(seg) != k_exp) begin
        failures++;
        if (failures < 10) $display("FAIL T=%f seg %0d expected %0d", t, seg, k_exp);
      end
      if (to_real(x) != off) begin
        failures++;
        if (failures < 10) $display("FAIL T=%f offset %f expected %f", t, to_real(x), off);
      end
      if (clamped != (t < -40.0 || t >= 80.0)) begin
        failures++;
        if (failures < 10) $display("FAIL T=%f clamped %b", t, clamped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
