// tb_spline_coeff_mem: self-checking testbench of the coefficient storage.
//
// Checks reset to zero, then writes random words to every address in
// random order and checks both the bus read-back port and the four-word
// section port against a model array, including writes to addresses past
// the end, which must be ignored.
module tb_spline_coeff_mem;
  import pmic_pkg::*;

  localparam int NW = N_SEG * 4;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  wr_en = 1'b0;
  logic [$clog2(NW)-1:0] wr_addr = '0, rd_addr = '0;
  fp_t                   wr_data = '0, rd_data;
  logic [SEG_W-1:0]      rd_seg = '0;
  coeff_set_t            coeff;
  logic [31:0]           model [NW];
  int                    checks = 0, failures = 0;

  spline_coeff_mem dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data, .rd_seg, .coeff);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < NW; a++) begin
      rd_addr = ($clog2(NW))'(a);
      #1;
      checks++;
      if (rd_data !== model[a]) begin
        failures++; $display("FAIL read %0d: %h expected %h", a, rd_data, model[a]);
      end
    end
    for (int s = 0; s < N_SEG; s++) begin
      rd_seg = SEG_W'(s);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (coeff[j] !== model[4 * s + j]) begin
          failures++; $display("FAIL section %0d p%0d: %h expected %h", s, j, coeff[j], model[4*s+j]);
        end
      end
    end
  endtask

  initial begin
    for (int a = 0; a < NW; a++) model[a] = 32'd0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all();
    for (int r = 0; r < 20; r++) begin
      for (int n = 0; n < NW + 8; n++) begin
        int a;
        a = int'($urandom_range(63));
        @(negedge clk);
        wr_en   = 1'b1;
        wr_addr = ($clog2(NW))'(a);
        wr_data = $urandom;
        if (a < NW) model[a] = wr_data;
      end
      @(negedge clk) wr_en = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
