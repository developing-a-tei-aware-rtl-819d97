// spline_coeff_mem: storage of the per-section spline coefficients.
//
// Each of the NSEG sections of the Vopt(T) spline has four coefficients
// p0..p3 (Vopt = p3*x^3 + p2*x^2 + p1*x + p0 with x the offset inside the
// section). They are measured per chip at test time and written by software
// over APB, one 32-bit word per coefficient, word address 4*section + j.
// The words are held in flip-flops so that the four coefficients of the
// section selected by rd_seg are available in the same cycle. Reset clears
// all words to +0.
//
// Interface: write port (wr_en, wr_addr, wr_data) and read-back port
// (rd_addr -> rd_data) for the bus, section port (rd_seg -> coeff) for the
// calculator. Writes take effect at the next clock edge.
module spline_coeff_mem
  import pmic_pkg::*;
#(
  parameter int unsigned NSEG = N_SEG
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [$clog2(NSEG*4)-1:0]     wr_addr,
  input  fp_t                           wr_data,
  input  logic [$clog2(NSEG*4)-1:0]     rd_addr,
  output fp_t                           rd_data,
  input  logic [$clog2(NSEG)-1:0]       rd_seg,
  output coeff_set_t                    coeff
);

  fp_t mem [NSEG*4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NSEG) * 4; i++) mem[i] <= FP_ZERO;
    end else if (wr_en && int'(wr_addr) < int'(NSEG) * 4) begin
      mem[wr_addr] <= wr_data;
    end
  end

  always_comb begin
    rd_data = (int'(rd_addr) < int'(NSEG) * 4) ? mem[rd_addr] : FP_ZERO;
    for (int j = 0; j < 4; j++) begin
      coeff[j] = (int'(rd_seg) < int'(NSEG)) ? mem[int'(rd_seg) * 4 + j] : FP_ZERO;
    end
  end

endmodule
