// pmic_controller: TEI-aware PMIC controller, an APB peripheral for an
// ultra-low-power SoC.
//
// Near- and sub-threshold circuits get faster as they warm up (temperature
// effect inversion), so a chip whose clock was set at its coldest corner can
// run at the same frequency on a lower supply when it is warmer. This
// controller turns a chip temperature into the lowest safe supply voltage,
// Vopt, from a per-section cubic spline fitted to per-chip measurements,
// weighs the power it would save against the loss of the switched-capacitor
// DC-DC converter, and tells the converter the new voltage.
//
// Structure: pmic_apb_regs (bus and registers) -> pmic_core (algorithm:
// temp_segment, vopt_calc, ps_calc, psc_calc and the comparators) with
// spline_coeff_mem holding the coefficients. The DC-DC converter and the
// temperature sensor are outside: the sensor reaches the controller through
// sensor_valid/sensor_temp, the converter through vdd_set/vdd_update.
//
// Interface: APB slave (12-bit address, 32-bit data, no wait states);
// sensor_temp is signed fixed point in C with 8 fraction bits; vdd_set is
// the supply voltage in single-precision float, vdd_update pulses for one
// cycle when it changes; irq signals the end of a computation.
// Timing: irq (and STATUS.done) rise 13 clock edges after the edge that
// completes the APB write of TEMP; the core itself needs 12 of them, the
// register file one to issue the start. vdd_set takes its new value on the
// same edge, and vdd_update is high for the cycle that follows it.
//
// The algorithm (spline Vopt, two savings, converter loss, two comparators,
// safety protection), its calculators and the four-cycle Vopt evaluation on
// two multipliers follow the published TEI-aware PMIC controller; the
// register map, the number formats, the saving and loss models and the way
// the safety rule is applied are this implementation's choices.
module pmic_controller
  import pmic_pkg::*;
(
  input  logic                     pclk,
  input  logic                     presetn,
  input  logic                     psel,
  input  logic                     penable,
  input  logic                     pwrite,
  input  logic [APB_AW-1:0]        paddr,
  input  logic [31:0]              pwdata,
  output logic [31:0]              prdata,
  output logic                     pready,
  output logic                     pslverr,
  input  logic                     sensor_valid,
  input  logic signed [TEMP_W-1:0] sensor_temp,
  output logic [31:0]              vdd_set,
  output logic                     vdd_update,
  output logic                     irq
);

  logic                      calc_start;
  logic signed [TEMP_W-1:0]  calc_temp;
  fp_t                       vdd, i_sc, p_ref, a2, a1, v_in, p_q;
  logic                      core_busy, core_done, vdd_we;
  fp_t                       vdd_new, vopt, ps_opt, ps_cur, psc;
  decision_e                 decision;
  logic                      cmp1, cmp2, clamped;
  logic                      coef_we;
  logic [$clog2(N_SEG*4)-1:0] coef_addr;
  fp_t                       coef_wdata, coef_rdata;
  logic [SEG_W-1:0]          coeff_seg;
  coeff_set_t                coeff;

  pmic_apb_regs u_regs (
    .clk (pclk), .rst_n (presetn),
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .sensor_valid, .sensor_temp,
    .calc_start, .calc_temp,
    .vdd, .i_sc, .p_ref, .a2, .a1, .v_in, .p_q,
    .core_busy, .core_done, .vdd_we, .vdd_new,
    .vopt, .ps_opt, .ps_cur, .psc, .decision, .cmp1, .cmp2, .clamped,
    .coef_we, .coef_addr, .coef_wdata, .coef_rdata,
    .irq
  );

  spline_coeff_mem u_mem (
    .clk (pclk), .rst_n (presetn),
    .wr_en (coef_we), .wr_addr (coef_addr), .wr_data (coef_wdata),
    .rd_addr (coef_addr), .rd_data (coef_rdata),
    .rd_seg (coeff_seg), .coeff (coeff)
  );

  pmic_core u_core (
    .clk (pclk), .rst_n (presetn),
    .start (calc_start), .temp (calc_temp),
    .vdd, .i_sc, .p_ref, .a2, .a1, .v_in, .p_q,
    .coeff_seg, .coeff,
    .busy (core_busy), .done (core_done),
    .vdd_we, .vdd_new,
    .vopt, .ps_opt, .ps_cur, .psc, .decision, .cmp1, .cmp2, .clamped
  );

  // the converter set-point follows the VDD register, which the core and
  // software both write
  assign vdd_set = vdd;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) vdd_update <= 1'b0;
    else          vdd_update <= vdd_we || (psel && penable && pwrite && paddr == REG_VDD);
  end

endmodule
