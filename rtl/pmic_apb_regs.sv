// pmic_apb_regs: APB slave and register file of the PMIC controller.
//
// Software talks to the controller over the AMBA APB: it loads the per-chip
// calibration (spline coefficients, SoC power model, converter model),
// sets the present supply voltage, writes a temperature to start a
// computation and reads back the result. A temperature may instead come
// straight from an on-chip sensor (sensor_valid/sensor_temp) when CTRL[0]
// is set. The register map is in pmic_pkg.
//
// APB timing: no wait states (PREADY is always 1); a transfer is a setup
// cycle (PSEL) followed by an access cycle (PSEL and PENABLE). Writes take
// effect at the end of the access cycle, read data is driven during it.
// PSLVERR flags an unmapped address or a write to a read-only register.
//
// calc_start pulses for one cycle when a temperature is accepted, with the
// value on calc_temp; a temperature arriving while the core is busy is
// dropped (STATUS.busy tells software to wait). The core's VDD update
// (vdd_we) has priority over a simultaneous bus write of VDD. STATUS.done
// is set when a computation ends and cleared by writing 1 to it; irq is
// STATUS.done gated with CTRL[1].
module pmic_apb_regs
  import pmic_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // APB
  input  logic                    psel,
  input  logic                    penable,
  input  logic                    pwrite,
  input  logic [APB_AW-1:0]       paddr,
  input  logic [31:0]             pwdata,
  output logic [31:0]             prdata,
  output logic                    pready,
  output logic                    pslverr,
  // temperature sensor
  input  logic                    sensor_valid,
  input  logic signed [TEMP_W-1:0] sensor_temp,
  // to / from the core
  output logic                    calc_start,
  output logic signed [TEMP_W-1:0] calc_temp,
  output fp_t                     vdd,
  output fp_t                     i_sc,
  output fp_t                     p_ref,
  output fp_t                     a2,
  output fp_t                     a1,
  output fp_t                     v_in,
  output fp_t                     p_q,
  input  logic                    core_busy,
  input  logic                    core_done,
  input  logic                    vdd_we,
  input  fp_t                     vdd_new,
  input  fp_t                     vopt,
  input  fp_t                     ps_opt,
  input  fp_t                     ps_cur,
  input  fp_t                     psc,
  input  decision_e               decision,
  input  logic                    cmp1,
  input  logic                    cmp2,
  input  logic                    clamped,
  // coefficient memory
  output logic                    coef_we,
  output logic [$clog2(N_SEG*4)-1:0] coef_addr,
  output fp_t                     coef_wdata,
  input  fp_t                     coef_rdata,
  output logic                    irq
);

  logic [1:0] ctrl;
  logic       done_flag;
  logic       wr, rd;
  logic       coef_hit;
  logic       valid_addr, read_only;

  assign wr       = psel && penable && pwrite;
  assign rd       = psel && penable && !pwrite;
  assign coef_hit = (paddr >= REG_COEF) && (paddr < REG_COEF + APB_AW'(N_SEG * 16));
  assign coef_addr  = ($clog2(N_SEG*4))'((paddr - REG_COEF) >> 2);
  assign coef_wdata = fp_t'(pwdata);
  assign coef_we    = wr && coef_hit;
  assign pready     = 1'b1;

  always_comb begin
    valid_addr = coef_hit;
    read_only  = 1'b0;
    unique case (paddr)
      REG_CTRL, REG_STATUS, REG_TEMP, REG_ISC, REG_VDD,
      REG_PREF, REG_A2, REG_A1, REG_VIN, REG_PQ: valid_addr = 1'b1;
      REG_VOPT, REG_PSOPT, REG_PSCUR, REG_PSC: begin
        valid_addr = 1'b1;
        read_only  = 1'b1;
      end
      default: ;
    endcase
    pslverr = psel && penable && (!valid_addr || (pwrite && read_only));
  end

  // register writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl       <= '0;
      done_flag  <= 1'b0;
      calc_temp  <= '0;
      calc_start <= 1'b0;
      vdd        <= fp_t'(FP_0P54);
      i_sc       <= FP_ZERO;
      p_ref      <= fp_t'(FP_100);
      a2         <= fp_t'(FP_342P9);
      a1         <= FP_ZERO;
      v_in       <= fp_t'(FP_0P54);
      p_q        <= fp_t'(FP_3P0);
    end else begin
      calc_start <= 1'b0;
      if (wr) begin
        unique case (paddr)
          REG_CTRL:   ctrl  <= pwdata[1:0];
          REG_STATUS: if (pwdata[1]) done_flag <= 1'b0;
          REG_ISC:    i_sc  <= fp_t'(pwdata);
          REG_VDD:    vdd   <= fp_t'(pwdata);
          REG_PREF:   p_ref <= fp_t'(pwdata);
          REG_A2:     a2    <= fp_t'(pwdata);
          REG_A1:     a1    <= fp_t'(pwdata);
          REG_VIN:    v_in  <= fp_t'(pwdata);
          REG_PQ:     p_q   <= fp_t'(pwdata);
          default: ;
        endcase
      end
      // a temperature from the bus or from the sensor starts a computation
      if (!core_busy && !calc_start) begin
        if (wr && paddr == REG_TEMP) begin
          calc_temp  <= pwdata[TEMP_W-1:0];
          calc_start <= 1'b1;
        end else if (ctrl[0] && sensor_valid) begin
          calc_temp  <= sensor_temp;
          calc_start <= 1'b1;
        end
      end
      if (vdd_we) vdd <= vdd_new;
      if (core_done) done_flag <= 1'b1;
    end
  end

  // read data
  always_comb begin
    prdata = '0;
    if (rd) begin
      if (coef_hit) prdata = coef_rdata;
      else begin
        unique case (paddr)
          REG_CTRL:   prdata = {30'd0, ctrl};
          REG_STATUS: prdata = {25'd0, clamped, cmp2, cmp1, decision, done_flag, core_busy || calc_start};
          REG_TEMP:   prdata = {{(32-TEMP_W){calc_temp[TEMP_W-1]}}, calc_temp};
          REG_ISC:    prdata = i_sc;
          REG_VDD:    prdata = vdd;
          REG_VOPT:   prdata = vopt;
          REG_PSOPT:  prdata = ps_opt;
          REG_PSCUR:  prdata = ps_cur;
          REG_PSC:    prdata = psc;
          REG_PREF:   prdata = p_ref;
          REG_A2:     prdata = a2;
          REG_A1:     prdata = a1;
          REG_VIN:    prdata = v_in;
          REG_PQ:     prdata = p_q;
          default: ;
        endcase
      end
    end
  end

  assign irq = done_flag && ctrl[1];

  // APB protocol: the access phase follows a setup phase with PSEL held
  a_penable_needs_psel: assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel)
    else $error("APB: PENABLE without PSEL");

endmodule
