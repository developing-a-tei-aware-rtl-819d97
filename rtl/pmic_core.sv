// pmic_core: the TEI-VS control algorithm of the PMIC controller.
//
// For a chip temperature T it finds the lowest supply voltage that still
// meets the target clock frequency and decides whether to switch to it:
//
//   1. temp_segment picks the spline section of T and the offset x in it;
//      the section's coefficients come from spline_coeff_mem (coeff_seg).
//   2. vopt_calc evaluates Vopt(T) while ps_calc computes the saving at the
//      present supply, PS_TEI-VS(VDD); both take four cycles.
//   3. ps_calc computes PS_TEI-VS(Vopt) while psc_calc computes the
//      converter loss P_SC(Vopt, I_SC).
//   4. The 1st comparator checks PS_TEI-VS(Vopt) > PS_TEI-VS(VDD), the 2nd
//      that the saving at Vopt exceeds P_SC. Both passing lowers VDD to
//      Vopt (DEC_LOWER). Safety protection: if Vopt is above the present
//      VDD (the chip got colder) VDD is raised to Vopt at once, whatever
//      the comparators say (DEC_RAISE), since running below the minimum
//      voltage would break timing. Otherwise VDD is kept (DEC_KEEP).
//
// Steps 1-4 and the two comparators follow the algorithm of the design; the
// overlap of steps, the order of the comparisons with the safety check and
// the immediate raise are this implementation's.
//
// Timing: start is sampled in cycle 0 together with temp and vdd; step 2
// runs in cycles 1-4, step 3 in cycles 6-9, the decision is made in cycle
// 11 and done pulses in cycle 12 together with vdd_we when VDD changes.
// A start while busy is ignored.
module pmic_core
  import pmic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [TEMP_W-1:0] temp,
  input  fp_t                    vdd,       // present supply voltage
  input  fp_t                    i_sc,
  input  fp_t                    p_ref,
  input  fp_t                    a2,
  input  fp_t                    a1,
  input  fp_t                    v_in,
  input  fp_t                    p_q,
  output logic [SEG_W-1:0]       coeff_seg,
  input  coeff_set_t             coeff,
  output logic                   busy,
  output logic                   done,
  output logic                   vdd_we,
  output fp_t                    vdd_new,
  output fp_t                    vopt,
  output fp_t                    ps_opt,
  output fp_t                    ps_cur,
  output fp_t                    psc,
  output decision_e              decision,
  output logic                   cmp1,
  output logic                   cmp2,
  output logic                   clamped
);

  typedef enum logic [1:0] {C_IDLE, C_STEP2, C_STEP3, C_DECIDE} cstate_e;
  cstate_e st;

  logic             launch;
  logic [SEG_W-1:0] seg_w;
  fp_t              x_w, x_r, vdd_r;
  logic             clamped_w;

  logic vo_busy, vo_done, ps_busy, ps_done, pc_busy, pc_done;
  fp_t  vo_out, ps_out, pc_out, ps_v;
  logic c1_gt, c2_gt, sf_gt;
  logic c1_eq, c1_lt, c2_eq, c2_lt, sf_eq, sf_lt;

  temp_segment u_seg (
    .temp    (temp),
    .seg     (seg_w),
    .x       (x_w),
    .clamped (clamped_w)
  );

  vopt_calc u_vopt (
    .clk (clk), .rst_n (rst_n),
    .start (launch && st == C_STEP2),
    .x (x_r), .p (coeff),
    .busy (vo_busy), .done (vo_done), .vopt (vo_out)
  );

  assign ps_v = (st == C_STEP2) ? vdd_r : vopt;

  ps_calc u_ps (
    .clk (clk), .rst_n (rst_n),
    .start (launch),
    .v (ps_v), .a2 (a2), .a1 (a1), .p_ref (p_ref),
    .busy (ps_busy), .done (ps_done), .ps (ps_out)
  );

  psc_calc u_psc (
    .clk (clk), .rst_n (rst_n),
    .start (launch && st == C_STEP3),
    .v (vopt), .i_sc (i_sc), .v_in (v_in), .p_q (p_q),
    .busy (pc_busy), .done (pc_done), .psc (pc_out)
  );

  // 1st comparator, 2nd comparator and the safety check
  fp_cmp u_cmp1 (.a(ps_opt), .b(ps_cur), .gt(c1_gt), .eq(c1_eq), .lt(c1_lt));
  fp_cmp u_cmp2 (.a(ps_opt), .b(psc),    .gt(c2_gt), .eq(c2_eq), .lt(c2_lt));
  fp_cmp u_safe (.a(vopt),   .b(vdd_r),  .gt(sf_gt), .eq(sf_eq), .lt(sf_lt));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      launch    <= 1'b0;
      coeff_seg <= '0;
      x_r       <= FP_ZERO;
      vdd_r     <= FP_ZERO;
      vopt      <= FP_ZERO;
      ps_opt    <= FP_ZERO;
      ps_cur    <= FP_ZERO;
      psc       <= FP_ZERO;
      vdd_new   <= FP_ZERO;
      vdd_we    <= 1'b0;
      done      <= 1'b0;
      decision  <= DEC_KEEP;
      cmp1      <= 1'b0;
      cmp2      <= 1'b0;
      clamped   <= 1'b0;
    end else begin
      launch <= 1'b0;
      vdd_we <= 1'b0;
      done   <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          coeff_seg <= seg_w;
          x_r       <= x_w;
          clamped   <= clamped_w;
          vdd_r     <= vdd;
          launch    <= 1'b1;
          st        <= C_STEP2;
        end
        C_STEP2: if (vo_done) begin
          vopt   <= vo_out;
          ps_cur <= ps_out;
          launch <= 1'b1;
          st     <= C_STEP3;
        end
        C_STEP3: if (ps_done) begin
          ps_opt <= ps_out;
          psc    <= pc_out;
          st     <= C_DECIDE;
        end
        C_DECIDE: begin
          cmp1 <= c1_gt;
          cmp2 <= c2_gt;
          if (sf_gt) begin
            decision <= DEC_RAISE;
            vdd_new  <= vopt;
            vdd_we   <= 1'b1;
          end else if (c1_gt && c2_gt) begin
            decision <= DEC_LOWER;
            vdd_new  <= vopt;
            vdd_we   <= 1'b1;
          end else begin
            decision <= DEC_KEEP;
            vdd_new  <= vdd_r;
          end
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);

  // the converter loss is ready before the second saving
  a_psc_first: assert property (@(posedge clk) disable iff (!rst_n)
                                (st == C_STEP3 && ps_done) |-> !pc_busy)
    else $error("pmic_core: P_SC not ready at decision");

endmodule
