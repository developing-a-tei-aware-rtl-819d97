// pmic_pkg: types and constants shared by the TEI-aware PMIC controller.
//
// The controller computes in single-precision binary floating point
// (1 sign bit, 8 exponent bits, 23 fraction bits, bias 127). Subnormal
// numbers are flushed to zero and NaN is not produced; this width is a
// choice of this implementation, sized so that spline coefficients around
// 2e-4 and supply voltages around 0.5 V keep about seven significant digits.
//
// Temperatures are signed fixed-point numbers in degrees Celsius with
// TEMP_FRAC fraction bits, as a digital temperature sensor would deliver.
// The spline covers N_SEG sections of T_STEP degrees starting at T_MIN; the
// defaults (12 sections of 10 degrees from -40 C) follow the 13 calibration
// points measured from -40 C to 80 C.
//
// The register map of the APB slave is also defined here.
package pmic_pkg;

  // ---------------------------------------------------------------- float
  localparam int unsigned FP_W    = 32;
  localparam int unsigned EXP_W   = 8;
  localparam int unsigned FRAC_W  = 23;
  localparam int unsigned EXP_BIAS = 127;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp_t;

  localparam fp_t FP_ZERO = '0;
  localparam fp_t FP_INF  = '{sign: 1'b0, exp: '1, frac: '0};

  // Flip the sign of a float (used to turn the adder into a subtractor).
  function automatic fp_t fp_neg(input fp_t a);
    fp_t r;
    r      = a;
    r.sign = ~a.sign;
    return r;
  endfunction

  // Some reset constants (IEEE single-precision encodings).
  localparam logic [31:0] FP_0P54  = 32'h3F0A3D71;  // 0.54 V, worst-case VDD at 50 MHz
  localparam logic [31:0] FP_100   = 32'h42C80000;  // 100.0 (percent)
  localparam logic [31:0] FP_342P9 = 32'h43AB77BF;  // 342.936 = 100 / 0.54^2
  localparam logic [31:0] FP_3P0   = 32'h40400000;  // 3.0 (percent)

  // ------------------------------------------------------------ temperature
  localparam int unsigned TEMP_W    = 16;
  localparam int unsigned TEMP_FRAC = 8;
  localparam int          T_MIN     = -40;
  localparam int          T_STEP    = 10;
  localparam int unsigned N_SEG     = 12;
  localparam int unsigned SEG_W     = $clog2(N_SEG);

  // Four spline coefficients of one section, p[0] is the constant term.
  typedef fp_t [3:0] coeff_set_t;

  // ------------------------------------------------------- decision result
  typedef enum logic [1:0] {
    DEC_KEEP  = 2'd0,   // no gain: VDD unchanged
    DEC_LOWER = 2'd1,   // both comparators passed: VDD lowered to Vopt
    DEC_RAISE = 2'd2    // safety protection: Vopt above VDD, raised at once
  } decision_e;

  // ----------------------------------------------------------- register map
  localparam int unsigned APB_AW = 12;

  localparam logic [APB_AW-1:0] REG_CTRL   = 12'h000;  // [0] sensor port enable, [1] irq enable
  localparam logic [APB_AW-1:0] REG_STATUS = 12'h004;  // [0] busy [1] done [3:2] decision [4] cmp1 [5] cmp2 [6] T outside spline; write 1 to [1] clears
  localparam logic [APB_AW-1:0] REG_TEMP   = 12'h008;  // temperature, writing starts a computation
  localparam logic [APB_AW-1:0] REG_ISC    = 12'h00C;  // SC output current
  localparam logic [APB_AW-1:0] REG_VDD    = 12'h010;  // present supply voltage
  localparam logic [APB_AW-1:0] REG_VOPT   = 12'h014;  // last Vopt (read only)
  localparam logic [APB_AW-1:0] REG_PSOPT  = 12'h018;  // PS_TEI-VS(Vopt) (read only)
  localparam logic [APB_AW-1:0] REG_PSCUR  = 12'h01C;  // PS_TEI-VS(VDD) (read only)
  localparam logic [APB_AW-1:0] REG_PSC    = 12'h020;  // P_SC(Vopt) (read only)
  localparam logic [APB_AW-1:0] REG_PREF   = 12'h024;  // SoC power at worst-case voltage
  localparam logic [APB_AW-1:0] REG_A2     = 12'h028;  // dynamic power coefficient
  localparam logic [APB_AW-1:0] REG_A1     = 12'h02C;  // static power coefficient
  localparam logic [APB_AW-1:0] REG_VIN    = 12'h030;  // SC input voltage
  localparam logic [APB_AW-1:0] REG_PQ     = 12'h034;  // SC fixed loss
  localparam logic [APB_AW-1:0] REG_COEF   = 12'h100;  // 0x100 + 16*section + 4*j holds p_j

endpackage
