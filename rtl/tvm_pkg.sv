// tvm_pkg: shared widths, fixed-point formats and record types of the
// ring-oscillator temperature/voltage monitor (TVM) system.
//
// Number formats used throughout:
//   * RO counts are unsigned CNT_W-bit edge counts taken over one measurement
//     window (frequency = count / window).
//   * Calibration ratios F_typ/F(T0,V0) are unsigned Q(R_W-R_FRAC).R_FRAC.
//   * Calibrated differential counts (ratio * (F - F0)) are signed with
//     R_FRAC fraction bits.
//   * Regression coefficients a, b, c are signed Q(COEF_W-COEF_FRAC).COEF_FRAC
//     in result units per count; d is a signed integer in result units.
//   * Temperatures are in milli-degrees Celsius (m°C), voltages in microvolts.
// The monitor's physics (three ROs, differential frequencies, ratio
// calibration, 3x3 sub-range hierarchy) follows the published method; all
// widths and number formats here are this implementation's choices.
`timescale 1ns / 1fs
package tvm_pkg;

  localparam int unsigned N_RO      = 3;   // ROs per monitor
  localparam int unsigned CNT_W     = 16;  // RO edge counter width
  localparam int unsigned R_W       = 16;  // calibration ratio width
  localparam int unsigned R_FRAC    = 14;  // ratio fraction bits (1.0 = 16384)
  localparam int unsigned DF_W      = CNT_W + R_W + 2; // calibrated delta-count width
  localparam int unsigned COEF_W    = 32;  // regression coefficient width
  localparam int unsigned COEF_FRAC = 16;  // coefficient fraction bits
  localparam int unsigned VAL_W     = 24;  // temperature (m°C) / voltage (uV) width
  localparam int unsigned N_SUB     = 3;   // sub-ranges per quantity
  // Equation table: 0 = full range (A), 1..3 = V sub-range rows (a,b,c),
  // 4..12 = the nine T&V sub-ranges (1..9).
  localparam int unsigned N_EQ      = 1 + N_SUB + N_SUB * N_SUB;
  localparam int unsigned EQ_AW     = 4;

  typedef logic [CNT_W-1:0]          cnt_t;
  typedef logic [R_W-1:0]            ratio_t;
  typedef logic signed [DF_W-1:0]    dfc_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [VAL_W-1:0]   val_t;

  // One linear equation y = a*x1 + b*x2 + c*x3 + d.
  typedef struct packed {
    coef_t a;
    coef_t b;
    coef_t c;
    coef_t d;
  } lin_eq_t;

  // Which quantity a coefficient belongs to.
  typedef enum logic {
    Q_TEMP = 1'b0,
    Q_VOLT = 1'b1
  } quantity_e;

  // Which coefficient of an equation is written.
  typedef enum logic [1:0] {
    C_A = 2'd0,
    C_B = 2'd1,
    C_C = 2'd2,
    C_D = 2'd3
  } coef_sel_e;

endpackage
