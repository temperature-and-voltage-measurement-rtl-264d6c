// tvm_chip_top: temperature and voltage monitoring system built around
// aging-tolerant ring-oscillator monitors, arranged like the published
// 180 nm test chip.
//
// N_TVM monitors (tvm) sit at different places on the die. tvm_controller
// measures all of them at once (initialise, oscillate, count, stop) and
// reads their three counts back serially. tvm_calib keeps each monitor's
// reference counts from a calibration measurement at the known condition
// (T0, V0) and turns later counts into ratio-calibrated differential counts.
// tv_hier_calc then applies the range-split regression equations and
// reports each monitor's temperature (m°C) and supply voltage (uV).
// Beside the monitoring path, N_HEAT heating circuits of N_HEAT_RO ROs each,
// set by heating_ctrl, let the chip heat itself to a chosen activation ratio.
// The raw counts of every monitor are also visible on the raw_* outputs (the
// published flow stores them in a non-volatile memory before calculating);
// raw_valid pulses when a record passes from the controller to calibration.
// The env_* inputs give each monitor's local temperature, supply and
// threshold shift to the behavioural RO models and carry no logic.
// Doing the T&V calculation on chip (the test chip did it off chip) is one of
// the options the method allows; here it is built in hardware.
`timescale 1ns / 1fs
module tvm_chip_top
  import tvm_pkg::*;
#(
  parameter int unsigned N_TVM      = 6,
  parameter int unsigned N_HEAT     = 4,
  parameter int unsigned N_HEAT_RO  = 1000,
  parameter int unsigned SETTLE_CYC = 100,
  parameter int unsigned WINDOW_CYC = 5000,
  localparam int unsigned IDX_W     = (N_TVM > 1) ? $clog2(N_TVM) : 1,
  localparam int unsigned HW        = (N_HEAT > 1) ? $clog2(N_HEAT) : 1,
  localparam int unsigned HCW       = $clog2(N_HEAT_RO + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // measurement control
  input  logic                meas_req,
  input  logic                meas_calib,
  output logic                meas_busy,
  // calibration data and reference condition
  input  cnt_t                f_typ [N_RO],
  input  val_t                t0,
  input  val_t                v0,
  output logic                cal_done,
  output logic [N_TVM-1:0]    cal_ok,
  // equation table write port
  input  logic                cfg_we,
  input  logic [EQ_AW-1:0]    cfg_eq,
  input  quantity_e           cfg_q,
  input  coef_sel_e           cfg_c,
  input  coef_t               cfg_data,
  // raw counts (observation)
  output logic                raw_valid,
  output logic [IDX_W-1:0]    raw_tvm,
  output logic                raw_calib,
  output cnt_t                raw_cnt [N_RO],
  // results
  output logic                res_valid,
  input  logic                res_ready,
  output logic [IDX_W-1:0]    res_tvm,
  output logic                res_cal_ok,
  output val_t                res_temp,
  output val_t                res_volt,
  output logic [1:0]          res_vsub,
  output logic [1:0]          res_tsub,
  output logic                res_oor,
  // heating circuits
  input  logic                heat_on,
  input  logic                heat_we,
  input  logic [HW-1:0]       heat_idx,
  input  logic [9:0]          heat_pm,
  output logic [HCW-1:0]      heat_active [N_HEAT],
  output logic [N_HEAT-1:0]   heat_mon,
  // environment of the behavioural RO models
  input  logic signed [31:0]  env_temp_mc [N_TVM],
  input  logic signed [31:0]  env_vdd_uv  [N_TVM],
  input  logic signed [31:0]  env_dvth_uv [N_TVM]
);

  // ---------------- monitors and their controller ----------------
  logic             ro_en, ro_start, cnt_en, cnt_clr, load, shift;
  logic [N_TVM-1:0] sdo;

  for (genvar t = 0; t < N_TVM; t++) begin : g_tvm
    tvm u_tvm (
      .clk, .rst_n, .ro_en, .ro_start, .cnt_en, .cnt_clr, .load, .shift,
      .sdo(sdo[t]), .temp_mc(env_temp_mc[t]), .vdd_uv(env_vdd_uv[t]),
      .dvth_uv(env_dvth_uv[t]));
  end

  logic             c_valid, c_ready, c_calib;
  logic [IDX_W-1:0] c_tvm;
  cnt_t             c_cnt [N_RO];

  tvm_controller #(
    .N_TVM(N_TVM), .SETTLE_CYC(SETTLE_CYC), .WINDOW_CYC(WINDOW_CYC)
  ) u_ctrl (
    .clk, .rst_n, .req(meas_req), .req_calib(meas_calib), .busy(meas_busy),
    .ro_en, .ro_start, .cnt_en, .cnt_clr, .load, .shift, .sdo,
    .m_valid(c_valid), .m_ready(c_ready), .m_tvm(c_tvm), .m_calib(c_calib),
    .m_cnt(c_cnt));

  assign raw_valid = c_valid && c_ready;
  assign raw_tvm   = c_tvm;
  assign raw_calib = c_calib;
  assign raw_cnt   = c_cnt;

  // ---------------- calibration ----------------
  logic             k_valid, k_ready, k_cal_ok;
  logic [IDX_W-1:0] k_tvm;
  dfc_t             k_dfc [N_RO];

  tvm_calib #(.N_TVM(N_TVM)) u_calib (
    .clk, .rst_n, .f_typ,
    .s_valid(c_valid), .s_ready(c_ready), .s_tvm(c_tvm), .s_calib(c_calib),
    .s_cnt(c_cnt),
    .m_valid(k_valid), .m_ready(k_ready), .m_tvm(k_tvm), .m_cal_ok(k_cal_ok),
    .m_dfc(k_dfc), .cal_done, .cal_ok);

  // ---------------- hierarchical T&V calculation ----------------
  tv_hier_calc #(.N_TVM(N_TVM)) u_calc (
    .clk, .rst_n, .t0, .v0,
    .cfg_we, .cfg_eq, .cfg_q, .cfg_c, .cfg_data,
    .s_valid(k_valid), .s_ready(k_ready), .s_tvm(k_tvm), .s_cal_ok(k_cal_ok),
    .s_dfc(k_dfc),
    .m_valid(res_valid), .m_ready(res_ready), .m_tvm(res_tvm),
    .m_cal_ok(res_cal_ok), .m_temp(res_temp), .m_volt(res_volt),
    .m_vsub(res_vsub), .m_tsub(res_tsub), .m_oor(res_oor));

  // ---------------- heating circuits ----------------
  logic [N_HEAT_RO-1:0] heat_en [N_HEAT];

  heating_ctrl #(.N_HEAT(N_HEAT), .N_RO(N_HEAT_RO)) u_heat_ctrl (
    .clk, .rst_n, .heat_on, .cfg_we(heat_we), .cfg_idx(heat_idx),
    .cfg_pm(heat_pm), .en(heat_en));

  for (genvar h = 0; h < N_HEAT; h++) begin : g_heat
    logic [N_HEAT_RO-1:0] osc;
    heating_circuit #(.N_RO(N_HEAT_RO)) u_heat (
      .en(heat_en[h]), .osc(osc), .n_active(heat_active[h]));
    assign heat_mon[h] = ^osc;
  end

endmodule
