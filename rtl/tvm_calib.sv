// tvm_calib: reference store and process-variation calibration for the
// monitors.
//
// Calibration record (s_calib=1): the counts F_i(T0,V0) measured at the
// known reference condition are stored as the reference F0_i of that monitor,
// and the ratio r_i = F_typ_i / F_i(T0,V0) is formed for each of the three ROs
// with a sequential divider (F_typ_i, the count the typical-process RO gives
// at T0,V0, is a configuration input). The ratio is stored as unsigned
// Q2.14 (tvm_pkg::R_FRAC) and saturates at its maximum.
// Measurement record (s_calib=0): for each RO the differential count
// dF_i = F_i - F0_i is scaled by the stored ratio,
//   dFc_i = r_i * dF_i   (signed, R_FRAC fraction bits),
// and sent on the output stream to the T&V calculation. Scaling each dF_i by
// its ratio is exactly the correction of the regression coefficients by
// F_typ/F(T0,V0) in the calibrated equations, applied to the data instead
// of to the coefficients.
// Until a monitor is calibrated its ratios are 1.0 and its references 0
// (cal_ok bit low, also passed along as m_cal_ok).
// Timing: a measurement record is accepted when idle and produced one cycle
// later; a calibration record takes about 3*(CNT_W+R_FRAC+2) cycles and
// produces no output record, only a cal_done pulse.
// The differential approach and the ratio calibration follow the published
// method; storage of F0 in on-chip registers stands in for the non-volatile
// memory the method assumes, and all number formats are this design's.
`timescale 1ns / 1fs
module tvm_calib
  import tvm_pkg::*;
#(
  parameter int unsigned N_TVM = 6,
  localparam int unsigned IDX_W = (N_TVM > 1) ? $clog2(N_TVM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // typical-process counts at (T0, V0)
  input  cnt_t             f_typ [N_RO],
  // input stream: raw counts
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [IDX_W-1:0] s_tvm,
  input  logic             s_calib,
  input  cnt_t             s_cnt [N_RO],
  // output stream: calibrated differential counts
  output logic             m_valid,
  input  logic             m_ready,
  output logic [IDX_W-1:0] m_tvm,
  output logic             m_cal_ok,
  output dfc_t             m_dfc [N_RO],
  // calibration status
  output logic             cal_done,
  output logic [N_TVM-1:0] cal_ok
);

  localparam int unsigned NUM_W = CNT_W + R_FRAC;
  localparam ratio_t      ONE   = ratio_t'(1 << R_FRAC);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_WAIT, S_OUT} state_e;

  state_e           state;
  cnt_t             f0    [N_TVM][N_RO];
  ratio_t           ratio [N_TVM][N_RO];
  logic [IDX_W-1:0] tvm_q;
  cnt_t             cnt_q [N_RO];
  logic [1:0]       ro_idx;

  logic             div_start, div_busy, div_done;
  logic [NUM_W-1:0] div_num, div_quo;
  ratio_t           div_sat;

  assign div_num = {f_typ[ro_idx], R_FRAC'(0)};
  assign div_sat = (|div_quo[NUM_W-1:R_W]) ? '1 : div_quo[R_W-1:0];

  udiv_seq #(.NUM_W(NUM_W), .DEN_W(CNT_W)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(cnt_q[ro_idx]),
    .busy(div_busy), .done(div_done), .quo(div_quo));

  // r_i * (F_i - F0_i) for the record at the input
  dfc_t dfc_new [N_RO];
  always_comb begin
    for (int i = 0; i < N_RO; i++)
      dfc_new[i] = dfc_t'(ratio[s_tvm][i]) *
                   (dfc_t'(s_cnt[i]) - dfc_t'(f0[s_tvm][i]));
  end

  assign div_start = (state == S_DIV);
  assign s_ready   = (state == S_IDLE);
  assign m_valid   = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tvm_q    <= '0;
      ro_idx   <= '0;
      cal_done <= 1'b0;
      cal_ok   <= '0;
      m_tvm    <= '0;
      m_cal_ok <= 1'b0;
      for (int i = 0; i < N_RO; i++) begin
        cnt_q[i] <= '0;
        m_dfc[i] <= '0;
      end
      for (int t = 0; t < N_TVM; t++)
        for (int i = 0; i < N_RO; i++) begin
          f0[t][i]    <= '0;
          ratio[t][i] <= ONE;
        end
    end else begin
      cal_done <= 1'b0;
      unique case (state)
        S_IDLE: if (s_valid) begin
          tvm_q <= s_tvm;
          for (int i = 0; i < N_RO; i++) cnt_q[i] <= s_cnt[i];
          if (s_calib) begin
            for (int i = 0; i < N_RO; i++) f0[s_tvm][i] <= s_cnt[i];
            ro_idx <= '0;
            state  <= S_DIV;
          end else begin
            m_tvm    <= s_tvm;
            m_cal_ok <= cal_ok[s_tvm];
            for (int i = 0; i < N_RO; i++) m_dfc[i] <= dfc_new[i];
            state <= S_OUT;
          end
        end
        S_DIV:  state <= S_WAIT;
        S_WAIT: if (div_done) begin
          ratio[tvm_q][ro_idx] <= div_sat;
          if (ro_idx == 2'(N_RO - 1)) begin
            cal_ok[tvm_q] <= 1'b1;
            cal_done      <= 1'b1;
            state         <= S_IDLE;
          end else begin
            ro_idx <= ro_idx + 2'd1;
            state  <= S_DIV;
          end
        end
        S_OUT: if (m_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
