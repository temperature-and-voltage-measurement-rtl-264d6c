// tvm_controller: runs one measurement on all monitors at once and collects
// their counts over the serial read-out.
//
// A request (req, with req_calib marking a calibration measurement) starts
// this sequence, all monitors in lock-step:
//   CLR     cnt_clr for CLR_CYC cycles, ROs in non-oscillation (En=0, Start=0)
//   INIT    En=1, Start=0 for INIT_CYC cycles (initialisation mode)
//   SETTLE  En=1, Start=1 for SETTLE_CYC cycles: the ROs oscillate, but are
//           not yet counted, so the start-up transient is skipped
//   WINDOW  cnt_en for WINDOW_CYC cycles: the counting window
//   DRAIN   cnt_en low, ROs still running for DRAIN_CYC cycles so that the
//           counters' synchronisers see the window close
//   STOP    Start=0, then En=0: back to the non-oscillation mode
//   LOAD    one load pulse: counts copied into each monitor's shift register
//   SHIFT   3*CNT_W shift cycles; one bit per monitor per cycle is captured
//   SEND    one record per monitor on the valid/ready output stream
// The three RO modes and their order, the 1 us settling time and the
// measurement time under 100 us come from the published monitor; the window
// and other cycle counts are this design's choices (defaults assume a
// 100 MHz clock: 1 us settle, 50 us window). The ROs oscillate only for
// SETTLE+WINDOW+DRAIN cycles per measurement and rest in the NBTI-safe
// non-oscillation mode otherwise.
// Output stream: m_valid/m_ready handshake, m_tvm monitor index, m_calib and
// the three counts; the record is held stable while m_valid && !m_ready.
`timescale 1ns / 1fs
module tvm_controller
  import tvm_pkg::*;
#(
  parameter int unsigned N_TVM      = 6,
  parameter int unsigned CLR_CYC    = 2,
  parameter int unsigned INIT_CYC   = 10,
  parameter int unsigned SETTLE_CYC = 100,
  parameter int unsigned WINDOW_CYC = 5000,
  parameter int unsigned DRAIN_CYC  = 8,
  localparam int unsigned IDX_W     = (N_TVM > 1) ? $clog2(N_TVM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // measurement request
  input  logic             req,
  input  logic             req_calib,
  output logic             busy,
  // broadcast to the monitors
  output logic             ro_en,
  output logic             ro_start,
  output logic             cnt_en,
  output logic             cnt_clr,
  output logic             load,
  output logic             shift,
  input  logic [N_TVM-1:0] sdo,
  // counts out
  output logic             m_valid,
  input  logic             m_ready,
  output logic [IDX_W-1:0] m_tvm,
  output logic             m_calib,
  output cnt_t             m_cnt [N_RO]
);

  typedef enum logic [3:0] {
    S_IDLE, S_CLR, S_INIT, S_SETTLE, S_WINDOW, S_DRAIN, S_STOP, S_STOP2,
    S_LOAD, S_SHIFT, S_SEND
  } state_e;

  localparam int unsigned SH_BITS = N_RO * CNT_W;

  state_e                state;
  logic [31:0]           timer;
  logic                  calib_q;
  logic [SH_BITS-1:0]    rx [N_TVM];
  logic [IDX_W-1:0]      send_idx;

  assign busy = (state != S_IDLE);

  // Mode outputs are decoded from the state.
  always_comb begin
    ro_en    = 1'b0;
    ro_start = 1'b0;
    cnt_en   = 1'b0;
    cnt_clr  = 1'b0;
    load     = 1'b0;
    shift    = 1'b0;
    unique case (state)
      S_CLR:    cnt_clr  = 1'b1;
      S_INIT:   ro_en    = 1'b1;
      S_SETTLE: begin ro_en = 1'b1; ro_start = 1'b1; end
      S_WINDOW: begin ro_en = 1'b1; ro_start = 1'b1; cnt_en = 1'b1; end
      S_DRAIN:  begin ro_en = 1'b1; ro_start = 1'b1; end
      S_STOP:   ro_en    = 1'b1;
      S_LOAD:   load     = 1'b1;
      S_SHIFT:  shift    = 1'b1;
      default:  ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      timer    <= '0;
      calib_q  <= 1'b0;
      send_idx <= '0;
      for (int t = 0; t < N_TVM; t++) rx[t] <= '0;
    end else begin
      timer <= timer + 32'd1;
      unique case (state)
        S_IDLE: if (req) begin
          calib_q <= req_calib;
          state   <= S_CLR;
          timer   <= '0;
        end
        S_CLR:    if (timer == CLR_CYC - 1)    begin state <= S_INIT;   timer <= '0; end
        S_INIT:   if (timer == INIT_CYC - 1)   begin state <= S_SETTLE; timer <= '0; end
        S_SETTLE: if (timer == SETTLE_CYC - 1) begin state <= S_WINDOW; timer <= '0; end
        S_WINDOW: if (timer == WINDOW_CYC - 1) begin state <= S_DRAIN;  timer <= '0; end
        S_DRAIN:  if (timer == DRAIN_CYC - 1)  begin state <= S_STOP;   timer <= '0; end
        S_STOP:   state <= S_STOP2;
        S_STOP2:  state <= S_LOAD;
        S_LOAD:   begin state <= S_SHIFT; timer <= '0; end
        S_SHIFT: begin
          for (int t = 0; t < N_TVM; t++) rx[t] <= {rx[t][SH_BITS-2:0], sdo[t]};
          if (timer == SH_BITS - 1) begin
            state    <= S_SEND;
            send_idx <= '0;
          end
        end
        S_SEND: if (m_ready) begin
          if (send_idx == IDX_W'(N_TVM - 1)) state <= S_IDLE;
          else send_idx <= send_idx + IDX_W'(1);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign m_valid  = (state == S_SEND);
  assign m_tvm    = send_idx;
  assign m_calib  = calib_q;
  always_comb begin
    for (int i = 0; i < N_RO; i++)
      m_cnt[i] = rx[send_idx][SH_BITS-1-i*CNT_W -: CNT_W];
  end

  // A record may not change or disappear while it waits for m_ready.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_tvm));

endmodule
