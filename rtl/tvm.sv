// tvm: one temperature/voltage monitor: three ring oscillators with
// different temperature and voltage characteristics, a counter per RO and a
// serial read-out register.
//
// RO1 is a 51-stage 2-input NAND ring (fan-out 1), RO2 a 19-stage 4-input
// OR-NAND ring (fan-out 4) and RO3 a 21-stage 2-input NAND ring (fan-out 7),
// as on the published test chip. All three share En/Start, so they are in
// the same mode (non-oscillation, initialisation, oscillation) at all times.
// Each RO clocks its own ro_counter; cnt_en opens and closes the counting
// window and cnt_clr clears all three counters.
// After the window the controller stops the ROs and pulses load: the three
// counts are copied, in the system clock domain, into a 3*CNT_W-bit shift
// register. Each shift cycle then moves one bit out on sdo, most significant
// bit first, in the order RO1, RO2, RO3 (sdo shows the current MSB, so the
// first bit is valid right after load). The serial hand-off to the
// controller follows the published monitor; bit order and handshake are this
// design's choices.
// temp_mc, vdd_uv and dvth_uv are the local temperature, supply and process
// threshold shift seen by the behavioural RO models; they exist for
// simulation only and carry no logic.
`timescale 1ns / 1fs
module tvm
  import tvm_pkg::*;
#(
  parameter int unsigned RO1_STAGES = 51,
  parameter int unsigned RO2_STAGES = 19,
  parameter int unsigned RO3_STAGES = 21
) (
  input  logic               clk,
  input  logic               rst_n,
  // RO mode control (Fig. "operation modes"): En, Start
  input  logic               ro_en,
  input  logic               ro_start,
  // counting window and clear
  input  logic               cnt_en,
  input  logic               cnt_clr,
  // serial read-out
  input  logic               load,
  input  logic               shift,
  output logic               sdo,
  // environment of the behavioural RO models
  input  logic signed [31:0] temp_mc,
  input  logic signed [31:0] vdd_uv,
  input  logic signed [31:0] dvth_uv
);

  logic [N_RO-1:0] ro_clk;
  cnt_t            cnt [N_RO];
  logic [N_RO*CNT_W-1:0] sreg;

  ro_nand2 #(.STAGES(RO1_STAGES), .D0_PS(40.0), .VTH(0.35), .ALPHA(1.0e-3),
             .MU_EXP(2.0)) u_ro1 (
    .en(ro_en), .start(ro_start), .temp_mc, .vdd_uv, .dvth_uv,
    .ro_out(ro_clk[0]));

  ro_ornand4 #(.STAGES(RO2_STAGES), .D0_PS(120.0), .VTH(0.80), .ALPHA(1.5e-3),
               .MU_EXP(0.6)) u_ro2 (
    .en(ro_en), .start(ro_start), .temp_mc, .vdd_uv, .dvth_uv,
    .ro_out(ro_clk[1]));

  ro_nand2 #(.STAGES(RO3_STAGES), .D0_PS(170.0), .VTH(0.45), .ALPHA(0.8e-3),
             .MU_EXP(1.6)) u_ro3 (
    .en(ro_en), .start(ro_start), .temp_mc, .vdd_uv, .dvth_uv,
    .ro_out(ro_clk[2]));

  for (genvar i = 0; i < N_RO; i++) begin : g_cnt
    ro_counter u_cnt (
      .ro_clk(ro_clk[i]), .clr(cnt_clr), .cnt_en(cnt_en), .count(cnt[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      sreg <= '0;
    else if (load)
      sreg <= {cnt[0], cnt[1], cnt[2]};
    else if (shift)
      sreg <= {sreg[N_RO*CNT_W-2:0], 1'b0};
  end

  assign sdo = sreg[N_RO*CNT_W-1];

endmodule
