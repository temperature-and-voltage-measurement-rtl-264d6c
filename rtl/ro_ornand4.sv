// ro_ornand4: BEHAVIOURAL MODEL (simulation only) of
// the aging-tolerant ring oscillator built from an odd number of 4-input
// OR-NAND complex gates (RO2: 19 stages, fan-out 4).
//
// Each stage is y = NAND(OR(a, b), OR(c, d)): a is the loop input, b is tied
// low and c, d are the control input of the stage. Gate 0's control is Start,
// every other gate's control is En. With control 0 both OR terms of the second
// pair are 0, the output is 1 whatever the loop input, so in the
// non-oscillation mode (En=0, Start=0) every loop input sits at 1 and the
// PMOS device driven by the loop input is off. En=1, Start=0 initialises the
// loop to alternating values; En=1, Start=1 oscillates with period
// 2 * STAGES * gate delay. The OR-NAND gate and the three modes follow the
// published monitor; the pin assignment is this model's reading of it.
// Gate delay comes from ro_model_pkg::stage_delay_ns() at the environment
// inputs temp_mc (m°C), vdd_uv (uV) and dvth_uv (process threshold shift, uV).
// Outside the oscillation mode s[] holds every gate's static value, derived
// gate by gate from the OR-NAND equation; in the oscillation mode only
// ro_out is modelled, toggling every STAGES gate delays.
`timescale 1ns / 1fs
module ro_ornand4 #(
  parameter int unsigned STAGES = 19,
  parameter real         D0_PS  = 120.0,
  parameter real         VTH    = 0.55,
  parameter real         ALPHA  = 1.5e-3,
  parameter real         MU_EXP = 1.2
) (
  input  logic              en,
  input  logic              start,
  input  logic signed [31:0] temp_mc,
  input  logic signed [31:0] vdd_uv,
  input  logic signed [31:0] dvth_uv,
  output logic              ro_out
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [STAGES-1:0] s;
  logic [STAGES-1:0] ctl;
  logic              tie_lo;
  real               dly_ns;
  logic              osc_q;

  initial begin
    if (STAGES % 2 == 0) $error("ro_ornand4: STAGES must be odd");
  end

  assign tie_lo = 1'b0;

  always_comb
    dly_ns = ro_model_pkg::stage_delay_ns(D0_PS, VTH, ALPHA, MU_EXP,
                                          temp_mc, vdd_uv, dvth_uv);

  always_comb begin
    ctl    = {STAGES{en}};
    ctl[0] = start;
  end

  // Static gate values outside the oscillation mode: gate 0 first (its
  // control input is Start = 0, so its output is 1 whatever the loop input),
  // then each following gate from its predecessor.
  always_comb begin
    logic s_prev;
    s_prev = 1'b1;
    for (int i = 0; i < STAGES; i++) begin
      s[i]   = ~((s_prev | tie_lo) & (ctl[i] | ctl[i]));
      s_prev = s[i];
    end
  end

  // Oscillation: a transition needs STAGES gate delays to travel once round
  // the loop, so the output toggles every STAGES * dly_ns. Outside the
  // oscillation mode the output is the static value of the last gate.
  // (Simulating every gate transition gives the same waveform at 2*STAGES
  // times the event count.)
  always begin
    if (en && start) begin
      #(real'(STAGES) * dly_ns);
      if (en && start) osc_q = ~osc_q;
    end else begin
      osc_q = s[STAGES-1];
      @(en or start or s[STAGES-1]);
    end
  end

  initial osc_q = 1'b1;

  assign ro_out = osc_q;

endmodule
