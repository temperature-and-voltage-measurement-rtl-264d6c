// ro_nand2: BEHAVIOURAL MODEL (simulation only) of
// the aging-tolerant ring oscillator built from an odd number of 2-input NAND
// gates (RO1: 51 stages, fan-out 1; RO3: 21 stages, fan-out 7).
//
// Structure: gate i computes s[i] = NAND(s[i-1], side[i]) with gate 0 taking
// s[STAGES-1]. The side input of gate 0 is Start; the side input of every
// other gate is En. This gives the three operating modes of the monitor:
//   En=0, Start=0  non-oscillation: every side input is 0, so every gate
//                  output and every loop input is 1 and the PMOS transistor
//                  on the loop input is off (no NBTI stress on the devices
//                  that set the frequency).
//   En=1, Start=0  initialisation: gate 0 is held at 1 by Start=0 and the
//                  loop settles to 1,0,1,0,...,1, so only one gate switches
//                  when oscillation begins (no race).
//   En=1, Start=1  oscillation: an odd inverting loop, period
//                  2 * STAGES * gate delay.
// The mode table and the NAND-based structure follow the published monitor;
// the exact assignment of En/Start to side inputs is this model's reading of
// that structure. The gate delay comes from ro_model_pkg::stage_delay_ns()
// evaluated at the environment inputs temp_mc (m°C), vdd_uv (uV) and
// dvth_uv (process threshold shift, uV); the fan-out of the real RO is folded
// into D0_PS. ro_out is the last gate's output. Outside the oscillation mode
// s[] holds every gate's static value, derived gate by gate from the NAND
// equations; in the oscillation mode only ro_out is modelled (it toggles
// every STAGES gate delays, the time a transition takes to go round the
// loop), which keeps the simulation fast.
`timescale 1ns / 1fs
module ro_nand2 #(
  parameter int unsigned STAGES = 51,     // odd number of NAND stages
  parameter real         D0_PS  = 40.0,   // gate delay at 25 C / 1.8 V (ps)
  parameter real         VTH    = 0.45,   // nominal threshold (V)
  parameter real         ALPHA  = 1.0e-3, // Vth temperature coefficient (1/K)
  parameter real         MU_EXP = 1.5     // mobility temperature exponent
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
  logic [STAGES-1:0] side;
  real               dly_ns;
  logic              osc_q;

  initial begin
    if (STAGES % 2 == 0) $error("ro_nand2: STAGES must be odd");
  end

  always_comb
    dly_ns = ro_model_pkg::stage_delay_ns(D0_PS, VTH, ALPHA, MU_EXP,
                                          temp_mc, vdd_uv, dvth_uv);

  always_comb begin
    side    = {STAGES{en}};
    side[0] = start;
  end

  // Static gate values outside the oscillation mode: gate 0 first (its
  // control input is Start = 0, so its output is 1 whatever the loop input),
  // then each following gate from its predecessor.
  always_comb begin
    logic s_prev;
    s_prev = 1'b1;
    for (int i = 0; i < STAGES; i++) begin
      s[i]   = ~(s_prev & side[i]);
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
