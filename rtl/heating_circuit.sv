// heating_circuit: BEHAVIOURAL MODEL (simulation
// only) of the on-chip heater of the monitor test chip: N_RO independent
// 9-stage inverter ring oscillators, each with its own enable. An enabled RO
// toggles its output every STAGES * D_PS picoseconds and so burns dynamic
// power; the heat it produces is not modelled. A disabled RO is held at 0.
// All enabled ROs toggle in phase, driven by one process for speed.
// These inverter ROs only generate heat and are unrelated to the monitor's
// aging-tolerant ROs. Outputs: osc (each RO's output) and n_active (how many
// ROs are enabled, i.e. the activation ratio in units of 1/N_RO).
// The RO count and stage count follow the published test chip; the stage
// delay is this model's choice.
`timescale 1ns / 1fs
module heating_circuit #(
  parameter int unsigned N_RO   = 1000,
  parameter int unsigned STAGES = 9,
  parameter real         D_PS   = 30.0,
  localparam int unsigned CW    = $clog2(N_RO + 1)
) (
  input  logic [N_RO-1:0] en,
  output logic [N_RO-1:0] osc,
  output logic [CW-1:0]   n_active
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam real HALF_NS = real'(STAGES) * D_PS / 1000.0;

  // All ROs are identical, so one process toggles every enabled RO in phase;
  // a disabled RO is held low.
  initial osc = '0;
  always begin
    if (|en) begin
      #(HALF_NS) osc = ~osc & en;
    end else begin
      osc = '0;
      @(en);
    end
  end

  always_comb begin
    n_active = '0;
    for (int j = 0; j < N_RO; j++) n_active = n_active + CW'(en[j]);
  end

endmodule
