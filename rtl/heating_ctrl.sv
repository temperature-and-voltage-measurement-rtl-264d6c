// heating_ctrl: controller of the test chip's heating circuits. For each of
// N_HEAT heating circuits it holds an activation setting in per mille
// (0..1000, written through cfg_we/cfg_idx/cfg_pm and clipped at 1000) and
// turns on the first round(setting * N_RO / 1000) ROs of that circuit,
// a thermometer code, so 10 % (100 per mille) runs 100 of 1000 ROs. heat_on
// gates all enables at once. Enables are registered: a write, or a change
// of heat_on, shows on the outputs two cycles later.
// Controlling the chip temperature through the fraction of running heater
// ROs follows the published test chip; the register interface and
// per-mille encoding are this design's choices.
`timescale 1ns / 1fs
module heating_ctrl #(
  parameter int unsigned N_HEAT = 4,
  parameter int unsigned N_RO   = 1000,
  localparam int unsigned HW    = (N_HEAT > 1) ? $clog2(N_HEAT) : 1,
  localparam int unsigned CW    = $clog2(N_RO + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  heat_on,
  input  logic                  cfg_we,
  input  logic [HW-1:0]         cfg_idx,
  input  logic [9:0]            cfg_pm,
  output logic [N_RO-1:0]       en     [N_HEAT]
);

  logic [9:0]    pm   [N_HEAT];
  logic [CW-1:0] n_on [N_HEAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < N_HEAT; h++) pm[h] <= '0;
    end else if (cfg_we && 32'(cfg_idx) < N_HEAT) begin
      pm[cfg_idx] <= (cfg_pm > 10'd1000) ? 10'd1000 : cfg_pm;
    end
  end

  // Number of ROs to run in each circuit.
  always_comb begin
    for (int h = 0; h < N_HEAT; h++)
      n_on[h] = heat_on ? CW'((32'(pm[h]) * N_RO + 32'd500) / 32'd1000) : '0;
  end

  // The enables are recomputed only after a change of setting or of heat_on,
  // so the wide enable vectors stay quiet between updates.
  logic upd, heat_on_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd       <= 1'b0;
      heat_on_q <= 1'b0;
      for (int h = 0; h < N_HEAT; h++) en[h] <= '0;
    end else begin
      heat_on_q <= heat_on;
      upd       <= cfg_we || (heat_on != heat_on_q);
      if (upd)
        for (int h = 0; h < N_HEAT; h++)
          for (int j = 0; j < N_RO; j++)
            en[h][j] <= (32'(j) < 32'(n_on[h]));
    end
  end

endmodule
