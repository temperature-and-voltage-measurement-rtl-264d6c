// tv_hier_calc: hierarchical temperature and voltage calculation with
// range-split regression equations.
//
// The temperature range and the voltage range are each split into three
// (overlapping, error-widened) sub-ranges; a separate regression equation is
// fitted off-line for each of them. The equation table holds 13 equation
// pairs (temperature and voltage coefficients a, b, c, d each):
//   entry 0          full T and V range ("A")
//   entries 1..3     full T range within V sub-range 0..2 ("a", "b", "c")
//   entries 4..12    T sub-range j within V sub-range i, entry 4 + 3*i + j
//                    ("1" .. "9")
// For each record of calibrated differential counts it runs four steps,
// one clock each, through a shared tv_lin_eval:
//   VA  V = V0 + dV of entry 0;          pick the V sub-range i
//   TS  T = T0 + dT of entry 1 + i;      pick the T sub-range j
//   FV  V = V0 + dV of entry 4 + 3i + j  (final voltage)
//   FT  T = T0 + dT of entry 4 + 3i + j  (final temperature)
// Sub-range selection uses closed-open boundaries as in the published
// algorithm: sub-range 0 is [LO, B1], 1 is (B1, B2], 2 is (B2, HI]. A value
// outside [LO, HI] selects the nearest sub-range and sets m_oor, since the
// result is then an extrapolation. Voltage is selected before temperature,
// as the method recommends when both have the same number of sub-ranges.
// Interface: coefficients are written one word per cycle (cfg_we, entry
// cfg_eq, quantity cfg_q, coefficient cfg_c, value cfg_data); records arrive
// on a valid/ready stream and results leave on another, 5 cycles after
// acceptance when m_ready is high. Temperatures are in m°C and voltages in
// uV. The default boundaries are the 180 nm values of the published
// algorithm (0/40/80/120 C, 1.65/1.75/1.85/1.95 V); the equation table is a
// register array loaded by the host, as the coefficients come from circuit
// simulation at design time.
`timescale 1ns / 1fs
module tv_hier_calc
  import tvm_pkg::*;
#(
  parameter int unsigned N_TVM = 6,
  parameter val_t        T_LO  = 24'sd0,
  parameter val_t        T_B1  = 24'sd40000,
  parameter val_t        T_B2  = 24'sd80000,
  parameter val_t        T_HI  = 24'sd120000,
  parameter val_t        V_LO  = 24'sd1650000,
  parameter val_t        V_B1  = 24'sd1750000,
  parameter val_t        V_B2  = 24'sd1850000,
  parameter val_t        V_HI  = 24'sd1950000,
  localparam int unsigned IDX_W = (N_TVM > 1) ? $clog2(N_TVM) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // reference condition (T0, V0)
  input  val_t             t0,
  input  val_t             v0,
  // equation table write port
  input  logic             cfg_we,
  input  logic [EQ_AW-1:0] cfg_eq,
  input  quantity_e        cfg_q,
  input  coef_sel_e        cfg_c,
  input  coef_t            cfg_data,
  // input stream
  input  logic             s_valid,
  output logic             s_ready,
  input  logic [IDX_W-1:0] s_tvm,
  input  logic             s_cal_ok,
  input  dfc_t             s_dfc [N_RO],
  // output stream
  output logic             m_valid,
  input  logic             m_ready,
  output logic [IDX_W-1:0] m_tvm,
  output logic             m_cal_ok,
  output val_t             m_temp,
  output val_t             m_volt,
  output logic [1:0]       m_vsub,
  output logic [1:0]       m_tsub,
  output logic             m_oor
);

  typedef enum logic [2:0] {S_IDLE, S_VA, S_TS, S_FV, S_FT, S_OUT} state_e;

  state_e           state;
  lin_eq_t          eq_t [N_EQ];
  lin_eq_t          eq_v [N_EQ];
  dfc_t             x    [N_RO];
  logic [1:0]       vsub, tsub;
  logic [EQ_AW-1:0] eq_idx;
  lin_eq_t          eq_sel;
  val_t             dy, y_abs;

  // Sub-range of a value: 0 = [lo,b1], 1 = (b1,b2], 2 = (b2,hi].
  function automatic logic [1:0] sub_of(val_t v, val_t b1, val_t b2);
    if (v <= b1)      return 2'd0;
    else if (v <= b2) return 2'd1;
    else              return 2'd2;
  endfunction

  // Equation and quantity used in each step.
  always_comb begin
    unique case (state)
      S_VA:    eq_idx = '0;
      S_TS:    eq_idx = EQ_AW'(1) + EQ_AW'(vsub);
      default: eq_idx = EQ_AW'(1 + N_SUB) + EQ_AW'(vsub) * EQ_AW'(N_SUB) + EQ_AW'(tsub);
    endcase
    eq_sel = (state == S_VA || state == S_FV) ? eq_v[eq_idx] : eq_t[eq_idx];
  end

  tv_lin_eval u_eval (.eq(eq_sel), .x(x), .y(dy));

  assign y_abs   = ((state == S_VA || state == S_FV) ? v0 : t0) + dy;
  assign s_ready = (state == S_IDLE);
  assign m_valid = (state == S_OUT);

  // Equation table.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_EQ; e++) begin
        eq_t[e] <= '0;
        eq_v[e] <= '0;
      end
    end else if (cfg_we && cfg_eq < EQ_AW'(N_EQ)) begin
      unique case ({cfg_q, cfg_c})
        {Q_TEMP, C_A}: eq_t[cfg_eq].a <= cfg_data;
        {Q_TEMP, C_B}: eq_t[cfg_eq].b <= cfg_data;
        {Q_TEMP, C_C}: eq_t[cfg_eq].c <= cfg_data;
        {Q_TEMP, C_D}: eq_t[cfg_eq].d <= cfg_data;
        {Q_VOLT, C_A}: eq_v[cfg_eq].a <= cfg_data;
        {Q_VOLT, C_B}: eq_v[cfg_eq].b <= cfg_data;
        {Q_VOLT, C_C}: eq_v[cfg_eq].c <= cfg_data;
        default:       eq_v[cfg_eq].d <= cfg_data;
      endcase
    end
  end

  // Calculation sequence.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      vsub     <= '0;
      tsub     <= '0;
      m_tvm    <= '0;
      m_cal_ok <= 1'b0;
      m_temp   <= '0;
      m_volt   <= '0;
      m_oor    <= 1'b0;
      for (int i = 0; i < N_RO; i++) x[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (s_valid) begin
          for (int i = 0; i < N_RO; i++) x[i] <= s_dfc[i];
          m_tvm    <= s_tvm;
          m_cal_ok <= s_cal_ok;
          m_oor    <= 1'b0;
          state    <= S_VA;
        end
        S_VA: begin
          vsub <= sub_of(y_abs, V_B1, V_B2);
          if (y_abs < V_LO || y_abs > V_HI) m_oor <= 1'b1;
          state <= S_TS;
        end
        S_TS: begin
          tsub <= sub_of(y_abs, T_B1, T_B2);
          if (y_abs < T_LO || y_abs > T_HI) m_oor <= 1'b1;
          state <= S_FV;
        end
        S_FV: begin
          m_volt <= y_abs;
          if (y_abs < V_LO || y_abs > V_HI) m_oor <= 1'b1;
          state <= S_FT;
        end
        S_FT: begin
          m_temp <= y_abs;
          if (y_abs < T_LO || y_abs > T_HI) m_oor <= 1'b1;
          state <= S_OUT;
        end
        S_OUT: if (m_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign m_vsub = vsub;
  assign m_tsub = tsub;

  // The reported sub-ranges must name an existing equation.
  a_sub: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid |-> (m_vsub < 2'(N_SUB)) && (m_tsub < 2'(N_SUB)));

endmodule
