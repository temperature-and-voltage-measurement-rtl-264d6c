// ro_model_pkg: behavioural gate-delay model shared by the ring-oscillator
// models (simulation only, not synthesizable).
//
// The delay of one gate follows the first-order inverter model
//   T_D ~ (C_L/W_G) * VDD / (VDD - Vth(T)) / mu(T)
// with a threshold voltage that falls linearly with temperature,
//   Vth(T) = (Vth0 + dVth) * (1 - alpha * (T - 25 C)),
// and a carrier mobility that falls as a power of absolute temperature,
//   mu(T) ~ (T_K / 298.15 K) ^ -mu_exp.
// The structure of the model follows the published monitor's analysis; the
// power-law mobility term and every numeric value are this model's own.
// d0_ps is the gate delay at 25 C, 1.8 V and nominal threshold; dvth_uv shifts
// the threshold to stand in for a global process corner.
`timescale 1ns / 1fs
package ro_model_pkg;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real V_NOM = 1.8;
  localparam real T_NOM = 25.0;

  function automatic real stage_delay_ns(input real d0_ps, input real vth0,
                                         input real alpha, input real mu_exp,
                                         input int temp_mc, input int vdd_uv,
                                         input int dvth_uv);
    real t_c, v, vth, vth_nom, drive, drive_nom, mob;
    t_c       = real'(temp_mc) / 1000.0;
    v         = real'(vdd_uv) / 1.0e6;
    vth       = (vth0 + real'(dvth_uv) / 1.0e6) * (1.0 - alpha * (t_c - T_NOM));
    vth_nom   = vth0;
    if (v < vth + 0.05) v = vth + 0.05;   // keep the model finite near cut-off
    drive     = v / (v - vth);
    drive_nom = V_NOM / (V_NOM - vth_nom);
    mob       = ((t_c + 273.15) / (T_NOM + 273.15)) ** mu_exp;
    return (d0_ps / 1000.0) * (drive / drive_nom) * mob;
  endfunction

endpackage
