`timescale 1ns / 1fs
// tb_tvm_chip_top: end-to-end test of the monitoring system at its default
// size (6 monitors, 50 us window, 4 x 1000 heater ROs).
//
// Design-time step, done here in the testbench: the regression equations are
// fitted by least squares to the typical-process RO model (counts over the
// window on a temperature/voltage grid), for the full range, the three
// widened voltage sub-ranges and the nine widened T&V sub-ranges, and loaded
// into the equation table. The typical counts at (60 C, 1.8 V) are given as
// F_typ.
// Field step: every monitor gets its own threshold shift (process corner);
// a calibration measurement is made with all monitors at (60 C, 1.8 V); then
// each monitor is placed at its own temperature and voltage and measured.
// Checks: every result lies within 2.5 C and 12 mV of the true value, lands in
// the expected sub-range for points well inside one, and raises the
// out-of-range flag for a supply outside 1.65-1.95 V; the measurement takes
// under 100 us. Mechanisms counted (each must happen): calibration, each of
// the nine sub-ranges, out-of-range, a calibration ratio other than 1.0,
// result back-pressure, heater activation.
// The limits leave room for the residual of the ratio calibration, which
// grows with the threshold shift and with distance from (60 C, 1.8 V); the
// largest errors (about 0.6 C and 8 mV) appear near the range corners.
module tb_tvm_chip_top;
  import tvm_pkg::*;

  localparam int  N_TVM = 6, N_HEAT = 4, N_HEAT_RO = 1000;
  localparam real WINDOW_NS = 5000 * 10.0;
  localparam real E_T = 6.0, E_V = 0.02;          // sub-range widening
  localparam real TOL_T_MC = 2500.0, TOL_V_UV = 12000.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic meas_req = 0, meas_calib = 0, meas_busy;
  cnt_t f_typ [N_RO];
  val_t t0 = 24'sd60000, v0 = 24'sd1800000;
  logic cal_done; logic [N_TVM-1:0] cal_ok;
  logic cfg_we = 0; logic [EQ_AW-1:0] cfg_eq = 0; quantity_e cfg_q = Q_TEMP;
  coef_sel_e cfg_c = C_A; coef_t cfg_data = 0;
  logic raw_valid, raw_calib; logic [2:0] raw_tvm; cnt_t raw_cnt [N_RO];
  logic res_valid, res_ready = 1, res_cal_ok, res_oor; logic [2:0] res_tvm;
  val_t res_temp, res_volt; logic [1:0] res_vsub, res_tsub;
  logic heat_on = 0, heat_we = 0; logic [1:0] heat_idx = 0; logic [9:0] heat_pm = 0;
  logic [9:0] heat_active [N_HEAT]; logic [N_HEAT-1:0] heat_mon;
  logic signed [31:0] env_temp_mc [N_TVM], env_vdd_uv [N_TVM], env_dvth_uv [N_TVM];

  tvm_chip_top dut (.*);

  int checks = 0, failures = 0;
  int n_calib = 0, n_oor = 0, n_ratio = 0, n_stall = 0, n_heat = 0;
  int sub_hits [9];
  real worst_t = 0.0, worst_v = 0.0;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  // ---------------- RO model (typical process) ----------------
  function automatic real count_of(int ro, real tc, real v);
    real d;
    int  tm = int'(tc * 1000.0), vu = int'(v * 1.0e6);
    case (ro)
      0: d = 2.0 * 51 * ro_model_pkg::stage_delay_ns(40.0, 0.35, 1.0e-3, 2.0, tm, vu, 0);
      1: d = 2.0 * 19 * ro_model_pkg::stage_delay_ns(120.0, 0.80, 1.5e-3, 0.6, tm, vu, 0);
      default: d = 2.0 * 21 * ro_model_pkg::stage_delay_ns(170.0, 0.45, 0.8e-3, 1.6, tm, vu, 0);
    endcase
    return WINDOW_NS / d;
  endfunction

  // ---------------- least-squares fit of one equation pair ----------------
  // Fits dT (m°C) and dV (uV) = a*dF1 + b*dF2 + c*dF3 + d over a grid.
  task automatic fit(real tlo, real thi, real vlo, real vhi,
                     output real ct [4], output real cv [4]);
    real A [4][4], bt [4], bv [4], x [4], f0 [3];
    real M [4][5];
    for (int i = 0; i < 3; i++) f0[i] = count_of(i, 60.0, 1.8);
    for (int i = 0; i < 4; i++) begin
      bt[i] = 0; bv[i] = 0;
      for (int j = 0; j < 4; j++) A[i][j] = 0;
    end
    for (int it = 0; it <= 24; it++) begin
      for (int iv = 0; iv <= 12; iv++) begin
        real tc = tlo + (thi - tlo) * it / 24.0;
        real v  = vlo + (vhi - vlo) * iv / 12.0;
        for (int i = 0; i < 3; i++) x[i] = count_of(i, tc, v) - f0[i];
        x[3] = 1.0;
        for (int i = 0; i < 4; i++) begin
          for (int j = 0; j < 4; j++) A[i][j] += x[i] * x[j];
          bt[i] += x[i] * (tc - 60.0) * 1000.0;
          bv[i] += x[i] * (v - 1.8) * 1.0e6;
        end
      end
    end
    for (int q = 0; q < 2; q++) begin
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) M[i][j] = A[i][j];
        M[i][4] = (q == 0) ? bt[i] : bv[i];
      end
      // Gaussian elimination with partial pivoting
      for (int k = 0; k < 4; k++) begin
        int p = k;
        for (int i = k + 1; i < 4; i++) if ((M[i][k] < 0 ? -M[i][k] : M[i][k]) > (M[p][k] < 0 ? -M[p][k] : M[p][k])) p = i;
        for (int j = 0; j < 5; j++) begin real tmp = M[k][j]; M[k][j] = M[p][j]; M[p][j] = tmp; end
        for (int i = 0; i < 4; i++) if (i != k) begin
          real f = M[i][k] / M[k][k];
          for (int j = k; j < 5; j++) M[i][j] -= f * M[k][j];
        end
      end
      for (int i = 0; i < 4; i++) begin
        if (q == 0) ct[i] = M[i][4] / M[i][i];
        else        cv[i] = M[i][4] / M[i][i];
      end
    end
  endtask

  task automatic wr(int e, quantity_e q, coef_sel_e c, real v, bit frac);
    @(negedge clk);
    cfg_we = 1; cfg_eq = EQ_AW'(e); cfg_q = q; cfg_c = c;
    cfg_data = frac ? coef_t'($rtoi(v * 65536.0 + (v < 0 ? -0.5 : 0.5)))
                    : coef_t'($rtoi(v + (v < 0 ? -0.5 : 0.5)));
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic load_eq(int e, real tlo, real thi, real vlo, real vhi);
    real ct [4], cv [4];
    fit(tlo, thi, vlo, vhi, ct, cv);
    wr(e, Q_TEMP, C_A, ct[0], 1); wr(e, Q_TEMP, C_B, ct[1], 1);
    wr(e, Q_TEMP, C_C, ct[2], 1); wr(e, Q_TEMP, C_D, ct[3], 0);
    wr(e, Q_VOLT, C_A, cv[0], 1); wr(e, Q_VOLT, C_B, cv[1], 1);
    wr(e, Q_VOLT, C_C, cv[2], 1); wr(e, Q_VOLT, C_D, cv[3], 0);
  endtask

  // ---------------- one measurement of all monitors ----------------
  real exp_t [N_TVM], exp_v [N_TVM];
  int  exp_vs [N_TVM], exp_ts [N_TVM];   // -1: do not check, 3: out of range

  task automatic measure(bit calib, bit stall);
    int got = 0, cyc = 0;
    bit stalled = 0;
    @(negedge clk); meas_req = 1; meas_calib = calib;
    @(negedge clk); meas_req = 0;
    if (calib) begin
      int nd = 0;
      while (meas_busy || nd < N_TVM) begin
        @(negedge clk); cyc++;
        if (cal_done) nd++;
        if (cyc > 20000) break;
      end
      chk(cal_ok == '1, "all monitors calibrated");
      n_calib++;
      return;
    end
    @(negedge clk);
    while (got < N_TVM && cyc < 20000) begin
      if (stall && got == 2 && !stalled && res_valid) begin
        res_ready = 0; repeat (3) @(negedge clk); n_stall += res_valid; res_ready = 1;
        stalled = 1;
      end
      if (res_valid && res_ready) begin  // handshake at the coming edge
        int t = res_tvm;
        real et = real'(res_temp) - exp_t[t] * 1000.0;
        real ev = real'(res_volt) - exp_v[t] * 1.0e6;
        got++;
        chk(res_cal_ok, "result from a calibrated monitor");
        if (exp_vs[t] == 3) begin
          chk(res_oor, $sformatf("tvm %0d out of range flagged", t));
          n_oor += res_oor;
        end else begin
          if (et < 0) et = -et;
          if (ev < 0) ev = -ev;
          if (et > worst_t) worst_t = et;
          if (ev > worst_v) worst_v = ev;
          $display("  tvm %0d  T %8.3f C (true %7.2f)  V %7.4f V (true %6.3f)  sub %0d/%0d oor %0d",
                   t, real'(res_temp) / 1000.0, exp_t[t], real'(res_volt) / 1.0e6, exp_v[t],
                   res_vsub, res_tsub, res_oor);
          chk(et < TOL_T_MC, $sformatf("tvm %0d temperature error %f m°C", t, et));
          chk(ev < TOL_V_UV, $sformatf("tvm %0d voltage error %f uV", t, ev));
          chk(!res_oor, $sformatf("tvm %0d no out-of-range flag", t));
          if (exp_vs[t] >= 0) begin
            chk(res_vsub == 2'(exp_vs[t]) && res_tsub == 2'(exp_ts[t]),
                $sformatf("tvm %0d sub-range %0d/%0d expected %0d/%0d", t, res_vsub, res_tsub, exp_vs[t], exp_ts[t]));
          end
          if (!res_oor) sub_hits[3 * res_vsub + res_tsub]++;
        end
      end
      @(negedge clk); cyc++;
    end
    chk(got == N_TVM, "all results received");
  endtask

  task automatic place(int t, real tc, real v, int vs, int ts);
    env_temp_mc[t] = int'(tc * 1000.0);
    env_vdd_uv[t]  = int'(v * 1.0e6);
    exp_t[t] = tc; exp_v[t] = v; exp_vs[t] = vs; exp_ts[t] = ts;
  endtask

  initial begin
    int t_req;
    for (int t = 0; t < N_TVM; t++) begin
      env_temp_mc[t] = 60000; env_vdd_uv[t] = 1800000;
      env_dvth_uv[t] = (t - 2) * 4000;              // -8 mV .. +12 mV threshold shift
    end
    for (int i = 0; i < N_RO; i++) f_typ[i] = cnt_t'($rtoi(count_of(i, 60.0, 1.8) + 0.5));
    repeat (3) @(negedge clk); rst_n = 1;

    // design-time equations: full range, V sub-ranges, T&V sub-ranges
    load_eq(0, 0.0, 120.0, 1.65, 1.95);
    for (int i = 0; i < 3; i++)
      load_eq(1 + i, 0.0, 120.0, 1.65 + 0.1 * i - E_V, 1.75 + 0.1 * i + E_V);
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        load_eq(4 + 3 * i + j, 40.0 * j - E_T, 40.0 * (j + 1) + E_T,
                1.65 + 0.1 * i - E_V, 1.75 + 0.1 * i + E_V);

    // heater: 1 % of circuit 0 for a short while
    heat_on = 1;
    @(negedge clk); heat_we = 1; heat_idx = 0; heat_pm = 10; @(negedge clk); heat_we = 0;
    repeat (20) @(negedge clk);
    n_heat += (heat_active[0] == 10) ? 1 : 0;
    chk(heat_active[0] == 10, $sformatf("heater activation %0d ROs", heat_active[0]));
    @(negedge clk); heat_we = 1; heat_pm = 0; @(negedge clk); heat_we = 0;
    repeat (3) @(negedge clk);
    chk(heat_active[0] == 0, "heater off");

    // field calibration at (60 C, 1.8 V)
    t_req = 0;
    fork
      begin measure(1, 0); end
      begin @(posedge raw_valid); t_req = int'($time); end
    join
    for (int t = 0; t < N_TVM; t++)
      for (int i = 0; i < N_RO; i++)
        n_ratio += (dut.u_calib.ratio[t][i] != ratio_t'(1 << R_FRAC)) ? 1 : 0;
    chk(t_req > 0 && t_req < 100000 + 300, $sformatf("measurement time %0d ns", t_req));

    // round 1: centres of the first six T&V sub-ranges
    place(0, 20.0, 1.70, 0, 0); place(1, 60.0, 1.70, 0, 1); place(2, 100.0, 1.70, 0, 2);
    place(3, 20.0, 1.80, 1, 0); place(4, 60.0, 1.80, 1, 1); place(5, 100.0, 1.80, 1, 2);
    measure(0, 1);
    // round 2: the last three sub-ranges, out of range, two edge points
    place(0, 20.0, 1.90, 2, 0); place(1, 60.0, 1.90, 2, 1); place(2, 100.0, 1.90, 2, 2);
    place(3, 60.0, 2.05, 3, 3); place(4, 5.0, 1.68, -1, -1); place(5, 115.0, 1.92, -1, -1);
    measure(0, 0);
    // round 3: random points inside the range
    for (int t = 0; t < N_TVM; t++)
      place(t, real'($urandom_range(5, 115)), 1.66 + 0.001 * $urandom_range(0, 280), -1, -1);
    measure(0, 0);

    $display("worst errors: %f C, %f mV", worst_t / 1000.0, worst_v / 1000.0);
    chk(n_calib > 0, "calibration happened");
    chk(n_ratio > 0, "a calibration ratio other than 1.0");
    chk(n_oor > 0, "out-of-range flagged");
    chk(n_stall > 0, "result back-pressure");
    chk(n_heat > 0, "heater activation");
    for (int k = 0; k < 9; k++) chk(sub_hits[k] > 0, $sformatf("sub-range %0d used", k + 1));
    $display("mechanisms: calib=%0d ratio!=1:%0d oor=%0d stall=%0d heat=%0d", n_calib, n_ratio, n_oor, n_stall, n_heat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
