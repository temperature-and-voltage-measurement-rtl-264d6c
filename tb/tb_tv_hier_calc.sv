`timescale 1ns / 1fs
// tb_tv_hier_calc: checks the hierarchical sub-range calculation.
// The equation table is loaded so that every entry is recognisable: the
// full-range V equation returns x1 (in uV), the three V-sub-range T
// equations return x2 (in m°C) plus a small entry-specific offset, and the
// nine final equations return x1 + 10*k (V) and x2 + 7*k (T) for entry k.
// A reference written from the published selection rules (closed boundary at
// 1.75/1.85 V and 40/80 C, nearest sub-range plus flag outside the range)
// predicts which entries are used and so the exact outputs. Also checks the
// 5-cycle latency and output hold under back-pressure.
module tb_tv_hier_calc;
  import tvm_pkg::*;

  localparam int N_TVM = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  val_t t0 = 24'sd60000, v0 = 24'sd1800000;
  logic cfg_we = 0; logic [EQ_AW-1:0] cfg_eq = 0; quantity_e cfg_q = Q_TEMP;
  coef_sel_e cfg_c = C_A; coef_t cfg_data = 0;
  logic s_valid = 0, s_ready; logic [2:0] s_tvm = 0; logic s_cal_ok = 1;
  dfc_t s_dfc [N_RO];
  logic m_valid, m_ready = 1; logic [2:0] m_tvm; logic m_cal_ok;
  val_t m_temp, m_volt; logic [1:0] m_vsub, m_tsub; logic m_oor;
  int checks = 0, failures = 0;
  int sub_hits [9];
  int oor_hits = 0;

  tv_hier_calc #(.N_TVM(N_TVM)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int e, quantity_e q, coef_sel_e c, int v);
    @(negedge clk); cfg_we = 1; cfg_eq = EQ_AW'(e); cfg_q = q; cfg_c = c; cfg_data = v;
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic int sel(longint v, longint b1, longint b2);
    if (v <= b1) return 0;
    if (v <= b2) return 1;
    return 2;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // dv: uV offset from V0, dt: m°C offset from T0
  task automatic run(int dv, int dt, int tvm, bit stall);
    longint v_a, t_s, v_f, t_f;
    int vi, ti, k, lat;
    bit oor;
    @(negedge clk);
    s_dfc[0] = dfc_t'(dv) <<< R_FRAC;
    s_dfc[1] = dfc_t'(dt) <<< R_FRAC;
    s_dfc[2] = dfc_t'($urandom_range(0, 1000)) <<< R_FRAC; // must be ignored (c = 0)
    s_tvm = 3'(tvm); s_valid = 1; m_ready = !stall;
    while (!s_ready) @(negedge clk);
    @(negedge clk); s_valid = 0;
    lat = 1;
    while (!m_valid) begin @(negedge clk); lat++; end
    // reference
    v_a = 1800000 + dv;
    vi  = sel(v_a, 1750000, 1850000);
    t_s = 60000 + dt + 3 * (vi + 1);
    ti  = sel(t_s, 40000, 80000);
    k   = 4 + 3 * vi + ti;
    v_f = 1800000 + dv + 10 * k;
    t_f = 60000 + dt + 7 * k;
    oor = (v_a < 1650000 || v_a > 1950000 || t_s < 0 || t_s > 120000 ||
           v_f < 1650000 || v_f > 1950000 || t_f < 0 || t_f > 120000);
    if (stall) begin
      repeat (3) begin
        @(negedge clk);
        chk(m_valid && m_temp == val_t'(t_f), "hold under back-pressure");
      end
      m_ready = 1;
    end
    chk(lat == 5, $sformatf("latency %0d", lat));
    chk(m_vsub == 2'(vi) && m_tsub == 2'(ti), $sformatf("sub dv=%0d dt=%0d got %0d/%0d exp %0d/%0d", dv, dt, m_vsub, m_tsub, vi, ti));
    chk(longint'(m_volt) == v_f, $sformatf("V dv=%0d got %0d exp %0d", dv, m_volt, v_f));
    chk(longint'(m_temp) == t_f, $sformatf("T dt=%0d got %0d exp %0d", dt, m_temp, t_f));
    chk(m_oor == oor, $sformatf("oor dv=%0d dt=%0d", dv, dt));
    chk(m_tvm == 3'(tvm) && m_cal_ok == s_cal_ok, "tag");
    if (!oor) sub_hits[3 * vi + ti]++; else oor_hits++;
    @(negedge clk);
  endtask

  initial begin
    s_dfc[0] = '0; s_dfc[1] = '0; s_dfc[2] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    wr(0, Q_VOLT, C_A, 65536);
    for (int e = 1; e <= 3; e++) begin
      wr(e, Q_TEMP, C_B, 65536); wr(e, Q_TEMP, C_D, 3 * e);
    end
    for (int k = 4; k <= 12; k++) begin
      wr(k, Q_VOLT, C_A, 65536); wr(k, Q_VOLT, C_D, 10 * k);
      wr(k, Q_TEMP, C_B, 65536); wr(k, Q_TEMP, C_D, 7 * k);
    end
    // boundaries: exactly 1.75 V and 40 C minus offsets fall in the lower range
    run(-50000, -20000 - 6, 0, 0);
    run(-50000 + 1, -20000 - 6 + 1, 1, 0);
    run(50000, 20000 - 9, 2, 0);
    run(50000 + 1, 20000 - 9 + 1, 3, 1);
    run(-160000, 0, 4, 0);          // below 1.65 V: out of range
    run(170000, 70000, 5, 0);       // above 1.95 V and 120 C
    for (int n = 0; n < 300; n++)
      run($urandom_range(0, 300000) - 150000, $urandom_range(0, 120000) - 60000,
          $urandom_range(0, 5), (n % 7) == 0);
    for (int k = 0; k < 9; k++) chk(sub_hits[k] > 0, $sformatf("sub-range %0d never used", k));
    chk(oor_hits > 0, "out-of-range never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
