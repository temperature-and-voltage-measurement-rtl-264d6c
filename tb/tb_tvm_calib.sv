`timescale 1ns / 1fs
// tb_tvm_calib: checks reference storage and ratio calibration.
// Calibration records at random counts must produce no output record but a
// cal_done pulse and set cal_ok; later measurement records must come out as
// floor(F_typ * 2^14 / F0) * (F - F0) per RO, with the monitor index and
// cal_ok tag, one cycle after acceptance. An uncalibrated monitor must use
// ratio 1.0 and reference 0.
module tb_tvm_calib;
  import tvm_pkg::*;
  localparam int N_TVM = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cnt_t f_typ [N_RO];
  logic s_valid = 0, s_ready, s_calib = 0; logic [2:0] s_tvm = 0; cnt_t s_cnt [N_RO];
  logic m_valid, m_ready = 1, m_cal_ok; logic [2:0] m_tvm; dfc_t m_dfc [N_RO];
  logic cal_done; logic [N_TVM-1:0] cal_ok;
  int checks = 0, failures = 0;
  int unsigned f0_ref [N_TVM][N_RO];
  int unsigned r_ref  [N_TVM][N_RO];
  int outs = 0;

  tvm_calib #(.N_TVM(N_TVM)) dut (.*);

  always @(posedge clk) if (m_valid && m_ready) outs++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic send(int tvm, bit calib, int unsigned c0, int unsigned c1, int unsigned c2);
    @(negedge clk);
    s_tvm = 3'(tvm); s_calib = calib; s_cnt[0] = cnt_t'(c0); s_cnt[1] = cnt_t'(c1); s_cnt[2] = cnt_t'(c2);
    s_valid = 1;
    while (!s_ready) @(negedge clk);
    @(negedge clk); s_valid = 0;
  endtask

  task automatic calibrate(int tvm, int unsigned c0, int unsigned c1, int unsigned c2);
    int o, cyc;
    int unsigned c [3];
    c = '{c0, c1, c2};
    @(negedge clk);  // let a previous output record leave first
    o = outs;
    send(tvm, 1, c0, c1, c2);
    cyc = 0;
    while (!cal_done && cyc < 500) begin @(negedge clk); cyc++; end
    chk(cal_done, "cal_done pulse");
    chk(cal_ok[tvm], "cal_ok set");
    chk(outs == o, "no output record for calibration");
    for (int i = 0; i < N_RO; i++) begin
      longint q;
      f0_ref[tvm][i] = c[i];
      q = (c[i] == 0) ? 65535 : (longint'(f_typ[i]) * 16384) / c[i];
      r_ref[tvm][i] = (q > 65535) ? 65535 : int'(q);
    end
  endtask

  task automatic measure(int tvm, int unsigned c0, int unsigned c1, int unsigned c2);
    int unsigned c [3];
    c = '{c0, c1, c2};
    @(negedge clk);
    s_tvm = 3'(tvm); s_calib = 0; s_cnt[0] = cnt_t'(c0); s_cnt[1] = cnt_t'(c1); s_cnt[2] = cnt_t'(c2);
    s_valid = 1;
    while (!s_ready) @(negedge clk);
    @(negedge clk); s_valid = 0;
    chk(m_valid, "output one cycle after acceptance");
    chk(m_tvm == 3'(tvm) && m_cal_ok == cal_ok[tvm], "tag");
    for (int i = 0; i < N_RO; i++) begin
      longint e = longint'(r_ref[tvm][i]) * (longint'(c[i]) - longint'(f0_ref[tvm][i]));
      chk(longint'(m_dfc[i]) == e, $sformatf("tvm %0d ro %0d dfc %0d exp %0d", tvm, i, m_dfc[i], e));
    end
  endtask

  initial begin
    f_typ[0] = 16'd12000; f_typ[1] = 16'd10500; f_typ[2] = 16'd7000;
    for (int t = 0; t < N_TVM; t++) for (int i = 0; i < N_RO; i++) begin
      f0_ref[t][i] = 0; r_ref[t][i] = 16384;
    end
    for (int i = 0; i < N_RO; i++) s_cnt[i] = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    chk(cal_ok == '0, "not calibrated after reset");
    measure(5, 100, 200, 300);                // uncalibrated: ratio 1, F0 0
    calibrate(0, 12000, 10500, 7000);         // typical: ratio exactly 1.0
    calibrate(1, 11000, 11000, 6500);         // slow/fast mix
    calibrate(2, 13500, 9000, 7400);
    calibrate(3, 1, 2, 3);                    // ratio saturates
    measure(0, 11800, 10600, 6900);
    measure(1, 11100, 10990, 6700);
    measure(2, 13000, 9500, 7000);
    for (int n = 0; n < 200; n++) begin
      int t = $urandom_range(0, 2);
      measure(t, $urandom_range(5000, 20000), $urandom_range(5000, 20000), $urandom_range(3000, 15000));
      if (n % 50 == 0) calibrate(t, $urandom_range(8000, 16000), $urandom_range(8000, 14000), $urandom_range(5000, 9000));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
