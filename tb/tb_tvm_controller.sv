`timescale 1ns / 1fs
// tb_tvm_controller: runs the measurement controller against simple
// shift-register stand-ins for three monitors (each loads a random 48-bit
// pattern on load and shifts it out MSB first). Checks the mode order
// (clear, En, En+Start, window inside Start, Start off before En off, load,
// shift), the length of every phase in cycles, the records on the output
// stream (counts, index, calibration flag), holding under back-pressure, and
// that the whole measurement stays under 100 us at 100 MHz with the default
// window.
module tb_tvm_controller;
  import tvm_pkg::*;
  localparam int N_TVM = 3, SETTLE = 10, WIN = 50, INIT = 10, DRAIN = 8;

  logic clk = 0, rst_n = 0, req = 0, req_calib = 0, busy;
  logic ro_en, ro_start, cnt_en, cnt_clr, load, shift;
  logic [N_TVM-1:0] sdo;
  logic m_valid, m_ready = 1, m_calib; logic [1:0] m_tvm; cnt_t m_cnt [N_RO];
  logic [47:0] pat [N_TVM], sr [N_TVM];
  int checks = 0, failures = 0;
  int n_clr, n_en, n_start, n_win, n_load, n_shift, recs;
  bit order_ok;

  always #5 clk = ~clk;
  tvm_controller #(.N_TVM(N_TVM), .SETTLE_CYC(SETTLE), .WINDOW_CYC(WIN)) dut (.*);

  // monitor stand-ins
  for (genvar t = 0; t < N_TVM; t++) begin : g_tvm
    always_ff @(posedge clk)
      if (load) sr[t] <= pat[t];
      else if (shift) sr[t] <= {sr[t][46:0], 1'b0};
    assign sdo[t] = sr[t][47];
  end

  // phase counters and ordering rules
  always @(posedge clk) if (rst_n) begin
    n_clr   += cnt_clr;
    n_en    += ro_en;
    n_start += ro_start;
    n_win   += cnt_en;
    n_load  += load;
    n_shift += shift;
    if (ro_start && !ro_en) order_ok = 0;
    if (cnt_en && !ro_start) order_ok = 0;
    if (cnt_clr && (ro_en || ro_start)) order_ok = 0;
    if ((load || shift) && (ro_en || ro_start)) order_ok = 0;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic run(bit calib, bit stall);
    int cyc;
    for (int t = 0; t < N_TVM; t++) pat[t] = {$urandom, $urandom};
    n_clr = 0; n_en = 0; n_start = 0; n_win = 0; n_load = 0; n_shift = 0; recs = 0;
    order_ok = 1;
    @(negedge clk); req = 1; req_calib = calib;
    @(negedge clk); req = 0;
    cyc = 1;
    while (!m_valid) begin @(negedge clk); cyc++; end
    chk(cyc == 1 + 2 + INIT + SETTLE + WIN + DRAIN + 2 + 1 + 48,
        $sformatf("cycles to first record %0d", cyc));
    for (int t = 0; t < N_TVM; t++) begin
      if (stall) begin
        m_ready = 0;
        repeat (2) begin
          @(negedge clk);
          chk(m_valid && m_tvm == 2'(t), "record held under back-pressure");
        end
        m_ready = 1;
      end
      chk(m_valid && m_tvm == 2'(t), $sformatf("record %0d present", t));
      chk(m_calib == calib, "calibration flag");
      for (int i = 0; i < N_RO; i++)
        chk(m_cnt[i] == pat[t][47 - 16 * i -: 16], $sformatf("tvm %0d count %0d", t, i));
      @(negedge clk);
    end
    chk(!m_valid && !busy, "idle after last record");
    chk(order_ok, "mode order");
    chk(n_clr == 2, $sformatf("clear cycles %0d", n_clr));
    chk(n_en == INIT + SETTLE + WIN + DRAIN + 1, $sformatf("En cycles %0d", n_en));
    chk(n_start == SETTLE + WIN + DRAIN, $sformatf("Start cycles %0d", n_start));
    chk(n_win == WIN, $sformatf("window cycles %0d", n_win));
    chk(n_load == 1, "one load");
    chk(n_shift == 48, $sformatf("shift cycles %0d", n_shift));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(!ro_en && !ro_start, "ROs idle after reset");
    run(1, 0);
    run(0, 1);
    for (int n = 0; n < 5; n++) run(n[0], n[1]);
    // default window: 1 us settle + 50 us window at 100 MHz < 100 us
    chk((2 + 10 + 100 + 5000 + 8 + 2 + 1 + 48) * 10 < 100000, "default measurement time under 100 us");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
