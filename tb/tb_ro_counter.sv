`timescale 1ns / 1fs
// tb_ro_counter: drives the counter with a free-running clock that stands in
// for an RO and an asynchronous window; the count must equal the number of
// rising edges at which the window was high (the two-edge synchroniser delay
// shifts start and end alike). Also checks clear and saturation at 65535.
module tb_ro_counter;
  import tvm_pkg::*;
  logic ro_clk = 0, clr = 1, cnt_en = 0;
  cnt_t count;
  int checks = 0, failures = 0;
  int edges_in_window;

  ro_counter dut (.ro_clk, .clr, .cnt_en, .count);

  always #2.37 ro_clk = ~ro_clk;
  always @(posedge ro_clk) if (cnt_en) edges_in_window++;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic window(real len_ns);
    #13.1 clr = 1; #7 clr = 0;
    chk(count == 0, "clear");
    edges_in_window = 0;
    #3.3 cnt_en = 1;
    #(len_ns) cnt_en = 0;
    #40;  // let the synchroniser see the window close
    chk(int'(count) == edges_in_window,
        $sformatf("count %0d expected %0d", count, edges_in_window));
  endtask

  initial begin
    #10 clr = 0;
    window(100.0);
    window(1000.3);
    window(7.1);
    for (int n = 0; n < 20; n++) window(real'($urandom_range(10, 5000)) + 0.11);
    // saturation
    #5 clr = 1; #5 clr = 0;
    cnt_en = 1;
    #(4.74 * 66000);
    cnt_en = 0;
    #40;
    chk(count == 16'hFFFF, $sformatf("saturation %0d", count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
