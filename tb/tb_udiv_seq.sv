`timescale 1ns / 1fs
// tb_udiv_seq: checks the sequential divider against the % and / operators
// for random and edge operands, including division by zero (all ones) and
// the NUM_W-cycle latency from start to done.
module tb_udiv_seq;
  logic        clk = 0, rst_n = 0, start = 0;
  logic [29:0] num, quo;
  logic [15:0] den;
  logic        busy, done;
  int          checks = 0, failures = 0;

  udiv_seq #(.NUM_W(30), .DEN_W(16)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quo);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [29:0] n, logic [15:0] d);
    int cyc;
    logic [29:0] e;
    @(negedge clk); num = n; den = d; start = 1;
    @(negedge clk); start = 0;
    cyc = 0;  // counts edges after the one that took start
    while (!done) begin @(negedge clk); cyc++; end
    e = (d == 0) ? '1 : n / 30'(d);
    checks++;
    if (quo !== e) begin failures++; $display("FAIL %0d/%0d = %0d exp %0d", n, d, quo, e); end
    if (d != 0) begin
      checks++;
      if (cyc != 30) begin failures++; $display("FAIL latency %0d", cyc); end
    end
  endtask

  initial begin
    num = 0; den = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(30'd100, 16'd7);
    run(30'h3FFF_FFFF, 16'd1);
    run(30'h3FFF_FFFF, 16'hFFFF);
    run(30'd5, 16'd0);
    run(30'd3, 16'd9);
    for (int k = 0; k < 200; k++) run(30'($urandom), 16'($urandom_range(1, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
