`timescale 1ns / 1fs
// tb_tvm: runs one monitor through a full measurement by hand (initialise,
// oscillate, 1 us settle, counting window, stop, load, 48 shifts) and checks
// that the serial read-out carries the three RO counts in the order RO1, RO2,
// RO3, MSB first, and that each count equals window / RO period within two
// counts (period from the RO delay model: 51, 19 and 21 stages). Repeats at
// other temperatures and voltages and checks the direction of the change.
module tb_tvm;
  import tvm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ro_en = 0, ro_start = 0, cnt_en = 0, cnt_clr = 0, load = 0, shift = 0, sdo;
  logic signed [31:0] temp_mc = 60000, vdd_uv = 1800000, dvth_uv = 0;
  int checks = 0, failures = 0;
  localparam int WIN = 1000;  // cycles of 10 ns

  always #5 clk = ~clk;
  tvm dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  function automatic real period_ns(int ro);
    real d;
    case (ro)
      0: d = 2.0 * 51 * ro_model_pkg::stage_delay_ns(40.0, 0.35, 1.0e-3, 2.0, temp_mc, vdd_uv, dvth_uv);
      1: d = 2.0 * 19 * ro_model_pkg::stage_delay_ns(120.0, 0.80, 1.5e-3, 0.6, temp_mc, vdd_uv, dvth_uv);
      default: d = 2.0 * 21 * ro_model_pkg::stage_delay_ns(170.0, 0.45, 0.8e-3, 1.6, temp_mc, vdd_uv, dvth_uv);
    endcase
    return d;
  endfunction

  task automatic measure(int tc_mc, int v_uv, output int cnt [3]);
    logic [47:0] rx;
    temp_mc = tc_mc; vdd_uv = v_uv;
    @(negedge clk); cnt_clr = 1; @(negedge clk); cnt_clr = 0;
    ro_en = 1; repeat (10) @(negedge clk);
    ro_start = 1; repeat (100) @(negedge clk);
    cnt_en = 1; repeat (WIN) @(negedge clk);
    cnt_en = 0; repeat (8) @(negedge clk);
    ro_start = 0; @(negedge clk); ro_en = 0; @(negedge clk);
    load = 1; @(negedge clk); load = 0;
    shift = 1;
    for (int b = 0; b < 48; b++) begin rx = {rx[46:0], sdo}; @(negedge clk); end
    shift = 0;
    for (int i = 0; i < 3; i++) begin
      real e = real'(WIN) * 10.0 / period_ns(i);
      cnt[i] = int'(rx[47 - 16 * i -: 16]);
      chk(cnt[i] == int'(dut.cnt[i]), $sformatf("serial RO%0d %0d vs counter %0d", i + 1, cnt[i], dut.cnt[i]));
      chk(real'(cnt[i]) > e - 2.0 && real'(cnt[i]) < e + 2.0,
          $sformatf("RO%0d count %0d expected %f", i + 1, cnt[i], e));
    end
  endtask

  initial begin
    int c_a [3], c_hot [3], c_hiv [3];
    repeat (3) @(negedge clk); rst_n = 1;
    chk(dut.u_ro1.s == '1 && dut.u_ro2.s == '1 && dut.u_ro3.s == '1, "ROs rest in non-oscillation mode");
    measure(60000, 1800000, c_a);
    measure(110000, 1800000, c_hot);
    measure(60000, 1900000, c_hiv);
    for (int i = 0; i < 3; i++) begin
      chk(c_hot[i] < c_a[i], $sformatf("RO%0d slower when hot", i + 1));
      chk(c_hiv[i] > c_a[i], $sformatf("RO%0d faster at higher VDD", i + 1));
    end
    chk(dut.u_ro1.s == '1 && dut.u_ro2.s == '1 && dut.u_ro3.s == '1, "ROs back in non-oscillation mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
