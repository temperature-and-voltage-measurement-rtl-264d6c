`timescale 1ns / 1fs
// tb_heating_ctrl: writes activation settings (per mille) to the heating
// controller and checks that exactly round(pm * N_RO / 1000) of the first
// enables of each circuit are on (thermometer code), that values above 1000
// clip, that heat_on gates everything and that an update shows two cycles
// after the write.
module tb_heating_ctrl;
  localparam int N_HEAT = 4, N_RO = 1000;
  logic clk = 0, rst_n = 0, heat_on = 0, cfg_we = 0;
  logic [1:0] cfg_idx = 0; logic [9:0] cfg_pm = 0;
  logic [N_RO-1:0] en [N_HEAT];
  int checks = 0, failures = 0;
  int pm_ref [N_HEAT] = '{0, 0, 0, 0};

  always #5 clk = ~clk;
  heating_ctrl #(.N_HEAT(N_HEAT), .N_RO(N_RO)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  task automatic check_all();
    for (int h = 0; h < N_HEAT; h++) begin
      int n = heat_on ? pm_ref[h] * N_RO / 1000 : 0;
      int ones = $countones(en[h]);
      chk(ones == n, $sformatf("circuit %0d: %0d enabled, expected %0d", h, ones, n));
      chk(n == 0 || (en[h][n-1] && (n == N_RO || !en[h][n])), "thermometer code");
    end
  endtask

  task automatic wr(int h, int pm);
    @(negedge clk); cfg_we = 1; cfg_idx = 2'(h); cfg_pm = 10'(pm);
    @(negedge clk); cfg_we = 0;
    pm_ref[h] = (pm > 1000) ? 1000 : pm;
    @(negedge clk);
    check_all();
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); check_all();
    heat_on = 1;
    wr(0, 100);   // 10 %: 100 ROs
    wr(1, 250);
    wr(2, 1000);
    wr(3, 1023);  // clipped to 1000
    wr(1, 0);
    heat_on = 0; repeat (3) @(negedge clk); check_all();
    heat_on = 1; repeat (3) @(negedge clk); check_all();
    for (int n = 0; n < 30; n++) wr($urandom_range(0, 3), $urandom_range(0, 1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
