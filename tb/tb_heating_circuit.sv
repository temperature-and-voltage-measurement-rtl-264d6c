`timescale 1ns / 1fs
// tb_heating_circuit: enables a subset of the heater ROs and checks that
// exactly those toggle, each with half period 9 stages * 30 ps, that
// n_active counts them, and that disabled ROs sit at 0.
module tb_heating_circuit;
  localparam int N = 1000;
  logic [N-1:0] en = '0, osc;
  logic [9:0] n_active;
  int checks = 0, failures = 0;
  int toggles [N];

  heating_circuit #(.N_RO(N)) dut (.en, .osc, .n_active);

  for (genvar j = 0; j < N; j++) begin : g_mon
    always @(osc[j]) toggles[j]++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    int want;
    #1;
    chk(n_active == 0, "none active");
    for (int j = 0; j < 100; j++) en[j] = 1'b1;   // 10 %
    en[777] = 1'b1;
    #0.001;
    for (int j = 0; j < N; j++) toggles[j] = 0;
    #(0.27 * 100 + 0.1);                           // 100 half periods
    want = 0;
    for (int j = 0; j < N; j++) begin
      if (en[j]) chk(toggles[j] == 100, $sformatf("RO %0d toggled %0d times", j, toggles[j]));
      else       chk(toggles[j] == 0 && osc[j] == 1'b0, $sformatf("RO %0d idle", j));
      want += en[j];
    end
    chk(int'(n_active) == want, $sformatf("n_active %0d", n_active));
    en = '0;
    #1;
    chk(osc == '0 && n_active == 0, "all stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
