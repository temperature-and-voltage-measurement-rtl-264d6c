`timescale 1ns / 1fs
// tb_ro_nand2: checks the 2-input NAND aging-tolerant ring-oscillator model.
//  * non-oscillation mode (En=0, Start=0): every gate output, and so every
//    loop input, is 1 (loop-input PMOS off);
//  * initialisation mode (En=1, Start=0): outputs alternate 1,0,1,...,1 and
//    the output does not toggle;
//  * oscillation mode: the period equals 2 * STAGES * gate delay, with the
//    gate delay computed here from the first-order delay equation, at several
//    temperatures and voltages; frequency falls with temperature and rises
//    with voltage; a threshold shift changes the frequency;
//  * stopping: after Start falls the output stops toggling.
module tb_ro_nand2;
  localparam int  STAGES = 51;
  localparam real D0 = 40.0, VT = 0.45, AL = 1.0e-3, MU = 1.5;
  logic en = 0, start = 0, ro_out;
  logic signed [31:0] temp_mc = 25000, vdd_uv = 1800000, dvth_uv = 0;
  int checks = 0, failures = 0;
  int n_edges = 0;
  realtime t_first, t_last;

  ro_nand2 #(.STAGES(STAGES)) dut (.en, .start, .temp_mc, .vdd_uv, .dvth_uv, .ro_out);

  always @(posedge ro_out) begin
    if (n_edges == 0) t_first = $realtime;
    t_last = $realtime;
    n_edges++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  // Expected period (ns): 2 * STAGES * D0 * drive(T,V)/drive(25C,1.8V) * (T_K/298.15)^MU
  function automatic real exp_period(real tc, real v, real dvth);
    real vth = (VT + dvth) * (1.0 - AL * (tc - 25.0));
    real g   = (v / (v - vth)) / (1.8 / (1.8 - VT));
    real m   = ((tc + 273.15) / 298.15) ** MU;
    return 2.0 * STAGES * D0 * 1.0e-3 * g * m;
  endfunction

  task automatic measure(real tc, real v, real dvth, output real per);
    temp_mc = int'(tc * 1000.0); vdd_uv = int'(v * 1.0e6); dvth_uv = int'(dvth * 1.0e6);
    start = 0; en = 0; #50;
    en = 1; #50;
    start = 1;
    #20;
    n_edges = 0;
    #(exp_period(tc, v, dvth) * 40.5);
    per = (t_last - t_first) / real'(n_edges - 1);
    chk(n_edges >= 39 && n_edges <= 42, $sformatf("edge count %0d", n_edges));
    chk(per > 0.999 * exp_period(tc, v, dvth) && per < 1.001 * exp_period(tc, v, dvth),
        $sformatf("period %f ns expected %f ns at %f C %f V", per, exp_period(tc, v, dvth), tc, v));
    start = 0; #50; en = 0; #50;
  endtask

  initial begin
    real p25, p100, p0, p_lo, p_hi, p_slow;
    int e;
    #50;
    chk(dut.s == '1 && ro_out == 1'b1, "non-oscillation: all outputs 1");
    en = 1; #50;
    for (int i = 0; i < STAGES; i++)
      chk(dut.s[i] == ((i % 2 == 0) ? 1'b1 : 1'b0), $sformatf("initialisation pattern at %0d", i));
    e = n_edges; #100;
    chk(n_edges == e, "no oscillation in initialisation mode");
    en = 0; #50;
    chk(dut.s == '1, "back to non-oscillation");
    measure(25.0, 1.8, 0.0, p25);
    measure(100.0, 1.8, 0.0, p100);
    measure(0.0, 1.8, 0.0, p0);
    measure(60.0, 1.65, 0.0, p_lo);
    measure(60.0, 1.95, 0.0, p_hi);
    measure(60.0, 1.8, 0.03, p_slow);
    chk(p100 > p25 && p25 > p0, "frequency falls with temperature");
    chk(p_lo > p_hi, "frequency rises with voltage");
    chk(dut.s == '1, "stopped in non-oscillation state");
    e = n_edges; #200;
    chk(n_edges == e, "no edges once stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
