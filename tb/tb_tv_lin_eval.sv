`timescale 1ns / 1fs
// tb_tv_lin_eval: checks the fixed-point evaluation of one linear T/V
// equation against a wide-integer reference (round half up after the
// R_FRAC+COEF_FRAC shift, then add d, then saturate), with directed cases
// worked out by hand and random operands.
module tb_tv_lin_eval;
  import tvm_pkg::*;

  lin_eq_t eq;
  dfc_t    x [N_RO];
  val_t    y;
  int      checks = 0, failures = 0;

  tv_lin_eval dut (.eq, .x, .y);

  function automatic longint ref_y(lin_eq_t e, dfc_t xv [N_RO]);
    logic signed [127:0] s;
    longint r;
    s = 128'(e.a) * 128'(xv[0]) + 128'(e.b) * 128'(xv[1]) + 128'(e.c) * 128'(xv[2]);
    s = s + (128'sd1 <<< (COEF_FRAC + R_FRAC - 1));
    s = s >>> (COEF_FRAC + R_FRAC);
    s = s + 128'(e.d);
    if (s > 128'sd8388607) r = 8388607;
    else if (s < -128'sd8388608) r = -8388608;
    else r = longint'(s);
    return r;
  endfunction

  task automatic check(longint exp, string what);
    #1;
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1.0 * 5 counts + 7 = 12
    eq = '{a: 32'sd65536, b: 32'sd0, c: 32'sd0, d: 32'sd7};
    x[0] = dfc_t'(5) <<< R_FRAC; x[1] = '0; x[2] = '0;
    check(12, "unit a");
    // -2.5 * 4 + 0.5 * 10 + 0 = -5, d = 100 -> 95
    eq = '{a: -32'sd163840, b: 32'sd32768, c: 32'sd0, d: 32'sd100};
    x[0] = dfc_t'(4) <<< R_FRAC; x[1] = dfc_t'(10) <<< R_FRAC; x[2] = '0;
    check(95, "mixed");
    // 0.5 * 1 count rounds up to 1
    eq = '{a: 32'sd32768, b: 32'sd0, c: 32'sd0, d: 32'sd0};
    x[0] = dfc_t'(1) <<< R_FRAC; x[1] = '0; x[2] = '0;
    check(1, "round half");
    // c path: 3 * 1000 = 3000
    eq = '{a: 32'sd0, b: 32'sd0, c: 32'sd196608, d: -32'sd1};
    x[0] = '0; x[1] = '0; x[2] = dfc_t'(1000) <<< R_FRAC;
    check(2999, "c path");
    // positive saturation
    eq = '{a: 32'sd2147483647, b: 32'sd2147483647, c: 32'sd0, d: 32'sd0};
    x[0] = dfc_t'(30000) <<< R_FRAC; x[1] = dfc_t'(30000) <<< R_FRAC; x[2] = '0;
    check(8388607, "sat+");
    eq.a = -32'sd2147483647; eq.b = -32'sd2147483647;
    check(-8388608, "sat-");
    for (int n = 0; n < 2000; n++) begin
      eq.a = $urandom; eq.b = $urandom; eq.c = $urandom; eq.d = $urandom;
      // keep most results in range: small coefficients most of the time
      if (n % 2 == 0) begin
        eq.a = eq.a >>> 12; eq.b = eq.b >>> 12; eq.c = eq.c >>> 12; eq.d = eq.d >>> 10;
      end
      for (int i = 0; i < N_RO; i++)
        x[i] = dfc_t'($signed({$urandom, $urandom})) >>> ($urandom_range(0, 30));
      check(ref_y(eq, x), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
