// tv_lin_eval: evaluates one calibrated linear T or V equation,
//   y = a*dFc1 + b*dFc2 + c*dFc3 + d,
// the multiple-regression form used for every range of the hierarchical
// calculation. Purely combinational: three signed multipliers and an adder
// tree. dFc_i carry R_FRAC fraction bits and a, b, c carry COEF_FRAC fraction
// bits, so the sum of products is rounded to the nearest integer by an
// arithmetic right shift of R_FRAC+COEF_FRAC after adding half an LSB; d is
// then added and the result saturates to the VAL_W-bit output.
// The equation form follows the published method; the fixed-point formats,
// the rounding and the saturation are this design's choices.
`timescale 1ns / 1fs
module tv_lin_eval
  import tvm_pkg::*;
(
  input  lin_eq_t eq,
  input  dfc_t    x [N_RO],
  output val_t    y
);

  localparam int unsigned ACC_W = COEF_W + DF_W + 2;
  localparam int unsigned SH    = COEF_FRAC + R_FRAC;
  localparam logic signed [ACC_W-1:0] HALF  = ACC_W'(1) <<< (SH - 1);
  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((1 << (VAL_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -Y_MAX - ACC_W'(1);

  logic signed [ACC_W-1:0] p0, p1, p2, acc, sum;

  always_comb begin
    p0  = ACC_W'(eq.a) * ACC_W'(x[0]);
    p1  = ACC_W'(eq.b) * ACC_W'(x[1]);
    p2  = ACC_W'(eq.c) * ACC_W'(x[2]);
    acc = p0 + p1 + p2 + HALF;
    sum = (acc >>> SH) + ACC_W'(eq.d);
    if (sum > Y_MAX)      y = val_t'(Y_MAX);
    else if (sum < Y_MIN) y = val_t'(Y_MIN);
    else                  y = val_t'(sum);
  end

endmodule
