// udiv_seq: sequential unsigned restoring divider, one quotient bit per
// clock. A start pulse latches num and den; NUM_W cycles later done pulses
// for one cycle with quo = num / den (floor). Division by zero returns all
// ones. Used by the calibration unit to form the ratio F_typ / F(T0,V0).
// This helper is this design's own; the document only specifies the ratio.
`timescale 1ns / 1fs
module udiv_seq #(
  parameter int unsigned NUM_W = 30,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo
);

  localparam int unsigned CW = $clog2(NUM_W + 1);

  logic [NUM_W-1:0] n_q;
  logic [DEN_W-1:0] d_q;
  logic [DEN_W:0]   rem;
  logic [CW-1:0]    cnt;
  logic [DEN_W:0]   trial;

  assign trial = {rem[DEN_W-1:0], n_q[NUM_W-1]} - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
      n_q  <= '0;
      d_q  <= '0;
      rem  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        n_q  <= num;
        d_q  <= den;
        rem  <= '0;
        quo  <= '0;
        cnt  <= CW'(NUM_W);
        busy <= 1'b1;
      end else if (busy) begin
        if (d_q == '0) begin
          quo  <= '1;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          n_q <= {n_q[NUM_W-2:0], 1'b0};
          if (!trial[DEN_W]) begin
            rem <= trial;
            quo <= {quo[NUM_W-2:0], 1'b1};
          end else begin
            rem <= {rem[DEN_W-1:0], n_q[NUM_W-1]};
            quo <= {quo[NUM_W-2:0], 1'b0};
          end
          cnt <= cnt - CW'(1);
          if (cnt == CW'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

endmodule
