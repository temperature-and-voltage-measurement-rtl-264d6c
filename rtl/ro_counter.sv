// ro_counter: edge counter that turns a ring-oscillator output into a
// frequency reading, one per RO of the monitor.
//
// The counter runs in the RO's own clock domain (ro_clk is the RO output).
// cnt_en comes from the system-clock controller and is brought into the RO
// domain through a two-flop synchroniser, so the counter counts the rising RO
// edges that fall inside the controller's measurement window (to within one
// RO period at each end; the error is the same at every measurement, so it
// cancels in the differential readings). The counter saturates at all ones
// instead of wrapping. clr is an asynchronous clear, asserted by the
// controller while the RO is stopped.
// The count is read in the system domain only after the controller has
// stopped the RO (Start=0), when ro_clk no longer toggles and count is
// stable; no synchroniser is needed on that path.
// Counting RO edges follows the published monitor; the synchroniser,
// saturation and width (tvm_pkg::CNT_W) are this design's choices.
`timescale 1ns / 1fs
module ro_counter
  import tvm_pkg::*;
(
  input  logic ro_clk,
  input  logic clr,
  input  logic cnt_en,
  output cnt_t count
);

  logic [1:0] en_sync;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) begin
      en_sync <= '0;
      count   <= '0;
    end else begin
      en_sync <= {en_sync[0], cnt_en};
      if (en_sync[1] && count != '1)
        count <= count + cnt_t'(1);
    end
  end

endmodule
