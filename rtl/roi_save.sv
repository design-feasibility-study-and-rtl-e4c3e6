// roi_save: holding register for the bounds of the region of interest.
//
// While new_roi is high (the server is idle, done = 1) the register loads
// the four bounds every clock, so on the clock edge that accepts start it
// holds the bounds that were presented with start. While the server is busy
// new_roi is low and the bounds stay fixed, so the caller may change its
// inputs mid-ROI. The 9-bit upper and bottom rows are zero-extended to the
// 10-bit counter width. A synchronous, active-high reset clears all four.
// Loading on "done" and the widths follow the original design.
module roi_save
  import msp_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                new_roi,
  input  logic [ROW_IN_W-1:0] roi_upper,
  input  logic [COL_IN_W-1:0] roi_left,
  input  logic [ROW_IN_W-1:0] roi_bottom,
  input  logic [COL_IN_W-1:0] roi_right,
  output logic [CNT_W-1:0]    upper,
  output logic [CNT_W-1:0]    left,
  output logic [CNT_W-1:0]    bottom,
  output logic [CNT_W-1:0]    right
);

  always_ff @(posedge clk) begin
    if (reset) begin
      upper  <= '0;
      left   <= '0;
      bottom <= '0;
      right  <= '0;
    end else if (new_roi) begin
      upper  <= CNT_W'(roi_upper);
      left   <= CNT_W'(roi_left);
      bottom <= CNT_W'(roi_bottom);
      right  <= CNT_W'(roi_right);
    end
  end

endmodule
