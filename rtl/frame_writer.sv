// frame_writer: double-buffer write control for the MSP-0 frame store.
//
// Incoming (already non-uniformity corrected) pixels arrive one per
// pix_valid in raster order. They are written to consecutive addresses from
// 0, so pixel (row, col) lands at row*640 + col. Frames alternate between
// the banks: frame 0, 2, 4, ... go to MEMA and frame 1, 3, 5, ... to MEMB,
// so that while one bank is filled the other can be read out by the ROI
// servers. After the last pixel of a frame the write address returns to 0,
// the bank flips and frame_done pulses for one clock.
//
// Interface and timing: we_a / we_b / waddr / wdata are combinational from
// pix_valid, pix_data and the registered address and bank, for a bank with
// a synchronous write port. wr_bank_b is 1 while MEMB is being written.
// Synchronous active-high reset: address 0, MEMA first. The alternation of
// even and odd frames follows the original design; the pixel-counting
// frame boundary (no separate start-of-frame signal) is this design's
// choice, since the camera protocol is not given.
module frame_writer #(
  parameter int unsigned FRAME_PIXELS = msp_pkg::FRAME_PIXELS,
  parameter int unsigned ADDR_W       = msp_pkg::ADDR_W,
  parameter int unsigned PIX_W        = msp_pkg::PIX_W
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              pix_valid,
  input  logic [PIX_W-1:0]  pix_data,
  output logic              we_a,
  output logic              we_b,
  output logic [ADDR_W-1:0] waddr,
  output logic [PIX_W-1:0]  wdata,
  output logic              wr_bank_b,
  output logic              frame_done
);

  localparam logic [ADDR_W-1:0] LastAddr = ADDR_W'(FRAME_PIXELS - 1);

  assign we_a  = pix_valid & ~wr_bank_b;
  assign we_b  = pix_valid &  wr_bank_b;
  assign wdata = pix_data;

  always_ff @(posedge clk) begin
    if (reset) begin
      waddr      <= '0;
      wr_bank_b  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (pix_valid) begin
        if (waddr == LastAddr) begin
          waddr      <= '0;
          wr_bank_b  <= ~wr_bank_b;
          frame_done <= 1'b1;
        end else begin
          waddr <= waddr + 1'b1;
        end
      end
    end
  end

endmodule
