// msp0_roi_top: region-of-interest subsystem of the MSP-0 signal processor.
//
// Corrected infrared frames (480 x 640, 12-bit) stream in from the camera
// side and are written alternately into two frame banks, MEMA (even frames)
// and MEMB (odd frames). Four ROI servers, one per fiber-channel output,
// each read a rectangle of their own choosing out of the bank that is not
// being written, and stream its pixels out line by line. Each server
// switches bank after every ROI it serves, so serving one ROI per frame
// keeps it in step with the writer: while frame N is written into one bank,
// the servers read frame N-1 from the other.
//
// Parts: frame_writer (double-buffer write control), two frame_bank
// instances, N_ROI roi_server instances. The fiber-channel links, the
// non-uniformity correction in front of the writer and the camera bus
// protocol are outside this block: their sides are plain ports.
//
// Interface and timing: one clock (the board runs 50 MHz), synchronous
// active-high reset. pix_valid / pix_data: one pixel per strobe in raster
// order; frame_done pulses after each frame and wr_bank_b says which bank is
// being filled. Per server: start and roi (bounds, inclusive) are taken
// while done = 1; data_out / data_valid / data_eol carry the ROI pixels one
// clock after their addresses, one pixel per clock; mem_a_sel shows which
// bank the server will read (or is reading). Deciding when to start a
// server (after the frame it should read is complete) is left to the
// controller outside, as in the original design. Four servers and the bank
// size follow the original design; FRAME_ROWS may be lowered for short
// simulations (the row pitch stays 640).
module msp0_roi_top
  import msp_pkg::*;
#(
  parameter int unsigned N_ROI      = 4,
  parameter int unsigned BANK_DEPTH = 524288,
  parameter int unsigned FRAME_ROWS_P = FRAME_ROWS
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic                        pix_valid,
  input  logic [PIX_W-1:0]            pix_data,
  output logic                        wr_bank_b,
  output logic                        frame_done,
  input  logic [N_ROI-1:0]            start,
  input  roi_t [N_ROI-1:0]            roi,
  output logic [N_ROI-1:0]            done,
  output logic [N_ROI-1:0]            eol,
  output logic [N_ROI-1:0]            mem_a_sel,
  output logic [N_ROI-1:0][PIX_W-1:0] data_out,
  output logic [N_ROI-1:0]            data_valid,
  output logic [N_ROI-1:0]            data_eol
);

  logic                         we_a, we_b;
  logic [ADDR_W-1:0]            waddr;
  logic [PIX_W-1:0]             wdata;
  logic [N_ROI-1:0][ADDR_W-1:0] raddr_a, raddr_b;
  logic [N_ROI-1:0][PIX_W-1:0]  rdata_a, rdata_b;

  frame_writer #(.FRAME_PIXELS(FRAME_COLS * FRAME_ROWS_P)) u_writer (
    .clk       (clk),
    .reset     (reset),
    .pix_valid (pix_valid),
    .pix_data  (pix_data),
    .we_a      (we_a),
    .we_b      (we_b),
    .waddr     (waddr),
    .wdata     (wdata),
    .wr_bank_b (wr_bank_b),
    .frame_done(frame_done)
  );

  frame_bank #(.DEPTH(BANK_DEPTH), .N_RD(N_ROI)) u_mema (
    .clk  (clk),
    .we   (we_a),
    .waddr(waddr),
    .wdata(wdata),
    .raddr(raddr_a),
    .rdata(rdata_a)
  );

  frame_bank #(.DEPTH(BANK_DEPTH), .N_RD(N_ROI)) u_memb (
    .clk  (clk),
    .we   (we_b),
    .waddr(waddr),
    .wdata(wdata),
    .raddr(raddr_b),
    .rdata(rdata_b)
  );

  for (genvar s = 0; s < N_ROI; s++) begin : g_server
    roi_server u_server (
      .clk       (clk),
      .reset     (reset),
      .start     (start[s]),
      .roi_u     (roi[s].upper),
      .roi_l     (roi[s].left),
      .roi_b     (roi[s].bottom),
      .roi_r     (roi[s].right),
      .data_a    (rdata_a[s]),
      .data_b    (rdata_b[s]),
      .address_a (raddr_a[s]),
      .address_b (raddr_b[s]),
      .data_out  (data_out[s]),
      .eol       (eol[s]),
      .done      (done[s]),
      .mem_a_sel (mem_a_sel[s]),
      .data_valid(data_valid[s]),
      .data_eol  (data_eol[s])
    );
  end

endmodule
