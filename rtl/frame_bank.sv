// frame_bank: one frame memory bank (MEMA or MEMB) of the MSP-0.
//
// Holds one frame of 12-bit pixels, stored row by row. The camera side
// writes through one synchronous write port (we, waddr, wdata on the rising
// clock edge). Each ROI server has its own read port; reads are
// asynchronous, because the ROI server expects the pixel of the address it
// drives within the same clock. Only the low log2(DEPTH) address bits are
// decoded. The contents are not reset.
//
// The depth default, 512K words, is the RAM size printed for the MSP-0
// board; one 480 x 640 frame (307,200 pixels) fits with room to spare. The
// word is one 12-bit pixel, not the 48 bits printed for the board RAM, and
// the separate read port per ROI server stands in for whatever sharing the
// board used, which is not described: both are this design's choices.
module frame_bank #(
  parameter int unsigned DEPTH  = 524288,
  parameter int unsigned N_RD   = 4,
  parameter int unsigned ADDR_W = msp_pkg::ADDR_W,
  parameter int unsigned PIX_W  = msp_pkg::PIX_W
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [ADDR_W-1:0]             waddr,
  input  logic [PIX_W-1:0]              wdata,
  input  logic [N_RD-1:0][ADDR_W-1:0]   raddr,
  output logic [N_RD-1:0][PIX_W-1:0]    rdata
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  logic [PIX_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[IDX_W-1:0]] <= wdata;
  end

  always_comb begin
    for (int p = 0; p < N_RD; p++) rdata[p] = mem[raddr[p][IDX_W-1:0]];
  end

endmodule
