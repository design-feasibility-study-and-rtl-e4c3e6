// msp_pkg: widths and constants shared by the region-of-interest (ROI)
// subsystem of the MSP-0 malleable signal processor.
//
// A frame is 480 rows x 640 columns of 12-bit infrared pixels stored row by
// row from address 0 (pixel (row, col) at address row*640 + col). The ROI
// server addresses memory with 21 bits, counts rows and columns with 10-bit
// counters, and takes a 9-bit upper/bottom row and a 10-bit left/right
// column. All of these numbers follow the original design; the roi_t bundle
// is a convenience of this implementation.
package msp_pkg;

  localparam int unsigned PIX_W       = 12;   // IR pixel width
  localparam int unsigned ADDR_W      = 21;   // memory address width
  localparam int unsigned CNT_W       = 10;   // row / column counter width
  localparam int unsigned ROW_IN_W    = 9;    // width of the upper/bottom inputs
  localparam int unsigned COL_IN_W    = 10;   // width of the left/right inputs
  localparam int unsigned FRAME_COLS  = 640;  // pixels per row = row pitch
  localparam int unsigned FRAME_ROWS  = 480;  // rows per frame
  localparam int unsigned FRAME_PIXELS = FRAME_COLS * FRAME_ROWS;

  // Rectangle of one region of interest, all bounds inclusive.
  typedef struct packed {
    logic [ROW_IN_W-1:0] upper;
    logic [COL_IN_W-1:0] left;
    logic [ROW_IN_W-1:0] bottom;
    logic [COL_IN_W-1:0] right;
  } roi_t;

endpackage
