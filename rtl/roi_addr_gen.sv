// roi_addr_gen: control and state of the region-of-interest server.
//
// The block holds the present pixel address, the address of the first pixel
// of the next ROI line, the row and column counters, the done flag and the
// bank select, and picks their next values from the arithmetic units around
// it (adders, incrementers and comparators live in roi_server, as in the
// original design's structure):
//
//   reset            done = 1, MEMA selected, everything else 0.
//   idle, start = 1  done = 0; row = upper, column = left;
//                    address = upper*640 + left (total_offset);
//                    next line = that + 640 (second_line).
//   busy, comp1 = 1  (right > column) address + 1, column + 1.
//   busy, comp1 = 0  last pixel of the line: eol = 1 in this cycle and
//      comp2 = 0     (row + 1 <= bottom) address = next line,
//                    next line + 640, row + 1, column = left;
//      comp2 = 1     (row + 1 > bottom) done = 1, bank select toggles,
//                    counters and addresses return to 0.
//
// One address is produced per clock with no gaps between lines, so an ROI
// of W x H pixels keeps done low for exactly W*H clocks. The address is a
// register; eol is decoded from registers and marks the clock in which the
// last address of a line is on the bus. The shift terms upper*512 and
// upper*128 (640 = 2**9 + 2**7) and the zero-extended left bound are
// produced here for the start-address adders. data_in, the pixel from the
// selected bank, is registered once into data_out, so data_out belongs to
// the address of the previous clock; data_valid and data_eol are the busy
// flag and eol delayed by the same clock. The reset is synchronous and
// active high. All of this follows the original design, except: while idle
// the address and column counter hold their values (the original kept
// counting), and data_valid / data_eol are additions of this design.
module roi_addr_gen
  import msp_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                start,
  input  logic [ROW_IN_W-1:0] roi_upper,
  input  logic [COL_IN_W-1:0] roi_left,
  input  logic [CNT_W-1:0]    left,
  input  logic                comp1,
  input  logic                comp2,
  output logic                mem_select,
  output logic [CNT_W-1:0]    ccounter,
  output logic [CNT_W-1:0]    rcounter,
  output logic [ADDR_W-1:0]   line_address,
  output logic [ADDR_W-1:0]   address,
  output logic [ADDR_W-1:0]   v_offset1,
  output logic [ADDR_W-1:0]   v_offset2,
  output logic [ADDR_W-1:0]   h_offset,
  input  logic [ADDR_W-1:0]   total_offset,
  input  logic [ADDR_W-1:0]   second_line,
  input  logic [ADDR_W-1:0]   incr_address,
  input  logic [CNT_W-1:0]    incr_column,
  input  logic [ADDR_W-1:0]   add640address,
  input  logic [CNT_W-1:0]    incr_row,
  input  logic [PIX_W-1:0]    data_in,
  output logic [PIX_W-1:0]    data_out,
  output logic                eol,
  output logic                done,
  output logic                data_valid,
  output logic                data_eol
);

  logic              n_mem_select, n_done;
  logic [ADDR_W-1:0] n_address, n_line_addr;
  logic [CNT_W-1:0]  n_countr, n_countc;

  // Start-address terms: upper*512, upper*128 and left.
  assign v_offset1 = ADDR_W'({roi_upper, 9'b0});
  assign v_offset2 = ADDR_W'({roi_upper, 7'b0});
  assign h_offset  = ADDR_W'(roi_left);

  always_comb begin
    n_mem_select = mem_select;
    n_done       = done;
    n_address    = address;
    n_line_addr  = line_address;
    n_countr     = rcounter;
    n_countc     = ccounter;
    eol          = 1'b0;
    if (reset) begin
      n_mem_select = 1'b1;
      n_done       = 1'b1;
      n_address    = '0;
      n_line_addr  = '0;
      n_countr     = '0;
      n_countc     = '0;
    end else if (done) begin
      if (start) begin
        n_done      = 1'b0;
        n_countr    = CNT_W'(roi_upper);
        n_countc    = roi_left;
        n_address   = total_offset;
        n_line_addr = second_line;
      end
    end else if (comp1) begin
      n_address = incr_address;
      n_countc  = incr_column;
    end else begin
      eol = 1'b1;
      if (comp2) begin
        n_done       = 1'b1;
        n_mem_select = ~mem_select;
        n_address    = '0;
        n_line_addr  = '0;
        n_countr     = '0;
        n_countc     = '0;
      end else begin
        n_countc    = left;
        n_countr    = incr_row;
        n_address   = line_address;
        n_line_addr = add640address;
      end
    end
  end

  always_ff @(posedge clk) begin
    mem_select   <= n_mem_select;
    done         <= n_done;
    address      <= n_address;
    line_address <= n_line_addr;
    rcounter     <= n_countr;
    ccounter     <= n_countc;
    data_out     <= data_in;
    data_valid   <= ~reset & ~done;
    data_eol     <= ~reset & eol;
  end

endmodule
