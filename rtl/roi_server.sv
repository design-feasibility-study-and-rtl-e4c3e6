// roi_server: region-of-interest (ROI) server of the MSP-0.
//
// A frame of 480 x 640 12-bit pixels sits row by row in one of two banks,
// MEMA or MEMB (pixel (row, col) at address row*640 + col). Given an ROI
// (rows upper..bottom, columns left..right, all inclusive) and a start
// pulse, the server puts the address of every ROI pixel, line by line, on
// the address bus of the bank in use, one address per clock, and returns
// the pixel read from that bank on data_out. When the ROI is finished it
// raises done and switches to the other bank, so successive ROIs read MEMA,
// MEMB, MEMA, ... in step with the double-buffered frame writer.
//
// Structure (as in the original design): roi_save holds the bounds;
// roi_addr_gen holds the state; the start address upper*640 + left is a
// shift-and-add multiply (upper*512 + upper*128) plus left, done with two
// 21-bit ripple-carry adders; roi_add640 units form the next-line address;
// roi_incr units step the address and counters; two roi_cmp_gt units test
// "right > column" (not at the end of the line) and "row + 1 > bottom"
// (last line); roi_select_mem steers the buses to MEMA or MEMB.
//
// Interface and timing: synchronous active-high reset selects MEMA and sets
// done. start is sampled while done = 1; the bounds presented with it are
// used. The first address is on the bus one clock later; done stays low for
// exactly (right-left+1)*(bottom-upper+1) clocks. eol is high in the clock
// in which the last address of a line is on the bus. The bank must answer
// within the same clock (asynchronous read); data_out, data_valid and
// data_eol follow the address by one clock. As in the original, the bounds
// are not checked: 0 <= upper <= bottom <= 479 and 0 <= left <= right <= 639
// are the caller's job. data_valid, data_eol and mem_a_sel are ports added
// by this design for the downstream link.
module roi_server
  import msp_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                start,
  input  logic [ROW_IN_W-1:0] roi_u,
  input  logic [COL_IN_W-1:0] roi_l,
  input  logic [ROW_IN_W-1:0] roi_b,
  input  logic [COL_IN_W-1:0] roi_r,
  input  logic [PIX_W-1:0]    data_a,
  input  logic [PIX_W-1:0]    data_b,
  output logic [ADDR_W-1:0]   address_a,
  output logic [ADDR_W-1:0]   address_b,
  output logic [PIX_W-1:0]    data_out,
  output logic                eol,
  output logic                done,
  output logic                mem_a_sel,
  output logic                data_valid,
  output logic                data_eol
);

  logic              comp1, comp2;
  logic [CNT_W-1:0]  ccounter, rcounter;
  logic [ADDR_W-1:0] line_address, address;
  logic [CNT_W-1:0]  u, l, b, r;
  logic [ADDR_W-1:0] v_off1, v_off2, v_off, h_off, tot_off, second_line;
  logic [ADDR_W-1:0] inc_addr, next_row_addr;
  logic [CNT_W-1:0]  inc_column, inc_row;
  logic [PIX_W-1:0]  data_in;

  roi_select_mem u_select (
    .mem_select   (mem_a_sel),
    .data_in_a    (data_a),
    .data_in_b    (data_b),
    .address_in   (address),
    .data_out     (data_in),
    .address_out_a(address_a),
    .address_out_b(address_b)
  );

  roi_save u_save (
    .clk       (clk),
    .reset     (reset),
    .new_roi   (done),
    .roi_upper (roi_u),
    .roi_left  (roi_l),
    .roi_bottom(roi_b),
    .roi_right (roi_r),
    .upper     (u),
    .left      (l),
    .bottom    (b),
    .right     (r)
  );

  // upper*512 + upper*128 = upper*640, then + left.
  roi_rca_add #(.W(ADDR_W)) u_vmul (.a(v_off1), .b(v_off2), .sum(v_off));
  roi_rca_add #(.W(ADDR_W)) u_start (.a(v_off), .b(h_off), .sum(tot_off));
  roi_add640  #(.W(ADDR_W)) u_line1 (.data_in(tot_off), .data_out(second_line));
  roi_incr    #(.W(ADDR_W)) u_inca (.data_in(address), .data_out(inc_addr));
  roi_incr    #(.W(CNT_W))  u_incc (.data_in(ccounter), .data_out(inc_column));
  roi_add640  #(.W(ADDR_W)) u_linen (.data_in(line_address), .data_out(next_row_addr));
  roi_incr    #(.W(CNT_W))  u_incr (.data_in(rcounter), .data_out(inc_row));
  roi_cmp_gt  #(.W(CNT_W))  u_cmpc (.a(r), .b(ccounter), .gt(comp1));
  roi_cmp_gt  #(.W(CNT_W))  u_cmpr (.a(inc_row), .b(b), .gt(comp2));

  roi_addr_gen u_gen (
    .clk          (clk),
    .reset        (reset),
    .start        (start),
    .roi_upper    (roi_u),
    .roi_left     (roi_l),
    .left         (l),
    .comp1        (comp1),
    .comp2        (comp2),
    .mem_select   (mem_a_sel),
    .ccounter     (ccounter),
    .rcounter     (rcounter),
    .line_address (line_address),
    .address      (address),
    .v_offset1    (v_off1),
    .v_offset2    (v_off2),
    .h_offset     (h_off),
    .total_offset (tot_off),
    .second_line  (second_line),
    .incr_address (inc_addr),
    .incr_column  (inc_column),
    .add640address(next_row_addr),
    .incr_row     (inc_row),
    .data_in      (data_in),
    .data_out     (data_out),
    .eol          (eol),
    .done         (done),
    .data_valid   (data_valid),
    .data_eol     (data_eol)
  );

  // Protocol rules: done only rises on the last address of a line, and a
  // busy server never stands above the upper row or left of the left bound.
  a_done_after_eol : assert property (@(posedge clk) disable iff (reset)
    $rose(done) && !$past(reset) |-> $past(eol));
  a_counters_in_roi : assert property (@(posedge clk) disable iff (reset)
    !done |-> (rcounter >= u) && (ccounter >= l));

endmodule
