// tb_roi_addr_gen: self-checking test of the ROI server's control block on
// its own. The testbench plays the arithmetic units around it (start
// address upper*640 + left, +1, +640, the two comparisons) with ordinary
// integer arithmetic, runs several ROIs, and checks every clock: the
// address sequence line by line, eol on the last pixel of each line, done
// low for exactly width*height clocks, the bank select toggling after each
// ROI, the shift terms upper*512 / upper*128 / left, and the one-clock
// data register with its valid/eol flags. A reset in the middle of an ROI
// must return the block to idle with MEMA selected.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_addr_gen;
  logic        clk = 1'b0, reset, start, comp1, comp2, mem_select, eol, done, dvalid, deol;
  logic [8:0]  roi_upper;
  logic [9:0]  roi_left, left_q, ccounter, rcounter, incr_column, incr_row;
  logic [20:0] line_address, address, v1, v2, h, total_offset, second_line, incr_address, add640address;
  logic [11:0] data_in, data_out;
  int unsigned sb, sr;   // saved bottom / right, as roi_save would hold them
  int checks = 0, failures = 0;

  roi_addr_gen dut (
    .clk(clk), .reset(reset), .start(start), .roi_upper(roi_upper), .roi_left(roi_left),
    .left(left_q), .comp1(comp1), .comp2(comp2), .mem_select(mem_select), .ccounter(ccounter),
    .rcounter(rcounter), .line_address(line_address), .address(address), .v_offset1(v1),
    .v_offset2(v2), .h_offset(h), .total_offset(total_offset), .second_line(second_line),
    .incr_address(incr_address), .incr_column(incr_column), .add640address(add640address),
    .incr_row(incr_row), .data_in(data_in), .data_out(data_out), .eol(eol), .done(done),
    .data_valid(dvalid), .data_eol(deol));

  always #5 clk = ~clk;

  // Arithmetic around the block, modelled independently.
  always_comb begin
    total_offset  = 21'(roi_upper * 640 + roi_left);
    second_line   = 21'(total_offset + 640);
    incr_address  = address + 21'd1;
    incr_column   = ccounter + 10'd1;
    add640address = line_address + 21'd640;
    incr_row      = rcounter + 10'd1;
    comp1         = sr > ccounter;
    comp2         = (int'(rcounter) + 1) > sb;
    data_in       = address[11:0] ^ 12'hA5A;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input int u, input int l, input int b, input int r);
    bit bank = mem_select;
    int unsigned prev_addr;
    roi_upper = 9'(u); roi_left = 10'(l); start = 1'b1;
    sb = b; sr = r; left_q = 10'(l);   // roi_save loads while idle
    #1;
    chk(v1 == 21'(u * 512) && v2 == 21'(u * 128) && h == 21'(l), "shift terms");
    @(posedge clk); #1;
    start = 1'b0;
    roi_upper = 9'($urandom); roi_left = 10'($urandom);   // must not matter now
    for (int row = u; row <= b; row++) begin
      for (int col = l; col <= r; col++) begin
        chk(!done, "done low while busy");
        chk(address == 21'(row * 640 + col), $sformatf("address row %0d col %0d got %h", row, col, address));
        chk(eol == (col == r), "eol");
        chk(mem_select == bank, "bank held");
        prev_addr = address;
        @(posedge clk); #1;
        chk(dvalid && data_out == (12'(prev_addr) ^ 12'hA5A) && deol == (col == r), "data register");
      end
    end
    chk(done, "done after width*height clocks");
    chk(mem_select == !bank, "bank toggled");
    chk(address == '0, "address cleared");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; roi_upper = '0; roi_left = '0; left_q = '0; sb = 0; sr = 0;
    repeat (2) @(posedge clk); #1;
    reset = 1'b0;
    chk(done && mem_select, "reset state");
    repeat (3) @(posedge clk); #1;
    chk(done && address == '0 && !dvalid, "idle holds");
    run(2, 4, 4, 6);                // 3x3 example region
    chk(!mem_select, "second ROI goes to MEMB");
    run(208, 268, 212, 357);
    run(0, 0, 0, 0);                // single pixel
    run(479, 630, 479, 639);        // bottom-right corner
    for (int k = 0; k < 4; k++) begin
      int u = $urandom % 470, l = $urandom % 600;
      run(u, l, u + $urandom % 8, l + $urandom % 30);
    end
    // reset in the middle of an ROI
    roi_upper = 9'd10; roi_left = 10'd10; start = 1'b1; sb = 20; sr = 20; left_q = 10'd10;
    @(posedge clk); #1; start = 1'b0;
    repeat (5) @(posedge clk); #1;
    chk(!done, "busy before reset");
    reset = 1'b1; @(posedge clk); #1; reset = 1'b0;
    chk(done && mem_select && address == '0, "reset mid-ROI");
    run(1, 1, 2, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
