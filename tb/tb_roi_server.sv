// tb_roi_server: self-checking test of the complete ROI server.
//
// Two frame banks are modelled as functions of the address (asynchronous
// read), different for MEMA and MEMB. Each ROI is checked clock by clock
// against a reference raster loop: the address on the bus of the bank in
// use (the other bus at 0), eol on the last pixel of each line, the pixel
// on data_out one clock later with data_valid and data_eol, done low for
// exactly width*height clocks, and the bank alternating per ROI. The ROIs
// include the 3x3 example (upper 2, left 4, bottom 4, right 6) and the two
// infrared-image regions (208,268,265,357) and (212,40,268,125), whose
// first, line-start and last addresses are compared with published values
// (0x2090C, 0x20B8C, 0x297E5; 0x21228, 0x214A8, 0x29E7D). Further tests:
// bounds changed while busy must not matter, start held high gives
// back-to-back ROIs with one idle clock between, the published waveform
// (bounds stepping every clock, start high for two clocks, addresses
// 000785 ... 000C87) is reproduced, and a reset in the middle of an ROI
// returns to idle on MEMA.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_server;
  logic        clk = 1'b0, reset, start, eol, done, mem_a_sel, dvalid, deol;
  logic [8:0]  roi_u, roi_b;
  logic [9:0]  roi_l, roi_r;
  logic [11:0] data_a, data_b, data_out;
  logic [20:0] address_a, address_b;
  int checks = 0, failures = 0;
  int unsigned first_addr, second_line_addr, last_addr, n_addr, n_eol;

  roi_server dut (.clk(clk), .reset(reset), .start(start), .roi_u(roi_u), .roi_l(roi_l),
                  .roi_b(roi_b), .roi_r(roi_r), .data_a(data_a), .data_b(data_b),
                  .address_a(address_a), .address_b(address_b), .data_out(data_out),
                  .eol(eol), .done(done), .mem_a_sel(mem_a_sel), .data_valid(dvalid),
                  .data_eol(deol));

  always #5 clk = ~clk;

  function automatic logic [11:0] pix(input bit bank_a, input int unsigned addr);
    return bank_a ? 12'(addr * 7 + 3) : 12'(addr * 13 + 1000);
  endfunction

  assign data_a = pix(1'b1, address_a);
  assign data_b = pix(1'b0, address_b);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Runs one ROI from the idle state; the clock after start is sampled is
  // the first busy clock. If keep_start is set, start stays high.
  task automatic run(input int u, input int l, input int b, input int r, input bit keep_start = 0);
    bit bank = mem_a_sel;
    int unsigned a, prev;
    roi_u = 9'(u); roi_l = 10'(l); roi_b = 9'(b); roi_r = 10'(r); start = 1'b1;
    @(posedge clk); #1;
    start = keep_start;
    roi_u = 9'($urandom); roi_l = 10'($urandom); roi_b = 9'($urandom); roi_r = 10'($urandom);
    n_addr = 0; n_eol = 0;
    for (int row = u; row <= b; row++) begin
      for (int col = l; col <= r; col++) begin
        a = bank ? address_a : address_b;
        if (n_addr == 0) first_addr = a;
        if (row == u + 1 && col == l) second_line_addr = a;
        last_addr = a;
        n_addr++;
        if (eol) n_eol++;
        chk(!done, "done low while busy");
        chk(a == row * 640 + col, $sformatf("address %h for row %0d col %0d", a, row, col));
        chk((bank ? address_b : address_a) == 0, "idle bus at 0");
        chk(eol == (col == r), "eol");
        prev = a;
        @(posedge clk); #1;
        chk(dvalid && deol == (col == r) && data_out == pix(bank, prev), "data_out");
      end
    end
    chk(done, "done after width*height clocks");
    chk(mem_a_sel == !bank, "bank alternates");
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; start = 1'b0; roi_u = '0; roi_l = '0; roi_b = '0; roi_r = '0;
    repeat (2) @(posedge clk); #1;
    reset = 1'b0;
    chk(done && mem_a_sel, "after reset: done, MEMA");
    repeat (2) @(posedge clk); #1;

    run(2, 4, 4, 6);
    chk(n_addr == 9 && n_eol == 3 && first_addr == 'h504, "3x3 example");

    run(208, 268, 265, 357);      // goes to MEMB (second ROI since reset)
    chk(n_addr == 90 * 58 && n_eol == 58, "region a size");
    chk(mem_a_sel, "third ROI on MEMA again");
    run(208, 268, 265, 357);
    chk(first_addr == 'h2090C && second_line_addr == 'h20B8C && last_addr == 'h297E5, "region a addresses");
    chk(!mem_a_sel, "region b on MEMB");
    run(212, 40, 268, 125);
    chk(first_addr == 'h21228 && second_line_addr == 'h214A8 && last_addr == 'h29E7D && n_addr == 86 * 57,
        "region b addresses");

    // start held high: two ROIs back to back, one idle clock between
    run(5, 5, 6, 8, 1'b1);
    chk(done, "idle clock between back-to-back ROIs");
    run(7, 600, 7, 639, 1'b0);
    run(0, 0, 0, 0);              // first pixel of the frame
    chk(first_addr == 0 && n_addr == 1 && n_eol == 1, "single pixel");
    run(479, 639, 479, 639);      // last pixel of the frame
    chk(first_addr == 479 * 640 + 639, "last pixel");

    // Published waveform: the bounds step up by one every clock and start is
    // high for two clocks; the server must take the bounds present on the
    // clock that accepts start (3, 5, 5, 7) and produce the printed
    // addresses 000785, 000786, 000787, 000A05 ... 000C87.
    begin
      int unsigned wave [9] = '{'h785, 'h786, 'h787, 'hA05, 'hA06, 'hA07, 'hC85, 'hC86, 'hC87};
      int unsigned busy = 0;
      while (!mem_a_sel) run(1, 1, 1, 1);   // get back to MEMA
      for (int k = 0; k < 16; k++) begin
        roi_u = 9'(2 + k); roi_l = 10'(4 + k); roi_b = 9'(4 + k); roi_r = 10'(6 + k);
        start = (k == 1 || k == 2);
        #1;
        if (!done) begin
          chk(busy < 9 && address_a == 21'(wave[busy]), $sformatf("waveform address %0d: %h", busy, address_a));
          chk(eol == (busy % 3 == 2), "waveform eol every third clock");
          busy++;
        end
        @(posedge clk); #1;
      end
      start = 1'b0;
      chk(busy == 9 && done && !mem_a_sel && address_b == 0, "waveform: nine addresses, then done on MEMB");
    end

    // reset in the middle of an ROI
    roi_u = 9'd100; roi_l = 10'd100; roi_b = 9'd120; roi_r = 10'd200; start = 1'b1;
    @(posedge clk); #1; start = 1'b0;
    repeat (37) @(posedge clk); #1;
    chk(!done, "busy before reset");
    reset = 1'b1; @(posedge clk); #1; reset = 1'b0;
    chk(done && mem_a_sel && address_a == 0, "reset mid-ROI");
    for (int k = 0; k < 6; k++) begin
      int u = $urandom % 470, l = $urandom % 600;
      run(u, l, u + $urandom % 10, l + $urandom % 40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
