// tb_frame_writer: self-checking test of the double-buffer write control,
// with a 24-pixel frame for speed. Pixels arrive with random gaps. Each
// clock it checks the write address (consecutive from 0 within a frame),
// that exactly the write enable of the expected bank follows pix_valid
// (even frames MEMA, odd frames MEMB), that wdata is the pixel, and that
// frame_done pulses once after each frame's last pixel.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_frame_writer;
  localparam int unsigned FP = 24;
  logic clk = 1'b0, reset, pix_valid, we_a, we_b, wr_bank_b, frame_done;
  logic [11:0] pix_data, wdata;
  logic [20:0] waddr;
  int checks = 0, failures = 0;
  int frame = 0, pix = 0, n_done = 0;
  bit expect_done = 0;

  frame_writer #(.FRAME_PIXELS(FP)) dut (.clk(clk), .reset(reset), .pix_valid(pix_valid),
    .pix_data(pix_data), .we_a(we_a), .we_b(we_b), .waddr(waddr), .wdata(wdata),
    .wr_bank_b(wr_bank_b), .frame_done(frame_done));
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; pix_valid = 1'b0; pix_data = '0;
    repeat (2) @(posedge clk); #1;
    reset = 1'b0;
    while (frame < 6) begin
      pix_valid = ($urandom % 4) != 0;
      pix_data = 12'($urandom);
      #1;
      chk(frame_done == expect_done, "frame_done pulse");
      if (frame_done) n_done++;
      chk(wr_bank_b == frame[0], "bank of frame");
      chk(waddr == 21'(pix), "write address");
      chk(we_a == (pix_valid && !frame[0]) && we_b == (pix_valid && frame[0]), "write enables");
      chk(wdata == pix_data, "write data");
      expect_done = 0;
      if (pix_valid) begin
        pix++;
        if (pix == FP) begin pix = 0; frame++; expect_done = 1; end
      end
      @(posedge clk); #1;
    end
    chk(frame_done && n_done == 5, "six frames completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
