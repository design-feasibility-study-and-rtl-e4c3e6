// tb_msp0_roi_top: end-to-end test of the MSP-0 ROI subsystem at its full
// size (480 x 640 frames, 512K-word banks, four ROI servers, no parameter
// overrides).
//
// A camera model streams four frames of generated 12-bit pixels, with
// random idle clocks between pixels; pixel (frame f, address a) has the
// value pix(f, a) defined below. After each of the first three frames is
// complete, all four servers are started with their own ROIs and must read
// that frame out of the bank the writer has just left, while the writer
// fills the other bank with the next frame. Each server's output stream is
// compared pixel by pixel with a reference raster loop over its ROI:
// value, data_eol on the last pixel of each line, no gap between pixels
// (one pixel per clock, so width*height clocks), and done afterwards. The
// ROIs include the two published infrared-image regions, a full-width line,
// a single pixel and random rectangles.
//
// Mechanisms counted, each must occur: writer bank switches, server reads
// from MEMA and from MEMB, reads overlapping writes to the other bank,
// end-of-line flags, and idle clocks in the pixel stream.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_msp0_roi_top;
  import msp_pkg::*;
  localparam int N = 4;

  logic clk = 1'b0, reset, pix_valid, wr_bank_b, frame_done;
  logic [PIX_W-1:0] pix_data;
  logic [N-1:0] start, done, eol, mem_a_sel, data_valid, data_eol;
  roi_t [N-1:0] roi;
  logic [N-1:0][PIX_W-1:0] data_out;

  int checks = 0, failures = 0;
  int frames_written = 0;
  bit released = 1'b0;   // set once reset has been applied and released
  int n_bank_switch = 0, n_read_a = 0, n_read_b = 0, n_overlap = 0, n_eol = 0, n_gap = 0;

  msp0_roi_top dut (.clk(clk), .reset(reset), .pix_valid(pix_valid), .pix_data(pix_data),
                    .wr_bank_b(wr_bank_b), .frame_done(frame_done), .start(start), .roi(roi),
                    .done(done), .eol(eol), .mem_a_sel(mem_a_sel), .data_out(data_out),
                    .data_valid(data_valid), .data_eol(data_eol));

  always #5 clk = ~clk;

  function automatic logic [PIX_W-1:0] pix(input int unsigned f, input int unsigned a);
    return PIX_W'(a * 5 + f * 1237 + (a >> 7));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // Camera: FRAMES frames in raster order with random idle clocks.
  localparam int FRAMES = 4;
  initial begin
    pix_valid = 1'b0; pix_data = '0;
    wait (released);
    @(posedge clk); #1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int a = 0; a < int'(FRAME_PIXELS); a++) begin
        while (($urandom % 8) == 0) begin
          pix_valid = 1'b0; n_gap++;
          @(posedge clk); #1;
        end
        pix_valid = 1'b1; pix_data = pix(f, a);
        @(posedge clk); #1;
      end
      frames_written++;
    end
    pix_valid = 1'b0;
  end

  always @(posedge clk) begin
    if (!reset && frame_done) n_bank_switch++;
    for (int s = 0; s < N; s++) begin
      if (!reset && eol[s]) n_eol++;
      if (!reset && data_valid[s] && pix_valid) n_overlap++;
    end
  end

  // Reference check of one server's stream for one ROI of frame f.
  task automatic check_stream(input int s, input int f, input roi_t r);
    int unsigned cyc = 0;
    while (!data_valid[s]) begin
      @(posedge clk); #1;
      if (++cyc > 10) begin chk(0, $sformatf("server %0d never started", s)); return; end
    end
    for (int row = r.upper; row <= r.bottom; row++) begin
      for (int col = r.left; col <= r.right; col++) begin
        chk(data_valid[s], $sformatf("server %0d gap at row %0d col %0d", s, row, col));
        chk(data_out[s] == pix(f, row * FRAME_COLS + col),
            $sformatf("server %0d pixel row %0d col %0d: %h", s, row, col, data_out[s]));
        chk(data_eol[s] == (col == r.right), $sformatf("server %0d data_eol", s));
        @(posedge clk); #1;
      end
    end
    chk(!data_valid[s] && done[s], $sformatf("server %0d finished", s));
  endtask

  function automatic roi_t mk(input int u, input int l, input int b, input int r);
    roi_t x;
    x.upper = ROW_IN_W'(u); x.left = COL_IN_W'(l); x.bottom = ROW_IN_W'(b); x.right = COL_IN_W'(r);
    return x;
  endfunction

  function automatic roi_t rnd();
    int u = $urandom % 470, l = $urandom % 600;
    return mk(u, l, u + $urandom % 10, l + $urandom % 40);
  endfunction

  initial begin
    repeat (4 * FRAMES * FRAME_PIXELS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    roi_t rois [N];
    reset = 1'b1; start = '0; roi = '0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;
    released = 1'b1;
    chk(&done && &mem_a_sel && !wr_bank_b, "reset state");
    for (int f = 0; f < FRAMES - 1; f++) begin
      // wait until frame f is complete in its bank
      while (frames_written <= f) begin @(posedge clk); #1; end
      chk(wr_bank_b == ((f + 1) % 2 == 1), "writer moved to the other bank");
      case (f)
        0: begin rois[0] = mk(208, 268, 265, 357); rois[1] = mk(0, 0, 0, 639);
                 rois[2] = mk(479, 639, 479, 639); rois[3] = rnd(); end
        1: begin rois[0] = mk(212, 40, 268, 125); rois[1] = mk(0, 0, 0, 0);
                 rois[2] = mk(470, 600, 479, 639); rois[3] = rnd(); end
        default: for (int s = 0; s < N; s++) rois[s] = rnd();
      endcase
      for (int s = 0; s < N; s++) begin
        chk(mem_a_sel[s] == (f % 2 == 0), "server reads the bank of the finished frame");
        if (mem_a_sel[s]) n_read_a++; else n_read_b++;
        roi[s] = rois[s];
      end
      start = '1;
      @(posedge clk); #1;
      start = '0;
      roi = '0;   // bounds are held inside the servers
      fork
        check_stream(0, f, rois[0]);
        check_stream(1, f, rois[1]);
        check_stream(2, f, rois[2]);
        check_stream(3, f, rois[3]);
      join
    end
    while (frames_written < FRAMES) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    $display("mechanisms: bank_switch=%0d read_a=%0d read_b=%0d overlap=%0d eol=%0d gaps=%0d",
             n_bank_switch, n_read_a, n_read_b, n_overlap, n_eol, n_gap);
    chk(n_bank_switch == FRAMES, "writer bank switches");
    chk(n_read_a > 0, "reads from MEMA");
    chk(n_read_b > 0, "reads from MEMB");
    chk(n_overlap > 0, "reads overlapping writes");
    chk(n_eol > 0, "end-of-line flags");
    chk(n_gap > 0, "idle clocks in the pixel stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
