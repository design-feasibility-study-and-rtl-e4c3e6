// tb_roi_save: self-checking test of the ROI bound register. Random bounds
// and random new_roi each clock; a reference model loads on new_roi, holds
// otherwise, and clears on reset; bounds are zero-extended to 10 bits.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_save;
  logic       clk = 1'b0, reset, new_roi;
  logic [8:0] ru, rb;
  logic [9:0] rl, rr, u, l, b, r;
  logic [9:0] eu, el, eb, er;
  int checks = 0, failures = 0;

  roi_save dut (.clk(clk), .reset(reset), .new_roi(new_roi), .roi_upper(ru), .roi_left(rl),
                .roi_bottom(rb), .roi_right(rr), .upper(u), .left(l), .bottom(b), .right(r));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; new_roi = 1'b0; ru = '0; rb = '0; rl = '0; rr = '0;
    @(posedge clk); #1;
    reset = 1'b0;
    eu = '0; el = '0; eb = '0; er = '0;
    for (int i = 0; i < 2000; i++) begin
      ru = 9'($urandom); rb = 9'($urandom); rl = 10'($urandom); rr = 10'($urandom);
      new_roi = 1'($urandom);
      reset = ($urandom % 50) == 0;
      @(posedge clk); #1;
      if (reset) begin eu = '0; el = '0; eb = '0; er = '0; end
      else if (new_roi) begin eu = {1'b0, ru}; el = rl; eb = {1'b0, rb}; er = rr; end
      checks++;
      if (u !== eu || l !== el || b !== eb || r !== er) begin
        failures++;
        $display("FAIL %0d: got %0d %0d %0d %0d expected %0d %0d %0d %0d", i, u, l, b, r, eu, el, eb, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
