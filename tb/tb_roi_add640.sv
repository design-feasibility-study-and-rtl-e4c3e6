// tb_roi_add640: self-checking test of the add-640 unit (next ROI line).
// Compares data_out with data_in + 640 modulo 2**21 for corner and random
// addresses. Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_add640;
  localparam int unsigned W = 21;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  roi_add640 #(.W(W)) dut (.data_in(din), .data_out(dout));

  task automatic check(input logic [W-1:0] x);
    din = x; #1;
    checks++;
    if (dout !== W'(x + 21'd640)) begin
      failures++;
      $display("FAIL %h + 640 = %h", x, dout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check('1);
    check(21'h2090C);
    check(21'h1FFD80);
    for (int i = 0; i < 5000; i++) check(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
