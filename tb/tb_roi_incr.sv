// tb_roi_incr: self-checking test of the incrementer at the two widths the
// ROI server uses, 21 bits (address) and 10 bits (row/column counters).
// Compares with x + 1 modulo 2**W, including the wrap from all ones.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_incr;
  logic [20:0] a21, y21;
  logic [9:0]  a10, y10;
  int checks = 0, failures = 0;

  roi_incr #(.W(21)) dut21 (.data_in(a21), .data_out(y21));
  roi_incr #(.W(10)) dut10 (.data_in(a10), .data_out(y10));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      a10 = 10'(i);
      a21 = (i < 8) ? 21'h1FFFF8 + 21'(i) : 21'($urandom);
      #1;
      checks += 2;
      if (y10 !== 10'(a10 + 10'd1)) begin failures++; $display("FAIL10 %h -> %h", a10, y10); end
      if (y21 !== 21'(a21 + 21'd1)) begin failures++; $display("FAIL21 %h -> %h", a21, y21); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
