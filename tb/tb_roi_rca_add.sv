// tb_roi_rca_add: self-checking test of the 21-bit ripple-carry adder.
// Drives corner cases (zero, all ones, carry through every bit) and random
// operands and compares the sum with the simulator's own addition modulo
// 2**21. Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_rca_add;
  localparam int unsigned W = 21;
  logic [W-1:0] a, b, sum;
  int checks = 0, failures = 0;

  roi_rca_add #(.W(W)) dut (.a(a), .b(b), .sum(sum));

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] ref_sum;
    a = x; b = y; #1;
    ref_sum = {1'b0, x} + {1'b0, y};
    checks++;
    if (sum !== ref_sum[W-1:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, y, sum, ref_sum[W-1:0]);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, 21'd1);
    check('1, '1);
    check(21'h0AAAAA, 21'h155555);
    check(21'd133120, 21'd268);      // 208*640 + 268
    for (int i = 0; i < 5000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
