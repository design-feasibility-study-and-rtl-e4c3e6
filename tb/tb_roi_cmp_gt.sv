// tb_roi_cmp_gt: exhaustive self-checking test of the 10-bit magnitude
// comparator: every pair (a, b) of 10-bit values, result against a > b.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_cmp_gt;
  logic [9:0] a, b;
  logic       gt;
  int checks = 0, failures = 0;

  roi_cmp_gt #(.W(10)) dut (.a(a), .b(b), .gt(gt));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      for (int j = 0; j < 1024; j++) begin
        a = 10'(i); b = 10'(j); #1;
        checks++;
        if (gt !== (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d > %0d gave %b", i, j, gt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
