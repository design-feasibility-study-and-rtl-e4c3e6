// tb_roi_select_mem: self-checking test of the MEMA/MEMB steering. For
// random addresses and bank data, checks that the selected bank gets the
// address, the other bus is zero and the selected bank's data comes back.
// Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_roi_select_mem;
  logic        sel;
  logic [11:0] da, db, dout;
  logic [20:0] addr, aa, ab;
  int checks = 0, failures = 0;

  roi_select_mem dut (.mem_select(sel), .data_in_a(da), .data_in_b(db), .address_in(addr),
                      .data_out(dout), .address_out_a(aa), .address_out_b(ab));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = 1'($urandom); da = 12'($urandom); db = 12'($urandom); addr = 21'($urandom);
      #1;
      checks++;
      if (sel ? (aa !== addr || ab !== '0 || dout !== da)
              : (ab !== addr || aa !== '0 || dout !== db)) begin
        failures++;
        $display("FAIL sel=%b addr=%h aa=%h ab=%h dout=%h", sel, addr, aa, ab, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
