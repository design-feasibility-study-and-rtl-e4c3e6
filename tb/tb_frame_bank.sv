// tb_frame_bank: self-checking test of a frame bank with four read ports,
// at a reduced depth of 4096 words. Writes a pattern through the write
// port (including a write with we low, which must not land, and an
// address above the depth, which wraps), then reads random addresses on all
// ports at once and compares with a reference copy; reads are asynchronous,
// so each port must show the word for the address it is given in the same
// clock. Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_frame_bank;
  localparam int unsigned DEPTH = 4096, N_RD = 4;
  logic clk = 1'b0, we;
  logic [20:0] waddr;
  logic [11:0] wdata;
  logic [N_RD-1:0][20:0] raddr;
  logic [N_RD-1:0][11:0] rdata;
  logic [11:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  frame_bank #(.DEPTH(DEPTH), .N_RD(N_RD)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                              .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = 21'(i); wdata = 12'(i * 37 + 5); ref_mem[i] = wdata;
      @(posedge clk); #1;
    end
    we = 1'b0; waddr = 21'd7; wdata = 12'hFFF;          // must not be written
    @(posedge clk); #1;
    we = 1'b1; waddr = 21'(DEPTH + 9); wdata = 12'h123;  // wraps to word 9
    ref_mem[9] = 12'h123;
    @(posedge clk); #1;
    we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      for (int p = 0; p < N_RD; p++) raddr[p] = 21'($urandom % DEPTH);
      if (i == 0) raddr[0] = 21'd7;
      if (i == 1) raddr[1] = 21'd9;
      #1;
      for (int p = 0; p < N_RD; p++) begin
        checks++;
        if (rdata[p] !== ref_mem[raddr[p][11:0]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h expected %h", p, raddr[p], rdata[p], ref_mem[raddr[p][11:0]]);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
