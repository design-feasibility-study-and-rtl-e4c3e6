// roi_select_mem: steers the ROI server to one of the two frame banks.
//
// With mem_select = 1 the address goes to MEMA and MEMA's data comes back;
// with mem_select = 0 the same for MEMB. Combinational. The steering follows
// the original design. The bus of the bank not in use is driven to zero
// here (the original left it holding its last value), so the unused bank
// always sees a defined address.
module roi_select_mem
  import msp_pkg::*;
(
  input  logic              mem_select,
  input  logic [PIX_W-1:0]  data_in_a,
  input  logic [PIX_W-1:0]  data_in_b,
  input  logic [ADDR_W-1:0] address_in,
  output logic [PIX_W-1:0]  data_out,
  output logic [ADDR_W-1:0] address_out_a,
  output logic [ADDR_W-1:0] address_out_b
);

  always_comb begin
    if (mem_select) begin
      address_out_a = address_in;
      address_out_b = '0;
      data_out      = data_in_a;
    end else begin
      address_out_a = '0;
      address_out_b = address_in;
      data_out      = data_in_b;
    end
  end

endmodule
