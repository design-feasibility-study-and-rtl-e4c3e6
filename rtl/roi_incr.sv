// roi_incr: W-bit incrementer, data_out = data_in + 1 modulo 2**W.
//
// A ripple of half adders with the carry into bit 0 set. The ROI server
// uses a 21-bit one for the pixel address and 10-bit ones for the row and
// column counters. The original design names these incrementers but does
// not show their insides; the half-adder ripple is this design's choice,
// matching the ripple-carry style of its adders. Combinational.
module roi_incr #(
  parameter int unsigned W = 21
) (
  input  logic [W-1:0] data_in,
  output logic [W-1:0] data_out
);

  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int i = 0; i < W; i++) begin
      data_out[i] = data_in[i] ^ carry;
      carry       = data_in[i] & carry;
    end
  end

endmodule
