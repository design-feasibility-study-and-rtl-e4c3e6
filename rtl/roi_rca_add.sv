// roi_rca_add: W-bit ripple-carry adder, sum = a + b modulo 2**W.
//
// A chain of full adders: bit i sums a[i], b[i] and the carry out of bit
// i-1, starting with a carry of 0. Purely combinational. The ROI server uses
// two of these for the start address (upper*512 + upper*128, then + left)
// and one inside roi_add640. Ripple carry is the structure of the original
// design; the carry out is dropped there and here.
module roi_rca_add #(
  parameter int unsigned W = 21
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  always_comb begin
    logic carry;
    carry = 1'b0;
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ carry;
      carry  = (a[i] & b[i]) | (a[i] & carry) | (b[i] & carry);
    end
  end

endmodule
