// roi_cmp_gt: W-bit unsigned magnitude comparator, gt = (a > b).
//
// The bits are compared from the MSB down. Each stage passes on two flags:
// "already greater" and "still equal so far". A stage sets "greater" only if
// all higher bits were equal and here a is 1 where b is 0. After the LSB,
// "greater" is the result. The ROI server uses it to see whether the column
// counter has reached the right bound (right > column) and whether the
// next row would pass the bottom bound (row+1 > bottom). The MSB-first
// ripple follows the original design. Combinational.
module roi_cmp_gt #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt
);

  always_comb begin
    logic greater, equal;
    greater = 1'b0;
    equal   = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      greater = greater | (equal & a[i] & ~b[i]);
      equal   = equal & ~(a[i] ^ b[i]);
    end
    gt = greater;
  end

endmodule
