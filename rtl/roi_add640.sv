// roi_add640: adds the row pitch, 640, to a W-bit address.
//
// Moving one row down in a 640-pixel-wide frame stored row by row means
// adding 640 (binary 10_1000_0000) to the address. The constant is fed to
// a ripple-carry adder (roi_rca_add), as in the original design.
// Combinational; the result wraps modulo 2**W.
module roi_add640 #(
  parameter int unsigned W = 21
) (
  input  logic [W-1:0] data_in,
  output logic [W-1:0] data_out
);

  localparam logic [W-1:0] Pitch = W'(msp_pkg::FRAME_COLS);

  roi_rca_add #(.W(W)) u_add (
    .a  (data_in),
    .b  (Pitch),
    .sum(data_out)
  );

endmodule
