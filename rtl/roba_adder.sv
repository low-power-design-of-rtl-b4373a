// Adder of the RoBA multiplier.
//
// Adds the two shifted terms Br*A and Ar*B. With N-bit operands each term is
// below 2^(2N), so their sum fits in 2N+1 bits (W = 65 for N = 32) and the
// adder cannot overflow.
//
// Interface: x, y (W bits, unsigned) -> s = x + y (W bits). Combinational.
// The block and the 65-bit width at N = 32 follow the source design; the plain
// carry-propagate description is this design's own.
module roba_adder #(
  parameter int W = 65
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  assign s = x + y;

endmodule : roba_adder
