// Subtractor of the RoBA multiplier.
//
// Removes the term Ar*Br from the adder output, completing
// A*B ~= Ar*B + Br*A - Ar*Br. The difference is never negative for operands
// produced by the rounding block, so a plain W-bit subtraction suffices.
//
// Interface: x, y (W bits, unsigned) -> d = x - y (W bits). Combinational.
// The block follows the source design; its width (same as the adder) is this
// design's own choice.
module roba_subtractor #(
  parameter int W = 65
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] d
);

  assign d = x - y;

endmodule : roba_subtractor
