// Sign set block of the signed RoBA multiplier.
//
// Gives the unsigned product its sign. When neg is 1 the product is negated:
// exactly as ~x + 1 (EXACT = 1, the S-RoBA variant) or approximately as ~x
// (EXACT = 0, the AS-RoBA variant), which drops the +1. Since ~x = -x - 1, a
// negative AS-RoBA result lies exactly one LSB below the S-RoBA result.
//
// Interface: x (W bits, unsigned magnitude), neg -> y (W bits, two's complement).
// Combinational. Both negation variants come from the source design.
module roba_sign_set #(
  parameter int W     = 64,
  parameter bit EXACT = 1'b1
) (
  input  logic [W-1:0] x,
  input  logic         neg,
  output logic [W-1:0] y
);

  always_comb begin
    if (!neg)       y = x;
    else if (EXACT) y = ~x + W'(1);
    else            y = ~x;
  end

endmodule : roba_sign_set
