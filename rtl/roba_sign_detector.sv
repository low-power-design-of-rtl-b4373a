// Sign detector of the signed RoBA multiplier.
//
// Splits a two's complement operand into its sign and its magnitude, so that the
// rest of the multiplier works on unsigned values. The magnitude is N bits wide
// and read as unsigned; the most negative value -2^(N-1) therefore comes out as
// 2^(N-1), which is exact. Purely combinational, no clock.
//
// Interface: x (N-bit two's complement) -> neg (1 when x < 0), mag (|x|).
// That the block produces the sign and the absolute value is taken from the
// source design; the negate-when-negative circuit is this design's own choice.
module roba_sign_detector #(
  parameter int N = 32
) (
  input  logic [N-1:0] x,
  output logic         neg,
  output logic [N-1:0] mag
);

  always_comb begin
    neg = x[N-1];
    mag = neg ? (~x + N'(1)) : x;
  end

endmodule : roba_sign_detector
