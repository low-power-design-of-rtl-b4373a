// Shifter of the RoBA multiplier.
//
// Multiplies x by a power of two that arrives as a one-hot word: with sel[i] set
// the output is x shifted left by i. The multiplier uses three of these, for
// Br*A, Ar*B and Ar*Br. An all-zero sel gives zero. The result is truncated to
// OW bits; callers size OW so that nothing is lost.
//
// Interface: x (XW bits), sel (SW bits, one-hot or zero) -> y (OW bits).
// Purely combinational. The block and its role follow the source design; taking
// the shift amount in one-hot form (so no encoder is needed between the rounding
// block and the shifter) is this design's own choice.
module roba_shifter #(
  parameter int XW = 33,
  parameter int SW = 33,
  parameter int OW = 65
) (
  input  logic [XW-1:0] x,
  input  logic [SW-1:0] sel,
  output logic [OW-1:0] y
);

  logic [OW-1:0] xw;
  assign xw = OW'(x);

  always_comb begin
    y = '0;
    for (int i = 0; i < SW; i++) begin
      if (sel[i]) y = y | (xw << i);
    end
  end

endmodule : roba_shifter
