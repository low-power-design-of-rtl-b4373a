// Convolution stage of the encryption path: mixes a data word with a key word.
//
// The stage holds an adder and a RoBA multiplier. The adder works in GF(2^N)
// arithmetic, where addition is a bitwise XOR: it whitens the data with the key
// (s = data ^ key), as in the key addition that opens an AES encryption. The
// RoBA multiplier then multiplies the whitened word by the key, producing a
// 2N-bit word that the S-Box stage consumes byte by byte.
//
// Interface: data, key (N bits) -> mixed (2N bits). Combinational.
// From the source design: an adder and a RoBA multiplier inside one stage fed by
// the data and the key, XOR as the field addition. This design's own choice: the
// order (adder first, then multiplier) and the use of the key as the second
// multiplier operand, since the source gives neither.
module conv_unit
  import roba_pkg::*;
#(
  parameter int         N    = 32,
  parameter roba_mode_e MODE = ROBA_SIGNED
) (
  input  logic [N-1:0]   data,
  input  logic [N-1:0]   key,
  output logic [2*N-1:0] mixed
);

  logic [N-1:0] whitened;

  assign whitened = data ^ key;

  roba_multiplier #(.N(N), .MODE(MODE)) u_mul (
    .a(whitened),
    .b(key),
    .p(mixed)
  );

endmodule : conv_unit
