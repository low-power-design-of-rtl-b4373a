// ShiftRows stage of the encryption path.
//
// The state is a matrix of 4 rows and NB columns of bytes, filled column by
// column from the top bits of the word: byte k = state[32*NB-1-8k -: 8] sits in
// row k % 4, column k / 4 (the AES convention). Row r is rotated left by
// r mod NB columns: out(r, c) = in(r, (c + r) mod NB). For NB = 4 this is the
// AES ShiftRows; the default NB = 2 fits the 64-bit word of the RoBA product.
//
// Interface: state_in, state_out (32*NB bits). Combinational: the stage is a
// fixed byte permutation, so every output bit is wired to an input bit.
// The source design names the stage; the byte order and the rotation amounts
// for NB other than 4 are this design's own choice.
module shift_rows #(
  parameter int NB = 2
) (
  input  logic [32*NB-1:0] state_in,
  output logic [32*NB-1:0] state_out
);

  localparam int W = 32 * NB;

  always_comb begin
    state_out = '0;
    for (int c = 0; c < NB; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_out[W-1-8*(4*c+r) -: 8] = state_in[W-1-8*(4*((c + r) % NB)+r) -: 8];
      end
    end
  end

endmodule : shift_rows
