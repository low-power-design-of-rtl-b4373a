// Encryption path built around a RoBA multiplier.
//
// One N-bit data word and one N-bit key word enter together. The convolution
// stage XORs them and multiplies the result by the key with a RoBA
// (rounding-based approximate) multiplier, giving a 2N-bit word. Every byte of
// that word passes through an AES S-Box, and the bytes, read as a 4-row state of
// 2N/32 columns, are rotated row by row (ShiftRows). The result is registered.
//
//   data, key -> conv_unit (XOR adder + roba_multiplier) -> 2N/8 x aes_sbox
//             -> shift_rows -> output register -> cipher
//
// Interface and timing: in_valid/data/key are sampled on a rising clk edge;
// cipher and out_valid show the result from the next edge on (latency 1 cycle,
// one word per cycle). rst_n is asynchronous, active low, and clears out_valid
// and cipher. N must be a multiple of 16 so the product fills whole columns.
//
// From the source design: the stage order of the encryption path, the RoBA
// multiplier and the 32-bit operand width. This design's own choices: the output
// register with its valid flag, the reset, the byte ordering and the signed
// (S-RoBA) default variant.
module crypto_roba_top
  import roba_pkg::*;
#(
  parameter int         N    = 32,
  parameter roba_mode_e MODE = ROBA_SIGNED
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   data,
  input  logic [N-1:0]   key,
  output logic           out_valid,
  output logic [2*N-1:0] cipher
);

  localparam int W      = 2 * N;
  localparam int NBYTES = W / 8;
  localparam int NB     = W / 32;

  if (N % 16 != 0) begin : g_bad_width
    $error("crypto_roba_top: N must be a multiple of 16");
  end

  logic [W-1:0] mixed, substituted, shifted;

  conv_unit #(.N(N), .MODE(MODE)) u_conv (
    .data (data),
    .key  (key),
    .mixed(mixed)
  );

  for (genvar i = 0; i < NBYTES; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in_byte (mixed[8*i +: 8]),
      .out_byte(substituted[8*i +: 8])
    );
  end

  shift_rows #(.NB(NB)) u_shift_rows (
    .state_in (substituted),
    .state_out(shifted)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cipher    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) cipher <= shifted;
    end
  end

endmodule : crypto_roba_top
