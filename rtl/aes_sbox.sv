// AES S-Box: the byte substitution of the encryption path.
//
// out = Affine(Inv(in)), where Inv is the multiplicative inverse in GF(2^8)
// modulo x^8 + x^4 + x^3 + x + 1 (with Inv(0) = 0) and Affine is the AES affine
// map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63. The 256-entry
// table is computed by constant functions at elaboration, so no data file is
// needed; synthesis turns the lookup into a ROM or logic.
//
// Interface: in_byte (8 bits) -> out_byte (8 bits). Combinational.
// The source design only names an S-Box stage; the standard AES S-Box is this
// design's reading of it.
module aes_sbox (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  typedef logic [7:0] sbox_table_t [256];

  // Multiplication by x (i.e. by 2) in GF(2^8), AES polynomial.
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // The inverse comes from power tables of the generator 3: if v = 3^k then
  // Inv(v) = 3^(255-k). Walking the powers of 3 once fills both tables.
  function automatic sbox_table_t build_table();
    sbox_table_t t;
    logic [7:0]  pow3 [256];
    int          log3 [256];
    logic [7:0]  e;
    logic [7:0]  inv;
    e = 8'h01;
    log3[0] = 0;
    for (int k = 0; k < 256; k++) pow3[k] = 8'h00;
    for (int k = 0; k < 255; k++) begin
      pow3[k] = e;
      log3[e] = k;
      e = e ^ xtime(e);
    end
    for (int v = 0; v < 256; v++) begin
      inv  = (v == 0) ? 8'h00 : pow3[(255 - log3[v]) % 255];
      t[v] = affine(inv);
    end
    return t;
  endfunction

  localparam sbox_table_t SBOX = build_table();

  assign out_byte = SBOX[in_byte];

endmodule : aes_sbox
