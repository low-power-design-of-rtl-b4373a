// Reference functions for the encryption-path testbenches: GF(2^8)
// multiplication by shift-and-reduce, the AES S-Box built from an inverse found
// by search plus the affine map written bit by bit, and ShiftRows by index.
package aes_ref_pkg;

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] prod;
    prod = '0;
    for (int i = 0; i < 8; i++) if (b[i]) prod = prod ^ (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (prod[i]) prod = prod ^ (16'h11b << (i - 8));
    return prod[7:0];
  endfunction

  function automatic logic [7:0] sbox_ref(input logic [7:0] x);
    logic [7:0] inv, r, c;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (gf_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    c = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8] ^ c[i];
    return r;
  endfunction

  // ShiftRows on a 64-bit state of 4 rows x 2 columns, byte 0 in the top bits.
  function automatic logic [63:0] shift_rows2_ref(input logic [63:0] s);
    logic [63:0] o;
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < 4; r++)
        o[63 - 8 * (4 * c + r) -: 8] = s[63 - 8 * (4 * ((c + r) % 2) + r) -: 8];
    return o;
  endfunction

endpackage : aes_ref_pkg
