// RoBA (rounding-based approximate) multiplier.
//
// Idea: round each operand to its nearest power of two (Ar, Br) and use
//   A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br
// with the first term dropped. The remaining terms are products with a power of
// two, i.e. shifts, so the multiplier needs three shifters, one adder and one
// subtractor and no partial-product array. The dropped term is the error; it is
// zero when either operand is a power of two.
//
// Structure (left to right):
//   sign detectors -> rounding (x2) -> shifters Br*A, Ar*B, Ar*Br -> adder
//   (Br*A + Ar*B, 2N+1 bits) -> subtractor (- Ar*Br) -> sign set.
// MODE selects the variant (see roba_pkg): ROBA_UNSIGNED leaves out the sign
// detectors and the sign set; ROBA_SIGNED negates the result exactly;
// ROBA_SIGNED_APPROX negates with a one's complement.
//
// Interface: a, b (N bits; two's complement unless MODE is ROBA_UNSIGNED) ->
// p (2N bits, same number format). Fully combinational, no clock; one product
// per evaluation.
//
// From the source design: the block diagram, the identity above, the rounding
// rule, the three variants and the 2N+1-bit adder at N = 32. This design's own
// choices: one-hot shift amounts, the subtractor width, and the port names.
module roba_multiplier
  import roba_pkg::*;
#(
  parameter int         N    = 32,
  parameter roba_mode_e MODE = ROBA_SIGNED
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int PW = 2 * N + 1;

  logic [N-1:0]   mag_a, mag_b;
  logic           neg_a, neg_b;
  logic [N:0]     ar, br;
  logic [PW-1:0]  br_a, ar_b, ar_br;
  logic [PW-1:0]  sum, diff;
  logic [2*N-1:0] mag_p;

  if (MODE == ROBA_UNSIGNED) begin : g_unsigned
    assign mag_a = a;
    assign mag_b = b;
    assign neg_a = 1'b0;
    assign neg_b = 1'b0;
  end else begin : g_signed
    roba_sign_detector #(.N(N)) u_sign_a (.x(a), .neg(neg_a), .mag(mag_a));
    roba_sign_detector #(.N(N)) u_sign_b (.x(b), .neg(neg_b), .mag(mag_b));
  end

  roba_rounding #(.N(N)) u_round_a (.x(mag_a), .xr(ar));
  roba_rounding #(.N(N)) u_round_b (.x(mag_b), .xr(br));

  roba_shifter #(.XW(N),   .SW(N+1), .OW(PW)) u_shift_bra  (.x(mag_a), .sel(br), .y(br_a));
  roba_shifter #(.XW(N),   .SW(N+1), .OW(PW)) u_shift_arb  (.x(mag_b), .sel(ar), .y(ar_b));
  roba_shifter #(.XW(N+1), .SW(N+1), .OW(PW)) u_shift_arbr (.x(ar),    .sel(br), .y(ar_br));

  roba_adder      #(.W(PW)) u_add (.x(br_a), .y(ar_b),  .s(sum));
  roba_subtractor #(.W(PW)) u_sub (.x(sum),  .y(ar_br), .d(diff));

  // The approximate product is below 2^(2N) for every pair of N-bit operands
  // (an operand that rounds up makes its own term exact from above and the other
  // one is at most 3/4 of its power of two), so the top bit of diff is always 0.
  assign mag_p = diff[2*N-1:0];

  always_comb begin
    assert (diff[2*N] == 1'b0) else $error("roba_multiplier: product exceeds 2N bits");
  end

  if (MODE == ROBA_UNSIGNED) begin : g_no_sign_set
    assign p = mag_p;
  end else begin : g_sign_set
    roba_sign_set #(.W(2*N), .EXACT(MODE == ROBA_SIGNED)) u_sign_set (
      .x(mag_p), .neg(neg_a ^ neg_b), .y(p)
    );
  end

endmodule : roba_multiplier
