// Rounding block of the RoBA multiplier.
//
// Rounds an unsigned N-bit value to the nearest power of two and returns that
// power as a one-hot word of N+1 bits (bit i set means 2^i). For a value whose
// leading one is at position m the result is 2^m when bit m-1 is 0 and 2^(m+1)
// when bit m-1 is 1. A value of 3*2^(m-1), which lies exactly between 2^m and
// 2^(m+1), therefore rounds up; this matches the unsigned rule that a word
// starting with "11" rounds to 2^N, i.e. xr[N] = x[N-1] & x[N-2]. Zero rounds to
// zero (no bit set), which keeps the product of a zero operand exact.
//
// Interface: x (N bits, unsigned) -> xr (N+1 bits, one-hot or zero).
// Purely combinational. The nearest-power-of-two function and the tie rule come
// from the source design; the loop formulation is this design's own.
module roba_rounding #(
  parameter int N = 32
) (
  input  logic [N-1:0] x,
  output logic [N:0]   xr
);

  // xe[i] is the bit just below position i (x[i-1]), zero below bit 0.
  logic [N:0] xe;
  assign xe = {x, 1'b0};

  always_comb begin
    xr = '0;
    // Scan upwards; the last set bit seen is the leading one.
    for (int i = 0; i < N; i++) begin
      if (x[i]) begin
        xr = '0;
        if (xe[i]) xr[i+1] = 1'b1;
        else       xr[i]   = 1'b1;
      end
    end
  end

endmodule : roba_rounding
