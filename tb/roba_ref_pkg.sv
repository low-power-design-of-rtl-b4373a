// Reference model of the RoBA multiplier for the testbenches.
//
// Works on 128-bit signed integers: finds each operand's nearest power of two by
// comparing distances (ties go to the larger power), evaluates
// Ar*B + Br*A - Ar*Br on the magnitudes, applies the sign (exact negation for
// S-RoBA, -x-1 for AS-RoBA) and truncates to 2N bits. It also offers the exact
// product for error checks.
package roba_ref_pkg;

  typedef logic signed [127:0] wide_t;

  function automatic wide_t nearest_pow2(input wide_t v);
    wide_t lo;
    if (v == 0) return 0;
    lo = 1;
    while (lo * 2 <= v) lo = lo * 2;
    if (lo == v) return v;
    return ((v - lo) < (2 * lo - v)) ? lo : 2 * lo;
  endfunction

  // mode: 0 unsigned, 1 signed exact, 2 signed approximate negation
  function automatic wide_t roba_ref(input wide_t a, input wide_t b, input int n, input int mode);
    wide_t ma, mb, ra, rb, p, mask;
    bit    neg;
    mask = (wide_t'(1) <<< (2 * n)) - 1;
    ma   = (a < 0) ? -a : a;
    mb   = (b < 0) ? -b : b;
    neg  = (a < 0) != (b < 0);
    ra   = nearest_pow2(ma);
    rb   = nearest_pow2(mb);
    p    = ra * mb + rb * ma - ra * rb;
    if (neg && mode == 1) p = -p;
    if (neg && mode == 2) p = -p - 1;
    return p & mask;
  endfunction

endpackage : roba_ref_pkg
