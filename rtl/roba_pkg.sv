// Shared definitions for the RoBA (rounding-based approximate) multiplier.
//
// The multiplier comes in three variants, chosen at elaboration time:
//   ROBA_UNSIGNED        - U-RoBA: operands are unsigned, no sign detector and no
//                          sign set stage.
//   ROBA_SIGNED          - S-RoBA: two's complement operands; a negative result is
//                          negated exactly (~X + 1).
//   ROBA_SIGNED_APPROX   - AS-RoBA: as S-RoBA, but the negation skips the +1
//                          (one's complement), trading an error of one LSB for a
//                          shorter path.
// The three variants and their names follow the source design; the encoding is
// this package's own.
package roba_pkg;

  typedef enum logic [1:0] {
    ROBA_UNSIGNED      = 2'd0,
    ROBA_SIGNED        = 2'd1,
    ROBA_SIGNED_APPROX = 2'd2
  } roba_mode_e;

endpackage : roba_pkg
