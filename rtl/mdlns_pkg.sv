// mdlns_pkg: shared defaults for the binary-to-MDLNS converters.
//
// A two-dimensional MDLNS digit is s * 2^a * D^b with s in {-1,0,+1}. The
// converters approximate a signed binary integer by a sum of N_DIGITS such
// digits. The constants below are the default sizes used throughout: R=4 and
// D=3 (the second-base exponent b is an R-bit signed number), two digits and
// 16-bit inputs are the configuration the converters were built for. The
// fixed-point widths (FRAC_W, X_FRAC) and the exponent width A_W are this
// design's own choices.
package mdlns_pkg;
  // Number of bits of the second-base exponent b (b in [-2^(R-1), 2^(R-1)-1]).
  localparam int unsigned DEF_R        = 4;
  // Second base. Must be an odd integer in this implementation.
  localparam int unsigned DEF_D        = 3;
  // Number of MDLNS digits of the multi-digit converters.
  localparam int unsigned DEF_N_DIGITS = 2;
  // Width of the signed binary input.
  localparam int unsigned DEF_DATA_W   = 16;
  // Fraction bits kept for residual errors below the integer LSB.
  localparam int unsigned DEF_FRAC_W   = 8;
  // Fraction bits of the table values x in [1,2].
  localparam int unsigned DEF_X_FRAC   = 16;
  // Width of the signed first-base exponent a of an output digit.
  localparam int unsigned DEF_A_W      = 8;

  // Width of the signed table exponent a_i for a given R and D: |a_i| is at
  // most ceil(2^(R-1) * log2(D)), bounded here by 2^(R-1) * clog2(D).
  function automatic int unsigned table_a_width(int unsigned r, int unsigned d);
    return $clog2((2 ** (r - 1)) * $clog2(d) + 1) + 1;
  endfunction
endpackage
