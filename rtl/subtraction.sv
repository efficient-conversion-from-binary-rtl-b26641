// subtraction: turns the two RALUT candidates into errors and digit exponents.
//
// The RALUT returns the table entries x_lo <= mant < x_hi for the normalized
// mantissa of the target v. Scaled back by 2^e they are the two candidate
// single-digit approximations of v, and the errors are
//   err_lo = v - x_lo * 2^e   and   err_hi = x_hi * 2^e - v,
// both non-negative. The scaled candidates are computed in v's fixed-point
// frame (FRAC_W fraction bits) as (x << p) >> X_FRAC, truncating bits below
// v's LSB. The digit exponents of the first base are a + e. Purely
// combinational. The two subtractions follow the document; the fixed-point
// frame is this design's choice.
module subtraction #(
  parameter int unsigned VW     = mdlns_pkg::DEF_DATA_W + mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned AT_W   = 6,
  parameter int unsigned A_W    = mdlns_pkg::DEF_A_W,
  parameter int unsigned P_W    = $clog2(VW),
  parameter int unsigned E_W    = $clog2(2 * VW) + 1
) (
  input  logic [VW-1:0]           v,
  input  logic [P_W-1:0]          p,
  input  logic signed [E_W-1:0]   e,
  input  logic [X_FRAC+1:0]       x_lo,
  input  logic signed [AT_W-1:0]  a_lo,
  input  logic [X_FRAC+1:0]       x_hi,
  input  logic signed [AT_W-1:0]  a_hi,
  output logic [VW-1:0]           err_lo,
  output logic [VW-1:0]           err_hi,
  output logic signed [A_W-1:0]   dig_a_lo,
  output logic signed [A_W-1:0]   dig_a_hi
);
  localparam int unsigned SW = VW + X_FRAC + 2;

  logic [SW-1:0] app_lo, app_hi, diff_hi;

  always_comb begin
    app_lo   = (SW'(x_lo) << p) >> X_FRAC;
    app_hi   = (SW'(x_hi) << p) >> X_FRAC;
    err_lo   = v - app_lo[VW-1:0];
    diff_hi  = app_hi - SW'(v);
    err_hi   = diff_hi[VW-1:0];
    dig_a_lo = A_W'(a_lo) + A_W'(e);
    dig_a_hi = A_W'(a_hi) + A_W'(e);
  end
endmodule
