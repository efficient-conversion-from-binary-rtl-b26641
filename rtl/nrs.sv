// nrs: Normalization, RALUT and Subtraction block; one step of the greedy
// MDLNS conversion.
//
// Input is a residual: the part of the target not yet represented, as a
// magnitude v (VW bits, FRAC_W fraction bits) and a sign. The normalizer
// writes v = mant * 2^e, the RALUT returns the two table entries around mant,
// and the subtraction forms both candidate digits and what each leaves over:
//   lower candidate  s * x_lo * 2^e : residual v - x_lo*2^e, same sign s
//   higher candidate s * x_hi * 2^e : residual x_hi*2^e - v, sign -s
// A digit is {nz, neg, a, b}: s = nz ? (neg ? -1 : +1) : 0, value
// s * 2^a * D^b. A zero residual gives zero digits (nz = 0) and zero residuals.
// Purely combinational. The composition (normalizer, RALUT, subtraction) and
// the sign flip after the higher candidate follow the document.
module nrs #(
  parameter int unsigned R      = mdlns_pkg::DEF_R,
  parameter int unsigned D      = mdlns_pkg::DEF_D,
  parameter int unsigned VW     = mdlns_pkg::DEF_DATA_W + mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned FRAC_W = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned A_W    = mdlns_pkg::DEF_A_W
) (
  input  logic [VW-1:0]         v,
  input  logic                  neg,
  output logic                  lo_nz,
  output logic                  lo_neg,
  output logic signed [A_W-1:0] lo_a,
  output logic signed [R-1:0]   lo_b,
  output logic [VW-1:0]         lo_res,
  output logic                  lo_res_neg,
  output logic                  hi_nz,
  output logic                  hi_neg,
  output logic signed [A_W-1:0] hi_a,
  output logic signed [R-1:0]   hi_b,
  output logic [VW-1:0]         hi_res,
  output logic                  hi_res_neg
);
  localparam int unsigned AT_W = mdlns_pkg::table_a_width(R, D);
  localparam int unsigned P_W  = $clog2(VW);
  localparam int unsigned E_W  = $clog2(2 * VW) + 1;

  logic [X_FRAC:0]        mant;
  logic [P_W-1:0]         p;
  logic signed [E_W-1:0]  e;
  logic                   zero;
  logic [X_FRAC+1:0]      x_lo, x_hi;
  logic signed [AT_W-1:0] a_lo, a_hi;

  normalizer #(.VW(VW), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .P_W(P_W), .E_W(E_W)) u_norm (
    .v(v), .mant(mant), .p(p), .e(e), .zero(zero)
  );

  ralut #(.R(R), .D(D), .X_FRAC(X_FRAC), .AT_W(AT_W)) u_ralut (
    .mant(mant),
    .x_lo(x_lo), .a_lo(a_lo), .b_lo(lo_b),
    .x_hi(x_hi), .a_hi(a_hi), .b_hi(hi_b)
  );

  subtraction #(.VW(VW), .X_FRAC(X_FRAC), .AT_W(AT_W), .A_W(A_W), .P_W(P_W), .E_W(E_W)) u_sub (
    .v(v), .p(p), .e(e),
    .x_lo(x_lo), .a_lo(a_lo), .x_hi(x_hi), .a_hi(a_hi),
    .err_lo(lo_res), .err_hi(hi_res), .dig_a_lo(lo_a), .dig_a_hi(hi_a)
  );

  always_comb begin
    lo_nz      = !zero;
    hi_nz      = !zero;
    lo_neg     = neg;
    hi_neg     = neg;
    lo_res_neg = neg;
    hi_res_neg = !neg;
  end
endmodule
