// normalizer: writes an unsigned fixed-point value as mant * 2^e, mant in [1,2).
//
// The input v has VW bits of which FRAC_W are fraction bits. A leading-one
// detector finds the position p of the most significant 1; the value is then
// shifted left so that this 1 lands in the integer bit of a 1.X_FRAC mantissa.
// Bits below the X_FRAC-th fraction bit are dropped (truncation), which keeps
// the RALUT's "mant >= x_k" comparison exact, since the table values have
// X_FRAC fraction bits as well. The binary exponent is e = p - FRAC_W. For
// v = 0, zero is set and mant, p and e are 0. Purely combinational.
// Normalization before the table match follows the document; the widths and
// the truncation are this design's choices.
module normalizer #(
  parameter int unsigned VW     = mdlns_pkg::DEF_DATA_W + mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned FRAC_W = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned P_W    = $clog2(VW),
  parameter int unsigned E_W    = $clog2(2 * VW) + 1
) (
  input  logic [VW-1:0]          v,
  output logic [X_FRAC:0]        mant,
  output logic [P_W-1:0]         p,
  output logic signed [E_W-1:0]  e,
  output logic                   zero
);
  // Working width: wide enough for both v and the mantissa.
  localparam int unsigned AW = (VW > X_FRAC + 1) ? VW : X_FRAC + 1;

  logic [AW-1:0] aligned;

  always_comb begin
    p = '0;
    for (int i = 0; i < int'(VW); i++)
      if (v[i]) p = P_W'(i);
    zero    = (v == '0);
    aligned = AW'(v) << (AW - 1 - int'(p));
    mant    = aligned[AW-1 -: X_FRAC + 1];
    e       = E_W'(signed'({1'b0, p})) - E_W'(FRAC_W);
  end
endmodule
