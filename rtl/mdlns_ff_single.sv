// mdlns_ff_single: feed-forward binary to single-digit MDLNS converter.
//
// x is approximated by one digit s * 2^a * D^b. The sign separator splits x,
// the NRS block returns the table entries just below and just above the
// normalized magnitude, and the comparator keeps the one with the smaller
// error (the lower one on a tie). A zero input gives nz = 0.
//
// Interface and timing: the datapath is combinational and ends in one register
// stage, so a conversion presented with in_valid appears with out_valid one
// clock later, and one conversion can start every clock. err is the magnitude
// of x - approximation with FRAC_W fraction bits; err_neg is its sign.
// The datapath (sign separator, normalizer, RALUT, subtraction, comparator)
// follows the document; the single output register, the valid flags and the
// synchronous active-low reset are this design's choices.
module mdlns_ff_single #(
  parameter int unsigned R      = mdlns_pkg::DEF_R,
  parameter int unsigned D      = mdlns_pkg::DEF_D,
  parameter int unsigned DATA_W = mdlns_pkg::DEF_DATA_W,
  parameter int unsigned FRAC_W = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned A_W    = mdlns_pkg::DEF_A_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     out_valid,
  output logic                     nz,
  output logic                     neg,
  output logic signed [A_W-1:0]    a,
  output logic signed [R-1:0]      b,
  output logic [DATA_W+FRAC_W-1:0] err,
  output logic                     err_neg
);
  localparam int unsigned VW = DATA_W + FRAC_W;

  logic              s_neg, s_zero;
  logic [DATA_W-1:0] mag;
  logic              lo_nz, lo_neg, lo_res_neg, hi_nz, hi_neg, hi_res_neg;
  logic signed [A_W-1:0] lo_a, hi_a;
  logic signed [R-1:0]   lo_b, hi_b;
  logic [VW-1:0]     lo_res, hi_res, err_min;
  logic              sel_hi;

  sign_separator #(.DATA_W(DATA_W)) u_sign (.x(x), .neg(s_neg), .mag(mag), .zero(s_zero));

  nrs #(.R(R), .D(D), .VW(VW), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_nrs (
    .v({mag, FRAC_W'(0)}), .neg(s_neg),
    .lo_nz(lo_nz), .lo_neg(lo_neg), .lo_a(lo_a), .lo_b(lo_b), .lo_res(lo_res), .lo_res_neg(lo_res_neg),
    .hi_nz(hi_nz), .hi_neg(hi_neg), .hi_a(hi_a), .hi_b(hi_b), .hi_res(hi_res), .hi_res_neg(hi_res_neg)
  );

  mdlns_comparator #(.W(VW)) u_cmp (.err_a(lo_res), .err_b(hi_res), .sel_b(sel_hi), .err_min(err_min));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      nz        <= 1'b0;
      neg       <= 1'b0;
      a         <= '0;
      b         <= '0;
      err       <= '0;
      err_neg   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        nz      <= sel_hi ? hi_nz  : lo_nz;
        neg     <= sel_hi ? hi_neg : lo_neg;
        a       <= sel_hi ? hi_a   : lo_a;
        b       <= sel_hi ? hi_b   : lo_b;
        err     <= err_min;
        err_neg <= (sel_hi ? hi_res_neg : lo_res_neg) && (err_min != '0);
      end
    end
  end
endmodule
