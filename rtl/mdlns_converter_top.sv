// mdlns_converter_top: the binary to MDLNS converters side by side.
//
// Converts signed binary integers into the two-dimensional multi-digit
// logarithmic number system, x ~ sum_i s_i * 2^a_i * D^b_i, with the search
// for each digit done by a range addressable look-up table (RALUT). Three
// circuit styles compute this and are all instantiated here, each with its
// own ports and sharing only clock and reset:
//   sd_*   feed-forward single-digit converter (mdlns_ff_single)
//   ff_*   feed-forward N_DIGITS-digit converter, a tree of 2^N_DIGITS-1 NRS
//          blocks (mdlns_ff_multi); one result per clock, latency 1, or
//          N_DIGITS when FF_PIPELINE is set
//   fbs_*  scalable feed-back converter with one NRS block, a stack and a
//          best stack (mdlns_fb_scalable); 2^(N_DIGITS+1) clocks per result
//   fb2_*  simplified two-digit feed-back converter (mdlns_fb_two_digit);
//          4 clocks per result
// The multi-digit converters return identical digits for the same input.
// A digit k is nz[k] ? (neg[k] ? -1 : +1) * 2^a[k] * D^b[k] : 0, a and b in
// two's complement; err/err_neg is the remaining error with FRAC_W fraction
// bits. Reset is synchronous and active low.
module mdlns_converter_top #(
  parameter int unsigned R        = mdlns_pkg::DEF_R,
  parameter int unsigned D        = mdlns_pkg::DEF_D,
  parameter int unsigned N_DIGITS = mdlns_pkg::DEF_N_DIGITS,
  parameter int unsigned DATA_W   = mdlns_pkg::DEF_DATA_W,
  parameter int unsigned FRAC_W   = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC   = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned A_W      = mdlns_pkg::DEF_A_W,
  parameter bit          FF_PIPELINE = 1'b0   // register stage per tree level in ff_*
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Feed-forward single digit.
  input  logic                          sd_in_valid,
  input  logic signed [DATA_W-1:0]      sd_x,
  output logic                          sd_out_valid,
  output logic                          sd_nz,
  output logic                          sd_neg,
  output logic signed [A_W-1:0]         sd_a,
  output logic signed [R-1:0]           sd_b,
  output logic [DATA_W+FRAC_W-1:0]      sd_err,
  output logic                          sd_err_neg,
  // Feed-forward multi digit.
  input  logic                          ff_in_valid,
  input  logic signed [DATA_W-1:0]      ff_x,
  output logic                          ff_out_valid,
  output logic [N_DIGITS-1:0]           ff_nz,
  output logic [N_DIGITS-1:0]           ff_neg,
  output logic [N_DIGITS-1:0][A_W-1:0]  ff_a,
  output logic [N_DIGITS-1:0][R-1:0]    ff_b,
  output logic [DATA_W+FRAC_W-1:0]      ff_err,
  output logic                          ff_err_neg,
  // Scalable feed-back multi digit.
  input  logic                          fbs_start,
  input  logic signed [DATA_W-1:0]      fbs_x,
  output logic                          fbs_busy,
  output logic                          fbs_done,
  output logic [N_DIGITS-1:0]           fbs_nz,
  output logic [N_DIGITS-1:0]           fbs_neg,
  output logic [N_DIGITS-1:0][A_W-1:0]  fbs_a,
  output logic [N_DIGITS-1:0][R-1:0]    fbs_b,
  output logic [DATA_W+FRAC_W-1:0]      fbs_err,
  output logic                          fbs_err_neg,
  // Simplified two-digit feed-back.
  input  logic                          fb2_start,
  input  logic signed [DATA_W-1:0]      fb2_x,
  output logic                          fb2_busy,
  output logic                          fb2_done,
  output logic [1:0]                    fb2_nz,
  output logic [1:0]                    fb2_neg,
  output logic [1:0][A_W-1:0]           fb2_a,
  output logic [1:0][R-1:0]             fb2_b,
  output logic [DATA_W+FRAC_W-1:0]      fb2_err,
  output logic                          fb2_err_neg
);
  mdlns_ff_single #(.R(R), .D(D), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_sd (
    .clk(clk), .rst_n(rst_n), .in_valid(sd_in_valid), .x(sd_x), .out_valid(sd_out_valid),
    .nz(sd_nz), .neg(sd_neg), .a(sd_a), .b(sd_b), .err(sd_err), .err_neg(sd_err_neg)
  );

  mdlns_ff_multi #(.R(R), .D(D), .N_DIGITS(N_DIGITS), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W), .PIPELINE(FF_PIPELINE)) u_ff (
    .clk(clk), .rst_n(rst_n), .in_valid(ff_in_valid), .x(ff_x), .out_valid(ff_out_valid),
    .nz(ff_nz), .neg(ff_neg), .a(ff_a), .b(ff_b), .err(ff_err), .err_neg(ff_err_neg)
  );

  mdlns_fb_scalable #(.R(R), .D(D), .N_DIGITS(N_DIGITS), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_fbs (
    .clk(clk), .rst_n(rst_n), .start(fbs_start), .x(fbs_x), .busy(fbs_busy), .done(fbs_done),
    .nz(fbs_nz), .neg(fbs_neg), .a(fbs_a), .b(fbs_b), .err(fbs_err), .err_neg(fbs_err_neg)
  );

  mdlns_fb_two_digit #(.R(R), .D(D), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_fb2 (
    .clk(clk), .rst_n(rst_n), .start(fb2_start), .x(fb2_x), .busy(fb2_busy), .done(fb2_done),
    .nz(fb2_nz), .neg(fb2_neg), .a(fb2_a), .b(fb2_b), .err(fb2_err), .err_neg(fb2_err_neg)
  );
endmodule
