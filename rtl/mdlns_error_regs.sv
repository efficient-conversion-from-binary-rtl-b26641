// mdlns_error_regs: the Error and Best Error registers of the feed-back
// converter.
//
// load stores the error of the leaf just evaluated into the Error register.
// better is high when that error is strictly smaller than Best Error, or when
// no leaf has been taken since clear. take copies Error into Best Error (the
// controller raises it together with the best-stack copy when better is high).
// clear starts a new conversion. All updates happen on the rising clock edge.
// Comparing each leaf error with the best one follows the document; the
// strict comparison (the first of equal leaves wins) is this design's choice.
module mdlns_error_regs #(
  parameter int unsigned W = mdlns_pkg::DEF_DATA_W + mdlns_pkg::DEF_FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         load,
  input  logic [W-1:0] leaf_err,
  input  logic         take,
  output logic [W-1:0] err,
  output logic [W-1:0] best_err,
  output logic         have_best,
  output logic         better
);
  logic sel_new;
  logic [W-1:0] unused_min;

  mdlns_comparator #(.W(W)) u_cmp (.err_a(best_err), .err_b(err), .sel_b(sel_new), .err_min(unused_min));

  assign better = !have_best || sel_new;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err       <= '0;
      best_err  <= '0;
      have_best <= 1'b0;
    end else begin
      if (load) err <= leaf_err;
      if (clear) begin
        best_err  <= '0;
        have_best <= 1'b0;
      end else if (take) begin
        best_err  <= err;
        have_best <= 1'b1;
      end
    end
  end
endmodule
