// mdlns_comparator: selects the smaller of two non-negative errors.
//
// sel_b is 1 when err_b is strictly smaller than err_a, so a tie keeps the
// first operand (the lower RALUT candidate, or the earlier leaf of the search
// tree). err_min is the selected error. Purely combinational. Choosing the
// more accurate approximation follows the document; the tie rule is this
// design's choice.
module mdlns_comparator #(
  parameter int unsigned W = mdlns_pkg::DEF_DATA_W + mdlns_pkg::DEF_FRAC_W
) (
  input  logic [W-1:0] err_a,
  input  logic [W-1:0] err_b,
  output logic         sel_b,
  output logic [W-1:0] err_min
);
  always_comb begin
    sel_b   = (err_b < err_a);
    err_min = sel_b ? err_b : err_a;
  end
endmodule
