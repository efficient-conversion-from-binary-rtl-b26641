// mdlns_best_stack: mirror of the stack holding the best approximation found.
//
// When the feed-back converter reaches a leaf of its search tree whose error
// beats the best one so far, copy is raised for one cycle and every entry of
// the stack is duplicated here on the next rising edge. The held contents are
// read out in parallel (q) once the search is over. clear empties it.
// Mirroring the whole stack follows the document; the parallel read-out is
// this design's choice.
module mdlns_best_stack #(
  parameter int unsigned DEPTH = 2 ** mdlns_pkg::DEF_N_DIGITS,
  parameter int unsigned EW    = 40
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     copy,
  input  logic [DEPTH-1:0][EW-1:0] src,
  output logic [DEPTH-1:0][EW-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) q <= '0;
    else if (copy)       q <= src;
  end
endmodule
