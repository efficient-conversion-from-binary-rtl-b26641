// mdlns_stack: register file used by the scalable feed-back converter while it
// walks the tree of candidate approximations depth first.
//
// DEPTH entries of EW bits. Level k of the tree owns the entry pair 2k (lower
// candidate) and 2k+1 (higher candidate); one write stores both entries of a
// level, so descending one level costs one cycle and backtracking needs no
// write at all: the higher candidate of a level is already stored. There is
// one asynchronous read port, and all entries are also available in parallel
// so that the whole stack can be mirrored into the best stack in one cycle.
// Writes happen on the rising clock edge; reset clears all entries.
// The 2^n-entry register file follows the document; the pairwise entry
// layout is this design's choice.
module mdlns_stack #(
  parameter int unsigned DEPTH = 2 ** mdlns_pkg::DEF_N_DIGITS,
  parameter int unsigned EW    = 40,
  parameter int unsigned LVL_W = $clog2(DEPTH),
  parameter int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [LVL_W-1:0]           wr_lvl,
  input  logic [EW-1:0]              wr_lo,
  input  logic [EW-1:0]              wr_hi,
  input  logic [IDX_W-1:0]           rd_idx,
  output logic [EW-1:0]              rd_data,
  output logic [DEPTH-1:0][EW-1:0]   all
);
  logic [DEPTH-1:0][EW-1:0] mem;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (wr_en) begin
      mem[(2 * int'(wr_lvl)) % DEPTH]     <= wr_lo;
      mem[(2 * int'(wr_lvl) + 1) % DEPTH] <= wr_hi;
    end
  end

  assign rd_data = mem[rd_idx];
  assign all     = mem;

  always_ff @(posedge clk)
    if (rst_n && wr_en)
      assert (2 * int'(wr_lvl) + 1 < int'(DEPTH)) else $error("mdlns_stack: level %0d out of range", wr_lvl);
endmodule
