// mdlns_ff_multi: feed-forward binary to N_DIGITS-digit MDLNS converter.
//
// Each digit is found greedily on the error left by the digits before it, but
// at every level both table neighbours are followed: the lower one keeps the
// residual's sign, the higher one overshoots and flips it. This gives a binary
// tree of NRS blocks, 2^N_DIGITS - 1 in all: level k has 2^k blocks, and block
// j of level k works on the residual of candidate j%2 (0 lower, 1 higher) of
// block j/2 of level k-1. A leaf (last level) keeps the better of its two
// candidates; a chain of comparators then picks the leaf with the smallest
// final error (the earliest leaf, i.e. the one with more lower choices, on a
// tie), and the digits along its path are the result. Digit 0 is the most
// significant.
//
// Interface and timing: with PIPELINE = 0 the tree is combinational and ends
// in one output register: results appear with out_valid one clock after
// in_valid. With PIPELINE = 1 a register stage follows every tree level but
// the last, and the candidates of earlier levels are delayed to stay aligned,
// so the latency is N_DIGITS clocks. Either way one conversion can start every
// clock. err/err_neg is the final error x - sum of digits (FRAC_W fraction
// bits).
// The tree of NRS blocks, its size, the final comparators and the option to
// pipeline the feed-forward circuit follow the document; where the pipeline
// registers sit, the comparator chain order, tie rule, output register and
// reset are this design's choices.
module mdlns_ff_multi #(
  parameter int unsigned R        = mdlns_pkg::DEF_R,
  parameter int unsigned D        = mdlns_pkg::DEF_D,
  parameter int unsigned N_DIGITS = mdlns_pkg::DEF_N_DIGITS,
  parameter int unsigned DATA_W   = mdlns_pkg::DEF_DATA_W,
  parameter int unsigned FRAC_W   = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC   = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned A_W      = mdlns_pkg::DEF_A_W,
  parameter bit          PIPELINE = 1'b0
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic signed [DATA_W-1:0]            x,
  output logic                                out_valid,
  output logic [N_DIGITS-1:0]                 nz,
  output logic [N_DIGITS-1:0]                 neg,
  output logic [N_DIGITS-1:0][A_W-1:0]        a,
  output logic [N_DIGITS-1:0][R-1:0]          b,
  output logic [DATA_W+FRAC_W-1:0]            err,
  output logic                                err_neg
);
  localparam int unsigned VW     = DATA_W + FRAC_W;
  localparam int unsigned NL     = 2 ** (N_DIGITS - 1);      // leaves
  localparam int unsigned LI_W   = (N_DIGITS > 1) ? N_DIGITS - 1 : 1;

  localparam int unsigned PD     = PIPELINE ? N_DIGITS - 1 : 0; // pipeline stages

  // One candidate digit and the residual it leaves.
  typedef struct packed {
    logic           nz;
    logic           neg;
    logic [A_W-1:0] a;
    logic [R-1:0]   b;
    logic [VW-1:0]  res;
    logic           res_neg;
  } cand_t;

  logic              s_neg, s_zero;  // zero needs no special path here: it yields zero digits
  logic [DATA_W-1:0] mag;

  sign_separator #(.DATA_W(DATA_W)) u_sign (.x(x), .neg(s_neg), .mag(mag), .zero(s_zero));

  logic [LI_W-1:0] best_leaf;
  logic [VW-1:0]   best_err;
  logic [VW-1:0]   leaf_err [NL];
  logic            leaf_sel [NL];

  logic [N_DIGITS-1:0]          p_nz, p_neg;
  logic [N_DIGITS-1:0][A_W-1:0] p_a;
  logic [N_DIGITS-1:0][R-1:0]   p_b;
  logic                         p_err_neg;

  // Level k holds 2^k NRS nodes; node j of level k is fed by candidate j%2 of
  // node j/2 of level k-1 (0 = lower, 1 = higher). q[0] holds a level's
  // candidates as computed, q[i] the same delayed by i pipeline stages.
  for (genvar k = 0; k < int'(N_DIGITS); k++) begin : g_lvl
    localparam int unsigned NK = 2 ** k;
    localparam int unsigned DK = PIPELINE ? N_DIGITS - 1 - k : 0;
    logic [VW-1:0] v    [NK];
    logic          vneg [NK];
    cand_t         q    [DK+1][NK][2];

    for (genvar j = 0; j < int'(NK); j++) begin : g_node
      if (k == 0) begin : g_root
        assign v[j]    = {mag, FRAC_W'(0)};
        assign vneg[j] = s_neg;
      end else begin : g_child
        assign v[j]    = g_lvl[k-1].q[PIPELINE ? 1 : 0][j/2][j%2].res;
        assign vneg[j] = g_lvl[k-1].q[PIPELINE ? 1 : 0][j/2][j%2].res_neg;
      end
      nrs #(.R(R), .D(D), .VW(VW), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_nrs (
        .v(v[j]), .neg(vneg[j]),
        .lo_nz(q[0][j][0].nz), .lo_neg(q[0][j][0].neg), .lo_a(q[0][j][0].a), .lo_b(q[0][j][0].b),
        .lo_res(q[0][j][0].res), .lo_res_neg(q[0][j][0].res_neg),
        .hi_nz(q[0][j][1].nz), .hi_neg(q[0][j][1].neg), .hi_a(q[0][j][1].a), .hi_b(q[0][j][1].b),
        .hi_res(q[0][j][1].res), .hi_res_neg(q[0][j][1].res_neg)
      );
    end

    for (genvar i = 1; i <= int'(DK); i++) begin : g_dly
      always_ff @(posedge clk) q[i] <= q[i-1];
    end

    // Digit k of the chosen path: node = top k bits of the leaf index, branch =
    // next bit, or the leaf comparator's choice on the last level.
    logic [LI_W-1:0] node_sel;
    logic            br;
    cand_t           pick;
    always_comb begin
      node_sel = LI_W'(best_leaf >> (N_DIGITS - 1 - k));
      if (k < int'(N_DIGITS) - 1) br = best_leaf[(N_DIGITS - 2 - k) % LI_W];
      else                        br = leaf_sel[best_leaf];
      pick = q[DK][int'(node_sel) % NK][br];
    end
    assign p_nz[k]  = pick.nz;
    assign p_neg[k] = pick.neg;
    assign p_a[k]   = pick.a;
    assign p_b[k]   = pick.b;
    if (k == int'(N_DIGITS) - 1) begin : g_last
      assign p_err_neg = pick.res_neg;
    end
  end

  // Valid flag travelling with the data through the pipeline stages.
  logic vld [PD+1];
  assign vld[0] = in_valid;
  for (genvar i = 1; i <= int'(PD); i++) begin : g_vld
    always_ff @(posedge clk) begin
      if (!rst_n) vld[i] <= 1'b0;
      else        vld[i] <= vld[i-1];
    end
  end

  // Leaf comparators: better candidate of each last-level node.

  for (genvar l = 0; l < int'(NL); l++) begin : g_leaf
    mdlns_comparator #(.W(VW)) u_leaf_cmp (
      .err_a(g_lvl[N_DIGITS-1].q[0][l][0].res), .err_b(g_lvl[N_DIGITS-1].q[0][l][1].res),
      .sel_b(leaf_sel[l]), .err_min(leaf_err[l])
    );
  end

  // Comparator chain over the leaves: running minimum and its index.
  logic [VW-1:0]   run_err [NL];
  logic [LI_W-1:0] run_idx [NL];

  assign run_err[0] = leaf_err[0];
  assign run_idx[0] = '0;
  for (genvar l = 1; l < int'(NL); l++) begin : g_chain
    logic take;
    mdlns_comparator #(.W(VW)) u_chain_cmp (
      .err_a(run_err[l-1]), .err_b(leaf_err[l]), .sel_b(take), .err_min(run_err[l])
    );
    assign run_idx[l] = take ? LI_W'(l) : run_idx[l-1];
  end
  assign best_leaf = run_idx[NL-1];
  assign best_err  = run_err[NL-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      nz        <= '0;
      neg       <= '0;
      a         <= '0;
      b         <= '0;
      err       <= '0;
      err_neg   <= 1'b0;
    end else begin
      out_valid <= vld[PD];
      if (vld[PD]) begin
        nz      <= p_nz;
        neg     <= p_neg;
        a       <= p_a;
        b       <= p_b;
        err     <= best_err;
        err_neg <= p_err_neg && (best_err != '0);
      end
    end
  end
endmodule
