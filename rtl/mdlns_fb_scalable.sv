// mdlns_fb_scalable: feed-back binary to N_DIGITS-digit MDLNS converter built
// around a single NRS block.
//
// It finds the same result as the feed-forward tree (mdlns_ff_multi) but
// evaluates the tree's nodes one per cycle. A state machine walks the tree
// depth first, lower candidates first:
//   EVAL  run the NRS block on the current residual, store both candidates of
//         this level in the stack; above the last level descend into the
//         lower candidate, on the last level load the better candidate's error
//         into the Error register and go to LEAF.
//   LEAF  if Error beats Best Error, copy the whole stack into the best stack
//         and remember the path (which candidate was taken on each level).
//   BACK  find the deepest level whose lower candidate is being followed; if
//         there is one, switch it to the higher candidate, fetch that residual
//         from the stack and descend again (EVAL); otherwise go to OUT.
//   OUT   read the digits of the best path out of the best stack.
// Digit 0 is the most significant. Ties keep the earlier leaf, so the result
// equals mdlns_ff_multi's exactly.
//
// Interface and timing: start is accepted when busy is low. done pulses for
// one cycle 2^(N_DIGITS+1) clocks after the start edge (8 for two digits);
// nz/neg/a/b/err/err_neg then hold the result until the next done.
// The single NRS block, stack, best stack, error registers and state machine
// follow the document; the state encoding, the one-cycle NRS step and the
// resulting cycle count are this design's choices.
module mdlns_fb_scalable #(
  parameter int unsigned R        = mdlns_pkg::DEF_R,
  parameter int unsigned D        = mdlns_pkg::DEF_D,
  parameter int unsigned N_DIGITS = mdlns_pkg::DEF_N_DIGITS,
  parameter int unsigned DATA_W   = mdlns_pkg::DEF_DATA_W,
  parameter int unsigned FRAC_W   = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC   = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned A_W      = mdlns_pkg::DEF_A_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic signed [DATA_W-1:0]      x,
  output logic                          busy,
  output logic                          done,
  output logic [N_DIGITS-1:0]           nz,
  output logic [N_DIGITS-1:0]           neg,
  output logic [N_DIGITS-1:0][A_W-1:0]  a,
  output logic [N_DIGITS-1:0][R-1:0]    b,
  output logic [DATA_W+FRAC_W-1:0]      err,
  output logic                          err_neg
);
  localparam int unsigned VW    = DATA_W + FRAC_W;
  localparam int unsigned DEPTH = 2 ** N_DIGITS;
  localparam int unsigned IDX_W = $clog2(DEPTH);
  localparam int unsigned LVL_W = IDX_W;
  localparam int unsigned DIG_W = 2 + A_W + R;
  localparam int unsigned EW    = DIG_W + VW + 1;

  // Stack entry: {nz, neg, a, b, residual, residual sign}.
  typedef struct packed {
    logic           nz;
    logic           neg;
    logic [A_W-1:0] a;
    logic [R-1:0]   b;
    logic [VW-1:0]  res;
    logic           res_neg;
  } entry_t;

  typedef enum logic [2:0] {S_IDLE, S_EVAL, S_LEAF, S_BACK, S_OUT} state_t;

  state_t               state;
  logic [LVL_W-1:0]     lvl;
  logic [N_DIGITS-1:0]  path;        // candidate followed on each level
  logic [N_DIGITS-1:0]  best_path;
  logic                 leaf_sel;    // better candidate of the last level
  logic                 leaf_neg;
  logic                 best_neg;
  logic [VW-1:0]        cur_v;
  logic                 cur_neg;

  // Sign separator.
  logic              s_neg, s_zero;  // zero needs no special path here: it yields zero digits
  logic [DATA_W-1:0] mag;
  sign_separator #(.DATA_W(DATA_W)) u_sign (.x(x), .neg(s_neg), .mag(mag), .zero(s_zero));

  // The single NRS block.
  entry_t lo_e, hi_e;
  nrs #(.R(R), .D(D), .VW(VW), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_nrs (
    .v(cur_v), .neg(cur_neg),
    .lo_nz(lo_e.nz), .lo_neg(lo_e.neg), .lo_a(lo_e.a), .lo_b(lo_e.b), .lo_res(lo_e.res), .lo_res_neg(lo_e.res_neg),
    .hi_nz(hi_e.nz), .hi_neg(hi_e.neg), .hi_a(hi_e.a), .hi_b(hi_e.b), .hi_res(hi_e.res), .hi_res_neg(hi_e.res_neg)
  );

  logic          cmp_hi;
  logic [VW-1:0] cmp_min;
  mdlns_comparator #(.W(VW)) u_leaf_cmp (.err_a(lo_e.res), .err_b(hi_e.res), .sel_b(cmp_hi), .err_min(cmp_min));

  // Stack and best stack.
  logic                     st_wr;
  logic [IDX_W-1:0]         st_rd_idx;
  logic [EW-1:0]            st_rd;
  logic [DEPTH-1:0][EW-1:0] st_all, best_all;
  logic                     take;
  logic                     back_found;
  logic [LVL_W-1:0]         back_lvl;

  mdlns_stack #(.DEPTH(DEPTH), .EW(EW), .LVL_W(LVL_W), .IDX_W(IDX_W)) u_stack (
    .clk(clk), .rst_n(rst_n), .wr_en(st_wr), .wr_lvl(lvl), .wr_lo(lo_e), .wr_hi(hi_e),
    .rd_idx(st_rd_idx), .rd_data(st_rd), .all(st_all)
  );

  mdlns_best_stack #(.DEPTH(DEPTH), .EW(EW)) u_best (
    .clk(clk), .rst_n(rst_n), .clear(state == S_IDLE && start), .copy(take), .src(st_all), .q(best_all)
  );

  // Error and Best Error.
  logic [VW-1:0] leaf_err, best_err;
  logic          have_best, better;
  mdlns_error_regs #(.W(VW)) u_err (
    .clk(clk), .rst_n(rst_n), .clear(state == S_IDLE && start),
    .load(state == S_EVAL && lvl == LVL_W'(N_DIGITS - 1)), .leaf_err(cmp_min),
    .take(take), .err(leaf_err), .best_err(best_err), .have_best(have_best), .better(better)
  );

  // Deepest level above the last one that still follows its lower candidate.
  always_comb begin
    back_found = 1'b0;
    back_lvl   = '0;
    for (int k = 0; k < int'(N_DIGITS) - 1; k++) begin
      if (!path[k]) begin
        back_found = 1'b1;
        back_lvl   = LVL_W'(k);
      end
    end
  end

  assign st_wr     = (state == S_EVAL);
  assign st_rd_idx = IDX_W'(2 * int'(back_lvl) + 1);
  assign take      = (state == S_LEAF) && better;
  assign busy      = (state != S_IDLE);

  entry_t rd_e;
  assign rd_e = st_rd;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lvl       <= '0;
      path      <= '0;
      best_path <= '0;
      leaf_sel  <= 1'b0;
      leaf_neg  <= 1'b0;
      best_neg  <= 1'b0;
      cur_v     <= '0;
      cur_neg   <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_v   <= {mag, FRAC_W'(0)};
          cur_neg <= s_neg;
          lvl     <= '0;
          path    <= '0;
          state   <= S_EVAL;
        end
        S_EVAL: begin
          if (lvl == LVL_W'(N_DIGITS - 1)) begin
            leaf_sel <= cmp_hi;
            leaf_neg <= cmp_hi ? hi_e.res_neg : lo_e.res_neg;
            state    <= S_LEAF;
          end else begin
            for (int k = 0; k < int'(N_DIGITS); k++)
              if (LVL_W'(k) == lvl) path[k] <= 1'b0;
            cur_v     <= lo_e.res;
            cur_neg   <= lo_e.res_neg;
            lvl       <= lvl + 1'b1;
          end
        end
        S_LEAF: begin
          if (take) begin
            best_path                <= path;
            best_path[N_DIGITS-1]    <= leaf_sel;
            best_neg                 <= leaf_neg && (leaf_err != '0);
          end
          state <= S_BACK;
        end
        S_BACK: begin
          if (back_found) begin
            for (int k = 0; k < int'(N_DIGITS); k++) begin
              if (LVL_W'(k) == back_lvl)    path[k] <= 1'b1;
              else if (k > int'(back_lvl)) path[k] <= 1'b0;
            end
            cur_v   <= rd_e.res;
            cur_neg <= rd_e.res_neg;
            lvl     <= back_lvl + 1'b1;
            state   <= S_EVAL;
          end else begin
            state <= S_OUT;
          end
        end
        S_OUT: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Result registers, loaded from the best stack in S_OUT.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nz      <= '0;
      neg     <= '0;
      a       <= '0;
      b       <= '0;
      err     <= '0;
      err_neg <= 1'b0;
    end else if (state == S_OUT) begin
      for (int k = 0; k < int'(N_DIGITS); k++) begin
        entry_t e;
        e      = best_all[2 * k + int'(best_path[k])];
        nz[k]  <= e.nz;
        neg[k] <= e.neg;
        a[k]   <= e.a;
        b[k]   <= e.b;
      end
      err     <= best_err;
      err_neg <= best_neg;
    end
  end

  // A conversion always ends with at least one leaf taken.
  always_ff @(posedge clk)
    if (rst_n && state == S_OUT)
      assert (have_best) else $error("mdlns_fb_scalable: no leaf recorded");
endmodule
