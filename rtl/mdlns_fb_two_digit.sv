// mdlns_fb_two_digit: simplified feed-back binary to two-digit MDLNS converter.
//
// For two digits the search tree has one root and two leaves, so no stack is
// needed. A single NRS block is used three times:
//   ROOT  on |x|: keep both first-digit candidates and the residual of the
//         higher one; continue with the residual of the lower one.
//   LO    on that residual: keep its better second digit and its error
//         (leaf A); continue with the residual of the higher first digit.
//   HI    on that residual: better second digit and error (leaf B); the
//         result is leaf B if its error is strictly smaller, else leaf A.
// The result equals that of mdlns_fb_scalable and mdlns_ff_multi with two
// digits.
//
// Interface and timing: start is accepted when busy is low; done pulses for
// one cycle 4 clocks after the start edge and nz/neg/a/b/err/err_neg hold the
// result until the next done. Digit 0 is the most significant.
// That a stack-free two-digit circuit with one NRS block exists follows the
// document; its three-step schedule, registers and cycle count are this
// design's choices.
module mdlns_fb_two_digit #(
  parameter int unsigned R      = mdlns_pkg::DEF_R,
  parameter int unsigned D      = mdlns_pkg::DEF_D,
  parameter int unsigned DATA_W = mdlns_pkg::DEF_DATA_W,
  parameter int unsigned FRAC_W = mdlns_pkg::DEF_FRAC_W,
  parameter int unsigned X_FRAC = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned A_W    = mdlns_pkg::DEF_A_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] x,
  output logic                     busy,
  output logic                     done,
  output logic [1:0]               nz,
  output logic [1:0]               neg,
  output logic [1:0][A_W-1:0]      a,
  output logic [1:0][R-1:0]        b,
  output logic [DATA_W+FRAC_W-1:0] err,
  output logic                     err_neg
);
  localparam int unsigned VW = DATA_W + FRAC_W;

  typedef struct packed {
    logic           nz;
    logic           neg;
    logic [A_W-1:0] a;
    logic [R-1:0]   b;
  } digit_t;

  typedef enum logic [2:0] {S_IDLE, S_ROOT, S_LO, S_HI, S_OUT} state_t;

  state_t        state;
  logic [VW-1:0] cur_v;
  logic          cur_neg;
  digit_t        d0_lo, d0_hi, d1_a;
  logic [VW-1:0] r_hi;
  logic          r_hi_neg;
  logic [VW-1:0] err_a;
  logic          err_a_neg;

  logic              s_neg, s_zero;  // zero needs no special path here: it yields zero digits
  logic [DATA_W-1:0] mag;
  sign_separator #(.DATA_W(DATA_W)) u_sign (.x(x), .neg(s_neg), .mag(mag), .zero(s_zero));

  digit_t        lo_d, hi_d;
  logic [VW-1:0] lo_res, hi_res;
  logic          lo_res_neg, hi_res_neg;
  nrs #(.R(R), .D(D), .VW(VW), .FRAC_W(FRAC_W), .X_FRAC(X_FRAC), .A_W(A_W)) u_nrs (
    .v(cur_v), .neg(cur_neg),
    .lo_nz(lo_d.nz), .lo_neg(lo_d.neg), .lo_a(lo_d.a), .lo_b(lo_d.b), .lo_res(lo_res), .lo_res_neg(lo_res_neg),
    .hi_nz(hi_d.nz), .hi_neg(hi_d.neg), .hi_a(hi_d.a), .hi_b(hi_d.b), .hi_res(hi_res), .hi_res_neg(hi_res_neg)
  );

  // Better candidate of the current leaf.
  logic          leaf_hi;
  logic [VW-1:0] leaf_err;
  mdlns_comparator #(.W(VW)) u_leaf_cmp (.err_a(lo_res), .err_b(hi_res), .sel_b(leaf_hi), .err_min(leaf_err));
  digit_t leaf_d;
  logic   leaf_neg;
  assign leaf_d   = leaf_hi ? hi_d : lo_d;
  assign leaf_neg = (leaf_hi ? hi_res_neg : lo_res_neg) && (leaf_err != '0);

  // Leaf A against leaf B.
  logic          take_b;
  logic [VW-1:0] final_err;
  mdlns_comparator #(.W(VW)) u_final_cmp (.err_a(err_a), .err_b(leaf_err), .sel_b(take_b), .err_min(final_err));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur_v     <= '0;
      cur_neg   <= 1'b0;
      d0_lo     <= '0;
      d0_hi     <= '0;
      d1_a      <= '0;
      r_hi      <= '0;
      r_hi_neg  <= 1'b0;
      err_a     <= '0;
      err_a_neg <= 1'b0;
      done      <= 1'b0;
      nz        <= '0;
      neg       <= '0;
      a         <= '0;
      b         <= '0;
      err       <= '0;
      err_neg   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          cur_v   <= {mag, FRAC_W'(0)};
          cur_neg <= s_neg;
          state   <= S_ROOT;
        end
        S_ROOT: begin
          d0_lo    <= lo_d;
          d0_hi    <= hi_d;
          r_hi     <= hi_res;
          r_hi_neg <= hi_res_neg;
          cur_v    <= lo_res;
          cur_neg  <= lo_res_neg;
          state    <= S_LO;
        end
        S_LO: begin
          d1_a      <= leaf_d;
          err_a     <= leaf_err;
          err_a_neg <= leaf_neg;
          cur_v     <= r_hi;
          cur_neg   <= r_hi_neg;
          state     <= S_HI;
        end
        S_HI: begin
          {nz[0], neg[0], a[0], b[0]} <= take_b ? d0_hi  : d0_lo;
          {nz[1], neg[1], a[1], b[1]} <= take_b ? leaf_d : d1_a;
          err     <= final_err;
          err_neg <= take_b ? leaf_neg : err_a_neg;
          state   <= S_OUT;
        end
        S_OUT: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
