// mdlns_converter_top_tb: end-to-end test of all converters at the default
// configuration (R=4, D=3, two digits, 16-bit inputs), no parameter changes.
//
// The same input goes to all four converters. Every result is compared with
// the reference model, the three two-digit converters must agree, and the
// cycle counts are checked: 1 clock for the feed-forward converters, 8 for
// the scalable and 4 for the simplified feed-back converter. The test counts
// how often each mechanism occurred and fails if one never did: the zero
// input, negative inputs, the lower and the higher table entry being the
// single-digit answer, the top table row (2.0) being chosen, the overshooting
// path (higher first digit, opposite-signed second digit) winning the search,
// and a residual that becomes exactly zero (second digit s = 0).
module mdlns_converter_top_tb;
  import mdlns_ref_pkg::*;
  localparam int unsigned R = mdlns_pkg::DEF_R, D = mdlns_pkg::DEF_D, N = mdlns_pkg::DEF_N_DIGITS;
  localparam int unsigned W = mdlns_pkg::DEF_DATA_W, FRAC_W = mdlns_pkg::DEF_FRAC_W;
  localparam int unsigned XF = mdlns_pkg::DEF_X_FRAC, A_W = mdlns_pkg::DEF_A_W;
  localparam int unsigned VW = W + FRAC_W;
  localparam int NUM = 3000;

  logic clk = 0, rst_n = 0;
  logic sd_in_valid = 0, ff_in_valid = 0, fbs_start = 0, fb2_start = 0;
  logic signed [W-1:0] sd_x = '0, ff_x = '0, fbs_x = '0, fb2_x = '0;
  logic sd_out_valid, sd_nz, sd_neg, sd_err_neg;
  logic signed [A_W-1:0] sd_a;
  logic signed [R-1:0] sd_b;
  logic [VW-1:0] sd_err, ff_err, fbs_err, fb2_err;
  logic ff_out_valid, ff_err_neg, fbs_busy, fbs_done, fbs_err_neg, fb2_busy, fb2_done, fb2_err_neg;
  logic [N-1:0] ff_nz, ff_neg, fbs_nz, fbs_neg;
  logic [N-1:0][A_W-1:0] ff_a, fbs_a;
  logic [N-1:0][R-1:0] ff_b, fbs_b;
  logic [1:0] fb2_nz, fb2_neg;
  logic [1:0][A_W-1:0] fb2_a;
  logic [1:0][R-1:0] fb2_b;
  `include "tb_check.svh"

  mdlns_converter_top dut (.*);

  always #5 clk = ~clk;

  int n_zero = 0, n_neg = 0, n_lo = 0, n_hi = 0, n_top = 0, n_over = 0, n_exact = 0;

  function automatic bit digits_ok(logic [N-1:0] nz, logic [N-1:0] ng, logic [N-1:0][A_W-1:0] a,
                                   logic [N-1:0][R-1:0] b, digit_t dg[]);
    bit ok = 1;
    for (int k = 0; k < int'(N); k++)
      ok &= (nz[k] == dg[k].nz) && (!dg[k].nz || (ng[k] == dg[k].neg &&
            int'($signed(a[k])) == dg[k].a && int'($signed(b[k])) == dg[k].b));
    return ok;
  endfunction

  initial begin
    build(R, D, XF, FRAC_W);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NUM; t++) begin
      longint v, e1, e2;
      digit_t d1[], d2[];
      bit en1, en2;
      int leaf1, leaf2, cs, c2;
      step_t s;
      v = longint'($signed(W'($urandom))) >>> ($urandom % W);
      case (t)
        0: v = 0;
        1: v = 1;
        2: v = 96;                        // 3 * 2^5: exact in one digit
        3: v = -(64'sd1 << (W - 1));
        4: v = (64'sd1 << (W - 1)) - 1;
        5: v = 31000;                     // 1.8920 * 2^14: near the top row
        default: ;
      endcase
      convert(v, 1, d1, e1, en1, leaf1);
      convert(v, int'(N), d2, e2, en2, leaf2);
      // Stimulus: one cycle of valid/start for every converter.
      sd_x <= W'(v); ff_x <= W'(v); fbs_x <= W'(v); fb2_x <= W'(v);
      sd_in_valid <= 1'b1; ff_in_valid <= 1'b1; fbs_start <= 1'b1; fb2_start <= 1'b1;
      @(posedge clk);
      sd_in_valid <= 1'b0; ff_in_valid <= 1'b0; fbs_start <= 1'b0; fb2_start <= 1'b0;
      #1;
      // Feed-forward results one clock after the input.
      chk(sd_out_valid && ff_out_valid, "feed-forward latency 1");
      chk(sd_nz == d1[0].nz && (!d1[0].nz || (sd_neg == d1[0].neg && int'(sd_a) == d1[0].a && int'(sd_b) == d1[0].b)),
          $sformatf("single digit x=%0d", v));
      chk(longint'(sd_err) == e1 && sd_err_neg == en1, $sformatf("single digit error x=%0d", v));
      chk(digits_ok(ff_nz, ff_neg, ff_a, ff_b, d2) && longint'(ff_err) == e2 && ff_err_neg == en2,
          $sformatf("feed-forward x=%0d", v));
      cs = 0; c2 = 0;
      begin
        bit got_s, got_2;
        got_s = fbs_done;
        got_2 = fb2_done;
        while (!(got_s && got_2) && cs < 100) begin
          @(posedge clk);
          #1;
          if (!got_s) cs++;
          if (!got_2) c2++;
          if (fb2_done && !got_2)
            chk(digits_ok(fb2_nz, fb2_neg, fb2_a, fb2_b, d2) && longint'(fb2_err) == e2 && fb2_err_neg == en2,
                $sformatf("simplified feed-back x=%0d", v));
          got_s |= fbs_done;
          got_2 |= fb2_done;
        end
      end
      chk(cs == 8, $sformatf("scalable feed-back cycles %0d", cs));
      chk(c2 == 4, $sformatf("simplified feed-back cycles %0d", c2));
      chk(digits_ok(fbs_nz, fbs_neg, fbs_a, fbs_b, d2) && longint'(fbs_err) == e2 && fbs_err_neg == en2,
          $sformatf("scalable feed-back x=%0d", v));
      chk(fbs_nz == ff_nz && fbs_neg == ff_neg && fbs_a == ff_a && fbs_b == ff_b && fb2_a == ff_a[1:0],
          "converters agree");
      // The result must be a consistent approximation: x - value = +-err.
      begin
        // Tolerance: the 2^-XF rounding of the two table values, scaled.
        real diff, approx, tol;
        approx = value(d2, D);
        tol    = 0.01 + 2.0 * $pow(2.0, real'(int'(W) - int'(XF)));
        diff   = real'(v) - approx - (en2 ? -1.0 : 1.0) * real'(e2) / $pow(2.0, real'(FRAC_W));
        chk(diff < tol && diff > -tol,
            $sformatf("x=%0d value mismatch %f", v, diff));
      end
      // Mechanism counters.
      s = step((v < 0 ? -v : v) << FRAC_W, v < 0);
      if (v == 0) n_zero++;
      if (v < 0) n_neg++;
      if (v != 0 && s.hi_res < s.lo_res) n_hi++;
      if (v != 0 && !(s.hi_res < s.lo_res)) n_lo++;
      if (v != 0 && s.hi_d.b == 0 && s.hi_res < s.lo_res && s.hi_d.a == msb((v < 0 ? -v : v)) + 1) n_top++;
      if (v != 0 && leaf2 == 1) n_over++;
      if (v != 0 && !d2[1].nz) n_exact++;
    end
    $display("mechanisms: zero=%0d negative=%0d lower=%0d higher=%0d top_row=%0d overshoot_path=%0d exact=%0d",
             n_zero, n_neg, n_lo, n_hi, n_top, n_over, n_exact);
    chk(n_zero > 0, "zero input exercised");
    chk(n_neg > 0, "negative input exercised");
    chk(n_lo > 0, "lower entry chosen");
    chk(n_hi > 0, "higher entry chosen");
    chk(n_top > 0, "top table row chosen");
    chk(n_over > 0, "overshooting path won");
    chk(n_exact > 0, "exact residual");
    report();
  end

  initial begin
    repeat (20 * NUM + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
