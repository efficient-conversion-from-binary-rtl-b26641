// mdlns_fb_two_digit_tb: simplified two-digit feed-back converter.
//
// DUT u24: 24-bit inputs; DUT u16: 16-bit inputs (the default width). Each
// converts the published example 845937 (u24 must return
// 2^(-4+19) * 3^3 - 2^(5+15) * 3^-3), zero, extreme and random values, and
// is compared with the reference model. The clocks from the start edge to
// done must be 4.
module mdlns_fb_two_digit_tb;
  import mdlns_ref_pkg::*;
  localparam int unsigned R = 4, D = 3, FRAC_W = 8, XF = 16, A_W = 8;
  logic clk = 0, rst_n = 0;
  int   finished = 0;
  `include "tb_check.svh"

  always #5 clk = ~clk;

`define FB_DUT(name, n, w, count) \
  logic name``_start = 0, name``_busy, name``_done, name``_en; \
  logic signed [w-1:0] name``_x = '0; \
  logic [n-1:0] name``_nz, name``_neg; \
  logic [n-1:0][A_W-1:0] name``_a; \
  logic [n-1:0][R-1:0] name``_b; \
  logic [w+FRAC_W-1:0] name``_err; \
  mdlns_fb_two_digit #(.R(R), .D(D), .DATA_W(w), .FRAC_W(FRAC_W), .X_FRAC(XF), .A_W(A_W)) name ( \
    .clk(clk), .rst_n(rst_n), .start(name``_start), .x(name``_x), .busy(name``_busy), .done(name``_done), \
    .nz(name``_nz), .neg(name``_neg), .a(name``_a), .b(name``_b), .err(name``_err), .err_neg(name``_en)); \
  initial begin \
    @(posedge rst_n); \
    for (int t = 0; t < count; t++) begin \
      longint v; digit_t dg[]; longint e; bit en; int leaf; int cyc; \
      v = longint'($signed(w'($urandom))) >>> ($urandom % w); \
      if (t == 0) v = (w > 20) ? 845937 : 12345; \
      if (t == 1) v = 0; \
      if (t == 2) v = -(64'sd1 << (w - 1)); \
      if (t == 3) v = (64'sd1 << (w - 1)) - 1; \
      while (name``_busy) @(posedge clk); \
      name``_x <= w'(v); name``_start <= 1'b1; \
      @(posedge clk); \
      name``_start <= 1'b0; \
      cyc = 0; \
      do begin @(posedge clk); #1; cyc++; end while (!name``_done && cyc < 1000); \
      #1; \
      chk(cyc == 4, $sformatf("n=%0d cycles %0d", n, cyc)); \
      convert(v, n, dg, e, en, leaf); \
      for (int k = 0; k < n; k++) \
        chk(name``_nz[k] == dg[k].nz && (!dg[k].nz || (name``_neg[k] == dg[k].neg && \
            int'($signed(name``_a[k])) == dg[k].a && int'($signed(name``_b[k])) == dg[k].b)), \
            $sformatf("n=%0d x=%0d digit %0d: %b %b %0d %0d expected %b %b %0d %0d", n, v, k, name``_nz[k], \
                      name``_neg[k], $signed(name``_a[k]), $signed(name``_b[k]), dg[k].nz, dg[k].neg, dg[k].a, dg[k].b)); \
      chk(longint'(name``_err) == e && name``_en == en, $sformatf("n=%0d x=%0d err %0d expected %0d", n, v, name``_err, e)); \
      if (t == 0 && w > 20) \
        chk(name``_nz == '1 && name``_neg[0] == 1'b0 && name``_neg[1] == 1'b1 && \
            $signed(name``_a[0]) == 15 && $signed(name``_b[0]) == 3 && $signed(name``_a[1]) == 20 && $signed(name``_b[1]) == -3, \
            "published two-digit example"); \
    end \
    finished++; \
  end

  `FB_DUT(u24, 2, 24, 800)
  `FB_DUT(u16, 2, 16, 800)

  initial begin
    build(R, D, XF, FRAC_W);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (finished == 2);
    report();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
