// mdlns_ff_multi_tb: feed-forward multi-digit converter.
//
// DUT u2: two digits, 24-bit inputs. Checks the published two-digit example
// 845937 -> 2^(-4+19) * 3^3 - 2^(5+15) * 3^-3 (= 845900, the path that first
// overshoots), then random inputs against the reference model.
// DUT u3: three digits, 16-bit inputs, random inputs against the reference.
// DUT u3p: as u3 but with a register stage after every tree level.
// All take one input per clock; each result must appear one clock later
// (u2, u3) or three clocks later (u3p), with out_valid low in between.
module mdlns_ff_multi_tb;
  import mdlns_ref_pkg::*;
  localparam int unsigned R = 4, D = 3, FRAC_W = 8, XF = 16, A_W = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [23:0] x = '0;
  `include "tb_check.svh"

  always #5 clk = ~clk;

  // Declares a DUT with n digits and w-bit inputs plus its scoreboard.
`define FF_DUT(name, n, w, pipe, lat) \
  logic name``_ov, name``_en; \
  logic [n-1:0] name``_nz, name``_neg; \
  logic [n-1:0][A_W-1:0] name``_a; \
  logic [n-1:0][R-1:0] name``_b; \
  logic [w+FRAC_W-1:0] name``_err; \
  longint name``_q[$]; int name``_due[$]; int name``_cnt = 0; \
  mdlns_ff_multi #(.R(R), .D(D), .N_DIGITS(n), .DATA_W(w), .FRAC_W(FRAC_W), .X_FRAC(XF), .A_W(A_W), .PIPELINE(pipe)) name ( \
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x[w-1:0]), .out_valid(name``_ov), \
    .nz(name``_nz), .neg(name``_neg), .a(name``_a), .b(name``_b), .err(name``_err), .err_neg(name``_en)); \
  always @(negedge clk) if (rst_n) begin \
    if (name``_q.size() > 0 && name``_due[0] == name``_cnt) begin \
      digit_t dg[]; longint e, xv; bit en; int leaf; \
      xv = name``_q.pop_front(); \
      void'(name``_due.pop_front()); \
      convert(xv, n, dg, e, en, leaf); \
      chk(name``_ov, $sformatf("out_valid %0d clock(s) after in_valid", lat)); \
      for (int k = 0; k < n; k++) \
        chk(name``_nz[k] == dg[k].nz && (!dg[k].nz || (name``_neg[k] == dg[k].neg && \
            int'($signed(name``_a[k])) == dg[k].a && int'($signed(name``_b[k])) == dg[k].b)), \
            $sformatf("n=%0d x=%0d digit %0d: %b %b %0d %0d expected %b %b %0d %0d", n, xv, k, name``_nz[k], \
                      name``_neg[k], $signed(name``_a[k]), $signed(name``_b[k]), dg[k].nz, dg[k].neg, dg[k].a, dg[k].b)); \
      chk(longint'(name``_err) == e && name``_en == en, $sformatf("n=%0d x=%0d err %0d expected %0d", n, xv, name``_err, e)); \
    end else chk(!name``_ov, "no out_valid without input"); \
  end \
  always @(negedge clk) name``_cnt <= name``_cnt + 1;

  `FF_DUT(u2, 2, 24, 1'b0, 1)
  `FF_DUT(u3, 3, 16, 1'b0, 1)
  `FF_DUT(u3p, 3, 16, 1'b1, 3)

  // Called right after the edge that took input v, before the next falling
  // edge; *_cnt counts the falling edges seen so far.
  task automatic push(longint v);
    u2_q.push_back(v);
    u2_due.push_back(u2_cnt);
    u3_q.push_back(longint'($signed(16'(v))));
    u3_due.push_back(u3_cnt);
    u3p_q.push_back(longint'($signed(16'(v))));
    u3p_due.push_back(u3p_cnt + 2);
  endtask

  initial begin
    build(R, D, XF, FRAC_W);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    x <= 24'sd845937; in_valid <= 1'b1;
    @(posedge clk);
    push(845937);
    x <= 24'sd0;
    #1;
    chk(u2_nz == 2'b11 && u2_neg == 2'b10 && $signed(u2_a[0]) == 15 && $signed(u2_b[0]) == 3 &&
        $signed(u2_a[1]) == 20 && $signed(u2_b[1]) == -3,
        $sformatf("example: %b %b a=%0d,%0d b=%0d,%0d", u2_nz, u2_neg, $signed(u2_a[0]), $signed(u2_a[1]),
                  $signed(u2_b[0]), $signed(u2_b[1])));
    // error 845937 - 884736 + 38836.1 = 37.1 (exact kernels)
    chk(real'(u2_err) / 256.0 > 30.0 && real'(u2_err) / 256.0 < 45.0 && !u2_en,
        $sformatf("example error %f", real'(u2_err) / 256.0));
    @(posedge clk);
    push(0);
    for (int n = 0; n < 2000; n++) begin
      longint v;
      v = longint'($signed(24'($urandom))) >>> ($urandom % 24);
      if (n == 0) v = -(64'sd1 << 23);
      if (n == 1) v = -(64'sd1 << 15);
      x <= 24'(v);
      @(posedge clk);
      push(v);
    end
    // A few isolated inputs, so that out_valid must drop between results.
    for (int n = 0; n < 20; n++) begin
      x <= 24'($urandom);
      in_valid <= 1'b1;
      @(posedge clk);
      push(longint'($signed(x)));
      in_valid <= 1'b0;
      repeat (1 + $urandom % 4) @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    chk(u2_q.size() == 0 && u3_q.size() == 0 && u3p_q.size() == 0, "all results delivered");
    report();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
