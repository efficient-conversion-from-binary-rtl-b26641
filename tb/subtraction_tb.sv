// subtraction_tb: random targets with bracketing table values; checks both
// errors and both digit exponents against products computed in the testbench,
// including the published example 845937 ~ 1.580247 * 2^19 (a = 7 + 19).
module subtraction_tb;
  localparam int unsigned VW = 32, XF = 16, AT_W = 6, A_W = 8, FRAC_W = 8;
  localparam int unsigned P_W = $clog2(VW), E_W = $clog2(2 * VW) + 1;
  logic [VW-1:0]          v;
  logic [P_W-1:0]         p;
  logic signed [E_W-1:0]  e;
  logic [XF+1:0]          x_lo, x_hi;
  logic signed [AT_W-1:0] a_lo, a_hi;
  logic [VW-1:0]          err_lo, err_hi;
  logic signed [A_W-1:0]  dig_a_lo, dig_a_hi;
  `include "tb_check.svh"

  subtraction #(.VW(VW), .X_FRAC(XF), .AT_W(AT_W), .A_W(A_W)) dut (.*);

  initial begin
    // 845937 with 8 fraction bits; entries 1.580247 (a=7) and 1.687500 (a=-4).
    v = 32'(845937) << FRAC_W; p = P_W'(19 + FRAC_W); e = 19;
    x_lo = 18'(103563); a_lo = 7;   // 1.580247 * 2^16, rounded
    x_hi = 18'(110592); a_hi = -4;   // 1.6875 * 2^16
    #1;
    chk(dig_a_lo == 26 && dig_a_hi == 15, "example exponents 7+19, -4+19");
    // 845937 - 828504.5 = 17432.5 with the exact kernel; rounding 1.580247 to
    // 16 fraction bits moves the product by up to 2^19 * 2^-17 = 4.
    // 884736 - 845937 = 38799 exactly (1.6875 is exact).
    chk(real'(err_lo) / 256.0 > 17428.0 && real'(err_lo) / 256.0 < 17437.0, $sformatf("example err_lo %f", real'(err_lo) / 256.0));
    chk(err_hi == 32'(38799) << FRAC_W, $sformatf("example err_hi %f", real'(err_hi) / 256.0));
    for (int n = 0; n < 3000; n++) begin
      longint m, xl, xh, al, ah;
      int pp;
      pp   = $urandom % VW;
      m    = 64'h10000 | (64'($urandom) % 64'd65536);
      v    = VW'((m << pp) >> XF) | VW'(1 << pp);
      xl   = 64'h10000 + (longint'(64'($urandom)) % (((longint'(v) << XF) >> pp) - 64'h10000 + 1));
      xh   = ((longint'(v) << XF) >> pp) + 1 + longint'(64'($urandom) % 1000);
      if (xh > (64'd2 << XF)) xh = 64'd2 << XF;
      x_lo = (XF + 2)'(xl); x_hi = (XF + 2)'(xh);
      p    = P_W'(pp);
      e    = E_W'(pp - int'(FRAC_W));
      a_lo = AT_W'($urandom % 30 - 15); a_hi = AT_W'($urandom % 30 - 15);
      #1;
      al = longint'(v) - ((xl << pp) >> XF);
      ah = ((xh << pp) >> XF) - longint'(v);
      chk(longint'(err_lo) == al && longint'(err_hi) == ah,
          $sformatf("v=%h p=%0d xl=%h xh=%h err %h/%h expected %h/%h", v, pp, xl, xh, err_lo, err_hi, al, ah));
      chk(int'(dig_a_lo) == int'(a_lo) + pp - int'(FRAC_W) && int'(dig_a_hi) == int'(a_hi) + pp - int'(FRAC_W),
          "digit exponents");
    end
    report();
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
