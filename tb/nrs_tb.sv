// nrs_tb: one greedy step on random residuals of every size and sign, and on
// zero, compared field by field with the reference model.
module nrs_tb;
  import mdlns_ref_pkg::*;
  localparam int unsigned R = 4, D = 3, VW = 24, FRAC_W = 8, XF = 16, A_W = 8;
  logic [VW-1:0]         v, lo_res, hi_res;
  logic                  neg, lo_nz, lo_neg, lo_res_neg, hi_nz, hi_neg, hi_res_neg;
  logic signed [A_W-1:0] lo_a, hi_a;
  logic signed [R-1:0]   lo_b, hi_b;
  `include "tb_check.svh"

  nrs #(.R(R), .D(D), .VW(VW), .FRAC_W(FRAC_W), .X_FRAC(XF), .A_W(A_W)) dut (.*);

  initial begin
    build(R, D, XF, FRAC_W);
    for (int n = 0; n < 3000; n++) begin
      step_t s;
      v   = (n == 0) ? '0 : VW'($urandom) >> ($urandom % VW);
      neg = 1'($urandom);
      #1;
      s = step(longint'(v), neg);
      chk(lo_nz == s.lo_d.nz && lo_neg == s.lo_d.neg && hi_nz == s.hi_d.nz && hi_neg == s.hi_d.neg,
          $sformatf("v=%h signs", v));
      if (s.lo_d.nz)
        chk(int'(lo_a) == s.lo_d.a && int'(lo_b) == s.lo_d.b && int'(hi_a) == s.hi_d.a && int'(hi_b) == s.hi_d.b,
            $sformatf("v=%h digits %0d/%0d %0d/%0d expected %0d/%0d %0d/%0d", v, lo_a, lo_b, hi_a, hi_b,
                      s.lo_d.a, s.lo_d.b, s.hi_d.a, s.hi_d.b));
      chk(longint'(lo_res) == s.lo_res && longint'(hi_res) == s.hi_res &&
          lo_res_neg == s.lo_res_neg && hi_res_neg == s.hi_res_neg,
          $sformatf("v=%h residuals %h %h expected %h %h", v, lo_res, hi_res, s.lo_res, s.hi_res));
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
