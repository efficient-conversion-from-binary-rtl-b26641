// normalizer_tb: v = mant * 2^e with mant in [1,2): random values of every
// magnitude, checked against a leading-one search and a truncating shift.
module normalizer_tb;
  localparam int unsigned VW = 24, FRAC_W = 8, XF = 16;
  localparam int unsigned P_W = $clog2(VW), E_W = $clog2(2 * VW) + 1;
  logic [VW-1:0]         v;
  logic [XF:0]           mant;
  logic [P_W-1:0]        p;
  logic signed [E_W-1:0] e;
  logic                  zero;
  `include "tb_check.svh"

  normalizer #(.VW(VW), .FRAC_W(FRAC_W), .X_FRAC(XF)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int ep;
      longint em;
      if (n == 0) v = '0;
      else if (n == 1) v = 1;
      else if (n == 2) v = '1;
      else v = VW'($urandom) >> ($urandom % VW);
      #1;
      ep = -1;
      for (int i = 0; i < int'(VW); i++) if (v[i]) ep = i;
      if (v == 0) begin
        chk(zero && mant == 0, "zero input");
      end else begin
        em = (longint'(v) << XF) >> ep;
        chk(!zero && int'(p) == ep && int'(e) == ep - int'(FRAC_W) && longint'(mant) == em,
            $sformatf("v=%h p=%0d e=%0d mant=%h expected p=%0d mant=%h", v, p, e, mant, ep, em));
      end
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
