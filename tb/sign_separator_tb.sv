// sign_separator_tb: edge values and random inputs against sign/|x|/zero.
module sign_separator_tb;
  localparam int unsigned W = 16;
  logic signed [W-1:0] x;
  logic                neg, zero;
  logic [W-1:0]        mag;
  `include "tb_check.svh"

  sign_separator #(.DATA_W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      longint v;
      case (n)
        0: x = 0;
        1: x = -32768;
        2: x = 32767;
        3: x = -1;
        default: x = W'($urandom);
      endcase
      #1;
      v = longint'(x);
      chk(neg == (v < 0) && zero == (v == 0) && longint'(mag) == (v < 0 ? -v : v),
          $sformatf("x=%0d neg=%b mag=%0d zero=%b", x, neg, mag, zero));
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
