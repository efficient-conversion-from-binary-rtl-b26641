// mdlns_comparator_tb: random and equal operands; the smaller wins, a tie
// keeps the first operand.
module mdlns_comparator_tb;
  localparam int unsigned W = 24;
  logic [W-1:0] err_a, err_b, err_min;
  logic         sel_b;
  `include "tb_check.svh"

  mdlns_comparator #(.W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      err_a = W'($urandom);
      err_b = (n % 5 == 0) ? err_a : W'($urandom);
      if (n % 7 == 0) err_b = err_a - 1;
      if (n % 11 == 0) err_b = err_a + 1;
      #1;
      chk(sel_b == (err_b < err_a) && err_min == ((err_b < err_a) ? err_b : err_a),
          $sformatf("a=%0d b=%0d sel=%b min=%0d", err_a, err_b, sel_b, err_min));
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
