// mdlns_best_stack_tb: the best stack takes the whole source on copy, holds
// it otherwise and empties on clear.
module mdlns_best_stack_tb;
  localparam int unsigned DEPTH = 4, EW = 12;
  logic clk = 0, rst_n = 0, clear = 0, copy = 0;
  logic [DEPTH-1:0][EW-1:0] src = '0, q, model;
  `include "tb_check.svh"

  mdlns_best_stack #(.DEPTH(DEPTH), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 500; n++) begin
      logic c, k;
      c = ($urandom % 3 == 0);
      k = ($urandom % 11 == 0);
      src   <= (DEPTH * EW)'({$urandom, $urandom});
      copy  <= c;
      clear <= k;
      @(posedge clk);
      if (k) model = '0;
      else if (c) model = src;
      @(negedge clk);
      chk(q == model, $sformatf("step %0d copy=%b clear=%b", n, c, k));
    end
    report();
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
