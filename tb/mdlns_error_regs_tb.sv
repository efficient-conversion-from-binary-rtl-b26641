// mdlns_error_regs_tb: sequences of leaf errors; better must flag the first
// leaf after clear and every strictly smaller one, and Best Error must track
// the minimum of the taken leaves.
module mdlns_error_regs_tb;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, take = 0;
  logic [W-1:0] leaf_err = '0, err, best_err;
  logic have_best, better;
  `include "tb_check.svh"

  mdlns_error_regs #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int conv = 0; conv < 200; conv++) begin
      longint best;
      best = -1;
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      for (int leaf = 0; leaf < 1 + $urandom % 8; leaf++) begin
        logic [W-1:0] e;
        e = (leaf > 0 && $urandom % 4 == 0) ? W'(best) : W'($urandom % 200);
        leaf_err <= e;
        load     <= 1'b1;
        @(posedge clk);
        load <= 1'b0;
        #1;
        chk(err == e, "Error register loads");
        chk(better == (best < 0 || longint'(e) < best), $sformatf("better for %0d against %0d", e, best));
        take <= better;
        @(posedge clk);
        take <= 1'b0;
        if (best < 0 || longint'(e) < best) best = longint'(e);
        #1;
        chk(have_best && longint'(best_err) == best, "Best Error holds the minimum");
      end
    end
    report();
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
