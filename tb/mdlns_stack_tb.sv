// mdlns_stack_tb: random level writes against a model array; checks the read
// port, the parallel view, reset and that a write touches only its two entries.
module mdlns_stack_tb;
  localparam int unsigned DEPTH = 8, EW = 20;
  localparam int unsigned IW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [IW-1:0] wr_lvl = '0, rd_idx = '0;
  logic [EW-1:0] wr_lo = '0, wr_hi = '0, rd_data;
  logic [DEPTH-1:0][EW-1:0] all;
  logic [EW-1:0] model [DEPTH];
  `include "tb_check.svh"

  mdlns_stack #(.DEPTH(DEPTH), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    chk(all == '0, "reset clears");
    for (int n = 0; n < 500; n++) begin
      int lv;
      lv = $urandom % (DEPTH / 2);
      wr_en  <= 1'($urandom);
      wr_lvl <= IW'(lv);
      wr_lo  <= EW'($urandom);
      wr_hi  <= EW'($urandom);
      @(posedge clk);
      if (wr_en) begin
        model[2 * lv]     = wr_lo;
        model[2 * lv + 1] = wr_hi;
      end
      @(negedge clk);
      for (int i = 0; i < int'(DEPTH); i++) begin
        rd_idx = IW'(i);
        #1;
        chk(rd_data == model[i] && all[i] == model[i], $sformatf("entry %0d", i));
      end
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
