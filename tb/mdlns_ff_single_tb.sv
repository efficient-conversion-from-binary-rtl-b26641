// mdlns_ff_single_tb: feed-forward single-digit converter, 24-bit inputs.
//
// Checks the published example 845937 -> 2^(7+19) * 3^-4 (= 828505), zero,
// negative inputs and random inputs against the reference model, one new
// input every clock; every result must appear exactly one clock after its
// input (latency 1, throughput 1 per clock).
module mdlns_ff_single_tb;
  import mdlns_ref_pkg::*;
  localparam int unsigned R = 4, D = 3, DATA_W = 24, FRAC_W = 8, XF = 16, A_W = 8;
  localparam int unsigned VW = DATA_W + FRAC_W;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DATA_W-1:0] x = '0;
  logic out_valid, nz, neg, err_neg;
  logic signed [A_W-1:0] a;
  logic signed [R-1:0]   b;
  logic [VW-1:0]         err;
  `include "tb_check.svh"

  mdlns_ff_single #(.R(R), .D(D), .DATA_W(DATA_W), .FRAC_W(FRAC_W), .X_FRAC(XF), .A_W(A_W)) dut (.*);

  always #5 clk = ~clk;

  longint exp_q[$];

  // Scoreboard, half a clock after each edge: the result of the input taken
  // at that edge must be on the outputs.
  always @(negedge clk) begin
    if (rst_n) begin
      if (exp_q.size() > 0) begin
        digit_t dg[];
        longint e, xv;
        bit en;
        int leaf;
        xv = exp_q.pop_front();
        convert(xv, 1, dg, e, en, leaf);
        chk(out_valid, "out_valid one clock after in_valid");
        chk(nz == dg[0].nz && (!dg[0].nz || (neg == dg[0].neg && int'(a) == dg[0].a && int'(b) == dg[0].b)),
            $sformatf("x=%0d got nz=%b neg=%b a=%0d b=%0d exp %b %b %0d %0d", xv, nz, neg, a, b,
                      dg[0].nz, dg[0].neg, dg[0].a, dg[0].b));
        chk(longint'(err) == e && err_neg == en, $sformatf("x=%0d err", xv));
      end else begin
        chk(!out_valid, "no out_valid without input");
      end
    end
  end

  task automatic drive(longint v);
    x        <= DATA_W'(v);
    in_valid <= 1'b1;
    @(posedge clk);
    exp_q.push_back(v);
    in_valid <= 1'b0;
  endtask

  initial begin
    build(R, D, XF, FRAC_W);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // Published example.
    x <= 24'sd845937; in_valid <= 1'b1;
    @(posedge clk);
    exp_q.push_back(845937);
    in_valid <= 1'b0;
    #1;
    chk(nz && !neg && a == 26 && b == -4, $sformatf("845937 -> a=%0d b=%0d", a, b));
    drive(0);
    drive(-845937);
    drive(1);
    drive(-(64'sd1 << (DATA_W - 1)));
    // Back-to-back random inputs.
    for (int n = 0; n < 2000; n++) begin
      longint v;
      v = longint'($signed(DATA_W'($urandom))) >>> ($urandom % DATA_W);
      x        <= DATA_W'(v);
      in_valid <= 1'b1;
      @(posedge clk);
      exp_q.push_back(v);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    report();
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    report();
  end
endmodule
