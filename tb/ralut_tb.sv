// ralut_tb: checks the range addressable look-up table for R=4, D=3.
//
// Part 1 drives each table address of the published R=4, D=3 table (the row
// values x_i, a_i, b_i and their successors x_{i+1}, a_{i+1}, b_{i+1}) and
// checks all six outputs, x to 6 decimals. Part 2 drives random mantissas in
// [1,2) and compares with a linear search of the reference table: the lower
// entry must be the largest x <= mant and the upper its successor.
module ralut_tb;
  import mdlns_ref_pkg::*;
  localparam int unsigned R = 4, D = 3, XF = 16;
  localparam int unsigned AT_W = mdlns_pkg::table_a_width(R, D);

  logic [XF:0]            mant;
  logic [XF+1:0]          x_lo, x_hi;
  logic signed [AT_W-1:0] a_lo, a_hi;
  logic signed [R-1:0]    b_lo, b_hi;
  int checks = 0, failures = 0;

  ralut #(.R(R), .D(D), .X_FRAC(XF)) dut (.*);

  // Published rows: x, a, b (successor is the next row; after the last, 2.0/1/0).
  real tx[17] = '{1.000000, 1.053498, 1.067871, 1.125000, 1.185185, 1.248590, 1.265625, 1.333333,
                  1.404664, 1.423828, 1.500000, 1.580247, 1.687500, 1.777778, 1.872885, 1.898437, 2.000000};
  int  ta[17] = '{0, 8, -11, -3, 5, 13, -6, 2, 10, -9, -1, 7, -4, 4, 12, -7, 1};
  int  tb[17] = '{0, -5, 7, 2, -3, -8, 4, -1, -6, 6, 1, -4, 3, -2, -7, 5, 0};

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic bit near(logic [XF+1:0] q, real v);
    real d = real'(q) / (2.0 ** XF) - v;
    return (d < 1.0e-5) && (d > -1.0e-5);
  endfunction

  initial begin
    build(R, D, XF, 0);
    for (int i = 0; i < 16; i++) begin
      mant = (XF + 1)'(tab_x[i]);  // address of row i
      #1;
      chk(near(x_lo, tx[i]) && int'(a_lo) == ta[i] && int'(b_lo) == tb[i],
          $sformatf("row %0d lower: x=%f a=%0d b=%0d", i, real'(x_lo) / 65536.0, a_lo, b_lo));
      chk(near(x_hi, tx[i+1]) && int'(a_hi) == ta[i+1] && int'(b_hi) == tb[i+1],
          $sformatf("row %0d upper: x=%f a=%0d b=%0d", i, real'(x_hi) / 65536.0, a_hi, b_hi));
    end
    for (int n = 0; n < 2000; n++) begin
      int i;
      mant = {1'b1, XF'($urandom)};
      if (n == 0) mant = {1'b1, {XF{1'b1}}};
      #1;
      i = 0;
      foreach (tab_x[k]) if (tab_x[k] <= longint'(mant)) i = k;
      chk(longint'(x_lo) == tab_x[i] && int'(a_lo) == tab_a[i] && int'(b_lo) == tab_b[i],
          $sformatf("mant %h lower entry", mant));
      if (i < 15)
        chk(longint'(x_hi) == tab_x[i+1] && int'(a_hi) == tab_a[i+1] && int'(b_hi) == tab_b[i+1],
            $sformatf("mant %h upper entry", mant));
      else
        chk(x_hi == (XF + 2)'(2 << XF) && a_hi == 1 && b_hi == 0, $sformatf("mant %h top entry", mant));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
