// ralut: range addressable look-up table for single-digit MDLNS matching.
//
// The table holds every normalized single-digit MDLNS kernel x = 2^a * D^b in
// [1,2), one per b in [-2^(R-1), 2^(R-1)-1], with a = ceil(-b*log2(D)), sorted
// by x. Unlike an ordinary ROM, whose decoder matches the address exactly, each
// row k here compares "mant >= x_k". Because the rows are sorted, the compare
// outputs form a thermometer code; XORing each compare output with the one of
// the next row (the last row with constant 0) leaves exactly one word line
// active: the row with x_k <= mant < x_{k+1}. That word line drives the row's
// data: the entry itself (x_lo, a_lo, b_lo) and the entry after it (x_hi,
// a_hi, b_hi), so that the caller can test both neighbours of the input. The
// row after the last one is 2.0 = 2^1 * D^0.
//
// The table contents are computed at elaboration from R and D (an odd
// integer) by repeated multiplication/division by D with renormalization into
// [1,2), using 56 fraction bits, then rounded to X_FRAC fraction bits.
// Purely combinational. mant must be in [1,2); mant = 0 (a zero input) drives
// all outputs to 0.
//
// Follows the document: the >= comparators, the neighbour XORs with a grounded
// last input, and the two-entry rows. Own choices: integer D, X_FRAC and the
// AND-OR read-out of the word lines.
module ralut #(
  parameter int unsigned R      = mdlns_pkg::DEF_R,
  parameter int unsigned D      = mdlns_pkg::DEF_D,
  parameter int unsigned X_FRAC = mdlns_pkg::DEF_X_FRAC,
  parameter int unsigned AT_W   = mdlns_pkg::table_a_width(R, D)
) (
  input  logic [X_FRAC:0]          mant,   // 1.X_FRAC
  output logic [X_FRAC+1:0]        x_lo,   // 2.X_FRAC, entry <= mant
  output logic signed [AT_W-1:0]   a_lo,
  output logic signed [R-1:0]      b_lo,
  output logic [X_FRAC+1:0]        x_hi,   // next entry, > mant
  output logic signed [AT_W-1:0]   a_hi,
  output logic signed [R-1:0]      b_hi
);
  localparam int unsigned M    = 2 ** R;
  localparam int unsigned X_W  = X_FRAC + 2;
  localparam int unsigned ENT_W = X_W + AT_W + R;
  localparam int unsigned GF   = 56;   // guard fraction bits for table generation

  typedef logic [M-1:0][ENT_W-1:0] table_t;

  // Builds the sorted table: entry = {x, a, b}.
  function automatic table_t build_table();
    table_t t;
    logic [X_W-1:0]        xs [M];
    logic signed [AT_W-1:0] as [M];
    logic signed [R-1:0]   bs [M];
    longint unsigned acc;
    int ea;
    int eb;
    logic [X_W-1:0]        tx;
    logic signed [AT_W-1:0] ta;
    logic signed [R-1:0]   tb;
    for (int k = 0; k < int'(M); k++) begin
      eb   = k - int'(M / 2);
      acc = 64'd1 << GF;
      ea   = 0;
      if (eb > 0) begin
        for (int j = 0; j < eb; j++) begin
          acc = acc * longint'(D);
          while (acc >= (64'd2 << GF)) begin
            acc = acc >> 1;
            ea   = ea - 1;
          end
        end
      end else if (eb < 0) begin
        for (int j = 0; j < -eb; j++) begin
          acc = acc / longint'(D);
          while (acc < (64'd1 << GF)) begin
            acc = acc << 1;
            ea   = ea + 1;
          end
        end
      end
      acc   = (acc + (64'd1 << (GF - X_FRAC - 1))) >> (GF - X_FRAC);
      xs[k] = X_W'(acc);
      as[k] = AT_W'(ea);
      bs[k] = R'(eb);
    end
    // Sort ascending by x.
    for (int i = 0; i < int'(M) - 1; i++) begin
      for (int j = 0; j < int'(M) - 1 - i; j++) begin
        if (xs[j] > xs[j+1]) begin
          tx = xs[j]; xs[j] = xs[j+1]; xs[j+1] = tx;
          ta = as[j]; as[j] = as[j+1]; as[j+1] = ta;
          tb = bs[j]; bs[j] = bs[j+1]; bs[j+1] = tb;
        end
      end
    end
    for (int k = 0; k < int'(M); k++) t[k] = {xs[k], as[k], bs[k]};
    return t;
  endfunction

  localparam table_t TABLE = build_table();
  // Entry following the last one: 2.0 = 2^1 * D^0.
  localparam logic [ENT_W-1:0] TOP_ENTRY = {X_W'(2) << X_FRAC, AT_W'(1), R'(0)};

  logic [M-1:0] ge;     // mant >= address of row k
  logic [M-1:0] wl;     // word lines

  always_comb begin
    for (int k = 0; k < int'(M); k++)
      ge[k] = ({1'b0, mant} >= TABLE[k][ENT_W-1 -: X_W]);
    for (int k = 0; k < int'(M) - 1; k++)
      wl[k] = ge[k] ^ ge[k+1];
    wl[M-1] = ge[M-1] ^ 1'b0;
  end

  logic [ENT_W-1:0] lo_ent, hi_ent;

  always_comb begin
    lo_ent = '0;
    hi_ent = '0;
    for (int k = 0; k < int'(M); k++) begin
      lo_ent |= {ENT_W{wl[k]}} & TABLE[k];
      hi_ent |= {ENT_W{wl[k]}} & ((k == int'(M) - 1) ? TOP_ENTRY : TABLE[(k + 1) % M]);
    end
  end

  assign {x_lo, a_lo, b_lo} = lo_ent;
  assign {x_hi, a_hi, b_hi} = hi_ent;

  // At most one word line may be active.
  always_comb assert ((wl & (wl - 1'b1)) == '0) else $error("ralut: several word lines active");
endmodule
