// sign_separator: splits a two's complement integer into sign and magnitude.
//
// The converters work on magnitudes and carry the sign separately, and a zero
// input is a special case because no MDLNS digit equals zero. The magnitude is
// DATA_W bits wide so that -2^(DATA_W-1) is represented. Purely combinational.
// The separation itself follows the document; the two's complement input
// format is this design's choice.
module sign_separator #(
  parameter int unsigned DATA_W = mdlns_pkg::DEF_DATA_W
) (
  input  logic signed [DATA_W-1:0] x,
  output logic                     neg,   // x < 0
  output logic [DATA_W-1:0]        mag,   // |x|
  output logic                     zero   // x == 0
);
  always_comb begin
    neg  = x[DATA_W-1];
    mag  = neg ? DATA_W'(-x) : DATA_W'(x);
    zero = (x == '0);
  end
endmodule
