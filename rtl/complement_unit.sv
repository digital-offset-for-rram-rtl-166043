// Complement post-processing for offset sets stored in complemented form.
//
// When a set's weights w are stored as their complements (2^n-1) - w, the
// crossbar (plus offset) yields z' = sum(~w * x) over the set, and the wanted
// partial product is z = (2^n-1)*sum(x) - z'. With `comp` high this unit
// returns (2^n-1)*s - z', otherwise z' unchanged, combinationally; s is the
// input sum of the set for the current input bit. The multiplication by
// 2^n-1 is a shift and a subtraction.
module complement_unit
  import dofs_pkg::*;
#(
  parameter int W_B   = WEIGHT_BITS,
  parameter int S_B   = $clog2(M_SHARE + 1),
  parameter int Z_B   = 24
) (
  input  logic                  comp,
  input  logic        [S_B-1:0] s,
  input  logic signed [Z_B-1:0] z_in,
  output logic signed [Z_B-1:0] z_out
);

  logic signed [Z_B-1:0] full_scale;

  assign full_scale = (Z_B'(s) << W_B) - Z_B'(s);
  assign z_out      = comp ? full_scale - z_in : z_in;

endmodule
