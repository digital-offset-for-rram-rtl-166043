// Wallace-tree multiplier for the digital-offset term b * sum(x).
//
// Multiplies a signed A_B-bit offset by an unsigned B_B-bit input sum
// (8 by 8 by default) and gives the exact signed product, combinationally.
// The partial products are the sign-extended offset, shifted and gated by
// each bit of the sum. They are reduced three rows at a time by layers of
// carry-save (3:2) adders until two rows remain, and one carry-propagate
// adder gives the result. The multiplier is shared by all weight columns of
// the crossbar and used once per column per step.
module wallace_mult
  import dofs_pkg::*;
#(
  parameter int A_B = OFFSET_BITS,
  parameter int B_B = 8,
  parameter int P_B = A_B + B_B
) (
  input  logic signed [A_B-1:0] a,
  input  logic        [B_B-1:0] b,
  output logic signed [P_B-1:0] p
);

  // Enough layers to reduce B_B rows to two (each layer keeps ceil(2n/3)).
  localparam int LAYERS = 2 * $clog2(B_B + 1) + 2;

  logic [P_B-1:0] rows [LAYERS+1][B_B];
  int             n    [LAYERS+1];

  always_comb begin
    for (int l = 0; l <= LAYERS; l++)
      for (int i = 0; i < B_B; i++) rows[l][i] = '0;
    // Partial products.
    for (int i = 0; i < B_B; i++)
      rows[0][i] = b[i] ? (P_B'(a) << i) : '0;
    n[0] = B_B;
    // Carry-save reduction layers.
    for (int l = 0; l < LAYERS; l++) begin
      int k;
      k = 0;
      for (int i = 0; i + 2 < n[l]; i += 3) begin
        rows[l+1][k]   = rows[l][i] ^ rows[l][i+1] ^ rows[l][i+2];
        rows[l+1][k+1] = ((rows[l][i] & rows[l][i+1]) |
                          (rows[l][i] & rows[l][i+2]) |
                          (rows[l][i+1] & rows[l][i+2])) << 1;
        k += 2;
      end
      for (int i = (n[l] / 3) * 3; i < n[l]; i++) begin
        rows[l+1][k] = rows[l][i];
        k += 1;
      end
      n[l+1] = (n[l] <= 2) ? n[l] : k;
      if (n[l] <= 2) begin
        rows[l+1][0] = rows[l][0];
        rows[l+1][1] = (n[l] > 1) ? rows[l][1] : '0;
      end
    end
  end

  assign p = signed'(rows[LAYERS][0] + rows[LAYERS][1]);

endmodule
