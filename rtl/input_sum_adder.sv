// Input-sum adder: the "Sum" half of the Sum+Multi operation.
//
// In one step the m activated wordlines each carry a 1-bit input, so the
// term sum(x_i) that multiplies the digital offset is the number of ones
// among those m bits. This unit adds the m bits with a balanced tree of
// adders, combinationally, and gives a clog2(m+1)-bit result (8 bits for
// m = 128, as the 8-by-8 offset multiplier expects). The adder is not
// shared: one per crossbar, used once per step.
module input_sum_adder
  import dofs_pkg::*;
#(
  parameter int M     = M_SHARE,
  parameter int SUM_B = $clog2(M + 1)
) (
  input  logic [M-1:0]     bits,
  output logic [SUM_B-1:0] sum
);

  // Pad to a power of two and add pairwise, level by level.
  localparam int P      = 1 << $clog2(M);
  localparam int LEVELS = $clog2(M);

  logic [SUM_B-1:0] node [LEVELS+1][P];

  always_comb begin
    for (int i = 0; i < P; i++)
      node[0][i] = (i < M) ? SUM_B'(bits[i]) : '0;
    for (int l = 1; l <= LEVELS; l++)
      for (int i = 0; i < P; i++)
        node[l][i] = (i < (P >> l)) ? node[l-1][2*i] + node[l-1][2*i+1] : '0;
  end

  assign sum = node[LEVELS][0];

endmodule
