// Input register of the crossbar unit.
//
// Holds the INPUT_BITS-bit input vector x (one entry per wordline), written
// one entry per clock through in_we/in_addr/in_data. Inputs enter the
// crossbar one bit at a time, as 1-bit wordline voltages, and only the m
// wordlines of one group are driven at once: when `drive` is high, bit
// `bit_sel` of rows grp*M .. grp*M+M-1 appears on those wordlines of `wl`
// and every other wordline stays at 0. The same m bits are given on
// `grp_bits` for the input-sum adder. Reads are combinational.
// Bit-serial inputs and m active wordlines follow the architecture; the
// write port is this design's own choice.
module input_register
  import dofs_pkg::*;
#(
  parameter int ROWS_P = ROWS,
  parameter int IN_B   = INPUT_BITS,
  parameter int M      = M_SHARE,
  parameter int GROUPS = ROWS_P / M
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_we,
  input  logic [$clog2(ROWS_P)-1:0]         in_addr,
  input  logic [IN_B-1:0]                   in_data,
  input  logic                              drive,
  input  logic [$clog2(GROUPS+1)-1:0]       grp,
  input  logic [$clog2(IN_B)-1:0]           bit_sel,
  output logic [ROWS_P-1:0]                 wl,
  output logic [M-1:0]                      grp_bits
);

  logic [IN_B-1:0] x [ROWS_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS_P; r++) x[r] <= '0;
    end else if (in_we) begin
      x[in_addr] <= in_data;
    end
  end

  always_comb begin
    wl       = '0;
    grp_bits = '0;
    for (int r = 0; r < ROWS_P; r++) begin
      if (drive && (r / M) == int'(grp)) begin
        wl[r]           = x[r][bit_sel];
        grp_bits[r % M] = x[r][bit_sel];
      end
    end
  end

endmodule
