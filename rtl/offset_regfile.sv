// Digital offset register file of one crossbar.
//
// One register per set of weights that shares an offset: with a crossbar of
// S rows holding l weight columns and a sharing granularity m there are
// H = S*l/m entries (256 for 128 rows, 32 weight columns and m = 16). Entry
// col*GROUPS + grp belongs to weight column `col` and wordline group `grp`.
// Each entry holds the signed 8-bit offset b and a flag telling that the
// weights of the set are stored complemented. Entries are written one per
// clock (after post-writing tuning has chosen them) and read combinationally
// by the time-multiplexed offset multiplier. Storing the complement flag next
// to the offset, and the reset value 0, are this design's choices.
module offset_regfile
  import dofs_pkg::*;
#(
  parameter int ROWS_P = ROWS,
  parameter int WCOL_P = WCOLS,
  parameter int M      = M_SHARE,
  parameter int H      = ROWS_P * WCOL_P / M
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [$clog2(H)-1:0]   waddr,
  input  offset_entry_t          wdata,
  input  logic [$clog2(H)-1:0]   raddr,
  output offset_entry_t          rdata
);

  offset_entry_t regs [H];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < H; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];

endmodule
