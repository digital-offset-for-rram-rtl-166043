// Behavioural model of an RRAM crossbar (analog part, not synthesizable).
//
// The array has ROWS wordlines and BITLINES bitlines; each cell is a
// multi-level memristor with 2**CELL_BITS nominal states. A cell is modelled
// by its conductance, kept as an unsigned fixed-point number in units of one
// nominal level (G_FRAC fractional bits), so a cell programmed to level l
// nominally conducts l units, and a sum of cell currents in those units is
// the digital value an ideal ADC would return.
//
// Programming (prog_en, one cell per clock) applies the variation model of
// the evaluation: the conductance written is G(l) * exp(theta), with theta
// drawn fresh from N(0, SIGMA) at every write, so rewriting the same cell
// gives a different value (cycle-to-cycle variation). The lowest state is
// not zero: the ON/OFF ratio ON_OFF sets it to (2**CELL_BITS-1)/ON_OFF and
// the other states are evenly spaced above it.
//
// Testing (test_row/test_bl -> test_g) reads back the actual conductance of
// one device, combinationally, as the post-writing tuning flow requires.
//
// Reading: a 1 on wl[r] applies the read voltage (a 1-bit input) to row r.
// bl_cur[c] is the sum of the conductances of column c on the driven rows,
// combinationally (Kirchhoff's current law). Reset puts every cell in the
// lowest state.
module rram_crossbar
  import dofs_pkg::*;
#(
  parameter int  ROWS_P     = ROWS,
  parameter int  BL_P       = BITLINES,
  parameter int  CELL_B     = CELL_BITS,
  parameter int  GF         = G_FRAC,
  parameter int  GB         = G_BITS,
  parameter real SIGMA      = 0.5,
  parameter real ON_OFF     = 200.0,
  parameter int  SEED       = 1,
  parameter int  CUR_BITS   = GB + $clog2(ROWS_P)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // programming port
  input  logic                        prog_en,
  input  logic [$clog2(ROWS_P)-1:0]   prog_row,
  input  logic [$clog2(BL_P)-1:0]     prog_bl,
  input  logic [CELL_B-1:0]           prog_level,
  // device test port
  input  logic [$clog2(ROWS_P)-1:0]   test_row,
  input  logic [$clog2(BL_P)-1:0]     test_bl,
  output logic [GB-1:0]               test_g,
  // read (VMM) port
  input  logic [ROWS_P-1:0]           wl,
  output logic [CUR_BITS-1:0]         bl_cur [BL_P]
);

  localparam real TOP_LEVEL = real'((1 << CELL_B) - 1);
  localparam real G_LOW     = TOP_LEVEL / ON_OFF;
  localparam real G_MAX     = real'((1 << GB) - 1);

  logic [GB-1:0] cond [ROWS_P][BL_P];

  // Standard normal sample by the Box-Muller transform.
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // Conductance written when a cell is programmed to a level.
  function automatic logic [GB-1:0] program_value(input logic [CELL_B-1:0] level);
    real g;
    g = G_LOW + real'(level) * (TOP_LEVEL - G_LOW) / TOP_LEVEL;
    g = g * $exp(SIGMA * gauss()) * real'(1 << GF);
    if (g > G_MAX) g = G_MAX;
    return GB'($rtoi(g + 0.5));
  endfunction

  function automatic logic [GB-1:0] low_value();
    return GB'($rtoi(G_LOW * real'(1 << GF) + 0.5));
  endfunction

  initial begin
    void'($urandom(SEED));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS_P; r++)
        for (int c = 0; c < BL_P; c++)
          cond[r][c] <= low_value();
    end else if (prog_en) begin
      cond[prog_row][prog_bl] <= program_value(prog_level);
    end
  end

  assign test_g = cond[test_row][test_bl];

  always_comb begin
    for (int c = 0; c < BL_P; c++) begin
      bl_cur[c] = '0;
      for (int r = 0; r < ROWS_P; r++)
        if (wl[r]) bl_cur[c] = bl_cur[c] + CUR_BITS'(cond[r][c]);
    end
  end

endmodule
