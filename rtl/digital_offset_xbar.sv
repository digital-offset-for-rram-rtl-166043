// One crossbar unit of a one-crossbar RRAM accelerator with digital offsets.
//
// The crossbar stores a weight matrix as non-negative WEIGHT_BITS-bit values
// (shifted by w_shift), each split over SLC cells of CELL_B bits on adjacent
// bitlines, so a 128 x 128 crossbar of 2-bit cells holds 128 rows x 32
// weight columns (CELL_B = 1 gives the single-level-cell variant, 16
// columns).
// Device variation makes the stored (real) weights V differ from their
// targets. Each set of m weights of a column that are read together (one
// wordline group) shares a digital offset b, and the unit computes
//     y_c = sum_g sum_{i in g} (V_ic + b_gc) x_i  - w_shift * sum_i x_i
// with the per-set option of complemented storage,
//     set result = (2^n-1) sum x - sum (V + b) x.
// The offset term b * sum(x) is formed digitally: an adder counts the ones
// among the m 1-bit inputs of a step and a multiplier, shared by all weight
// columns, multiplies that count by the column's offset; the product enters
// the shift-and-add unit with the crossbar's column value.
//
// Interface: program cells (prog_*), read a cell's actual conductance back
// (test_*), load offsets and complement flags (ofs_*, entry col*GROUPS+grp),
// load the input vector (in_*), then pulse `start`; `done` pulses after
// IN_B*STEPS*(BL_P+2)+1 clocks and y holds the WCOL_P column results.
// ACT wordlines are driven per step (STEPS = ROWS_P/ACT steps per input
// bit); an offset set spans M rows, M a multiple of ACT, so with ACT < M a
// set's offset is applied in M/ACT successive steps. ACT = M is the default.
// offset_en = 0 runs the plain datapath with no offsets.
// The crossbar and the sample-and-hold/ADC are behavioural models; all else
// is synthesizable.
module digital_offset_xbar
  import dofs_pkg::*;
#(
  parameter int  ROWS_P = ROWS,
  parameter int  BL_P   = BITLINES,
  parameter int  M      = M_SHARE,
  parameter int  ACT    = M,
  parameter int  ADC_B  = ADC_BITS,
  parameter real SIGMA  = 0.5,
  parameter int  SEED   = 1,
  parameter int  CELL_B = CELL_BITS,
  parameter int  SLC    = WEIGHT_BITS / CELL_B,
  parameter int  WCOL_P = BL_P / SLC,
  parameter int  GROUPS = ROWS_P / M,
  parameter int  STEPS  = ROWS_P / ACT,
  parameter int  H      = ROWS_P * WCOL_P / M
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // crossbar programming
  input  logic                          prog_en,
  input  logic [$clog2(ROWS_P)-1:0]     prog_row,
  input  logic [$clog2(BL_P)-1:0]       prog_bl,
  input  logic [CELL_B-1:0]             prog_level,
  // device test
  input  logic [$clog2(ROWS_P)-1:0]     test_row,
  input  logic [$clog2(BL_P)-1:0]       test_bl,
  output logic [G_BITS-1:0]             test_g,
  // offset register file
  input  logic                          ofs_we,
  input  logic [$clog2(H)-1:0]          ofs_addr,
  input  offset_entry_t                 ofs_data,
  // input vector
  input  logic                          in_we,
  input  logic [$clog2(ROWS_P)-1:0]     in_addr,
  input  logic [INPUT_BITS-1:0]         in_data,
  // configuration
  input  logic [WEIGHT_BITS-1:0]        w_shift,
  input  logic                          offset_en,
  // operation
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          adc_sat,
  output logic signed [ACC_BITS-1:0]    y [WCOL_P]
);

  localparam int CUR_B = G_BITS + $clog2(ROWS_P);
  localparam int S_B   = $clog2(ACT + 1);
  localparam int P_B   = OFFSET_BITS + S_B;

  logic                          clear, drive, sample, conv;
  logic [$clog2(STEPS+1)-1:0]    grp;
  logic [$clog2(INPUT_BITS)-1:0] bit_sel;
  logic [$clog2(BL_P)-1:0]       conv_col;
  logic [ROWS_P-1:0]             wl;
  logic [ACT-1:0]                grp_bits;
  logic [CUR_B-1:0]              bl_cur [BL_P];
  logic                          adc_valid;
  logic [$clog2(BL_P)-1:0]       adc_col;
  logic [ADC_B-1:0]              adc_out;
  logic [S_B-1:0]                s_now, s_q;
  logic [$clog2(H)-1:0]          ofs_raddr;
  offset_entry_t                 ofs_rd;
  logic signed [P_B-1:0]         prod;

  xbar_controller #(.ROWS_P(ROWS_P), .BL_P(BL_P), .IN_B(INPUT_BITS), .M(ACT)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .clear, .drive, .sample,
    .grp, .bit_sel, .conv, .conv_col
  );

  input_register #(.ROWS_P(ROWS_P), .IN_B(INPUT_BITS), .M(ACT)) u_inreg (
    .clk, .rst_n, .in_we, .in_addr, .in_data,
    .drive, .grp, .bit_sel, .wl, .grp_bits
  );

  input_sum_adder #(.M(ACT)) u_sum (
    .bits (grp_bits),
    .sum  (s_now)
  );

  rram_crossbar #(.ROWS_P(ROWS_P), .BL_P(BL_P), .CELL_B(CELL_B), .SIGMA(SIGMA),
                  .SEED(SEED)) u_xbar (
    .clk, .rst_n, .prog_en, .prog_row, .prog_bl, .prog_level,
    .test_row, .test_bl, .test_g, .wl, .bl_cur
  );

  sh_adc #(.BL_P(BL_P), .CUR_BITS(CUR_B), .CUR_FRAC(G_FRAC), .ADC_B(ADC_B)) u_adc (
    .clk, .rst_n, .sample, .bl_cur, .conv, .conv_col,
    .adc_valid, .adc_col, .adc_out, .adc_sat
  );

  // The offset of the weight column whose slices the ADC is delivering, for
  // the set that the active wordline group belongs to.
  assign ofs_raddr = $clog2(H)'((int'(adc_col) / SLC) * GROUPS + int'(grp) / (M / ACT));

  offset_regfile #(.ROWS_P(ROWS_P), .WCOL_P(WCOL_P), .M(M)) u_ofs (
    .clk, .rst_n, .we(ofs_we), .waddr(ofs_addr), .wdata(ofs_data),
    .raddr(ofs_raddr), .rdata(ofs_rd)
  );

  wallace_mult #(.A_B(OFFSET_BITS), .B_B(S_B)) u_mult (
    .a (ofs_rd.b),
    .b (s_q),
    .p (prod)
  );

  shift_add_unit #(.BL_P(BL_P), .CELL_B(CELL_B), .ADC_B(ADC_B), .M(ACT)) u_sa (
    .clk, .rst_n, .clear, .sample, .s_in(s_now), .t_in(bit_sel), .s_q,
    .adc_valid, .adc_col, .adc_out,
    .offset_en, .comp(ofs_rd.comp), .prod, .w_shift, .y
  );

endmodule
