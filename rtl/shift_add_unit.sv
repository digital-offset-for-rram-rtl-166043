// Shift-and-add (S+A) unit with the digital-offset adder.
//
// One weight is spread over SLICES adjacent bitlines, CELL_B bits each, least
// significant slice on the lowest bitline. The ADC delivers one bitline per
// clock (adc_valid/adc_col/adc_out). For weight column c the unit gathers
// its SLICES conversions, shifting slice j left by CELL_B*j, and on the last
// slice forms
//     z' = sum_j (adc_j << CELL_B*j) + b*s        (b*s = `prod`, Eq. 1)
//     z  = comp ? (2^W_B-1)*s - z' : z'            (weight complement)
//     y[c] += (z - w_shift*s) << t                 (input bit t)
// where s is the number of ones among the m inputs driven in this step,
// captured with `sample` together with the step's input bit t. The term
// w_shift*s undoes the shift that made all stored weights non-negative.
// With offset_en low the offset and complement are ignored, giving the plain
// one-crossbar datapath. `clear` zeroes the results before a VMM.
// y is registered; a column's value is final one clock after its last slice.
module shift_add_unit
  import dofs_pkg::*;
#(
  parameter int BL_P   = BITLINES,
  parameter int CELL_B = CELL_BITS,
  parameter int W_B    = WEIGHT_BITS,
  parameter int IN_B   = INPUT_BITS,
  parameter int ADC_B  = ADC_BITS,
  parameter int M      = M_SHARE,
  parameter int ACC_B  = ACC_BITS,
  parameter int S_B    = $clog2(M + 1),
  parameter int P_B    = OFFSET_BITS + S_B,
  parameter int SLC    = W_B / CELL_B,
  parameter int WCOL_P = BL_P / SLC
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  // step start: input sum and input bit of the step
  input  logic                        sample,
  input  logic [S_B-1:0]              s_in,
  input  logic [$clog2(IN_B)-1:0]     t_in,
  output logic [S_B-1:0]              s_q,
  // ADC stream
  input  logic                        adc_valid,
  input  logic [$clog2(BL_P)-1:0]     adc_col,
  input  logic [ADC_B-1:0]            adc_out,
  // offset path
  input  logic                        offset_en,
  input  logic                        comp,
  input  logic signed [P_B-1:0]       prod,
  input  logic [W_B-1:0]              w_shift,
  // results
  output logic signed [ACC_B-1:0]     y [WCOL_P]
);

  localparam int SS_B = ADC_B + CELL_B * (SLC - 1) + $clog2(SLC) + 1;
  localparam int Z_B  = SS_B + P_B + 2;

  logic [$clog2(IN_B)-1:0]   t_q;
  logic [SS_B-1:0]           ssum;
  logic [SS_B-1:0]           slice_val;
  logic [SS_B-1:0]           col_sum;
  int                        slice;
  logic [$clog2(WCOL_P)-1:0] col;
  logic signed [Z_B-1:0]     z_pre;
  logic signed [Z_B-1:0]     z_post;
  logic signed [Z_B-1:0]     shift_corr;
  logic signed [ACC_B-1:0]   contrib;

  assign slice     = int'(adc_col) % SLC;
  assign col       = $clog2(WCOL_P)'(int'(adc_col) / SLC);
  assign slice_val = SS_B'(adc_out) << (CELL_B * slice);
  assign col_sum   = (slice == 0) ? slice_val : ssum + slice_val;

  assign z_pre = signed'(Z_B'(col_sum)) + (offset_en ? Z_B'(prod) : '0);

  complement_unit #(.W_B(W_B), .S_B(S_B), .Z_B(Z_B)) u_comp (
    .comp  (offset_en && comp),
    .s     (s_q),
    .z_in  (z_pre),
    .z_out (z_post)
  );

  assign shift_corr = signed'(Z_B'(w_shift) * Z_B'(s_q));
  assign contrib    = ACC_B'(z_post - shift_corr) <<< t_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q  <= '0;
      t_q  <= '0;
      ssum <= '0;
      for (int c = 0; c < WCOL_P; c++) y[c] <= '0;
    end else begin
      if (sample) begin
        s_q <= s_in;
        t_q <= t_in;
      end
      if (clear) begin
        for (int c = 0; c < WCOL_P; c++) y[c] <= '0;
      end else if (adc_valid) begin
        ssum <= col_sum;
        if (slice == SLC - 1) y[col] <= y[col] + contrib;
      end
    end
  end

endmodule
