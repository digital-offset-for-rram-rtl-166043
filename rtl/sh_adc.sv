// Behavioural model of the sample-and-hold circuits and the column ADC
// (analog part). On `sample` every bitline current is captured in its
// sample-and-hold; the single ADC then converts one held column per clock:
// with `conv` high, the value of column `conv_col` appears on `adc_out` one
// clock later, with `adc_valid` high and its column index on `adc_col`.
//
// The current is in units of one nominal cell level with CUR_FRAC fractional
// bits. The ADC rounds it to the nearest level and saturates at
// 2**ADC_B - 1; `adc_sat` flags a conversion that saturated. Resolution and
// rounding are this design's choices; the structure (S&H per column, one ADC
// shared column by column) follows the architecture.
module sh_adc
  import dofs_pkg::*;
#(
  parameter int BL_P     = BITLINES,
  parameter int CUR_BITS = G_BITS + $clog2(ROWS),
  parameter int CUR_FRAC = G_FRAC,
  parameter int ADC_B    = ADC_BITS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,
  input  logic [CUR_BITS-1:0]      bl_cur [BL_P],
  input  logic                     conv,
  input  logic [$clog2(BL_P)-1:0]  conv_col,
  output logic                     adc_valid,
  output logic [$clog2(BL_P)-1:0]  adc_col,
  output logic [ADC_B-1:0]         adc_out,
  output logic                     adc_sat
);

  localparam int      RB      = CUR_BITS - CUR_FRAC + 1;
  localparam logic [RB-1:0] FULL = RB'((1 << ADC_B) - 1);

  logic [CUR_BITS-1:0] held [BL_P];
  logic [RB-1:0]       rounded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < BL_P; c++) held[c] <= '0;
    end else if (sample) begin
      for (int c = 0; c < BL_P; c++) held[c] <= bl_cur[c];
    end
  end

  // Round to the nearest whole level.
  assign rounded = RB'(({1'b0, held[conv_col]} + (CUR_BITS+1)'(1 << (CUR_FRAC-1))) >> CUR_FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_valid <= 1'b0;
      adc_col   <= '0;
      adc_out   <= '0;
      adc_sat   <= 1'b0;
    end else begin
      adc_valid <= conv;
      adc_col   <= conv_col;
      adc_sat   <= conv && (rounded > FULL);
      adc_out   <= (rounded > FULL) ? ADC_B'(FULL) : ADC_B'(rounded);
    end
  end

endmodule
