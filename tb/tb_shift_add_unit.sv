// Self-checking test of the shift-and-add unit: random steps (input bit t,
// input sum s, ADC codes of all 128 bitlines, per-column offsets and
// complement flags, weight shift) are streamed in as the ADC would deliver
// them, and the 32 column results are compared after every step with an
// independent model. Runs with the offset path enabled and disabled, and
// checks that `clear` zeroes the results.
module tb_shift_add_unit;
  import dofs_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              clear, sample, adc_valid, offset_en, comp;
  logic [4:0]        s_in, s_q;
  logic [2:0]        t_in;
  logic [6:0]        adc_col;
  logic [7:0]        adc_out, w_shift;
  logic signed [12:0] prod;
  logic signed [31:0] y [32];
  longint            y_ref [32];

  shift_add_unit dut (.clk, .rst_n, .clear, .sample, .s_in, .t_in, .s_q, .adc_valid,
                      .adc_col, .adc_out, .offset_en, .comp, .prod, .w_shift, .y);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_step(input bit en);
    int s, t, ws, codes [4], b, cp, colsum, z;
    s  = int'($urandom % 17);
    t  = int'($urandom % 8);
    ws = int'($urandom % 256);
    @(negedge clk);
    sample = 1'b1; s_in = 5'(s); t_in = 3'(t); w_shift = 8'(ws); offset_en = en;
    @(negedge clk);
    sample = 1'b0;
    for (int c = 0; c < 32; c++) begin
      b  = int'($urandom % 256) - 128;
      cp = int'($urandom % 2);
      colsum = 0;
      for (int j = 0; j < 4; j++) begin
        codes[j] = int'($urandom % 49);
        colsum += codes[j] << (2 * j);
        adc_valid = 1'b1;
        adc_col   = 7'(4 * c + j);
        adc_out   = 8'(codes[j]);
        comp      = 1'(cp);
        prod      = 13'(b * s);
        @(negedge clk);
      end
      z = en ? colsum + b * s : colsum;
      if (en && cp == 1) z = 255 * s - z;
      y_ref[c] += longint'(z - ws * s) << t;
    end
    adc_valid = 1'b0;
    @(negedge clk);
    for (int c = 0; c < 32; c++) begin
      checks++;
      if (longint'(y[c]) != y_ref[c]) begin
        failures++;
        if (failures < 10) $display("col %0d y=%0d want %0d", c, y[c], y_ref[c]);
      end
    end
    checks++;
    if (int'(s_q) != s) begin failures++; $display("s_q %0d want %0d", s_q, s); end
  endtask

  initial begin
    clear = 0; sample = 0; adc_valid = 0; offset_en = 0; comp = 0; s_in = 0; t_in = 0;
    adc_col = 0; adc_out = 0; w_shift = 0; prod = 0;
    for (int c = 0; c < 32; c++) y_ref[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40; k++) run_step(1'b1);
    for (int k = 0; k < 10; k++) run_step(1'b0);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int c = 0; c < 32; c++) begin
      y_ref[c] = 0;
      checks++;
      if (y[c] != 0) begin failures++; $display("clear failed col %0d", c); end
    end
    for (int k = 0; k < 10; k++) run_step(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
