// Self-checking test of the sample-and-hold / ADC model: random bitline
// currents are sampled, changed afterwards (the held values must not
// follow), and converted column by column with a one-clock latency, against
// round-to-nearest and saturation at 255.
module tb_sh_adc;
  int checks = 0, failures = 0, sats = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        sample, conv;
  logic [22:0] bl_cur [128];
  logic [22:0] ref_cur [128];
  logic [6:0]  conv_col, adc_col;
  logic        adc_valid, adc_sat;
  logic [7:0]  adc_out;

  sh_adc dut (.clk, .rst_n, .sample, .bl_cur, .conv, .conv_col, .adc_valid,
              .adc_col, .adc_out, .adc_sat);

  function automatic int expect_code(input logic [22:0] cur);
    int r;
    r = (int'(cur) + 128) / 256;
    return (r > 255) ? 255 : r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = 0; conv = 0; conv_col = 0;
    for (int c = 0; c < 128; c++) bl_cur[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk);
      for (int c = 0; c < 128; c++) begin
        ref_cur[c] = (c % 5 == 0) ? 23'($urandom % 100000) : 23'($urandom % 40000);
        bl_cur[c]  = ref_cur[c];
      end
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      for (int c = 0; c < 128; c++) bl_cur[c] = 23'($urandom);
      for (int c = 0; c < 128; c++) begin
        conv = 1'b1;
        conv_col = 7'(c);
        @(posedge clk);
        #1;
        checks++;
        if (!adc_valid || adc_col != 7'(c) || int'(adc_out) != expect_code(ref_cur[c]) ||
            adc_sat != ((int'(ref_cur[c]) + 128) / 256 > 255)) begin
          failures++;
          $display("col %0d cur %0d code %0d want %0d", c, ref_cur[c], adc_out,
                   expect_code(ref_cur[c]));
        end
        if (adc_sat) sats++;
        @(negedge clk);
      end
      conv = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (adc_valid) begin failures++; $display("valid without conv"); end
    end
    checks++;
    if (sats == 0) begin failures++; $display("no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
