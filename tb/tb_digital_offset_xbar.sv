// End-to-end test of the digital-offset crossbar unit.
//  * h_full: every parameter at its default (128 x 128 crossbar, m = 16,
//    log-normal variation sigma = 0.5), one full VMM with offsets and one
//    without, checked against a model built from the measured devices.
//  * h_exact: ideal cells (sigma = 0), 32 x 32 crossbar, m = 8; the result
//    must equal integer arithmetic on the weights, offsets and complements.
//  * h_sat: 32 x 32, m = 16, a 5-bit ADC so that bitline sums saturate.
//  * h_m128: 128 rows x 16 bitlines, m = 128 (one offset per whole column,
//    the coarsest sharing evaluated), 9-bit ADC, sigma = 0.5.
//  * h_slc: single-level cells (8 per weight), 32 x 32, m = 16.
//  * h_act: 64 x 32, m = 32 with only 8 wordlines driven per step, so each
//    offset set is read over 4 steps.
// Every mechanism (positive and negative offsets, complemented sets, the
// plain datapath, the weight-shift correction, ADC saturation, equal latency
// with and without the offset path) must happen at least once.
module tb_digital_offset_xbar;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  dofs_harness #(.DEFAULTS(1'b1)) h_full (.clk);
  dofs_harness #(.EXACT(1'b1), .ROWS_P(32), .BL_P(32), .M(8), .SIGMA(0.0), .SEED(3)) h_exact (.clk);
  dofs_harness #(.ROWS_P(32), .BL_P(32), .M(16), .ADC_B(5), .SIGMA(0.5), .SEED(5)) h_sat (.clk);
  dofs_harness #(.ROWS_P(128), .BL_P(16), .M(128), .ADC_B(9), .SIGMA(0.5), .SEED(9)) h_m128 (.clk);
  dofs_harness #(.ROWS_P(32), .BL_P(32), .M(16), .CELL_B(1), .SIGMA(0.5), .SEED(11)) h_slc (.clk);
  dofs_harness #(.EXACT(1'b1), .ROWS_P(64), .BL_P(32), .M(32), .ACT(8), .SIGMA(0.0), .SEED(13)) h_act (.clk);

  initial begin
    #2000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  initial begin
    fork
      h_full.run_all();
      h_exact.run_all();
      h_sat.run_all();
      h_m128.run_all();
      h_slc.run_all();
      h_act.run_all();
    join
    checks   += h_full.checks + h_exact.checks + h_sat.checks + h_m128.checks + h_slc.checks + h_act.checks;
    failures += h_full.failures + h_exact.failures + h_sat.failures + h_m128.failures + h_slc.failures + h_act.failures;
    need("positive offsets",  h_full.n_pos_offset + h_exact.n_pos_offset + h_sat.n_pos_offset);
    need("negative offsets",  h_full.n_neg_offset + h_exact.n_neg_offset + h_sat.n_neg_offset);
    need("complemented sets", h_full.n_comp_sets + h_exact.n_comp_sets + h_sat.n_comp_sets);
    need("runs with offsets", h_full.n_offset_runs + h_exact.n_offset_runs + h_sat.n_offset_runs);
    need("m = 128 runs",      h_m128.n_offset_runs);
    need("single-level-cell runs", h_slc.n_offset_runs);
    need("multi-step offset sets", h_act.n_offset_runs);
    need("plain runs",        h_full.n_plain_runs + h_exact.n_plain_runs + h_sat.n_plain_runs);
    need("weight-shift runs", h_full.n_shift + h_exact.n_shift + h_sat.n_shift);
    need("ADC saturations",   h_sat.n_sat);
    need("equal-latency runs", h_full.n_same_latency + h_exact.n_same_latency + h_sat.n_same_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
