// Self-checking test of the VMM sequencer: one start must give 64 steps
// (8 input bits x 8 wordline groups, groups fastest), each a one-clock
// sample with the wordlines driven, then conversion of bitlines 0..127 in
// order, and `done` exactly 8*8*(128+2)+1 clocks after start. A start while
// busy must be ignored.
module tb_xbar_controller;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, busy, done, clear, drive, sample, conv;
  logic [3:0] grp;
  logic [2:0] bit_sel;
  logic [6:0] conv_col;

  xbar_controller dut (.clk, .rst_n, .start, .busy, .done, .clear, .drive, .sample,
                       .grp, .bit_sel, .conv, .conv_col);

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles, steps, exp_col, clears, dones;

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1'b1;
      #1;
      checks++;
      if (!clear) begin failures++; $display("no clear with start"); end
      @(negedge clk);
      start = 1'b0;
      cycles = 1; steps = 0; exp_col = 0; clears = 0; dones = 0;
      while (!done && cycles < 20000) begin
        if (cycles == 500) start = 1'b1;     // ignored while busy
        if (cycles == 501) start = 1'b0;
        if (clear) clears++;
        if (!busy) begin failures++; $display("busy low at %0d", cycles); end
        if (sample) begin
          checks++;
          if (!drive || int'(grp) != steps % 8 || int'(bit_sel) != steps / 8) begin
            failures++;
            $display("step %0d: grp=%0d bit=%0d", steps, grp, bit_sel);
          end
          steps++;
          exp_col = 0;
        end
        if (conv) begin
          checks++;
          if (int'(conv_col) != exp_col || int'(grp) != (steps - 1) % 8) begin
            failures++;
            if (failures < 10) $display("conv col %0d want %0d", conv_col, exp_col);
          end
          exp_col++;
        end
        @(negedge clk);
        cycles++;
      end
      checks += 4;
      if (cycles != 8 * 8 * 130 + 1) begin failures++; $display("cycles %0d", cycles); end
      if (steps != 64) begin failures++; $display("steps %0d", steps); end
      if (clears != 0) begin failures++; $display("clear while busy"); end
      @(negedge clk);
      if (busy || done) begin failures++; $display("not idle after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
