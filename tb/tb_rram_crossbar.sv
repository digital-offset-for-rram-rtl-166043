// Self-checking test of the crossbar model.
//  * An ideal 128 x 128 instance (SIGMA = 0): reset state, the conductance
//    of each programmed level (ON/OFF ratio 200), and bitline currents for
//    random wordline patterns against sums of the read-back conductances.
//  * A small instance with SIGMA = 0.5: one cell rewritten 4000 times to the
//    top level; ln(G/G_nominal) must have mean ~0 and standard deviation
//    ~0.5, and consecutive writes must differ (cycle-to-cycle variation).
module tb_rram_crossbar;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ideal instance
  logic         prog_en;
  logic [6:0]   prog_row, prog_bl, test_row, test_bl;
  logic [1:0]   prog_level;
  logic [15:0]  test_g;
  logic [127:0] wl;
  logic [22:0]  bl_cur [128];
  logic [1:0]   level [128][128];

  rram_crossbar #(.SIGMA(0.0)) dut (
    .clk, .rst_n, .prog_en, .prog_row, .prog_bl, .prog_level,
    .test_row, .test_bl, .test_g, .wl, .bl_cur);

  // varied instance
  logic        v_prog_en;
  logic [2:0]  v_row, v_bl;
  logic [1:0]  v_level;
  logic [15:0] v_g;
  logic [7:0]  v_wl;
  logic [18:0] v_cur [8];

  rram_crossbar #(.ROWS_P(8), .BL_P(8), .SIGMA(0.5), .SEED(7)) dut_v (
    .clk, .rst_n, .prog_en(v_prog_en), .prog_row(v_row), .prog_bl(v_bl),
    .prog_level(v_level), .test_row(v_row), .test_bl(v_bl), .test_g(v_g),
    .wl(v_wl), .bl_cur(v_cur));

  // Nominal conductance of each level in 1/256 units: 256*(3/200 + l*0.995).
  function automatic int nominal(input int l);
    int tab [4] = '{4, 259, 513, 768};
    return tab[l];
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_en = 0; prog_row = 0; prog_bl = 0; prog_level = 0; test_row = 0; test_bl = 0;
    wl = '0; v_prog_en = 0; v_row = 0; v_bl = 0; v_level = 0; v_wl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 50; k++) begin
      test_row = 7'($urandom); test_bl = 7'($urandom);
      #1;
      checks++;
      if (int'(test_g) != nominal(0)) begin failures++; $display("reset g=%0d", test_g); end
    end
    // Program the whole ideal array.
    for (int r = 0; r < 128; r++) begin
      for (int c = 0; c < 128; c++) begin
        @(negedge clk);
        level[r][c] = 2'($urandom);
        prog_en = 1'b1; prog_row = 7'(r); prog_bl = 7'(c); prog_level = level[r][c];
      end
    end
    @(negedge clk);
    prog_en = 1'b0;
    for (int r = 0; r < 128; r++) begin
      for (int c = 0; c < 128; c++) begin
        test_row = 7'(r); test_bl = 7'(c);
        #1;
        checks++;
        if (int'(test_g) != nominal(int'(level[r][c]))) begin
          failures++;
          if (failures < 10) $display("cell %0d,%0d g=%0d level=%0d", r, c, test_g, level[r][c]);
        end
      end
    end
    // Bitline currents.
    for (int k = 0; k < 20; k++) begin
      int want;
      wl = {$urandom, $urandom, $urandom, $urandom};
      if (k == 0) wl = 128'hFFFF << 32;      // one 16-row group
      #1;
      for (int c = 0; c < 128; c++) begin
        want = 0;
        for (int r = 0; r < 128; r++) if (wl[r]) want += nominal(int'(level[r][c]));
        checks++;
        if (int'(bl_cur[c]) != want) begin
          failures++;
          if (failures < 10) $display("bitline %0d cur=%0d want %0d", c, bl_cur[c], want);
        end
      end
    end
    // Variation statistics of the varied instance.
    begin
      real mean, sq, lr, sd;
      int  same, prev;
      mean = 0.0; sq = 0.0; same = 0; prev = -1;
      v_row = 3'd2; v_bl = 3'd5; v_level = 2'd3;
      for (int k = 0; k < 4000; k++) begin
        @(negedge clk);
        v_prog_en = 1'b1;
        @(negedge clk);
        v_prog_en = 1'b0;
        lr = $ln(real'(v_g) / 768.0);
        mean += lr;
        sq   += lr * lr;
        if (int'(v_g) == prev) same++;
        prev = int'(v_g);
      end
      mean = mean / 4000.0;
      sd   = $sqrt(sq / 4000.0 - mean * mean);
      $display("ln(G/G0): mean %f sd %f, repeats %0d", mean, sd, same);
      checks += 3;
      if (mean > 0.05 || mean < -0.05) begin failures++; $display("mean off"); end
      if (sd < 0.45 || sd > 0.55) begin failures++; $display("sd off"); end
      if (same > 200) begin failures++; $display("writes do not vary"); end
      // Bitline current of the varied instance follows its cells.
      v_wl = 8'b0000_0100;
      #1;
      checks++;
      if (v_cur[5] != 19'(v_g)) begin failures++; $display("varied current %0d vs %0d", v_cur[5], v_g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
