// Post-writing tuning on the full-size unit (all parameters at default:
// 128 x 128 crossbar, 2-bit cells, m = 16, sigma = 0.5).
//
// Random target weights (16..200) are written once; every device is then
// measured through the test port, and each set of m weights gets the offset
// that cancels the set's mean measured deviation,
//     b = round( mean_{i in set} (w_i - V_i) ),   V_i = sum_j 4^j * G_ij,
// a closed-form stand-in for the back-propagation tuning, which needs a
// network and a loss. One VMM is run with these offsets and one with the
// offset path off. An offset outside the 8-bit range is clamped, as the
// register width requires. Checks: the offset run is at least twice as close
// to the exact product sum_i w_i x_i as the plain run (summed over all 32
// columns),
// and both runs take 8321 clocks.
module tb_pwt_vmm;
  import dofs_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                        rst_n;
  logic                        prog_en;
  logic [6:0]                  prog_row, prog_bl, test_row, test_bl, in_addr;
  logic [1:0]                  prog_level;
  logic [15:0]                 test_g;
  logic                        ofs_we;
  logic [7:0]                  ofs_addr;
  offset_entry_t               ofs_data;
  logic                        in_we;
  logic [7:0]                  in_data, w_shift;
  logic                        offset_en, start, busy, done, adc_sat;
  logic signed [31:0]          y [32];

  digital_offset_xbar dut (
    .clk, .rst_n, .prog_en, .prog_row, .prog_bl, .prog_level, .test_row, .test_bl,
    .test_g, .ofs_we, .ofs_addr, .ofs_data, .in_we, .in_addr, .in_data, .w_shift,
    .offset_en, .start, .busy, .done, .adc_sat, .y);

  int     w   [128][32];
  real    vm  [128][32];
  int     x   [128];
  longint ideal [32];

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vmm(input bit en, output int cycles, output longint err);
    @(negedge clk);
    offset_en = en; start = 1'b1;
    @(negedge clk);
    start = 1'b0; cycles = 1;
    while (!done && cycles < 20000) begin
      @(negedge clk);
      cycles++;
    end
    err = 0;
    for (int c = 0; c < 32; c++)
      err += (longint'(y[c]) > ideal[c]) ? longint'(y[c]) - ideal[c] : ideal[c] - longint'(y[c]);
  endtask

  initial begin
    int cyc_on, cyc_off, n_rows, n_cols, n_m, n_clamp;
    longint err_on, err_off;
    n_rows = 128; n_cols = 32; n_m = 16; n_clamp = 0;
    rst_n = 0; prog_en = 0; prog_row = 0; prog_bl = 0; prog_level = 0; test_row = 0;
    test_bl = 0; ofs_we = 0; ofs_addr = 0; ofs_data = '0; in_we = 0; in_addr = 0;
    in_data = 0; w_shift = 0; offset_en = 0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < n_rows; r++)
      for (int c = 0; c < n_cols; c++) begin
        w[r][c] = 16 + int'($urandom % 185);
        for (int j = 0; j < 4; j++) begin
          @(negedge clk);
          prog_en = 1; prog_row = 7'(r); prog_bl = 7'(4 * c + j);
          prog_level = 2'(w[r][c] >> (2 * j));
        end
      end
    @(negedge clk);
    prog_en = 0;
    // Measure every device once and form the real weights.
    for (int r = 0; r < n_rows; r++)
      for (int c = 0; c < n_cols; c++) begin
        vm[r][c] = 0.0;
        for (int j = 0; j < 4; j++) begin
          test_row = 7'(r); test_bl = 7'(4 * c + j);
          #1;
          vm[r][c] += real'(test_g) / 256.0 * real'(1 << (2 * j));
        end
      end
    // Offsets from the mean deviation of each set.
    for (int c = 0; c < n_cols; c++)
      for (int g = 0; g < n_rows / n_m; g++) begin
        real d;
        int  b;
        d = 0.0;
        for (int i = g * n_m; i < (g + 1) * n_m; i++) d += real'(w[i][c]) - vm[i][c];
        b = int'($floor(d / real'(n_m) + 0.5));
        if (b < -128 || b > 127) n_clamp++;
        if (b < -128) b = -128;
        if (b > 127) b = 127;
        @(negedge clk);
        ofs_we = 1; ofs_addr = 8'(c * 8 + g);
        ofs_data.b = 8'(b); ofs_data.comp = 1'b0;
      end
    for (int r = 0; r < n_rows; r++) begin
      x[r] = int'($urandom % 256);
      @(negedge clk);
      ofs_we = 0;
      in_we = 1; in_addr = 7'(r); in_data = 8'(x[r]);
    end
    @(negedge clk);
    in_we = 0;
    for (int c = 0; c < n_cols; c++) begin
      ideal[c] = 0;
      for (int r = 0; r < n_rows; r++) ideal[c] += longint'(w[r][c]) * longint'(x[r]);
    end
    vmm(1'b0, cyc_off, err_off);
    vmm(1'b1, cyc_on, err_on);
    $display("offsets clamped to 8 bits: %0d of 256", n_clamp);
    $display("sum |y - exact| over 32 columns: plain %0d, with offsets %0d", err_off, err_on);
    checks += 3;
    if (!(2 * err_on < err_off)) begin failures++; $display("offsets did not halve the error"); end
    if (cyc_on != 8321) begin failures++; $display("offset run took %0d clocks", cyc_on); end
    if (cyc_off != 8321) begin failures++; $display("plain run took %0d clocks", cyc_off); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
