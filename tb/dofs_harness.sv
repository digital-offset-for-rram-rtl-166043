// Test harness around one digital-offset crossbar unit (testbench only).
//
// It instantiates the unit, either with every parameter at its default
// (DEFAULTS = 1, no parameter list) or with the sizes given here, and offers
// the task run_all(): reset; program random 8-bit target weights into the
// cells (least significant slice on the lowest bitline of a weight);
// read every device back through the test port; load random signed offsets
// and complement flags, a random input vector and a weight shift; run a VMM
// with the offset path on and again with it off. Each result is compared
// with an independent model built from the read-back conductances, ADC
// rounding and saturation included. With EXACT = 1 (ideal cells) the result
// is also compared with plain integer arithmetic on the weights. The start-
// to-done time must be IN_B*(ROWS_P/ACT)*(BL_P+2)+1 clocks in both runs.
// ACT < M drives fewer wordlines per step than an offset set spans.
// Counters record how often each mechanism happened.
module dofs_harness
  import dofs_pkg::*;
#(
  parameter bit  DEFAULTS = 1'b0,
  parameter bit  EXACT    = 1'b0,
  parameter int  ROWS_P   = ROWS,
  parameter int  BL_P     = BITLINES,
  parameter int  M        = M_SHARE,
  parameter int  ACT      = M,
  parameter int  ADC_B    = ADC_BITS,
  parameter real SIGMA    = 0.5,
  parameter int  SEED     = 1,
  parameter int  CELL_B   = CELL_BITS,
  parameter int  BMAX     = 40
) (
  input logic clk
);

  localparam int SLC    = WEIGHT_BITS / CELL_B;
  localparam int WCOL_P = BL_P / SLC;
  localparam int GROUPS = ROWS_P / M;
  localparam int STEPS  = ROWS_P / ACT;
  localparam int H      = ROWS_P * WCOL_P / M;
  localparam int RB     = $clog2(ROWS_P);
  localparam int CB     = $clog2(BL_P);

  int checks = 0, failures = 0;
  int n_pos_offset = 0, n_neg_offset = 0, n_comp_sets = 0, n_plain_runs = 0;
  int n_offset_runs = 0, n_sat = 0, n_shift = 0, n_same_latency = 0;

  logic                        rst_n;
  logic                        prog_en;
  logic [RB-1:0]               prog_row, test_row, in_addr;
  logic [CB-1:0]               prog_bl, test_bl;
  logic [CELL_B-1:0]           prog_level;
  logic [G_BITS-1:0]           test_g;
  logic                        ofs_we;
  logic [$clog2(H)-1:0]        ofs_addr;
  offset_entry_t               ofs_data;
  logic                        in_we;
  logic [INPUT_BITS-1:0]       in_data;
  logic [WEIGHT_BITS-1:0]      w_shift;
  logic                        offset_en, start, busy, done, adc_sat;
  logic signed [ACC_BITS-1:0]  y [WCOL_P];

  if (DEFAULTS) begin : g_def
    digital_offset_xbar dut (
      .clk, .rst_n, .prog_en, .prog_row, .prog_bl, .prog_level, .test_row, .test_bl,
      .test_g, .ofs_we, .ofs_addr, .ofs_data, .in_we, .in_addr, .in_data, .w_shift,
      .offset_en, .start, .busy, .done, .adc_sat, .y);
  end else begin : g_par
    digital_offset_xbar #(.ROWS_P(ROWS_P), .BL_P(BL_P), .M(M), .ACT(ACT), .ADC_B(ADC_B),
                          .SIGMA(SIGMA), .SEED(SEED), .CELL_B(CELL_B)) dut (
      .clk, .rst_n, .prog_en, .prog_row, .prog_bl, .prog_level, .test_row, .test_bl,
      .test_g, .ofs_we, .ofs_addr, .ofs_data, .in_we, .in_addr, .in_data, .w_shift,
      .offset_en, .start, .busy, .done, .adc_sat, .y);
  end

  always @(posedge clk) if (adc_sat) n_sat++;

  int w    [ROWS_P][WCOL_P];
  int gc   [ROWS_P][BL_P];
  int x    [ROWS_P];
  int bofs [WCOL_P][GROUPS];
  int cflg [WCOL_P][GROUPS];
  int ws;

  // Loop bounds held in variables so that the model loops stay loops.
  int n_bits, n_groups, n_m, n_slc, n_rows, n_cols, n_act, n_steps;
  longint yref [WCOL_P];
  longint yexact [WCOL_P];

  // Model of the unit from the measured conductances.
  task automatic compute_model(input bit en);
    int adc_max = (1 << ADC_B) - 1;
    for (int c = 0; c < n_cols; c++) begin
      longint acc = 0;
      for (int t = 0; t < n_bits; t++) begin
        for (int st = 0; st < n_steps; st++) begin
          int s = 0, colsum = 0, z, g;
          g = st * n_act / n_m;
          for (int i = st * n_act; i < (st + 1) * n_act; i++) s += (x[i] >> t) & 1;
          for (int j = 0; j < n_slc; j++) begin
            int cur = 0, code;
            for (int i = st * n_act; i < (st + 1) * n_act; i++)
              if (((x[i] >> t) & 1) == 1) cur += gc[i][n_slc * c + j];
            code = (cur + (1 << (G_FRAC - 1))) >> G_FRAC;
            if (code > adc_max) code = adc_max;
            colsum += code << (CELL_B * j);
          end
          z = en ? colsum + bofs[c][g] * s : colsum;
          if (en && cflg[c][g] == 1) z = 255 * s - z;
          acc += longint'(z - ws * s) << t;
        end
      end
      yref[c] = acc;
    end
  endtask

  // Plain arithmetic on the weights (valid for ideal cells).
  task automatic compute_exact();
    for (int c = 0; c < n_cols; c++) begin
      longint acc = 0;
      for (int i = 0; i < n_rows; i++) begin
        int g = i / n_m;
        int v = (cflg[c][g] == 1) ? 255 - w[i][c] - bofs[c][g] : w[i][c] + bofs[c][g];
        acc += longint'(x[i]) * longint'(v - ws);
      end
      yexact[c] = acc;
    end
  endtask

  task automatic vmm(input bit en, output int cycles);
    @(negedge clk);
    offset_en = en;
    start     = 1'b1;
    @(negedge clk);
    start  = 1'b0;
    cycles = 1;
    while (!done && cycles < 10 * INPUT_BITS * STEPS * (BL_P + 2)) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic run_all();
    int cyc_on, cyc_off;
    rst_n = 1'b0; prog_en = 0; prog_row = '0; prog_bl = '0; prog_level = '0;
    test_row = '0; test_bl = '0; ofs_we = 0; ofs_addr = '0; ofs_data = '0;
    in_we = 0; in_addr = '0; in_data = '0; w_shift = '0; offset_en = 0; start = 0;
    n_bits = INPUT_BITS; n_groups = GROUPS; n_m = M; n_slc = SLC;
    n_rows = ROWS_P; n_cols = WCOL_P; n_act = ACT; n_steps = STEPS;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Weights into the cells.
    for (int r = 0; r < ROWS_P; r++) begin
      for (int c = 0; c < WCOL_P; c++) begin
        w[r][c] = int'($urandom % 256);
        for (int j = 0; j < SLC; j++) begin
          @(negedge clk);
          prog_en = 1'b1; prog_row = RB'(r); prog_bl = CB'(SLC * c + j);
          prog_level = CELL_B'(w[r][c] >> (CELL_B * j));
        end
      end
    end
    @(negedge clk);
    prog_en = 1'b0;
    // Device test: read every conductance once.
    for (int r = 0; r < ROWS_P; r++)
      for (int b = 0; b < BL_P; b++) begin
        test_row = RB'(r); test_bl = CB'(b);
        #1;
        gc[r][b] = int'(test_g);
      end
    // Offsets and complement flags.
    for (int c = 0; c < WCOL_P; c++)
      for (int g = 0; g < GROUPS; g++) begin
        bofs[c][g] = int'($urandom % (2 * BMAX + 1)) - BMAX;
        cflg[c][g] = int'($urandom % 2);
        if (bofs[c][g] > 0) n_pos_offset++;
        if (bofs[c][g] < 0) n_neg_offset++;
        if (cflg[c][g] == 1) n_comp_sets++;
        @(negedge clk);
        ofs_we = 1'b1; ofs_addr = $clog2(H)'(c * GROUPS + g);
        ofs_data.b = OFFSET_BITS'(bofs[c][g]); ofs_data.comp = 1'(cflg[c][g]);
      end
    // Inputs and weight shift.
    for (int r = 0; r < ROWS_P; r++) begin
      x[r] = int'($urandom % 256);
      @(negedge clk);
      ofs_we = 1'b0;
      in_we = 1'b1; in_addr = RB'(r); in_data = INPUT_BITS'(x[r]);
    end
    @(negedge clk);
    in_we = 1'b0;
    ws = 100 + int'($urandom % 40);
    w_shift = WEIGHT_BITS'(ws);
    if (ws != 0) n_shift++;

    vmm(1'b1, cyc_on);
    n_offset_runs++;
    compute_model(1'b1);
    if (EXACT) compute_exact();
    for (int c = 0; c < n_cols; c++) begin
      checks++;
      if (longint'(y[c]) != yref[c]) begin
        failures++;
        if (failures < 10) $display("offset on: col %0d y=%0d model %0d", c, y[c], yref[c]);
      end
      if (EXACT) begin
        checks++;
        if (longint'(y[c]) != yexact[c]) begin
          failures++;
          if (failures < 10) $display("exact: col %0d y=%0d want %0d", c, y[c], yexact[c]);
        end
      end
    end
    vmm(1'b0, cyc_off);
    n_plain_runs++;
    compute_model(1'b0);
    for (int c = 0; c < n_cols; c++) begin
      checks++;
      if (longint'(y[c]) != yref[c]) begin
        failures++;
        if (failures < 10) $display("offset off: col %0d y=%0d model %0d", c, y[c], yref[c]);
      end
    end
    checks += 2;
    if (cyc_on != INPUT_BITS * STEPS * (BL_P + 2) + 1) begin
      failures++; $display("VMM took %0d clocks", cyc_on);
    end
    if (cyc_on != cyc_off) begin
      failures++; $display("offset path changed latency: %0d vs %0d", cyc_on, cyc_off);
    end else n_same_latency++;
  endtask

endmodule
