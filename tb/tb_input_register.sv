// Self-checking test of the input register: loads a random 128-entry
// 8-bit input vector, then for every wordline group and input bit checks
// that exactly the group's wordlines carry that bit of their inputs, that
// grp_bits matches, and that nothing is driven while `drive` is low.
module tb_input_register;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_we;
  logic [6:0]   in_addr;
  logic [7:0]   in_data;
  logic         drive;
  logic [3:0]   grp;
  logic [2:0]   bit_sel;
  logic [127:0] wl;
  logic [15:0]  grp_bits;
  logic [7:0]   x [128];

  input_register dut (.clk, .rst_n, .in_we, .in_addr, .in_data, .drive, .grp,
                      .bit_sel, .wl, .grp_bits);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_we = 0; in_addr = 0; in_data = 0; drive = 0; grp = 0; bit_sel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 128; r++) begin
      @(negedge clk);
      x[r]    = 8'($urandom);
      in_we   = 1'b1;
      in_addr = 7'(r);
      in_data = x[r];
    end
    @(negedge clk);
    in_we = 1'b0;
    for (int g = 0; g < 8; g++) begin
      for (int t = 0; t < 8; t++) begin
        logic [127:0] exp_wl;
        logic [15:0]  exp_gb;
        grp = 4'(g); bit_sel = 3'(t);
        drive = 1'b0;
        #1;
        checks++;
        if (wl != '0 || grp_bits != '0) begin failures++; $display("driven while idle"); end
        drive = 1'b1;
        exp_wl = '0;
        for (int i = 0; i < 16; i++) begin
          exp_wl[g*16+i] = x[g*16+i][t];
          exp_gb[i]      = x[g*16+i][t];
        end
        #1;
        checks++;
        if (wl != exp_wl || grp_bits != exp_gb) begin
          failures++;
          $display("g=%0d t=%0d wl=%h want %h", g, t, wl, exp_wl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
