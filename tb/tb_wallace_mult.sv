// Self-checking test of the Wallace-tree offset multiplier: every signed
// 8-bit offset times every unsigned 8-bit input sum, against a*b.
module tb_wallace_mult;
  int checks = 0, failures = 0;

  logic signed [7:0]  a;
  logic        [7:0]  b;
  logic signed [15:0] p;

  wallace_mult dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d p=%0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
