// Self-checking test of the complement post-processing: for random sums and
// partial products, comp=1 must give 255*s - z' and comp=0 must give z'.
// It also checks the identity the unit relies on: a dot product over
// complemented 8-bit weights, post-processed, equals the original one.
module tb_complement_unit;
  int checks = 0, failures = 0;

  logic               comp;
  logic [4:0]         s;
  logic signed [23:0] z_in, z_out;

  complement_unit dut (.comp, .s, .z_in, .z_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      comp = 1'($urandom);
      s    = 5'($urandom % 17);
      z_in = 24'(int'($urandom % 20000) - 4000);
      #1;
      checks++;
      if (int'(z_out) != (comp ? 255 * int'(s) - int'(z_in) : int'(z_in))) begin
        failures++;
        $display("comp=%0b s=%0d z_in=%0d z_out=%0d", comp, s, z_in, z_out);
      end
    end
    // Complemented weights over 16 1-bit inputs.
    for (int k = 0; k < 200; k++) begin
      int w [16];
      int x [16];
      int z, zc, n;
      z = 0; zc = 0; n = 0;
      for (int i = 0; i < 16; i++) begin
        w[i] = int'($urandom % 256);
        x[i] = int'($urandom % 2);
        z  += w[i] * x[i];
        zc += (255 - w[i]) * x[i];
        n  += x[i];
      end
      comp = 1'b1;
      s    = 5'(n);
      z_in = 24'(zc);
      #1;
      checks++;
      if (int'(z_out) != z) begin
        failures++;
        $display("identity: z=%0d got %0d", z, z_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
