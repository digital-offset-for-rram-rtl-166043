// Self-checking test of the input-sum adder: random and corner bit patterns
// for m = 16 (default) and m = 128, compared with a bit count.
module tb_input_sum_adder;
  int checks = 0, failures = 0;

  logic [15:0]  bits16;
  logic [4:0]   sum16;
  logic [127:0] bits128;
  logic [7:0]   sum128;

  input_sum_adder dut16 (.bits(bits16), .sum(sum16));
  input_sum_adder #(.M(128)) dut128 (.bits(bits128), .sum(sum128));

  function automatic int ones(input logic [127:0] v);
    int n = 0;
    for (int i = 0; i < 128; i++) n += int'(v[i]);
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      bits16  = 16'($urandom);
      bits128 = {$urandom, $urandom, $urandom, $urandom};
      if (k == 0) begin bits16 = '0; bits128 = '0; end
      if (k == 1) begin bits16 = '1; bits128 = '1; end
      if (k == 2) begin bits16 = 16'h8000; bits128 = 128'h1; end
      #1;
      checks += 2;
      if (int'(sum16) != ones({112'b0, bits16})) begin
        failures++;
        $display("m=16 bits=%h sum=%0d", bits16, sum16);
      end
      if (int'(sum128) != ones(bits128)) begin
        failures++;
        $display("m=128 bits=%h sum=%0d", bits128, sum128);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
