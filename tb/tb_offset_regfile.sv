// Self-checking test of the offset register file: reset value, then random
// writes to all H = 256 entries, read back against a shadow copy, including
// a write and a read in the same clock.
module tb_offset_regfile;
  import dofs_pkg::*;
  int checks = 0, failures = 0;

  localparam int H = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              we;
  logic [7:0]        waddr, raddr;
  offset_entry_t     wdata, rdata;
  offset_entry_t     shadow [H];

  offset_regfile dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int i = 0; i < H; i++) shadow[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < H; i++) begin
      raddr = 8'(i);
      #1;
      checks++;
      if (rdata != '0) begin failures++; $display("reset entry %0d = %h", i, rdata); end
    end
    for (int k = 0; k < 3 * H; k++) begin
      @(negedge clk);
      we    = 1'b1;
      waddr = 8'($urandom);
      wdata = offset_entry_t'(9'($urandom));
      shadow[waddr] = wdata;
      raddr = waddr;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin failures++; $display("addr %0d got %h", raddr, rdata); end
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < H; i++) begin
      raddr = 8'(i);
      #1;
      checks++;
      if (rdata != shadow[i]) begin
        failures++; $display("entry %0d got %h want %h", i, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
