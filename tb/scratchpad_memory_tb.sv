`timescale 1ps/1ps
// scratchpad_memory_tb: writes all 16 words of the 16 x 12 memory with
// random data, reads them back through the unclocked read, and checks that
// nothing is written while we is low.
module scratchpad_memory_tb;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] addr = '0;
  logic [11:0] wdata = '0, rdata;
  logic [11:0] model [16];
  int checks = 0, failures = 0;

  scratchpad_memory #(.N_CHIPS(3), .WORDS(16)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #2500 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int a = 0; a < 16; a++) begin
        @(negedge clk); addr = 4'(a); wdata = 12'($urandom); we = 1'b1; model[a] = wdata;
      end
      @(negedge clk); we = 1'b0;
      repeat (30) begin   // writes with we low must be ignored
        @(negedge clk); addr = 4'($urandom); wdata = 12'($urandom);
      end
      for (int a = 0; a < 16; a++) begin
        addr = 4'(a); #100;
        checks++;
        if (rdata != model[a]) begin failures++; $display("addr %0d: %h expected %h", a, rdata, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
