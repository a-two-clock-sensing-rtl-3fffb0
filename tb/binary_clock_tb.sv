`timescale 1ps/1ps
// binary_clock_tb: checks the 5-bit binary clock against a reference count:
// one step per 16 ns crystal edge, all bits together, a 512 ns cycle, and an
// asynchronous reset to zero.
module binary_clock_tb;
  localparam int unsigned NB = 5;
  logic clk = 1'b0, rst = 1'b0;
  logic [NB-1:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_count = 0;

  binary_clock #(.NB(NB)) dut (.clk(clk), .rst(rst), .count(count));

  always #8000 clk = ~clk;  // 62.5 MHz

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] first;
    time t0;
    #10 rst = 1'b1;
    #20000;
    @(negedge clk) rst = 1'b0;
    #1;
    checks++; if (count != 0) begin failures++; $display("reset value %0d", count); end
    for (int i = 1; i <= 100; i++) begin
      @(negedge clk);
      ref_count = (ref_count + 1) % 32;
      checks++;
      if (count != NB'(ref_count)) begin failures++; $display("step %0d: %0d expected %0d", i, count, ref_count); end
    end
    // cycle time: same code again after 512 ns
    first = count; t0 = $time;
    do @(negedge clk); while (count != first);
    checks++;
    if ($time - t0 != 512_000) begin failures++; $display("cycle %0t ps", $time - t0); end
    // asynchronous reset mid-period
    #3000 rst = 1'b1; #1000;
    checks++; if (count != 0) begin failures++; $display("async reset failed"); end
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
