`timescale 1ps/1ps
// johnson_latches_tb: the latches follow their inputs while unlocked, hold
// the value present at the locking moment whatever the inputs do while
// locked, and follow again once unlocked.
module johnson_latches_tb;
  logic [3:0] johnson = 4'b0000, jl;
  logic lock = 1'b0;
  int checks = 0, failures = 0;

  johnson_latches #(.NJ(4)) dut (.johnson(johnson), .lock(lock), .jl(jl));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] held;
    for (int r = 0; r < 200; r++) begin
      // transparent
      repeat (5) begin
        johnson = 4'($urandom); #100;
        checks++; if (jl != johnson) begin failures++; $display("not transparent: %b vs %b", jl, johnson); end
      end
      // lock and disturb
      held = johnson;
      lock = 1'b1; #50;
      repeat (5) begin
        johnson = 4'($urandom); #100;
        checks++; if (jl != held) begin failures++; $display("not held: %b expected %b", jl, held); end
      end
      johnson = ~held; #100;
      checks++; if (jl != held) begin failures++; $display("not held after inversion"); end
      lock = 1'b0; #10;
      checks++; if (jl != johnson) begin failures++; $display("no follow after unlock"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
