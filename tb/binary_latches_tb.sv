`timescale 1ps/1ps
// binary_latches_tb: the binary latches take the binary code only on a
// falling edge of the update line (the JL1 transient), ignore the code and
// rising edges otherwise, and clear on reset.
module binary_latches_tb;
  logic [4:0] binary = 5'd0, bl;
  logic update = 1'b0, rst = 1'b0;
  int checks = 0, failures = 0;
  logic [4:0] expected;

  binary_latches #(.NB(5)) dut (.update(update), .binary(binary), .rst(rst), .bl(bl));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10 rst = 1'b1;
    #100;
    checks++; if (bl != 0) begin failures++; $display("reset"); end
    rst = 1'b0; expected = 0;
    for (int r = 0; r < 300; r++) begin
      binary = 5'($urandom); #100;
      update = 1'b1; #100;             // rising edge: no update
      checks++; if (bl != expected) begin failures++; $display("changed on rising edge"); end
      binary = 5'($urandom); #100;
      update = 1'b0; expected = binary; #100;  // falling edge: update
      checks++; if (bl != expected) begin failures++; $display("bl %0d expected %0d", bl, expected); end
      binary = 5'($urandom); #100;     // no edge: hold
      checks++; if (bl != expected) begin failures++; $display("not held"); end
    end
    rst = 1'b1; #10;
    checks++; if (bl != 0) begin failures++; $display("async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
