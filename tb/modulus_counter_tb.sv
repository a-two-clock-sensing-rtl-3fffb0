`timescale 1ps/1ps
// modulus_counter_tb: counts falling edges of BL4, locks at its last
// position (3), ignores rising edges and clears asynchronously.
module modulus_counter_tb;
  logic bl_msb = 1'b0, clr = 1'b0;
  logic [1:0] mof;
  int checks = 0, failures = 0;

  modulus_counter #(.NM(2)) dut (.bl_msb(bl_msb), .clr(clr), .mof(mof));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, expected;
    for (int r = 0; r < 100; r++) begin
      clr = 1'b1; #100;
      checks++; if (mof != 0) begin failures++; $display("clear"); end
      clr = 1'b0; #100;
      n = $urandom_range(0, 6);
      for (int i = 0; i < n; i++) begin
        bl_msb = 1'b1; #100;
        bl_msb = 1'b0; #100;
      end
      if (n > 3) expected = 3; else expected = n;
      checks++; if (mof != 2'(expected)) begin failures++; $display("%0d edges: mof %0d expected %0d", n, mof, expected); end
      bl_msb = 1'b1; #100;   // a rising edge alone does not count
      checks++; if (mof != 2'(expected)) begin failures++; $display("counted rising edge"); end
      bl_msb = 1'b0; #100;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
