`timescale 1ps/1ps
// binary_clock: the coarse clock of the two-clock TDC.
//
// A 5-bit synchronous binary counter advanced by every rising edge of the
// 62.5 MHz crystal clock, so its code changes every 16 ns and repeats every
// 2^5 x 16 = 512 ns. All bits change on the same edge (synchronous counter,
// as the design requires, so that the bits never disagree by more than one
// flip-flop delay). One counter is shared by all channels of a unit.
//
// Interface: clk = crystal clock, rst = asynchronous reset to 0 (this
// design's choice; the counter's start value does not matter to the
// measurement), count = the binary clock code.
module binary_clock #(
  parameter int unsigned NB = 5
) (
  input  logic          clk,
  input  logic          rst,
  output logic [NB-1:0] count
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
