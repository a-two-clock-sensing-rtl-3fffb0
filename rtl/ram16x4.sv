`timescale 1ps/1ps
// ram16x4: one 16-word x 4-bit scratch-pad RAM chip with on-chip word
// decoder, as used three times in the TDC memory.
//
// Write: while we is high the word at addr is written on the rising clock
// edge (the chip's write-enable pulse is formed here as a clocked write,
// this design's choice). Read: rdata shows the word at addr without a clock,
// as on the chip. Contents are not initialised.
module ram16x4 #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned BITS  = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [BITS-1:0]          wdata,
  output logic [BITS-1:0]          rdata
);

  logic [BITS-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
