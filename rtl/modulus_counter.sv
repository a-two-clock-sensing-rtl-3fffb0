`timescale 1ps/1ps
// modulus_counter: the two-stage counter MOF0/MOF1 of one TDC channel.
//
// It counts the cycles of the last binary latch BL4: each falling edge of
// BL4 (the latched binary value wrapping from 31 to 0) is one more 512 ns
// cycle. When it reaches its last position (3) it locks there, so a stored
// value of 3 means "more than two wraps: interval beyond ~1024 ns, no
// significance". It is cleared, by the first part of the MUP pulse, after
// the channel's word has been written to memory, so a stored word carries
// the number of binary wraps since the previous stored word of the channel.
// Because the binary latches stop while the channel is locked, the counter
// also stops with the time marker.
//
// The count sequence here is plain binary 0, 1, 2, 3 (this design's choice).
// Interface: bl_msb = BL4, clr = asynchronous clear (MUP or system reset),
// mof = count.
module modulus_counter #(
  parameter int unsigned NM = 2
) (
  input  logic          bl_msb,
  input  logic          clr,
  output logic [NM-1:0] mof
);

  always_ff @(negedge bl_msb or posedge clr) begin
    if (clr)              mof <= '0;
    else if (mof != '1)   mof <= mof + 1'b1;
  end

endmodule
