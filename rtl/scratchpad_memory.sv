`timescale 1ps/1ps
// scratchpad_memory: the TDC unit's word memory, 16 words of 12 bits made of
// N_CHIPS = 3 chips of 16 x 4 bits side by side (one address, the chips
// share it; chip i holds bits 4i+3..4i of the word).
//
// The 16 words are four groups of four, one group per channel: the upper two
// address bits are the channel (wire address), the lower two the channel's
// word address counter. Write and read timing are those of ram16x4: clocked
// write while we (MEEP) is high, unclocked read.
module scratchpad_memory #(
  parameter int unsigned N_CHIPS = 3,
  parameter int unsigned WORDS   = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [4*N_CHIPS-1:0]     wdata,
  output logic [4*N_CHIPS-1:0]     rdata
);

  for (genvar i = 0; i < N_CHIPS; i++) begin : g_chip
    ram16x4 #(.WORDS(WORDS), .BITS(4)) u_chip (
      .clk   (clk),
      .we    (we),
      .addr  (addr),
      .wdata (wdata[4*i +: 4]),
      .rdata (rdata[4*i +: 4])
    );
  end

endmodule
