`timescale 1ps/1ps
// binary_latches: the five binary latches BL0..BL4 of one TDC channel and
// their liaison with the Johnson latches.
//
// The binary code is never read by the time marker directly. Instead the
// binary latches are updated by a transient of a Johnson latch output that
// falls in the middle of the smallest binary bit: the falling edge of JL1,
// 8 ns after the crystal edge that changed the binary code. The binary value
// is therefore always taken while it is stable (phase errors up to +/-8 ns
// between the two clocks are tolerated), and once the time marker locks the
// Johnson latches, JL1 stops moving and the binary latches keep the value
// that matches the locked Johnson position. This removes the usual
// ambiguity of reading two clocks at once.
//
// Consequence for decoding: with Johnson position f (0..7, 2 ns steps from
// the crystal edge, found from the Johnson code), the marker came
// 8 ns + 2 ns x ((f + 4) mod 8) after the start of binary period bl, i.e.
// f < 4 lies in the period after the one bl names.
//
// Interface: update = JL1 output, binary = binary clock, rst = asynchronous
// clear to 0 (this design's choice), bl = latched binary value. The latches
// are edge-updated registers: a level-sensitive latch would keep following
// the binary clock if the marker locked JL1 in its transparent level.
module binary_latches #(
  parameter int unsigned NB = 5
) (
  input  logic          update,
  input  logic [NB-1:0] binary,
  input  logic          rst,
  output logic [NB-1:0] bl
);

  always_ff @(negedge update or posedge rst) begin
    if (rst) bl <= '0;
    else     bl <= binary;
  end

endmodule
