`timescale 1ps/1ps
// johnson_latches: the four Johnson latches JL1..JL4 of one TDC channel.
//
// Each is a level-sensitive D latch. While lock is low the outputs follow the
// Johnson clock taps; when the wire information flip-flop sets lock, the code
// present at that moment is held. Because the data come from the delay lines
// and not from the latch's own previous state, the resolution is set by the
// latch's set-up plus hold window rather than by a toggle flip-flop's loop
// delay; the held code places the time marker within 2 ns in the 16 ns
// period.
//
// Latches are intended here: lint reports them as latches, and that is the
// circuit. Interface: johnson = taps J1..J4 (bit 0 = J1), lock = WIF,
// jl = latch outputs. Transparent (zero delay) while unlocked.
module johnson_latches #(
  parameter int unsigned NJ = 4
) (
  input  logic [NJ-1:0] johnson,
  input  logic          lock,
  output logic [NJ-1:0] jl
);

  always_latch begin
    if (!lock) jl = johnson;
  end

endmodule
