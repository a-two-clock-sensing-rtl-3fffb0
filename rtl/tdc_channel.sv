`timescale 1ps/1ps
// tdc_channel: one measuring device of the two-clock TDC.
//
// The leading edge of a time marker (a wire signal, or the zero-time
// reference) sets the wire information flip-flop WIF. WIF locks the four
// Johnson latches, which stops the Johnson latch output JL1 that updates the
// five binary latches, so both clock positions are frozen together. The
// modulus counter MOF counts 512 ns cycles of the last binary latch and
// stops with it. The frozen value {MOF, BL, JL} is the channel's time word,
// and WIF is its request to the memory controller.
//
// When the word has been written, the controller's MUP pulse first clears
// MOF (mof_clr) and then WIF (wif_clr); WIF clearing unlocks the latches.
// A marker that arrives while WIF is set is not measured (occupation time).
// Only leading edges count: a marker still high when WIF clears does not
// set it again.
//
// Re-arming (this design's addition): while locked the binary latches miss
// their mid-period updates, so after WIF clears they are stale until the
// next falling edge of JL1. The update line is JL1 OR WIF, so that edge comes
// at once if J1 is already low, otherwise at the next mid-period point (at
// most 8 ns later). Until it has come, the flag `stale` keeps a new marker
// from setting WIF; the channel's dead time grows by at most 8 ns. Without
// it a marker in that window would be stored with an old binary value.
//
// Interface: johnson = J1..J4 taps, binary = binary clock, marker = wire
// pulse, mof_clr / wif_clr = the two parts of MUP (asynchronous, active
// high), rst = system reset (clears WIF, MOF and the binary latches),
// wif = request / locked, word = time word (tdc_pkg::tdc_word_t).
// The Johnson latches are true latches; see johnson_latches.
module tdc_channel
  import tdc_pkg::*;
(
  input  logic          rst,
  input  logic [NJ-1:0] johnson,
  input  logic [NB-1:0] binary,
  input  logic          marker,
  input  logic          mof_clr,
  input  logic          wif_clr,
  output logic          wif,
  output tdc_word_t     word
);

  logic          wif_reset;
  logic          mof_reset;
  logic [NJ-1:0] jl;
  logic [NB-1:0] bl;
  logic [NM-1:0] mof;
  logic          update;
  logic          stale;
  logic          stale_set;

  assign wif_reset = wif_clr | rst;
  assign mof_reset = mof_clr | rst;

  // wire information flip-flop: set by the marker's leading edge
  always_ff @(posedge marker or posedge wif_reset) begin
    if (wif_reset)   wif <= 1'b0;
    else if (!stale) wif <= 1'b1;
  end

  // binary latches stale from lock (or reset) until their next update
  assign stale_set = wif | rst;

  always_ff @(negedge update or posedge stale_set) begin
    if (stale_set) stale <= 1'b1;
    else           stale <= 1'b0;
  end

  johnson_latches #(.NJ(NJ)) u_jl (
    .johnson (johnson),
    .lock    (wif),
    .jl      (jl)
  );

  // liaison: JL1 (undelayed tap) falls 8 ns into each binary period;
  // held high while locked so that unlocking with J1 low updates at once
  assign update = jl[0] | wif;

  binary_latches #(.NB(NB)) u_bl (
    .update (update),
    .binary (binary),
    .rst    (rst),
    .bl     (bl)
  );

  modulus_counter #(.NM(NM)) u_mof (
    .bl_msb (bl[NB-1]),
    .clr    (mof_reset),
    .mof    (mof)
  );

  assign word = '{spare: 1'b0, mof: mof, bl: bl, jl: jl};

endmodule
