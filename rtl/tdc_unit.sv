`timescale 1ps/1ps
// tdc_unit: a four-channel two-clock sensing time-to-digital converter.
//
// Two free-running clocks are read, never started or stopped. The coarse
// clock is a 5-bit binary counter on the 62.5 MHz crystal (16 ns steps, 512
// ns cycle); the fine clock is a 4-bit Johnson code from a one-shot and
// delay lines (2 ns steps within each 16 ns period). Each channel holds
// latches that follow both clocks; the leading edge of a time marker locks
// them, and the locked position, with a count of 512 ns cycles since the
// channel's previous word, is written into a 16 x 12 bit scratch-pad memory
// (four words per channel, overwritten in turn). Start and stop are the same
// operation, so time intervals are differences of stored words, worked out
// outside the unit, and successive intervals on a wire can be measured.
//
// For an event: raise meep_disable before the zero-time reference arrives.
// Each channel then keeps the reference in its latches (held_word, wif = 1)
// and the memory holds each channel's last four words before it; the next
// word to be overwritten in channel c is at address {c, wof[c]}. Read the
// memory through rd_addr / rd_data while meep_disable is high, then pulse
// rst to clear the channels for the next event.
//
// Clocks: xtal_clk 62.5 MHz (binary clock and one-shot), scan_clk 200 MHz
// (wire address scanner and memory writes); the two need no fixed phase.
// The Johnson clock generator is a behavioural model; everything else is
// synthesizable.
module tdc_unit
  import tdc_pkg::*;
#(
  parameter int unsigned N_TDC         = 4,
  parameter int unsigned WORDS_PER_TDC = 4,
  parameter int unsigned TAP_PS        = 2000,
  localparam int unsigned AW  = $clog2(N_TDC) + $clog2(WORDS_PER_TDC),
  localparam int unsigned WOW = $clog2(WORDS_PER_TDC)
) (
  input  logic                      xtal_clk,
  input  logic                      scan_clk,
  input  logic                      rst,
  input  logic [N_TDC-1:0]          marker,
  input  logic                      meep_disable,
  input  logic [AW-1:0]             rd_addr,
  output logic [WORD_W-1:0]         rd_data,
  output tdc_word_t [N_TDC-1:0]     held_word,
  output logic [N_TDC-1:0]          wif,
  output logic [N_TDC-1:0][WOW-1:0] wof
);

  logic [NB-1:0]                binary;
  logic [N_TDC-1:0][NJ-1:0]     johnson;
  logic [N_TDC-1:0]             mof_clr, wif_clr;
  logic [AW-1:0]                mem_addr;
  logic                         meep;
  logic [$clog2(N_TDC)-1:0]     sel;

  binary_clock #(.NB(NB)) u_binary_clock (
    .clk   (xtal_clk),
    .rst   (rst),
    .count (binary)
  );

  johnson_clock_gen #(.N_TDC(N_TDC), .TAP_PS(TAP_PS)) u_johnson_clock (
    .clk_in  (xtal_clk),
    .johnson (johnson)
  );

  for (genvar c = 0; c < N_TDC; c++) begin : g_tdc
    tdc_channel u_channel (
      .rst     (rst),
      .johnson (johnson[c]),
      .binary  (binary),
      .marker  (marker[c]),
      .mof_clr (mof_clr[c]),
      .wif_clr (wif_clr[c]),
      .wif     (wif[c]),
      .word    (held_word[c])
    );
  end

  memory_controller #(.N_TDC(N_TDC), .WORDS_PER_TDC(WORDS_PER_TDC)) u_memory_controller (
    .clk          (scan_clk),
    .rst          (rst),
    .wif          (wif),
    .meep_disable (meep_disable),
    .rd_addr      (rd_addr),
    .mem_addr     (mem_addr),
    .meep         (meep),
    .sel          (sel),
    .mof_clr      (mof_clr),
    .wif_clr      (wif_clr),
    .wof          (wof)
  );

  scratchpad_memory #(.N_CHIPS(WORD_W / 4), .WORDS(N_TDC * WORDS_PER_TDC)) u_memory (
    .clk   (scan_clk),
    .we    (meep),
    .addr  (mem_addr),
    .wdata (held_word[sel]),
    .rdata (rd_data)
  );

endmodule
