`timescale 1ps/1ps
// tdc_pkg: widths and the time-word layout shared by the two-clock TDC.
//
// A channel's time word is its locked clock position: four Johnson latch
// bits (position inside one 16 ns period in 2 ns steps), five binary latch
// bits (which 16 ns period within the 512 ns binary cycle) and the two-bit
// modulus count of 512 ns cycles since the channel's previous word was
// stored. The eleven bits fill three 4-bit memory chips; the twelfth bit is
// unused and written as zero (this design's choice).
package tdc_pkg;

  localparam int unsigned NJ     = 4;   // Johnson code bits (JL1..JL4)
  localparam int unsigned NB     = 5;   // binary clock bits (BL0..BL4)
  localparam int unsigned NM     = 2;   // modulus counter bits (MOF0/MOF1)
  localparam int unsigned WORD_W = 12;  // three 4-bit memory chips

  typedef struct packed {
    logic          spare;  // unused, always 0
    logic [NM-1:0] mof;    // 512 ns cycles since the previous stored word (saturates)
    logic [NB-1:0] bl;     // binary latches
    logic [NJ-1:0] jl;     // Johnson latches, bit 0 = JL1 (undelayed tap)
  } tdc_word_t;

endpackage
