`timescale 1ps/1ps
// memory_controller: the write control of the TDC unit's scratch-pad memory.
//
// The wire address counter WAF steps through the request gates of the
// N_TDC channels, one per cycle of the 200 MHz scan clock. A request gate
// REG_N is WIF_N and (WAF = N). When the selected channel's wire information
// flip-flop is on, WAF locks on it. WAF and that channel's word address
// counter WOF_N form the memory address, and the memory enable pulse MEEP
// is high for MEEP_CYCLES scan cycles (2 x 5 ns = the 10 ns write time). Then
// the delayed pulse MUP follows in two steps: one cycle on mof_clr[N]
// (clears the channel's modulus counter), then one cycle on wif_clr[N]
// (clears WIF, unlocking the channel's latches), while WOF_N advances. WOF
// counts through zero, so each channel's four words are overwritten in turn
// and the last four words before the zero reference survive.
//
// meep_disable blocks new writes (the request gates stay shut): the next
// marker of each channel, the system zero-reference, then stays in the
// channel's latches. While it is high and no write is in progress the
// memory address is rd_addr, so the stored words can be read out.
//
// WIF is set asynchronously by the marker, so it passes a two-flop
// synchronizer before the request gate (this design's choice); the
// synchronizer of a channel is emptied when its WIF is cleared. Channel
// occupation, marker to WIF cleared, is then 25-30 ns when WAF is already
// on the channel and up to 45 ns when it must come round (no other channel
// writing). meep_disable is taken as synchronous to clk.
//
// Interface: all outputs are registered except mem_addr. rst is
// asynchronous, active high.
module memory_controller #(
  parameter int unsigned N_TDC         = 4,
  parameter int unsigned WORDS_PER_TDC = 4,
  parameter int unsigned MEEP_CYCLES   = 2,
  localparam int unsigned WAW = $clog2(N_TDC),
  localparam int unsigned WOW = $clog2(WORDS_PER_TDC),
  localparam int unsigned AW  = WAW + WOW
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N_TDC-1:0]          wif,
  input  logic                      meep_disable,
  input  logic [AW-1:0]             rd_addr,
  output logic [AW-1:0]             mem_addr,
  output logic                      meep,
  output logic [WAW-1:0]            sel,
  output logic [N_TDC-1:0]          mof_clr,
  output logic [N_TDC-1:0]          wif_clr,
  output logic [N_TDC-1:0][WOW-1:0] wof
);

  typedef enum logic [1:0] {SCAN, WRITE, MUP_MOF, MUP_WIF} state_t;

  state_t                             state;
  logic [WAW-1:0]                     waf;
  logic [$clog2(MEEP_CYCLES+1)-1:0]   meep_cnt;
  logic [N_TDC-1:0]                   sync1, sync2;
  logic [WAW-1:0]                     waf_next;

  assign waf_next = (waf == WAW'(N_TDC - 1)) ? '0 : waf + 1'b1;
  assign sel      = waf;
  assign mem_addr = (state == SCAN) ? rd_addr : {waf, wof[waf]};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= SCAN;
      waf      <= '0;
      meep_cnt <= '0;
      meep     <= 1'b0;
      sync1    <= '0;
      sync2    <= '0;
      mof_clr  <= '0;
      wif_clr  <= '0;
      wof      <= '0;
    end else begin
      sync1   <= wif;
      sync2   <= sync1;
      mof_clr <= '0;
      wif_clr <= '0;
      unique case (state)
        SCAN: begin
          // request gate of the selected channel
          if (sync2[waf] && !meep_disable) begin
            state    <= WRITE;
            meep     <= 1'b1;
            meep_cnt <= '0;
          end else begin
            waf <= waf_next;
          end
        end
        WRITE: begin
          if (meep_cnt == $bits(meep_cnt)'(MEEP_CYCLES - 1)) begin
            meep         <= 1'b0;
            mof_clr[waf] <= 1'b1;
            state        <= MUP_MOF;
          end else begin
            meep_cnt <= meep_cnt + 1'b1;
          end
        end
        MUP_MOF: begin
          wif_clr[waf] <= 1'b1;
          wof[waf]     <= wof[waf] + 1'b1;
          state        <= MUP_WIF;
        end
        MUP_WIF: begin
          sync1[waf] <= 1'b0;
          sync2[waf] <= 1'b0;
          waf        <= waf_next;
          state      <= SCAN;
        end
        default: state <= SCAN;
      endcase
    end
  end

  // MEEP only while a channel is locked, and the two MUP parts are single,
  // one-hot and never together
  a_meep_in_write: assert property (@(posedge clk) disable iff (rst)
    meep |-> state == WRITE);
  a_mup_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0({mof_clr, wif_clr}));
  a_mof_then_wif: assert property (@(posedge clk) disable iff (rst)
    |mof_clr |=> wif_clr == $past(mof_clr));

endmodule
