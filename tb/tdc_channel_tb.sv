`timescale 1ps/1ps
// tdc_channel_tb: one measuring channel against a reference built from the
// marker times. The bench generates its own crystal periods (16 ns), binary
// code and Johnson taps, fires markers at random 2 ns positions, and checks
// the locked word: the Johnson code of the marker's slot, the binary value
// of the last mid-period update before the marker, and the number of binary
// wraps since the previous word (saturating at 3). It also checks that the
// word stays frozen while locked, that a second marker during the lock is
// ignored, and that MUP (mof_clr, then wif_clr) releases the channel.
// The binary clock is run at five phases against the Johnson clock, from
// 0 to 7 ns late and from 7 to 3 ns early: the words must not change, since
// the binary latches take the code in the middle of its period.
module tdc_channel_tb;
  import tdc_pkg::*;

  logic rst = 1'b0;
  logic [3:0] johnson = '0;
  logic [4:0] binary = '0;
  logic marker = 1'b0, mof_clr = 1'b0, wif_clr = 1'b0;
  logic wif;
  tdc_word_t word;
  int checks = 0, failures = 0;
  int unsigned bin_abs = 0;   // crystal edges seen = binary value without wrap
  int mof_seen [4];
  int j1_falls = 0;
  always @(negedge johnson[0]) j1_falls++;

  tdc_channel dut (.rst(rst), .johnson(johnson), .binary(binary), .marker(marker),
                   .mof_clr(mof_clr), .wif_clr(wif_clr), .wif(wif), .word(word));

  function automatic logic [3:0] expect_code(int s);
    logic [3:0] e;
    for (int k = 0; k < 4; k++) e[k] = (s >= k) && (s < k + 4);
    return e;
  endfunction

  // phase of the binary clock against the Johnson clock: the binary code of
  // period k appears bin_lag ps after J1 rises (lags of 8 ns and more mean the
  // code of period k+1 comes early, before the next J1 rise)
  int bin_lag = 0;
  localparam int NLAG = 5;
  localparam int LAGS [NLAG] = '{0, 3000, 7000, 9000, 13000};

  // reference clocks: J1 rises on the crystal edge, then one Johnson tap
  // changes every 2 ns; the binary code follows with the chosen phase
  initial begin
    #20_000;
    forever begin
      bin_abs++;
      fork
        automatic int unsigned v = bin_abs;
        automatic int lag = bin_lag;
        begin
          #(lag);
          binary = (lag >= 8000) ? 5'(v + 1) : 5'(v);
        end
      join_none
      johnson[0] = 1'b1; #2000 johnson[1] = 1'b1; #2000 johnson[2] = 1'b1; #2000 johnson[3] = 1'b1;
      #2000 johnson[0] = 1'b0; #2000 johnson[1] = 1'b0; #2000 johnson[2] = 1'b0; #2000 johnson[3] = 1'b0;
      #2000;
    end
  end

  task automatic pulse_marker();
    marker = 1'b1; #3000 marker = 1'b0;
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned prev_abs, cur_abs;
    int s, p, wraps, lost = 0, stale_lost = 0, falls_at_clr;
    logic j1_at_clr;
    tdc_word_t exp_w, held;
    for (int i = 0; i < 4; i++) mof_seen[i] = 0;
    #10 rst = 1'b1;
    #10_000 rst = 1'b0;
    prev_abs = 0;
    repeat (3) @(posedge johnson[0]);
    for (int r = 0; r < 500; r++) begin
      bin_lag = LAGS[r / 100];
      // random gap, occasionally beyond three binary cycles
      if ($urandom_range(0, 5) == 0) repeat ($urandom_range(0, 140)) @(posedge johnson[0]);
      else                           repeat ($urandom_range(0, 12)) @(posedge johnson[0]);
      @(posedge johnson[0]);
      s = $urandom_range(0, 7);
      p = 2000 * s + 1000 + $urandom_range(0, 1200) - 600;
      #(p);
      cur_abs = (s >= 4) ? bin_abs : bin_abs - 1;
      wraps = int'(cur_abs / 32) - int'(prev_abs / 32);
      exp_w.spare = 1'b0;
      exp_w.jl  = expect_code(s);
      exp_w.bl  = 5'(cur_abs);
      exp_w.mof = 2'((wraps > 3) ? 3 : wraps);
      pulse_marker();
      #($urandom_range(1000, 30_000));
      checks++;
      if (!wif || word != exp_w) begin
        failures++;
        $display("r=%0d slot %0d: wif %b word mof %0d bl %0d jl %b, expected mof %0d bl %0d jl %b",
                 r, s, wif, word.mof, word.bl, word.jl, exp_w.mof, exp_w.bl, exp_w.jl);
      end
      mof_seen[word.mof]++;
      held = word;
      if ($urandom_range(0, 3) == 0) begin  // marker during occupation
        pulse_marker(); lost++;
        #2000;
      end
      #($urandom_range(0, 40_000));
      checks++;
      if (word != held) begin failures++; $display("word changed while locked"); end
      mof_clr = 1'b1; #5000 mof_clr = 1'b0;
      checks++;
      if (word.mof != 0 || !wif) begin failures++; $display("MUP part 1: mof %0d wif %b", word.mof, wif); end
      wif_clr = 1'b1; j1_at_clr = johnson[0]; falls_at_clr = j1_falls;
      #5000 wif_clr = 1'b0;
      checks++;
      if (wif) begin failures++; $display("MUP part 2 did not clear WIF"); end
      // binary latches not yet refreshed since the unlock: a marker now is not taken
      if (j1_at_clr && johnson[0] && j1_falls == falls_at_clr) begin
        pulse_marker(); stale_lost++;
        checks++;
        if (wif) begin failures++; $display("marker taken before the binary latches were refreshed"); end
      end
      prev_abs = cur_abs;
    end
    // each modulus count must have occurred
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (mof_seen[i] == 0) begin failures++; $display("modulus count %0d never seen", i); end
    end
    $display("mof counts seen: %0d %0d %0d %0d, markers during occupation: %0d, before refresh: %0d",
             mof_seen[0], mof_seen[1], mof_seen[2], mof_seen[3], lost, stale_lost);
    checks++;
    if (lost == 0 || stale_lost == 0) begin failures++; $display("a dead-time case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
