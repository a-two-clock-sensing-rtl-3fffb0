`timescale 1ps/1ps
// tdc_unit_tb: end-to-end test of the four-channel TDC unit at its default
// size. Each channel gets a random train of time markers at random 2 ns
// positions; the bench predicts every word from the marker times alone
// (Johnson slot, binary value of the last mid-period update, binary wraps
// since the channel's previous stored word). At the end of each event
// meep_disable is raised and a zero-time reference is sent to all channels;
// the bench then checks the reference word held in each channel's latches,
// each channel's word address counter, and, through the read port, the last
// four stored words of every channel (older ones are overwritten).
// It counts each mechanism of the design and fails if one never happened:
// stored words, overwriting, modulus counts 1, 2 and saturation at 3, a
// marker lost during occupation, a marker lost just after the unlock, two
// channels requesting at once, and the zero reference held with MEEP
// disabled. Intervals decoded from successive words read back (and from the
// last word to the reference) must match the true marker spacing within one
// 2 ns step. It also checks the occupation time of uncontended markers
// (at most 50 ns).
module tdc_unit_tb;
  import tdc_pkg::*;
  localparam int unsigned N = 4;
  localparam int EVENTS = 6;
  localparam int MARKERS = 12;   // per channel and event

  logic xtal = 1'b0, scan = 1'b0, rst = 1'b0;
  logic [N-1:0] marker = '0;
  logic meep_disable = 1'b0;
  logic [3:0] rd_addr = '0;
  logic [11:0] rd_data;
  tdc_word_t [N-1:0] held_word;
  logic [N-1:0] wif;
  logic [N-1:0][1:0] wof;
  int checks = 0, failures = 0;

  tdc_unit dut (
    .xtal_clk(xtal), .scan_clk(scan), .rst(rst), .marker(marker), .meep_disable(meep_disable),
    .rd_addr(rd_addr), .rd_data(rd_data), .held_word(held_word), .wif(wif), .wof(wof));

  // 62.5 MHz crystal and an unrelated-phase 200 MHz scan clock
  initial forever #8000 xtal = ~xtal;
  initial begin #1300; forever #2500 scan = ~scan; end

  // reference time base: crystal edges since the reset ended
  int unsigned bin_abs = 0;
  time edge_t = 0;
  always @(posedge xtal) if (!rst) begin bin_abs++; edge_t = $time; end

  // mechanism counters
  int n_written = 0, n_overwrite = 0, n_lost_busy = 0, n_lost_refresh = 0;
  int n_contention = 0, n_ref_held = 0;
  int mof_seen [4];
  time occ_max = 0;

  bit shared [N];   // another channel was locked during this channel's occupation
  always @(posedge scan) begin
    if ($countones(wif) >= 2) n_contention++;
    for (int c = 0; c < N; c++) if (wif[c] && (wif & ~(N'(1) << c)) != 0) shared[c] = 1'b1;
  end

  // per channel, per event: expected stored words in order
  tdc_word_t expq [N][$];
  time       tq [N][$];      // true marker times
  int n_intervals = 0;

  // Johnson position (2 ns slot after the crystal edge) from the code J4..J1
  function automatic int jpos(logic [3:0] jl);
    case (jl)
      4'b0001: return 0; 4'b0011: return 1; 4'b0111: return 2; 4'b1111: return 3;
      4'b1110: return 4; 4'b1100: return 5; 4'b1000: return 6; default: return 7;
    endcase
  endfunction

  // time of a word within the 512 ns binary cycle, 2 ns units
  function automatic int tpos(tdc_word_t w);
    return 8 * int'(w.bl) + 4 + (jpos(w.jl) + 4) % 8;
  endfunction

  // interval from word a to the next word b of the same wire, 2 ns units
  function automatic int interval(tdc_word_t a, tdc_word_t b);
    return tpos(b) - tpos(a) + 256 * int'(b.mof);
  endfunction

  // compare a decoded interval with the true one (within one 2 ns step)
  task automatic check_interval(tdc_word_t a, tdc_word_t b, time ta, time tb_, string what);
    longint d;
    if (b.mof == 2'd3) return;   // beyond the range: no significance
    d = longint'(interval(a, b)) * 2000 - longint'(tb_ - ta);
    checks++; n_intervals++;
    if (d > 2000 || d < -2000) begin
      failures++;
      $display("%s: decoded %0d x 2 ns, true %0t ps", what, interval(a, b), tb_ - ta);
    end
  endtask
  int unsigned prev_abs [N];

  function automatic logic [3:0] expect_code(int s);
    logic [3:0] e;
    for (int k = 0; k < 4; k++) e[k] = (s >= k) && (s < k + 4);
    return e;
  endfunction

  // expected word for a marker now, in Johnson slot s
  function automatic tdc_word_t expect_word(int c, int s, output int unsigned cur_abs);
    tdc_word_t w;
    int wraps;
    cur_abs = (s >= 4) ? bin_abs : bin_abs - 1;
    wraps = int'(cur_abs / 32) - int'(prev_abs[c] / 32);
    w.spare = 1'b0;
    w.jl = expect_code(s);
    w.bl = 5'(cur_abs);
    w.mof = 2'((wraps > 3) ? 3 : wraps);
    return w;
  endfunction

  task automatic channel_train(int c);
    int s, p;
    int unsigned cur_abs;
    tdc_word_t w;
    time t0, tclr;
    for (int m = 0; m < MARKERS; m++) begin
      // gap: usually short, sometimes beyond three binary cycles
      if ($urandom_range(0, 4) == 0) repeat ($urandom_range(70, 130)) @(posedge xtal);
      else                           repeat ($urandom_range(16, 50)) @(posedge xtal);
      @(posedge xtal);
      s = $urandom_range(0, 7);
      p = 2000 * s + 1000 + $urandom_range(0, 1200) - 600;
      #(p);
      w = expect_word(c, s, cur_abs);
      t0 = $time;
      shared[c] = 1'b0;
      marker[c] = 1'b1;
      #3000 marker[c] = 1'b0;
      if ($urandom_range(0, 3) == 0) begin   // second marker 6 ns after the first
        #3000 marker[c] = 1'b1; #1000 marker[c] = 1'b0;
        n_lost_busy++;
      end
      expq[c].push_back(w);
      tq[c].push_back(t0);
      prev_abs[c] = cur_abs;
      mof_seen[w.mof]++;
      wait (!wif[c]);
      tclr = $time;
      if (!shared[c] && tclr - t0 > occ_max) occ_max = tclr - t0;
      // unlocked while J1 high: binary latches not refreshed yet
      if (tclr - edge_t < 6000 && $urandom_range(0, 1) == 0) begin
        #500 marker[c] = 1'b1; #500 marker[c] = 1'b0;
        #100;
        checks++;
        if (wif[c]) begin failures++; $display("ch %0d: marker taken before refresh", c); end
        n_lost_refresh++;
      end
    end
  endtask

  initial begin
    #3_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned ref_abs;
    int s, p, n;
    tdc_word_t w;
    tdc_word_t ref_w [N];
    tdc_word_t prev_rd;
    time t_ref;
    for (int i = 0; i < 4; i++) mof_seen[i] = 0;
    #1 rst = 1'b1;
    for (int ev = 0; ev < EVENTS; ev++) begin
      // clear the unit
      @(negedge scan);
      rst = 1'b1; meep_disable = 1'b0;
      #20_000;
      @(negedge xtal);
      rst = 1'b0;
      bin_abs = 0;
      for (int c = 0; c < N; c++) begin prev_abs[c] = 0; expq[c].delete(); tq[c].delete(); end
      // marker trains on all channels in parallel
      fork
        channel_train(0);
        channel_train(1);
        channel_train(2);
        channel_train(3);
      join
      // decision: keep the next marker (the zero reference) in the latches
      #200_000;
      @(negedge scan) meep_disable = 1'b1;
      repeat (40) @(posedge xtal);
      @(posedge xtal);
      s = $urandom_range(0, 7);
      p = 2000 * s + 1000 + $urandom_range(0, 1200) - 600;
      #(p);
      for (int c = 0; c < N; c++) begin
        int unsigned dummy;
        ref_w[c] = expect_word(c, s, dummy);
      end
      t_ref = $time;
      marker = '1;
      #3000 marker = '0;
      #200_000;
      for (int c = 0; c < N; c++) begin
        w = ref_w[c];
        checks++;
        if (!wif[c] || held_word[c] != w) begin
          failures++;
          $display("ev %0d ch %0d reference: wif %b mof %0d bl %0d jl %b, expected mof %0d bl %0d jl %b",
                   ev, c, wif[c], held_word[c].mof, held_word[c].bl, held_word[c].jl, w.mof, w.bl, w.jl);
        end else begin
          n_ref_held++;
          // last stored word to the held reference
          if (expq[c].size() > 0)
            check_interval(expq[c][expq[c].size() - 1], held_word[c], tq[c][tq[c].size() - 1], t_ref, "to reference");
        end
      end
      // read out: word k of a channel is at {c, k mod 4}; the last four survive
      for (int c = 0; c < N; c++) begin
        n = expq[c].size();
        n_written += n;
        if (n > 4) n_overwrite++;
        checks++;
        if (wof[c] != 2'(n)) begin failures++; $display("ev %0d ch %0d: WOF %0d, %0d words", ev, c, wof[c], n); end
        for (int k = (n > 4 ? n - 4 : 0); k < n; k++) begin
          @(negedge scan) rd_addr = {2'(c), 2'(k)};
          #100;
          checks++;
          if (rd_data != expq[c][k]) begin
            failures++;
            $display("ev %0d ch %0d word %0d: %h expected %h", ev, c, k, rd_data, expq[c][k]);
          end
          // successive intervals on the wire, from the words read back
          if (k > (n > 4 ? n - 4 : 0)) check_interval(prev_rd, tdc_word_t'(rd_data), tq[c][k - 1], tq[c][k], "stored words");
          prev_rd = tdc_word_t'(rd_data);
        end
      end
    end
    $display("written %0d, overwrite %0d, mof 1/2/3: %0d/%0d/%0d, lost busy %0d, lost refresh %0d, contention %0d, reference held %0d, occupation max %0t ps",
             n_written, n_overwrite, mof_seen[1], mof_seen[2], mof_seen[3], n_lost_busy, n_lost_refresh,
             n_contention, n_ref_held, occ_max);
    $display("intervals decoded and checked: %0d", n_intervals);
    checks++; if (n_intervals == 0)    begin failures++; $display("no interval decoded"); end
    checks++; if (n_written == 0)      begin failures++; $display("no word written"); end
    checks++; if (n_overwrite == 0)    begin failures++; $display("no overwrite"); end
    for (int i = 1; i < 4; i++) begin
      checks++; if (mof_seen[i] == 0)  begin failures++; $display("modulus count %0d never", i); end
    end
    checks++; if (n_lost_busy == 0)    begin failures++; $display("no marker during occupation"); end
    checks++; if (n_lost_refresh == 0) begin failures++; $display("no marker before refresh"); end
    checks++; if (n_contention == 0)   begin failures++; $display("no contention"); end
    checks++; if (n_ref_held == 0)     begin failures++; $display("no reference held"); end
    checks++; if (occ_max > 50_000 || occ_max == 0) begin failures++; $display("occupation %0t ps", occ_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
