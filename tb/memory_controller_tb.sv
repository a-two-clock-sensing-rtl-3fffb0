`timescale 1ps/1ps
// memory_controller_tb: drives the four wire information flip-flops as a
// channel would (set asynchronously, cleared by wif_clr) and checks the write
// control: every request served exactly once, MEEP two scan cycles (10 ns)
// long at address {channel, WOF}, MUP as mof_clr then wif_clr on the same
// channel, WOF counting through zero, an isolated channel occupied between
// 10 and 50 ns, no write while meep_disable is high, and rd_addr reaching
// the memory while idle.
module memory_controller_tb;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst = 1'b0;
  logic [N-1:0] wif = '0;
  logic meep_disable = 1'b0;
  logic [3:0] rd_addr = '0, mem_addr;
  logic meep;
  logic [1:0] sel;
  logic [N-1:0] mof_clr, wif_clr;
  logic [N-1:0][1:0] wof;
  int checks = 0, failures = 0;

  memory_controller #(.N_TDC(N), .WORDS_PER_TDC(4), .MEEP_CYCLES(2)) dut (
    .clk(clk), .rst(rst), .wif(wif), .meep_disable(meep_disable), .rd_addr(rd_addr),
    .mem_addr(mem_addr), .meep(meep), .sel(sel), .mof_clr(mof_clr), .wif_clr(wif_clr), .wof(wof));

  always #2500 clk = ~clk;  // 200 MHz

  time set_time [N];
  int  served [N];
  int  requested [N];
  logic [1:0] model_wof [N];
  time occ_max = 0, occ_min = 1_000_000;
  bit  isolated = 1'b0;

  for (genvar c = 0; c < N; c++) begin : g_wif
    always @(posedge wif_clr[c]) begin
      wif[c] <= 1'b0;
      served[c]++;
      if (isolated) begin
        if ($time - set_time[c] > occ_max) occ_max = $time - set_time[c];
        if ($time - set_time[c] < occ_min) occ_min = $time - set_time[c];
      end
    end
  end

  task automatic request(int c);
    if (!wif[c]) begin
      wif[c] = 1'b1; set_time[c] = $time; requested[c]++;
    end
  endtask

  // cycle monitor
  int meep_run = 0;
  logic [1:0] write_ch;
  int mup_phase = 0;
  always @(negedge clk) if (!rst) begin
    if (meep) begin
      if (meep_run == 0) write_ch = sel;
      meep_run++;
      checks++;
      if (mem_addr != {sel, model_wof[sel]} || sel != write_ch || !wif[sel]) begin
        failures++; $display("t=%0t write address %h sel %0d", $time, mem_addr, sel);
      end
    end else if (meep_run != 0) begin
      checks++;
      if (meep_run != 2) begin failures++; $display("MEEP %0d cycles", meep_run); end
      checks++;
      if (mof_clr != N'(1) << write_ch || wif_clr != 0) begin failures++; $display("t=%0t MUP part 1 wrong %b", $time, mof_clr); end
      meep_run = 0; mup_phase = 1;
    end else if (mup_phase == 1) begin
      checks++;
      if (wif_clr != N'(1) << write_ch || mof_clr != 0) begin failures++; $display("t=%0t MUP part 2 wrong %b", $time, wif_clr); end
      checks++;
      if (wof[write_ch] != model_wof[write_ch] + 2'd1) begin failures++; $display("WOF did not advance"); end
      model_wof[write_ch] = model_wof[write_ch] + 2'd1;
      mup_phase = 0;
    end else begin
      if (mof_clr != 0 || wif_clr != 0) begin checks++; failures++; $display("t=%0t stray MUP", $time); end
    end
  end

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < N; c++) begin served[c] = 0; requested[c] = 0; model_wof[c] = 0; end
    #10 rst = 1'b1;
    #12_000 rst = 1'b0;
    // isolated requests at random phases
    isolated = 1'b1;
    for (int r = 0; r < 200; r++) begin
      #($urandom_range(0, 30_000));
      request($urandom_range(0, N - 1));
      wait (wif == 0);
    end
    isolated = 1'b0;
    checks++;
    if (occ_max > 50_000 || occ_min < 10_000) begin failures++; $display("occupation %0t..%0t ps", occ_min, occ_max); end
    $display("isolated occupation %0t..%0t ps", occ_min, occ_max);
    // bursts: several channels at once
    for (int r = 0; r < 200; r++) begin
      for (int c = 0; c < N; c++) if ($urandom_range(0, 1)) begin #($urandom_range(0, 3000)); request(c); end
      #($urandom_range(0, 40_000));
      if ($urandom_range(0, 3) == 0) wait (wif == 0);
    end
    wait (wif == 0);
    // writes disabled: requests wait, the read address reaches the memory
    @(negedge clk) meep_disable = 1'b1;
    repeat (3) @(negedge clk);
    for (int c = 0; c < N; c++) request(c);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      rd_addr = 4'($urandom);
      #1;
      checks++;
      if (meep || mem_addr != rd_addr || wif != '1) begin failures++; $display("write while disabled / read address"); end
    end
    @(negedge clk) meep_disable = 1'b0;
    wait (wif == 0);
    repeat (4) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (served[c] != requested[c]) begin failures++; $display("ch %0d: %0d requests %0d served", c, requested[c], served[c]); end
      checks++;
      if (wof[c] != 2'(served[c])) begin failures++; $display("ch %0d: WOF %0d", c, wof[c]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
