`timescale 1ps/1ps
// johnson_clock_gen_tb: three one-shots whose input pulses differ in width
// (standing for supply and temperature drift). For each, the regulation
// loop must bring the output pulse to 8 ns (half the 16 ns period) within
// 40 periods, starting from a different width; then the taps, sampled in
// the middle of every 2 ns slot after a crystal edge, must show the Johnson
// sequence 1000 1100 1110 1111 0111 0011 0001 0000 (J1..J4) on every channel.
module johnson_clock_gen_tb;
  localparam int unsigned N = 2;
  localparam int unsigned NV = 3;
  localparam int unsigned WIDTHS [NV] = '{8100, 8400, 9500};
  logic clk = 1'b0;
  logic [N-1:0][3:0] johnson [NV];
  int checks = 0, failures = 0;
  time width_first [NV];
  time width_last [NV];
  int  pulses [NV];

  always #8000 clk = ~clk;

  for (genvar v = 0; v < NV; v++) begin : g_v
    johnson_clock_gen #(.N_TDC(N), .INPUT_WIDTH_PS(WIDTHS[v]), .EDGE_PS(1000), .TAP_PS(2000)) dut (
      .clk_in(clk), .johnson(johnson[v]));
    time t_rise;
    initial pulses[v] = 0;
    always @(posedge johnson[v][0][0]) t_rise = $time;
    always @(negedge johnson[v][0][0]) begin
      if (pulses[v] == 0) width_first[v] = $time - t_rise;
      width_last[v] = $time - t_rise;
      pulses[v]++;
    end
  end

  // expected J1..J4 in slot s (2 ns steps after the crystal edge)
  function automatic logic [3:0] expect_code(int s);
    logic [3:0] e;
    for (int k = 0; k < 4; k++) e[k] = (s >= k) && (s < k + 4);
    return e;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int transitions;
    logic [3:0] last;
    repeat (41) @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      $display("input %0d ps: first output %0t ps, after %0d periods %0t ps",
               WIDTHS[v], width_first[v], pulses[v], width_last[v]);
      checks++;
      if (width_last[v] < 7980 || width_last[v] > 8020) begin failures++; $display("not regulated"); end
    end
    checks++;
    if (width_first[2] < 8200) begin failures++; $display("wide input did not start wide"); end
    repeat (40) begin
      @(posedge clk);
      for (int s = 0; s < 8; s++) begin
        #1000;
        for (int v = 0; v < NV; v++)
          for (int c = 0; c < N; c++) begin
            checks++;
            if (johnson[v][c] != expect_code(s)) begin
              failures++;
              $display("t=%0t v %0d ch %0d slot %0d: %b expected %b", $time, v, c, s, johnson[v][c], expect_code(s));
            end
          end
        #1000;
      end
    end
    // one tap changes per 2 ns slot: eight transitions per 16 ns period
    @(posedge clk); #100;
    last = johnson[0][0]; transitions = 0;
    repeat (32) begin #500; if (johnson[0][0] != last) begin transitions++; last = johnson[0][0]; end end
    checks++;
    if (transitions != 8) begin failures++; $display("%0d transitions in 16 ns", transitions); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
