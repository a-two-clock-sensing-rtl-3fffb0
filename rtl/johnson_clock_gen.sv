`timescale 1ps/1ps
// johnson_clock_gen: BEHAVIOURAL MODEL (not synthesizable) of the fine clock
// of the two-clock TDC: a regulated one-shot multivibrator driving delay
// lines.
//
// One-shot: every rising edge of the 16 ns crystal clock produces an input
// pulse with 1 ns (EDGE_PS) leading and trailing edges, INPUT_WIDTH_PS wide
// at its foot and so narrower at its top. The output is high while this
// pulse is above a threshold, so raising the threshold narrows the output.
// A regulation loop holds the output at half the crystal period (8 ns, 50 %
// duty cycle): the output and a fixed reference are compared, integrated,
// and the result moves the threshold. Here the loop is a per-cycle update
// of the threshold by GAIN times the width error; it settles within a few
// tens of cycles from any INPUT_WIDTH_PS between the period half and the
// period half plus 2 x EDGE_PS, which stands for supply and temperature
// drift of the pulse shape. The threshold also delays the leading edge by
// up to EDGE_PS, a phase shift of the Johnson clock that the TDC tolerates.
//
// Delay lines: the one-shot output drives, for each of the N_TDC channels,
// three delay lines of 1, 2 and 3 x TAP_PS (2, 4 and 6 ns). The undelayed
// pulse and its three delayed copies form a 4-bit Johnson code that steps
// every 2 ns: 1000 1100 1110 1111 0111 0011 0001 0000 (J1 J2 J3 J4), eight
// positions per 16 ns period. johnson[c][0] is J1, johnson[c][3] is J4.
module johnson_clock_gen #(
  parameter int unsigned N_TDC          = 4,
  parameter int unsigned INPUT_WIDTH_PS = 8400,
  parameter int unsigned EDGE_PS        = 1000,
  parameter int unsigned TAP_PS         = 2000,
  parameter real         GAIN           = 0.5
) (
  input  logic                  clk_in,
  output logic [N_TDC-1:0][3:0] johnson
);

  logic os_out;          // one-shot output
  real  threshold;       // comparator-set threshold, fraction of the input swing
  real  period_ps;       // measured crystal period
  real  width_ps;        // output width at the present threshold
  time  last_edge;

  initial begin
    threshold = 0.5;
    period_ps = 16000.0;
    last_edge = 0;
  end

  // one-shot with width regulation
  always begin
    os_out = 1'b0;
    @(posedge clk_in);
    if (last_edge != 0) period_ps = real'($time - last_edge);
    last_edge = $time;
    width_ps  = real'(INPUT_WIDTH_PS) - 2.0 * real'(EDGE_PS) * threshold;
    #(real'(EDGE_PS) * threshold);
    os_out = 1'b1;
    #(width_ps);
    os_out = 1'b0;
    // integrated duty-cycle error moves the threshold
    threshold = threshold + GAIN * (width_ps - period_ps / 2.0) / (2.0 * real'(EDGE_PS));
    if (threshold < 0.0) threshold = 0.0;
    if (threshold > 1.0) threshold = 1.0;
  end

  // per channel: direct tap plus three delay lines
  for (genvar c = 0; c < N_TDC; c++) begin : g_ch
    assign johnson[c][0] = os_out;
    assign #(1 * TAP_PS) johnson[c][1] = os_out;
    assign #(2 * TAP_PS) johnson[c][2] = os_out;
    assign #(3 * TAP_PS) johnson[c][3] = os_out;
  end

endmodule
