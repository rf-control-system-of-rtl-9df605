// mon_input: input stage of one beam-monitor channel (dR or dphi).
//
// Two 12-bit ADC words (the published design feeds two per quantity)
// each pass a gain ROM with a 4-bit setting and are added. The sum either goes
// straight on or through the averager AVE, which outputs the mean of the last
// NAVG = 5 sums (sum/5). A switch (avg_on) selects between the two, and the
// TRIG1 strobe latches the result into y, the value shown on the 12-bit display
// and the MON1 monitor.
//
// Timing: x1/x2 are taken on the sample strobe; the averager history is
// shifted on the same strobe; y is updated on trig1, which the frame sequencer
// places after sample in the same frame. With avg_on = 0 the history is still
// kept, so switching the averager in gives a valid mean at once.
//
// The structure (ROM, adder, AVE /5, switch, TRIG1 latch) follows the loop
// diagram. The ROM contents (gain x*k/8), the moving-window reading of AVE and
// saturation are this design's choices.
module mon_input
  import rf_pkg::*;
#(
  parameter int unsigned NAVG = 5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sample,   // ADC words valid
  input  logic   trig1,    // TRIG1 latch strobe
  input  dword_t x1,
  input  dword_t x2,
  input  gain_t  g1,
  input  gain_t  g2,
  input  logic   avg_on,   // AVE switch
  output dword_t y
);
  dword_t hist [NAVG];     // last NAVG channel sums, hist[0] newest
  logic signed [31:0] acc;
  dword_t avg_v, sel_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NAVG; i++) hist[i] <= '0;
    end else if (sample) begin
      hist[0] <= add_d(rom_gain(x1, g1), rom_gain(x2, g2));
      for (int i = 1; i < NAVG; i++) hist[i] <= hist[i-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NAVG; i++) acc = acc + 32'(hist[i]);
    avg_v = dword_t'(acc / $signed(NAVG));
    sel_v = avg_on ? avg_v : hist[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     y <= '0;
    else if (trig1) y <= sel_v;
  end
endmodule
