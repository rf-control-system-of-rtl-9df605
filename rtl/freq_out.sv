// freq_out: frequency word stage of the digital control circuit.
//
// The dR and dphi loop corrections are added (12-bit, saturating; this sum is
// the "all" monitor value), sign-extended and added to the 20-bit frequency
// pattern word f_ref from the memory module. The result, one LSB = 10 Hz, is
// latched by TRIG4 and drives the digital synthesizer. The sum is clamped to
// 0 .. 2^20-1, i.e. 0 .. 10.48 MHz, which covers the 1-8 MHz RF range.
//
// From the published design: the two adders, 20-bit word, 10 Hz per bit, the TRIG4
// latch. This design's choice: the clamping. The published design also has a
// ROM + TRIG4 latch feeding a phase-adjust unit; its contents are not given
// and it is not part of this module.
module freq_out
  import rf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   trig4,
  input  dword_t dr,       // dR loop correction
  input  dword_t dp,       // dphi loop correction
  input  fword_t f_ref,    // frequency pattern
  output dword_t corr,     // dR + dphi (monitor "all")
  output fword_t f_sum,    // unlatched sum (20-bit display, monitor f)
  output fword_t ds_freq   // to the digital synthesizer
);
  logic signed [FW+1:0] s;

  always_comb begin
    corr = add_d(dr, dp);
    s = $signed({2'b00, f_ref}) + (FW+2)'(corr);
    if (s < 0)                                   f_sum = '0;
    else if (s > $signed({2'b00, {FW{1'b1}}}))   f_sum = '1;
    else                                         f_sum = fword_t'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ds_freq <= '0;
    else if (trig4) ds_freq <= f_sum;
  end
endmodule
