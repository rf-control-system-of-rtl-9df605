// beam_cmp: beam-intensity comparator of one feedback loop.
//
// The 12-bit beam-intensity word is compared with the loop's F.B. threshold
// setting once per sample frame; 'above' (the 1-bit display in the loop
// diagram) lets the loop's soft-start counter run. There is one comparator
// for the dR loop and one for the dphi loop, each with its own threshold, so
// a loop is only closed when the beam is strong enough for its monitor.
//
// From the published design: the comparator, its 12-bit inputs and 1-bit output.
// This design's choices: unsigned comparison, above = intensity >= thresh,
// registered on the sample strobe.
module beam_cmp
  import rf_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sample,
  input  logic [DW-1:0] intensity,
  input  logic [DW-1:0] thresh,
  output logic          above
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      above <= 1'b0;
    else if (sample) above <= (intensity >= thresh);
  end
endmodule
