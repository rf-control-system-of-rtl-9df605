// trig_seq: sample-frame sequencer of the digital control circuit.
//
// The monitor signals are digitised once every 2 us and the processing runs
// on a 10 MHz clock, so one sample frame is FRAME = 20 clocks. A free-running
// slot counter issues, once per frame, a one-clock strobe for each step:
//   slot 0   sample : the ADC words are valid and enter the input stage
//   slot T1  trig1  : input latch (monitor value after gain/average)
//   slot T2  trig2  : integrator latch of the PI loop
//   slot T3  trig3  : loop output latch
//   slot T4  trig4  : latch of the 20-bit word to the digital synthesizer
// With T4 = FRAME-1 the synthesizer word changes exactly FRAME clocks (2 us)
// after the sample strobe, the delay the system is specified with. The frame
// length and the 2 us delay are the published design's; the slots T1..T3 are this
// design's choice (any increasing order works). Strobes are registered.
module trig_seq #(
  parameter int unsigned FRAME = 20,
  parameter int unsigned T1    = 2,
  parameter int unsigned T2    = 6,
  parameter int unsigned T3    = 10,
  parameter int unsigned T4    = 19
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample,
  output logic trig1,
  output logic trig2,
  output logic trig3,
  output logic trig4
);
  localparam int unsigned SW = $clog2(FRAME);
  logic [SW-1:0] slot;

  initial begin
    assert (T1 > 0 && T1 < T2 && T2 < T3 && T3 < T4 && T4 < FRAME)
      else $error("trig_seq: slots must be increasing and inside the frame");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) slot <= '0;
    else if (slot == SW'(FRAME-1)) slot <= '0;
    else slot <= slot + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {sample, trig1, trig2, trig3, trig4} <= '0;
    end else begin
      // Registered: strobe for slot s is high during the clock after slot==s-1.
      sample <= (slot == SW'(FRAME-1));
      trig1  <= (slot == SW'(T1-1));
      trig2  <= (slot == SW'(T2-1));
      trig3  <= (slot == SW'(T3-1));
      trig4  <= (slot == SW'(T4-1));
    end
  end
endmodule
