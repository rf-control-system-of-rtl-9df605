// soft_start: start-stop function of one feedback loop.
//
// A 4-bit counter sets how much of the loop error is passed on: the error is
// scaled by cnt/15 downstream. While the loop is enabled the counter climbs
// one step every SS_DIV sample frames until it reaches 15; when the loop is
// disabled it walks back down to 0 at the same rate, so the correction is
// switched on and off smoothly. With SS_DIV = 3 and 2 us frames a full ramp
// takes 15 x 3 x 2 us = 90 us, matching the loop's specified start-stop time
// constant of about 100 us. RESET clears the counter at once.
//
// enable is the gate in front of the counter: beam intensity above the
// loop's threshold and the loop's F.B. STOP line not asserted.
//
// From the published design: the 4-bit counter, its reset, the gate feeding it and the
// ~100 us time constant. This design's choices: the step rate (SS_DIV), the
// ramp down on disable and the linear cnt/15 scale.
module soft_start #(
  parameter int unsigned SS_DIV = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,       // one pulse per sample frame
  input  logic       reset_cnt,  // RESET(R) / RESET(phi)
  input  logic       enable,     // gate output
  output logic [3:0] cnt,
  output logic       full        // cnt == 15: loop fully on
);
  localparam int unsigned PW = (SS_DIV > 1) ? $clog2(SS_DIV) : 1;
  logic [PW-1:0] pre;
  logic step;

  assign step = tick && (pre == PW'(SS_DIV-1));
  assign full = (cnt == 4'd15);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0;
      cnt <= '0;
    end else if (reset_cnt) begin
      pre <= '0;
      cnt <= '0;
    end else if (tick) begin
      pre <= step ? '0 : pre + 1'b1;
      if (step) begin
        if (enable && cnt != 4'd15)     cnt <= cnt + 1'b1;
        else if (!enable && cnt != '0)  cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
