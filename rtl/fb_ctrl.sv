// fb_ctrl: one feedback loop of the digital control circuit (dR or dphi).
//
// Per sample frame:
//   err   = REF - x                       bias: sets the loop's operating point
//   err_s = err * cnt / 15                soft start, cnt from soft_start
//   p     = ROM_Kp(err_s)                 proportional path
//   acc  <= acc + err_s        at TRIG2   integral path (only if USE_INT)
//   i     = ROM_Ki(acc)
//   y    <= p + i              at TRIG3   loop correction, 12-bit display
// All sums saturate at 12 bits. RESET clears the integrator latch, the output
// latch and the soft-start counter. The dR loop is built with USE_INT = 1
// (proportional and integral gains) and the dphi loop with USE_INT = 0
// (proportional gain only), as the loop description states.
//
// Timing: x must be stable from TRIG1 on; the soft-start counter steps on the
// sample strobe; y changes one clock after TRIG3.
//
// From the published design: the bias adder with its signs, the soft-start counter
// and gate, the Kp ROM, the adder + TRIG2 latch integrator with its Ki ROM,
// the TRIG3 output latch and RESET. This design's choices: the ROM contents
// (gain k/8), the cnt/15 scale, the 12-bit saturating accumulator.
module fb_ctrl
  import rf_pkg::*;
#(
  parameter bit          USE_INT = 1'b1,
  parameter int unsigned SS_DIV  = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,     // frame strobe
  input  logic       trig2,
  input  logic       trig3,
  input  logic       loop_reset, // RESET(R) / RESET(phi)
  input  logic       enable,     // beam above threshold and not F.B. STOP
  input  dword_t     x,          // latched monitor value
  input  dword_t     ref_in,     // REF (bias)
  input  gain_t      kp,
  input  gain_t      ki,
  output dword_t     y,          // loop correction
  output dword_t     err,        // biased error (before soft start)
  output logic [3:0] ss_cnt,
  output logic       ss_full
);
  dword_t err_s, p_v, i_v, acc;
  logic signed [31:0] prod;

  soft_start #(.SS_DIV(SS_DIV)) u_ss (
    .clk, .rst_n, .tick(sample), .reset_cnt(loop_reset), .enable,
    .cnt(ss_cnt), .full(ss_full)
  );

  always_comb begin
    err   = sat_d(32'(ref_in) - 32'(x));
    prod  = 32'(err) * $signed({28'd0, ss_cnt});
    err_s = dword_t'(prod / 32'sd15);
    p_v   = rom_gain(err_s, kp);
    i_v   = USE_INT ? rom_gain(acc, ki) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                acc <= '0;
    else if (loop_reset)       acc <= '0;
    else if (trig2 && USE_INT) acc <= add_d(acc, err_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          y <= '0;
    else if (loop_reset) y <= '0;
    else if (trig3)      y <= add_d(p_v, i_v);
  end
endmodule
