// digital_low_level: the digital control circuit of the RF system.
//
// It closes two beam feedback loops around the digital synthesizer (DS):
//  * dR loop, radial position: input stage -> bias (REF - dR) -> soft start
//    -> proportional + integral gain;
//  * dphi loop, beam phase: input stage -> bias -> soft start ->
//    proportional gain.
// The two corrections are added, then added to the frequency pattern word,
// and the 20-bit sum (10 Hz per LSB) is latched to the DS. Each loop runs only
// while its beam-intensity comparator says there is enough beam and its
// F.B. STOP input is low; the soft-start counter then ramps the loop in and
// out over about 100 us.
//
// Timing: everything is paced by trig_seq. ADC words are sampled on the
// sample strobe (once every FRAME = 20 clocks, 2 us at 10 MHz) and the DS word
// they produce appears FRAME clocks later. adc_sample is the strobe to the
// converters.
//
// The reference inputs dR REF and f REF each have a switch between the
// external source (memory module) and a manual setting, as drawn in the loop
// diagram. Monitor outputs (mon_*) carry the values the circuit shows on its
// displays and MON1 outputs.
module digital_low_level
  import rf_pkg::*;
#(
  parameter int unsigned FRAME  = 20,
  parameter int unsigned SS_DIV = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  // monitor ADCs
  input  dword_t adc_dr1,
  input  dword_t adc_dr2,
  input  dword_t adc_dp1,
  input  dword_t adc_dp2,
  input  logic [DW-1:0] beam_int,
  output logic   adc_sample,
  // input stage settings
  input  gain_t  g_dr1,
  input  gain_t  g_dr2,
  input  gain_t  g_dp1,
  input  gain_t  g_dp2,
  input  logic   avg_dr,
  input  logic   avg_dp,
  // references
  input  dword_t dr_ref_ext,
  input  dword_t dr_ref_man,
  input  logic   dr_ref_sel,   // 1: external (pattern), 0: manual
  input  dword_t dp_ref,
  input  fword_t f_ref_ext,
  input  fword_t f_ref_man,
  input  logic   f_ref_sel,    // 1: external (pattern), 0: manual
  // loop gains and control
  input  gain_t  kp_dr,
  input  gain_t  ki_dr,
  input  gain_t  kp_dp,
  input  logic [DW-1:0] thr_dr,
  input  logic [DW-1:0] thr_dp,
  input  logic   stop_dr,      // dR F.B. STOP
  input  logic   stop_dp,      // dphi F.B. STOP
  input  logic   reset_dr,     // RESET(R)
  input  logic   reset_dp,     // RESET(phi)
  // outputs
  output fword_t ds_freq,
  output logic   ds_load,      // TRIG4: DS word updated on the next clock
  output dword_t mon_dr,
  output dword_t mon_dp,
  output dword_t mon_all,
  output fword_t mon_f,
  output logic   beam_ok_dr,
  output logic   beam_ok_dp,
  output logic [3:0] ss_dr,
  output logic [3:0] ss_dp,
  output dword_t corr_dr,
  output dword_t corr_dp
);
  logic sample, trig1, trig2, trig3, trig4;
  dword_t x_dr, x_dp, dr_ref;
  fword_t f_ref;

  assign adc_sample = sample;
  assign ds_load    = trig4;
  assign dr_ref     = dr_ref_sel ? dr_ref_ext : dr_ref_man;
  assign f_ref      = f_ref_sel  ? f_ref_ext  : f_ref_man;
  assign mon_dr     = x_dr;
  assign mon_dp     = x_dp;

  trig_seq #(.FRAME(FRAME), .T1(2), .T2(FRAME/4+1), .T3(FRAME/2), .T4(FRAME-1)) u_seq (
    .clk, .rst_n, .sample, .trig1, .trig2, .trig3, .trig4
  );

  mon_input u_in_dr (
    .clk, .rst_n, .sample, .trig1, .x1(adc_dr1), .x2(adc_dr2),
    .g1(g_dr1), .g2(g_dr2), .avg_on(avg_dr), .y(x_dr)
  );
  mon_input u_in_dp (
    .clk, .rst_n, .sample, .trig1, .x1(adc_dp1), .x2(adc_dp2),
    .g1(g_dp1), .g2(g_dp2), .avg_on(avg_dp), .y(x_dp)
  );

  beam_cmp u_cmp_dr (.clk, .rst_n, .sample, .intensity(beam_int), .thresh(thr_dr), .above(beam_ok_dr));
  beam_cmp u_cmp_dp (.clk, .rst_n, .sample, .intensity(beam_int), .thresh(thr_dp), .above(beam_ok_dp));

  fb_ctrl #(.USE_INT(1'b1), .SS_DIV(SS_DIV)) u_loop_dr (
    .clk, .rst_n, .sample, .trig2, .trig3, .loop_reset(reset_dr),
    .enable(beam_ok_dr && !stop_dr), .x(x_dr), .ref_in(dr_ref),
    .kp(kp_dr), .ki(ki_dr), .y(corr_dr), .err(), .ss_cnt(ss_dr), .ss_full()
  );
  fb_ctrl #(.USE_INT(1'b0), .SS_DIV(SS_DIV)) u_loop_dp (
    .clk, .rst_n, .sample, .trig2, .trig3, .loop_reset(reset_dp),
    .enable(beam_ok_dp && !stop_dp), .x(x_dp), .ref_in(dp_ref),
    .kp(kp_dp), .ki('0), .y(corr_dp), .err(), .ss_cnt(ss_dp), .ss_full()
  );

  freq_out u_fout (
    .clk, .rst_n, .trig4, .dr(corr_dr), .dp(corr_dp), .f_ref,
    .corr(mon_all), .f_sum(mon_f), .ds_freq
  );
endmodule
