// rf_control_top: digital part of the synchrotron RF control system.
//
// The RF frequency of the synchrotron (1-8 MHz) comes from a digital
// synthesizer (DS) driven by a 20-bit word, 10 Hz per LSB. That word is the
// programmed frequency pattern plus corrections from two beam feedback loops,
// radial position (dR, PI control) and phase (dphi, P control), recomputed
// every 2 us. The patterns sit in double-buffered memories whose pointer runs
// on a 50 kHz time clock on the flat base and flat top and on the dipole-field
// B-clock during acceleration, so frequency tracks the magnet.
//
// Blocks: timing_gen (T-clock and cycle events), memory_module (five patterns
// and their pointer), digital_low_level (the loops and the DS word).
// Connections, as in the system block diagram:
//   timing_gen    -> memory_module: T-clock, capture, acceleration start,
//                                   flat top;
//   timing_gen    -> digital_low_level: feedback on/off (drives both loops'
//                                   F.B. STOP lines, stop = not on);
//   memory_module -> digital_low_level: frequency pattern (f REF) and
//                                   beam-position bias (dR REF, low 12 bits);
//   memory_module -> ports: voltage, ferrite bias and voltage correction
//                                   patterns for the analog RF chain.
// The computer, the B-clock generator, the monitors and ADCs, the DS and the
// analog RF chain are outside; their signals are ports. The reference and
// frequency switches of the loop circuit default to the pattern source when
// dr_ref_sel / f_ref_sel are 1.
module rf_control_top
  import rf_pkg::*;
#(
  parameter int unsigned DEPTH  = 131072,  // words per pattern unit
  parameter int unsigned TDIV   = 200,     // 10 MHz / 50 kHz
  parameter int unsigned FRAME  = 20,      // 2 us sample frame at 10 MHz
  parameter int unsigned SS_DIV = 3        // soft-start step, frames
) (
  input  logic        clk,
  input  logic        rst_n,
  // computer: pattern memories
  input  logic        host_we,
  input  logic [2:0]  host_sel,
  input  paddr_t      host_addr,
  input  pword_t      host_data,
  input  logic        host_reg_we,
  input  logic [2:0]  host_reg_sel,
  // computer: timing generator
  input  logic        tg_reg_we,
  input  logic [2:0]  tg_reg_sel,
  input  logic [19:0] tg_reg_data,
  input  logic        cycle_start,
  // B-clock generator
  input  logic        bclk_up,
  input  logic        bclk_dn,
  // monitor ADCs
  input  dword_t      adc_dr1,
  input  dword_t      adc_dr2,
  input  dword_t      adc_dp1,
  input  dword_t      adc_dp2,
  input  logic [DW-1:0] beam_int,
  output logic        adc_sample,
  // loop settings (front-panel switches)
  input  gain_t       g_dr1,
  input  gain_t       g_dr2,
  input  gain_t       g_dp1,
  input  gain_t       g_dp2,
  input  logic        avg_dr,
  input  logic        avg_dp,
  input  dword_t      dr_ref_man,
  input  logic        dr_ref_sel,
  input  dword_t      dp_ref,
  input  fword_t      f_ref_man,
  input  logic        f_ref_sel,
  input  gain_t       kp_dr,
  input  gain_t       ki_dr,
  input  gain_t       kp_dp,
  input  logic [DW-1:0] thr_dr,
  input  logic [DW-1:0] thr_dp,
  input  logic        reset_dr,
  input  logic        reset_dp,
  // digital synthesizer
  output fword_t      ds_freq,
  output logic        ds_load,
  // analog RF chain
  output pword_t      vo_pattern,
  output pword_t      fbias_pattern,
  output pword_t      vcor_pattern,
  // status and monitors
  output logic        tclk,
  output logic        fb_on,
  output paddr_t      pat_addr,
  output region_e     region,
  output logic        bank,
  output logic [NPAT-1:0] slewing,
  output dword_t      mon_dr,
  output dword_t      mon_dp,
  output dword_t      mon_all,
  output fword_t      mon_f,
  output logic        beam_ok_dr,
  output logic        beam_ok_dp,
  output logic [3:0]  ss_dr,
  output logic [3:0]  ss_dp,
  output dword_t      corr_dr,
  output dword_t      corr_dp
);
  logic   ev_capture, ev_acc_start, ev_flat_top;
  logic [19:0] tcount;
  pword_t pat [NPAT];

  timing_gen #(.TDIV(TDIV), .TW(20)) u_tg (
    .clk, .rst_n, .cycle_start, .reg_we(tg_reg_we), .reg_sel(tg_reg_sel), .reg_data(tg_reg_data),
    .tclk, .ev_capture, .ev_acc_start, .ev_flat_top, .fb_on, .tcount
  );

  memory_module #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .host_we, .host_sel, .host_addr, .host_data, .host_reg_we, .host_reg_sel,
    .tclk, .bclk_up, .bclk_dn, .ev_capture, .ev_acc_start, .ev_flat_top,
    .pat, .addr(pat_addr), .region, .bank, .slewing
  );

  assign vo_pattern    = pat[PAT_VOLT];
  assign fbias_pattern = pat[PAT_FBIAS];
  assign vcor_pattern  = pat[PAT_VCOR];

  digital_low_level #(.FRAME(FRAME), .SS_DIV(SS_DIV)) u_dlle (
    .clk, .rst_n,
    .adc_dr1, .adc_dr2, .adc_dp1, .adc_dp2, .beam_int, .adc_sample,
    .g_dr1, .g_dr2, .g_dp1, .g_dp2, .avg_dr, .avg_dp,
    .dr_ref_ext(dword_t'(pat[PAT_RBIAS][DW-1:0])), .dr_ref_man, .dr_ref_sel, .dp_ref,
    .f_ref_ext(fword_t'(pat[PAT_FREQ])), .f_ref_man, .f_ref_sel,
    .kp_dr, .ki_dr, .kp_dp, .thr_dr, .thr_dp,
    .stop_dr(!fb_on), .stop_dp(!fb_on), .reset_dr, .reset_dp,
    .ds_freq, .ds_load, .mon_dr, .mon_dp, .mon_all, .mon_f,
    .beam_ok_dr, .beam_ok_dp, .ss_dr, .ss_dp, .corr_dr, .corr_dp
  );
endmodule
