// tb_workload_damping: damping of a synchrotron oscillation by the dphi loop.
//
// The digital control circuit is closed around a behavioural model of the
// beam (this file), the counterpart of a synchrotron-oscillation simulator:
//   beam phase   phi_b'' = -ws^2 (phi_b - phi_rf)     (linearised)
//   RF phase     phi_rf' = 2 pi df                     (df from the DS word,
//                                                     3 us late: DS and cavity)
//   monitor      dphi = phi_rf - phi_b, 7 us late, 1 LSB = 0.037 deg
// The loop corrects df = -K dphi (error = REF - x with REF = 0), so with
// e = phi_b - phi_rf: e'' + 2 pi K e' + ws^2 e = 0 and the oscillation is
// damped; critical damping is 2 pi K = 2 ws, i.e. K = 2 fs in Hz per radian.
// The monitor polarity is chosen here so that the loop damps. In the loop's
// units (10 Hz per DS LSB, 0.037 deg = 6.458e-4 rad per ADC LSB, the two ADC
// words carry half the signal each, ROM gain kp/8): kp = 8 K 6.458e-4 / 10.
// The oscillation is started with a 20 deg phase error at fs = 4, 6 and
// 7 kHz, the loop is switched in, and the amplitude after 1 ms is compared
// with the start. With the loop disabled the amplitude must stay.
module tb_workload_damping;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0;
  dword_t adc_dr1 = '0, adc_dr2 = '0, adc_dp1 = '0, adc_dp2 = '0;
  logic [11:0] beam_int = 12'd1000;
  logic adc_sample;
  gain_t g_dr1 = 4'd0, g_dr2 = 4'd0, g_dp1 = 4'd8, g_dp2 = 4'd8;
  logic avg_dr = 0, avg_dp = 0;
  dword_t dr_ref_ext = '0, dr_ref_man = '0, dp_ref = '0;
  logic dr_ref_sel = 0, f_ref_sel = 0;
  fword_t f_ref_ext = '0, f_ref_man = 20'd100000;     // 1 MHz, as in the test
  gain_t kp_dr = '0, ki_dr = '0, kp_dp = '0;
  logic [11:0] thr_dr = 12'd4095, thr_dp = 12'd100;
  logic stop_dr = 1, stop_dp = 0, reset_dr = 0, reset_dp = 0;
  fword_t ds_freq, mon_f;
  logic ds_load, beam_ok_dr, beam_ok_dp;
  dword_t mon_dr, mon_dp, mon_all, corr_dr, corr_dp;
  logic [3:0] ss_dr, ss_dp;

  digital_low_level dut (.*);
  always #50 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  localparam real PI = 3.14159265358979;
  localparam real DT = 100e-9;                  // one clock
  localparam real RAD_PER_LSB = 0.037 * PI / 180.0;
  localparam int  MON_DELAY = 70;               // 7 us monitor delay
  real ws, phi_b, w_b, phi_rf, dphi_hist [MON_DELAY];
  int  hp = 0, fp = 0;
  localparam int RF_DELAY = 30;                 // 1.5 us DS + 1.5 us cavity
  real df_hist [RF_DELAY];

  // beam model, one step per clock
  bit model_on = 0;
  always @(posedge clk) if (model_on) begin
    real df, dphi, meas;
    df = df_hist[fp];
    df_hist[fp] = (real'(ds_freq) - real'(f_ref_man)) * 10.0;
    fp = (fp + 1) % RF_DELAY;
    phi_rf = phi_rf + 2.0 * PI * df * DT;
    w_b = w_b - ws * ws * (phi_b - phi_rf) * DT;
    phi_b = phi_b + w_b * DT;
    dphi = phi_b - phi_rf;
    meas = dphi_hist[hp];
    dphi_hist[hp] = dphi;
    hp = (hp + 1) % MON_DELAY;
    if (adc_sample) begin
      int code;
      code = int'(-meas / RAD_PER_LSB / 2.0);
      code = code > 2047 ? 2047 : (code < -2048 ? -2048 : code);
      adc_dp1 <= dword_t'(code);
      adc_dp2 <= dword_t'(code);
    end
  end

  function automatic real amp_now();
    return (phi_b - phi_rf) < 0 ? -(phi_b - phi_rf) : (phi_b - phi_rf);
  endfunction

  task automatic run_case(input real fs, input bit loop_on, output real ratio);
    real a0, a1, k_hz;
    ws = 2.0 * PI * fs;
    phi_b = 20.0 * PI / 180.0; w_b = 0.0; phi_rf = 0.0;
    foreach (dphi_hist[i]) dphi_hist[i] = phi_b;
    k_hz = 2.0 * fs;                                  // critical damping
    kp_dp = loop_on ? gain_t'($rtoi(8.0 * k_hz * RAD_PER_LSB / 10.0 + 0.5)) : '0;
    @(negedge clk) reset_dp = 1;
    @(negedge clk) reset_dp = 0;
    // peak of the oscillation over the first period
    a0 = 0.0;
    repeat (int'(1.0 / fs / DT)) begin @(posedge clk); if (amp_now() > a0) a0 = amp_now(); end
    repeat (10000 - int'(2.0 / fs / DT)) @(posedge clk);
    a1 = 0.0;
    repeat (int'(1.0 / fs / DT)) begin @(posedge clk); if (amp_now() > a1) a1 = amp_now(); end
    ratio = a1 / a0;
    $display("fs=%0.0f Hz loop=%0b kp=%0d: amplitude %0.2f deg -> %0.2f deg after 1 ms",
             fs, loop_on, kp_dp, a0 * 180.0 / PI, a1 * 180.0 / PI);
  endtask

  initial begin
    real r4, r6, r7, r_off;
    phi_b = 0; w_b = 0; phi_rf = 0; ws = 1.0;
    foreach (df_hist[i]) df_hist[i] = 0.0;
    foreach (dphi_hist[i]) dphi_hist[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);     // DS word valid before the beam model starts
    model_on = 1;
    run_case(4000.0, 1'b0, r_off);
    check(r_off > 0.8, "undamped without the loop");
    run_case(4000.0, 1'b1, r4);
    check(r4 < 0.2, "4 kHz oscillation damped");
    run_case(6000.0, 1'b1, r6);
    check(r6 < 0.2, "6 kHz oscillation damped");
    run_case(7000.0, 1'b1, r7);
    check(ss_dp == 4'd15, "dphi loop fully on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
