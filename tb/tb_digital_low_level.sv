// tb_digital_low_level: runs the complete digital control circuit frame by
// frame against a frame-level model written here (input gain ROMs, sum,
// 5-sample average, beam comparators, soft start, REF - x bias, P and PI
// gains, frequency sum and clamp). It checks:
//  * the DS word equals the model after every frame;
//  * the DS word for the ADC words of one sample appears exactly 20 clocks
//    (2 us at 10 MHz) after that sample strobe rises;
//  * soft start ramps a loop in over 45 frames (90 us) and out again when the
//    beam falls below threshold or F.B. STOP is raised;
//  * the external/manual reference switches work.
module tb_digital_low_level;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0;
  dword_t adc_dr1 = '0, adc_dr2 = '0, adc_dp1 = '0, adc_dp2 = '0;
  logic [11:0] beam_int = '0;
  logic adc_sample;
  gain_t g_dr1 = 4'd8, g_dr2 = 4'd8, g_dp1 = 4'd8, g_dp2 = 4'd8;
  logic avg_dr = 0, avg_dp = 0;
  dword_t dr_ref_ext = '0, dr_ref_man = '0, dp_ref = '0;
  logic dr_ref_sel = 1, f_ref_sel = 1;
  fword_t f_ref_ext = 20'd100000, f_ref_man = 20'd400000;
  gain_t kp_dr = 4'd8, ki_dr = 4'd1, kp_dp = 4'd8;
  logic [11:0] thr_dr = 12'd100, thr_dp = 12'd100;
  logic stop_dr = 0, stop_dp = 0, reset_dr = 0, reset_dp = 0;
  fword_t ds_freq, mon_f;
  logic ds_load, beam_ok_dr, beam_ok_dp;
  dword_t mon_dr, mon_dp, mon_all, corr_dr, corr_dp;
  logic [3:0] ss_dr, ss_dp;

  digital_low_level dut (.*);
  always #50 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_ramp_up = 0, n_ramp_dn = 0, n_avg = 0, n_manual = 0, n_int = 0, n_lat = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  function automatic int clamp(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction
  function automatic int fdiv8(int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  // ---- frame-level model -------------------------------------------------
  typedef struct {
    int hist[5];
    int cnt, pre, acc;
    bit above;
  } loop_m_t;
  loop_m_t mr, mp;
  int exp_ds = 0;

  function automatic int in_stage(ref loop_m_t m, input int x1, x2, g1, g2, bit avg);
    int s, sum5;
    s = clamp(clamp(fdiv8(x1 * g1)) + clamp(fdiv8(x2 * g2)));
    for (int i = 4; i > 0; i--) m.hist[i] = m.hist[i-1];
    m.hist[0] = s;
    sum5 = 0; foreach (m.hist[i]) sum5 += m.hist[i];
    return avg ? sum5 / 5 : s;
  endfunction

  function automatic int loop_step(ref loop_m_t m, input int x, r, kp, ki, bit use_int,
                                   int beam, thr, bit stop, bit rst);
    int e, es, p, i;
    bit en;
    en = m.above && !stop;          // comparator output of the previous frame
    m.above = (beam >= thr);
    if (rst) begin m.cnt = 0; m.pre = 0; m.acc = 0; return 0; end
    m.pre++;
    if (m.pre == 3) begin
      m.pre = 0;
      if (en && m.cnt < 15) m.cnt++;
      else if (!en && m.cnt > 0) m.cnt--;
    end
    e = clamp(r - x);
    es = (e * m.cnt) / 15;
    if (use_int) m.acc = clamp(m.acc + es);
    p = clamp(fdiv8(es * kp));
    i = use_int ? clamp(fdiv8(m.acc * ki)) : 0;
    return clamp(p + i);
  endfunction

  // ---- stimulus / checking per frame -------------------------------------
  int sample_cyc = -1;
  fword_t ds_before;

  task automatic frame(input bit chk);
    int xr, xp, cr, cp, f, cnt_before;
    // called right after the sample strobe rose, inputs already set
    sample_cyc = cyc;
    cnt_before = mr.cnt;
    xr = in_stage(mr, int'(adc_dr1), int'(adc_dr2), int'(g_dr1), int'(g_dr2), avg_dr);
    xp = in_stage(mp, int'(adc_dp1), int'(adc_dp2), int'(g_dp1), int'(g_dp2), avg_dp);
    cr = loop_step(mr, xr, dr_ref_sel ? int'(dr_ref_ext) : int'(dr_ref_man), int'(kp_dr), int'(ki_dr), 1,
                   int'(beam_int), int'(thr_dr), stop_dr, reset_dr);
    cp = loop_step(mp, xp, int'(dp_ref), int'(kp_dp), 0, 0, int'(beam_int), int'(thr_dp), stop_dp, reset_dp);
    if (mr.cnt > cnt_before) n_ramp_up++;
    if (mr.cnt < cnt_before) n_ramp_dn++;
    if (avg_dr || avg_dp) n_avg++;
    if (!dr_ref_sel || !f_ref_sel) n_manual++;
    if (mr.acc != 0) n_int++;
    f = int'(f_ref_sel ? f_ref_ext : f_ref_man) + clamp(cr + cp);
    f = f < 0 ? 0 : (f > 1048575 ? 1048575 : f);
    exp_ds = f;
    ds_before = ds_freq;
    // the word must not change before 20 clocks after the sample strobe rose
    repeat (19) begin
      @(posedge clk); #1;
      check(ds_freq == ds_before, "DS word stable inside the frame");
    end
    @(posedge clk); #1;
    if (chk) begin
      check(int'(ds_freq) == exp_ds, $sformatf("DS word %0d expected %0d", ds_freq, exp_ds));
      check(int'(ss_dr) == mr.cnt && int'(ss_dp) == mp.cnt, "soft-start counters");
      if (ds_freq != ds_before) begin
        n_lat++;
        check(cyc - sample_cyc == 20, $sformatf("latency %0d clocks", cyc - sample_cyc));
      end
    end
  endtask

  always @(posedge clk) cyc++;

  task automatic set_inputs(input int n);
    adc_dr1 = dword_t'($urandom_range(0, 600)) - dword_t'(300);
    adc_dr2 = dword_t'($urandom_range(0, 600)) - dword_t'(300);
    adc_dp1 = dword_t'($urandom_range(0, 600)) - dword_t'(300);
    adc_dp2 = dword_t'($urandom_range(0, 600)) - dword_t'(300);
    g_dr1 = gain_t'($urandom_range(4, 12)); g_dp2 = gain_t'($urandom_range(4, 12));
    f_ref_ext = 20'(100000 + 10 * n);
    dr_ref_ext = dword_t'(n % 50);
  endtask

  initial begin
    mr = '{hist: '{0,0,0,0,0}, cnt: 0, pre: 0, acc: 0, above: 0};
    mp = mr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    beam_int = 12'd500;
    for (int n = 0; n < 400; n++) begin
      while (!adc_sample) begin @(posedge clk); #1; end
      set_inputs(n);
      avg_dr = (n >= 120 && n < 200); avg_dp = (n >= 150 && n < 230);
      beam_int = (n >= 250 && n < 300) ? 12'd50 : 12'd500;   // beam lost: loops ramp out
      stop_dp  = (n >= 320 && n < 350);
      dr_ref_sel = !(n >= 360 && n < 370);
      f_ref_sel  = !(n >= 365 && n < 375);
      reset_dr = (n == 380);
      frame(n > 0);
    end
    check(n_ramp_up >= 15 && n_ramp_dn >= 15 && n_avg > 0 && n_manual > 0 && n_int > 0 && n_lat > 100,
          $sformatf("mechanisms: up %0d down %0d avg %0d manual %0d int %0d lat %0d",
                    n_ramp_up, n_ramp_dn, n_avg, n_manual, n_int, n_lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * 420) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
