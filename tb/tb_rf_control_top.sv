// tb_rf_control_top: end-to-end run of the RF control system at its default
// sizes (128k-word pattern units, 50 kHz T-clock, 2 us frames). The computer
// side loads all five patterns and the region and timing registers; the
// testbench plays the B-clock generator and the beam monitors. Two complete
// machine cycles are run, the second after a bank swap to newly loaded
// patterns:
//   flat base (T-clock) -> acceleration (B+/B- clock, 1.1 -> ~3 MHz)
//   -> flat top (T-clock, smoothed jump).
// The beam is offset radially and the phase signal is noisy; the beam is
// lost for a while during the flat top of the first cycle.
// Checks every clock: the voltage, ferrite-bias and correction outputs equal
// the stored words at the pointer (read latency two clocks) or slew by one
// LSB; at every DS update the DS word equals the frequency pattern plus the
// two loop corrections; the radial loop pushes against the offset (PI sign);
// each mechanism (region moves, jump, B+ and B-, smoothing, bank swap, soft
// start in and out, beam-loss cut-off, averager) happens at least once.
module tb_rf_control_top;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_reg_we = 0, tg_reg_we = 0, cycle_start = 0;
  logic [2:0] host_sel = '0, host_reg_sel = '0, tg_reg_sel = '0;
  paddr_t host_addr = '0;
  pword_t host_data = '0;
  logic [19:0] tg_reg_data = '0;
  logic bclk_up = 0, bclk_dn = 0;
  dword_t adc_dr1 = '0, adc_dr2 = '0, adc_dp1 = '0, adc_dp2 = '0;
  logic [11:0] beam_int = '0;
  logic adc_sample;
  gain_t g_dr1 = 4'd8, g_dr2 = 4'd8, g_dp1 = 4'd8, g_dp2 = 4'd8;
  logic avg_dr = 1, avg_dp = 0;
  dword_t dr_ref_man = '0, dp_ref = '0;
  logic dr_ref_sel = 1, f_ref_sel = 1;
  fword_t f_ref_man = '0;
  gain_t kp_dr = 4'd4, ki_dr = 4'd1, kp_dp = 4'd8;
  logic [11:0] thr_dr = 12'd200, thr_dp = 12'd200;
  logic reset_dr = 0, reset_dp = 0;
  fword_t ds_freq, mon_f;
  logic ds_load, tclk, fb_on, bank, beam_ok_dr, beam_ok_dp;
  pword_t vo_pattern, fbias_pattern, vcor_pattern;
  paddr_t pat_addr;
  region_e region;
  logic [NPAT-1:0] slewing;
  dword_t mon_dr, mon_dp, mon_all, corr_dr, corr_dp;
  logic [3:0] ss_dr, ss_dp;

  rf_control_top dut (.*);
  always #50 clk = ~clk;   // 10 MHz

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (failures < 20 && !ok) $display("FAIL %s (cycle %0d)", msg, cyc);
    if (!ok) failures++;
  endtask

  // ---- pattern contents (computed, mirrored here) ------------------------
  localparam int R2 = 20, R3 = 220, R3E = 260, JUMP = 30, NA = 300;
  function automatic int fpat(int cyc_no, int a);   // frequency, 10 Hz units
    int base;
    base = 100000 + cyc_no * 500;
    if (a < R2)  return base + 10000;                 // 1.1 MHz flat base
    if (a < R3)  return base + (a - R2) * 1000;       // ramp, a = JUMP matches
    return base + (R3 - 1 - R2) * 1000 + 40;          // flat top, 40 LSB above
  endfunction
  function automatic int pword(int cyc_no, int k, int a);
    case (k)
      0: return fpat(cyc_no, a);
      3: return (a % 7) - 3 + cyc_no;                  // position bias (dR REF)
      default: return 5000 * k + 13 * a + (a >= R3 ? 20 : 0) + cyc_no;
    endcase
  endfunction
  int mem [2][NPAT][NA];

  // ---- mechanism counters ------------------------------------------------
  int n_r1 = 0, n_r3 = 0, n_jump2 = 0, n_bup = 0, n_bdn = 0, n_slew = 0, n_swap = 0;
  int n_ss_up = 0, n_ss_dn = 0, n_beamcut = 0, n_ds = 0, n_push = 0;
  paddr_t a_q1 = '0, a_q2 = '0, a_q3 = '0;
  logic b_q1 = 0, b_q2 = 0, b_q3 = 0, bank_q = 0;
  region_e reg_q = REG_IDLE;
  logic [3:0] ss_q = '0;
  logic [NPAT-1:0] slew_q = '0;
  pword_t out_q [3];
  bit loaded [2] = '{0, 0};
  logic ds_load_q = 0;

  always @(posedge clk) if (rst_n) begin
    pword_t outs [3];
    #1;
    cyc++;
    outs = '{vo_pattern, fbias_pattern, vcor_pattern};
    // pattern outputs against the mirrored memories
    for (int j = 0; j < 3; j++) begin
      int k;
      k = j == 0 ? 1 : (j == 1 ? 2 : 4);
      if (slewing[k]) begin
        n_slew++;
        check(outs[j] == out_q[j] + 1 || outs[j] == out_q[j] - 1, "one-LSB smoothing step");
      end else if (!slew_q[k] && loaded[b_q2] && int'(a_q2) < NA)
        check(int'(outs[j]) == mem[b_q2][k][a_q2], $sformatf("pattern %0d at %0d: %0d", k, a_q2, outs[j]));
      out_q[j] = outs[j];
    end
    // pointer movement bookkeeping
    if (region == REG_BASE && reg_q == REG_BASE && pat_addr == a_q1 + 1) n_r1++;
    if (region == REG_TOP && reg_q == REG_TOP && pat_addr == a_q1 + 1) n_r3++;
    if (region == REG_ACC && reg_q == REG_BASE) begin n_jump2++; check(pat_addr == paddr_t'(JUMP), "region-2 entry"); end
    if (region == REG_ACC && reg_q == REG_ACC && pat_addr == a_q1 + 1) n_bup++;
    if (region == REG_ACC && reg_q == REG_ACC && pat_addr == a_q1 - 1) n_bdn++;
    if (bank != bank_q) begin n_swap++; check(pat_addr == '0 && region == REG_BASE, "swap only at capture"); end
    check(fb_on || ss_dr <= ss_q, "no loop ramps in while the feedback is off");
    if (ss_dr > ss_q) n_ss_up++;
    if (ss_dr < ss_q) n_ss_dn++;
    if (fb_on && !beam_ok_dr && ss_dr < ss_q) n_beamcut++;
    // DS word = frequency pattern + corrections, checked one clock after
    // TRIG4; the pattern word used was read at the pointer three clocks ago
    if (ds_load_q && !slewing[0] && !slew_q[0] && loaded[b_q3] && int'(a_q3) < NA) begin
      int f;
      f = mem[b_q3][0][a_q3] + int'(mon_all);
      f = f < 0 ? 0 : (f > 1048575 ? 1048575 : f);
      n_ds++;
      check(int'(ds_freq) == f, $sformatf("DS word %0d expected %0d", ds_freq, f));
      // radial offset is +80 above a bias near 0: the loop must pull negative
      if (ss_dr == 15 && corr_dr < 0) n_push++;
    end
    ds_load_q = ds_load;
    a_q3 = a_q2; a_q2 = a_q1; a_q1 = pat_addr; b_q3 = b_q2; b_q2 = b_q1; b_q1 = bank; bank_q = bank;
    reg_q = region; ss_q = ss_dr; slew_q = slewing;
  end

  // ---- computer ------------------------------------------------------------
  task automatic load_patterns(input int cyc_no);
    int unit;
    unit = bank ? 0 : 1;      // the idle unit
    for (int k = 0; k < NPAT; k++)
      for (int a = 0; a < NA; a++) begin
        @(negedge clk);
        host_we = 1; host_sel = 3'(k); host_addr = paddr_t'(a);
        host_data = pword_t'(pword(cyc_no, k, a));
        mem[unit][k][a] = pword(cyc_no, k, a);
      end
    @(negedge clk) host_we = 0;
    loaded[unit] = 1;
    @(negedge clk); host_reg_we = 1; host_reg_sel = 3'd4; host_data = pword_t'(unit);
    @(negedge clk) host_reg_we = 0;
  endtask

  task automatic mem_reg(input int sel, input int v);
    @(negedge clk); host_reg_we = 1; host_reg_sel = 3'(sel); host_addr = paddr_t'(v);
    @(negedge clk) host_reg_we = 0;
  endtask
  task automatic tg_reg(input int sel, input int v);
    @(negedge clk); tg_reg_we = 1; tg_reg_sel = 3'(sel); tg_reg_data = 20'(v);
    @(negedge clk) tg_reg_we = 0;
  endtask

  // ---- beam monitors and B-clock -------------------------------------------
  always @(posedge clk) if (adc_sample) begin
    adc_dr1 <= dword_t'(40 + $urandom_range(0, 6) - 3);
    adc_dr2 <= dword_t'(40);
    adc_dp1 <= dword_t'($urandom_range(0, 60)) - dword_t'(30);
    adc_dp2 <= dword_t'($urandom_range(0, 60)) - dword_t'(30);
  end

  task automatic machine_cycle(input int cyc_no);
    @(negedge clk) cycle_start = 1;
    @(negedge clk) cycle_start = 0;
    // acceleration: B+ pulses (and a few B-) while in region-2
    wait (region == REG_ACC);
    while (region == REG_ACC) begin
      repeat (30) @(negedge clk);
      if ($urandom_range(0, 9) == 0) begin bclk_dn = 1; @(negedge clk) bclk_dn = 0; end
      else begin bclk_up = 1; @(negedge clk) bclk_up = 0; end
    end
    wait (!fb_on);
    repeat (3000) @(negedge clk);
  endtask

  initial begin
    foreach (out_q[j]) out_q[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    beam_int = 12'd1000;
    mem_reg(0, R2); mem_reg(1, R3); mem_reg(2, R3E); mem_reg(3, JUMP);
    // times in T-clock periods (20 us): capture, acc start, flat top, fb on, fb off
    tg_reg(0, 2); tg_reg(1, 12); tg_reg(2, 52); tg_reg(3, 4); tg_reg(4, 80);
    for (int c = 0; c < 2; c++) begin
      load_patterns(c);
      if (c == 0) fork
        begin
          // beam lost for a while in the flat top of the first cycle
          wait (region == REG_TOP);
          repeat (1000) @(negedge clk);
          beam_int = 12'd50;
          repeat (1500) @(negedge clk);
          beam_int = 12'd1000;
        end
      join_none
      machine_cycle(c);
    end
    check(n_r1 > 5 && n_r3 > 5, $sformatf("T-clock advance in regions 1/3: %0d/%0d", n_r1, n_r3));
    check(n_jump2 == 2, $sformatf("region-2 jumps %0d", n_jump2));
    check(n_bup > 50 && n_bdn > 0, $sformatf("B+ %0d B- %0d", n_bup, n_bdn));
    check(n_slew > 0, "flat-top smoothing");
    check(n_swap == 2, $sformatf("bank swaps %0d", n_swap));
    check(n_ss_up > 0 && n_ss_dn > 0, "soft start in and out");
    check(n_beamcut > 0, "beam-loss cut-off");
    check(n_ds > 500, $sformatf("DS updates checked %0d", n_ds));
    check(n_push > 0, "radial loop corrects the offset");
    $display("region1 %0d region3 %0d B+ %0d B- %0d slew %0d swaps %0d ss up %0d down %0d cut %0d ds %0d",
             n_r1, n_r3, n_bup, n_bdn, n_slew, n_swap, n_ss_up, n_ss_dn, n_beamcut, n_ds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
