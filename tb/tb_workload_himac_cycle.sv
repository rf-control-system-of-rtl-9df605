// tb_workload_himac_cycle: one HIMAC-size machine cycle through the whole
// system at its default sizes and real rates.
//   flat base     1000 T-clocks (20 ms at 50 kHz), 1 MHz
//   acceleration  dipole 0.1 T -> 1.5 T in 0.2 G B-clock steps = 70000 steps,
//                 at the 2 T/s ramp one B+ pulse every 10 us (100 clocks);
//                 the frequency word rises 10 LSB (100 Hz) per step, 1 -> 8 MHz
//   flat top      2000 T-clocks (40 ms) of a 131072-word pattern whose
//                 region-3 head is 10 LSB above the last acceleration word
// The frequency pattern fills the whole 128k-word unit (region-1 0..999,
// region-2 1000..70999, region-3 71000..131071); the linear frequency ramp
// is an illustration, a real pattern follows the ion's velocity. The beam
// feedback inputs are idle, so the DS word must equal the pattern word at
// every update; the test checks that, the 70000 pointer steps, the final
// frequency and the smoothed step into the flat top.
module tb_workload_himac_cycle;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_reg_we = 0, tg_reg_we = 0, cycle_start = 0;
  logic [2:0] host_sel = '0, host_reg_sel = '0, tg_reg_sel = '0;
  paddr_t host_addr = '0;
  pword_t host_data = '0;
  logic [19:0] tg_reg_data = '0;
  logic bclk_up = 0, bclk_dn = 0;
  dword_t adc_dr1 = '0, adc_dr2 = '0, adc_dp1 = '0, adc_dp2 = '0;
  logic [11:0] beam_int = 12'd0;
  logic adc_sample;
  gain_t g_dr1 = '0, g_dr2 = '0, g_dp1 = '0, g_dp2 = '0;
  logic avg_dr = 0, avg_dp = 0;
  dword_t dr_ref_man = '0, dp_ref = '0;
  logic dr_ref_sel = 0, f_ref_sel = 1;
  fword_t f_ref_man = '0;
  gain_t kp_dr = '0, ki_dr = '0, kp_dp = '0;
  logic [11:0] thr_dr = 12'd4095, thr_dp = 12'd4095;
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
  always #50 clk = ~clk;

  localparam int R2 = 1000, R3 = 71000, R3E = 131071, NSTEP = 70000;
  function automatic int fpat(int a);
    if (a < R2) return 100000;
    if (a < R3) return 100000 + (a - R2) * 10;
    return 800000 + (a - R3) / 1000;
  endfunction

  int checks = 0, failures = 0, n_ds = 0, n_slew = 0, max_addr = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (failures < 20 && !ok) $display("FAIL %s", msg);
    if (!ok) failures++;
  endtask

  paddr_t a1 = '0, a2 = '0, a3 = '0;
  logic ld_q = 0, sl_q = 0, sl_q2 = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (ld_q && !slewing[0] && !sl_q && !sl_q2 && region != REG_IDLE) begin
      n_ds++;
      check(int'(ds_freq) == fpat(int'(a3)), $sformatf("DS %0d vs pattern %0d at %0d", ds_freq, fpat(int'(a3)), a3));
    end
    if (slewing[0]) n_slew++;
    if (int'(pat_addr) > max_addr) max_addr = int'(pat_addr);
    ld_q = ds_load; sl_q2 = sl_q; sl_q = slewing[0];
    a3 = a2; a2 = a1; a1 = pat_addr;
  end

  task automatic mem_reg(input int sel, input int v);
    @(negedge clk); host_reg_we = 1; host_reg_sel = 3'(sel); host_addr = paddr_t'(v); host_data = pword_t'(v);
    @(negedge clk) host_reg_we = 0;
  endtask
  task automatic tg_reg(input int sel, input int v);
    @(negedge clk); tg_reg_we = 1; tg_reg_sel = 3'(sel); tg_reg_data = 20'(v);
    @(negedge clk) tg_reg_we = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the idle unit (B) with the frequency pattern, then request it
    for (int a = 0; a <= R3E; a++) begin
      @(negedge clk); host_we = 1; host_sel = 3'd0; host_addr = paddr_t'(a); host_data = pword_t'(fpat(a));
    end
    @(negedge clk) host_we = 0;
    mem_reg(0, R2); mem_reg(1, R3); mem_reg(2, R3E); mem_reg(3, R2); mem_reg(4, 1);
    // capture T=1, acc start T=1001, flat top after the 70000 steps + margin
    tg_reg(0, 1); tg_reg(1, 1001); tg_reg(2, 1001 + NSTEP / 2 + 100); tg_reg(3, 1_000_000); tg_reg(4, 1_000_000);
    @(negedge clk) cycle_start = 1;
    @(negedge clk) cycle_start = 0;
    wait (region == REG_ACC);
    check(pat_addr == paddr_t'(R2), "acceleration starts where the flat base ends");
    for (int n = 0; n < NSTEP; n++) begin
      repeat (99) @(negedge clk);
      bclk_up = 1;
      @(negedge clk) bclk_up = 0;
    end
    repeat (10) @(negedge clk);
    check(pat_addr == paddr_t'(R3 - 1), $sformatf("70000 B-clock steps reach the end of region-2 (%0d)", pat_addr));
    check(ds_freq == 20'd799990, $sformatf("8 MHz reached: %0d", ds_freq));
    wait (region == REG_TOP);
    repeat (2000 * 200) @(negedge clk);
    check(n_slew == 10, $sformatf("smoothed flat-top step: %0d clocks", n_slew));
    check(int'(pat_addr) == R3 + 1999 || int'(pat_addr) == R3 + 2000, $sformatf("flat-top T-clock advance %0d", pat_addr));
    check(n_ds > 350000, $sformatf("DS updates checked %0d", n_ds));
    $display("DS updates checked %0d, highest address %0d", n_ds, max_addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
