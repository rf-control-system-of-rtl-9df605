// tb_memory_module: loads five different patterns through the computer
// interface into the idle units, sets the region registers, requests a bank
// swap and runs two machine cycles (T-clock and B-clock driven here). Every
// clock each output is compared with the stored word at the pointer two
// clocks earlier (pointer register + synchronous read), except while the
// output is slewing after the flat-top jump, where it must move by one LSB
// per clock. It checks that the bank changes only at capture, and that writes
// during a cycle do not disturb the unit in use.
module tb_memory_module;
  import rf_pkg::*;
  localparam int D = 256;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_reg_we = 0;
  logic [2:0] host_sel = '0, host_reg_sel = '0;
  paddr_t host_addr = '0;
  pword_t host_data = '0;
  logic tclk = 0, bclk_up = 0, bclk_dn = 0, ev_capture = 0, ev_acc_start = 0, ev_flat_top = 0;
  pword_t pat [NPAT];
  paddr_t addr;
  region_e region;
  logic bank;
  logic [NPAT-1:0] slewing;
  int checks = 0, failures = 0, n_slew = 0, n_swap = 0, n_cmp = 0;
  pword_t mem [2][NPAT][D];
  paddr_t a_d1 = '0, a_d2 = '0;
  logic b_d1 = 0, b_d2 = 0;
  pword_t prev [NPAT];
  bit loaded [2] = '{0, 0};

  memory_module #(.DEPTH(D)) dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // compare outputs with the model
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int k = 0; k < NPAT; k++) begin
      if (slewing[k]) begin
        n_slew++;
        check(pat[k] == prev[k] + 1 || pat[k] == prev[k] - 1, "one-LSB slew");
      end else if (!$past(slewing[k]) && loaded[b_d2]) begin
        n_cmp++;
        check(pat[k] == mem[b_d2][k][a_d2[7:0]], $sformatf("pattern %0d at %0d: %0d vs %0d", k, a_d2, pat[k], mem[b_d2][k][a_d2[7:0]]));
      end
      prev[k] = pat[k];
    end
    a_d2 = a_d1; a_d1 = addr;
    b_d2 = b_d1; b_d1 = bank;
  end

  task automatic load_idle(input int seed);
    int unit;
    unit = bank ? 0 : 1;
    loaded[unit] = 1;
    for (int k = 0; k < NPAT; k++)
      for (int a = 0; a < D; a++) begin
        pword_t v;
        // smooth ramps, region-3 offset so the flat-top jump needs smoothing
        v = pword_t'(1000 * (k + 1) + 3 * a + seed + (a >= 160 ? 25 : 0));
        @(negedge clk); host_we = 1; host_sel = 3'(k); host_addr = paddr_t'(a); host_data = v;
        mem[unit][k][a] = v;
      end
    @(negedge clk) host_we = 0;
  endtask

  task automatic reg_wr(input int sel, input int v);
    @(negedge clk); host_reg_we = 1; host_reg_sel = 3'(sel); host_addr = paddr_t'(v); host_data = pword_t'(v);
    @(negedge clk); host_reg_we = 0;
  endtask

  task automatic pulse_ev(input int which);
    @(negedge clk);
    ev_capture = (which == 0); ev_acc_start = (which == 1); ev_flat_top = (which == 2);
    @(negedge clk) {ev_capture, ev_acc_start, ev_flat_top} = '0;
  endtask

  task automatic run(input int n, input bit tc, input int up_rate);
    repeat (n) begin
      @(negedge clk);
      tclk = tc && ($urandom_range(0, 9) == 0);
      bclk_up = (up_rate > 0) && ($urandom_range(0, up_rate) == 0);
      bclk_dn = (up_rate > 0) && ($urandom_range(0, 40) == 0);
      @(negedge clk) {tclk, bclk_up, bclk_dn} = '0;
    end
  endtask

  initial begin
    logic bank_before;
    for (int u = 0; u < 2; u++) for (int k = 0; k < NPAT; k++) for (int a = 0; a < D; a++) mem[u][k][a] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2; cyc++) begin
      load_idle(cyc * 7);
      reg_wr(0, 40); reg_wr(1, 160); reg_wr(2, 200); reg_wr(3, 52 + cyc);
      bank_before = bank;
      reg_wr(4, cyc == 0 ? 1 : 0);
      run(20, 1, 0);
      check(bank == bank_before, "no swap before capture");
      pulse_ev(0);
      repeat (2) @(negedge clk);
      check(bank != bank_before, "swap at capture");
      if (bank != bank_before) n_swap++;
      run(300, 1, 0);
      pulse_ev(1);
      check(addr == paddr_t'(52 + cyc), "jump to region-2 entry");
      run(400, 0, 3);
      // computer writes into the idle unit mid-cycle: must not disturb outputs
      begin
        int unit;
        unit = bank ? 0 : 1;
        @(negedge clk); host_we = 1; host_sel = 3'd0; host_addr = addr; host_data = 20'hABCDE;
        mem[unit][0][addr[7:0]] = 20'hABCDE;
        @(negedge clk) host_we = 0;
      end
      pulse_ev(2);
      check(addr == paddr_t'(160) && region == REG_TOP, "jump to region-3 head");
      run(300, 1, 0);
    end
    check(n_slew > 0 && n_swap == 2 && n_cmp > 1000, $sformatf("slew %0d swaps %0d compares %0d", n_slew, n_swap, n_cmp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
