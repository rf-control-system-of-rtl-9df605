// tb_timing_gen: programs event times, starts a cycle and checks that the
// T-clock has a period of TDIV clocks (200 = 50 kHz at 10 MHz) and that each
// event fires once, on the programmed T-clock count after the cycle start.
module tb_timing_gen;
  logic clk = 0, rst_n = 0, cycle_start = 0, reg_we = 0;
  logic [2:0] reg_sel = '0;
  logic [19:0] reg_data = '0, tcount;
  logic tclk, ev_capture, ev_acc_start, ev_flat_top, fb_on;
  int checks = 0, failures = 0;
  int cyc = 0, last_t = -1, nt = 0, t_since = -1;
  int n_cap = 0, n_acc = 0, n_top = 0, on_at = -1, off_at = -1;
  logic fb_on_q = 0;

  timing_gen #(.TDIV(200), .TW(20)) dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(input int sel, input int v);
    @(negedge clk); reg_we = 1; reg_sel = 3'(sel); reg_data = 20'(v);
    @(negedge clk); reg_we = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cycle_start) t_since = 0;
    if (tclk) begin
      if (last_t >= 0) check(cyc - last_t == 200, "T-clock period 200 clocks");
      last_t = cyc; nt++;
      if (t_since >= 0) t_since++;
    end
    check(!(ev_capture || ev_acc_start || ev_flat_top) || tclk, "events coincide with T-clock");
    if (ev_capture)   begin n_cap++; check(t_since == 3, "capture at T=2"); end
    if (ev_acc_start) begin n_acc++; check(t_since == 8, "acc start at T=7"); end
    if (ev_flat_top)  begin n_top++; check(t_since == 15, "flat top at T=14"); end
    if (fb_on && !fb_on_q) on_at = t_since;
    if (!fb_on && fb_on_q) off_at = t_since;
    fb_on_q <= fb_on;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(0, 2); wr(1, 7); wr(2, 14); wr(3, 4); wr(4, 12);
    repeat (437) @(negedge clk);
    cycle_start = 1;
    @(negedge clk) cycle_start = 0;
    repeat (200 * 20) @(negedge clk);
    check(n_cap == 1 && n_acc == 1 && n_top == 1, "each event once");
    check(on_at == 5 && off_at == 13, $sformatf("fb on/off at %0d/%0d", on_at, off_at));
    check(nt >= 20, "T-clocks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
