// tb_pattern_seq: walks the pointer through a machine cycle with random
// T-clock and B+/B- pulses and random stray events, comparing each clock with
// a model written here: region-1 T-clock advance from 0 after capture, jump
// to the region-2 entry on acceleration start, B+/B- up/down within region-2,
// jump to the region-3 head on flat top, T-clock advance to the region-3 end.
module tb_pattern_seq;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tclk = 0, bclk_up = 0, bclk_dn = 0, ev_capture = 0, ev_acc_start = 0, ev_flat_top = 0;
  paddr_t r2_start, r3_start, r3_end, jump_addr, addr;
  region_e region;
  logic capture_evt, flat_top_evt;
  int checks = 0, failures = 0;
  int m_addr = 0, m_reg = 0;        // 0 idle 1 base 2 acc 3 top
  int n_up = 0, n_dn = 0, n_stop = 0, n_jump2 = 0, n_jump3 = 0;

  pattern_seq dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%0d model=%0d reg=%0d/%0d", msg, addr, m_addr, region, m_reg); end
  endtask

  task automatic step();
    bit ft;
    ft = 0;
    @(posedge clk);
    if (ev_capture) begin m_addr = 0; m_reg = 1; end
    else if (ev_acc_start && m_reg == 1) begin m_addr = int'(jump_addr); m_reg = 2; n_jump2++; end
    else if (ev_flat_top && m_reg == 2) begin m_addr = int'(r3_start); m_reg = 3; ft = 1; n_jump3++; end
    else case (m_reg)
      1: if (tclk) begin if (m_addr < int'(r2_start) - 1) m_addr++; else n_stop++; end
      2: begin
        if (bclk_up && !bclk_dn) begin if (m_addr < int'(r3_start) - 1) begin m_addr++; n_up++; end else n_stop++; end
        else if (bclk_dn && !bclk_up && m_addr > int'(r2_start)) begin m_addr--; n_dn++; end
      end
      3: if (tclk && m_addr < int'(r3_end)) m_addr++;
      default: ;
    endcase
    #1;
    check(int'(addr) == m_addr && int'(region) == m_reg, "pointer");
    check(flat_top_evt == ft, "flat-top event");
  endtask

  task automatic drive(input int nclk, input int mode);
    repeat (nclk) begin
      @(negedge clk);
      tclk = ($urandom_range(0, 3) == 0);
      bclk_up = (mode == 2) ? ($urandom_range(0, 2) != 0) : ($urandom_range(0, 9) == 0);
      bclk_dn = ($urandom_range(0, 4) == 0);
      ev_capture = 0; ev_acc_start = 0; ev_flat_top = 0;
      // stray events that must be ignored outside their region
      if ($urandom_range(0, 60) == 0) begin
        if (mode == 1) ev_flat_top = 1;
        if (mode == 3) ev_acc_start = 1;
      end
      step();
    end
  endtask

  task automatic event_pulse(input int which);
    @(negedge clk);
    {tclk, bclk_up, bclk_dn} = '0;
    ev_capture = (which == 0); ev_acc_start = (which == 1); ev_flat_top = (which == 2);
    step();
  endtask

  initial begin
    r2_start = 17'd40; r3_start = 17'd120; r3_end = 17'd150; jump_addr = 17'd55;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3; cyc++) begin
      drive(20, 0);
      event_pulse(0); drive(200, 1);
      event_pulse(1); drive(400, 2);
      event_pulse(2); drive(200, 3);
      jump_addr = paddr_t'(45 + cyc * 10);
    end
    check(n_up > 0 && n_dn > 0 && n_stop > 0 && n_jump2 == 3 && n_jump3 == 3, "all pointer moves exercised");
    $display("B+ %0d B- %0d stops %0d", n_up, n_dn, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
