// tb_trig_seq: checks the frame sequencer. Every strobe must repeat every
// FRAME clocks and sit at its slot relative to the sample strobe; TRIG4 must
// fall FRAME-1 clocks after sample so the DS word changes 2 us (20 clocks)
// after the sample.
module tb_trig_seq;
  logic clk = 0, rst_n = 0;
  logic sample, trig1, trig2, trig3, trig4;
  int checks = 0, failures = 0;
  int cyc = 0, last_sample = -1, nsamples = 0;
  int last_t [4] = '{-1, -1, -1, -1};

  trig_seq dut (.*);

  always #50 clk = ~clk;  // 10 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    logic [3:0] t;
    cyc++;
    t = {trig4, trig3, trig2, trig1};
    check($onehot0({sample, t}), "at most one strobe per clock");
    if (sample) begin
      if (last_sample >= 0) check(cyc - last_sample == 20, "sample period 20 clocks");
      last_sample = cyc; nsamples++;
    end
    foreach (last_t[i]) if (t[i]) begin
      int exp_off;
      exp_off = (i == 0) ? 2 : (i == 1) ? 6 : (i == 2) ? 10 : 19;
      if (last_sample >= 0) check(cyc - last_sample == exp_off, $sformatf("trig%0d slot", i+1));
      if (last_t[i] >= 0) check(cyc - last_t[i] == 20, $sformatf("trig%0d period", i+1));
      last_t[i] = cyc;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (400) @(posedge clk);
    check(nsamples >= 19, "sample strobes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
