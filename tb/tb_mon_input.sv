// tb_mon_input: drives random ADC words and gain settings into the monitor
// input stage and compares the latched output with a reference computed
// here: per channel floor(x*g/8) clamped to 12 bits, sum clamped, then either
// the newest sum or the truncated mean of the last five sums.
module tb_mon_input;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0, trig1 = 0, avg_on = 0;
  dword_t x1, x2, y;
  gain_t g1, g2;
  int checks = 0, failures = 0, n_avg = 0, n_sat = 0;
  int hist [5];

  mon_input dut (.*);
  always #50 clk = ~clk;

  function automatic int clamp(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction
  function automatic int fdiv8(int v);  // floor division by 8
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int s, expv, sum5;
    dword_t prev;
    x1 = '0; x2 = '0; g1 = '0; g2 = '0;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      x1 = dword_t'($urandom); x2 = dword_t'($urandom);
      if (n % 50 < 10) begin x1 = dword_t'(2047); x2 = dword_t'(2000); end
      g1 = gain_t'($urandom); g2 = gain_t'($urandom);
      avg_on = (n / 37) % 2 == 1;
      prev = y;
      @(negedge clk) sample = 1;
      @(negedge clk) sample = 0;
      s = clamp(clamp(fdiv8(int'(x1) * int'(g1))) + clamp(fdiv8(int'(x2) * int'(g2))));
      if (s == 2047) n_sat++;
      for (int i = 4; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = s;
      sum5 = 0; foreach (hist[i]) sum5 += hist[i];
      expv = avg_on ? sum5 / 5 : s;
      if (avg_on) n_avg++;
      // output must hold until trig1
      check(y == prev, "output holds until TRIG1");
      @(negedge clk) trig1 = 1;
      @(negedge clk) trig1 = 0;
      check(int'(y) == expv, $sformatf("y=%0d expected %0d (avg=%0b)", y, expv, avg_on));
    end
    check(n_avg > 0 && n_sat > 0, "averaging and saturation exercised");
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
