// tb_freq_out: random loop corrections and frequency patterns; the DS word
// must be f_ref + clamp12(dr + dp), clamped to 0 .. 2^20-1, and change only
// on TRIG4.
module tb_freq_out;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0, trig4 = 0;
  dword_t dr, dp, corr;
  fword_t f_ref, f_sum, ds_freq;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  freq_out dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int c, f;
    fword_t prev;
    dr = '0; dp = '0; f_ref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      dr = dword_t'($urandom); dp = dword_t'($urandom);
      f_ref = fword_t'($urandom);
      if (n % 20 == 1) f_ref = 20'd100;
      if (n % 20 == 2) f_ref = 20'hFFF80;
      c = int'(dr) + int'(dp);
      c = c > 2047 ? 2047 : (c < -2048 ? -2048 : c);
      f = int'(f_ref) + c;
      if (f < 0) begin f = 0; n_lo++; end
      if (f > 1048575) begin f = 1048575; n_hi++; end
      prev = ds_freq;
      @(negedge clk);
      check(ds_freq == prev, "no change without TRIG4");
      check(int'(corr) == c, "corr sum");
      trig4 = 1;
      @(negedge clk) trig4 = 0;
      check(int'(ds_freq) == f, $sformatf("ds=%0d expected %0d", ds_freq, f));
    end
    check(n_lo > 0 && n_hi > 0, "both clamps exercised");
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
