// tb_fb_ctrl: drives two loops, one with the integral path (as the dR loop)
// and one without (as the dphi loop), through frames of sample / TRIG2 /
// TRIG3 with random measurements, references and gains, toggling the enable
// and pulsing RESET. A model written here tracks the soft-start counter,
// the integrator and the expected output of both loops.
module tb_fb_ctrl;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0, trig2 = 0, trig3 = 0, loop_reset = 0, enable = 0;
  dword_t x, ref_in, y_pi, y_p, err_pi, err_p;
  gain_t kp, ki;
  logic [3:0] cnt_pi, cnt_p;
  logic full_pi, full_p;
  int checks = 0, failures = 0, n_sat = 0, n_ramp = 0;
  int m_cnt = 0, m_pre = 0, m_acc = 0;

  fb_ctrl #(.USE_INT(1'b1), .SS_DIV(3)) dut_pi (
    .clk, .rst_n, .sample, .trig2, .trig3, .loop_reset, .enable, .x, .ref_in, .kp, .ki,
    .y(y_pi), .err(err_pi), .ss_cnt(cnt_pi), .ss_full(full_pi));
  fb_ctrl #(.USE_INT(1'b0), .SS_DIV(3)) dut_p (
    .clk, .rst_n, .sample, .trig2, .trig3, .loop_reset, .enable, .x, .ref_in, .kp, .ki,
    .y(y_p), .err(err_p), .ss_cnt(cnt_p), .ss_full(full_p));

  always #50 clk = ~clk;

  function automatic int clamp(int v);
    return v > 2047 ? 2047 : (v < -2048 ? -2048 : v);
  endfunction
  function automatic int fdiv8(int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    int e, es, p, i, exp_pi, exp_p;
    x = '0; ref_in = '0; kp = '0; ki = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      enable = (n % 150) < 100;
      x = dword_t'($urandom_range(0, 400)) - dword_t'(200);
      ref_in = dword_t'($urandom_range(0, 200)) - dword_t'(100);
      if (n % 97 < 5) begin x = dword_t'(-2048); ref_in = dword_t'(2047); end
      kp = gain_t'($urandom); ki = gain_t'($urandom_range(0, 3));
      // sample: soft-start step
      pulse(sample);
      m_pre++;
      if (m_pre == 3) begin
        m_pre = 0;
        if (enable && m_cnt < 15) m_cnt++;
        else if (!enable && m_cnt > 0) m_cnt--;
      end
      if (m_cnt > 0 && m_cnt < 15) n_ramp++;
      e = clamp(int'(ref_in) - int'(x));
      if (e == 2047) n_sat++;
      es = (e * m_cnt) / 15;
      check(int'(err_pi) == e, "biased error REF - x");
      check(int'(cnt_pi) == m_cnt && int'(cnt_p) == m_cnt, "soft-start counters");
      pulse(trig2);
      m_acc = clamp(m_acc + es);
      pulse(trig3);
      p = clamp(fdiv8(es * int'(kp)));
      i = clamp(fdiv8(m_acc * int'(ki)));
      exp_pi = clamp(p + i);
      exp_p = p;
      check(int'(y_pi) == exp_pi, $sformatf("PI y=%0d expected %0d", y_pi, exp_pi));
      check(int'(y_p) == exp_p, $sformatf("P y=%0d expected %0d", y_p, exp_p));
      if (n % 211 == 210) begin
        pulse(loop_reset);
        m_acc = 0; m_cnt = 0; m_pre = 0;
        check(y_pi == 0 && y_p == 0 && cnt_pi == 0, "reset clears");
      end
    end
    check(n_sat > 0 && n_ramp > 0, "saturation and ramp exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
