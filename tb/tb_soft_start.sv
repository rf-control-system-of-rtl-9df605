// tb_soft_start: ramps the soft-start counter up and down. With SS_DIV = 3
// the counter must take one step every 3 frame ticks, reach 15 after 45
// ticks (90 us with 2 us frames), fall back at the same rate when disabled
// and clear immediately on reset.
module tb_soft_start;
  logic clk = 0, rst_n = 0, tick = 0, reset_cnt = 0, enable = 0;
  logic [3:0] cnt;
  logic full;
  int checks = 0, failures = 0;
  int model = 0, pre = 0;

  soft_start #(.SS_DIV(3)) dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s cnt=%0d model=%0d", msg, cnt, model); end
  endtask

  task automatic frames(input int n);
    repeat (n) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
      pre++;
      if (pre == 3) begin
        pre = 0;
        if (enable && model < 15) model++;
        else if (!enable && model > 0) model--;
      end
      check(int'(cnt) == model, "counter value");
      check(full == (model == 15), "full flag");
    end
  endtask

  initial begin
    int t15;
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    t15 = 0;
    while (cnt != 15 && t15 < 100) begin frames(1); t15++; end
    check(t15 == 45, $sformatf("full ramp took %0d frames, expected 45", t15));
    frames(10);
    enable = 0;
    frames(20);
    enable = 1;
    frames(7);
    @(negedge clk) reset_cnt = 1;
    @(negedge clk) reset_cnt = 0;
    model = 0; pre = 0;
    check(cnt == 0, "reset clears");
    frames(30);
    enable = 0;
    frames(60);
    check(cnt == 0, "ramped down to zero");
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
