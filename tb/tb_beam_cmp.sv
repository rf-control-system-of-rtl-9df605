// tb_beam_cmp: random intensities and thresholds; 'above' must equal
// intensity >= threshold after each sample strobe and hold between strobes.
module tb_beam_cmp;
  logic clk = 0, rst_n = 0, sample = 0, above;
  logic [11:0] intensity, thresh;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;

  beam_cmp dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    bit expv;
    intensity = '0; thresh = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      intensity = 12'($urandom); thresh = 12'($urandom);
      if (n % 10 == 0) thresh = intensity;
      expv = (int'(intensity) >= int'(thresh));
      if (expv) n_hi++; else n_lo++;
      @(negedge clk) sample = 1;
      @(negedge clk) sample = 0;
      check(above == expv, $sformatf("int=%0d thr=%0d above=%0b", intensity, thresh, above));
      intensity = ~intensity;
      @(negedge clk);
      check(above == expv, "holds between strobes");
    end
    check(n_hi > 0 && n_lo > 0, "both outcomes");
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
