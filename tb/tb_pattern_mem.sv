// tb_pattern_mem: fills both units of a small pattern memory with different
// data, reads them back through the pointer port in either bank setting,
// checks that writes only reach the idle unit, and checks the flat-top
// smoothing: after the event the output must step by exactly one LSB per
// clock from the old value to the stored word and then follow the memory.
module tb_pattern_mem;
  logic clk = 0, rst_n = 0, bank = 0, wr_en = 0, flat_top_evt = 0, slewing;
  logic [7:0] wr_addr = '0, addr = '0;
  logic [19:0] wr_data = '0, dout;
  int checks = 0, failures = 0, n_slew = 0;
  logic [19:0] ma [256], mb [256];

  pattern_mem #(.DEPTH(256), .WIDTH(20)) dut (.*);
  always #50 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic write_idle(input int a, input logic [19:0] d);
    @(negedge clk); wr_en = 1; wr_addr = 8'(a); wr_data = d;
    if (bank) ma[a] = d; else mb[a] = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < 256; a++) begin
      @(negedge clk) addr = 8'(a);
      @(negedge clk); @(negedge clk);
      check(dout == (bank ? mb[a] : ma[a]), $sformatf("read bank %0d addr %0d", bank, a));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    bank = 1; for (int a = 0; a < 256; a++) write_idle(a, 20'($urandom));   // fills A
    bank = 0; for (int a = 0; a < 256; a++) write_idle(a, 20'($urandom));   // fills B
    read_all();                      // reads A
    bank = 1; read_all();            // reads B
    write_idle(5, 20'h12345);        // into A while B is in use
    read_all();
    bank = 0; read_all();
    // smoothing: last value 1000 (addr 10), region-3 head 1040 at addr 20,
    // then 990 at addr 30 (downward slew)
    bank = 1;
    write_idle(10, 20'd1000); write_idle(20, 20'd1040); write_idle(21, 20'd1041); write_idle(30, 20'd990);
    bank = 0;
    @(negedge clk) addr = 8'd10;
    repeat (3) @(negedge clk);
    check(dout == 20'd1000, "start value");
    @(negedge clk) flat_top_evt = 1; addr = 8'd20;
    @(negedge clk) flat_top_evt = 0;
    begin
      logic [19:0] prev;
      int steps;
      prev = dout; steps = 0;
      repeat (60) begin
        @(negedge clk);
        if (slewing) n_slew++;
        check(dout == prev || dout == prev + 1, "one-LSB upward steps");
        if (dout != prev) steps++;
        prev = dout;
      end
      check(dout == 20'd1040 && steps == 40, $sformatf("slewed to head: dout=%0d steps=%0d", dout, steps));
    end
    @(negedge clk) addr = 8'd21;
    @(negedge clk); @(negedge clk);
    check(dout == 20'd1041, "follows memory after catching up");
    @(negedge clk) flat_top_evt = 1; addr = 8'd30;
    @(negedge clk) flat_top_evt = 0;
    repeat (60) @(negedge clk);
    check(dout == 20'd990, "downward slew to 990");
    check(n_slew > 0, "slewing flag seen");
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
