// tb_freq_divider: checks that the divider pulses `tick` for exactly one
// clock every DIV clocks (200 MHz / 10 = 20 MHz with the default), for the
// default and for DIV = 3.
module tb_freq_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic tick10, tick3;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  freq_divider                u10 (.clk, .rst, .tick(tick10));
  freq_divider #(.DIV(3))     u3  (.clk, .rst, .tick(tick3));

  int last10 = -1, last3 = -1, n10 = 0, n3 = 0, cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (tick10) begin
      if (last10 >= 0) begin
        checks++;
        if (cyc - last10 != 10) begin failures++; $display("FAIL: DIV=10 spacing %0d", cyc - last10); end
      end
      last10 = cyc; n10++;
    end
    if (tick3) begin
      if (last3 >= 0) begin
        checks++;
        if (cyc - last3 != 3) begin failures++; $display("FAIL: DIV=3 spacing %0d", cyc - last3); end
      end
      last3 = cyc; n3++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (1000) @(posedge clk);
    checks++; if (n10 < 99 || n10 > 100) begin failures++; $display("FAIL: %0d ticks of 10 in 1000", n10); end
    checks++; if (n3 < 332 || n3 > 334) begin failures++; $display("FAIL: %0d ticks of 3", n3); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
