// tb_sine_ref: steps the 300-point reference through two periods and checks
// every sample against round(AMP*sin(2*pi*k/300)) computed with real
// arithmetic (within one LSB), the index wrap, and that the table has the
// 110 V rms amplitude (peak 155.56 V).
module tb_sine_ref;
  import inv_pkg::*;
  logic clk = 1'b0, rst = 1'b1, step = 1'b0;
  sig_t vref;
  logic [8:0] idx;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  sine_ref dut (.clk, .rst, .step, .vref, .idx);

  localparam real PI = 3.14159265358979;
  real sumsq = 0.0;
  int peak = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 600; k++) begin
      int exp;
      @(negedge clk);
      exp = int'($rtoi(39825.0 * $sin(2.0 * PI * real'(k % 300) / 300.0) + (k % 300 < 150 ? 0.5 : -0.5)));
      checks++;
      if (int'(idx) != k % 300) begin failures++; $display("FAIL idx %0d at k=%0d", idx, k); end
      checks++;
      if (int'(vref) - exp > 1 || exp - int'(vref) > 1) begin
        failures++;
        $display("FAIL k=%0d vref %0d expected %0d", k, vref, exp);
      end
      if (k < 300) begin
        sumsq += (real'(vref) / 256.0) ** 2;
        if (int'(vref) > peak) peak = int'(vref);
      end
      // advance
      step = 1'b1;
      @(negedge clk) step = 1'b0;
    end
    checks++;
    if ($sqrt(sumsq / 300.0) < 109.9 || $sqrt(sumsq / 300.0) > 110.1) begin
      failures++; $display("FAIL rms %f", $sqrt(sumsq / 300.0));
    end
    checks++;
    if (peak != 39825) begin failures++; $display("FAIL peak %0d", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
