// tb_dclink_div: random and corner divisions y = A*2^15/B (truncated toward
// zero, saturated to +/-32767) checked against 64-bit integer division, with
// the latency from start to done (40 clocks) and ignoring a second start
// while busy.
module tb_dclink_div;
  import inv_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  sig_t a, b;
  ynorm_t y;
  logic done, busy;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  dclink_div dut (.clk, .rst, .start, .a, .b, .y, .done, .busy);

  function automatic longint model(longint x, longint d);
    longint q, m;
    m = (x < 0) ? -x : x;
    if (d <= 0) q = 32767;
    else begin
      q = (m * 32768) / d;
      if (q > 32767) q = 32767;
    end
    return (x < 0) ? -q : q;
  endfunction

  task automatic divide(longint x, longint d, bit poke);
    int lat;
    @(negedge clk);
    a = sig_t'(x); b = sig_t'(d); start = 1'b1;
    @(negedge clk) start = poke;   // a start while busy must be ignored
    if (poke) begin a = 24'sd1; b = 24'sd1; end
    @(negedge clk) start = 1'b0;
    lat = 2;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    checks++;
    if (longint'(y) != model(x, d)) begin
      failures++;
      $display("FAIL %0d / %0d: got %0d expected %0d", x, d, y, model(x, d));
    end
    checks++;
    // lat counts clock edges from the one that takes start: done is set 40 later
    if (lat != 41) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // 100 V over 400 V -> 0.25
    divide(100 * 256, 400 * 256, 1'b0);
    divide(-100 * 256, 400 * 256, 1'b1);
    divide(300 * 256, 400 * 256, 1'b0);   // saturates
    divide(5, 0, 1'b0);                   // divide by zero
    divide(-8388608, 7, 1'b0);
    divide(0, 12345, 1'b0);
    for (int n = 0; n < 500; n++) begin
      longint x, d;
      x = longint'($signed($urandom)) >>> 9;
      d = longint'($urandom_range(1, 8388607));
      if (n % 4 == 0) d = d >> 8;
      if (n % 7 == 0) d = -d;
      divide(x, d, n % 5 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
