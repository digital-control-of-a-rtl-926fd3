// tb_rep_ctrl: drives the repetitive controller (N = 20, M = 3) with random
// errors and compares every output with an independent model of
//   y(k) = q*y(k-N) + e(k),  u(k) = g*y(k-(N-M)),  e'(k) = e(k) + u(k),
// including switching the controller off (u = 0, memory emptied) and on
// again, the buffer clear after reset, and the 4-clock start-to-done latency.
// A last run with q = 1 and g = 1 shows the periodic build-up: a constant
// error adds itself once per period.
module tb_rep_ctrl;
  import inv_pkg::*;
  localparam int NN = 20, MM = 3;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, en;
  gain_t q, g;
  sig_t err, err_mod, u_rc;
  logic done, ready;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  rep_ctrl #(.N(NN), .M(MM)) dut (.clk, .rst, .start, .en, .q, .g, .err,
                                  .err_mod, .u_rc, .done, .ready);

  longint yh [$];     // y history, index = sample number

  function automatic longint sat(longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return v;
  endfunction

  task automatic sample(longint e, int k);
    longint w, yo, u, y;
    int lat;
    w  = (k >= NN) ? yh[k - NN] : 0;
    yo = (k >= NN - MM) ? yh[k - (NN - MM)] : 0;
    u  = en ? sat((longint'(g) * yo) >>> 12) : 0;
    y  = en ? sat(sat((longint'(q) * w) >>> 12) + e) : 0;
    yh.push_back(y);
    @(negedge clk);
    err = sig_t'(e); start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 50) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (longint'(u_rc) != u || longint'(err_mod) != sat(e + u)) begin
      failures++;
      $display("FAIL k=%0d e=%0d u=%0d (exp %0d) e'=%0d", k, e, u_rc, u, err_mod);
    end
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    en = 1'b1; q = Q_DEF; g = G_DEF; err = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready during clear"); end
    repeat (NN + 2) @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready after clear"); end
    for (int k = 0; k < 400; k++) begin
      if (k == 150) en = 1'b0;          // controller off
      if (k == 190) en = 1'b1;          // and on again
      if (k == 300) begin q = gain_t'($urandom_range(0, 4095)); g = gain_t'($urandom_range(0, 4095)); end
      sample(longint'($signed($urandom)) >>> 12, k);
    end
    // q = g = 1: a constant error e gives u = m*e after m periods
    en = 1'b0;
    for (int k = 400; k < 400 + NN; k++) sample(0, k);
    en = 1'b1; q = 20'sd4096; g = 20'sd4096;
    for (int k = 400 + NN; k < 400 + 5 * NN; k++) sample(256, k);
    checks++;
    if (u_rc != 24'sd1024) begin failures++; $display("FAIL build-up u=%0d", u_rc); end
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
