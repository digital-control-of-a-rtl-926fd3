// tb_carrier_gen: checks the phase-shifted carriers against an independent
// model: phase j sits at (master - j*P/PHAM) mod P, its carrier is that
// position (sawtooth) or the triangle min(pos, 2*FSW - pos) (symmetric), and
// period_start marks position 0. Runs symmetric and asymmetric carriers with
// three interleaved phases, two phases, and interleaving off; also checks
// that the master position walks through the whole period.
module tb_carrier_gen;
  import inv_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0;
  cnt_t fsw;
  logic [2:0] pham;
  logic phsh, sym;
  pos_t master_pos;
  cnt_t carrier [3];
  logic [2:0] period_start;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  carrier_gen dut (.clk, .rst, .tick, .fsw, .pham, .phsh, .sym,
                   .master_pos, .carrier, .period_start);

  int prev_master;
  int starts [3];

  task automatic run_case(int f, int ph, bit sh, bit sy, int nticks);
    int per, nact, off, pos, exp_c;
    fsw = cnt_t'(f); pham = 3'(ph); phsh = sh; sym = sy;
    rst = 1'b1; tick = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    per = sy ? 2 * f : f;
    nact = ph;
    prev_master = 0;
    for (int j = 0; j < 3; j++) starts[j] = 0;
    for (int n = 0; n < nticks; n++) begin
      // a tick every other clock
      @(negedge clk) tick = 1'b1;
      @(negedge clk) tick = 1'b0;
      checks++;
      if (int'(master_pos) != (prev_master + 1) % per) begin
        failures++;
        $display("FAIL master %0d after %0d (P=%0d)", master_pos, prev_master, per);
      end
      prev_master = int'(master_pos);
      for (int j = 0; j < 3; j++) begin
        off = sh ? (per - (j * per) / nact) % per : 0;
        pos = (int'(master_pos) + off) % per;
        exp_c = (sy && pos > f) ? 2 * f - pos : pos;
        if (j < nact || !sh) begin
          checks++;
          if (int'(carrier[j]) != exp_c) begin
            failures++;
            $display("FAIL phase %0d carrier %0d exp %0d (master %0d)", j, carrier[j], exp_c, master_pos);
          end
          checks++;
          if (period_start[j] != (pos == 0)) begin
            failures++;
            $display("FAIL phase %0d period_start %0b at pos %0d", j, period_start[j], pos);
          end
          if (period_start[j]) starts[j]++;
        end
      end
      // period_start is a single-clock pulse
      @(negedge clk);
      checks++;
      if (period_start != '0) begin failures++; $display("FAIL period_start held"); end
    end
    checks++;
    if (starts[0] < nticks / per - 1) begin failures++; $display("FAIL too few periods"); end
  endtask

  initial begin
    run_case(12, 3, 1'b1, 1'b1, 200);   // symmetric, 120 degrees
    run_case(12, 3, 1'b1, 1'b0, 200);   // asymmetric, 120 degrees
    run_case(10, 2, 1'b1, 1'b1, 120);   // two phases, 180 degrees
    run_case(9,  3, 1'b0, 1'b1, 100);   // interleave off
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
