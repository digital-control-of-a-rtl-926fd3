// tb_deadtime_gen: drives random compare waveforms into three legs and checks
// (a) the two gates of a leg are never on together, (b) after every change the
// newly conducting gate turns on once DTIME ticks have been counted when the input
// holds that long (tick every clock here, plus a run with a tick every third
// clock), (c) a gate follows its input otherwise, and (d) a disabled leg
// keeps both gates off.
module tb_deadtime_gen;
  logic clk = 1'b0, rst = 1'b1, tick;
  logic [5:0] dtime;
  logic [2:0] enable, pwm_raw;
  logic [5:0] pwm;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  deadtime_gen dut (.clk, .rst, .tick, .dtime, .enable, .pwm_raw, .pwm);

  int since [3];       // ticks seen since the last input change
  int clk_since [3];
  int tdiv;
  int ntick;

  task automatic run(int dt, int div, int nclk, logic [2:0] en);
    dtime = 6'(dt); enable = en; tdiv = div; ntick = 0;
    rst = 1'b1; pwm_raw = '0; tick = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int j = 0; j < 3; j++) begin since[j] = 1000; clk_since[j] = 1000; end
    for (int n = 0; n < nclk; n++) begin
      logic [2:0] nr;
      nr = pwm_raw;
      for (int j = 0; j < 3; j++)
        if ($urandom_range(0, 3 * (dt + 2) * div) == 0) nr[j] = ~nr[j];
      tick = (n % div) == 0;
      for (int j = 0; j < 3; j++) begin
        if (nr[j] != pwm_raw[j]) begin since[j] = 0; clk_since[j] = 0; end
        else begin
          clk_since[j]++;
          // a tick counts once the change has been registered
          if (tick && clk_since[j] >= 1) since[j]++;
        end
      end
      pwm_raw = nr;
      @(negedge clk);
      for (int j = 0; j < 3; j++) begin
        logic hi, lo, exp_on;
        hi = pwm[2*j]; lo = pwm[2*j+1];
        checks++;
        if (hi && lo) begin failures++; $display("FAIL leg %0d shoot-through", j); end
        if (!en[j]) begin
          checks++;
          if (hi || lo) begin failures++; $display("FAIL disabled leg %0d on", j); end
        end else if (clk_since[j] < 900) begin
          // registered output: on once DTIME ticks have been counted
          // ticks counted before this edge (the tick at this edge is not yet seen)
          exp_on = ((since[j] - ((tick && clk_since[j] >= 1) ? 1 : 0)) >= dt) && (clk_since[j] >= 1);
          checks++;
          if ((pwm_raw[j] ? hi : lo) != exp_on || (pwm_raw[j] ? lo : hi)) begin
            failures++;
            $display("FAIL leg %0d raw %0b hi %0b lo %0b since %0d clk %0d dt %0d", j, pwm_raw[j], hi, lo, since[j], clk_since[j], dt);
          end
        end
      end
    end
  endtask

  initial begin
    run(5, 1, 3000, 3'b111);
    run(0, 1, 1000, 3'b111);
    run(7, 3, 6000, 3'b011);
    run(63, 1, 8000, 3'b101);
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
