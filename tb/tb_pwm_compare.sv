// tb_pwm_compare: drives three triangle carriers and random V_MOD updates at
// random times. An independent model keeps the value in force for each
// period (taken at the carrier restart) and predicts the registered output
// carrier < value. Also checks the measured on-time of whole periods:
// 2*V_MOD - 1 of 2*FSW carrier steps.
module tb_pwm_compare;
  import inv_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  cnt_t vmod [3], carrier [3];
  logic [2:0] period_start, pwm_raw;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  pwm_compare dut (.clk, .rst, .vmod, .carrier, .period_start, .pwm_raw);

  localparam int F = 20;
  int pos [3];
  int held [3];
  logic [2:0] exp_raw;
  int high_cnt [3];
  int changes = 0;

  initial begin
    for (int j = 0; j < 3; j++) begin
      pos[j] = j * 2 * F / 3; vmod[j] = 12'd5; carrier[j] = '0; held[j] = 0;
    end
    period_start = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      // inputs for this clock
      for (int j = 0; j < 3; j++) begin
        carrier[j] = cnt_t'((pos[j] > F) ? 2 * F - pos[j] : pos[j]);
        period_start[j] = (pos[j] == 0);
        if ($urandom_range(0, 30) == 0) begin vmod[j] = cnt_t'($urandom_range(0, F + 2)); changes++; end
        if (period_start[j]) held[j] = int'(vmod[j]);
        exp_raw[j] = int'(carrier[j]) < held[j];
      end
      @(negedge clk);
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (pwm_raw[j] != exp_raw[j]) begin
          failures++;
          $display("FAIL n=%0d phase %0d got %0b exp %0b (carrier %0d value %0d)", n, j, pwm_raw[j], exp_raw[j], carrier[j], held[j]);
        end
        pos[j] = (pos[j] + 1) % (2 * F);
      end
    end
    // fixed values: duty over whole periods equals V_MOD/FSW
    for (int j = 0; j < 3; j++) begin vmod[j] = cnt_t'(5 + 5 * j); high_cnt[j] = 0; end
    for (int n = 0; n < 2 * F * 12; n++) begin
      for (int j = 0; j < 3; j++) begin
        carrier[j] = cnt_t'((pos[j] > F) ? 2 * F - pos[j] : pos[j]);
        period_start[j] = (pos[j] == 0);
      end
      @(negedge clk);
      for (int j = 0; j < 3; j++) begin
        if (n >= 2 * F * 2) high_cnt[j] += int'(pwm_raw[j]);
        pos[j] = (pos[j] + 1) % (2 * F);
      end
    end
    for (int j = 0; j < 3; j++) begin
      checks++;
      // 10 periods of 2F clocks; carrier values below V occur 2V-1 times
      // per triangle period
      if (high_cnt[j] != 10 * (2 * (5 + 5 * j) - 1)) begin
        failures++;
        $display("FAIL duty phase %0d: %0d clocks high", j, high_cnt[j]);
      end
    end
    checks++;
    if (changes < 100) begin failures++; $display("FAIL too few updates"); end
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
