// tb_dpwm: runs the complete PWM generator with a short divider and small
// FSW and measures the gate signals: switching period (2*FSW*DIV clocks
// symmetric, FSW*DIV asymmetric), the interleave delay between the legs'
// high-side turn-on edges (P/PHAM steps), the high-side on-time ((2*V_MOD-1)
// steps less the dead time, symmetric), no shoot-through, and legs above
// PHAM held off.
module tb_dpwm;
  import inv_pkg::*;
  localparam int DIVT = 2;
  logic clk = 1'b0, rst = 1'b1;
  cnt_t fsw;
  logic [2:0] pham;
  logic phsh, sym;
  cnt_t vmod [3];
  logic [5:0] dtime;
  cnt_t adsyn;
  logic tick;
  logic [5:0] pwm;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  dpwm #(.DIV(DIVT)) dut (.clk, .rst, .fsw, .pham, .phsh, .sym, .vmod, .dtime,
                          .adsyn, .tick, .pwm);

  int cyc = 0;
  int rise [3][$];
  int fall [3][$];
  logic [5:0] pwm_d;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run(int f, int ph, bit sy, int v0, int v1, int v2, int dt, int nper);
    int per_clk, step_shift, on_exp;
    fsw = cnt_t'(f); pham = 3'(ph); sym = sy; phsh = 1'b1; dtime = 6'(dt);
    vmod[0] = cnt_t'(v0); vmod[1] = cnt_t'(v1); vmod[2] = cnt_t'(v2);
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int j = 0; j < 3; j++) begin rise[j].delete(); fall[j].delete(); end
    pwm_d = '0;
    per_clk = (sy ? 2 * f : f) * DIVT;
    repeat (per_clk * nper) begin
      @(negedge clk);
      cyc++;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (pwm[2*j] && pwm[2*j+1]) fail($sformatf("shoot-through leg %0d", j));
        if (j >= ph) begin
          checks++;
          if (pwm[2*j] || pwm[2*j+1]) fail($sformatf("inactive leg %0d on", j));
        end
        if (pwm[2*j] && !pwm_d[2*j]) rise[j].push_back(cyc);
        if (!pwm[2*j] && pwm_d[2*j]) fall[j].push_back(cyc);
      end
      pwm_d = pwm;
    end
    for (int j = 0; j < ph; j++) begin
      int v;
      v = (j == 0) ? v0 : (j == 1) ? v1 : v2;
      checks++;
      if (rise[j].size() < nper - 2) fail($sformatf("leg %0d: %0d edges", j, rise[j].size()));
      for (int k = 2; k < rise[j].size(); k++) begin
        checks++;
        if (rise[j][k] - rise[j][k-1] != per_clk)
          fail($sformatf("leg %0d period %0d, expected %0d", j, rise[j][k] - rise[j][k-1], per_clk));
      end
      // on-time of the high side
      on_exp = sy ? (2 * v - 1 - dt) * DIVT : (v - dt) * DIVT;
      for (int k = 2; k < rise[j].size() && k < fall[j].size(); k++) begin
        int on;
        on = (fall[j][k] > rise[j][k]) ? fall[j][k] - rise[j][k] : fall[j][k+1] - rise[j][k];
        checks++;
        if (on < on_exp - DIVT || on > on_exp + DIVT)
          fail($sformatf("leg %0d on-time %0d, expected %0d", j, on, on_exp));
      end
      // interleave delay of this leg behind phase a, for equal duties
      if (j > 0 && v == v0) begin
        int d;
        step_shift = ((sy ? 2 * f : f) * j / ph) * DIVT;
        d = (rise[0][3] - rise[j][3] + 10 * per_clk) % per_clk;
        checks++;
        if (d != step_shift && d != per_clk - step_shift)
          fail($sformatf("leg %0d delay %0d, expected %0d", j, d, step_shift));
      end
    end
  endtask

  initial begin
    run(30, 3, 1'b1, 15, 15, 15, 2, 12);   // three legs, 120 degrees
    run(30, 3, 1'b1, 8, 20, 27, 3, 12);    // different duties
    run(24, 2, 1'b1, 10, 10, 10, 1, 12);   // two legs, 180 degrees
    run(40, 3, 1'b0, 20, 20, 20, 2, 12);   // sawtooth carrier
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
