// tb_sync_sampler: feeds ADSYN (the phase-a carrier) from a model carrier
// counter and checks the chip selects against independently predicted
// instants: phase j's current channel fires when its position
// (phase-a position - j*P/PHAM) mod P reaches 0 (mode 0), the carrier
// peak (mode 1) or both (mode 2); channels 4..6 fire with phase a; mode 3 is
// silent. Also checks the pulse width CS_W, the cs_end pulse, the active-low
// polarity and the number of pulses per period.
module tb_sync_sampler;
  import inv_pkg::*;
  localparam int CSW = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] pham;
  logic [1:0] samp_mode;
  cnt_t fsw;
  cnt_t adsyn;
  logic phsh, sym, act_high;
  logic [5:0] adcs, cs_end;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  sync_sampler #(.CS_W(CSW)) dut (.clk, .rst, .pham, .samp_mode, .fsw, .adsyn,
                                  .phsh, .sym, .act_high, .adcs, .cs_end);

  // expected start times of pulses per channel, by clock number
  int cyc;
  int trig_cyc [6];
  int npulse [6];
  int nend [6];
  logic [5:0] act, act_d;

  always @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  task automatic run(int f, int ph, bit sy, int mode, bit ah, int nper);
    int per, off, pos, peak, div;
    bit inst;
    logic [5:0] exp_trig;
    fsw = cnt_t'(f); pham = 3'(ph); sym = sy; samp_mode = 2'(mode); act_high = ah; phsh = 1'b1;
    per = sy ? 2 * f : f;
    peak = sy ? f : f - 1;
    div = 8;                            // clocks per carrier step
    adsyn = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 6; c++) begin trig_cyc[c] = -1000; npulse[c] = 0; nend[c] = 0; end
    act_d = '0;
    for (int s = 0; s < per * nper; s++) begin
      if (s > 0) adsyn = cnt_t'((sy && s % per > f) ? per - s % per : s % per);
      exp_trig = '0;
      for (int j = 0; j < 3; j++) begin
        off = (per - (j * per) / ph) % per;
        pos = (s % per + off) % per;
        case (mode)
          0: inst = (pos == 0);
          1: inst = (pos == peak);
          2: inst = (pos == 0) || (pos == peak);
          default: inst = 1'b0;
        endcase
        if (s == 0) inst = 1'b0;            // first position is not an arrival
        if (j < ph && inst) exp_trig[j] = 1'b1;
      end
      if (exp_trig[0]) exp_trig[5:3] = 3'b111;
      for (int k = 0; k < div; k++) begin
        @(negedge clk);
        // view the chip selects as active-high
        act = ah ? adcs : ~adcs;
        for (int c = 0; c < 6; c++) begin
          if (k == 0 && exp_trig[c]) trig_cyc[c] = cyc;
          if (act[c] && !act_d[c]) begin
            npulse[c]++;
            checks++;
            // mask set on the first edge, output register one edge later
            if (cyc - trig_cyc[c] != 1) begin
              failures++;
              $display("FAIL ch %0d pulse at %0d, instant at %0d (mode %0d)", c, cyc, trig_cyc[c], mode);
            end
          end
          if (!act[c] && act_d[c]) begin
            checks++;
            if (cyc - trig_cyc[c] != 1 + CSW) begin
              failures++;
              $display("FAIL ch %0d width %0d", c, cyc - trig_cyc[c] - 1);
            end
          end
          if (cs_end[c]) begin
            nend[c]++;
            checks++;
            if (cyc - trig_cyc[c] != CSW) begin
              failures++;
              $display("FAIL ch %0d cs_end at +%0d", c, cyc - trig_cyc[c]);
            end
          end
        end
        act_d = act;
      end
    end
    for (int c = 0; c < 6; c++) begin
      int exp_n;
      exp_n = (mode == 3 || (c < 3 && c >= ph)) ? 0 : (mode == 2 ? 2 : 1) * nper;
      checks++;
      // the first period may miss the phase-a zero crossing at s = 0
      if (npulse[c] < exp_n - 1 || npulse[c] > exp_n || nend[c] != npulse[c]) begin
        failures++;
        $display("FAIL ch %0d: %0d pulses %0d ends, expected about %0d", c, npulse[c], nend[c], exp_n);
      end
    end
  endtask

  initial begin
    run(12, 3, 1'b1, 0, 1'b1, 6);   // sample at carrier zero
    run(12, 3, 1'b1, 1, 1'b0, 6);   // at carrier peak, active-low
    run(15, 3, 1'b1, 2, 1'b1, 6);   // double-frequency sampling
    run(12, 2, 1'b0, 0, 1'b1, 6);   // two phases, sawtooth carrier
    run(12, 3, 1'b1, 3, 1'b1, 4);   // off
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
