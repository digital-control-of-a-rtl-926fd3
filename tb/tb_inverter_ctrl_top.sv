// tb_inverter_ctrl_top: end-to-end test of the inverter controller at its
// default parameters (200 MHz clock, 5-bit converters, 300 samples per 60 Hz
// period), in closed loop with a behavioural power stage: three half-bridge
// legs on a split 400 V DC link, 675 uH phase inductors, a 36 uF output
// capacitor and a resistive or rectifier (capacitor-input) load, plus
// behavioural 5-bit converters that sample when their chip select goes
// active.
// Checks:
//   * every control cycle: each phase's V_MOD equals an independent model of
//     the whole chain (scaling, repetitive controller, both deadbeat loops,
//     DC-link division, duty mapping), computed from the codes the converter
//     model delivered;
//   * each phase-current sample falls inside that leg's high-side pulse
//     (carrier-zero mode) or low-side pulse (carrier-peak mode), phase a is
//     sampled once per switching period, and phases b and c follow it by
//     one and two thirds of the period;
//   * no leg ever has both gates on, and no control overrun happens.
//   * with the rectifier load, the repetitive controller lowers the rms
//     deviation of the output from the reference by at least 15 %.
// Mechanisms counted (each must occur): samples at carrier zero, at carrier
// peak and double-frequency sampling, repetitive controller switched on,
// dead-time intervals, a DC-link voltage step (feed-forward), the rectifier
// load, and the asymmetric carrier.
// The deadbeat gains are lowered here for the plant model: the duty computed
// from one sample takes effect at the next carrier period, and with that
// delay the full deadbeat gain Kc = L/Ts puts the current-loop poles on the
// unit circle.
module tb_inverter_ctrl_top;
  import inv_pkg::*;

  // ---------------- stimulus and configuration ----------------
  logic clk = 1'b0, rst = 1'b1;
  cnt_t fsw;
  logic [2:0] pham;
  logic phsh, sym, act_high, rc_en;
  logic [5:0] dtime;
  logic [1:0] samp_mode;
  gain_t kv, kc, inv_m, q, g;
  logic [4:0] adc_data [6];
  logic [5:0] adcs, pwm;
  cnt_t vmod [3];
  sig_t vref, u_rc;
  logic ctrl_done, overrun;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;    // 200 MHz

  inverter_ctrl_top dut (
    .clk, .rst, .fsw, .pham, .phsh, .sym, .dtime, .samp_mode, .act_high,
    .rc_en, .kv, .kc, .inv_m, .q, .g, .adc_data, .adcs, .pwm, .vmod,
    .vref, .u_rc, .ctrl_done, .overrun);

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // ---------------- power stage model ----------------
  localparam real LPH = 675e-6, RL = 0.5, CO = 36e-6, DT = 5e-9;
  real vdc_v = 400.0;
  real il_a [3] = '{0.0, 0.0, 0.0};
  real vo_v = 0.0, io_a = 0.0, vcr = 0.0;
  bit  rect_load = 1'b0;
  real rload = 12.0;

  always @(posedge clk) begin
    real vleg, isum;
    isum = 0.0;
    for (int j = 0; j < 3; j++) begin
      if (pwm[2*j])        vleg =  vdc_v / 2.0;
      else if (pwm[2*j+1]) vleg = -vdc_v / 2.0;
      else                 vleg = (il_a[j] > 0.0) ? -vdc_v / 2.0 : vdc_v / 2.0; // diodes
      il_a[j] += (vleg - vo_v - RL * il_a[j]) / LPH * DT;
      isum += il_a[j];
    end
    if (!rect_load) io_a = vo_v / rload;
    else begin
      // diode bridge into 1000 uF with a 30 ohm load, 0.3 ohm in series
      real av;
      av = (vo_v < 0.0) ? -vo_v : vo_v;
      if (av > vcr) io_a = (av - vcr) / 0.3 * ((vo_v < 0.0) ? -1.0 : 1.0);
      else io_a = 0.0;
      vcr += (((io_a < 0.0) ? -io_a : io_a) - vcr / 30.0) / 1000e-6 * DT;
    end
    vo_v += (isum - io_a) / CO * DT;
  end

  // ---------------- converter model ----------------
  // 5-bit converters with the spans the controller assumes
  function automatic logic [4:0] quant(real x, real span, bit bipolar);
    int c;
    c = $rtoi($floor(x / (span / 32.0))) + (bipolar ? 16 : 0);
    if (c < 0) c = 0;
    if (c > 31) c = 31;
    return 5'(c);
  endfunction

  logic [5:0] act, act_d;
  assign act = act_high ? adcs : ~adcs;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // chip select rising edge: convert
  int cs_cyc [6];
  int n_cs [6];
  always @(posedge clk) begin
    act_d <= act;
    for (int c = 0; c < 6; c++) if (act[c] && !act_d[c] && !rst) begin
      n_cs[c]++;
      cs_cyc[c] = cyc;
      case (c)
        0, 1, 2: adc_data[c] <= quant(il_a[c], 64.0, 1'b1);
        3:       adc_data[c] <= quant(vo_v, 400.0, 1'b1);
        4:       adc_data[c] <= quant(io_a, 128.0, 1'b1);
        default: adc_data[c] <= quant(vdc_v, 512.0, 1'b0);
      endcase
    end
  end

  // ---------------- gate-signal checks and sample placement ----------------
  int hi_rise [3], lo_rise [3];
  int n_dead = 0, n_zero = 0, n_peak = 0, n_double = 0;
  int last_a_cs = 0;
  int n_inter = 0;
  logic [5:0] pwm_d;
  int off_cnt [3];
  always @(posedge clk) if (!rst) begin
    pwm_d <= pwm;
    for (int j = 0; j < 3; j++) begin
      if (pwm[2*j] && pwm[2*j+1]) fail($sformatf("shoot-through leg %0d", j));
      if (!pwm[2*j] && !pwm[2*j+1]) off_cnt[j]++;
      else begin
        if (off_cnt[j] >= int'(dtime) * 10 - 10 && off_cnt[j] < 1000) n_dead++;
        off_cnt[j] = 0;
      end
      if (pwm[2*j] && !pwm_d[2*j]) hi_rise[j] = cyc;
      if (pwm[2*j+1] && !pwm_d[2*j+1]) lo_rise[j] = cyc;
    end
  end

  // a phase-current sample must fall inside the high-side pulse (carrier
  // zero) or the low-side pulse (carrier peak) of its leg, whenever the duty
  // leaves room for that pulse; phase a's samples must be exactly one
  // switching period apart and phase j must follow phase a by j/3 period
  int prev_a_cs = 0;
  cnt_t vmod_prev [3] = '{12'd0, 12'd0, 12'd0};
  logic [14:0] cfg, cfg_d;
  assign cfg = {fsw, sym, samp_mode};
  always @(posedge clk) if (!rst) begin
    cfg_d <= cfg;
    if (cfg != cfg_d) begin prev_a_cs = 0; last_a_cs = 0; end   // configuration change
    for (int j = 0; j < 3; j++) begin
      if (act[j] && !act_d[j]) begin
        int per;
        per = (sym ? 2 * int'(fsw) : int'(fsw)) * 10;
        // the compare value changes at the carrier zero, so both the old and
        // the new value must leave room for a high-side pulse
        if (samp_mode == 2'd0 && sym && vmod[j] > cnt_t'(dtime) + 12'd2
            && vmod_prev[j] > cnt_t'(dtime) + 12'd2) begin
          checks++;
          n_zero++;
          if (!pwm[2*j]) fail($sformatf("leg %0d sampled at carrier zero outside its high-side pulse", j));
        end
        if (samp_mode == 2'd1 && sym && vmod[j] + cnt_t'(dtime) + 12'd2 < fsw) begin
          checks++;
          n_peak++;
          if (!pwm[2*j+1]) fail($sformatf("leg %0d sampled at carrier peak outside its low-side pulse", j));
        end
        vmod_prev[j] = vmod[j];
        if (j == 0) begin
          if (samp_mode == 2'd0 && prev_a_cs > 0 && cyc - prev_a_cs < 2 * per) begin
            checks++;
            if (cyc - prev_a_cs != per) fail($sformatf("phase a samples %0d clocks apart", cyc - prev_a_cs));
          end
          prev_a_cs = cyc;
          last_a_cs = cyc;
        end else if (sym && phsh && samp_mode == 2'd0 && last_a_cs > 0) begin
          int d;
          d = (cyc - last_a_cs) % per;
          n_inter++;
          checks++;
          if (d < j * per / 3 - 3 || d > j * per / 3 + 3)
            fail($sformatf("phase %0d sampled %0d clocks after phase a, expected %0d", j, d, j * per / 3));
        end
      end
    end
  end

  // ---------------- independent model of the control chain ----------------
  localparam int NN = 300, MM = 3;
  longint yh [$];
  int kidx = 0;
  logic [4:0] snap [6];
  sig_t vref_snap;
  int exp_v [3];
  int n_ctrl = 0, n_rc_on = 0, n_overrun = 0, n_ff = 0;
  bit vdc_stepped = 1'b0;

  function automatic longint sat(longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return v;
  endfunction
  function automatic longint mulg(longint k, longint x);
    return sat((k * x) >>> 12);
  endfunction
  function automatic int vmod_model(longint vc, longint d, int f);
    longint yq, m, t;
    m = (vc < 0) ? -vc : vc;
    yq = (d <= 0) ? 32767 : (m * 32768) / d;
    if (yq > 32767) yq = 32767;
    if (vc < 0) yq = -yq;
    t = f * (16384 + yq);
    t = (t < 0) ? -((-t + 32767) / 32768) : t / 32768;
    if (t < 0) t = 0;
    if (t > f) t = f;
    return int'(t);
  endfunction

  // codes in use for a control cycle: captured when the v_o chip select ends
  always @(posedge clk) if (!rst) begin
    if (!act[3] && act_d[3]) begin
      longint vo_s, io_s, vdc_s, e, w, yo, u, y, ep, icom, vc;
      snap = adc_data;
      vref_snap = vref;
      vo_s  = (longint'(snap[3]) - 16) * 3200;
      io_s  = (longint'(snap[4]) - 16) * 1024;
      vdc_s = longint'(snap[5]) * 4096;
      e  = sat(longint'(vref_snap) - vo_s);
      w  = (kidx >= NN) ? yh[kidx - NN] : 0;
      yo = (kidx >= NN - MM) ? yh[kidx - (NN - MM)] : 0;
      u  = rc_en ? mulg(g, yo) : 0;
      y  = rc_en ? sat(mulg(q, w) + e) : 0;
      yh.push_back(y);
      kidx++;
      ep = sat(e + u);
      icom = sat(mulg(kv, ep) + mulg(inv_m, io_s));
      for (int j = 0; j < 3; j++) begin
        vc = sat(mulg(kc, sat(icom - (longint'(snap[j]) - 16) * 512)) + vo_s);
        exp_v[j] = vmod_model(vc, vdc_s, int'(fsw));
      end
    end
    if (ctrl_done) begin
      n_ctrl++;
      if (u_rc != 0) n_rc_on++;
      if (vdc_stepped) n_ff++;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(vmod[j]) != exp_v[j])
          fail($sformatf("sample %0d phase %0d V_MOD %0d expected %0d", kidx, j, vmod[j], exp_v[j]));
      end
    end
    if (overrun) n_overrun++;
  end

  // ---------------- output-voltage error per line period ----------------
  real err_sq = 0.0;
  int  err_n = 0;
  always @(posedge clk) if (!rst && cyc % 200 == 0) begin
    err_sq += (vo_v - real'(vref) / 256.0) ** 2;
    err_n++;
  end
  task automatic period_report(string what, output real rms);
    rms = $sqrt(err_sq / real'(err_n));
    $display("  %s: rms error %0.2f V, output now %0.1f V", what, rms, vo_v);
    err_sq = 0.0; err_n = 0;
  endtask

  localparam int LINE = 3333333;   // clocks per 60 Hz period at 200 MHz

  initial begin
    real e_off, e_on;
    fsw = 12'd555;           // 20 MHz / (2*555) = 18.0 kHz
    pham = 3'd3; phsh = 1'b1; sym = 1'b1; act_high = 1'b1;
    dtime = 6'd10;           // 0.5 us
    samp_mode = 2'd0; rc_en = 1'b0;
    kc = KC_DEF >>> 1;       // 6.1 ohm: stable with the one-period duty delay
    kv = KV_DEF >>> 2;
    inv_m = INV_M_DEF; q = Q_DEF; g = G_DEF;
    for (int c = 0; c < 6; c++) begin adc_data[c] = 5'd16; n_cs[c] = 0; end
    adc_data[5] = 5'd25;
    for (int j = 0; j < 3; j++) off_cnt[j] = 0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    // two line periods with the resistive load, repetitive control off
    repeat (LINE) @(posedge clk);
    period_report("start-up", e_off);
    repeat (LINE) @(posedge clk);
    period_report("resistive load, repetitive control off", e_off);
    // rectifier load, still off
    rect_load = 1'b1;
    repeat (LINE) @(posedge clk);
    period_report("rectifier load, settling", e_off);
    repeat (LINE) @(posedge clk);
    period_report("rectifier load, repetitive control off", e_off);
    // switch the minimal-THD controller on
    rc_en = 1'b1;
    repeat (3 * LINE) @(posedge clk);
    period_report("rectifier load, repetitive control converging", e_on);
    repeat (LINE) @(posedge clk);
    period_report("rectifier load, repetitive control on", e_on);
    // DC-link step: the feed-forward division follows it
    vdc_v = 360.0; vdc_stepped = 1'b1;
    repeat (LINE / 4) @(posedge clk);
    // sampling at the carrier peak, then double-frequency sampling
    samp_mode = 2'd1;
    repeat (LINE / 10) @(posedge clk);
    n_double = n_cs[0];
    samp_mode = 2'd2;
    repeat (LINE / 20) @(posedge clk);
    n_double = n_cs[0] - n_double;
    // sawtooth carrier
    samp_mode = 2'd0; sym = 1'b0; fsw = 12'd1111;
    repeat (LINE / 20) @(posedge clk);

    // mechanisms
    $display("  control cycles %0d, zero samples %0d, peak samples %0d, double-rate samples %0d",
             n_ctrl, n_zero, n_peak, n_double);
    $display("  interleave checks %0d, dead-time intervals %0d, cycles with repetitive output %0d, after DC-link step %0d",
             n_inter, n_dead, n_rc_on, n_ff);
    checks++; if (n_ctrl < 8 * 300) fail($sformatf("only %0d control cycles", n_ctrl));
    checks++; if (n_zero == 0) fail("no carrier-zero sample");
    checks++; if (n_peak == 0) fail("no carrier-peak sample");
    checks++; if (n_double < 2 * (LINE / 20) / 11111 - 2) fail($sformatf("double-rate sampling: %0d samples", n_double));
    checks++; if (n_inter == 0) fail("interleave never checked");
    checks++; if (n_dead == 0) fail("no dead-time interval");
    checks++; if (n_rc_on == 0) fail("repetitive controller never active");
    checks++; if (n_ff == 0) fail("no control cycle after the DC-link step");
    // the repetitive controller must lower the periodic error it was built for
    checks++; if (e_on > 0.85 * e_off) fail($sformatf("rms error %0.2f V with, %0.2f V without repetitive control", e_on, e_off));
    checks++; if (n_overrun != 0) fail($sformatf("%0d overruns", n_overrun));
    for (int c = 0; c < 6; c++) begin
      checks++; if (n_cs[c] == 0) fail($sformatf("channel %0d never sampled", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
