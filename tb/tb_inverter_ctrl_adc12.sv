// tb_inverter_ctrl_adc12: the controller with 12-bit converters instead of
// the default 5-bit ones, in closed loop with the same behavioural power
// stage as tb_inverter_ctrl_top (three half-bridge legs on a split 400 V
// link, 675 uH phase inductors, 36 uF output capacitor, resistive or
// rectifier load). This is the higher-resolution case the document compares
// with its 5-bit result: finer measurements leave less quantisation error
// for the loops to turn into distortion.
// Sequence: two line periods with a 12 ohm load and repetitive control off,
// then three with the rectifier load and repetitive control on.
// Checks:
//   * every control cycle, each phase's V_MOD equals an independent model of
//     the control chain at 12-bit scaling;
//   * no leg ever has both gates on, and no control overrun happens;
//   * with the rectifier load and repetitive control the rms deviation from
//     the reference stays below 5 V (tb_inverter_ctrl_top reaches 6.9 V with
//     5-bit converters) and below 0.6 times the resistive-load deviation
//     without repetitive control. That deviation (about 9 V) comes mostly from
//     the lowered loop gains, not from the converters, so it gets only a
//     loose bound of 12 V.
// Gains are lowered as in tb_inverter_ctrl_top (Kc/2, Kv/4), because the duty
// computed from one sample acts during the next carrier period.
module tb_inverter_ctrl_adc12;
  import inv_pkg::*;

  localparam int AW = 12;
  localparam int LINE = 3333333;   // clocks in one 60 Hz period

  logic clk = 1'b0, rst = 1'b1;
  cnt_t fsw;
  logic [2:0] pham;
  logic phsh, sym, act_high, rc_en;
  logic [5:0] dtime;
  logic [1:0] samp_mode;
  gain_t kv, kc, inv_m, q, g;
  logic [AW-1:0] adc_data [6];
  logic [5:0] adcs, pwm;
  cnt_t vmod [3];
  sig_t vref, u_rc;
  logic ctrl_done, overrun;
  int checks = 0, failures = 0;

  always #2.5 clk = ~clk;    // 200 MHz

  inverter_ctrl_top #(.ADC_W(AW)) dut (
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

  // ---------------- 12-bit converter model ----------------
  function automatic logic [AW-1:0] quant(real x, real span, bit bipolar);
    int c;
    c = $rtoi($floor(x / (span / 4096.0))) + (bipolar ? 2048 : 0);
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return AW'(c);
  endfunction

  logic [5:0] act, act_d;
  assign act = act_high ? adcs : ~adcs;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    act_d <= act;
    for (int c = 0; c < 6; c++) if (act[c] && !act_d[c] && !rst) begin
      case (c)
        0, 1, 2: adc_data[c] <= quant(il_a[c], 64.0, 1'b1);
        3:       adc_data[c] <= quant(vo_v, 400.0, 1'b1);
        4:       adc_data[c] <= quant(io_a, 128.0, 1'b1);
        default: adc_data[c] <= quant(vdc_v, 512.0, 1'b0);
      endcase
    end
  end

  always @(posedge clk) if (!rst)
    for (int j = 0; j < 3; j++)
      if (pwm[2*j] && pwm[2*j+1]) fail($sformatf("shoot-through leg %0d", j));

  // ---------------- independent model of the control chain ----------------
  localparam int NN = 300, MM = 3;
  longint yh [$];
  int kidx = 0;
  int exp_v [3];
  int n_ctrl = 0, n_overrun = 0;

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

  // one LSB in Q15.8: span * 256 / 4096
  always @(posedge clk) if (!rst) begin
    if (!act[3] && act_d[3]) begin
      longint vo_s, io_s, vdc_s, e, w, yo, u, y, ep, icom, vc;
      vo_s  = (longint'(adc_data[3]) - 2048) * 25;
      io_s  = (longint'(adc_data[4]) - 2048) * 8;
      vdc_s = longint'(adc_data[5]) * 32;
      e  = sat(longint'(vref) - vo_s);
      w  = (kidx >= NN) ? yh[kidx - NN] : 0;
      yo = (kidx >= NN - MM) ? yh[kidx - (NN - MM)] : 0;
      u  = rc_en ? mulg(g, yo) : 0;
      y  = rc_en ? sat(mulg(q, w) + e) : 0;
      yh.push_back(y);
      kidx++;
      ep = sat(e + u);
      icom = sat(mulg(kv, ep) + mulg(inv_m, io_s));
      for (int j = 0; j < 3; j++) begin
        vc = sat(mulg(kc, sat(icom - (longint'(adc_data[j]) - 2048) * 4)) + vo_s);
        exp_v[j] = vmod_model(vc, vdc_s, int'(fsw));
      end
    end
    if (ctrl_done) begin
      n_ctrl++;
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
    $display("  %s: rms error %0.2f V", what, rms);
    err_sq = 0.0;
    err_n = 0;
  endtask

  initial begin
    real e_res, e_rect;
    fsw = 12'd555;           // 18.0 kHz
    pham = 3'd3; phsh = 1'b1; sym = 1'b1; act_high = 1'b1;
    dtime = 6'd10;
    samp_mode = 2'd0; rc_en = 1'b0;
    kc = KC_DEF >>> 1;
    kv = KV_DEF >>> 2;
    inv_m = INV_M_DEF; q = Q_DEF; g = G_DEF;
    for (int c = 0; c < 6; c++) adc_data[c] = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (LINE) @(posedge clk);
    period_report("start-up", e_res);
    repeat (LINE) @(posedge clk);
    period_report("resistive load, repetitive control off", e_res);
    rect_load = 1'b1;
    rc_en = 1'b1;
    repeat (2 * LINE) @(posedge clk);
    period_report("rectifier load, repetitive control converging", e_rect);
    repeat (LINE) @(posedge clk);
    period_report("rectifier load, repetitive control on", e_rect);
    $display("  control cycles %0d", n_ctrl);
    checks++; if (n_ctrl < 5 * 300 - 5) fail($sformatf("only %0d control cycles", n_ctrl));
    checks++; if (n_overrun != 0) fail($sformatf("%0d overruns", n_overrun));
    checks++; if (e_res > 12.0) fail($sformatf("resistive load: rms error %0.2f V", e_res));
    checks++; if (e_rect > 5.0 || e_rect > 0.6 * e_res)
      fail($sformatf("rectifier load: rms error %0.2f V", e_rect));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
