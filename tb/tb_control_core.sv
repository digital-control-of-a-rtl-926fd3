// tb_control_core: runs the control datapath (N = 10 samples per period for
// speed) on random measurements and compares each phase's V_MOD with an
// independent model of the whole chain: repetitive controller, deadbeat
// voltage loop, deadbeat current loop, DC-link division and duty mapping.
// Also checks the reference sequence, the start-to-done time (must fit in a
// sample period; 4 + 1 + 43*PHAM + 1 clocks), the overrun flag for a start
// while busy, and PHAM = 2 leaving phase c untouched.
module tb_control_core;
  import inv_pkg::*;
  localparam int NN = 10, MM = 3;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  sig_t vo, io, vdc;
  sig_t il [3];
  gain_t kv, kc, inv_m, q, g;
  logic rc_en;
  cnt_t fsw;
  logic [2:0] pham;
  cnt_t vmod [3];
  sig_t vref, u_rc;
  logic done, busy, overrun;
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  control_core #(.N(NN), .M(MM)) dut (
    .clk, .rst, .start, .vo, .io, .vdc, .il, .kv, .kc, .inv_m, .q, .g,
    .rc_en, .fsw, .pham, .vmod, .vref, .u_rc, .done, .busy, .overrun);

  longint yh [$];
  int overruns = 0;
  always @(posedge clk) if (!rst && overrun) overruns++;

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

  localparam real PI = 3.14159265358979;

  task automatic sample(int k, bit poke);
    longint e, w, yo, u, y, ep, icom, vc;
    int lat, exp_v [3], old_c;
    // new measurements
    vo  = sig_t'($urandom_range(0, 400 * 256)) - sig_t'(200 * 256);
    io  = sig_t'($urandom_range(0, 80 * 256)) - sig_t'(40 * 256);
    vdc = sig_t'($urandom_range(300 * 256, 450 * 256));
    for (int j = 0; j < 3; j++) il[j] = sig_t'($urandom_range(0, 40 * 256)) - sig_t'(20 * 256);
    @(negedge clk);
    // reference sample in use
    begin
      int r;
      r = int'($rtoi(39825.0 * $sin(2.0 * PI * real'(k % NN) / real'(NN)) + ($sin(2.0 * PI * real'(k % NN) / real'(NN)) >= 0 ? 0.5 : -0.5)));
      checks++;
      if (int'(vref) - r > 1 || r - int'(vref) > 1) begin failures++; $display("FAIL vref %0d exp %0d", vref, r); end
    end
    e  = sat(longint'(vref) - longint'(vo));
    w  = (k >= NN) ? yh[k - NN] : 0;
    yo = (k >= NN - MM) ? yh[k - (NN - MM)] : 0;
    u  = rc_en ? mulg(g, yo) : 0;
    y  = rc_en ? sat(mulg(q, w) + e) : 0;
    yh.push_back(y);
    ep = sat(e + u);
    icom = sat(mulg(kv, ep) + mulg(inv_m, io));
    old_c = int'(vmod[2]);
    for (int j = 0; j < 3; j++) begin
      vc = sat(mulg(kc, sat(icom - longint'(il[j]))) + longint'(vo));
      exp_v[j] = (j < int'(pham)) ? vmod_model(vc, vdc, int'(fsw)) : old_c;
    end
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 1000) begin
      @(negedge clk); lat++;
      if (poke && lat == 20) begin
        // a start while busy is refused
        start = 1'b1;
        @(negedge clk) start = 1'b0; lat++;
      end
    end
    checks++;
    if (lat != 4 + 1 + 43 * int'(pham) + 1) begin failures++; $display("FAIL latency %0d", lat); end
    for (int j = 0; j < 3; j++) begin
      checks++;
      if (int'(vmod[j]) != exp_v[j]) begin
        failures++;
        $display("FAIL k=%0d phase %0d vmod %0d expected %0d", k, j, vmod[j], exp_v[j]);
      end
    end
    repeat ($urandom_range(1, 5)) @(negedge clk);
  endtask

  initial begin
    kv = KV_DEF; kc = KC_DEF; inv_m = INV_M_DEF; q = Q_DEF; g = G_DEF;
    rc_en = 1'b1; fsw = 12'd555; pham = 3'd3;
    vo = '0; io = '0; vdc = '0;
    for (int j = 0; j < 3; j++) il[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // a start during the clear of the repetitive buffer is refused
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    checks++;
    if (busy) begin failures++; $display("FAIL started during clear"); end
    repeat (NN + 3) @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      if (k == 60) rc_en = 1'b0;
      if (k == 90) rc_en = 1'b1;
      if (k == 150) pham = 3'd2;
      sample(k, k % 17 == 5);
    end
    checks++;
    if (overruns != 1 + 12) begin failures++; $display("FAIL %0d overruns", overruns); end
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
