// tb_volt_loop: random and corner vectors for i_com = Kv*e + i_o/m with the
// default gains (Kv = 0.648 S, 1/m = 1/3, Q.12), checked against the same
// law evaluated in 64-bit integers, including saturation, plus a few
// hand-worked values.
module tb_volt_loop;
  import inv_pkg::*;
  sig_t err, io, icom;
  gain_t kv, inv_m;
  int checks = 0, failures = 0;

  volt_loop dut (.err, .io, .kv, .inv_m, .icom);

  function automatic longint model(longint e, longint i, longint k, longint im);
    longint r, a, b;
    a = (k * e) >>> 12;
    b = (im * i) >>> 12;
    // each product saturates before the sum
    if (a > 8388607) a = 8388607;
    if (a < -8388608) a = -8388608;
    if (b > 8388607) b = 8388607;
    if (b < -8388608) b = -8388608;
    r = a + b;
    if (r > 8388607) r = 8388607;
    if (r < -8388608) r = -8388608;
    return r;
  endfunction

  task automatic check(longint exp, string what);
    #1;
    checks++;
    if (longint'(icom) != exp) begin
      failures++;
      $display("FAIL %s: err=%0d io=%0d got %0d exp %0d", what, err, io, icom, exp);
    end
  endtask

  initial begin
    kv = KV_DEF; inv_m = INV_M_DEF;
    // 10 V error -> 6.48 A; 0 load: 10*256*2654/4096 = 1658.75 -> 1658
    err = 24'sd2560; io = '0; check(1658, "10V");
    // 30 A load, no error -> 10 A per phase (30*256*1365/4096 = 2559.4 -> 2559)
    err = '0; io = 24'sd7680; check(2559, "30A");
    // negative error rounds toward -inf
    err = -24'sd2560; io = '0; check(-1659, "-10V");
    for (int n = 0; n < 2000; n++) begin
      err = sig_t'($urandom);
      io  = sig_t'($signed($urandom) >>> 10);
      if (n % 3 == 0) begin kv = gain_t'($urandom); inv_m = gain_t'($urandom); end
      check(model(err, io, kv, inv_m), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
