// tb_curr_loop: checks v_c = Kc*(i_com - i_L) + v_o against hand-worked
// values with Kc = 12.15 ohm and against a 64-bit model on random vectors,
// including saturation of the difference and of the result.
module tb_curr_loop;
  import inv_pkg::*;
  sig_t icom, il, vo, vc;
  gain_t kc;
  int checks = 0, failures = 0;

  curr_loop dut (.icom, .il, .vo, .kc, .vc);

  function automatic longint sat(longint r);
    if (r > 8388607) return 8388607;
    if (r < -8388608) return -8388608;
    return r;
  endfunction

  task automatic check(longint exp, string what);
    #1;
    checks++;
    if (longint'(vc) != exp) begin
      failures++;
      $display("FAIL %s: icom=%0d il=%0d vo=%0d got %0d exp %0d", what, icom, il, vo, vc, exp);
    end
  endtask

  initial begin
    kc = KC_DEF;
    // 1 A current error, 100 V output: 12.15 V + 100 V
    icom = 24'sd2560; il = 24'sd2304; vo = 24'sd25600;
    check(((longint'(256) * 49766) >>> 12) + 25600, "1A");
    // no error: v_c = v_o
    icom = 24'sd1000; il = 24'sd1000; vo = -24'sd5000; check(-5000, "zero");
    for (int n = 0; n < 2000; n++) begin
      icom = sig_t'($urandom); il = sig_t'($urandom); vo = sig_t'($urandom);
      if (n % 2 == 0) begin icom = icom >>> 8; il = il >>> 8; end
      if (n % 5 == 0) kc = gain_t'($urandom);
      check(sat(sat((longint'(kc) * sat(longint'(icom) - longint'(il))) >>> 12) + longint'(vo)), "random");
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
