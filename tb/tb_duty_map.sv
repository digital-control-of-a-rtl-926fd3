// tb_duty_map: checks V_MOD = FSW*(1/2 + y) for y = v_c/V_dc in Q.15,
// clamped to 0..FSW: zero voltage gives half duty, +/-V_dc/2 give 100 %/0 %,
// and random values follow floor(FSW*(16384 + Y)/32768).
module tb_duty_map;
  import inv_pkg::*;
  ynorm_t y;
  cnt_t fsw, vmod;
  int checks = 0, failures = 0;

  duty_map dut (.y, .fsw, .vmod);

  task automatic check(int exp, string what);
    #1;
    checks++;
    if (int'(vmod) != exp) begin
      failures++;
      $display("FAIL %s: y=%0d fsw=%0d got %0d exp %0d", what, y, fsw, vmod, exp);
    end
  endtask

  initial begin
    fsw = 12'd555;
    y = 16'sd0;      check(277, "half");
    y = 16'sd16384;  check(555, "+Vdc/2");
    y = -16'sd16384; check(0, "-Vdc/2");
    y = 16'sd32767;  check(555, "clamp high");
    y = -16'sd32767; check(0, "clamp low");
    y = 16'sd8192;   check(416, "3/4");
    for (int n = 0; n < 3000; n++) begin
      longint t;
      y = ynorm_t'($urandom);
      fsw = cnt_t'($urandom);
      t = (longint'(fsw) * (16384 + longint'(y)));
      t = (t < 0) ? -((-t + 32767) / 32768) : t / 32768;   // floor division
      if (t < 0) t = 0;
      if (t > fsw) t = fsw;
      check(int'(t), "random");
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
