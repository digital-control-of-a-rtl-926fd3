// tb_adc_scale: sweeps every code of 5-bit and 12-bit converters and checks
// the scaled value against (code - offset) * span * 256 / 2^width.
module tb_adc_scale;
  import inv_pkg::*;
  logic [4:0]  c5;
  logic [11:0] c12;
  sig_t v_vo5, v_dc5, v_vo12, v_il12;
  int checks = 0, failures = 0;

  adc_scale                                         u_vo5  (.code(c5),  .value(v_vo5));
  adc_scale #(.SPAN(512), .BIPOLAR(1'b0))           u_dc5  (.code(c5),  .value(v_dc5));
  adc_scale #(.ADC_W(12), .SPAN(400))               u_vo12 (.code(c12), .value(v_vo12));
  adc_scale #(.ADC_W(12), .SPAN(64))                u_il12 (.code(c12), .value(v_il12));

  task automatic expect_eq(string what, int code, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s code %0d got %0d expected %0d", what, code, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 32; k++) begin
      c5 = 5'(k); c12 = '0; #1;
      // 5-bit v_o: 400 V span -> 12.5 V per step = 3200 in Q8
      expect_eq("vo5", k, v_vo5, (k - 16) * 3200);
      // 5-bit V_dc: 512 V span unipolar -> 16 V per step = 4096
      expect_eq("vdc5", k, v_dc5, k * 4096);
    end
    for (int k = 0; k < 4096; k += 7) begin
      c12 = 12'(k); #1;
      expect_eq("vo12", k, v_vo12, (longint'(k) - 2048) * 400 * 256 / 4096);
      expect_eq("il12", k, v_il12, (longint'(k) - 2048) * 4);
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
