// tb_ring_counter: loads random values and checks they land in the register
// of the phase holding the token, that the token walks 1 -> 2 -> 4 and wraps
// after PHAM phases, that clr returns it to phase a, and that the other
// registers keep their values.
module tb_ring_counter;
  import inv_pkg::*;
  logic clk = 1'b0, rst = 1'b1, clr = 1'b0, load = 1'b0;
  logic [2:0] pham;
  cnt_t din;
  logic [2:0] token;
  cnt_t vmod [3];
  int checks = 0, failures = 0;
  always #2.5 clk = ~clk;

  ring_counter dut (.clk, .rst, .clr, .load, .pham, .din, .token, .vmod);

  int exp_v [3];
  int exp_ph;

  initial begin
    pham = 3'd3; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int j = 0; j < 3; j++) exp_v[j] = 0;
    exp_ph = 0;
    for (int n = 0; n < 600; n++) begin
      int nact;
      if (n == 200) pham = 3'd2;
      if (n == 400) pham = 3'd1;
      nact = int'(pham);
      @(negedge clk);
      clr = ($urandom_range(0, 9) == 0);
      load = !clr && $urandom_range(0, 1);
      din = cnt_t'($urandom);
      if (clr) exp_ph = 0;
      else if (load) begin
        exp_v[exp_ph] = int'(din);
        exp_ph = (exp_ph + 1 >= nact) ? 0 : exp_ph + 1;
      end
      @(negedge clk);
      clr = 1'b0; load = 1'b0;
      checks++;
      if (token != 3'(1 << exp_ph)) begin failures++; $display("FAIL token %b expected phase %0d", token, exp_ph); end
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(vmod[j]) != exp_v[j]) begin failures++; $display("FAIL vmod[%0d]=%0d exp %0d", j, vmod[j], exp_v[j]); end
      end
      // keep the model's phase inside the active set when PHAM shrinks
      if (exp_ph >= int'(pham)) begin
        @(negedge clk) clr = 1'b1;
        @(negedge clk) clr = 1'b0;
        exp_ph = 0;
      end
    end
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
