// deadtime_gen: dead-time generator of the DPWM.
//
// Each phase's compare output drives one half-bridge leg: PWM(2j+1) is the
// high-side gate (on while the compare output is 1) and PWM(2j+2) the
// low-side gate (on while it is 0). Every turn-on is delayed by DTIME ticks
// of the 20 MHz enable, so for DTIME ticks after each change both gates of
// the leg are off. The 6-bit DTIME width is the document's; counting in
// 20 MHz ticks (DTIME = 63 gives 3.15 us) is this design's choice.
// Interface: enable[j] = 0 holds both gates of leg j off. pwm[2j] is the high
// side and pwm[2j+1] the low side of leg j. Outputs are registered.
module deadtime_gen #(
  parameter int unsigned NPH = 3,
  parameter int unsigned DW  = 6
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  logic [DW-1:0]    dtime,
  input  logic [NPH-1:0]   enable,
  input  logic [NPH-1:0]   pwm_raw,
  output logic [2*NPH-1:0] pwm
);
  logic [NPH-1:0] last;
  logic [DW-1:0]  cnt [NPH];

  always_ff @(posedge clk) begin
    if (rst) begin
      last <= '0;
      pwm  <= '0;
      for (int j = 0; j < NPH; j++) cnt[j] <= '0;
    end else begin
      for (int j = 0; j < NPH; j++) begin
        if (pwm_raw[j] != last[j]) begin
          // edge: switch the conducting gate off at once, start the delay
          last[j]     <= pwm_raw[j];
          cnt[j]      <= '0;
          pwm[2*j]    <= 1'b0;
          pwm[2*j+1]  <= 1'b0;
        end else begin
          if (tick && cnt[j] < dtime) cnt[j] <= cnt[j] + 1'b1;
          pwm[2*j]   <= enable[j] &&  last[j] && (cnt[j] >= dtime);
          pwm[2*j+1] <= enable[j] && !last[j] && (cnt[j] >= dtime);
        end
      end
    end
  end
endmodule
