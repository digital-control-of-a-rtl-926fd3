// pwm_compare: comparator stage of the DPWM.
//
// For each phase, the compare value V_MOD is copied into a shadow register
// when that phase's carrier restarts (period_start), and the output is high
// while the carrier is below the shadow value. With the symmetric carrier the
// output is high for 2*V_MOD - 1 of the 2*FSW steps of a period (V_MOD = 0:
// never), in a pulse centred on the carrier zero; with the sawtooth it is
// high for V_MOD of FSW steps, starting at the restart. The comparator itself follows the document's
// DPWM diagram; the shadow register is this design's choice so that a new
// value never cuts a period in two.
// Timing: pwm_raw is registered, one clock after the carrier changes.
module pwm_compare
  import inv_pkg::*;
#(
  parameter int unsigned NPH = 3
) (
  input  logic           clk,
  input  logic           rst,
  input  cnt_t           vmod         [NPH],
  input  cnt_t           carrier      [NPH],
  input  logic [NPH-1:0] period_start,
  output logic [NPH-1:0] pwm_raw
);
  cnt_t shadow [NPH];

  always_ff @(posedge clk) begin
    if (rst) begin
      pwm_raw <= '0;
      for (int j = 0; j < NPH; j++) shadow[j] <= '0;
    end else begin
      for (int j = 0; j < NPH; j++) begin
        if (period_start[j]) shadow[j] <= vmod[j];
        // compare against the value in force for this period
        pwm_raw[j] <= carrier[j] < (period_start[j] ? vmod[j] : shadow[j]);
      end
    end
  end
endmodule
