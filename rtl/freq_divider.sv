// freq_divider: clock-enable divider of the PWM generator.
//
// Produces a one-clock pulse on `tick` every DIV clocks. With the 200 MHz
// system clock and DIV = 10 this is the 20 MHz count rate of the PWM
// carriers and dead-time counters (the 200 MHz and 20 MHz figures are the
// document's; using an enable instead of a second clock is this design's
// choice, so everything stays in one clock domain).
// Timing: after reset the first tick comes DIV clocks later, then every DIV.
module freq_divider #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst,   // synchronous, active high
  output logic tick
);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [DW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == DW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
