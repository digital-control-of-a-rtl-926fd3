// dclink_div: DC-link voltage feed-forward divider (Y = A/B).
//
// Divides the leg voltage command A = v_c by the measured DC-link voltage
// B = V_dc, giving y = A/B in Q.15, so the modulation does not change when
// the input voltage does. The division itself is the document's feed-forward
// block; the implementation is this design's: a sequential restoring divider
// on magnitudes, one quotient bit per clock, with the sign applied at the end
// and the quotient saturated to +/-(2^15 - 1). B <= 0 gives a saturated
// result with A's sign.
// Timing: `start` for one clock loads A and B; `done` pulses one clock with y
// valid DIVW + 1 clocks later (DIVW = 39). `busy` is high in between and a
// start while busy is ignored.
module dclink_div
  import inv_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  sig_t   a,
  input  sig_t   b,
  output ynorm_t y,
  output logic   done,
  output logic   busy
);
  localparam int unsigned DIVW = SIG_W + Y_F;      // dividend |A| * 2^15
  localparam int unsigned CNTW = $clog2(DIVW + 1);
  localparam logic [DIVW-1:0] QMAX = DIVW'((1 << Y_F) - 1);

  logic [DIVW-1:0] num, quo;
  logic [SIG_W:0]  rem;
  logic [SIG_W-1:0] den;
  logic            neg, bad;
  logic [CNTW-1:0] cnt;
  logic [SIG_W:0]  amag;

  // |A|, one bit wider so that -2^23 has a magnitude
  assign amag = a[SIG_W-1] ? -{a[SIG_W-1], a} : {1'b0, a};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      y    <= '0;
      num  <= '0;
      quo  <= '0;
      rem  <= '0;
      den  <= '0;
      neg  <= 1'b0;
      bad  <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          num  <= DIVW'(amag) << Y_F;
          den  <= b;
          bad  <= (b <= 0);
          neg  <= a[SIG_W-1];
          rem  <= '0;
          quo  <= '0;
          cnt  <= CNTW'(DIVW);
          busy <= 1'b1;
        end
      end else if (cnt != '0) begin
        logic [SIG_W+1:0] r2;
        r2 = {rem, num[DIVW-1]};
        num <= num << 1;
        if (r2 >= {2'b00, den}) begin
          rem <= (SIG_W+1)'(r2 - {2'b00, den});
          quo <= {quo[DIVW-2:0], 1'b1};
        end else begin
          rem <= r2[SIG_W:0];
          quo <= {quo[DIVW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
      end else begin
        logic [DIVW-1:0] mag;
        mag  = (bad || quo > QMAX) ? QMAX : quo;
        y    <= neg ? -ynorm_t'(mag) : ynorm_t'(mag);
        done <= 1'b1;
        busy <= 1'b0;
      end
    end
  end
endmodule
