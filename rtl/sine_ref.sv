// sine_ref: reference voltage generator.
//
// Holds one period of the output voltage reference as an N-entry table,
// v_ref(k) = round(AMP_Q8 * sin(2*pi*k/N)) in Q15.8 volts, and steps through
// it once per control sample. N = 300 samples per period follows from the
// 18 kHz sampling rate and the 60 Hz output; AMP_Q8 = 110 V rms * sqrt(2) *
// 256. The table is computed at elaboration by an integer Taylor series, so
// no data file is needed.
// Interface: `step` advances the index (wrapping at N-1); vref is registered
// and shows the entry of the current index one clock after it changes.
module sine_ref
  import inv_pkg::*;
#(
  parameter int unsigned N      = 300,
  parameter int          AMP_Q8 = 39825
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 step,
  output sig_t                 vref,
  output logic [$clog2(N)-1:0] idx
);
  localparam int unsigned IW = $clog2(N);
  localparam longint ONE_Q30 = 64'sd1 <<< 30;
  localparam longint PI_Q30  = 64'sd3373259426;  // pi * 2^30

  // round(amp * sin(2*pi*k/n)), integer arithmetic in Q30
  function automatic sig_t sine_entry(input int k, input int n, input int amp);
    longint x, x2, term, sum, r;
    logic neg;
    x   = (2 * PI_Q30 * longint'(k)) / longint'(n);   // 0 .. 2*pi
    neg = 1'b0;
    if (x >= PI_Q30) begin
      neg = 1'b1;
      x   = x - PI_Q30;
    end
    if (x > PI_Q30 / 2) x = PI_Q30 - x;               // 0 .. pi/2
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int i = 1; i <= 6; i++) begin
      term = -((term * x2) >>> 30) / longint'((2 * i) * (2 * i + 1));
      sum  = sum + term;
    end
    r = (sum * longint'(amp) + (ONE_Q30 >>> 1)) >>> 30;
    return sig_t'(neg ? -r : r);
  endfunction

  sig_t rom [N];

  initial begin
    for (int k = 0; k < N; k++) rom[k] = sine_entry(k, N, AMP_Q8);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      idx <= '0;
    end else if (step) begin
      idx <= (idx == IW'(N - 1)) ? '0 : idx + 1'b1;
    end
  end

  always_ff @(posedge clk) vref <= rom[idx];
endmodule
