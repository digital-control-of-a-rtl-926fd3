// adc_scale: converts one ADC result into a signed physical value.
//
// value = (code - offset) * LSB, with LSB = SPAN/2^ADC_W in Q15.8 volts or
// amps and offset = 2^(ADC_W-1) for bipolar channels (offset binary) or 0 for
// unipolar ones. This is the sensor-gain block drawn after each converter in
// the document's controller diagram; the spans and the offset-binary coding
// are this design's choices. ADC_W defaults to the document's 5-bit
// converter; the result is exact for any width up to 12 bits with the spans
// used here. Purely combinational.
module adc_scale
  import inv_pkg::*;
#(
  parameter int unsigned ADC_W   = 5,
  parameter int unsigned SPAN    = 400,  // full span in volts or amps
  parameter bit          BIPOLAR = 1'b1
) (
  input  logic [ADC_W-1:0] code,
  output sig_t             value
);
  localparam longint LSB_Q8 = (longint'(SPAN) << SIG_F) >> ADC_W;
  localparam longint OFFSET = BIPOLAR ? (longint'(1) << (ADC_W - 1)) : 0;

  always_comb begin
    logic signed [63:0] c;
    c = 64'($unsigned(code)) - OFFSET;
    value = sat_sig(c * LSB_Q8);
  end
endmodule
