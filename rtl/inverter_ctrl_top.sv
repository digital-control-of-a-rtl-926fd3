// inverter_ctrl_top: digital control IC of a three-phase interleaved PWM
// inverter with minimal output-voltage THD.
//
// Data flow per switching period (18 kHz with the defaults):
//   * dpwm produces three interleaved carriers (120 degrees apart) and the
//     gate signals PWM1..PWM6 of three half-bridge legs, and exports ADSYN;
//   * sync_sampler fires the ADC chip selects AD1CS..AD6CS at the carrier
//     zero (or peak) of each phase, so each inductor current is sampled at
//     its average value; AD1..AD3 are i_La..i_Lc, AD4 v_o, AD5 i_o, AD6 V_dc;
//   * at the end of each chip-select pulse the converter's result on
//     adc_data[ch] is captured and scaled (adc_scale) to volts and amps;
//   * when the v_o/i_o/V_dc group of phase a is captured, control_core runs
//     the repetitive controller, the deadbeat voltage and current loops and
//     the DC-link feed-forward, and loads new V_MOD values, which the DPWM
//     takes at each phase's next carrier restart.
// The architecture is the document's; the channel map, number formats,
// sensor spans and the register-style configuration ports are this design's.
// All configuration inputs are expected to be static while running.
// One clock domain (200 MHz); synchronous active-high reset.
module inverter_ctrl_top
  import inv_pkg::*;
#(
  parameter int unsigned ADC_W = 5,
  parameter int unsigned NPH   = 3,
  parameter int unsigned N     = 300,
  parameter int unsigned M     = 3,
  parameter int unsigned DIV   = 10,
  parameter int unsigned CS_W  = 20
) (
  input  logic             clk,
  input  logic             rst,
  // configuration
  input  cnt_t             fsw,        // FSW: carrier peak (sym) / period
  input  logic [2:0]       pham,       // PHAM: active phases
  input  logic             phsh,       // PHSH: interleave enable
  input  logic             sym,        // SYM/ASYM carrier
  input  logic [5:0]       dtime,      // DTIME: dead time in 20 MHz ticks
  input  logic [1:0]       samp_mode,  // SAMP_MODE
  input  logic             act_high,   // ActHigh/ActLow chip selects
  input  logic             rc_en,      // minimal THD controller on
  input  gain_t            kv,
  input  gain_t            kc,
  input  gain_t            inv_m,
  input  gain_t            q,
  input  gain_t            g,
  // converters
  input  logic [ADC_W-1:0] adc_data [NPH+3],
  output logic [NPH+2:0]   adcs,
  // power stage
  output logic [2*NPH-1:0] pwm,
  // status
  output cnt_t             vmod [NPH],
  output sig_t             vref,       // present reference sample
  output sig_t             u_rc,       // repetitive compensation
  output logic             ctrl_done,
  output logic             overrun
);
  localparam int unsigned NCH = NPH + 3;

  cnt_t             adsyn;
  logic [NCH-1:0]   cs_end;
  logic [ADC_W-1:0] code [NCH];
  sig_t             il [NPH];
  sig_t             vo, io, vdc;

  dpwm #(.NPH(NPH), .DIV(DIV)) u_dpwm (
    .clk, .rst, .fsw, .pham, .phsh, .sym, .vmod, .dtime,
    .adsyn, .tick(), .pwm
  );

  sync_sampler #(.NPH(NPH), .CS_W(CS_W)) u_samp (
    .clk, .rst, .pham, .samp_mode, .fsw, .adsyn, .phsh, .sym, .act_high,
    .adcs, .cs_end
  );

  // converter result capture at the end of each chip-select pulse
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < NCH; c++) code[c] <= '0;
    end else begin
      for (int c = 0; c < NCH; c++)
        if (cs_end[c]) code[c] <= adc_data[c];
    end
  end

  for (genvar j = 0; j < NPH; j++) begin : g_il
    adc_scale #(.ADC_W(ADC_W), .SPAN(64), .BIPOLAR(1'b1)) u_sc (
      .code(code[j]), .value(il[j])
    );
  end
  adc_scale #(.ADC_W(ADC_W), .SPAN(400), .BIPOLAR(1'b1)) u_sc_vo (
    .code(code[NPH]), .value(vo)
  );
  adc_scale #(.ADC_W(ADC_W), .SPAN(128), .BIPOLAR(1'b1)) u_sc_io (
    .code(code[NPH+1]), .value(io)
  );
  adc_scale #(.ADC_W(ADC_W), .SPAN(512), .BIPOLAR(1'b0)) u_sc_vdc (
    .code(code[NPH+2]), .value(vdc)
  );

  // start the control computation the clock after the phase-a group is in
  logic start_r;
  always_ff @(posedge clk) begin
    if (rst) start_r <= 1'b0;
    else     start_r <= cs_end[NPH];
  end

  control_core #(.NPH(NPH), .N(N), .M(M)) u_core (
    .clk, .rst, .start(start_r), .vo, .io, .vdc, .il,
    .kv, .kc, .inv_m, .q, .g, .rc_en, .fsw, .pham,
    .vmod, .vref, .u_rc, .done(ctrl_done), .busy(), .overrun
  );
endmodule
