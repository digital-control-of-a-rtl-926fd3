// dpwm: programmable digital phase-shifted PWM generator.
//
// Chain: frequency divider (200 MHz clock -> 20 MHz count enable), phase-
// shifted carrier generator (symmetric up-down or asymmetric up counter,
// selected by SYM/ASYM), comparator against V_MOD, and dead-time generator
// giving the six gate signals PWM1..PWM6 of three half-bridge legs. This
// structure and the port names (FSW, PHAM, PHSH, V_MOD, DTIME) follow the
// document's DPWM diagram; V_MOD is one value per phase here.
// With FSW = 555 and the symmetric carrier the switching frequency is
// 20 MHz / 1110 = 18.02 kHz, and the duty is close to V_MOD/FSW
// ((2*V_MOD - 1)/(2*FSW) exactly, before the dead time).
// ADSYN is the 12-bit carrier of phase a, given to the sampling controller so
// it can sample at the carrier zero or peak of each phase. Legs j >= PHAM are
// held off.
module dpwm
  import inv_pkg::*;
#(
  parameter int unsigned NPH = 3,
  parameter int unsigned DW  = 6,
  parameter int unsigned DIV = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  cnt_t             fsw,
  input  logic [2:0]       pham,
  input  logic             phsh,
  input  logic             sym,
  input  cnt_t             vmod   [NPH],
  input  logic [DW-1:0]    dtime,
  output cnt_t             adsyn,
  output logic             tick,
  output logic [2*NPH-1:0] pwm
);
  cnt_t           carrier [NPH];
  logic [NPH-1:0] period_start;
  logic [NPH-1:0] pwm_raw;
  logic [NPH-1:0] leg_en;

  always_comb begin
    for (int j = 0; j < NPH; j++)
      leg_en[j] = (j < active_phases(pham, NPH));
  end

  freq_divider #(.DIV(DIV)) u_div (.clk, .rst, .tick);

  carrier_gen #(.NPH(NPH)) u_car (
    .clk, .rst, .tick, .fsw, .pham, .phsh, .sym,
    .master_pos(), .carrier, .period_start
  );
  assign adsyn = carrier[0];

  pwm_compare #(.NPH(NPH)) u_cmp (
    .clk, .rst, .vmod, .carrier, .period_start, .pwm_raw
  );

  deadtime_gen #(.NPH(NPH), .DW(DW)) u_dt (
    .clk, .rst, .tick, .dtime, .enable(leg_en), .pwm_raw, .pwm
  );
endmodule
