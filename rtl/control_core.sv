// control_core: sampled-data control datapath of the inverter.
//
// Run once per control sample (start = all ADC results of the sample are in):
//   1. e = v_ref - v_o, with v_ref from the N-point sine reference;
//   2. repetitive (minimal THD) controller: e' = e + u_rc;
//   3. deadbeat voltage loop: i_com = Kv*e' + i_o/m (same command per phase);
//   4. for each active phase j in turn: deadbeat current loop
//      v_cj = Kc*(i_com - i_Lj) + v_o, DC-link feed-forward y_j = v_cj/V_dc,
//      duty mapping V_MOD_j = FSW*(1/2 + y_j), and a ring-counter load into
//      that phase's V_MOD register;
//   5. the sine reference steps to the next sample and `done` pulses.
// The chain of stages is the document's controller architecture; running it
// as one time-shared datapath under a small FSM is this design's choice.
// Timing: about 4 + 1 + 43*PHAM + 1 clocks (135 for three phases, 0.7 us at
// 200 MHz) from start to done, far below the 55.6 us sample period. A start
// that arrives while busy, or before the repetitive controller has cleared
// its buffer after reset, is dropped and flagged by a one-clock `overrun`.
// Measurements are latched at start.
module control_core
  import inv_pkg::*;
#(
  parameter int unsigned NPH = 3,
  parameter int unsigned N   = 300,
  parameter int unsigned M   = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  sig_t       vo,
  input  sig_t       io,
  input  sig_t       vdc,
  input  sig_t       il    [NPH],
  input  gain_t      kv,
  input  gain_t      kc,
  input  gain_t      inv_m,
  input  gain_t      q,
  input  gain_t      g,
  input  logic       rc_en,
  input  cnt_t       fsw,
  input  logic [2:0] pham,
  output cnt_t       vmod  [NPH],
  output sig_t       vref,
  output sig_t       u_rc,
  output logic       done,
  output logic       busy,
  output logic       overrun
);
  typedef enum logic [2:0] {S_IDLE, S_RC, S_CL, S_DIV, S_MAP, S_FIN} state_t;
  state_t state;

  localparam int unsigned PHW = (NPH > 1) ? $clog2(NPH) : 1;

  sig_t   vo_l, io_l, vdc_l;
  sig_t   il_l [NPH];
  sig_t   err_in, err_mod, icom_c, icom_r, vc_c;
  ynorm_t y;
  cnt_t   vmod_c;
  logic   rc_start, rc_done, rc_ready;
  logic   div_start, div_done;
  logic   ring_clr, ring_load, ref_step;
  logic [PHW-1:0] ph;
  logic [NPH-1:0] token;
  int unsigned nact;

  assign nact   = active_phases(pham, NPH);
  assign err_in = sat_sig(64'(vref) - 64'(vo));
  assign busy   = (state != S_IDLE);

  sine_ref #(.N(N)) u_ref (
    .clk, .rst, .step(ref_step), .vref, .idx()
  );

  rep_ctrl #(.N(N), .M(M)) u_rep (
    .clk, .rst, .start(rc_start), .en(rc_en), .q, .g, .err(err_in),
    .err_mod, .u_rc, .done(rc_done), .ready(rc_ready)
  );

  volt_loop u_vl (.err(err_mod), .io(io_l), .kv, .inv_m, .icom(icom_c));

  curr_loop u_cl (.icom(icom_r), .il(il_l[ph]), .vo(vo_l), .kc, .vc(vc_c));

  dclink_div u_div (
    .clk, .rst, .start(div_start), .a(vc_c), .b(vdc_l),
    .y, .done(div_done), .busy()
  );

  duty_map u_map (.y, .fsw, .vmod(vmod_c));

  ring_counter #(.NPH(NPH)) u_ring (
    .clk, .rst, .clr(ring_clr), .load(ring_load), .pham, .din(vmod_c),
    .token, .vmod
  );

  always_comb begin
    rc_start  = (state == S_IDLE) && start && rc_ready;
    ring_clr  = rc_start;
    div_start = (state == S_CL);
    ring_load = (state == S_MAP);
    ref_step  = (state == S_FIN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      ph      <= '0;
      done    <= 1'b0;
      overrun <= 1'b0;
      vo_l    <= '0;
      io_l    <= '0;
      vdc_l   <= '0;
      icom_r  <= '0;
      for (int j = 0; j < NPH; j++) il_l[j] <= '0;
    end else begin
      done    <= 1'b0;
      overrun <= start && !rc_start;
      unique case (state)
        S_IDLE: if (rc_start) begin
          vo_l  <= vo;
          io_l  <= io;
          vdc_l <= vdc;
          for (int j = 0; j < NPH; j++) il_l[j] <= il[j];
          ph    <= '0;
          state <= S_RC;
        end
        S_RC: if (rc_done) begin
          icom_r <= icom_c;
          state  <= S_CL;
        end
        S_CL:  state <= S_DIV;
        S_DIV: if (div_done) state <= S_MAP;
        S_MAP: begin
          if (32'(ph) + 1 >= nact) begin
            state <= S_FIN;
          end else begin
            ph    <= ph + 1'b1;
            state <= S_CL;
          end
        end
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the ring counter's token must follow the phase being computed
  a_token: assert property (@(posedge clk) disable iff (rst)
    (state == S_MAP) |-> token[ph]);
endmodule
