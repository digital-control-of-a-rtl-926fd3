// sync_sampler: synchronous (interleaved) ADC sampling controller.
//
// The inductor current of each phase is sampled where it equals its average:
// at the carrier zero (middle of the on-time, mid-point of the rising slope)
// or at the carrier peak (middle of the off-time, mid-point of the falling
// slope), or at both (double-frequency sampling). This rule is the
// document's. ADSYN is the 12-bit carrier of phase a, the width printed in
// the document's sampler diagram. For the triangle the sampler keeps a
// direction flag (set at the peak FSW, cleared at zero) to turn the carrier
// value back into the phase-a position in the period (0..2*FSW-1); from that
// position, FSW, PHAM, PHSH and SYM it rebuilds each phase's position with
// the same arithmetic as the carrier generator, detects the chosen instants
// and starts conversions with chip-select pulses AD1CS..AD6CS.
// This design's choices: SAMP_MODE 0 = zero, 1 = peak, 2 = both, 3 = off;
// channels 1..NPH are the phase currents, each sampled at its own phase's
// instant, and channels NPH+1..NPH+3 (v_o, i_o, V_dc) are sampled at phase
// a's instant. A pulse FSM holds the selected chip selects for CS_W clocks
// (triggers that arrive meanwhile join the pulse and restart its count);
// the output register applies the polarity (act_high = 0: active low).
// cs_end pulses for one clock when a channel's pulse ends; an external ADC is
// expected to present its result by then.
module sync_sampler
  import inv_pkg::*;
#(
  parameter int unsigned NPH  = 3,
  parameter int unsigned CS_W = 20
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [2:0]       pham,
  input  logic [1:0]       samp_mode,
  input  cnt_t             fsw,
  input  cnt_t             adsyn,
  input  logic             phsh,
  input  logic             sym,
  input  logic             act_high,
  output logic [NPH+2:0]   adcs,
  output logic [NPH+2:0]   cs_end
);
  localparam int unsigned NCH = NPH + 3;
  localparam int unsigned CNTW = $clog2(CS_W + 1);

  typedef enum logic {S_IDLE, S_PULSE} state_t;
  state_t state;

  logic [NPH-1:0] inst_now, inst_prev, hit;
  logic           down_r, down_now;   // phase a on the falling half of the triangle
  pos_t           pos_a;
  logic [NCH-1:0] trig, mask;
  logic [CNTW-1:0] cnt;

  always_comb begin
    pos_t per, pj, peak;
    int unsigned nact;
    per  = period_len(fsw, sym);
    nact = active_phases(pham, NPH);
    peak = sym ? {1'b0, fsw} : ({1'b0, fsw} - 1'b1);
    if (!sym || adsyn == '0) down_now = 1'b0;
    else if (adsyn == fsw)   down_now = 1'b1;
    else                     down_now = down_r;
    pos_a = down_now ? (per - {1'b0, adsyn}) : {1'b0, adsyn};
    for (int j = 0; j < NPH; j++) begin
      pj = phase_pos(pos_a, phase_offset(per, j, nact, phsh), per);
      unique case (samp_mode)
        2'd0:    inst_now[j] = (pj == '0);
        2'd1:    inst_now[j] = (pj == peak);
        2'd2:    inst_now[j] = (pj == '0) || (pj == peak);
        default: inst_now[j] = 1'b0;
      endcase
      inst_now[j] = inst_now[j] && (j < nact);
    end
    hit = inst_now & ~inst_prev;
    trig = '0;
    trig[NPH-1:0] = hit;
    trig[NCH-1:NPH] = {3{hit[0]}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      inst_prev <= '1;
      down_r    <= 1'b0;
      state     <= S_IDLE;
      mask      <= '0;
      cnt       <= '0;
      cs_end    <= '0;
    end else begin
      inst_prev <= inst_now;
      down_r    <= down_now;
      cs_end    <= '0;
      unique case (state)
        S_IDLE: if (trig != '0) begin
          mask  <= trig;
          cnt   <= CNTW'(CS_W - 1);
          state <= S_PULSE;
        end
        S_PULSE: begin
          if (trig != '0) begin
            mask <= mask | trig;
            cnt  <= CNTW'(CS_W - 1);
          end else if (cnt == '0) begin
            cs_end <= mask;
            mask   <= '0;
            state  <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // synchronous output register with programmable polarity
  always_ff @(posedge clk) begin
    if (rst) adcs <= act_high ? '0 : '1;
    else     adcs <= act_high ? mask : ~mask;
  end
endmodule
