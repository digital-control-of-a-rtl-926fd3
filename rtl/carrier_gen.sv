// carrier_gen: phase-shifted reference carrier generator of the DPWM.
//
// One master position counter runs through the carrier period P on every
// 20 MHz tick. P is 2*FSW for the symmetric carrier (an up-down count
// 0..FSW..0) and FSW for the asymmetric carrier (an up count 0..FSW-1);
// SYM/ASYM chooses between them, as the multiplexer of the document's DPWM
// diagram does. Phase j runs at position (master - j*P/PHAM) mod P when
// interleaving (PHSH) is on, so it lags phase a by j*P/PHAM and three phases
// are 120 degrees apart (a, then b, then c); with
// PHSH off all phases coincide. Deriving every phase from one counter plus an
// offset is this design's choice: it keeps the phases locked.
// Interface: carrier[j] is the 12-bit carrier of phase j, period_start[j]
// pulses for one clock when phase j restarts at position 0, master_pos is the
// phase-a position in the period (carrier[0] is ADSYN). Outputs are
// registered and change one clock after a tick.
module carrier_gen
  import inv_pkg::*;
#(
  parameter int unsigned NPH = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tick,
  input  cnt_t             fsw,
  input  logic [2:0]       pham,
  input  logic             phsh,
  input  logic             sym,
  output pos_t             master_pos,
  output cnt_t             carrier      [NPH],
  output logic [NPH-1:0]   period_start
);
  pos_t per;
  pos_t master_nxt;
  int unsigned nact;

  always_comb begin
    per  = period_len(fsw, sym);
    nact = active_phases(pham, NPH);
    if (master_pos + 1'b1 >= per) master_nxt = '0;
    else                          master_nxt = master_pos + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      master_pos   <= '0;
      period_start <= '0;
      for (int j = 0; j < NPH; j++) carrier[j] <= '0;
    end else if (tick) begin
      master_pos <= master_nxt;
      for (int j = 0; j < NPH; j++) begin
        pos_t pj;
        pj = phase_pos(master_nxt, phase_offset(per, j, nact, phsh), per);
        carrier[j]      <= carrier_of(pj, fsw, sym);
        period_start[j] <= (pj == '0);
      end
    end else begin
      period_start <= '0;
    end
  end
endmodule
