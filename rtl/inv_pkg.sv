// inv_pkg: shared types, constants and fixed-point helpers of the inverter
// controller.
//
// Number formats (this design's choice; the control laws are the deadbeat
// laws v_c = Kc(i_com - i_L) + v_o and i_com = Kv(v_com - v_o) + i_o/m):
//   * physical signals (volts, amps) are signed 24-bit with 8 fraction bits
//     (Q15.8, range +/-32768, step 1/256);
//   * gains are signed 20-bit with 12 fraction bits (Q7.12);
//   * the normalised modulation v_c/V_dc is signed 16-bit Q.15.
// The default gains follow from Table-I-style plant values: L = 675 uH,
// C = 36 uF, Ts = 1/18 kHz, m = 3 phases.
package inv_pkg;

  localparam int SIG_W  = 24;   // physical signal width
  localparam int SIG_F  = 8;    // fraction bits of a physical signal
  localparam int GAIN_W = 20;   // gain width
  localparam int GAIN_F = 12;   // fraction bits of a gain
  localparam int Y_W    = 16;   // normalised modulation width (Q.15)
  localparam int Y_F    = 15;
  localparam int CW     = 12;   // carrier / FSW / V_MOD width
  localparam int PW     = CW + 1; // carrier-period position width (up to 2*FSW)

  typedef logic signed [SIG_W-1:0]  sig_t;
  typedef logic signed [GAIN_W-1:0] gain_t;
  typedef logic signed [Y_W-1:0]    ynorm_t;
  typedef logic [CW-1:0]            cnt_t;
  typedef logic [PW-1:0]            pos_t;

  // Deadbeat gains in Q.12: Kc = L/Ts = 675e-6*18e3 = 12.15 ohm,
  // Kv = C/Ts = 36e-6*18e3 = 0.648 S, 1/m = 1/3.
  localparam gain_t KC_DEF   = 20'sd49766;
  localparam gain_t KV_DEF   = 20'sd2654;
  localparam gain_t INV_M_DEF = 20'sd1365;
  // Repetitive controller: Q(z) = q = 0.95, post filter gain g = 0.5 (Q.12).
  localparam gain_t Q_DEF = 20'sd3891;
  localparam gain_t G_DEF = 20'sd2048;

  localparam longint SIG_MAX = (64'sd1 <<< (SIG_W-1)) - 1;
  localparam longint SIG_MIN = -(64'sd1 <<< (SIG_W-1));

  // Saturate a wide signed value to the physical signal range.
  function automatic sig_t sat_sig(input logic signed [63:0] v);
    if (v > SIG_MAX)      return sig_t'(SIG_MAX);
    else if (v < SIG_MIN) return sig_t'(SIG_MIN);
    else                  return sig_t'(v);
  endfunction

  // gain * signal, rescaled by the gain's fraction bits, with saturation.
  function automatic sig_t gmul(input gain_t k, input sig_t x);
    logic signed [63:0] prod;
    prod = 64'(k) * 64'(x);
    return sat_sig(prod >>> GAIN_F);
  endfunction

  // Length of one carrier period in ticks: 2*FSW for the symmetric
  // (up-down) carrier, FSW for the asymmetric (up) carrier.
  function automatic pos_t period_len(input cnt_t fsw, input logic sym);
    return sym ? {fsw, 1'b0} : {1'b0, fsw};
  endfunction

  // Number of active phases, limited to 1..nph.
  function automatic int unsigned active_phases(input logic [2:0] pham, input int unsigned nph);
    if (pham == 3'd0 || int'(pham) > nph) return nph;
    else return int'(pham);
  endfunction

  // Offset of phase j in the carrier period: P - j*P/PHAM when interleaving
  // is on (phase j lags phase a by j/PHAM of a period), otherwise 0.
  function automatic pos_t phase_offset(input pos_t per, input int unsigned j,
                                        input int unsigned nact, input logic phsh);
    int unsigned t;
    if (!phsh || j >= nact || j == 0) return '0;
    t = int'(per) - (int'(per) * j) / nact;
    return pos_t'(t);
  endfunction

  // Position of phase j: (master + offset) mod P.
  function automatic pos_t phase_pos(input pos_t master, input pos_t off, input pos_t per);
    logic [PW:0] s;
    s = {1'b0, master} + {1'b0, off};
    if (s >= {1'b0, per}) s = s - {1'b0, per};
    return s[PW-1:0];
  endfunction

  // Carrier value of a position: triangle for symmetric, ramp otherwise.
  function automatic cnt_t carrier_of(input pos_t pos, input cnt_t fsw, input logic sym);
    if (sym && pos > {1'b0, fsw}) return cnt_t'(({fsw, 1'b0}) - pos);
    else return cnt_t'(pos);
  endfunction

endpackage
