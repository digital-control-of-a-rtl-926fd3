// curr_loop: deadbeat current-loop compensator of one phase.
//
// v_c = Kc * (i_com - i_L) + v_o: Kc = L/Ts moves the inductor current to its
// command in one sample (pole at z = 0, inductor resistance neglected), and
// the output-voltage feed-forward cancels the capacitor voltage seen by the
// inductor. The control law is the document's; Kc is an input in Q.12
// (default 12.15 ohm in inv_pkg). The three phases share one instance in
// turn. Purely combinational; the result saturates to 24 bits.
module curr_loop
  import inv_pkg::*;
(
  input  sig_t  icom,
  input  sig_t  il,
  input  sig_t  vo,
  input  gain_t kc,
  output sig_t  vc
);
  always_comb begin
    sig_t diff;
    diff = sat_sig(64'(icom) - 64'(il));
    vc   = sat_sig(64'(gmul(kc, diff)) + 64'(vo));
  end
endmodule
