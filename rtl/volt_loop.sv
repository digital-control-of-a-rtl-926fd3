// volt_loop: deadbeat voltage-loop compensator.
//
// i_com = Kv * e + (1/m) * i_o, where e is the voltage error (after the
// repetitive controller has added its compensation), Kv = C/Ts places the
// closed-loop pole of the capacitor voltage at z = 0, and the load current
// feed-forward i_o/m shares the load among the m phases. The control law is
// the document's; the gains are inputs (defaults in inv_pkg: Kv = 0.648 S,
// 1/m = 1/3) in Q.12 and the result saturates to the 24-bit signal range.
// Purely combinational.
module volt_loop
  import inv_pkg::*;
(
  input  sig_t  err,
  input  sig_t  io,
  input  gain_t kv,
  input  gain_t inv_m,
  output sig_t  icom
);
  always_comb begin
    icom = sat_sig(64'(gmul(kv, err)) + 64'(gmul(inv_m, io)));
  end
endmodule
