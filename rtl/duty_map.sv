// duty_map: duty computation of one phase (the digital current controller
// stage between the DC-link division and the ring counter).
//
// A half-bridge leg with a split DC link gives v_leg = (d - 1/2) * V_dc, so
// the duty is d = 1/2 + y with y = v_c/V_dc. The compare value is
// V_MOD = FSW * d = FSW * (2^14 + Y) / 2^15 for Y = y in Q.15, clamped to
// 0..FSW (0 % .. 100 % duty). The mapping is this design's reading of the
// half-bridge legs drawn in the document. Purely combinational.
module duty_map
  import inv_pkg::*;
(
  input  ynorm_t y,
  input  cnt_t   fsw,
  output cnt_t   vmod
);
  always_comb begin
    logic signed [47:0] t;
    t = ((48'sd16384 + 48'(y)) * 48'($signed({1'b0, fsw}))) >>> 15;
    if (t < 0)                 vmod = '0;
    else if (t > 48'($signed({1'b0, fsw}))) vmod = fsw;
    else                       vmod = cnt_t'(t);
  end
endmodule
