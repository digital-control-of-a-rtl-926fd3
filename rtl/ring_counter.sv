// ring_counter: digital ring counter that distributes the compare values.
//
// The control datapath computes one phase at a time; a one-hot token walks
// around the active phases (PHAM of them) and `load` writes the computed
// V_MOD into the register of the phase holding the token, then passes the
// token on. `clr` returns the token to phase a at the start of each control
// sample. The ring counter is named in the document's controller diagram;
// using it as the phase distributor of a time-shared datapath is this
// design's reading. V_MOD registers reset to 0.
// Timing: registers update on the clock edge with `load`; clr has priority.
module ring_counter
  import inv_pkg::*;
#(
  parameter int unsigned NPH = 3
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clr,
  input  logic           load,
  input  logic [2:0]     pham,
  input  cnt_t           din,
  output logic [NPH-1:0] token,
  output cnt_t           vmod [NPH]
);
  int unsigned nact;
  assign nact = active_phases(pham, NPH);

  always_ff @(posedge clk) begin
    if (rst) begin
      token <= NPH'(1);
      for (int j = 0; j < NPH; j++) vmod[j] <= '0;
    end else if (clr) begin
      token <= NPH'(1);
    end else if (load) begin
      for (int j = 0; j < NPH; j++)
        if (token[j]) vmod[j] <= din;
      if (token[nact-1]) token <= NPH'(1);
      else               token <= token << 1;
    end
  end

  // exactly one phase holds the token
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(token));
endmodule
