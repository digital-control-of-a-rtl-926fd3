// rep_ctrl: minimal-THD controller, a plug-in repetitive controller.
//
// The internal-model idea: a delay line of one fundamental period (N
// samples) with positive feedback reproduces any periodic signal, so a loop
// containing it drives periodic error to zero. Per control sample k:
//     y(k)  = q * y(k-N) + e(k)        main delay loop with Q(z) = q < 1
//     u(k)  = g * y(k-(N-M))           post filter S(z) = g z^-(N-M)
//     e'(k) = e(k) + u(k)              modified error for the voltage loop
// W(k) = y(k-N) is the periodic compensation signal; reading the buffer M
// samples early gives the post filter its phase lead of M samples (the plant
// and loop delay at the fundamental). These equations are the document's;
// the default q = 0.95 and g = 0.5 are this design's (the document asks only
// for 0 < q, g < 1), and M = 3 comes from a 3.23 degree loop phase delay at
// 60 Hz: M = N*theta/360 = 2.69, rounded.
// Storage is an N-word single-port circular buffer read twice and written
// once per sample. After reset the buffer is cleared (N clocks, `ready` low).
// With en = 0 the output u is 0 and zeros are written, so the buffer empties
// within one period and the controller restarts from nothing when enabled.
// Timing: start (accepted when ready) -> done pulse 4 clocks later with
// err_mod and u_rc valid until the next start.
module rep_ctrl
  import inv_pkg::*;
#(
  parameter int unsigned N = 300,
  parameter int unsigned M = 3
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  logic  en,
  input  gain_t q,
  input  gain_t g,
  input  sig_t  err,
  output sig_t  err_mod,
  output sig_t  u_rc,
  output logic  done,
  output logic  ready
);
  localparam int unsigned AW = $clog2(N);

  typedef enum logic [2:0] {S_CLR, S_IDLE, S_RD1, S_RD2, S_CALC} state_t;
  state_t state;

  sig_t          mem [N];
  logic [AW-1:0] ptr, ptr_m, raddr, waddr;
  logic          we;
  sig_t          wdata, rdata, w_old, e_l;

  // slot written N-M samples ago
  always_comb begin
    if (32'(ptr) + M >= N) ptr_m = AW'(32'(ptr) + M - N);
    else                   ptr_m = AW'(32'(ptr) + M);
    raddr = (state == S_RD2) ? ptr_m : ptr;
  end

  // single-port buffer, registered read
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  assign ready = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_CLR;
      ptr     <= '0;
      waddr   <= '0;
      wdata   <= '0;
      we      <= 1'b1;
      done    <= 1'b0;
      err_mod <= '0;
      u_rc    <= '0;
      e_l     <= '0;
      w_old   <= '0;
    end else begin
      done <= 1'b0;
      we   <= 1'b0;
      unique case (state)
        S_CLR: begin
          // clear sweep: one zero per clock
          if (waddr == AW'(N - 1)) begin
            state <= S_IDLE;
          end else begin
            waddr <= waddr + 1'b1;
            we    <= 1'b1;
          end
        end
        S_IDLE: if (start) begin
          e_l   <= err;
          state <= S_RD1;          // rdata <= y(k-N) this clock
        end
        S_RD1: begin
          w_old <= rdata;          // W(k) = y(k-N)
          state <= S_RD2;
        end
        S_RD2: state <= S_CALC;    // rdata <= y(k-(N-M)) this clock
        S_CALC: begin
          sig_t u;
          u       = en ? gmul(g, rdata) : '0;
          waddr   <= ptr;
          wdata   <= en ? sat_sig(64'(gmul(q, w_old)) + 64'(e_l)) : '0;
          we      <= 1'b1;
          ptr     <= (ptr == AW'(N - 1)) ? '0 : ptr + 1'b1;
          u_rc    <= u;
          err_mod <= sat_sig(64'(e_l) + 64'(u));
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
