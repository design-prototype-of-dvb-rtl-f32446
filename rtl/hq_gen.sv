// Hq-gen: look-ahead DVB symbol permutation address generator.
//
// The raw DVB-T generator (LFSR R', wire permutation, toggle bit) produces
// Mmax candidates of which only those below Nmax are addresses, so a plain
// circuit misses a cycle whenever a candidate is out of range. Because an
// out-of-range candidate always has the toggle bit set, the following one is
// always in range. This block therefore evaluates two candidates per cycle:
// A1 from the current raw state and A2 from the state one LFSR step later.
// h = A1 if A1 < Nmax, else A2, and on adv the state moves one or two raw
// steps accordingly. h is valid every cycle.
//
// Interface: mode selects 2k/4k/8k and must be static; clr restarts the
// sequence at H(0) (priority over adv); adv moves to H(q+1) at the next clock
// edge. h and skip are combinational from the state register.
// The two-candidate look-ahead is the published architecture; the LFSR and
// wire permutation come from the DVB-T standard; the skip flag is an addition.
module hq_gen
  import dvb_deint_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  dvb_mode_e mode,
  input  logic      clr,
  input  logic      adv,
  output addr_t     h,
  output logic      skip   // A1 out of range, A2 in use
);

  h_state_t s_q;
  h_state_t s1, s2;
  addr_t    a1, a2;

  always_comb begin
    s1   = h_step(s_q, mode);
    s2   = h_step(s1, mode);
    a1   = h_cand(s_q.r, s_q.t, mode);
    a2   = h_cand(s1.r, s1.t, mode);
    skip = !(a1 < n_max(mode));
    h    = skip ? a2 : a1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s_q <= H_START;
    else if (clr) s_q <= H_START;
    else if (adv) s_q <= skip ? s2 : s1;
  end

endmodule
