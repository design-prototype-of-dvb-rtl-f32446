// Hq2-gen: permutation generator that delivers two consecutive addresses.
//
// The write side of the deinterleaver may store two buffered words in one
// cycle, at H(q) and H(q+1). The state register always holds the raw index of
// H(q) (an in-range candidate). Since two out-of-range candidates never follow
// each other, H(q+1) is the next raw candidate c1 if it is in range, else c2.
// For a double advance the next state is the first in-range candidate after
// the one chosen for H(q+1), which is c2 or c3 (when c1 was chosen) or c3 or
// c4 (when c2 was chosen); c4 is then known to be in range.
//
// Interface: adv = 0, 1 or 2 moves q by that much at the next clock edge;
// clr restarts at q = 0 (priority). h0 = H(q) and h1 = H(q+1) are
// combinational from the state register.
// Producing two addresses per cycle is part of the architecture. Keeping the
// state on a valid index and looking four raw steps ahead is this design's
// way of doing it.
module hq2_gen
  import dvb_deint_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dvb_mode_e  mode,
  input  logic       clr,
  input  logic [1:0] adv,
  output addr_t      h0,
  output addr_t      h1
);

  h_state_t s_q;
  h_state_t s1, s2, s3, s4;
  h_state_t s_next1, s_next2;
  logic     v1, v2, v3;

  always_comb begin
    s1 = h_step(s_q, mode);
    s2 = h_step(s1, mode);
    s3 = h_step(s2, mode);
    s4 = h_step(s3, mode);
    v1 = h_valid(s1.r, s1.t, mode);
    v2 = h_valid(s2.r, s2.t, mode);
    v3 = h_valid(s3.r, s3.t, mode);
    h0 = h_cand(s_q.r, s_q.t, mode);
    s_next1 = v1 ? s1 : s2;
    if (v1) s_next2 = v2 ? s2 : s3;
    else    s_next2 = v3 ? s3 : s4;
    h1 = h_cand(s_next1.r, s_next1.t, mode);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s_q <= H_START;
    else if (clr) s_q <= H_START;
    else begin
      case (adv)
        2'd1:    s_q <= s_next1;
        2'd2:    s_q <= s_next2;
        default: s_q <= s_q;
      endcase
    end
  end

endmodule
