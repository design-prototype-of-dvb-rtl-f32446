// Access controller of the multibank symbol deinterleaver.
//
// A single buffer holds one symbol. The word read for output position q of
// the previous symbol and the word written for input position q of the
// current symbol share one address: q when the current symbol is even, H(q)
// when it is odd. So each accepted input word reads the buffer at address
// addr(q_R) and is pushed into the conflict FIFO; the FIFO's oldest words are
// written back at addr(q_W) and addr(q_W+1), always behind the reads.
//
// Each cycle:
//   rd  = input accepted (in_valid && in_ready); reads ra = addr(q_R)
//   w1  = FIFO not empty and bank(wa1) differs from bank(ra) (reads win)
//   w2  = w1, two words in the FIFO, and bank(wa2) differs from bank(ra)
//         and bank(wa1)
//   q_R += rd, q_W += w1 + w2
// When q_R and q_W both reach Nmax the symbol ends: counters and address
// generators restart and the parity toggles. After the last input word of a
// symbol in_ready stays low until the FIFO has drained (at least one cycle).
// in_ready is also low when the FIFO is full and would not be popped.
//
// Timing: ra/wa1/wa2 and the enables are combinational from registers and
// in_valid; out_valid / out_sop are registered and line up with the buffer's
// read data one cycle after the read. No output is flagged for the first
// symbol after reset, which has no predecessor. mode must be static.
// The per-cycle rules above are the published access algorithm. The drain
// hold-off, the full-FIFO hold-off, the suppressed first symbol and the
// first-symbol-is-even convention are this design's choices.
module deint_ctrl
  import dvb_deint_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 31,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dvb_mode_e     mode,
  // input handshake
  input  logic          in_valid,
  output logic          in_ready,
  // conflict FIFO
  input  logic [CW-1:0] fifo_count,
  output logic          fifo_push,
  output logic [1:0]    fifo_pop,
  // symbol buffer requests
  output logic          rd_en,
  output addr_t         ra,
  output logic          we1,
  output addr_t         wa1,
  output logic          we2,
  output addr_t         wa2,
  // output framing, aligned with the buffer read data
  output logic          out_valid,
  output logic          out_sop,
  output logic          out_sym_odd,
  // status, one pulse per event
  output logic          ev_conflict,   // a buffered word was held back by a bank conflict
  output logic          ev_dual_write, // two words written in one cycle
  output logic          ev_skip,       // read-side generator used its look-ahead candidate
  output logic          ev_drain,      // cycle spent draining the FIFO at the end of a symbol
  output logic          ev_full        // input held off because the FIFO is full
);

  addr_t qr, qw, qw1;
  addr_t qr1;  // q_R + 1, only used by the end-of-symbol check
  addr_t hr, hw0, hw1;
  addr_t nmax;
  logic  sym_odd, have_prev;
  logic  draining, end_sym, pop_if_read, read_skip;
  bank_e rbank, w1bank, w2bank;

  assign nmax = n_max(mode);

  // address selection by symbol parity
  assign ra  = sym_odd ? hr  : qr;
  assign wa1 = sym_odd ? hw0 : qw;
  assign wa2 = sym_odd ? hw1 : qw1;

  assign rbank  = bank_of(ra, mode);
  assign w1bank = bank_of(wa1, mode);
  assign w2bank = bank_of(wa2, mode);

  assign draining    = (qr == nmax);
  assign pop_if_read = (fifo_count != '0) && (rbank != w1bank);
  assign in_ready    = !draining && ((int'(fifo_count) < int'(FIFO_DEPTH)) || pop_if_read);
  assign rd_en       = in_valid && in_ready;
  assign fifo_push   = rd_en;

  always_comb begin
    we1 = (fifo_count != '0) && (!rd_en || rbank != w1bank);
    we2 = we1 && (fifo_count >= CW'(2)) && (!rd_en || rbank != w2bank) && (w1bank != w2bank);
    fifo_pop = {1'b0, we1} + {1'b0, we2};
  end

  assign end_sym = ((rd_en ? qr1 : qr) == nmax) && (qw + addr_t'(fifo_pop) == nmax);

  q_gen #(.WIDTH(ADDR_W)) u_qgen_r (
    .clk, .rst_n, .clr(end_sym), .inc({1'b0, rd_en}), .q(qr), .q_plus1(qr1));
  q_gen #(.WIDTH(ADDR_W)) u_qgen_w (
    .clk, .rst_n, .clr(end_sym), .inc(fifo_pop), .q(qw), .q_plus1(qw1));
  hq_gen u_hqgen_r (
    .clk, .rst_n, .mode, .clr(end_sym), .adv(rd_en), .h(hr), .skip(read_skip));
  hq2_gen u_hq2gen_w (
    .clk, .rst_n, .mode, .clr(end_sym), .adv(fifo_pop), .h0(hw0), .h1(hw1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_odd     <= 1'b0;
      have_prev   <= 1'b0;
      out_valid   <= 1'b0;
      out_sop     <= 1'b0;
      out_sym_odd <= 1'b0;
    end else begin
      out_valid   <= rd_en && have_prev;
      out_sop     <= rd_en && have_prev && (qr == '0);
      out_sym_odd <= !sym_odd;
      if (end_sym) begin
        sym_odd   <= !sym_odd;
        have_prev <= 1'b1;
      end
    end
  end

  assign ev_conflict   = (fifo_count != '0) && !we1;
  assign ev_dual_write = we2;
  assign ev_skip       = rd_en && sym_odd && read_skip;
  assign ev_drain      = draining;
  assign ev_full       = in_valid && !draining && !in_ready;

  // writes never overtake reads of the same symbol
  a_write_behind_read: assert property (@(posedge clk) disable iff (!rst_n)
      we1 |-> qw < qr) else $error("deint_ctrl: write ahead of read");
  a_fifo_matches: assert property (@(posedge clk) disable iff (!rst_n)
      int'(qr) - int'(qw) == int'(fifo_count)) else $error("deint_ctrl: FIFO level mismatch qr=%0d qw=%0d cnt=%0d", $sampled(qr), $sampled(qw), $sampled(fifo_count));

endmodule
