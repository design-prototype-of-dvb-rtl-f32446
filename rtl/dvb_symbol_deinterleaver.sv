// DVB-T symbol deinterleaver on a four-bank single-port buffer.
//
// Words of one OFDM symbol (Nmax = 1512, 3024 or 6048 for 2k, 4k, 8k mode)
// stream in on in_valid/in_ready; the previous symbol streams out, one word
// per accepted input word, in deinterleaved order:
//   previous symbol even: out[q] = in[H(q)]
//   previous symbol odd:  out[H(q)] = in[q]
// where H is the DVB-T symbol permutation. One buffer of Nmax words serves
// both symbols: every accepted word first reads the word at its address and
// then, through a small conflict FIFO, is written to that same address. The
// buffer is split into banks EL/OL/EH/OH so that the read and the FIFO writes
// of a cycle usually fall on different single-port banks; reads have priority
// and up to two FIFO words are written per cycle.
//
// Interface: mode is static (change it only under reset). out_valid marks an
// output word one cycle after the input word that fetched it; out_sop marks
// the first word of a symbol and out_sym_odd its parity. The first symbol
// after reset produces no output; the last symbol comes out while the next
// one (or any filler symbol) goes in. in_ready drops for the cycles that the
// FIFO needs to drain at the end of each symbol (one cycle for an even
// symbol, a few for an odd one). The ev_* outputs pulse on internal events
// for monitoring. The structure (banks, FIFO, Hq-gen for reads, two-address
// generator for writes) follows the published architecture; the handshake,
// the status outputs and the 6-bit default word width are this design's.
module dvb_symbol_deinterleaver
  import dvb_deint_pkg::*;
#(
  parameter int unsigned DATA_W     = 6,
  parameter int unsigned FIFO_DEPTH = 31,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dvb_mode_e         mode,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_sop,
  output logic              out_sym_odd,
  output logic [CW-1:0]     fifo_level,
  output logic              ev_conflict,
  output logic              ev_dual_write,
  output logic              ev_skip,
  output logic              ev_drain,
  output logic              ev_full
);

  logic              fifo_push, rd_en, we1, we2;
  logic [1:0]        fifo_pop;
  addr_t             ra, wa1, wa2;
  logic [DATA_W-1:0] head0, head1;

  deint_ctrl #(.FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .rst_n, .mode,
    .in_valid, .in_ready,
    .fifo_count(fifo_level), .fifo_push, .fifo_pop,
    .rd_en, .ra, .we1, .wa1, .we2, .wa2,
    .out_valid, .out_sop, .out_sym_odd,
    .ev_conflict, .ev_dual_write, .ev_skip, .ev_drain, .ev_full);

  conflict_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din(in_data), .pop(fifo_pop),
    .head0, .head1, .count(fifo_level));

  symbol_buffer #(.DATA_W(DATA_W)) u_buf (
    .clk, .rst_n, .mode,
    .rd_en, .ra,
    .we1, .wa1, .wd1(head0),
    .we2, .wa2, .wd2(head1),
    .rdata(out_data));

endmodule
