// Multibank symbol buffer.
//
// One OFDM symbol is held in four single-port banks instead of one dual-port
// memory or two ping-pong memories:
//   EL: even addresses below Mmax/2     (LOW_DEPTH words)
//   OL: odd addresses below Mmax/2      (LOW_DEPTH words)
//   EH: even addresses from Mmax/2 up   (HIGH_DEPTH words)
//   OH: odd addresses from Mmax/2 up    (HIGH_DEPTH words)
// The word inside a bank is (address mod Mmax/2) >> 1. Each cycle the buffer
// accepts one read (rd_en, ra) and two writes (we1/wa1/wd1, we2/wa2/wd2) on
// symbol addresses; every request must target a different bank, which the
// access controller guarantees and an assertion checks. Read data appear on
// rdata one cycle after the read, selected by the registered bank number.
// The four-bank split and its sizes are the architecture's; the fixed
// read-before-write1-before-write2 routing is this design's.
module symbol_buffer
  import dvb_deint_pkg::*;
#(
  parameter int unsigned DATA_W     = 6,
  parameter int unsigned LOW_DEPTH  = 2048,
  parameter int unsigned HIGH_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  dvb_mode_e         mode,
  input  logic              rd_en,
  input  addr_t             ra,
  input  logic              we1,
  input  addr_t             wa1,
  input  logic [DATA_W-1:0] wd1,
  input  logic              we2,
  input  addr_t             wa2,
  input  logic [DATA_W-1:0] wd2,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned LAW = $clog2(LOW_DEPTH);
  localparam int unsigned HAW = $clog2(HIGH_DEPTH);

  bank_e             rbank, w1bank, w2bank, rbank_q;
  logic [3:0]        en, we;
  bword_t            word [4];
  logic [DATA_W-1:0] wdata [4];
  logic [DATA_W-1:0] bank_rdata [4];

  assign rbank  = bank_of(ra, mode);
  assign w1bank = bank_of(wa1, mode);
  assign w2bank = bank_of(wa2, mode);

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      en[b]    = 1'b0;
      we[b]    = 1'b0;
      word[b]  = '0;
      wdata[b] = '0;
      if (rd_en && rbank == bank_e'(b)) begin
        en[b]   = 1'b1;
        word[b] = bank_word(ra, mode);
      end else if (we1 && w1bank == bank_e'(b)) begin
        en[b]    = 1'b1;
        we[b]    = 1'b1;
        word[b]  = bank_word(wa1, mode);
        wdata[b] = wd1;
      end else if (we2 && w2bank == bank_e'(b)) begin
        en[b]    = 1'b1;
        we[b]    = 1'b1;
        word[b]  = bank_word(wa2, mode);
        wdata[b] = wd2;
      end
    end
  end

  sp_sram #(.DEPTH(LOW_DEPTH), .WIDTH(DATA_W)) u_el (
    .clk, .en(en[BANK_EL]), .we(we[BANK_EL]), .addr(word[BANK_EL][LAW-1:0]),
    .wdata(wdata[BANK_EL]), .rdata(bank_rdata[BANK_EL]));
  sp_sram #(.DEPTH(LOW_DEPTH), .WIDTH(DATA_W)) u_ol (
    .clk, .en(en[BANK_OL]), .we(we[BANK_OL]), .addr(word[BANK_OL][LAW-1:0]),
    .wdata(wdata[BANK_OL]), .rdata(bank_rdata[BANK_OL]));
  sp_sram #(.DEPTH(HIGH_DEPTH), .WIDTH(DATA_W)) u_eh (
    .clk, .en(en[BANK_EH]), .we(we[BANK_EH]), .addr(word[BANK_EH][HAW-1:0]),
    .wdata(wdata[BANK_EH]), .rdata(bank_rdata[BANK_EH]));
  sp_sram #(.DEPTH(HIGH_DEPTH), .WIDTH(DATA_W)) u_oh (
    .clk, .en(en[BANK_OH]), .we(we[BANK_OH]), .addr(word[BANK_OH][HAW-1:0]),
    .wdata(wdata[BANK_OH]), .rdata(bank_rdata[BANK_OH]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rbank_q <= BANK_EL;
    else if (rd_en) rbank_q <= rbank;
  end

  assign rdata = bank_rdata[rbank_q];

  a_read_write1_apart: assert property (@(posedge clk) disable iff (!rst_n)
      rd_en && we1 |-> rbank != w1bank) else $error("symbol_buffer: read and write 1 on one bank");
  a_read_write2_apart: assert property (@(posedge clk) disable iff (!rst_n)
      rd_en && we2 |-> rbank != w2bank) else $error("symbol_buffer: read and write 2 on one bank");
  a_writes_apart: assert property (@(posedge clk) disable iff (!rst_n)
      we1 && we2 |-> w1bank != w2bank) else $error("symbol_buffer: two writes on one bank");

endmodule
