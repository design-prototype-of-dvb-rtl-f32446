// Conflict FIFO of the multibank deinterleaver.
//
// Incoming words wait here until their bank is free. One word can be pushed
// and up to two popped in the same cycle; the two oldest words are visible on
// head0 / head1 so that two of them can be written to the buffer at once.
// Implemented as a circular register file of DEPTH words with read and write
// pointers modulo DEPTH and an occupancy counter. A push with the FIFO full
// (after this cycle's pops) or a pop of more words than are held is a caller
// error and is flagged by assertions. head1 is meaningful when count >= 2.
// The depth of 31 and the double pop belong to the architecture; the circular
// register-file structure is this design's choice.
module conflict_fifo #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned DEPTH = 31,
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic [1:0]       pop,
  output logic [WIDTH-1:0] head0,
  output logic [WIDTH-1:0] head1,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] store [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr, rd_ptr1;

  function automatic logic [PW-1:0] ptr_add(logic [PW-1:0] p, int unsigned k);
    int unsigned s;
    s = int'(p) + k;
    if (s >= DEPTH) s = s - DEPTH;
    return PW'(s);
  endfunction

  assign rd_ptr1 = ptr_add(rd_ptr, 1);
  assign head0   = store[rd_ptr];
  assign head1   = store[rd_ptr1];

  always_ff @(posedge clk) begin
    if (push) store[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= ptr_add(wr_ptr, 1);
      rd_ptr <= ptr_add(rd_ptr, int'(pop));
      count  <= count + CW'(push) - CW'(pop);
    end
  end

  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) int'(pop) <= int'(count);
  endproperty
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) int'(count) + int'(push) - int'(pop) <= int'(DEPTH);
  endproperty
  a_no_underflow: assert property (p_no_underflow) else $error("conflict_fifo: pop from empty");
  a_no_overflow:  assert property (p_no_overflow)  else $error("conflict_fifo: overflow");

endmodule
