// q-gen: natural-order index counter of the deinterleaver.
//
// Holds q and supplies q and q+1 (the two natural-order write addresses of an
// even symbol, or the read address). One register and one adder: each cycle q
// advances by inc (0, 1 or 2; a step of 2 is used when two buffered words are
// written in one cycle). clr restarts at 0 and has priority over inc. Outputs
// come straight from the register, so they are valid throughout the cycle.
// The single-adder counter is the architecture's; the step of 2 and the clear
// are this design's choices.
module q_gen #(
  parameter int unsigned WIDTH = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [1:0]       inc,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_plus1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else          q <= q + WIDTH'(inc);
  end

  assign q_plus1 = q + WIDTH'(1);

endmodule
