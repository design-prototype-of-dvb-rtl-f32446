// Single-port synchronous SRAM bank.
//
// One access per cycle: with en high, we = 1 writes wdata to addr, we = 0
// reads addr and presents the word on rdata after the clock edge (one cycle
// latency). rdata holds its value until the next read. The array has no
// reset; contents are undefined until written, as in an SRAM macro.
// It stands in for a generated single-port SRAM macro of the same behaviour.
module sp_sram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 6,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
