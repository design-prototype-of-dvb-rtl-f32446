// Testbench for sp_sram: fills a small bank with random words, reads every
// word back in random order checking the one-cycle read latency, checks that
// rdata holds between reads and that a disabled cycle changes nothing.
module sp_sram_tb;
  localparam int DEPTH = 256;
  localparam int WIDTH = 6;
  logic             clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [7:0]       addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sp_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 8'(a); wdata = WIDTH'($urandom); model[a] = wdata;
    end
    for (int k = 0; k < 2000; k++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 2) == 0) begin
        en = 1'b1; we = 1'b1; addr = 8'(a); wdata = WIDTH'($urandom); model[a] = wdata;
      end else begin
        en = 1'b1; we = 1'b0; addr = 8'(a);
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("addr %0d: read %0h expected %0h", a, rdata, model[a]);
        end
        // writing elsewhere must not disturb the read register
        held = rdata;
        en = 1'b1; we = 1'b1; addr = 8'((a + 1) % DEPTH); wdata = ~model[(a + 1) % DEPTH];
        model[(a + 1) % DEPTH] = wdata;
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata !== held) begin
          failures++;
          $display("rdata changed by a write");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
