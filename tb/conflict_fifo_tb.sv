// Testbench for conflict_fifo: random pushes and single or double pops that
// never over- or underflow, compared with a queue model: count, head0 and
// head1 every cycle. Runs phases biased to fill the FIFO to its depth and to
// empty it.
module conflict_fifo_tb;
  localparam int WIDTH = 6;
  localparam int DEPTH = 31;
  logic             clk = 1'b0, rst_n = 1'b0, push = 1'b0;
  logic [WIDTH-1:0] din = '0, head0, head1;
  logic [1:0]       pop = '0;
  logic [4:0]       count;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, reached_full = 0, double_pops = 0;

  conflict_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .head0, .head1, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 20000; c++) begin
      int np, fill_bias;
      @(negedge clk);
      checks++;
      if (int'(count) != q.size()) begin
        failures++;
        $display("cycle %0d: count %0d expected %0d", c, count, q.size());
      end
      if (q.size() >= 1) begin
        checks++;
        if (head0 !== q[0]) begin failures++; $display("cycle %0d: head0 %0h expected %0h", c, head0, q[0]); end
      end
      if (q.size() >= 2) begin
        checks++;
        if (head1 !== q[1]) begin failures++; $display("cycle %0d: head1 %0h expected %0h", c, head1, q[1]); end
      end
      if (q.size() == DEPTH) reached_full++;
      fill_bias = ((c / 500) % 2 == 0) ? 1 : 0;
      np = fill_bias ? (($urandom_range(0, 3) == 0) ? 1 : 0) : $urandom_range(0, 2);
      if (np > q.size()) np = q.size();
      push = ($urandom_range(0, 3) != 0);
      if (q.size() - np + int'(push) > DEPTH) push = 1'b0;
      din  = WIDTH'($urandom);
      pop  = 2'(np);
      if (np == 2) double_pops++;
      @(posedge clk);
      for (int k = 0; k < np; k++) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (reached_full == 0 || double_pops == 0) begin
      failures++;
      $display("coverage: full %0d times, %0d double pops", reached_full, double_pops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
