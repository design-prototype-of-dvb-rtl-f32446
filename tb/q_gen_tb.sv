// Testbench for q_gen: random clear and 0/1/2 steps against a software
// counter, checking q and q+1 every cycle, including wrap-around of the
// 13-bit register.
module q_gen_tb;
  logic        clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [1:0]  inc = '0;
  logic [12:0] q, q_plus1;
  int checks = 0, failures = 0;
  int model = 0;

  q_gen #(.WIDTH(13)) dut (.clk, .rst_n, .clr, .inc, .q, .q_plus1);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      checks++;
      if (int'(q) != model || int'(q_plus1) != ((model + 1) % 8192)) begin
        failures++;
        $display("cycle %0d: q=%0d q+1=%0d expected %0d", c, q, q_plus1, model);
      end
      clr = ($urandom_range(0, 999) == 0);
      inc = 2'($urandom_range(0, 2));
      @(posedge clk);
      model = clr ? 0 : (model + int'(inc)) % 8192;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
