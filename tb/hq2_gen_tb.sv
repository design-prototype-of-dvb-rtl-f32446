// Testbench for hq2_gen: in each mode q is advanced by random steps of 0, 1
// or 2 through a whole symbol, and both outputs H(q) and H(q+1) are checked
// against the reference permutation every cycle.
module hq2_gen_tb;
  import dvb_deint_pkg::*;
  import dvb_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [1:0] adv = '0;
  dvb_mode_e  mode = MODE_8K;
  addr_t      h0, h1;
  int checks = 0, failures = 0;
  int href[], raw[];

  hq2_gen dut (.clk, .rst_n, .mode, .clr, .adv, .h0, .h1);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, q, doubles, step;
    for (int pass = 0; pass < 6; pass++) begin
      int m;
      m = pass % 3;
      mode = dvb_mode_e'(m);
      void'(ref_perm(m, href, raw));
      n = ref_nmax(m);
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      rst_n <= 1'b1;
      q = 0;
      doubles = 0;
      while (q + 1 < n) begin
        @(negedge clk);
        checks++;
        if (int'(h0) != href[q] || int'(h1) != href[q + 1]) begin
          failures++;
          if (failures < 10)
            $display("mode %0d q=%0d: h0=%0d h1=%0d expected %0d %0d", m, q, h0, h1, href[q], href[q + 1]);
        end
        // pass 0..2 mostly double steps, 3..5 random
        step = (pass < 3) ? (($urandom_range(0, 4) == 0) ? 1 : 2) : $urandom_range(0, 2);
        if (q + step >= n) step = 1;
        adv = 2'(step);
        if (step == 2) doubles++;
        @(posedge clk);
        #1 adv = '0;
        q += step;
      end
      checks++;
      if (doubles == 0) begin
        failures++;
        $display("no double advance exercised");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
