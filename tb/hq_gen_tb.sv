// Testbench for hq_gen: for each of the 2k, 4k and 8k modes the generator is
// stepped through a whole symbol with random idle cycles and its address is
// compared with the reference permutation. It also checks that one valid
// address is produced per advance (no missed cycles), that the look-ahead
// path is used exactly once per out-of-range raw candidate, and that the 8k
// generator meets 2144 out-of-range candidates per 8192, and that clr
// restarts the sequence mid-symbol.
module hq_gen_tb;
  import dvb_deint_pkg::*;
  import dvb_ref_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, clr = 1'b0, adv = 1'b0;
  dvb_mode_e mode = MODE_8K;
  addr_t     h;
  logic      skip;
  int checks = 0, failures = 0;
  int href[], raw[];

  hq_gen dut (.clk, .rst_n, .mode, .clr, .adv, .h, .skip);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int invalid, skips, expect_skips, n;
    for (int m = 0; m < 3; m++) begin
      mode  = dvb_mode_e'(m);
      rst_n = 1'b0;
      invalid = ref_perm(m, href, raw);
      n = ref_nmax(m);
      if (m == 2) begin
        checks++;
        if (invalid != 2144) begin
          failures++;
          $display("8k: %0d out-of-range candidates, expected 2144", invalid);
        end
      end
      repeat (2) @(posedge clk);
      rst_n <= 1'b1;
      skips = 0;
      for (int q = 0; q < n; q++) begin
        @(negedge clk);
        checks++;
        if (int'(h) != href[q]) begin
          failures++;
          if (failures < 10) $display("mode %0d q=%0d: h=%0d expected %0d", m, q, h, href[q]);
        end
        if (skip) skips++;
        // idle cycles must not move the sequence
        adv = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        adv = 1'b1;
        @(posedge clk);
        #1 adv = 1'b0;
      end
      // raw index of H(q) minus q is the number of skipped candidates before it
      expect_skips = raw[n - 1] - (n - 1);
      checks++;
      if (skips != expect_skips) begin
        failures++;
        $display("mode %0d: %0d look-ahead selections, expected %0d", m, skips, expect_skips);
      end
      // restart in the middle of a symbol
      @(negedge clk);
      clr = 1'b1;
      @(posedge clk);
      #1 clr = 1'b0;
      for (int q = 0; q < 8; q++) begin
        @(negedge clk);
        checks++;
        if (int'(h) != href[q]) begin
          failures++;
          $display("mode %0d after clr q=%0d: h=%0d expected %0d", m, q, h, href[q]);
        end
        adv = 1'b1;
        @(posedge clk);
        #1 adv = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
