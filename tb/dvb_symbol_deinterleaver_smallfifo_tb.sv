// Back-pressure testbench of dvb_symbol_deinterleaver with an 8-word FIFO.
//
// Same stimulus and output checks as the full-size testbench (all three
// modes, back-to-back and gapped input, every output word compared with the
// reference permutation), but with the conflict FIFO cut to 8 words, below
// the 15 / 12 / 31 words that back-to-back input needs. The FIFO then fills,
// in_ready drops inside a symbol, and the test checks that the output stays
// correct and that this full-FIFO hold-off really occurred.
module dvb_symbol_deinterleaver_smallfifo_tb;
  import dvb_deint_pkg::*;
  import dvb_ref_pkg::*;

  localparam int W  = 6;
  localparam int NS = 6;

  logic         clk = 1'b0, rst_n = 1'b0;
  dvb_mode_e    mode = MODE_2K;
  logic         in_valid = 1'b0, in_ready;
  logic [W-1:0] in_data = '0;
  logic         out_valid, out_sop, out_sym_odd;
  logic [W-1:0] out_data;
  logic [3:0]   fifo_level;
  logic         ev_conflict, ev_dual_write, ev_skip, ev_drain, ev_full;

  dvb_symbol_deinterleaver #(.FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .mode, .in_valid, .in_data, .in_ready,
    .out_valid, .out_data, .out_sop, .out_sym_odd, .fifo_level,
    .ev_conflict, .ev_dual_write, .ev_skip, .ev_drain, .ev_full);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conflict = 0, n_dual = 0, n_skip = 0, n_drain = 0, n_full = 0, n_odd_out = 0, n_even_out = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus and expected data
  logic [W-1:0] data [NS][6048];
  int href[], hinv[], raw[];
  int n;
  bit monitor_on = 1'b0;
  bit gaps;

  // 8k example: output word q of an even symbol is input word H(q), of an
  // odd symbol input word H^-1(q); values worked out by hand from the standard
  localparam int ex_even   [4] = '{0, 4096, 128, 4128};
  localparam int ex_even28 [6] = '{1712, 216, 4643, 3204, 4408, 2147};
  localparam int ex_odd    [4] = '{0, 6, 1624, 4040};

  // monitor: sample at the falling edge, where inputs and outputs are stable
  int  os, ok, max_fifo, stall_in_symbol, acc_in_symbol;
  bit  prev_acc;
  int  cur_in_sym;
  always @(negedge clk) begin
    if (monitor_on) begin
      if (out_valid) begin
        int exp_v;
        check(prev_acc, "out_valid without an input word one cycle earlier");
        if (os < NS) begin
          exp_v = (os % 2 == 0) ? int'(data[os][href[ok]]) : int'(data[os][hinv[ok]]);
          check(int'(out_data) == exp_v,
                $sformatf("mode %0d symbol %0d word %0d: got %0h expected %0h", mode, os, ok, out_data, exp_v));
        end
        // worked 8k example: source positions of the first output words
        if (mode == MODE_8K && os < NS) begin
          if (os % 2 == 0 && ok < 4)
            check(int'(out_data) == int'(data[os][ex_even[ok]]), $sformatf("8k even example word %0d", ok));
          if (os % 2 == 0 && ok >= 28 && ok < 34)
            check(int'(out_data) == int'(data[os][ex_even28[ok - 28]]), $sformatf("8k even example word %0d", ok));
          if (os % 2 == 1 && ok < 4)
            check(int'(out_data) == int'(data[os][ex_odd[ok]]), $sformatf("8k odd example word %0d", ok));
        end
        check(out_sop == (ok == 0), $sformatf("out_sop at word %0d", ok));
        check(out_sym_odd == (os % 2 == 1), "out_sym_odd");
        if (out_sym_odd) n_odd_out++; else n_even_out++;
        ok++;
        if (ok == n) begin ok = 0; os++; end
      end else begin
        check(!prev_acc, "missing output word one cycle after input");
      end
      prev_acc = in_valid && in_ready && cur_in_sym > 0;
      if (in_valid && in_ready) acc_in_symbol++;
      if (acc_in_symbol > 0 && acc_in_symbol < n && in_valid && !in_ready) stall_in_symbol++;
      if (int'(fifo_level) > max_fifo) max_fifo = int'(fifo_level);
      if (ev_conflict)   n_conflict++;
      if (ev_dual_write) n_dual++;
      if (ev_skip)       n_skip++;
      if (ev_drain)      n_drain++;
      if (ev_full)       n_full++;
    end
  end

  task automatic send_symbol(int s);
    int k;
    k = 0;
    acc_in_symbol = 0;
    cur_in_sym = s;
    while (k < n) begin
      in_valid = !gaps || ($urandom_range(0, 4) != 0);
      in_data  = data[s][k];
      @(posedge clk);
      if (in_valid && in_ready) k++;
      #1;
    end
    in_valid = 1'b0;
  endtask

  initial begin
    int start, cycles, exp_peak;
    for (int pass = 0; pass < 6; pass++) begin
      int m;
      m = pass % 3;
      gaps = (pass >= 3);
      mode = dvb_mode_e'(m);
      n = ref_nmax(m);
      void'(ref_perm(m, href, raw));
      hinv = new[n];
      for (int q = 0; q < n; q++) hinv[href[q]] = q;
      for (int s = 0; s < NS; s++)
        for (int k = 0; k < n; k++) data[s][k] = W'($urandom);
      rst_n = 1'b0;
      monitor_on = 1'b0;
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      os = 0; ok = 0; max_fifo = 0; stall_in_symbol = 0; prev_acc = 0;
      monitor_on = 1'b1;
      for (int s = 0; s < NS; s++) begin
        start = $rtoi($time / 10);
        send_symbol(s);
        // wait until the next symbol can start (FIFO drained)
        while (!in_ready) begin @(posedge clk); #1; end
        cycles = $rtoi($time / 10) - start;
      end
      @(negedge clk);
      @(negedge clk);
      check(os == NS - 1 && ok == 0, $sformatf("mode %0d: %0d symbols + %0d words out", m, os, ok));
      if (!gaps) begin
        exp_peak = 8;
        check(max_fifo <= exp_peak, $sformatf("mode %0d FIFO peak %0d above its depth", m, max_fifo));
        check(stall_in_symbol > 0, $sformatf("mode %0d: the small FIFO never held the input off", m));
      end
      $display("mode %0d gaps %0d: FIFO peak %0d", m, gaps, max_fifo);
    end
    $display("events: conflicts %0d, double writes %0d, look-ahead %0d, drain cycles %0d, FIFO full %0d, even out %0d, odd out %0d",
             n_conflict, n_dual, n_skip, n_drain, n_full, n_even_out, n_odd_out);
    check(n_conflict > 0, "no bank conflict occurred");
    check(n_dual > 0, "no double write occurred");
    check(n_skip > 0, "look-ahead address never selected");
    check(n_drain > 0, "no end-of-symbol drain");
    check(n_even_out > 0 && n_odd_out > 0, "both symbol parities must be output");
    check(n_full > 0, "the 8-word FIFO never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
