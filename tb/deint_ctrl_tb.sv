// Testbench for deint_ctrl in 8k mode with a FIFO occupancy model.
//
// Feeds four symbols back to back and checks:
//  - the read/write schedule of the first cycles of the odd symbol, and of
//    its cycles 28 to 33, against the 8k example schedule (reads 0, 4096,
//    128, 4128 ...; at cycle 32 a double write of 216 and 4643);
//  - every cycle, that the read and the writes use different banks;
//  - per symbol, that every address is read once and written once, each
//    write after the read of the same address;
//  - that the FIFO peaks at exactly 31 words for 8k, the design's FIFO depth;
//  - that out_valid follows each read by one cycle, only after the first
//    symbol, with out_sop on the first word.
module deint_ctrl_tb;
  import dvb_deint_pkg::*;
  import dvb_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  dvb_mode_e  mode = MODE_8K;
  logic       in_ready, fifo_push, rd_en, we1, we2;
  logic [1:0] fifo_pop;
  addr_t      ra, wa1, wa2;
  logic       out_valid, out_sop, out_sym_odd;
  logic       ev_conflict, ev_dual_write, ev_skip, ev_drain, ev_full;
  logic [4:0] fifo_count;
  int checks = 0, failures = 0;

  deint_ctrl #(.FIFO_DEPTH(31)) dut (
    .clk, .rst_n, .mode, .in_valid, .in_ready, .fifo_count, .fifo_push, .fifo_pop,
    .rd_en, .ra, .we1, .wa1, .we2, .wa2, .out_valid, .out_sop, .out_sym_odd,
    .ev_conflict, .ev_dual_write, .ev_skip, .ev_drain, .ev_full);

  always #5 clk = ~clk;

  // FIFO occupancy model
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_count <= '0;
    else        fifo_count <= fifo_count + 5'(fifo_push) - 5'(fifo_pop);
  end

  function automatic int bk(int a);
    return ((a >= 4096) ? 2 : 0) + (a % 2);
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected odd-symbol schedule, -1 for no access
  int exp_rd  [34];
  int exp_w1  [34];
  int exp_w2  [34];

  initial begin
    int href[], raw[];
    int n, t, maxfifo, sym;
    int rd_cnt[6048], wr_cnt[6048];
    bit prev_rd;
    for (int i = 0; i < 34; i++) begin exp_rd[i] = -2; exp_w1[i] = -2; exp_w2[i] = -2; end
    exp_rd[0] = 0;    exp_rd[1] = 4096; exp_rd[2] = 128;  exp_rd[3] = 4128;
    exp_w1[0] = -1;   exp_w1[1] = 0;    exp_w1[2] = 4096; exp_w1[3] = 128;
    exp_rd[28] = 1712; exp_rd[29] = 216; exp_rd[30] = 4643; exp_rd[31] = 3204; exp_rd[32] = 4408; exp_rd[33] = 2147;
    exp_w1[28] = 4167; exp_w1[29] = -1;  exp_w1[30] = 1712; exp_w1[31] = -1;   exp_w1[32] = 216;  exp_w1[33] = 3204;
    exp_w2[28] = -1;   exp_w2[29] = -1;  exp_w2[30] = -1;   exp_w2[31] = -1;   exp_w2[32] = 4643; exp_w2[33] = 4408;
    void'(ref_perm(2, href, raw));
    n = 6048;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (sym = 0; sym < 4; sym++) begin
      foreach (rd_cnt[i]) begin rd_cnt[i] = 0; wr_cnt[i] = 0; end
      t = 0;
      maxfifo = 0;
      // wait for the controller to accept the new symbol
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      do begin
        in_valid = 1'b1;
        #1;
        if (sym == 1 && t < 34) begin
          if (exp_rd[t] != -2) check(rd_en && int'(ra) == exp_rd[t], $sformatf("odd t=%0d read %0d expected %0d", t, ra, exp_rd[t]));
          if (exp_w1[t] != -2) check(exp_w1[t] == -1 ? !we1 : (we1 && int'(wa1) == exp_w1[t]),
                                     $sformatf("odd t=%0d write1 %0b/%0d expected %0d", t, we1, wa1, exp_w1[t]));
          if (exp_w2[t] != -2) check(exp_w2[t] == -1 ? !we2 : (we2 && int'(wa2) == exp_w2[t]),
                                     $sformatf("odd t=%0d write2 %0b/%0d expected %0d", t, we2, wa2, exp_w2[t]));
        end
        if (rd_en && we1) check(bk(int'(ra)) != bk(int'(wa1)), "read and write1 on one bank");
        if (rd_en && we2) check(bk(int'(ra)) != bk(int'(wa2)), "read and write2 on one bank");
        if (we1 && we2)   check(bk(int'(wa1)) != bk(int'(wa2)), "two writes on one bank");
        if (we2) check(we1, "write2 without write1");
        if (rd_en) begin
          check(int'(ra) < n, "read address out of range");
          if (int'(ra) < n) rd_cnt[ra]++;
          // expected read address: q for an even current symbol, H(q) for odd
          check(int'(ra) == ((sym % 2 == 0) ? t : href[t]), $sformatf("sym %0d t=%0d read address %0d", sym, t, ra));
        end
        if (we1) begin check(int'(wa1) < n && rd_cnt[wa1] == 1, "write1 before read"); if (int'(wa1) < n) wr_cnt[wa1]++; end
        if (we2) begin check(int'(wa2) < n && rd_cnt[wa2] == 1, "write2 before read"); if (int'(wa2) < n) wr_cnt[wa2]++; end
        prev_rd = rd_en;
        @(posedge clk);
        #1;
        if (int'(fifo_count) > maxfifo) maxfifo = int'(fifo_count);
        check(out_valid == (prev_rd && sym > 0), "out_valid does not follow the read");
        if (out_valid) check(out_sop == (t == 0), "out_sop");
        if (prev_rd) t++;
        @(negedge clk);
      end while (t < n);
      in_valid = 1'b0;
      // drain
      while (fifo_count != 0) begin
        #1;
        check(!in_ready && ev_drain, "in_ready high while draining");
        if (we1) begin if (int'(wa1) < n) wr_cnt[wa1]++; end
        if (we2) begin if (int'(wa2) < n) wr_cnt[wa2]++; end
        @(negedge clk);
      end
      for (int i = 0; i < n; i++) check(rd_cnt[i] == 1 && wr_cnt[i] == 1,
                                          $sformatf("sym %0d addr %0d read %0d written %0d times", sym, i, rd_cnt[i], wr_cnt[i]));
      if (sym % 2 == 1) check(maxfifo == 31, $sformatf("odd symbol FIFO peak %0d, expected 31", maxfifo));
      else              check(maxfifo == 1, $sformatf("even symbol FIFO peak %0d, expected 1", maxfifo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
