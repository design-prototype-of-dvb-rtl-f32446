// Testbench for symbol_buffer: for each mode it writes a whole symbol of
// random words, two per cycle where the two addresses lie in different banks,
// then reads every address back in a scrambled order while writing fresh
// words to addresses in other banks, checking each read one cycle later
// against a model array. It also checks that every bank (EL, OL, EH, OH) and
// the Mmax/2 boundary are used.
module symbol_buffer_tb;
  import dvb_deint_pkg::*;
  localparam int W = 6;

  logic         clk = 1'b0, rst_n = 1'b0;
  dvb_mode_e    mode = MODE_8K;
  logic         rd_en = 0, we1 = 0, we2 = 0;
  addr_t        ra = '0, wa1 = '0, wa2 = '0;
  logic [W-1:0] wd1 = '0, wd2 = '0, rdata;
  int checks = 0, failures = 0;
  logic [W-1:0] model [6048];
  int bank_hits [4];

  symbol_buffer #(.DATA_W(W)) dut (.clk, .rst_n, .mode, .rd_en, .ra, .we1, .wa1, .wd1,
                                   .we2, .wa2, .wd2, .rdata);

  always #5 clk = ~clk;

  // bank of an address, written out from the bank table
  function automatic int tb_bank(int a, int m);
    int half;
    half = (m == 0) ? 1024 : (m == 1) ? 2048 : 4096;
    return ((a >= half) ? 2 : 0) + (a % 2);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, a, b, exp_a, prev_a, wr_a;
    for (int m = 0; m < 3; m++) begin
      mode = dvb_mode_e'(m);
      n = (m == 0) ? 1512 : (m == 1) ? 3024 : 6048;
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      // fill: a and a+1 are in different banks (odd/even)
      a = 0;
      while (a < n) begin
        @(negedge clk);
        rd_en = 0;
        we1 = 1; wa1 = addr_t'(a); wd1 = W'($urandom); model[a] = wd1;
        we2 = (a + 1 < n); wa2 = addr_t'(a + 1); wd2 = W'($urandom);
        if (we2) model[a + 1] = wd2;
        a += 2;
      end
      @(negedge clk);
      we1 = 0; we2 = 0;
      // read back in scrambled order, writing elsewhere meanwhile
      exp_a = -1;
      for (int k = 0; k <= n; k++) begin
        @(negedge clk);
        // apply the model update of the previous cycle's write
        if (we1) model[wa1] = wd1;
        prev_a = exp_a;
        // the next request goes out before the previous read is checked, so
        // the read data must not depend on the current request
        a = (k * 1031) % n;        // 1031 is coprime with every Nmax
        rd_en = (k < n); ra = addr_t'(a); exp_a = a;
        #1;
        if (prev_a >= 0) begin
          checks++;
          if (rdata !== model[prev_a]) begin
            failures++;
            if (failures < 10) $display("mode %0d addr %0d: read %0h expected %0h", m, prev_a, rdata, model[prev_a]);
          end
        end
        if (k == n) begin rd_en = 0; we1 = 0; break; end
        b = tb_bank(a, m);
        bank_hits[b]++;
        // write to an address of another bank that was already read
        wr_a = (a + 1) % n;
        we1 = (tb_bank(wr_a, m) != b) && ($urandom_range(0, 1) == 1) && (k > 0);
        wa1 = addr_t'(wr_a); wd1 = W'($urandom);
        we2 = 0;
      end
      we1 = 0;
      // second read pass checks what was written during the first
      exp_a = -1;
      for (int k = 0; k <= n; k++) begin
        @(negedge clk);
        prev_a = exp_a;
        rd_en = (k < n); ra = addr_t'((k * 11) % n); exp_a = (k * 11) % n;
        #1;
        if (prev_a >= 0) begin
          checks++;
          if (rdata !== model[prev_a]) begin
            failures++;
            if (failures < 10) $display("mode %0d pass 2 addr %0d: read %0h expected %0h", m, prev_a, rdata, model[prev_a]);
          end
        end
        if (k == n) begin rd_en = 0; break; end
      end
    end
    for (int bb = 0; bb < 4; bb++) begin
      checks++;
      if (bank_hits[bb] == 0) begin failures++; $display("bank %0d never read", bb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
