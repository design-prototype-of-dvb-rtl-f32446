# DVB-T symbol deinterleaver on four single-port memory banks

A DVB-T receiver has to undo the symbol interleaver of the transmitter: the
words of one OFDM symbol (1512, 3024 or 6048 of them in 2k, 4k or 8k mode)
arrive in carrier order and must leave in the order given by the standard's
pseudo-random permutation H(q). A whole symbol has to be buffered. The
textbook solution uses two symbol memories in ping-pong, or one dual-port
memory. This design holds the symbol in one buffer built from four
**single-port** banks, and adds a 31-word FIFO. That saves about 30 % of the
area against the two usual solutions. Bank conflicts are rare, and the
FIFO absorbs the few that happen. A look-ahead address generator produces one
valid permutation address every cycle, so no lookup table and no extra buffer
is needed for the addresses.

The RTL is synthesizable SystemVerilog-2017. Every block has a self-checking
testbench. All three modes are verified end to end against an independent
reference model of the permutation.

## What goes in and what comes out

With `H` the DVB-T permutation and `in_s[q]` the q-th word of input symbol `s`:

| symbol `s` is | output word `q` of that symbol |
|---|---|
| even | `in_s[H(q)]` |
| odd  | `in_s[j]` where `H(j) = q` (the inverse permutation) |

Symbol `s` comes out while symbol `s+1` goes in, one output word for each input
word. Symbol parity counts from reset: the first symbol after reset is even.
That symbol produces no output because nothing precedes it. To flush the last
real symbol, feed one more symbol of any data.

## One buffer instead of two

Store an even symbol at addresses `q` and read it back at `H(q)`. Store an odd
symbol at `H(q)` and read it back at `q`. Then, while symbol `s+1` streams in,
its q-th word has exactly the address of the q-th word to read out of symbol
`s`:

* current symbol even: both use address `q`;
* current symbol odd: both use address `H(q)`.

So each incoming word first **reads** the old word at its address, and is then
**written** to that same address. One buffer of Nmax words is enough, provided
that the write to an address always comes after the read of that address.

## Why four banks, and what the FIFO is for

A single-port memory cannot read and write in the same cycle. The buffer is
therefore split by the address `a` (see `bank_of` / `bank_word` in
`dvb_deint_pkg`):

| bank | holds | words |
|---|---|---|
| EL | even `a` below Mmax/2 | 2048 |
| OL | odd `a` below Mmax/2 | 2048 |
| EH | even `a` from Mmax/2 up | 1024 |
| OH | odd `a` from Mmax/2 up | 1024 |

Mmax is 2048, 4096 or 8192. The word inside a bank is `(a mod Mmax/2) >> 1`.
Together the banks hold 6144 words, just above the 6048 that 8k mode needs.

* **Even current symbol.** Addresses are sequential, so the read at `q` and
  the write-back at `q-1` always fall in different banks. There is never a
  conflict, and the FIFO holds exactly one word.
* **Odd current symbol.** Addresses follow `H(q)`. The top address bit is the
  generator's toggle bit, which alternates from one raw index to the next, so
  two high-half accesses never follow each other. Two low-half accesses can,
  and then the read and the write-back may hit the same bank. The read always
  wins. The word waits in the FIFO, and the controller catches up later by
  writing **two** FIFO words in one cycle whenever three different banks are
  free.

Per cycle, `deint_ctrl` decides:

```
rd  = in_valid && in_ready                         read ra = addr(qR), push word
w1  = FIFO not empty && bank(wa1) != bank(ra)      write oldest word to addr(qW)
w2  = w1 && FIFO >= 2 && bank(wa2) not in {bank(ra), bank(wa1)}
                                                   write next word to addr(qW+1)
qR += rd;  qW += w1 + w2
when qR == qW == Nmax: symbol ends, counters and generators restart, parity flips
```

`addr(q)` is `q` in an even symbol and `H(q)` in an odd one. A word written at
`addr(qW)` always comes from the FIFO, which holds only words whose address has
already been read, so no write can overtake its read. Assertions check this, and
also check that no two requests of a cycle share a bank.

The FIFO needs 15, 12 and 31 words in 2k, 4k and 8k mode when words arrive
back to back. The testbench measures exactly these peaks, and the FIFO is 31
deep. For the 8k odd symbol, the testbenches compare cycles 0-3 and 28-33 with
a worked example of the schedule. At cycle 32, for instance, the design reads
4408 (bank EH) and writes 216 (EL) and 4643 (OH) in the same cycle.

## The permutation address generators

DVB-T defines H(q) with three parts:

* a 10-, 11- or 12-bit LFSR R';
* a fixed wire permutation of the LFSR bits;
* a toggle bit, placed on top as the address MSB.

It runs through Mmax raw candidates and keeps those below Nmax (see
`dvb_deint_pkg`: `lfsr_step`, `wire_perm`, `h_step`, `h_cand`). In 8k mode
2144 of the 8192 candidates are out of range. A plain generator therefore
stalls on those cycles.

* **`hq_gen` (read side, one address per cycle).** An out-of-range candidate
  always has the toggle bit set. The following candidate has it clear and is
  always in range. So the generator evaluates two candidates, A1 at the
  current raw index and A2 one LFSR step later. It outputs A1 if A1 is in
  range, otherwise A2, and advances one or two raw steps.
* **`hq2_gen` (write side, two addresses per cycle).** Its state is the raw
  index of H(q), which is always in range. H(q+1) is the next candidate if
  that one is valid, otherwise the one after it. For a double advance, the
  next state is the first valid candidate after the one used for H(q+1). So
  the generator looks up to four LFSR steps ahead, with three range
  comparisons. This is one more candidate than a three-candidate selection
  needs for the two outputs. It is needed because, after two addresses have
  been taken, the third candidate may itself be out of range.

The raw generator does not start as a plain LFSR: R'0 = R'1 = 0 and R'2 = 1. A
saturating 2-bit phase in `h_state_t` supplies these start values. The LFSR
taps and wire permutations are those of ETSI EN 300 744. For example,
H(0..3) = 0, 4096, 128, 4128 in 8k mode.

## Interface and timing of the top, `dvb_symbol_deinterleaver`

| port | dir | meaning |
|---|---|---|
| `mode` | in | `MODE_2K`, `MODE_4K`, `MODE_8K` (`dvb_mode_e`); static, change it only under reset |
| `in_valid`, `in_data`, `in_ready` | in/in/out | input word, valid/ready handshake |
| `out_valid`, `out_data` | out | deinterleaved word of the previous symbol |
| `out_sop`, `out_sym_odd` | out | first word of an output symbol; parity of that symbol |
| `fifo_level` | out | FIFO occupancy |
| `ev_conflict`, `ev_dual_write`, `ev_skip`, `ev_drain`, `ev_full` | out | one-cycle event pulses for monitoring |

Parameters: `DATA_W = 6` (word width), `FIFO_DEPTH = 31`.

* The output word appears exactly one cycle after the input word that fetched
  it: the SRAM read latency.
* Inside a symbol, one word is accepted per cycle.
* After the last word of a symbol, `in_ready` stays low until the FIFO has
  drained: 1 cycle after an even symbol, 2 to 7 after an odd one. This
  fits in the spare carrier slots that a DVB-T symbol leaves anyway
  (Mmax - Nmax).
* Idle input cycles are allowed at any time.
* If the FIFO is made smaller than the peak it needs, `in_ready` also drops
  inside a symbol. The output stays correct.

## Files

| file | contents |
|---|---|
| `rtl/dvb_deint_pkg.sv` | modes, bank names, permutation and bank-mapping functions |
| `rtl/q_gen.sv` | natural-order index counter (steps 0/1/2) |
| `rtl/hq_gen.sv` | look-ahead permutation generator, one address per cycle |
| `rtl/hq2_gen.sv` | permutation generator, two consecutive addresses per cycle |
| `rtl/sp_sram.sv` | single-port synchronous RAM bank |
| `rtl/symbol_buffer.sv` | the four banks with address mapping and request routing |
| `rtl/conflict_fifo.sv` | 1-push / 2-pop FIFO with two visible head words |
| `rtl/deint_ctrl.sv` | access scheduling, symbol parity, output framing |
| `rtl/dvb_symbol_deinterleaver.sv` | top |
| `tb/dvb_ref_pkg.sv` | reference permutation, written independently of the RTL |
| `tb/*_tb.sv` | one testbench per module, plus two end-to-end benches |

Size after generic synthesis: 37,050 memory bits (36,864 in the banks, 186 in
the FIFO), 78 flip-flops and about 490 word-level cells.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the bench hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dvb_deint_pkg.sv tb/dvb_ref_pkg.sv \
  tb/dvb_symbol_deinterleaver_tb.sv --top-module dvb_symbol_deinterleaver_tb
./obj_dir/Vdvb_symbol_deinterleaver_tb
```

List the two packages first; Verilator finds the other modules through `-I`.
`-Wno-fatal` keeps lint warnings (unused bits and the like) from stopping the
build. Swap the testbench file and top name to run another bench.

* `dvb_symbol_deinterleaver_tb` runs the top at its default parameters. For
  each mode it sends six symbols back to back, then six with random gaps, and
  checks every output word. It also checks:
  * the first output words of 8k symbols against hand-worked positions (even
    symbol: inputs 0, 4096, 128, 4128, and 1712 ... 2147 at words 28-33; odd
    symbol: inputs 0, 6, 1624, 4040);
  * the one-cycle latency, `out_sop` and `out_sym_odd`;
  * no stall inside a symbol;
  * the FIFO peaks 15/12/31;
  * that conflicts, double writes, look-ahead selections, drains and both
    parities all occurred.

  It takes a few seconds.
* `dvb_symbol_deinterleaver_smallfifo_tb` repeats this with an 8-word FIFO. It
  checks that the full-FIFO hold-off happens and that the data stays correct.
* `deint_ctrl_tb` checks the controller's schedule. It verifies the 8k example
  cycles, the bank exclusivity, and that every address is read once and
  written once per symbol, in that order.

## Where this design makes its own choices

The bank split and bank sizes, the 31-word FIFO, the per-cycle access rules
(read first, up to two write-backs to idle banks) and the look-ahead address
generator follow the published multibank architecture that this RTL
implements. The points below are this design's own:

* **Word width.** `DATA_W = 6` is one 64-QAM word of hard decisions. For soft
  decisions (3 to 4 bits per bit is common), widen it; nothing else changes.
* **Handshake, reset and parity.** The valid/ready input, the valid-only
  output, the asynchronous active-low reset, the suppressed first output
  symbol and "first symbol is even" are this design's choices. In a real
  receiver the parity should come from the frame synchronisation: add a
  parity input to `deint_ctrl` in place of its free-running toggle.
* **Controller details.** The drain at the end of each symbol, and the
  full-FIFO hold-off, are additions that make the block safe for arbitrary
  input timing. With back-to-back input and a 31-word FIFO the hold-off never
  triggers.
* **`hq2_gen` look-ahead.** It looks four raw steps ahead rather than two; see
  above.
* **Memories.** The banks are plain arrays with a one-cycle registered read,
  to be mapped onto single-port SRAM macros. They are not reset, and the
  first symbol's output is suppressed, so uninitialised contents are never
  output.
* **Timing.** No timing constraints have been applied. The architecture is
  meant to run at about 100 MHz in a 0.18 µm process, far above the DVB-T
  sample rate. The longest path here is the four-step look-ahead in
  `hq2_gen`, followed by the bank comparisons in `deint_ctrl`.
* **Not built.** The double-buffer and dual-port buffer alternatives are not
  part of this design. Neither is the non-look-ahead address generator, which
  would need an input buffer of up to 2144 words.
