# Two-level CAVLC residual decoder for H.264/AVC

CAVLC, H.264's variable-length residual coding, is hard to decode quickly.
Each codeword's length is known only after the codeword before it has been
decoded. The worst loop is the *level* symbols. The suffix length of each
level depends on the value of the level before it, so two level decoders
placed back to back form a long chain of arithmetic.

This decoder breaks that chain in two ways:

* A **suffixLength detector** predicts the next suffix length from the
  current `level_prefix` alone. It does not wait for the level value.
* A **delay balanced two-level decoder** decodes two levels per cycle. The
  second decoder is a reduced one. It handles only the common case, where the
  suffix size equals suffixLength and no levelCode correction applies. Its
  input is shifted by an amount known as soon as the first prefix is counted.
  When the common case does not hold, the second level is thrown away and
  decoded in the next cycle.

The run_before symbols are also decoded two per cycle. Each one moves its
coefficient straight to its final index in a 16-entry buffer. Stages with
nothing to decode are skipped.

The architecture follows the paper *"A 385 MHz 13.54 K Gates Delay Balanced
Two-Level CAVLC Decoder for Ultra HD H.264/AVC Video"*. The paper gives the
structure, the sizes and the algorithms. The code tables are those of the
H.264 standard. Interfaces, handshakes and other details are this
implementation's own; they are listed under
[Departures and own choices](#departures-and-own-choices).

## Decoding a block

A residual block has five kinds of syntax elements, decoded in this order:

| stage   | element                     | cycles                       |
|---------|-----------------------------|------------------------------|
| CTOKEN  | coeff_token → TotalCoeff (tc), TrailingOnes (t1) | 1       |
| T1      | t1 sign flags, all at once  | 1                            |
| LEVEL   | tc − t1 levels              | one per pair of levels, more when a pair is split |
| TZ      | total_zeros                 | 1                            |
| RUN     | run_before                  | one per two coefficients placed |
| DONE    | block presented on `out_coeff` | 1 (the next command is taken here) |

The decoder works on one stage per cycle. The controller feeds the 32-bit
bitstream window only to the active unit; every idle unit sees zeros
(operand isolation, to save switching power). Four skips shorten a block:

| skip        | condition                     | effect |
|-------------|-------------------------------|--------|
| zero block  | tc = 0                        | CTOKEN → DONE |
| level       | tc = t1                       | LEVEL skipped |
| total_zeros | tc = maxNumCoeff (16, 15 or 4) | TZ and RUN skipped |
| run         | total_zeros = 0, or tc = 1    | RUN skipped; with tc = 1 the one coefficient is moved in the TZ cycle |

With a steady bitstream, a block costs 1 + 1 + (level cycles) + 1 + (run
cycles) + 1 cycles. The DONE cycle overlaps with taking the next command. A
stage waits while the window is not full.

### Worked example

The bits `0000100 0 1 1 1 0010 111 10 1 1 01` decode as follows (nC = 0):

1. coeff_token gives tc = 5, t1 = 3.
2. The signs are +, −, −.
3. The levels are +1 and +3, decoded as one pair in one cycle.
4. total_zeros = 3.
5. The runs are 1, 0, 0 and 1.

The block comes out as `0 3 0 1 −1 −1 0 1 0 …`. The end-to-end testbench
decodes this block first.

## The two-level decoder (`dbtld`)

**Level 1** is a complete H.264 level decoder. `level_prefix` is the count of
leading zeros, from 0 to 15. The suffix size is 4 when prefix = 14 and
suffixLength = 0, 12 when prefix = 15, and suffixLength otherwise. Then:

    levelCode = (prefix << suffixLength) + suffix
              (+15 if prefix = 15 and suffixLength = 0)
              (+2  for the block's first level when t1 < 3)
    level     = even levelCode: (levelCode + 2) / 2
                odd  levelCode: −(levelCode + 1) / 2

**The suffixLength detector** (`suffix_length_det`) gives the suffixLength
after level 1 straight from the prefix:

    suffixLength 0 : next = 1 + MSD_1,  MSD_1 = (first && prefix > 3) || prefix > 5
    suffixLength ≥1: next = min(6, suffixLength + MSD_2),
                     MSD_2 = (first && suffixLength == 1 && prefix > 1) || prefix > 2

Here `first` means "the block's first level, and t1 < 3". The testbench
checks this rule exhaustively against the standard's rule, which needs the
level value (|level| > 3 << (suffixLength − 1)). The two agree for every
suffixLength, prefix and suffix.

**Level 2** takes the window shifted by `prefix1 + 1 + suffixLength`, which
is level 1's length in the common case. The shift therefore waits only for
the leading-zero count, not for the suffix-size logic. Level 2 reads a
suffix as wide as the detector's output. It applies neither levelCode
correction: the +2 belongs only to the block's first level, and the +15
only to suffixLength 0, which never occurs after a first level. The second
suffixLength detector then gives the suffixLength for the next cycle.

**Level 2 is discarded** when any of these holds:

* Level 1 was an escape code (prefix 15, or prefix 14 with suffixLength 0).
  Its true length then differs from the shift that was used.
* Level 2 has prefix 15, which needs a 12-bit suffix.
* The two codewords together exceed the 32-bit window.
* Fewer than two levels remain.

A discarded level is decoded as level 1 in the next cycle. Levels are
written to buffer indices tc−1−t1 downwards, since they arrive highest
frequency first.

## Residual block reconstruction (`run_before_dec`, `output_buffer`)

After the levels, the buffer holds the tc nonzero coefficients at indices 0
to tc−1 in scan order. Two counters drive the moves:

* `coeffsLeft` (cl) starts at tc.
* `zerosLeft` (zl) starts at total_zeros.

Each RUN cycle does the following:

* Coefficient A, at index cl−1, moves to index **cl + zl − 1**. Unless A is
  the last coefficient, its run_before `rb1` is decoded with the table for
  zl, and zl becomes zl − rb1.
* If zeros remain, coefficient B, at index cl−2, moves to cl − 2 + zl.
  Unless B is the last coefficient, `rb2` is decoded from the bits after
  `rb1`, with the table for the new zl.
* A move copies the value and clears its source. Sources are cleared before
  destinations are written, so B may land where A just left.

The block is finished when zl reaches 0, since the remaining coefficients are
already in place, or when no coefficient is left. The last coefficient takes
all the remaining zeros without a codeword.

Example: coefficients `4 3 2 −2 −1 1`, total_zeros = 3, runs 1, 1, 1.

* Cycle 1 moves 1 → 8 and −1 → 6.
* Cycle 2 moves −2 → 4 and stops, because zl = 0.

## Bitstream fetcher

The fetcher holds two 32-bit words and a 5-bit bit pointer. The window is
`({w0,w1} << ptr)[63:32]`, a combinational barrel shifter with no register
after it. The active unit reports how many bits it used, from 0 to 32. When
the pointer passes the end of w0, w1 moves into w0 and a new word is loaded.
One word per cycle is always enough. The window is valid only while both
words are loaded.

## Interfaces (`cavlc_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `bs_data`, `bs_valid`, `bs_ready` | in/in/out | 32/1/1 | bitstream words, first bit in MSB, valid/ready |
| `blk_valid`, `blk_ready` | in/out | 1 | one command per block, valid/ready |
| `blk_na`, `blk_nb`, `blk_avail_a`, `blk_avail_b` | in | 5,5,1,1 | neighbour TotalCoeffs and availability; nC = (nA+nB+1)>>1, or the available one, or 0 |
| `blk_chroma_dc` | in | 1 | 2×2 chroma DC block (nC = −1, maxNumCoeff 4) |
| `blk_max_coeff` | in | 5 | maxNumCoeff, 16 or 15, for other blocks |
| `out_valid` | out | 1 | one-cycle pulse in DONE |
| `out_coeff` | out | 16 × 13 signed | block in scan order; a 15-coefficient block uses indices 0..14 |
| `out_total_coeff` | out | 5 | TotalCoeff, for the neighbours' nC |
| `err` | out | 1 | sticky: no table entry matched, or level_prefix > 15 |

The bitstream must hold the blocks' residual codewords back to back. Any
other syntax has to be removed by the parser in front of the decoder. Pad the
stream with one extra word after the last block, so that its window fills.

## Files

| file | content |
|------|---------|
| `rtl/cavlc_pkg.sv` | sizes (32-bit window, 13-bit coefficients, 16 entries), types, H.264 code tables as `{length, code}` functions |
| `rtl/cavlc_decoder.sv` | top: stage controller, skips, operand isolation, wiring |
| `rtl/bitstream_fetcher.sv` | two-word fetcher with barrel shifter |
| `rtl/coeff_token_dec.sv` | nC and coeff_token tables (three VLC, one fixed-length, chroma DC) |
| `rtl/trailing_ones_dec.sv` | sign flags |
| `rtl/dbtld.sv`, `rtl/suffix_length_det.sv`, `rtl/leading_zero_cnt.sv` | two-level decoder |
| `rtl/total_zeros_dec.sv` | total_zeros tables |
| `rtl/run_before_dec.sv` | two run_before symbols and the moves |
| `rtl/output_buffer.sv` | 16 × 13-bit buffer with three write and two move ports |
| `tb/cavlc_ref_pkg.sv` | reference CAVLC encoder and cycle-count model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_cavlc_mb_rate.sv` measures macroblock throughput |

The code tables are written out from the H.264 standard (Tables 9-5, 9-7,
9-8, 9-9a, 9-10). Each decoder compares every entry of the selected table
with the head of the window, in parallel.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -Itb \
        rtl/cavlc_pkg.sv tb/cavlc_ref_pkg.sv tb/tb_cavlc_decoder.sv \
        --top-module tb_cavlc_decoder -Mdir obj && ./obj/Vtb_cavlc_decoder

Swap in another `tb_<module>.sv` to test one unit. Verilator finds the
modules under `rtl/` through `-Irtl`.

The end-to-end testbench works as follows:

* It generates 100 random 4:2:0 macroblocks (16 luma, 2 chroma DC and
  8 chroma AC blocks each), plus the worked example.
* The mix covers zero blocks, sparse and dense blocks, full blocks and
  escape-sized levels, with random nA/nB.
* A reference encoder in the testbench codes the blocks. The bitstream and
  the commands arrive with random gaps.
* Every block is compared with its original.
* The active cycles of every block must equal the count predicted from the
  two-per-cycle rules.
* Each mechanism must occur at least once: all four skips, paired and split
  levels (split by an escape and by the window length), prefix-14 and
  prefix-15 escapes, suffixLength 6, one and two run_before per cycle,
  stalls, gating, and every coeff_token table.

The testbench also prints the average cycles per macroblock. Its content is
much denser than real video, so that figure (about 220) is far above the
paper's 127 cycles/MB.

### Throughput (`tb_cavlc_mb_rate`)

This testbench decodes 200 intra macroblocks whose statistics are closer to
coded video. About 30 % of luma blocks are empty, and so are most chroma AC
blocks. The coefficients sit at low frequencies, and most levels are ±1 or ±2.
The stream and the commands never pause. On this content the decoder needs
**124.2 cycles per macroblock**.

At that rate, H.264 Level 5.1 (983 040 MB/s, 4096×2304) needs a 122 MHz
clock. The testbench checks this against the budget of 391 cycles/MB that
385 MHz leaves. It also prints the clock needed for Levels 1 to 5.1.

The content is synthetic. The figure shows the mechanism at work; it is not a
measurement on real sequences.

The unit testbenches cover these points:

* every code table entry;
* the suffixLength detector, exhaustively;
* random level pairs against the reference encoder;
* run_before sequences, checked against the true final positions;
* the buffer's move ordering;
* the fetcher's window against a bit-exact model.

## Departures and own choices

* **Second run_before lookup.** The paper combines two run_before tables
  using prediction. Here the second lookup is simply cascaded after the
  first within the cycle. The throughput is the same (two symbols per
  cycle), but the path is longer.
* **When level 2 is discarded.** The paper names only the window-overflow
  case. This design also discards level 2 after any level-1 escape, and
  when level 2 itself has prefix 15.
* **T1 stage.** It takes its cycle even when TrailingOnes is 0. The paper
  lists no skip for it.
* **One-coefficient blocks.** The move for tc = 1 is done in the
  total_zeros cycle.
* **Gating.** Idle units are gated by forcing their inputs to zero. No
  clocks are gated.
* **Not supported:**
  * 4:2:2 chroma DC (nC = −2);
  * level_prefix above 15, which High profiles allow (`err` is raised);
  * the neighbour bookkeeping that produces nA/nB;
  * slice and macroblock syntax parsing.
* **Own choices.** The handshakes, the reset and the error flag are this
  design's own.
* **Timing not checked.** The RTL has not been synthesized to a cell
  library. The paper's 385 MHz and 13.5 k gates are its own results and do
  not apply to this code.
