# MDFE: a look-ahead, table-driven decision feedback equalizer

A magnetic-recording read channel has to recover one bit per clock from samples that are
smeared by inter-symbol interference (ISI). Earlier symbols leak into later ones (postcursor
ISI), and later symbols can leak into earlier ones (precursor ISI). This design splits the
problem in two:

* **A feed-forward equalizer (FFE)** is an 8-tap programmable FIR. It filters the 6-bit
  samples, which makes the channel response causal and removes the precursor ISI.
* **A feedback equalizer (FBE)** removes the postcursor ISI. It subtracts what the last
  twelve decided bits contribute to the current sample, then slices the result to the next
  decision.

The FBE contains no multipliers. The twelve past decisions address small look-up tables,
which software fills before the channel starts reading. Because each decision depends on the
previous one, the loop from "decision" to "table address" to "next decision" would normally
limit the clock rate. The FBE breaks that loop with a two-symbol look-ahead. The tables
already hold the answers for every value of the two decisions that are still being made.
Only a 2-to-1 multiplexer, one 8-bit adder and a sign test remain in the single-cycle loop.

Throughput is one decision per clock. A sample reaches the FBE ten clocks after it enters
the chip, and each decision leaves in the same cycle that its FE word arrives.

```
 pdata[5:0] ──► FFE (8-tap Booth/carry-save FIR) ──► FE[7:0] ──┐
 pdata_ack ──► BEGIN (10-clock delay) ──► Begin ─────────────┐ │
                                         test_fe ─► test mux ◄─┘
                                                      │
                                                      ▼
                               FBE (3-stage look-ahead tables) ──► ak
```

## Top level (`mdfe_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | symbol clock for both datapaths |
| `sclk` | in | 1 | load clock for both coefficient stores |
| `reset` | in | 1 | asynchronous reset of the FFE, active high |
| `reset_n` | in | 1 | asynchronous reset of the decision chain and of BEGIN, active low |
| `sreset_n` | in | 1 | asynchronous reset of the FBE load shifter, active low |
| `sdata`, `sdata_en` | in | 1, 1 | serial FFE coefficient load |
| `pdata` | in | 6 | signed input sample |
| `pdata_ack` | in | 1 | high while `pdata` carries valid samples |
| `ini` | in | 1 | serial FBE table data |
| `we_a_1` .. `we_a_4`, `we_b`, `we_c`, `we_d` | in | 1 each | write enables of the seven FBE tables |
| `test`, `test_fe` | in | 1, 8 | test mode: the FBE takes `test_fe` instead of the FFE output |
| `fe` | out | 8 | FFE output |
| `fbe_begin` | out | 1 | FBE active (the delayed `pdata_ack`) |
| `ak` | out | 1 | decision; 1 means a negative equalized sample |
| `q` | out | 10 | decision history, `q[0]` newest |
| `a_1` .. `a_4`, `b`, `c`, `d` | out | 8 each | current table outputs |
| `sum_1`, `sum_2`, `fb`, `sum`, `sum_7` | out | 8/1 | FBE intermediate sums |
| `over_pos`, `over_neg` | out | 1 each | slicer overflow flags |

All FBE internals are brought out, so a tester can watch every pipeline stage. The I/O pad
ring and the pin multiplexing of a packaged chip are not part of the RTL.

Shared widths and types live in `rtl/mdfe_pkg.sv`:

| Name | Value | Meaning |
|---|---|---|
| `W` | 8 | FBE word width |
| `NDEC` | 10 | decision chain length |
| `INIT_W` | 11 | FBE load word |
| `XW` | 6 | sample width |
| `CW` | 8 | coefficient width |
| `TAPS` | 8 | FFE taps |
| `RW` | 14 | FFE accumulator width |
| `BEGIN_DLY` | 10 | BEGIN delay |

The package also defines the struct `lut_word_t`, which bundles the seven table outputs, and
`lut_we_t`, which bundles their write enables.

## The feedback equalizer

### Which decisions feed which table

Take `a(n)` as the decision being made now. Its feedback value FB depends on
`a(n-1) .. a(n-12)`. These twelve bits are split across seven tables:

| Table | Count | Size | Decisions (distance from a(n)) | Address at stage 1 |
|---|---|---|---|---|
| A_1..A_4 | 4 | 4 x 8 | 1-4: two in the address, two in the choice of table | `{q[1], q[0]}` |
| B | 1 | 4 x 8 | 5-6 | `{q[3], q[2]}` |
| C | 1 | 8 x 8 | 7-9 | `q[6:4]` |
| D | 1 | 8 x 8 | 10-12 | `q[9:7]` |

`q` is the 10-bit decision chain in `lookup`. In every cycle, `ak` enters `q[0]` and the
older bits move up.

The decisions at distances 1 and 2 are not yet known when the tables are read. There is
therefore one A table for each of their four values:

| Table | a(n-2) | a(n-1) |
|---|---|---|
| A_1 | 0 | 0 |
| A_2 | 0 | 1 |
| A_3 | 1 | 0 |
| A_4 | 1 | 1 |

The correct feedback is

    FB(n) = A_{a(n-2),a(n-1)}[a(n-4),a(n-3)] + B[a(n-6),a(n-5)]
          + C[a(n-9),a(n-8),a(n-7)] + D[a(n-12),a(n-11),a(n-10)]      (mod 256)

Each table entry holds the summed postcursor terms that its decision bits cause, with the
sign chosen so that adding FB cancels them. The hardware only adds the entries. How decision
bits map to signal levels, and how tap weights are quantised, is up to the software that
computes the tables.

### Three stages, one loop

The decision `a(n)` is made in cycle n. Its tables are read two cycles earlier:

| Cycle | Known so far | Work |
|---|---|---|
| n-2 (`lookup`) | `a(n-3)` and older | Read all seven tables. The outputs are asynchronous. |
| n-1 (`fbe_pipe`) | `a(n-2)` is now `q[0]` | Register the tables (PIPELINE_1). `q[0]` picks (A_3, A_4) over (A_1, A_2). Form SUM_1 = A_lo + B + C + D and SUM_2 = A_hi + B + C + D. |
| n (`fbe_feedback`) | `a(n-1)` is now `q[0]` | Register SUM_1 and SUM_2 (PIPELINE_2). `q[0]` picks FB. Form SUM = FE + FB and slice it to `a(n)`. |

While one decision is in stage 3, the next is in stage 2 and the one after that in stage 1.
Each stage uses the newest bit of the same chain as its select. Only stage 3's
mux, adder and slicer lie in the one-cycle feedback path, from `q[0]` back to `ak`.

The PIPELINE registers and the tables have no reset. Their contents are meaningless until
three clocks after `Begin` rises. The chain itself is reset by `reset_n`.

### The slicer and overflow

All FBE arithmetic is 8-bit two's complement and wraps. The slicer looks at the signs of FE,
FB and SUM:

| Condition | Flag | Decision |
|---|---|---|
| FE ≥ 0, FB ≥ 0, SUM < 0 | `over_pos` | 0 |
| FE < 0, FB < 0, SUM ≥ 0 | `over_neg` | 1 |
| otherwise | | SUM[7] |

So the decision is always the sign of the true 9-bit sum, even when the 8-bit SUM has
wrapped. An assertion in `fbe_feedback` checks that the two flags are never set together.

Worked example, with every value read as an unsigned byte. The tables give
4 + 19 + 28 + 157 = 208, that is −48, so the decision is 1. For FE = 128 (−128) and
FB = 208 (−48), SUM wraps to 80 and `over_neg` forces the decision to 1.

### Idle behaviour (Begin low)

While `fbe_begin` is low, the decision is FE[7], with no table contribution. The FFE does
not gate its input with `pdata_ack`. If the sample source holds `pdata` at zero between
blocks, FE settles to zero and the chain fills with zeros. When data arrives, the FBE then
starts from an all-zero history, exactly as after reset.

### Loading the tables

`sft_11` is an 11-bit shift register on `sclk`, reset by `sreset_n`. Each `sclk` edge shifts
`ini` into bit 0, so a word is sent MSB first. The word holds:

* `[10:8]`: the table address. A 4-entry table uses `[9:8]`.
* `[7:0]`: the data.

After the 11th bit, raise the write enable of one table for one `sclk` edge. While that
enable is high, the table takes its address from the load word instead of the chain, so
loading should happen before operation. The four A tables share one address multiplexer.

## The feed-forward equalizer

### Datapath

`ffe_fir` is a transposed FIR. Every sample `x` goes to all eight taps at once:

* `booth_mult`: a radix-4 Booth multiplier. The 8-bit coefficient is the recoded operand,
  giving four digits in {−2..2}. The 6-bit sample is the selected operand. Three
  carry-save adders reduce the partial products to a sum vector and a carry vector. No
  carry is propagated.
* `fir_tap`: two more carry-save adders add that product into the (sum, carry) pair coming
  from the previous tap. Two 14-bit registers store the result.
* `ffe_vma`: the vector-merge adder. A carry-ripple adder split into 7-bit halves with one
  register between them turns the final pair into the 14-bit result `r`.
* The FE register keeps `r[13:6]`, the eight most significant bits.

The whole path stays in carry-save form until the merge adder. The longest combinational
path is therefore one Booth multiplier plus two carry-save stages, whatever the tap count.

### Latency and ordering

A sample taken at edge `k` is multiplied by C0 in the first tap. Its contribution leaves the
eighth tap after edge `k+7`. It is in `r` after edge `k+8` and in `fe` after edge `k+9`.
That makes ten register stages in all, and the BEGIN delay matches them:

    r(after edge n) = C0·x(n-8) + C1·x(n-7) + ... + C7·x(n-1)   (mod 2^14)
    FE              = r[13:6], one clock later

All values are signed. The 14-bit accumulation wraps, with no saturation.

### Loading the coefficients

`ffe_shift_reg` shifts `sdata` into an 11-bit register on each `sclk` edge while
`sdata_en` is high, MSB first. The word holds the tap number in `[10:8]` and the signed
coefficient in `[7:0]`. On the first `sclk` edge after `sdata_en` falls, `ffe_coef_ram`
stores the word. So one word is one `sdata_en` pulse of 11 clocks.

The store is eight 8-bit registers, read in parallel as C0..C7, and cleared by `reset`.
Writes are ignored while `pdata_ack` is high, so the filter cannot change in the middle of a
data block.

## Begin and the test path

`mdfe_begin` delays `pdata_ack` by ten clocks, the FFE latency. It is reset by `reset_n`.
`fbe_begin` therefore rises with the first FE word that was computed from valid samples. It
falls ten clocks after the data ends.

With `test` high, the FBE reads `test_fe` instead of `fe`. The FBE tables and the slicer can
then be exercised without any FFE coefficients.

## Clocks and resets

`clk` drives both datapaths, the decision chain and BEGIN. `sclk` drives only the two load
paths: the FBE shifter and table writes, and the FFE shifter and coefficient writes. The
testbenches run the two clocks in phase. If they are asynchronous in a real system, both
loads must finish while the datapath is idle.

| Reset | Polarity | Clears |
|---|---|---|
| `reset` | active high | FFE tap registers, merge adder, FE register, FFE shifter, coefficient store |
| `reset_n` | active low | decision chain, BEGIN |
| `sreset_n` | active low | FBE load shifter |

## Where this RTL departs from, or adds to, its source description

* **FFE filtering.** A published simulation run of the original FFE shows its output as the
  sum of all coefficients times a single delayed sample. That is not an FIR response to a
  changing input. This RTL implements the transposed FIR that the written description
  gives. For a constant input the two agree, and the testbenches check the published
  (r, FE) pairs that way: 1419/22, 13030/203, 3354/52, 129/2 and 16255/253.
* **Idle FBE.** The original describes the idle FBE as resetting itself, and implements
  that as passing FE[7] through. This RTL does the latter.
* **Own choices where the source is silent:**
  * serial bit order (MSB first);
  * FFE load word layout and its write strobe on the falling `sdata_en`;
  * the write lock during `pdata_ack`;
  * the coefficient store reset;
  * the two-half split of the merge adder;
  * plain sign extension in the Booth multiplier instead of a modified two's-complement
    encoding (the results are identical);
  * the active-high polarity of `reset`.
* **Small constant bits.** Bit 0 of every carry vector (`booth_mult.c`, `ffe_fir.d2`) is
  constant 0, because the carry is already shifted.
* **Not included.** The earlier FBE structures that the original compared against and
  rejected are not included. Neither are the pads.

## Verification

Every module has a self-checking testbench in `tb/` against a reference model that does not
reuse the RTL. The shared reference model is `tb/mdfe_ref_pkg.sv`:

* `fb_ref`: the feedback formula above;
* `decide_ref`: the slicer, using a wide adder;
* `ffe_ref`: the FIR sum.

| Testbench | What it shows |
|---|---|
| `tb_sft_11`, `tb_ffe_shift_reg` | serial order; the write strobe only on the falling enable |
| `tb_lut_ram`, `tb_lookup` | table writes and reads; all address mappings; chain shifting and reset |
| `tb_fbe_pipe` | stage 2 against the worked numeric cases |
| `tb_fbe_feedback` | the six typical cases: four look-ahead selections, positive and negative overflow; random cases |
| `tb_fbe` | the full FBE as a closed loop against the decision recursion, with random tables and FE |
| `tb_mdfe_begin` | the 10-clock delay and reset |
| `tb_booth_mult` | all 2^14 sample/coefficient pairs |
| `tb_fir_tap`, `tb_ffe_vma`, `tb_ffe_fir` | tap accumulation, the merge adder, FIR response and latency |
| `tb_ffe_coef_ram` | writes, parallel reads, reset, write lock |
| `tb_ffe` | FFE end to end: serial load, 10-clock latency, random data, the published constant-input pairs |
| `tb_mdfe_top` | the whole chip at its only size (below) |
| `tb_mdfe_system` | the chip-level timing sequence: a 16-sample block; Begin edges exactly 10 clocks after those of `pdata_ack`; FE, FB, SUM and `ak` checked every clock |

`tb_mdfe_top` takes the whole chip through a full operation:

1. Load all coefficients and tables serially.
2. Run two data blocks separated by an idle gap.
3. Switch to test mode.
4. Try a locked coefficient write.

It checks `fe`, `fbe_begin`, `ak`, `fb`, `sum` and both flags in every clock. It also counts
how often each mechanism occurs:

* each of the four look-ahead selections;
* each overflow direction;
* Begin edges;
* idle cycles;
* test-mode cycles;
* the locked write.

A mechanism that never occurs counts as a failure.

Every testbench ends with a line `TB_RESULT checks=N failures=M`. A watchdog ends a run that
hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_mdfe_top -y rtl -y tb +libext+.sv \
    rtl/mdfe_pkg.sv tb/mdfe_ref_pkg.sv tb/tb_mdfe_top.sv
./obj_dir/Vtb_mdfe_top
```

Replace the testbench name to run any other. Every testbench finishes in a few seconds.

## Files

* `rtl/mdfe_top.sv`: the chip.
* FBE:
  * `fbe.sv`
  * `sft_11.sv`
  * `lookup.sv` (chain and tables)
  * `lut_ram.sv` (one table)
  * `fbe_pipe.sv` (stage 2)
  * `fbe_feedback.sv` (stage 3 and slicer)
* FFE:
  * `ffe.sv`
  * `ffe_shift_reg.sv`
  * `ffe_coef_ram.sv`
  * `ffe_fir.sv`
  * `fir_tap.sv`
  * `booth_mult.sv`
  * `csa32.sv` (carry-save adder row)
  * `ffe_vma.sv`
* `mdfe_begin.sv`: the BEGIN delay.
* `mdfe_pkg.sv`: shared types and constants.
* `tb/`: one testbench per module and the reference package.
