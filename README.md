# Low-transition test patterns: an X-filled single-input-change generator with transition-density screening

Scan testing burns power when test patterns toggle many bits. A test pattern
toggles bits in two ways. Its bits change from one neighbour to the next as it
is shifted through a scan chain. Each bit position also changes from one
pattern to the next when the patterns are applied to a combinational circuit.
This design produces patterns that are low in both kinds of switching, and it
measures how much switching they have so that only adequate patterns are kept:

* a **single-input-change (SIC) generator**: consecutive patterns differ in
  exactly one bit. It is a binary counter passed through a Gray encoder and
  XORed with a seed. The seed comes from a test cube whose don't-care bits
  are filled with zeros, ones or the neighbouring value.
* a conventional **XOR LFSR** as a second pattern source, for comparison;
* a **transition-density meter**. For each pattern it gives the switching
  activity (SA, the number of neighbouring-bit changes) and the transition
  density TD = SA/N. It also counts the changes from the previous pattern and
  keeps totals over a whole sequence;
* a **pattern store** that keeps every pattern whose TD is at or below a
  limit.

At the default size of N = 5 bits, the 31 patterns of the LFSR sequence
(seed 11111) hold 64 neighbouring-bit transitions in total. The 32-pattern SIC
sequence from an all-don't-care cube changes one bit per clock, 31 changes in
all. These two numbers are the usual LFSR-versus-SIC comparison (a 51.6 %
saving), and the testbenches reproduce both. They measure different things,
though. The SIC patterns themselves still hold 63 neighbouring-bit
transitions; their saving is in pattern-to-pattern switching. The meter
reports both kinds for either source.

## Block structure

```
                    +------------------- tpg_td_top --------------------+
 src_sel,start,run  |  lfsr (shift_register inside) --+                 |
                    |                                 +-mux-> td_meter -+-> pattern_store
 cube, fill_mode ---|  sic_tpg ----------------------+        (sa_calc) |    (td <= td_limit)
                    |    nbit_counter -> gray_encoder --+               |
                    |    x_filler -> seed_generator ----XOR-> sg        |
                    +---------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/tpg_pkg.sv` | `fill_mode_t` enum, `TD_W` (width of TD values) |
| `rtl/shift_register.sv` | D1..Dn chain, Q1 in the MSB, parallel load |
| `rtl/lfsr.sv` | external-XOR LFSR on the shift register, taps Q3 and Q5 |
| `rtl/nbit_counter.sv` | N-bit up-counter with `count_next` |
| `rtl/gray_encoder.sv` | GC[i] = C[i] ^ C[i+1], GC[n-1] = C[n-1] |
| `rtl/x_filler.sv` | zero / one / adjacent fill of a test cube |
| `rtl/seed_generator.sv` | bit-swapping LFSR that holds and steps the seed |
| `rtl/sic_tpg.sv` | counter + Gray + seed, SG = X ^ GC |
| `rtl/sa_calc.sv` | SA, TD and 2·P1·(1−P1) of one pattern (combinational) |
| `rtl/td_meter.sv` | registered per-pattern values and sequence totals |
| `rtl/pattern_store.sv` | TD screening and a DEPTH-word buffer |
| `rtl/tpg_td_top.sv` | the whole flow |

Bit order is the same everywhere. A pattern's first bit (Q1, the first
flip-flop of the chain) is its MSB and its last bit (Qn) is its LSB, so
`%b` prints a pattern as Q1..Qn.

## Measuring switching activity from runs and end bits

`sa_calc` does not XOR neighbouring bits directly. Instead it uses the
runs-and-end-bits counting that the method is built on. Read the pattern
MSB-first as a row of runs: zero-runs and one-runs alternate. If the pattern
holds g runs of ones, then the row "gap, run, gap, run, ..., gap" has
c = 2g + 1 entries, counting empty gaps at the two ends. The row has r = 1
row. Every boundary between a run and a real, non-empty gap is one
transition. The two end gaps are empty exactly when the MSB or the LSB is 1.
That gives

```
SA = c − α·r,    α = 1 + LSB + MSB
     LSB MSB  α
      0   0   1      0110 : g=1, c=3, SA = 3−1 = 2
      0   1   2      0111 : g=1, c=3, SA = 3−2 = 1
      1   0   2
      1   1   3      1001 : g=2, c=5, SA = 5−3 = 2
```

In hardware, the block counts the ones and the rising run starts in one loop
over the bits. It takes α from the two end bits and subtracts. Then it
derives:

* `td = SA·10000/N`: TD in percent × 100, rounded down. For example,
  11 transitions in 16 bits gives 6875 (68.75 %).
* `td_prob = 2·ones·(N−ones)·10000/N²`: the probabilistic density
  2·P1·(1−P1), in the same units.

Both divisions are by constants of the parameter N.

`td_meter` registers these values for every pattern marked `valid`. It also
counts `hd`, the number of bits that changed since the previous valid
pattern. This is the column-wise (pattern-to-pattern) switching; for the
first pattern after a clear it is 0. The meter keeps four 32-bit totals:

| total | meaning |
|---|---|
| `total_intra` | sum of SA over the sequence (scan-shift switching) |
| `total_inter` | sum of `hd` over the sequence (pattern-to-pattern switching) |
| `total_ones` | average P1 = `total_ones / (N·n_patterns)` |
| `n_patterns` | number of patterns measured |

The LFSR sequence gives `total_intra` = 64. The SIC sequence gives
`total_inter` = 31.

## The SIC generator and its seed

`nbit_counter` counts once per enabled clock. `gray_encoder` turns the count
into a code in which consecutive words differ in one bit, including the wrap
from all ones to zero. The pattern is `sg = X ^ GC`. While the seed X is held,
XORing with it keeps the single-change property.

The seed path works as follows:

1. `start` applies `x_filler` to the cube (`cube_val`, and `cube_care` with
   1 = specified). It loads the result into `seed_generator` and clears the
   counter. The first pattern is then X itself.
2. `seed_generator` is an XOR LFSR whose **output** swaps the neighbouring
   pairs (Q1,Q2), (Q3,Q4), ... whenever the last bit Qn is 0. When Qn is 1 it
   passes the state unchanged. Qn itself is never swapped.
3. The seed advances once per counter period, so its clock is 2^N times
   slower than the test clock. The control is the NOR of the counter bits
   ANDed with the clock. Here it is written as a clock enable:
   `seed_step = en & ~|count_next`. The seed therefore changes on the same
   edge at which the counter returns to zero. Inside each block of 2^N
   patterns, consecutive patterns differ in one bit. At the block boundary
   the seed change can flip several bits.

Fill modes (`fill_mode_t`):

* `FILL_ZERO`: each X becomes 0.
* `FILL_ONE`: each X becomes 1.
* `FILL_ADJ`: each X copies the nearest specified bit before it, reading
  from Q1 towards Qn. X bits ahead of the first specified bit copy that bit.

An all-X cube gives the seed 00000 in every mode except `FILL_ONE`. An
all-zero seed never moves (an XOR LFSR locks at zero), so the output is the
plain Gray count 00000, 00001, 00011, 00010, ...

## The comparison LFSR

`lfsr` is the shift register with D1 driven by Q3 ^ Q5 ^ IN
(x^5 + x^3 + 1, external XOR), with output OP = Q5. From seed 11111 it runs
through all 31 non-zero states: 11111, 01111, 00111, 00011, 10001, ...,
00110, 10011, 11001, 11100, 11110, 11111. `TAPS` and `SEED` are parameters.
The default taps are maximal only for N = 5, so choose new taps if you change
N.

## Screening and the store

`pattern_store` writes a measured pattern to the next free word when
`td <= td_limit`; a lower TD means less switching. Otherwise it passes the
pattern over. When DEPTH (32) words are held, `full` is set and further
patterns are dropped. `rd_addr`/`rd_data` is an asynchronous read port.
`clr` (driven by the top's `start`) empties the store.

## Top-level interface and timing (`tpg_td_top`, N = 5, DEPTH = 32)

Controls:

* `rst_n`: synchronous, active low.
* `start` (one clock): reloads the LFSR with 11111 and the SIC seed from
  the filled cube, and clears the meter and the store.
* `run`: steps the source selected by `src_sel` (0 = LFSR, 1 = SIC) once
  per clock.

Outputs, in the order they become valid:

* `pattern`: valid in the same cycle, while `pattern_valid` is high.
* `sa`, `hd`, `td`, `td_prob`: the next cycle, with `meas_valid`. The
  running totals update at the same time.
* `saved` and `saved_count`: one cycle after that.
* `seed_step` marks the clocks on which the SIC seed advances, and
  `lfsr_op` is the LFSR's serial output.

The design has no gated clocks and no asynchronous logic. Every register
sits on `clk`.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. Each compares against models written
independently in the testbench:

* `tb_lfsr`: state table rows and period 31, 64 in-pattern transitions,
  random load/IN steps.
* `tb_sic_tpg`: the Gray start 00000/00001/00011/00010, 31 changes over 32
  patterns, all three fill modes, seed steps exactly every 32 patterns, and
  single-bit changes within a block.
* `tb_sa_calc`: the four worked examples, random patterns at N = 5, 16 and
  256, and an SA/TD table for N = 4, 8, 16, 32, 64, 128 and 256 (TD 50, 62.5,
  68.75, 75, 75, 74.21, 74.21 %). For each row it builds a pattern with the
  given end bits and SA.
* `tb_td_meter`, `tb_pattern_store`, `tb_shift_register`, `tb_nbit_counter`,
  `tb_gray_encoder`, `tb_x_filler`, `tb_seed_generator`: random stimulus
  against reference models.
* `tb_tpg_td_top` runs the top at its default parameters:
  - an LFSR sequence (total 64, all 31 patterns saved and read back);
  - an SIC zero-fill sequence (total 31, only TD ≤ 50 % saved);
  - two 70-pattern SIC runs with one fill and adjacent fill, which step the
    seed and overflow the store.

  It counts each mechanism (both sources, three fill modes, seed steps,
  saves, rejections, drops when full) and fails if any never happens.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
          rtl/tpg_pkg.sv tb/tb_tpg_td_top.sv --top-module tb_tpg_td_top -o sim
./obj_dir/sim
```

Every test finishes in well under a second.

## Interpretations and departures

* **Theorem arithmetic.** The four SA rules are given as `SA = c − α·r`
  with α = 1, 2, 2, 3 for the end-bit cases, checked against a few 4-bit
  examples. The reading c = 2g + 1, r = 1 is the one that makes all the
  examples come out; it is exact for every pattern.
* **LFSR taps.** The taps Q3 and Q5 were chosen because they reproduce the
  published LFSR sequence for N = 5. One row of that sequence (clock 29) and
  a separate 5-bit next-state table do not fit any XOR feedback and were not
  followed.
* **SIC sequence.** The published SIC column starts as the plain Gray count
  (seed 00000). Its last rows, at clocks 26 to 31, are the Gray count XORed
  with 00100: 10011, 10010, 10110, 10111, 10101, 10100. This design gives
  both parts: the first from an all-X cube, the second from the cube 00010,
  whose swapped seed output is X = 00100. `tb_sic_tpg` checks both. Where the second seed comes from in that column is not
  stated.
* **"Phase shifter".** The block labelled phase shifter after the counter is
  taken to be the Gray encoder. No separate phase-shifting network is built.
* **Seed generator.** The swap rule (swap neighbours when the last bit is 0)
  is as described. Applying it to the output rather than to the stored state
  is a choice made here. So is reusing the x^5 + x^3 + 1 taps, because the
  modified LFSR's own feedback is not specified.
* **Adjacent fill.** The rule for adjacent fill, and in particular for
  leading X bits, is this design's definition.
* **Choices made here.** The mode encoding, the TD units (percent × 100),
  the screening rule `td <= td_limit` as an input, the store depth of 32,
  and the 32-bit totals.
* **Not a gated clock.** The seed clock is an enable, not an AND-gated
  clock.
* **Average probability.** The published average-probability figures for
  the two generators (19 and 16.2) could not be tied to any definite
  quantity. The design exposes `total_ones`, from which the average
  probability of a 1 follows.

## Not included

* Applying the saved patterns to benchmark circuits, and measuring test time
  with an ATPG tool. That is a software flow.
* The test-time formula 0.5·(1 − TD) − 0.5·f. It mixes a ratio with a
  frequency and defines no hardware function.
* The 4-bit internal-XOR LFSR used as a worked example of row and column
  analysis. Its feedback polynomial is not known.
