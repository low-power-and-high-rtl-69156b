# SIC reseeding test pattern generator for low-power scan BIST

In logic built-in self-test, a pseudo-random LFSR drives the circuit under test. Its patterns
are nearly uncorrelated: from one pattern to the next about half of the inputs toggle. That
toggling shows up as shift and capture power during test, and it can exceed what the circuit
sees in normal operation. This generator trades that randomness for structure:

* A **single input change (SIC) sequence** comes from an N-bit counter passed through a Gray
  encoder. Consecutive codes differ in exactly one bit.
* A **seed** is XORed onto that sequence. XOR with a constant vector keeps the one-bit-per-step
  property, so the patterns stay low-activity and move to another region of the input space.
* The seeds are **pre-selected test cubes**, for example from ATPG for the target circuit. Their
  don't-care (X) bits are filled by a fill rule: all zeros, all ones, or bits from a
  **bit-swapping LFSR**. Targeted seeds give the fault coverage that a pure low-transition
  sequence lacks.
* A new seed is taken every 2^M test clocks, at each rising edge of `NOR(C[M-1:0])`. Each seed
  therefore gives 2^M consecutive patterns that change one bit at a time.

The output is the pattern `SG = XF ^ GC`, one per test clock `tck`. It is meant to feed the
primary inputs and scan cells of a full-scan circuit under test.

```
            tck ──► n-bit counter C ──► Gray encoder ──► GC ─┐
                       │ C[M-1:0]                             │
                       ▼                                      ▼
                 NOR ─► seed_clk (tck/2^M)                   XOR ──► SG
                       │ seed_adv                             ▲
                       ▼                                      │
   seed cube store ─► X-fill ◄── bit-swapping LFSR            │
   (care mask, value)   └───────────── XF ────────────────────┘
```

## Timing of a pattern and of a reseed

Everything runs on the single clock `tck`; `rst_n` is an asynchronous active-low reset.

* After reset, `C = 0`, cube 0 is selected and the LFSR holds 1 (or whatever value is loaded
  through `lfsr_load`). The first pattern is `XF(cube 0) ^ 0`.
* While `run` is high, `C` increments on every `tck` edge. `GC = C ^ (C >> 1)`, so `SG` changes
  in exactly one bit per clock.
* When an edge takes `C[M-1:0]` back to zero, the same edge also moves the cube index to the
  next cube (wrapping after `num_seeds`) and steps the LFSR once. This is the edge at which
  `seed_clk = NOR(C[M-1:0])` rises. At that step `XF` changes, so several pattern bits can
  change together. That is the only place where the one-bit rule does not hold.
* So cube k is in use for counter values `k·2^M … k·2^M + 2^M − 1` in the first round. Later
  rounds go through the same cubes again, with new LFSR fill bits and a different part of the
  Gray sequence.
* `sg`, `gc`, `xf`, `c`, `lfsr_state`, `seed_clk` and `seed_idx` come from registers, directly or
  through combinational logic. They are
  stable from just after one `tck` edge until the next. When `run` is low, everything holds.

A gated seed clock of frequency `tck/2^M` is the textbook form of this block. This RTL keeps
one clock and uses `seed_adv` as a clock enable, asserted in the cycle whose closing edge makes
`C[M-1:0]` zero. The registers change on the same edge a gated clock would give them, and
there is no clock gating cell and no second clock domain. `seed_clk` is still brought out, for
observation or for a design that wants the real divided clock.

A concurrent assertion in the top checks the one-bit rule on every clock inside a seed. It
covers the clocks where no cube is written, the LFSR is not loaded and the fill rule does not
change.

## The seed: cubes, X-fill and the bit-swapping LFSR

A cube is a pair of N-bit words written through `cube_we/cube_waddr/cube_wcare/cube_wval`.
`care[i] = 1` means that bit i is specified and takes `val[i]`. `care[i] = 0` means "don't
care", and the bit is filled according to `fill_mode` (`sic_pkg::fill_mode_e`):

| `fill_mode` | X bits become | purpose |
|---|---|---|
| `FILL_ZERO` (0) | 0 | fewest ones, lowest activity for cubes with many X |
| `FILL_ONE` (1) | 1 | the complementary fill |
| `FILL_LFSR` (2) | the bit-swapping LFSR output `BF` | pseudo-random fill: extra faults detected by chance |

The store holds `SEED_DEPTH` cubes (default 16), and `num_seeds` (1…16; 0 acts as 1) sets how
many are used in turn. The store is a plain register array that is loaded before the test. A
production design could replace it with a ROM of the cubes computed for one circuit.

The **bit-swapping LFSR** (`bf_lfsr`) is a Fibonacci LFSR with a maximal-length polynomial. The
default for N = 50 is x^50+x^49+x^24+x^23+1, and `sic_pkg::lfsr_taps` holds a small table for
other widths. Its output exchanges neighbouring bits: when the last stage `state[N-1]` is 0,
bits (0,1), (2,3), … of `state[N-2:0]` are swapped. When it is 1, the state passes through.
With N = 50 the lower part has 49 bits, so bit 48 has no partner and is never swapped. The
swap makes neighbouring bits agree more often. In the switching-activity test it lowers the
transitions between consecutive patterns from about 0.50 to about 0.38 per bit.

## Choosing cubes

Inside one seed, the counter's low M bits run through all 2^M values. The Gray encoder maps
that onto all 2^M values of `GC[M-1:0]`, so **the low M pattern bits are exhaustive within
every seed**, whatever the cube says about them. The bits at M and above are
`XF[i] ^ GC[i]`, and `GC[i]` stays constant for the whole seed. For the s-th seed period
after reset (s = 0, 1, …), it equals the high bits of the Gray code of `s·2^M`. To apply a
wanted value `v` on the high bits in that period, store the cube value `v ^ Gray(s·2^M)` on
those bits. A cube generator that knows the
seed slot of each cube can therefore place care bits exactly. Care bits below M are redundant,
because every value of them appears anyway.

## Modules

| module | role |
|---|---|
| `sic_pkg` | fill-rule enum, default sizes, LFSR tap table |
| `sic_reseed_tpg` | top: wires the parts below together, SIC assertion |
| `sicg` | single input change generator: `sic_counter` + `gray_encoder` |
| `sic_counter` | N-bit up counter from zero, with a `c_next` look-ahead |
| `gray_encoder` | `GC[i] = C[i]^C[i+1]`, `GC[N-1] = C[N-1]` |
| `seed_clk_ctrl` | NOR of `C[M-1:0]` (`seed_clk`) and the reseed enable `seed_adv` |
| `bf_lfsr` | bit-swapping LFSR, steps once per seed, loadable |
| `xfill_seed_gen` | cube store, cube index, X-fill |
| `xor_array` | `SG = XF ^ GC` |

Parameters of the top (all have defaults):

| parameter | default | meaning |
|---|---|---|
| `N` | 50 | pattern width. 50 covers the widest benchmark the generator is aimed at (c3540, 50 inputs). |
| `M` | 4 | one seed per 2^M = 16 patterns; 1 ≤ M ≤ N |
| `SEED_DEPTH` | 16 | cubes held |

None of these values comes from the method itself, which leaves n and m open. With the
defaults, one round of cubes gives 256 patterns. The pattern counts reported for this
generator on the ISCAS'85/'89 circuits run from 6 to 187, so one round covers all of them.
Circuits narrower than N use the low bits of `SG`.

## How far it can be trusted, and where it departs from the method

What follows the method: the counter starting at zero, the Gray encoder equations, the NOR of
the low m count bits as the seed clock, the XOR array, the bit swap selected by a 0 in the
last LFSR bit, and zero fill and one fill of the don't-care bits.

Choices made in this design, where the method is silent:

* the widths N, M and the store depth, listed above;
* the clock enable in place of a gated seed clock;
* how the seed source is built. The method describes a bit-swapping LFSR as the seed
  generator, and also describes seeds as pre-selected cubes with X-filled don't-cares. Here
  both exist: the cubes are the seeds, and the LFSR is one of the fill rules;
* the LFSR form and polynomial, the pairing of the swapped bits, and the LFSR reset value of 1;
* the cube write port, `num_seeds`, the `run` enable and the asynchronous reset.

Not included: the circuit under test, the scan chains and any response compactor (MISR). These
surround the generator in a scan-BIST system but are not part of it. The seed cubes for a
given circuit must come from an ATPG run, and no such cubes are shipped.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against a model written
separately in the testbench and ends with `TB_RESULT checks=… failures=…`.

* `tb_sic_counter`, `tb_gray_encoder`, `tb_sicg`: counting, wrap after 2^N, Gray code, and the
  one-bit change on every step, including the wrap.
* `tb_seed_clk_ctrl`: exhaustive over the low bits, the next low bits and the enable.
* `tb_bf_lfsr`: 8- and 16-bit instances return to their start after exactly 255 and 65 535
  steps. The 50-bit instance follows its polynomial for 3000 steps. The swap is checked on
  every step, and both the swapped and unswapped cases occur.
* `tb_xfill_seed_gen`: every fill rule on every cube, index hold, advance and wrap.
* `tb_xor_array`: bitwise.
* `tb_sic_reseed_tpg`: the whole generator at default parameters against a cycle model, through
  two rounds of 16 cubes. It uses all three fill rules, changes the rule in the middle of a
  seed, uses 5 cubes instead of 16, and pauses `run` at random. It counts reseeds, index wraps,
  swap taken and not taken, pauses and single-change steps, and fails if any of these never
  happened. It also checks that the NOR output `seed_clk` rises exactly once per reseed, which
  is where a gated seed clock would have its edges.
* `tb_iscas_fault_coverage`: the generator at its defaults drives gate models of ISCAS'85
  c17 (5 inputs) and of ISCAS'89 s27 in full-scan form (7 inputs: 4 primary inputs and 3 scan
  cells). A single stuck-at fault simulator in the testbench detects all 34 c17 faults and all
  52 s27 faults, on nets and fanout branches. The first 8 cubes are chosen as described in
  "Choosing cubes", and coverage reaches 100% in fewer than 128 patterns (about 20 for c17,
  65 to 71 for s27).
* `tb_switching_activity`: 4096 patterns at N = 50. Transition density is transitions divided
  by (patterns × N). It measures about 0.50 for a plain LFSR, 0.38 for the bit-swapping LFSR
  and 0.049 for this generator (about 1 bit per step inside a seed, plus the reseed steps).

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sic_pkg.sv tb/tb_sic_reseed_tpg.sv \
          --top-module tb_sic_reseed_tpg -Mdir obj && obj/Vtb_sic_reseed_tpg
```

All testbenches finish in well under a second. The end-to-end test, the c17 test and the
switching-activity test all run with the top's default parameters.

## Changing it

* **Another width:** set `N`. If `sic_pkg::lfsr_taps` has no entry for that width, its fallback
  taps do not lock up from a non-zero state, but the sequence may not be maximal. Add a
  primitive polynomial for the width you use.
* **Longer or shorter SIC runs per seed:** set `M`.
* **Fixed cubes for one circuit:** replace the register array in `xfill_seed_gen` with a
  constant table and tie off the write port.
