# FIR filter on Concatenation-Incrementation Carry Skip Adders

A direct-form FIR filter in which every adder, including the adders inside the
multipliers, is a **Concatenation-Incrementation Carry Skip Adder (CI-CSKA)**.
An ordinary carry skip adder still ripples the carry through each block before
the skip multiplexer can act. The CI-CSKA avoids this. All blocks add at the
same time with carry-in 0. A short chain of compound gates then works out each
block's real carry. A row of half adders finally adds that carry to the block's
provisional result. The critical path is the first ripple block, then one
compound gate per block, then the last incrementer.

The default configuration is a 4-tap filter. Samples and coefficients are 8-bit
unsigned and the output is 16 bits wide. Setting `TAPS = 8` gives the 8-tap
variant.

## The CI-CSKA adder (`ci_cska_adder`)

A `W`-bit addition is cut into stages of `STAGE_W` bits (default 2). The last
stage takes whatever bits are left, so any `W` works.

| stage | contents |
|---|---|
| 0 | one ripple carry adder (`ci_rca`) fed with the real `cin`. Its carry-out is the true carry `c0`. |
| j ≥ 1 | a ripple carry adder with carry-in **0** → intermediate sum `s_j` and carry `C_j`; skip logic (`ci_skip_logic`); an incrementer (`ci_incrementer`) |

For stage j:

* The skip logic forms the stage carry
  `c_j = C_j | (&s_j & c_{j-1})`.
  An incoming carry can leave the stage only if the intermediate sum is all
  ones. `C_j` and `&s_j` are never both 1, so the OR is exact.
* The incrementer adds `c_{j-1}` to `s_j` through a half-adder chain. This
  gives the stage's final sum bits. The chain's own overflow is dropped,
  because the skip logic already provides the carry.

Because every ripple adder starts at once, the only serial path is the
chain of skip gates.

### Carry polarity on the skip chain

The skip gates are inverting compound gates. Consecutive stages alternate
between them, so no inverter is needed between stages:

| stage j | gate | takes on the chain | gives on the chain |
|---|---|---|---|
| 1, 3, 5, … | AND-OR-INVERT | true `c_{j-1}` | `~c_j` |
| 2, 4, 6, … | OR-AND-INVERT | `~c_{j-1}` | true `c_j` |

The OAI form computes `~((~P | ~c) & ~C)`, which is the De Morgan dual of the
same function. Its inputs `~P` and `~C` come from inside the stage, off the
chain. The incrementer always needs the true carry. After an AOI stage, one
inverter outside the chain restores it. If the last stage is an AOI stage,
`cout` is inverted back the same way. This polarity bookkeeping is the main
thing to get right when you change `STAGE_W` or `W`. The generate loop derives
it from the stage index.

## Multiplier (`ci_cska_mult`)

This is an unsigned `W × W` array multiplier:

* Partial-product row `i` is `a & {W{b[i]}}`.
* A running `W+1`-bit sum moves down the rows. Each row's low bit becomes
  product bit `i`.
* The upper `W` bits are added to the next row by a `W`-bit CI-CSKA. That
  adder's carry-out becomes the new top bit.
* In all, the multiplier has `W-1` CI-CSKAs.

The default `W` is 8, the width the filter uses. `W = 4` gives the 4 × 4
multiplier.

## Filter (`ci_cska_fir`) and timing

```
x ──► [tap0] ─► [tap1] ─► [tap2] ─► [tap3]      fir_delay_line (registers)
        │ ×C0     │ ×C1     │ ×C2     │ ×C3     ci_cska_mult  (8x8 -> 16)
        └──► + ───┴──► + ───┴──► + ───┘         ci_cska_adder (16-bit chain)
                                  └──► y
```

* `fir_delay_line` is a shift register of `TAPS` sample registers. After the
  rising edge that loads sample x[n], `taps[k]` holds x[n-k].
* The products are summed by a linear chain of `TAPS-1` two-input, `Y_W`-bit
  CI-CSKAs.
* The path from the registers to `y` is combinational. `y` therefore shows
  `y[n] = Σ C_k·x[n-k]` right after the edge that loads x[n]. The filter
  accepts one sample per clock, with one clock of latency.
* `rst` is synchronous and active high. It clears the delay line, so `y`
  becomes 0.
* **The output wraps modulo 2^Y_W.** With 4 taps of 8 × 8 bits, the exact sum
  needs 18 bits, but the default output is 16 bits wide. For exact results,
  set `Y_W = 2*DATA_W + $clog2(TAPS)`. The multiplier outputs are then
  zero-extended.

Example: with C = 1, 2, 3, 4 and the samples 16, 17, 17 fed after reset, the
output after the third sample is 1·17 + 2·17 + 3·16 = 99.

Ports of the top, `ci_cska_fir`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `rst` | in | 1 | synchronous reset of the delay line |
| `x` | in | `DATA_W` | input sample |
| `c` | in | `TAPS` × `DATA_W` (unpacked array) | coefficients C0…C(TAPS-1) |
| `y` | out | `Y_W` | filter output |

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `TAPS` | 4 | `ci_cska_fir`, `fir_delay_line` | number of taps (8 for the 8-tap variant) |
| `DATA_W` | 8 | `ci_cska_fir`, `fir_delay_line` | sample and coefficient width |
| `Y_W` | 16 | `ci_cska_fir` | output and accumulation width |
| `W` | 8 | `ci_cska_adder`, `ci_cska_mult` | operand width |
| `STAGE_W` | 2 | all CI-CSKA users | bits per adder stage |
| `M`, `OAI` | 2, 0 | `ci_rca`, `ci_incrementer`, `ci_skip_logic` | stage width; gate form |

The defaults live in `rtl/ci_cska_pkg.sv`.

## What is given and what was chosen here

These parts follow the CI-CSKA as it is defined:
* the adder's structure: carry-in 0 for every stage but the first, half-adder
  incrementers, and the skip carry formed from the intermediate sum, the
  block carry and the previous carry;
* the AOI/OAI alternation;
* using the CI-CSKA both in the multipliers and in the filter;
* the 4-tap (and 8-tap) direct form with 8-bit operands and a 16-bit output.

These are this design's own choices:
* **Stage size.** Stages are a fixed 2 bits. A variable stage size, or a
  parallel-prefix first stage, would shorten the delay further. Neither is
  built; `STAGE_W` is the only knob.
* **Multiplier arrangement.** A row-by-row array multiplier was chosen. Any
  arrangement of the partial products would fit the description equally well.
* **Number format.** Samples and coefficients are unsigned.
* **Reset and latency.** Reset is synchronous and clears the delay line. The
  newest sample is also registered, which gives one clock of latency.
* **Overflow.** A 16-bit output that wraps on overflow.
* **Adder tree.** A linear adder chain rather than a tree.
* **Gate modelling.** The compound gates are written as Boolean expressions.
  Whether they map to real AOI/OAI cells depends on the synthesis library. On
  an FPGA they become LUTs like the rest of the logic.

The conventional multiplexer-based carry skip adder, against which the
CI-CSKA is usually compared, is not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_ci_rca` | exhaustive, 2- and 5-bit |
| `tb_ci_incrementer` | exhaustive, 2- and 4-bit |
| `tb_ci_skip_logic` | both gate forms against `C | (&s & c)`, exhaustive |
| `tb_ci_cska_adder` | 8-bit exhaustive (2^17 cases); 5-bit exhaustive (uneven last stage); 16-bit random plus all-propagate cases |
| `tb_ci_cska_mult` | 8 × 8 and 4 × 4 exhaustive |
| `tb_fir_delay_line` | random stream against a history model, with a mid-stream reset |
| `tb_ci_cska_fir` | default parameters, end to end (details below) |
| `tb_fir_8tap` | `TAPS = 8`: impulse and random streams |

`tb_ci_cska_fir` runs the filter at its default parameters:
* an impulse, which checks the tap order and the one-clock latency;
* the sample stream above;
* about 2000 random samples with small and full-range coefficients.

It counts how often the output wrapped, how often reset was applied, and how
often a carry skipped a whole adder stage. If any of these never happened, it
counts a failure.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/ci_cska_pkg.sv \
    tb/tb_ci_cska_fir.sv --top-module tb_ci_cska_fir
./obj_dir/Vtb_ci_cska_fir
```

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. Every
testbench finishes in seconds.
