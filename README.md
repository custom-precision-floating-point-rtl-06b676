# BAPS digital predistorter in custom-precision floating point

A power amplifier distorts a signal once it is driven close to saturation. A
digital predistorter (DPD) sits in front of it and applies roughly the inverse
nonlinearity, so that the cascade behaves linearly. This RTL implements a
predistorter based on **basis-propagating selection (BAPS)**. It works on a
floating-point format whose exponent and mantissa widths are parameters, so the
same design runs at IEEE single precision (8, 23) or at narrower formats such as
(5, 7).

The architecture follows the BAPS hardware described in the Master's thesis
*Custom Precision Floating-Point Implementation of BAPS Algorithm for
Hardware-Efficient Digital Predistortion* (Chalmers, 2025). The thesis built its
design from vendor floating-point IP. Here the arithmetic units are written
from scratch, and the cycle-level schedule, handshakes and reset behaviour are
this design's own (listed under [Departures and own choices](#departures-and-own-choices)).

## The BAPS model

For each complex input sample x(n), the model builds R basis functions one
after another:

* phi_1(n) = x(n)
* **Type I** (delay): phi_r = q^-m phi_i, i.e. phi_i of m samples ago
* **Type II** (nonlinear): phi_r = phi_i * phi_j * conj(phi_k), where i, j, k < r

The output is the weighted sum y(n) = sum_r theta_r * phi_r(n). Two things are
found offline: the sequence of operations (by a greedy search) and the
coefficients theta (by least squares). The hardware therefore only needs to
evaluate a fixed recipe. Each Type II step reuses basis functions that already
exist, so a high-order Volterra-like term costs only two complex multiplies.

Four recipes are built in (package `baps_pkg`), chosen at elaboration time by
the parameter `CFG`. In all of them the Type II operations take the form
phi_i * |phi_j|^2.

| r  | BAPS8/12-mem1       | BAPS8/12-mem5       |
|----|---------------------|---------------------|
| 1  | x(n)                | x(n)                |
| 2  | phi1 \|phi1\|^2     | phi1 \|phi1\|^2     |
| 3  | q^-1 phi1           | q^-4 phi1           |
| 4  | q^-1 phi3           | phi2 \|phi1\|^2     |
| 5  | phi2 \|phi3\|^2     | q^-1 phi2           |
| 6  | q^-1 phi4           | phi3 \|phi1\|^2     |
| 7  | phi6 \|phi1\|^2     | q^-2 phi2           |
| 8  | phi2 \|phi1\|^2     | q^-1 phi5           |
| 9  | q^-1 phi6           | q^-1 phi1           |
| 10 | phi1 \|phi3\|^2     | q^-3 phi9           |
| 11 | phi10 \|phi1\|^2    | phi10 \|phi1\|^2    |
| 12 | phi1 \|phi2\|^2     | phi9 \|phi9\|^2     |

BAPS8 uses rows 1-8 and BAPS12 uses all twelve rows. The default configuration
is BAPS8-mem1.

## Architecture

```
            x_valid/x_ready                      phi_valid (1 cycle)
 x(n) ───────────────► basis_builder ──── phi_1..phi_R ────► dpd_engine ───► y(n), y_valid
                        │  FSM, one step per phi_r             R x fp_cmul (theta_r*phi_r)
                        │  type1_delay per delay op            tree of R-1 complex adders
                        │  one type2_unit (+|phi|^2 cache)     coefficient register file
                        └─────────────────────────────────── baps_dpd_top (wrapper)
```

### Basis-function builder (`basis_builder`): the sequential part

The builder is a finite-state machine with four states: idle, step, wait and
done. For each sample it walks r = 1..R and runs the operation that defines
phi_r:

| step kind                         | cycles |
|-----------------------------------|--------|
| phi_r = x(n)                      | 1      |
| Type I delay                      | 1      |
| Type II, \|phi_j\|^2 already cached | 2    |
| Type II, \|phi_j\|^2 computed     | 3      |

Then comes one **done** cycle. In the done cycle:

* `phi_valid` is high.
* The complete phi set is on the outputs, and the engine captures it.
* Every delay line shifts in the current value of its source.
* `x_ready` is high, so a waiting sample is accepted without going back to idle.

**Type I delays** are shift registers (`type1_delay`), one per delay operation.
Each has depth m and shifts once per sample, so its last word is phi_i(n-m).
A delay of a delay (for example q^-1 phi3 with phi3 = q^-1 phi1) needs no special
handling, because each line stores its own source's history. Delay lines start
at zero after reset, so the signal counts as zero before the first sample.

**Type II** uses one shared `type2_unit`. That unit has a single complex
multiplier, which it uses twice: first p = phi_j * conj(phi_k), then
y = phi_i * p. For j = k, p is |phi_j|^2, and its imaginary part is exactly
zero because the two cross products round the same way. The builder keeps
a cache of these magnitude-squared values, indexed by j. The cache is cleared
at every new sample. On a hit, the first multiply is skipped. For example,
BAPS8-mem1 needs |phi1|^2 three times per sample but computes it once.

The number of cycles per sample follows from the table:

| configuration | builder steps | cycles per sample (back-to-back) | x handshake to y_valid |
|---------------|---------------|----------------------------------|------------------------|
| BAPS8-mem1    | 14            | 15                               | 19                     |
| BAPS8-mem5    | 12            | 13                               | 17                     |
| BAPS12-mem1   | 23            | 24                               | 29                     |
| BAPS12-mem5   | 19            | 20                               | 25                     |

### DPD engine (`dpd_engine`): the parallel part

The engine has R complex multipliers, which form all theta_r * phi_r products at
once. A balanced tree of R-1 complex adders sums them. Each complex adder is two
real adders. R = 8 gives 8 multipliers and 7 adders. R = 12 gives 12 and 11,
with the tree reducing 12 → 6 → 3 → 2 → 1 terms. When a level has an odd
number of terms, the last term moves up unchanged. The summation order is
fixed, and the testbench reference uses the same order. This matters because
floating-point addition is not associative.

The products and every tree level are registered. The engine therefore accepts
one phi set per cycle, with a latency of 1 + ceil(log2 R) cycles (4 for R = 8,
5 for R = 12).

The coefficients theta_r sit in a register file inside the engine. It is
written one word per cycle through the coefficient port and reset to zero.

### Wrapper (`baps_dpd_top`): overlapping the two parts

The builder hands sample n to the engine in the done cycle. In that same cycle
it can accept x(n+1). So while the engine is still summing sample n, the
builder is already working on sample n+1. The engine never stalls, so
throughput is set by the builder alone. For BAPS8-mem1 that is one sample every
15 cycles: 13.3 Msample/s at a 200 MHz clock.

## Number format and arithmetic

A word is `{sign, EXP_W exponent bits, MAN_W fraction bits}`. It uses the
IEEE-754 layout with bias 2^(EXP_W-1)-1 and a hidden leading one. Complex values
are two such words, carried on separate `_re`/`_im` ports.

* `fp_mult` multiplies the two significands exactly, normalises the result by
  at most one bit, and rounds.
* `fp_addsub` aligns the smaller operand into a window MAN_W+3 bits wider than
  the significand. Bits shifted out beyond the window are folded into a sticky
  bit. It then adds or subtracts, normalises with a leading-zero count, and
  rounds. The extra bits make the rounding exact: a large cancellation can only
  happen when the shift is 0 or 1, and those shifts lose nothing.
* `fp_cmul` computes a complex product from four real products and two real
  sums: re = ar*br - ai*bi and im = ar*bi + ai*br. Conjugating the second
  operand is a sign-bit flip.

Every result is rounded to nearest, ties to even. Range handling is simpler than
full IEEE-754 and is an **own choice**:

* A subnormal input reads as zero.
* A result whose rounded exponent falls below the normal range becomes a signed
  zero (flush to zero).
* Overflow gives a signed infinity.
* NaN inputs, inf*0 and inf-inf give the quiet NaN `{s, 1..1, 10..0}`.

For predistortion signals, whose amplitude stays well inside the range of even
a 5-bit exponent, these cases do not arise in normal operation.

All arithmetic units are combinational. The builder's critical path is
therefore a complex multiply (a multiplier followed by an adder). The engine's
critical path is a complex multiply, or one adder level.

## Interface of `baps_dpd_top`

| parameter | default      | meaning                                           |
|-----------|--------------|---------------------------------------------------|
| `EXP_W`   | 8            | exponent bits (tested 5..8)                       |
| `MAN_W`   | 23           | fraction bits (tested 5..23; RTL works for >= 2)  |
| `CFG`     | `BAPS8_MEM1` | operation table: `BAPS8_MEM1`, `BAPS8_MEM5`, `BAPS12_MEM1`, `BAPS12_MEM5` |

| port                           | dir | width     | meaning |
|--------------------------------|-----|-----------|---------|
| `clk`, `rst_n`                 | in  | 1         | clock; asynchronous reset, active low |
| `x_valid`, `x_ready`           | in/out | 1      | input handshake; a sample moves on a clock edge where both are high |
| `x_re`, `x_im`                 | in  | FW        | input sample, FW = 1+EXP_W+MAN_W |
| `coef_we`, `coef_addr`         | in  | 1, 4      | write theta_(addr+1); addresses >= R are ignored |
| `coef_re`, `coef_im`           | in  | FW        | coefficient value |
| `y_valid`                      | out | 1         | one-cycle pulse per output sample, **no back-pressure** |
| `y_re`, `y_im`                 | out | FW        | predistorted sample |

To use the block:

1. Reset it.
2. Write all R coefficients, one per cycle.
3. Stream samples through the input handshake.

Writing coefficients while samples are in flight is allowed. It changes every
product that has not yet been registered.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model is
independent of the RTL:

* `fp_ref_pkg` holds values as `real` (binary64). After each operation it
  rounds to (w, t) with round-to-nearest-even in integer arithmetic. binary64
  has more than 2t+2 significand bits, so rounding one real operation this way
  gives the correctly rounded result.
* `baps_ref_pkg` keeps its own copy of the four operation tables and models the
  delay history across samples. It computes every basis function and the tree
  sum in the hardware's operation order, so outputs are compared **bit for bit**.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_fp_mult`         | 6000 random products at (8,23) and (5,7), including overflow and flush-to-zero; zero/inf/NaN and rounding corner cases |
| `tb_fp_addsub`       | 8000 random sums/differences, near-total cancellation, ties to even, signed zero, inf-inf |
| `tb_fp_cmul`         | random complex products at (8,23) and (5,9), with and without conjugation |
| `tb_type1_delay`     | delay lines of 1 and 4 against a queue model, irregular shift pulses |
| `tb_type2_unit`      | general and magnitude-form Type II operations; cached and uncached; latency 1 or 2 cycles |
| `tb_basis_builder`   | all four configurations side by side, random input gaps, every phi against the model, cycle count per sample |
| `tb_dpd_engine`      | R = 8 and R = 12, coefficient loading, ignored address, streamed input, latency 4 and 5 |
| `tb_baps_dpd_top`    | whole design at default parameters, 400 samples bit-exact, latency 19, and counters showing that input stalls, back-to-back accepts, builder/engine overlap, delay steps, cache hits and misses, and an ignored coefficient write all occurred |
| `tb_baps_workloads`  | all four configurations at (8,23), (8,9), (5,7), (5,5): a 16-tone stand-in for an OFDM signal, bit-exact outputs and the cycles per sample from the table above; the default configuration streams a full 79,280-sample record, the others 120 samples |

With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  tb/fp_ref_pkg.sv tb/baps_ref_pkg.sv rtl/baps_pkg.sv tb/tb_baps_dpd_top.sv \
  --top-module tb_baps_dpd_top && ./obj_dir/Vtb_baps_dpd_top
```

For other testbenches, swap in their file and module names. `tb_baps_workloads`
holds sixteen copies of the design and takes a few minutes to compile.

To change the precision or the configuration, override `EXP_W`, `MAN_W` and
`CFG` on `baps_dpd_top`. To add a new configuration:

1. Extend `baps_cfg_e` and `get_op` in `baps_pkg`.
2. Add the matching rows to `baps_ref_pkg::row` in the testbench package.

## Departures and own choices

These are choices made for this RTL. They are not fixed by the BAPS hardware it
follows:

* **Arithmetic IP.** The original used vendor floating-point multipliers and
  adders. Here they are replaced by `fp_mult`/`fp_addsub`, with flush-to-zero
  instead of subnormal support.
* **Schedule.** Each builder step takes 1, 2 or 3 cycles. There is a single
  shared Type II unit, and the cache is cleared per sample. The original
  describes a state machine with one state per basis function, but not its
  timing.
* **Pipelining.** Registers sit after the engine's products and after each
  adder level. The arithmetic units themselves are combinational and not
  pipelined.
* **Configuration.** All four operation tables live in one parameterised FSM,
  selected at elaboration. The original speaks of a tailored state machine per
  variant, also fixed at synthesis time.
* **Interfaces.** Valid/ready on the input, valid-only on the output. A
  one-word-per-cycle coefficient port. Asynchronous active-low reset.
* **Not included.** The surrounding system is not part of this RTL: conversion
  of test vectors to and from the custom format, coefficient identification,
  DAC/ADC, frequency conversion and the power amplifier.

Equivalence with the original hardware's numbers, and the linearisation it
achieves on a real amplifier, have not been reproduced. The testbenches check
this RTL against its own bit-exact reference model only.

## Files

* `rtl/baps_pkg.sv`: configuration enum, operation type, operation tables
* `rtl/fp_mult.sv`, `rtl/fp_addsub.sv`, `rtl/fp_cmul.sv`: arithmetic
* `rtl/type1_delay.sv`, `rtl/type2_unit.sv`: BAPS operation units
* `rtl/basis_builder.sv`, `rtl/dpd_engine.sv`, `rtl/baps_dpd_top.sv`: datapath and wrapper
* `tb/fp_ref_pkg.sv`, `tb/baps_ref_pkg.sv`: reference models
* `tb/baps_workload_run.sv`: per-instance driver used by `tb_baps_workloads`
* `tb/tb_*.sv`: testbenches
