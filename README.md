# Parameterised high-precision fixed-point dividers

Integer dividers in FPGA vendor libraries typically stop at 32-bit operands and 32 fractional
quotient bits. The dividers here have no such limit: operand widths and the number of fractional
bits are parameters. Extra precision comes from extra iterations, not from wider registers or
adders. After the dividend's bits are used up, the divider keeps shifting in zeros and produces
one more fractional quotient bit per clock. So a 32-bit divider with 128 fractional bits still
has only a 34-bit adder in its loop.

Three digit-recurrence algorithms are implemented behind one interface:

| unit | module | step per clock | notes |
|---|---|---|---|
| non-restoring | `fxdiv_nonrestoring` | one add **or** subtract, chosen by the sign of the remainder | the main unit; shortest critical path |
| restoring | `fxdiv_restoring` | trial subtract, then keep or undo it | subtract plus a multiplexer |
| SRT (radix 2) | `fxdiv_srt` | digit in {-1, 0, +1} chosen from 4 remainder bits, then add/subtract/pass | needs a normalised divisor and a final correction |

`fxdiv_top` places the three side by side. The non-restoring divider is the one to use. In the
evaluation this design comes from, it ran at about 245 MHz with 32-bit operands and 32
fractional bits on a Virtex-II Pro. The restoring unit reached about 109 MHz there and the SRT
unit about 76 MHz.

## What is computed

All operands are unsigned. With dividend `Y` (`N_W` bits), divisor `D` (`M_W` bits), integer
quotient width `R_W` and `Q_W` fractional bits:

```
{quotient, remainder} = floor(Y * 2^Q_W / D)
quotient  : R_W bits, the integer part of Y/D
remainder : Q_W bits, the fractional part of Y/D, truncated (not the integer remainder Y mod D)
```

The output is called `remainder` because of the "fractional remainder" convention of vendor
dividers. For example, with 32 fractional bits, 7/2 gives `quotient = 3`,
`remainder = 32'h8000_0000`.

`error` is raised, and both results are zero, when:

* `D == 0`, or
* the integer quotient needs more than `R_W` bits. This can only happen when `R_W < N_W`. The
  test is `(Y >> R_W) >= D`, which is the same as `Y >= 2^R_W * D`, and it is made before any
  iteration.

## Control bus and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset that clears every register |
| `load` | in | copy `dividend` and `divisor` into the operand registers |
| `start` | in | begin a division on the operands in the operand registers |
| `dividend`, `divisor` | in | `N_W` and `M_W` bits |
| `quotient`, `remainder` | out | results; they hold until the next division completes |
| `done` | out | one-cycle pulse when the results are valid |
| `error` | out | valid with `done`; holds until the next `start` |

The operand registers are separate from the working registers. `load` can therefore be used
during a division to prepare the next one, and the next `start` needs no new `load`. `load` and
`start` in the same cycle start a division on the operands given in that cycle. A `start` while
a division is running is ignored.

Every division has three phases: the `start` edge, one set-up cycle, then one quotient digit per
clock. The set-up cycle does the following:

* counts the dividend's leading zeros;
* checks for errors;
* loads the working registers.

Counting clock edges after the edge that samples `start`:

* non-restoring and restoring: `done` after **1 + (N_W - lz) + Q_W** edges, where `lz` is the
  number of leading zero bits of the dividend. Leading zeros of the dividend can only produce
  zero quotient bits, so they are skipped. A dividend with its top bit set takes the full
  `N_W + Q_W + 1` clocks. That is 65 clocks for the 32/32 default, or 265 ns at 245 MHz.
* SRT: `done` after **1 + max(1, sY - sD + 1 + Q_W)** edges, where `sY` and `sD` are the
  numbers of significant bits of the dividend and the divisor. This count never exceeds
  `N_W + Q_W + 1`. It is shorter for large divisors (see below).
* error: `done` and `error` on the first edge after the `start` edge.

## The three recurrences

Each unit keeps a partial remainder `P` and a shift register that feeds in the dividend's bits
MSB first, followed by zeros. Every step computes `S = 2P + b`, where `b` is the next bit.

**Non-restoring** (`fxdiv_nonrestoring`). `P' = S - D` if `P >= 0`, else `P' = S + D`. The
quotient bit is 1 exactly when `P' >= 0`. `P` stays in `[-D, D)`, so it is kept in `M_W + 2`
signed bits. A negative remainder is never repaired: the next step's addition does that
implicitly. The quotient bits come out in plain binary, and because only the quotient is output,
no final correction is needed. The loop is one `M_W + 2`-bit add/subtract whose mode is the
remainder's sign bit.

**Restoring** (`fxdiv_restoring`). It forms the trial difference `T = S - D`. If `T >= 0` the
bit is 1 and `P' = T`. Otherwise the bit is 0 and `P' = S`: the subtraction is "restored". `P`
stays in `[0, D)`. The loop is a subtraction followed by a 2:1 multiplexer controlled by the
subtraction's sign.

**SRT** (`fxdiv_srt`). This one takes the most machinery:

1. *Normalisation.* In the set-up cycle the divisor is shifted left by its leading-zero count
   `s`, giving `Dn = D << s >= 2^(M_W-1)`. The quotient is then `floor(Y * 2^(Q_W+s) / Dn)`,
   which is the same number.
2. *Remainder preload.* Any value below `2^(M_W-1)` is also below `Dn`. The first (up to)
   `M_W-1` significant dividend bits therefore go straight into `P`, because their quotient
   digits are known to be zero. This is what keeps the cycle count within `N_W + Q_W + 1`
   despite the `s` extra fraction steps that normalisation adds. The preload shift is capped so
   that at least one step always remains.
3. *Digit selection by limited comparison.* `q = +1` if `S >= 2^(M_W-1)`, `q = -1` if
   `S < -2^(M_W-1)`, else `q = 0`. Then `P' = S - q*Dn`. Only the top four bits of `S` decide
   this; no full-width comparison is made. `P` stays in `[-Dn, Dn)`.
4. *On-the-fly conversion.* The signed digits are turned into binary as they arrive. Two
   registers hold `Q` and `QM = Q - 1` (mod `2^(N_W+Q_W)`; `QM` starts as all ones):

   | digit | `Q'` | `QM'` |
   |---|---|---|
   | +1 | `2Q + 1` | `2Q` |
   | 0 | `2Q` | `2QM + 1` |
   | -1 | `2QM + 1` | `2QM` |

5. *Final correction.* If the last partial remainder is negative, the quotient is one too large,
   and `QM` is the answer. This choice is made in the clock of the last digit, so it adds no
   cycle.

A note for anyone changing the selection rule: if the digit is chosen by comparing `S` with
`±D`, the algorithm never produces a −1 digit for unsigned operands. It then degenerates into
restoring division. The constant thresholds on a normalised divisor are what make the digit set
redundant.

## Structure

```
fxdiv_top
 ├─ fxdiv_nonrestoring ─┐
 ├─ fxdiv_restoring  ───┼─ fxdiv_ctrl (sequencer, error check) ── fxdiv_lzc (dividend)
 └─ fxdiv_srt ──────────┘                                     └── fxdiv_lzc (divisor, SRT only)
```

* `fxdiv_pkg`: the state type `fxdiv_state_t` (`S_IDLE`, `S_INIT`, `S_ITER`).
* `fxdiv_ctrl`: the state machine, the iteration counter, and the divide-by-zero and overflow
  checks. It is shared by all three units. Each datapath tells it how many steps an operation
  needs (`iters`), and it returns `init`, `step` and `last` strobes plus `done` and `error`. An
  assertion checks that the counter never runs out while iterating.
* `fxdiv_lzc`: combinational leading-zero counter.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_W` | 32 | dividend width |
| `M_W` | 32 | divisor width (`fxdiv_srt` needs at least 2) |
| `R_W` | 32 | integer quotient width |
| `Q_W` | 32 | fractional quotient bits, at least 1 |

The defaults are the 32-bit configuration used for comparison with vendor cores. The evaluated
sizes are all reachable by parameters and are all simulated by `tb/tb_fxdiv_workloads.sv`:

| operands (n = m = r) | fractional bits q | clocks, full-length dividend |
|---|---|---|
| 32 | 8, 16, 32, 64, 128 | 41, 49, 65, 97, 161 |
| 64 | 32, 64, 128 | 97, 129, 193 |
| 128 | 32, 64, 128 | 161, 193, 257 |

Hardware cost grows linearly. Per unit it is about `N_W + Q_W` quotient flip-flops (twice that
for SRT), an `M_W + 2`-bit adder, and barrel shifters for the leading-zero skip.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    --top-module tb_fxdiv_top rtl/fxdiv_pkg.sv tb/tb_fxdiv_top.sv
./obj_dir/Vtb_fxdiv_top
```

Each testbench prints a final `TB_RESULT checks=N failures=M` line.

| testbench | what it runs |
|---|---|
| `tb_fxdiv_nonrestoring`, `tb_fxdiv_restoring`, `tb_fxdiv_srt` | one unit in three sizes: 32/32/32/32, 16/8/12/5 (overflow occurs), 8/12/8/10 (divisor wider than dividend) |
| `tb_fxdiv_top` | all three units in the top, with `R_W = 24` so overflow can occur |
| `tb_fxdiv_top_full` | the top at its default parameters |
| `tb_fxdiv_workloads` | all three units at each of the eleven evaluated sizes |

All of them use `tb/fxdiv_harness.sv`, which drives one divider port set. It mixes random
operands of random length with these cases:

* zero and unit divisors;
* a zero dividend;
* all-ones operands;
* a dividend below the divisor.

It also loads operands early, and pulses `start` while busy. It checks every result against
`floor(Y * 2^Q_W / D)` computed with wide integers, along with the error flag, the exact clock
count, the single-cycle `done` and that the results hold afterwards. The end-to-end testbench
also counts, and requires at least once each:

* leading-zero skips and full-length divisions;
* divide-by-zero and overflow errors;
* early loads and ignored starts;
* non-restoring add steps and restoring restore steps;
* SRT −1 digits and SRT final corrections.

## Design choices and departures

What comes from the source description:

* the three algorithms and their recurrences;
* the common port set (dividend, divisor, quotient, "remainder", and load/start/done/error);
* fully parameterised widths;
* extra precision obtained through extra iterations;
* the 32-bit defaults;
* the bound of `n + q + 1` clocks, which is shorter for short operands;
* SRT's digit set, limited comparisons, correction of a negative final remainder and
  on-the-fly conversion.

Choices made here, where the description gives only names or nothing:

* the meaning of each control signal, the separate operand register, and ignoring `start`
  while busy;
* the error conditions and zero results on error;
* the asynchronous active-low reset;
* reading the `remainder` output as fractional quotient bits;
* leading-zero skipping as the way the cycle count becomes data-dependent;
* the SRT normalisation, selection constants, remainder preload and conversion registers;
* the register widths of every datapath.

Not included:

* Any further pipelining inside a step. The original units were additionally tuned with
  vendor-specific timing and area constraints and placement, which is not part of RTL.
* The vendor divider core that served as the comparison baseline.
* Signed division. The design is unsigned only.
