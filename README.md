# Fault-tolerant parallel FIR filters with a word-level Hamming code

When several identical filters run side by side on different inputs, a fault
in any one of them can be found and repaired much more cheaply than with
triple modular redundancy. The trick is to treat each filter's output as one
"bit" of an error-correcting codeword. For four filters, three extra *check
filters* are enough, where TMR would need eight more filters and voters.

This repository holds synthesizable SystemVerilog for such a bank: four
16-tap FIR filters protected by a Hamming (7,4) code, with 8-bit inputs and
coefficients and 18-bit outputs. Set the parameter `K = 11` and the same RTL
builds eleven filters protected by a Hamming (15,11) code.

## The idea: parity by addition

A FIR filter is linear, so filtering a sum of inputs gives the sum of the
filtered outputs:

    h * (x1 + x2 + x3)  =  h * x1 + h * x2 + h * x3  =  y1 + y2 + y3

A binary Hamming (7,4) code protects data bits d1..d4 with three parity bits:

    p1 = d1 ^ d2 ^ d3      p2 = d1 ^ d2 ^ d4      p3 = d1 ^ d3 ^ d4

The bank uses the same three equations with XOR replaced by addition. The
check filters receive

    x5 = x1 + x2 + x3      x6 = x1 + x2 + x4      x7 = x1 + x3 + x4

and run the same impulse response as the data filters. So, when nothing is
wrong, their outputs must satisfy

    z1 = y1 + y2 + y3      z2 = y1 + y2 + y4      z3 = y1 + y3 + y4

```
 x1..x4 ──┬──────────────► 4 × fir_filter (data)  ── y1..y4 ──┐
          │                                                   ├─► fault_corrector ─► yc1..yc4, syndrome
          └─► check_encoder ─ x5..x7 ─► 3 × fir_filter (check) ── z1..z3 ──┘
```

## Finding and repairing the faulty filter

This is the part of the design that takes the most care.

**Syndrome.** For every check j, the corrector computes
`d_j = z_j − (sum of the y_i that check j covers)`. Check bit `s_j` is 1
when `|d_j| > THRESH`, and 0 otherwise. A fault in one filter disturbs
exactly the checks that filter takes part in:

| s1 s2 s3 | faulty filter | action |
|---|---|---|
| 000 | none | outputs pass through |
| 111 | y1 | y1 ← z1 − y2 − y3 |
| 110 | y2 | y2 ← z1 − y1 − y3 |
| 101 | y3 | y3 ← z1 − y1 − y2 |
| 011 | y4 | y4 ← z2 − y1 − y2 |
| 100 / 010 / 001 | check filter z1 / z2 / z3 | outputs pass through |

A faulty data output is rebuilt from the first check it takes part in and
the other, healthy, outputs of that check. A faulty check filter is
recognised and ignored.

**Why a threshold is needed.** Every filter drops the two LSBs of its
full-precision sum (floor). The check filter drops them once from the whole
sum. The data filters drop them from each term. So `d_j` is 0, 1 or 2 LSBs
even with no fault (0 to 6 LSBs for K = 11, where each check covers seven
filters). `THRESH = 8` LSBs lies above that, so there are no false alarms. It
also means:

- A fault that moves an output by at most about THRESH LSBs may go
  uncorrected.
- A fault close to the threshold may set only some of the bits of its
  column. The wrong output is then rebuilt, with an error of the same small
  size.

The end-to-end testbench bounds all outputs to within `THRESH + 2·W` LSBs of
a fault-free bank, where W is the number of filters per check.

**Precision of a repaired output.** A rebuilt value `z1 − y2 − y3` carries
the same rounding difference. It is 0 to W−1 LSBs above what the healthy
filter would have produced.

**General K.** The package `ft_filter_pkg` computes the code:

- `num_checks(K)` is the smallest R with 2^R − R − 1 ≥ K.
- Data filter i gets the i-th R-bit pattern of weight ≥ 2, in descending
  order. For K = 4 this gives the table above.
- Check j covers the data filters whose pattern has bit R−1−j set.
- The syndrome output carries s1 in its MSB.

For K = 11 this gives a (15,11) code with four check filters, each covering
seven data filters. That column order is this design's own choice.

## Keeping faults in the checking logic contained

The encoder and the corrector add and subtract too, so they can fail as
well. The design limits how far such a fault can spread:

- **No shared adders.** Each check-filter input sum in `check_encoder` is
  built separately. So is each syndrome difference in `fault_corrector`. A
  single fault there upsets at most one check bit, which the table above
  then reads as a check-filter fault and ignores.
- **Tripled rebuild.** Every rebuilt output is computed by three separate
  `output_rebuild` instances, and a bitwise 2-of-3 majority vote picks the
  result (`TRIPLE = 1`). The voter and the final output multiplexer are
  single.
- **Per-filter coefficients.** Each filter holds its own copy of the
  coefficients. A corrupted coefficient therefore hits one filter only.

**Synthesis caveat.** A flattening synthesis flow will merge identical
logic. This includes the three rebuild copies and the per-filter
coefficient registers, which share their inputs and enable. That merging
defeats the containment above.

To prevent it, `fir_filter` and `output_rebuild` carry a `keep_hierarchy`
attribute. Check that your flow honours it; with Yosys' slang front end,
pass `--keep-hierarchy` to `read_slang`. With the hierarchy kept, the
default bank holds 2041 flip-flop bits:

- each data filter: 128 coefficient, 120 delay-line, 18 output and 1 valid
  bits (267);
- each check filter: 128, 150, 20 and 1 bits (299);
- the corrector: 76 bits.

A flattened netlist that shares the coefficient registers has about 1270.

## Blocks

| module | role |
|---|---|
| `ft_filter_pkg` | default sizes; Hamming column and check-membership functions |
| `fir_filter` | one filter: direct form, TAPS−1 input delay line, full-precision sum, registered output with DROP LSBs removed |
| `check_encoder` | combinational sums forming the check-filter inputs |
| `output_rebuild` | one rebuilt output `z_j − Σ others` |
| `fault_corrector` | thresholded syndrome, decode, tripled rebuild and vote, output register |
| `ft_parallel_filters` | top: encoder, K data filters, R check filters, corrector |

Widths at the default size:

| signal | width | note |
|---|---|---|
| data input, coefficient | 8 | signed two's complement |
| full-precision sum, data filter | 20 | 8 + 8 + log2(16) |
| data output `y`, `yc` | 18 | sum with 2 LSBs dropped |
| check input `x5..x7` | 10 | sum of three 8-bit inputs |
| check output `z` | 20 | same LSB weight as `y`, 2 more MSBs |

For K = 11, the check inputs are 11 bits and the check outputs 21 bits.

## Interface and timing (`ft_parallel_filters`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `coef_we` | in | 1 | copy `coef_in` into every filter's coefficient registers |
| `coef_in` | in | 8 × 16 | impulse response h[0..15] |
| `in_valid` | in | 1 | `x` holds a new set of K samples |
| `x` | in | 8 × K | inputs x1..xK |
| `out_valid` | out | 1 | `yc` and `syndrome` are valid |
| `yc` | out | 18 × K | corrected outputs |
| `syndrome` | out | R | s1..sR of the same sample, s1 in the MSB |

Timing:

- One sample set per clock with `in_valid` high. Gaps are allowed.
- The result appears exactly two clocks later, with `out_valid` high for
  one clock:
  - clock 1: the filter output registers;
  - clock 2: the corrector register.
- After reset every coefficient is 0. Load the response once with `coef_we`,
  with `in_valid` low in that clock.
- An assertion in the top checks that all filters' valid flags move
  together.

Parameters of the top:

- `K`: number of data filters (4).
- `TAPS`: number of coefficients (16).
- `IN_W`, `COEF_W`: input and coefficient widths (8, 8).
- `OUT_W`: data output width (18).
- `THRESH`: check threshold in LSBs (8).
- `TRIPLE`: triple the rebuild logic (1).

The check count, the check widths and the code all follow from these.

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ft_filter_pkg.sv \
    tb/tb_ft_parallel_filters.sv --top-module tb_ft_parallel_filters
./obj_dir/Vtb_ft_parallel_filters
```

Swap in another testbench name to run it:

| testbench | what it checks |
|---|---|
| `tb_fir_filter` | Impulse response read-back. Random data with idle clocks and a coefficient reload. Extreme values. Exact comparison with an integer model. One-clock latency. |
| `tb_check_encoder` | The three sums written out by hand, on random and extreme inputs. |
| `tb_fault_corrector` | A fault on each of the seven outputs, or none. Syndromes from a hand-written table; rebuilt values from hand-written equations. Sub-threshold errors left alone. Range extremes. A wrong value forced onto one rebuild copy must be outvoted. |
| `tb_ft_parallel_filters` | End to end at the default size (details below). |
| `tb_ft_k11` | The same test with K = 11. |

The end-to-end test streams random samples through the bank. It injects
8000 single-bit upsets into stored input samples and 8000 into coefficient
registers. Each upset goes into one randomly chosen data or check filter,
and only one fault is present at a time. An independent integer model of
the whole bank produces the expected `yc` and `syndrome` for every sample,
and the testbench compares them bit-exactly. The testbench also checks the
two-clock latency and the bound against a fault-free bank described above.
It counts, and requires at least once:

- correction of each data output;
- a recognised check-filter fault;
- a fault below the threshold;
- each kind of upset, idle clocks and coefficient reloads.

The K = 4 run takes under a second. The K = 11 run takes about half a
minute.

## Limits and departures

- **Reversible logic.** The scheme is described as built from reversible
  gates, but no gate or circuit is given for it. The encoder and corrector
  here are ordinary word-level adders with the same arithmetic. A
  reversible-gate netlist would be a drop-in replacement for
  `check_encoder`, and its power benefit is not modelled.
- **Design choices.** The following are not fixed by the scheme and were
  chosen for this design:
  - the filter structure (direct form);
  - rounding by floor;
  - the 20-bit check-filter output;
  - the threshold value;
  - the handshake, the two-clock latency and the coefficient-loading port;
  - reset behaviour;
  - the syndrome output port;
  - the column order of the (15,11) code.
- **Fault model.** Faults in the corrector's single voter or output
  multiplexer are not covered. Nor are two simultaneous faults: a second
  fault can cause a wrong correction, as with any single-error-correcting
  Hamming code.
- **Not included.** TMR and arithmetic-code versions of the bank, which
  serve only as points of comparison, are not part of this RTL.
