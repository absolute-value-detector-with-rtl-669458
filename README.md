# 5-bit absolute value detector

A threshold detector for signed samples. A 5-bit two's complement sample `x`
(-16 … 15) is turned into its magnitude `|x|`, and a single output bit `a_gt_b`
goes high when that magnitude is larger than a 4-bit threshold `thr`. This is
the kind of block that sits behind a sampler and flags "the signal left the
band ±thr" without caring about the sign. The circuit is built from parts that
a 74LS-series board would use: an inverter bank, a 4-bit ripple-carry adder, a
quad 2-to-1 selector and a comparator made only of NOT, NAND, NOR and XNOR
gates. It is entirely combinational: no clock, no reset, no state.

```
          x[3:0] ──┬──────────────────────────► A ┐
                   └─► NOT ×4 ─► adder (+0, cin=1) ─► B ├─ quad 2:1 sel ─► mag[3:0] ─┐
          x[4] (sign) ───────────────────────────► sel ┘                             ├─► comparator ─► a_gt_b
          thr[3:0] ──────────────────────────────────────────────────────────────────┘      (mag > thr)
```

## Module map

| module                 | role                                                           |
|------------------------|----------------------------------------------------------------|
| `avd_top`              | the detector: `abs_converter` feeding `magnitude_comparator`   |
| `abs_converter`        | 5-bit two's complement → 4-bit magnitude                       |
| `ripple_adder`         | `WIDTH`-bit ripple-carry adder (default 4), chain of full adders |
| `full_adder`           | one-bit full adder cell                                        |
| `quad_mux2`            | `WIDTH` 2-to-1 selectors with shared select and active-low strobe |
| `magnitude_comparator` | 4-bit `a > b` as a NOT/NAND/NOR/XNOR gate network              |
| `avd_pkg`              | widths (`IN_W = 5`, `MAG_W = 4`) and the `sample_t`/`mag_t` types |

Ports of `avd_top`:

| port     | dir | width | meaning                          |
|----------|-----|-------|----------------------------------|
| `x`      | in  | 5     | two's complement sample, `x[4]` is the sign |
| `thr`    | in  | 4     | unsigned threshold               |
| `mag`    | out | 4     | `|x|` (0 for `x = -16`, see below) |
| `a_gt_b` | out | 1     | 1 when `mag > thr`               |

## Forming the magnitude

Negating a two's complement number is "invert every bit, add one". The
converter does exactly that on the four low bits only: `x[3:0]` passes through
four inverters into the A operand of the 4-bit adder, the B operand is tied to
zero and the carry-in to one, so the adder's sum is `~x[3:0] + 1`. The raw
`x[3:0]` goes to the selector's A side and the adder's sum to its B side, and
the sign bit `x[4]` is the select: 0 passes the raw bits, 1 passes the
negated bits. The selector's strobe is tied active.

Dropping the sign bit before negating is what makes a 4-bit adder enough:
for `x = -k` with `1 ≤ k ≤ 15`, `x[3:0] = 16 - k`, and `~(16 - k) + 1 = k`
modulo 16.

### The -16 corner

`x = 5'b10000` has magnitude 16, which has no 4-bit code. Its low bits are
`0000`; inverted they are `1111`, and adding one gives `0000` with a carry that
the circuit does not use. So `mag = 0` and `a_gt_b = 0` for every threshold.
This is kept deliberately: it is how the circuit behaves, and the carry-out of
`ripple_adder` is left unconnected in `abs_converter` for that reason (lint
reports the empty pin; it is intentional). If you need -16 handled, bring the
adder's `cout` out and treat it as a fifth magnitude bit.

## The gate-level comparator

Rather than an arithmetic comparator, `a > b` is written out from the top bit
down. `a` is larger exactly when one of four cases holds:

| term | condition                                            |
|------|------------------------------------------------------|
| t3   | `a3 = 1, b3 = 0`                                     |
| t2   | `a3 = b3`, and `a2 = 1, b2 = 0`                      |
| t1   | `a3 = b3, a2 = b2`, and `a1 = 1, b1 = 0`             |
| t0   | `a3 = b3, a2 = b2, a1 = b1`, and `a0 = 1, b0 = 0`    |

and `a_gt_b = t3 | t2 | t1 | t0`. Each equality `a_i = b_i` is one XNOR gate.
Each term is an AND, built as a NAND followed by an inverter. The threshold
bit is inverted first, so `a_i & ~b_i` is NAND(`a_i`, NOT `b_i`) then NOT. The
OR of the four terms is built as a tree: NOR(t3, t2) and NOR(t1, t0), each
inverted again, meet in a final NOR. That final NOR is high when no term is
set, which means `a ≤ b`. One more inverter turns it into `a > b`.

The wires in `magnitude_comparator.sv` are named after the gates of the
reference schematic (`g_nand1b`, `g_3nand1b`, `g_4nand1b`, `g_nor2b`, …) so the
netlist can be laid beside it. The longest path is the bit-0 term:

```
b0 → NOT10B → NAND2B → NOT4B ┐
                             ├→ 4NAND1B → NOT16B → NOR3B → NOT2B → NOR2B → NOT (output)
        XNOR1B, XNOR2B, XNOR3B ┘
```

Put in front of it the inverter and the four-stage carry chain of the
converter, then the selector. That gives the detector's critical path: an
inverter, the adder, the selector, a 2-input NAND, a 4-input NAND and two
2-input NORs, with inverters between them.

## Where this RTL departs from the reference circuit

* **Sense of the comparator.** The circuit is specified as detecting
  `|x| > thr`, and the threshold-8 experiment expects `|x| = 8` to give 0.
  As drawn, the reference schematic seems to put the per-bit inverter on
  the magnitude side and to end in a NOR. That would compute `NOT(|x| < thr)`,
  which is `|x| ≥ thr`. This RTL implements the specified `>`. It does so by
  putting the inverter on the threshold side and adding one output inverter.
  As a result, the longest path here has one more inverter than the reference
  path. Six small inverters of the schematic whose connections could not be
  settled are not present.
* **Threshold width.** The threshold is 4 bits, as in the comparator, not
  5 bits.
* **Selector.** It is a quad 2-to-1 selector with one select line (the
  74LS157 function), which is what the circuit uses. Its strobe behaviour
  (outputs forced low when `strobe_n = 1`) follows that part's datasheet.
* **Full adder insides** are the textbook `sum = a ^ b ^ cin`,
  `cout = ab | (a ^ b)cin`. The reference circuit only names the cell.
* **Timing and energy** are not modelled. The reference analysis estimates
  about 127.5 ns through the critical path and about 3 nJ per operation for
  74LS parts at 5 V. Those are properties of the discrete parts, not of this
  description. In simulation the outputs settle in zero time.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
integer arithmetic, not against another copy of the logic, and prints
`TB_RESULT checks=<n> failures=<n>`:

| testbench                 | what it covers |
|---------------------------|----------------|
| `tb_full_adder`           | all 8 input combinations |
| `tb_ripple_adder`         | all 512 `(a, b, cin)` cases, including a full ripple `1111 + 0 + 1` |
| `tb_quad_mux2`            | select × strobe over random and corner words |
| `tb_magnitude_comparator` | all 256 `(a, b)` pairs; checks that every case t3…t0 decided at least once |
| `tb_abs_converter`        | all 32 samples, including -16 → 0 |
| `tb_avd_top`              | all 32 samples × 16 thresholds at the default configuration. It counts positive and negative samples, the -16 corner, detections decided at each bit, and equal and below-threshold cases. It fails if any count is zero. |
| `tb_avd_threshold8`       | the threshold-8 sweep: `thr = 4'b1000`, `x` = `5'h00 … 5'h1F` at 5 ns per step; expects 14 detections (`|x|` = 9…15, both signs) |

All of them pass. Each testbench was also run against a copy of its module
with one deliberate bug, and it failed there. The bugs were a dropped carry
term, a carry-in tied low, an ignored strobe, a missing equality in the bit-0
term, a one's complement in place of the two's complement, and swapped
comparator operands.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/avd_pkg.sv tb/tb_avd_top.sv --top-module tb_avd_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. The package must come first on the
command line. Everything else is found through `-y`.

## Changing it

`ripple_adder` and `quad_mux2` are parameterised by `WIDTH`. The magnitude
width comes from `avd_pkg::IN_W`. The comparator, however, is the explicit
4-bit gate network and does not scale on its own. To widen the detector,
extend the term list in `magnitude_comparator` (term `t_i` needs the XNORs of
all higher bits) and raise `IN_W`. The sample and threshold ranges of
the testbenches are written for the default 5-bit sample and 4-bit threshold
and must be widened along with them.
