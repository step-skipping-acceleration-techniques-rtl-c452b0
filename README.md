# Step skipping on recursive cell chains, and a step-skipping ln(x) unit

Many arithmetic circuits are a row of identical cells, each passing one bit of
state to its neighbour. Examples are the carry of an adder, the "a 1 has been
seen" flag of a two's complement negator, and the "still inside the run" flag of
a detector that looks for the end of a run of 0s or 1s. In such a row the delay
grows with the width. The carry-skip adder has a well-known fix. Cut the row into
slices. Work out every slice locally, starting from a fixed chain value. Then let
a single gate per slice decide whether the value coming from the previous slice
overrides the local result. The signal then crosses a slice in one gate delay, not
in one cell delay per bit.

This RTL applies that idea to three cell chains:

* the carry-skip adder itself (`carry_skip_adder`);
* the two's complement sign change (`sign_change_module`, `sign_change_acc`);
* the end-of-0-sequence and end-of-1-sequence detectors (`zero_seq_*`, `one_seq_*`),
  which mark the first 1 or the first 0 of a vector.

It then puts them together in a logarithm unit, `ln_step_skip`. The unit computes
ln(x) by multiplicative normalisation. It uses the detectors to jump over every
step of the iteration that would do nothing.

The design follows the article "Step Skipping Acceleration Techniques on Recursive
Logical Circuits. Practical implementations on FPGA." The circuit structures of the
chains, the slicing and the skip gates come from it. So do the recurrence and digit
rules of the logarithm algorithm, and the detector sizes used as defaults. The
controller, the number formats and the widths that the article leaves open are
choices made here. They are listed under "Departures and choices".

## The sliced chains

Every chain module takes T bits plus one chain input, and gives T bits plus one
chain output. Modules can therefore be strung together. The default is T = 4.

| chain | cell (per bit) | chain runs | slice override |
|---|---|---|---|
| first 1 (`zero_seq_module`) | `y = x & ~seen`, `seen' = seen \| x` | from the MSB down | OR gate per slice; when a 1 was found further left, a multiplexer forces the slice outputs to 0 |
| first 0 (`one_seq_module`) | `y = ~x & ones`, `ones' = ones & x` | from the MSB down | AND gate per slice; the slice outputs pass only while everything further left was 1 |
| sign change (`sign_change_module`) | `z = x ^ (en & c)`, `c' = c \| x` | from the LSB up | OR gate per slice; when a 1 was met in a lower slice, the multiplexer takes `x ^ en` for the whole slice |
| carry (`carry_skip_adder`) | `q' = p ? q : g`, `z = p ^ q` | from the LSB up | 2-to-1 multiplexer per group, selected by the group propagate `&p` |

In each accelerated version (`*_acc`), every slice starts its chain from the
neutral value: 0 for "seen" and "c", 1 for "ones". So every slice settles at the
same time. Only the short skip chain, one gate per slice, runs the whole width.
For the detectors, the long path is K/T module delays plus N/K skip gates plus
one multiplexer. The straight detector takes N cell delays.

Bit order of the detectors: bit N-1 of the vector is the leftmost, most
significant bit. It is scanned first. The one-hot output has its bit set at the
first 1 (or first 0). `step_coder` turns the one-hot output into the position
number counted from the left: bit N-1 is position 1 and bit 0 is position N. It
outputs 0 when no bit is set.

## The logarithm unit

### Algorithm

The argument x lies in [1/2, 2). It is written x = x0 . x1 x2 ... xN: one integer
bit and N fraction bits. Step i (i = 1..N) multiplies x by c(i) = 1 + a(i)·2^-i
with a(i) in {-1, 0, +1}. The multiplication is one shift and one add:

    x(i+1) = x(i) + a(i) · (x(i) >> i)
    y(i+1) = y(i) - ln(1 + a(i)·2^-i)        y(1) = 0

x(i) is driven towards 1, and y then tends to ln(x). The digit comes from two bits
of the current x:

    x0 = 1 (x > 1):  a(i) = -x_i
    x0 = 0 (x < 1):  a(i) = +1 if x_i = 1 and x_(i+1) = 0, else 0

Most digits are 0. A step with a(i) = 0 changes neither x nor y, and wastes a clock
cycle.

### Skipping the empty steps

Suppose the unit is at step i. As long as a(k) = 0, x does not change. So the next
step that does work can be read off the current x in one go.

* **x > 1.** The next working step is the first fraction bit equal to 1 at a
  position >= i. The end-of-0-sequence detector receives the fraction bits, with
  positions below i forced to 0. Its mark j is the step to perform, and a(j) = -1.
* **x < 1.** The next working step is the first j >= i with x_j = 1 and
  x_(j+1) = 0. The end-of-1-sequence detector receives the bits shifted by one:
  detector bit k holds the bit at position N-k+1, and a 1 is fed in after x_N.
  Positions up to i are forced to 1. The first 0 it finds, at position j+1, gives
  step j, and a(j) = +1. Every bit from i to j is then 1, so the steps in between
  have digit 0. There is one case the detector cannot settle: j = i while x_i = 0.
  Then a(i) = 0, and the unit only moves on by one step (`fallback`). In the runs
  simulated so far this case has never occurred, because the bits left of the
  current step are all 1 whenever x < 1.

`step_coder` turns the selected mark into the number j. In the same cycle:

* `x >> j` goes through a barrel shift. `sign_change_acc` negates it when a = -1,
  and a carry-skip adder adds it to x.
* `ln_lut` reads ln(1 + 2^-j), or -ln(1 - 2^-j) when a = -1. A second
  `sign_change_acc` negates the value when a = +1, and a second carry-skip adder
  adds it to y.
* The step counter becomes j + 1.

Each cycle therefore performs one non-zero step. The result is bit-for-bit the
one that visiting every step i = 1..N would give. The testbenches check this
against a model that does visit every step.

The run stops in any of three cases: x is exactly 1, the active detector finds
nothing (no non-zero step is left), or step N is passed. x may cross 1 during a run in either direction, and x0 picks the detector anew
in every cycle. A +1 step taken at a small i can lift x above 1, and a -1 step
can take it below 1.

### Number formats

| signal | format |
|---|---|
| `x_in`, `x_out` | unsigned, 1 integer bit, N fraction bits (N+1 bits) |
| `y_out` | two's complement, 2 integer bits, N fraction bits (N+2 bits) |
| table entries | unsigned, N fraction bits, rounded to nearest |

The table is computed at elaboration by a constant function. It sums the series
ln(1+u) = u - u²/2 + ..., or -ln(1-u) = u + u²/2 + ..., with u = 2^-i, using 16
guard bits. Each step truncates x >> i, and each table entry is rounded. So y is expected to
be off ln(x) by up to about one ulp per working step. The testbenches bound y
against an exact sum of independently computed, rounded table values. In the
simulated 512-bit runs the final x was within 1 ulp of 1.

### Interface and timing (`ln_step_skip`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | samples `x_in` when the unit is idle |
| `x_in` | in | N+1 | argument in [1/2, 2) (an assertion checks x0 or x1 is set) |
| `busy` | out | 1 | steps are running |
| `done` | out | 1 | one-cycle pulse, results valid (they hold until the next start) |
| `y_out` | out | N+2 | ln(x) |
| `x_out` | out | N+1 | final auxiliary value, close to 1 |
| `steps` | out | clog2(N+2) | working cycles of the last run |

Latency from the `start` cycle to `done` is `steps + 2` cycles, where `steps`
is the number of non-zero digits. At N = 512, random arguments took a mean of
about 190 working cycles when starting above 1, and about 205 when starting below
1. Visiting every step would take 512. Arguments outside [1/2, 2) must be scaled
by a power of two beforehand, and s·ln 2 added afterwards. This unit does not do
that.

## Top level (`step_skip_top`)

The top holds two parts that share only the clock. One is the logarithm unit
(ports `ln_*`). The other is the pair of accelerated detectors in the setting used
for register-to-register timing (`seq_detector_ioreg`, ports `det*`): an input
register, the end-of-0-sequence detector (slice width K0) or the end-of-1-sequence
detector (slice width K1), and an output register. Both detectors read `det_x`.
A result appears two rising edges after its input, and a new input can be applied
every cycle.

Hierarchy:

    step_skip_top
    ├── ln_step_skip
    │   ├── zero_seq_detector_acc ── zero_seq_module × N/T
    │   ├── one_seq_detector_acc  ── one_seq_module  × N/T
    │   ├── step_coder
    │   ├── sign_change_acc ×2    ── sign_change_module
    │   ├── carry_skip_adder ×2
    │   └── ln_lut
    └── seq_detector_ioreg ×2     ── zero_seq_detector_acc / one_seq_detector_acc

`step_skip_pkg` holds the digit encoding `digit_e` and the controller state type.

## Parameters

| parameter | default | where | origin |
|---|---|---|---|
| `N` | 512 | top, ln unit, detectors | largest width evaluated for the detectors |
| `K0` | 64 | first-1 detector slice width | fastest slice width at N = 512 with I/O registers |
| `K1` | 128 | first-0 detector slice width | same, for the first-0 detector |
| `T` | 4 | module width of the detectors and sign change | chosen here |
| `ADD_S` | 16 | carry-skip group size in the ln unit | chosen here |
| `SC_K` | 16 | sign change slice width in the ln unit | chosen here |

For the detectors, K must divide N and T must divide K. The published evaluation
covers N = 16 to 512 with K = 4 to 128, and all of these pairs are legal. The
sign change and the adder accept widths that do not divide evenly: the top slice
or group is then narrower. The stand-alone defaults of `carry_skip_adder` (W = 32,
S = 8) and `sign_change_acc` (W = K = 16) are chosen here.

At N = 512 the logarithm table holds 2 × 512 entries of 514 bits. Synthesis maps
it to about one million ROM bits. It takes a few seconds to elaborate for simulation,
and coarse synthesis of the whole unit takes about two minutes.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_zero_seq_module`, `tb_one_seq_module`, `tb_sign_change_module` | exhaustive, T = 4, both chain inputs |
| `tb_zero_seq_detector_acc`, `tb_one_seq_detector_acc` | N = 64, K = 16: every single-bit position plus 2000 vectors whose first 1/0 is placed at random with random bits behind it, so later slices must be silenced |
| `tb_step_coder` | every one-hot position at N = 512, and the all-zero input |
| `tb_sign_change_acc` | W = 40, K = 16 (narrow top slice): sparse operands that leave whole slices empty, and random operands with random trailing zeros |
| `tb_carry_skip_adder` | W = 32 and 37: random operands, and operands where whole groups propagate |
| `tb_ln_lut` | every entry at N = 40 against double-precision ln, within 1 ulp |
| `tb_seq_detector_ioreg` | both variants, a new vector every cycle, two-edge latency |
| `tb_ln_step_skip` | N = 32: x and y bit-exact against a step-by-step model, y against `$ln`, latency = steps + 2 |
| `tb_step_skip_top` | full default size, described below |
| `tb_detector_configs` | both accelerated detectors at every published (N, K) pair, N = 16..512, K = 4..128, and the straight unsliced chains at N = 16..512 |

`tb_step_skip_top` runs the top at its default parameters (N = 512). It uses 31
arguments: the corner values 1/2, 1, 1 ± 1 ulp, 1.5, 0.75 and 2 - 1 ulp, plus
random values. It checks that:

* x is bit-exact against a replay of the plain algorithm;
* y is within one ulp per step of a sum built from an independent 512-bit table,
  computed with the atanh series;
* y agrees with `$ln` to 1e-12;
* the latency is steps + 2 cycles.

It streams random vectors through both registered detectors. It also counts each
mechanism and fails if one never happens: jumps over empty steps with x > 1 and
with x < 1, x crossing 1 in both directions during a run, both ways of stopping, both digit
signs, a sign change skip across slices, a carry crossing a whole adder group, and
the skip chains of both detectors. It builds in under a minute and runs in under
a second.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/step_skip_pkg.sv tb/tb_step_skip_top.sv --top-module tb_step_skip_top
    ./obj_dir/Vtb_step_skip_top

Replace the testbench name to run another one. Every file is named after the one
module or package it holds, so `-y rtl -y tb` finds the rest.

## Departures and choices

* **Detector slice width.** The published tables quote a "block size" K. Here K is
  taken as the slice width in bits, so a slice holds K/T modules. The module width
  T is not published; 4 is used.
* **Digit rule for x < 1.** One published formula tests bit i-1. The algorithm
  listing and the detector description test bit i+1. The RTL follows the listing
  (bit i+1).
* **Table exponent.** The table is sometimes written ln(1 ± 2^i). The normalising
  factor is defined as 1 + a·2^-i, and the RTL uses 2^-i.
* **Last step.** At i = N the x < 1 rule needs a bit beyond x_N. It is taken as 1,
  so no +1 step happens at i = N.
* **Controller.** The published description says the empty steps are skipped with
  the detectors and the step coder. It gives no controller. The
  one-working-step-per-cycle controller, its masking of the detector inputs, and
  the one-step fallback are this design's.
* **Datapath.** The shifter/adder is built here from the sign change circuit and
  carry-skip adders, so that all the sliced chains take part. Any adder would do.
* **No argument pre-scaling.** Scaling into [1/2, 2) and the final s·ln 2
  correction are outside the unit.
* **Sign change stage form.** The technique can also be drawn with the skip input
  ORed into the complement control of every bit. Here every slice uses the
  multiplexer form: the skip input selects `x ^ en` for the whole slice. The two
  forms have the same function.
* **Not built.** The variant that multiplies by (1 + a·2^-i) with a true
  multiplier is not built; only the shift-and-add form is. Nor is the optional
  first factor 2 that would extend the argument range down to about 0.21.
* **Carry-skip adder.** It keeps the multiplexer of its first group as well, so it
  can be used as a building block.
* **Published results not reproduced.** The published results are FPGA delays and
  slice counts on a Virtex-4 device. This RTL is written for any technology and
  cannot reproduce them. The skip structures are kept as explicit gates, but a
  synthesis tool is free to restructure them.

Known lint notes: Verilator reports some signals as unused. These are the adders'
carry outputs, which the ln unit drops because it works modulo 2^W; the last skip
signal of the sign change circuit; and padding bits of a narrow top module. They
are deliberate.
