# Digit-serial FIR filter with a shared-partial-product constant multiplier

A FIR filter multiplies every input sample by a set of fixed coefficients.
Because the coefficients are constants, no general multiplier is needed: each
product can be built from shifts and additions, and products for different
coefficients can share intermediate results ("multiple constant
multiplication", MCM). This design combines that idea with **digit-serial
arithmetic**: instead of handling a whole word per clock, every operator
handles `d` bits (one *digit*) per clock, least significant digit first. The
operators then shrink to `d` full adders plus a flip-flop, independent of the
word length, at the cost of `W/d` clock cycles per sample.

The filter here is a transposed-form FIR whose multiplier block produces
`29x` and `43x` from one shared partial product, `7x`:

```
 8x  = x << 3          3 flip-flops
 7x  = 8x - x          digit-serial subtractor
14x  = 7x << 1         1 flip-flop
28x  = 14x << 1        1 flip-flop
29x  = 28x + x         digit-serial adder
43x  = 29x + 14x       digit-serial adder
```

Three add/subtract operations and five shift flip-flops produce both
products. Built separately from their binary forms (29 = 11101b,
43 = 101011b) they would need six additions; a common-subexpression search
over the binary digits finds `3x` and `5x` and needs four. `7x` (111b) does
not appear as a digit pattern in 43, so only a search over the values
themselves (a graph-based search) finds the three-operation solution.

## Word format and framing

All streams carry two's complement words of `YW` bits (default 16), sent as
`YW/D` digits of `D` bits (default 2), so a new sample enters every 8 clocks.
An 8-bit input sample is sign-extended to 16 bits before it is serialised.
Every operation is exact modulo `2^YW`, and 16 bits hold any output of the
default filter: |y| ≤ (29+43+43+29)·128 = 18432 < 2^15.

A shared `start` signal marks the cycle that carries digit 0 of a word. It is
the only control in the datapath: every operator that holds state between
digits (a carry or shifted-out bits) replaces that state with its initial
value when `start` is high. Without it, the carry out of one word, or the
top bits shifted out of one word, would be added into the next.

## Digit-serial operators

Each operator is combinational from its input digits to its output digit,
with state only in the flip-flops that pass information from one digit to
the next. No operator adds latency, so all streams in a network stay
aligned: digit `k` of every signal is present in the same cycle.

- **`ds_add`** – `D` full adders in a ripple. The carry out of the top adder
  is stored in one flip-flop and becomes the carry in of the next digit. At
  `start` the carry in is 0.
- **`ds_sub`** – `a - b` computed as `a + ~b + 1`: `D` inverters on `b`, the
  same adder ripple, and a carry flip-flop whose value at `start` is 1,
  which supplies the `+1`.
- **`ds_lshift`** – multiplication by `2^S`. In bit-parallel hardware this is
  wiring; in a digit-serial stream it is a delay of `S` bit positions and
  costs exactly `S` flip-flops. The flip-flops hold the `S` bits of the
  stream not yet sent on; the output digit is the low `D` bits of
  `{din, held}`. Bit lane `j` of the output thus comes from lane
  `(j-S) mod D` of an earlier digit, one layer of flip-flops per bit lane.
  At `start` zeros replace the held bits, so zeros enter at the bottom of
  each word and the bits that overflowed the previous word are dropped.
- **`ds_word_delay`** – the `z^-1` element of the filter: a shift register
  one word (`YW/D` digits) long. Its output is the same digit position of
  the previous sample, so it needs no `start`.

## The filter (`fir_ds`)

In the transposed form the current sample is multiplied by every
coefficient at once (that is the MCM block, `mcm_29_43`), and the products
are accumulated along a chain of adders and delays:

```
p[3] = h[3]·x
p[k] = h[k]·x + z^-1 p[k+1]      k = 2, 1, 0
y    = p[0]
```

The default taps are `h = 29, 43, 43, 29`, a symmetric (linear-phase)
4-tap filter: `y[n] = 29x[n] + 43x[n-1] + 43x[n-2] + 29x[n-3]`. The
parameters `NTAPS` and `TAP_IS_43` (bit `k` set selects 43 for tap `k`)
choose any filter whose taps are 29 or 43. The multiplier block itself is
fixed to these two constants; other coefficient sets need a new MCM network
built from the same three operators.

Cost at the defaults (`D = 2`, `YW = 16`): MCM block 3 adders/subtractors
(6 full adders, 3 carry flip-flops) and 5 shift flip-flops; 3 accumulating
adders (6 full adders, 3 flip-flops); 3 word delays (48 flip-flops). Only the
word delays grow with the word length.

## Top level (`fir_ds_top`)

`fir_ds_top` adds a parallel sample interface around `fir_ds`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `x_in` | in | `XW` (8) | two's complement input sample |
| `x_take` | out | 1 | `x_in` is sampled at the end of this cycle |
| `y_out` | out | `YW` (16) | filter output, two's complement |
| `y_valid` | out | 1 | `y_out` holds a new sample (one-cycle pulse) |

- `digit_ctrl` counts the digits of a word and gives `start` (digit 0) and
  `last` (digit `YW/D-1`). The count restarts at digit 0 after reset, and
  an assertion checks that words follow each other with no gap.
- `ds_serializer` takes `x_in` in the `start` cycle, sends digit 0 at once
  and the rest from a shift register.
- `ds_deserializer` shifts the output digits in and loads the full word into
  `y_out` on the `last` digit.

Timing: `x_take` is high once every `YW/D` cycles (every 8 at the defaults),
starting in the first cycle after reset. The output for a sample taken in
cycle `t` is on `y_out` with `y_valid` high in cycle `t + YW/D`. The filter
starts from rest: the delays are cleared by reset.

Parameters of the top: `D` (digit size, any divisor of `YW`, from 1 for
bit-serial to `YW` for one word per clock), `XW` and `YW`. The defaults come
from `fir_ds_pkg`.

## What is fixed and what is chosen

Taken from the reference architecture: the digit-serial adder (d full adders,
one flip-flop), the subtractor (inverters, flip-flop initialised to 1), the
left shift (as many flip-flops as the shift amount, one layer per bit lane),
digit size 2, the constants 29 and 43 with the shared `7x`, the operation
count (two additions, one subtraction, five shift flip-flops), the
transposed-form filter, and the MCM block as its multiplier block.

Chosen in this design, because the reference does not give them:

- The exact network. Only `7x` and the operator counts are given; the
  network above is the only three-operation one over `7x` that also needs
  exactly five shift flip-flops.
- The filter itself: length, coefficients and their order. The reference
  evaluates a digit-serial FIR filter but does not give its coefficients,
  so the filter uses the two example constants in a symmetric 4-tap layout.
- Word lengths (8-bit samples, 16-bit serial words), the `start` framing,
  the serializer/deserializer, and reset values (carry 0 in adders, 1 in the
  subtractor, zeros in shifts and delays).
- Sum digits are not registered, so a network is one combinational path per
  digit through all its operators. For long MCM chains and a high clock rate
  pipeline registers would have to be added, with matching delays on the
  other paths.

Not included: the bit-parallel filter and the other MCM solutions (plain
shift-and-add, common-subexpression sharing) that the digit-serial design is
compared against, and the offline search that chooses the partial products
(it is a design-time algorithm, not hardware). The area (320 equivalent
gates) and power (119 mW against 160 mW for a bit-parallel filter) reported
for an FPGA implementation are not reproduced here, since the filter they
describe is not fully specified.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
whole-word arithmetic computed in the testbench:

| testbench | what it checks |
|---|---|
| `tb_ds_add`, `tb_ds_sub` | 300 word pairs at D = 2 and 4, including all-ones carry/borrow chains and carries out of the word |
| `tb_ds_lshift` | shifts of 1, 2, 3 and 5 positions on back-to-back words |
| `tb_ds_word_delay` | exact 8-cycle delay, zero output after reset |
| `tb_mcm_29_43` | 29x and 43x at D = 2 and D = 1 for random, sign-extended and extreme inputs |
| `tb_fir_ds` | the filter at D = 1, 2, 4 and 16 against the direct-form sum |
| `tb_digit_ctrl`, `tb_ds_serializer`, `tb_ds_deserializer` | framing, sign extension, word assembly and `y_valid` timing |
| `tb_fir_ds_top` | 2000 samples end to end at the default parameters, output values, the 8-cycle sample period and the 8-cycle latency |

`tb_fir_ds_top` also counts how often the datapath carries between digits,
borrows between digits, drops bits shifted past the top of a word, and drops
a carry out of a word, and how many outputs are negative and positive. It
fails if any of these never happens. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/fir_ds_pkg.sv tb/tb_fir_ds_top.sv --top-module tb_fir_ds_top
./obj_dir/Vtb_fir_ds_top
```

Replace `tb_fir_ds_top` with any other testbench name. `fir_ds_pkg.sv` must
be read first; the other modules are found through `-y rtl`. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/fir_ds_pkg.sv rtl/fir_ds_top.sv`.
Linting a single low-level module reports the package constants it does not
use as unused parameters; the top lints clean.
