# Pipelined orthogonal double-rotation lattice filter

An orthogonal double-rotation (ODR) lattice realises a recursive (IIR)
transfer function `H(z) = N(z)/D(z)` as a cascade of sections built only
from plane rotations and delays. It has short local wiring, a regular
structure and excellent behaviour with short word lengths. Its weak point
is speed. Every section closes a feedback loop through its neighbour, and a
loop can hold only the single delay that the section owns. So the sample
rate is bounded by the arithmetic in that loop, however many registers are
added elsewhere.

This RTL uses a technique that removes that bound:

1. Design the filter so that its denominator is a polynomial in `z^M`, not
   in `z`. For `M = 2` this means `D(z^2)`.
2. Split the numerator into `M` polyphase parts, `N^(i)(z)` with taps
   `n_{i+jM}`, and realise each `N^(i)(z)/D(z^M)` as its own ODR lattice.
3. In such a lattice the k-parameters of every section whose index is not
   a multiple of `M` come out as exactly zero. A rotation by `k = 0` is the
   identity, so those sections vanish and leave only their `z^-1`. Every
   loop between the remaining sections now holds `M` delays.
4. Retime the lattice. The spare delays are moved onto the return paths,
   so the longest register-to-register path becomes one section instead of
   the whole lattice.
5. Delay branch `i` by `M-1-i` samples and add the branches.

The extra speed can be spent in two ways. One is a higher sample rate. The
other is the same sample rate at a lower supply voltage, which saves power.

The defaults implement a 6th-order, 2-level pipelined filter:

```
D(z^2) = 1 - 1.7399 z^-2 + 1.2893 z^-4 - 0.3468 z^-6
N(z)   = 0.0322 + 0.0623 z^-1 + 0.0128 z^-2 - 0.0174 z^-3
       + 0.0372 z^-4 + 0.0564 z^-5 + 0.0189 z^-6
```

## One section: two rotations

Three signal lines run through the lattice:

- the **middle** line carries the input forward;
- the **top** line carries the filter output back to the left;
- the **bottom** line carries the complementary output `E(z)/D(z)` back to
  the left. `|N|^2 + |E|^2 = |D|^2` on the unit circle, so the two outputs
  together keep all the input energy.

Section `i` has two sines, `k_i1` and `k_i2`, each with its cosine
`c = sqrt(1 - k^2)`. It first rotates the top and middle lines, and then
the middle and bottom lines (`givens_rotation`, `odr_section`):

```
top_out = c1*top_in + k1*mid_in        m       = c1*mid_in - k1*top_in
bot_out = c2*bot_in + k2*m             mid_out = c2*m      - k2*bot_in
```

A `z^-1` follows on the middle line. The last section `N` reflects the end
of the middle line onto both return lines with the gains `k_N1` and
`k_N2*sqrt(1 - k_N1^2)` (`odr_termination`). Each rotation uses four
multipliers. Each output is one full-precision sum of two products, rounded
once.

## The pipelined lattice and where its registers sit

`odr_lattice` keeps only the non-zero sections, numbered `0, M, 2M, ...`.
That makes `NSEC = N/M` sections, plus the termination. For the default
branch 0 (`M = 2`, `N = 6`) the unretimed lattice is:

```
 y_out <--+---------------+---------------+---------------+
          |   section 0   |   section 2   |   section 4   |  section 6
 x_in  -->+-[rot k01]-[rot k02]-z^-2-[rot k21]-[rot k22]-z^-2-[...]-z^-2-[term]
          |               |               |               |
 e_out <--+---------------+---------------+---------------+
```

The top and bottom lines carry no delay here. The output therefore depends
combinationally on every section, through a chain of rotations that runs
the whole length of the lattice.

With `RETIME = 1` (the default) the lattice is cut at every boundary
between two non-zero sections. At each cut one delay is taken off the
middle line and one register is added to each of the two return lines. The
input and the output lie on the same side of every cut, so the
input-to-output behaviour does not change, not even in the rounding.
Afterwards:

| line at a section boundary | delays, unretimed | delays, retimed |
|----------------------------|-------------------|-----------------|
| middle (forward)           | M                 | M - 1           |
| top (return)               | 0                 | 1               |
| bottom (return)            | 0                 | 1               |

Every loop still holds its `M` delays. Every register-to-register path now
goes through at most one section, from `mid_in` through two rotations to
`mid_out`: two multiplies and two additions. Section 0 stays combinational
from `x_in` to `y_out` and `e_out`, as in the lattice itself.

For `M > 2` this design still moves exactly one delay per boundary. The
other `M - 1` stay on the middle line, where they add loop latency but do
not shorten any path. The source fixes only the two-level case. With
`M = 1` and `RETIME = 0` the module is the ordinary, non-pipelined ODR
lattice. `RETIME = 1` with `M = 1` would leave a combinational loop, and
elaboration stops with an error.

## Top level: `odr_pipelined_filter`

```
            +--> odr_lattice (branch 0: N^(0)/D(z^2)) --> z^-1 --+
 x_in -> reg|                                                    (+)--> reg -> y_out
            +--> odr_lattice (branch 1: N^(1)/D(z^2)) ----------+
                 (bottom-line outputs) ---------------------------------> reg -> e_out[i]
```

The `polyphase_combiner` delays branch `i` by `M-1-i` samples and adds the
branches. The lattice outputs are combinational from their input, so the
input and outputs are registered. The timing is:

- one input sample and one output sample every clock, with no handshake;
- `y_out(n) = sum_k h(k) * x(n - 3 - k)`, where `h` is the impulse response
  of `N(z)/D(z^2)`. The 3 cycles are the input register, the combiner's
  `z^-1` and the output register;
- `e_out[i]` is `E^(i)(z)/D(z^2)` of branch `i`, with a latency of 2 cycles;
- an active-low synchronous reset `rst_n` clears every register. This is
  the zero state of the filter.

## Coefficients

The k-parameters of the non-zero sections are in `odr_pkg` (`EX_COEF`,
`EX_TERM`). They are written as real numbers and quantised when the design
is elaborated. The cosines are computed as `sqrt(1 - k^2)` rather than
stored.

| branch | section 0 (k1, k2) | section 2        | section 4       | section 6 (k1, k2) |
|--------|--------------------|------------------|-----------------|--------------------|
| 0      | 0.0323, 0.9656     | 0.2653, -0.9034  | 0.5574, 0.9426  | 0.8932, -1         |
| 1      | 0, 0.9645          | 0.2356, -0.9072  | 0.3617, 0.8745  | 0.9180, -1         |

These come from a standard Schur-type recursion, applied offline to
`D(z^2)` and each pair `N^(i)`, `E^(i)`. The same recursion shows why
sections 1, 3 and 5 are zero: when `D`, `N` and `E` have only every `M`-th
coefficient non-zero, each reduced set of polynomials keeps that property.
Coefficient design and synthesis are not part of the hardware. For another
filter, pass new `COEF` and `TERM` arrays, of types `section_coef_t` and
`term_coef_t`, to `odr_pipelined_filter`.

In branch 1, section 0's first rotation has `k = 0`. Its four multipliers
become wires when synthesised, which leaves 48 real multipliers in the
whole filter.

## Number formats

| quantity           | format                        | parameter in `odr_pkg` |
|--------------------|-------------------------------|------------------------|
| input `x_in`       | 16-bit, 15 fractional bits    | `IN_W`                 |
| internal, outputs  | 18-bit, 15 fractional bits    | `SAMPLE_W`, `SAMPLE_FRAC` |
| k and c            | 16-bit, 14 fractional bits    | `COEF_W`, `COEF_FRAC`  |

Rounding is half up, once per rotation output. There is no saturation.
Instead, two guard bits sit above the input range. For the default filter,
the largest gain from the input to any internal node is about 1.14, and
the l1 norm of `h` is 1.45, so a full-scale input cannot overflow. If you
load other coefficients, check those two numbers for the new filter. All
word lengths are choices of this implementation. The source only notes
that orthogonal sections tolerate short words.

## Low-power use

When the higher clock rate is not needed, the filter can run at the
original sample rate. Each section then has twice the time it needs, and
the supply can be lowered until the delay of one section again fills the
clock period. The worked case compares this filter (48 multipliers) with a
non-pipelined 3rd-order ODR filter (26 multipliers) at 5 V, with a 0.5 V
threshold. The supply drops to 2.94 V, and the power becomes
`(48/26) * (2.94/5)^2 = 0.638` of the original. That is a property of the
supply and the process. The logic is the same module.

## Files

| file                        | contents |
|-----------------------------|----------|
| `rtl/odr_pkg.sv`            | formats, coefficient structs, default k-parameters, rounding |
| `rtl/givens_rotation.sv`    | one plane rotation (4 multipliers, 2 adders) |
| `rtl/odr_section.sv`        | double-rotation section |
| `rtl/odr_termination.sv`    | last section |
| `rtl/delay_line.sv`         | `z^-1` chains (DEPTH 0 is a wire) |
| `rtl/odr_lattice.sv`        | pipelined, optionally retimed lattice of one branch |
| `rtl/polyphase_combiner.sv` | branch delays and sum |
| `rtl/odr_pipelined_filter.sv` | top level |
| `tb/odr_model_pkg.sv`       | bit-accurate model of the unretimed lattice |
| `tb/*_tb.sv`                | self-checking testbenches, one per module |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each one has a
watchdog. The main ones:

- `odr_lattice_tb` runs four lattices against a bit-accurate model of the
  unretimed lattice, and requires equality on every cycle. The four are:
  branch 0 retimed, branch 1 unretimed, `M = 3` retimed, and `M = 1`
  (plain lattice). This proves that the retiming changes neither the
  results nor the timing. It also compares the impulse response of
  branch 0 with the direct forms `N^(0)/D` and `E^(0)/D`, to within 5e-4.
  For all four lattices, the energy of the impulse response at the two
  outputs must equal the input energy to within 0.2 %. This is the
  lossless property of the orthogonal structure.
- `odr_pipelined_filter_tb` runs the top at its default parameters. It
  compares `y_out` and `e_out` bit for bit with two lattice models plus the
  combiner. It compares `y_out` with the direct form `N(z)/D(z^2)`: to
  within 5e-4 for the impulse response, and to within 2.5e-3 for 4000
  random samples. That bound comes from the four-digit coefficients. It
  also checks the 3-cycle latency and that a new output appears every
  clock. It counts taps from both branches and the zero odd-lag taps of
  the complementary outputs.
- `givens_rotation_tb`, `odr_section_tb` and `odr_termination_tb` compare
  the arithmetic with floating-point rotations. `givens_rotation_tb` also
  checks that energy is kept. `delay_line_tb` and `polyphase_combiner_tb`
  check the delays and the sums.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  --top-module odr_pipelined_filter_tb \
  rtl/odr_pkg.sv tb/odr_model_pkg.sv tb/odr_pipelined_filter_tb.sv
./obj_dir/Vodr_pipelined_filter_tb
```

For the other testbenches, change the top module and the last file. Only
the lattice and top-level testbenches need `tb/odr_model_pkg.sv`.

## Where this implementation makes its own choices

- **Register placement.** The source says only that the two delays in each
  loop can be spread out to halve the critical path. The cut-set placement
  described above is this design's own. So are the registers on the input
  and outputs.
- **Delay position in the first section.** One published drawing of the
  example puts the first pair of delays before the last rotation branch of
  section 0. The generic section drawing, and the other sections of the
  example, put it after that branch. This design uses the generic form,
  which reproduces the published transfer function.
- **Word lengths, rounding, reset.** All are this design's own (see above).
- **Complementary outputs.** The `E/D` outputs are brought out, not
  combined.
- **Rotations.** They use multipliers. A CORDIC rotator is a known
  alternative for ODR sections, and it could replace `givens_rotation`
  behind the same ports. It is not provided.
- **Not timed.** The critical-path gain is argued from the structure.
  Synthesis timing has not been run.
