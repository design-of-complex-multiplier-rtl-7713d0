# Nikhilam complex multiplier

A (16,16)x(16,16) complex multiplier whose four real products are formed
with the Nikhilam rule of Vedic mathematics ("all from 9 and last from 10"),
taken to binary: each operand is written as a power of two plus or minus a
small residual, so that the expensive part of a product collapses into
shifts and adds, and only the product of the two residuals needs a real
multiplier. The complex result is the direct four-multiplication form

    Cr = Ar*Br - Ai*Bi
    Ci = Ar*Bi + Ai*Br

with Ar, Ai, Br, Bi unsigned 16-bit numbers.

## The identity behind each real product

Let an operand X have its leading one at bit n-1. The radix selection
picks whichever of 2^(n-1) and 2^n is nearer to X, calls its exponent k,
and the residual is z' = X - 2^k, a signed number whose magnitude is at
most a quarter of the radix. For two operands

    X = 2^k1 + z1',   Y = 2^k2 + z2',   k1 >= k2

the product rearranges to

    X*Y = 2^k2 * (X + z2' * 2^(k1-k2)) + z1' * z2'

Everything outside the last term is two shifts and one add or subtract.
The last term multiplies two residuals that are both far smaller than the
operands. The hardware keeps each residual as a magnitude z and a sign
bit. The signs steer the two adder-subtractors. The first one subtracts
when z2' is negative. The second one subtracts when the residual signs
differ.

The identity needs k1 >= k2, because 2^(k1-k2) must be an integer shift.
The `nikhilam_multiplier` therefore swaps the operands when the first one
has the smaller radix exponent. This swap multiplexer is an addition of
this design. So is the bypass that returns 0 at once when an operand is
zero, since zero has no leading one and hence no radix.

The intermediate value X + z2'*2^(k1-k2) equals Y*2^(k1-k2) and is never
negative. An assertion in `nikhilam_multiplier` states this.

## Radix selection unit

`radix_selection_unit` finds the leading one with an exponent determinant.
It then builds the two candidate radices: one shifter turns the index n-1
into 2^(n-1), an incrementer gives n, and a second shifter gives 2^n. The
`mean_determinant` adds the two candidates. A comparator checks 2X against
that sum, which is the same as checking X against the mean 1.5*2^(n-1),
and a multiplexer picks 2^n when X is above the mean and 2^(n-1)
otherwise.

Two choices here are this design's own:

- The comparison uses doubled values. The mean then needs no fraction
  bit, even when n-1 = 0.
- An operand exactly at the mean takes the lower radix. Both radices give
  the same residual magnitude in that case.

## Exponent determinant: a sequential search

The leading one is not found with a priority encoder. `exponent_determinant`
searches for it one bit per cycle:

- On `start` the word goes into a parallel-in parallel-out shift register
  and WIDTH-1 goes into a decrementer.
- Each cycle the register's MSB is examined. While it is 0, the register
  shifts left by one and the decrementer counts down.
- When the MSB is 1, both stop, and the decrementer holds the exponent.
- An all-zero word is flagged at once with `zero`.

This search makes every block above it multi-cycle, with a latency that
depends on the data. Each Nikhilam multiplier uses four determinants in
two rounds:

1. One inside each RSU, searching the operands.
2. One on each selected radix, which yields k1 and k2. These run at
   WIDTH+1 = 17 bits, because a radix can be 2^16.

## Handshake and timing

Every sequential block uses the same handshake:

- `start` is a one-cycle pulse that captures the inputs.
- `done` is a one-cycle pulse when the result is ready.
- The result then holds until the next `start`.
- `busy`, where present, is high between the two.

Reset is asynchronous and active-low.

In the table below, the clock edge that samples `start` is edge 1. The
values are worst cases for 16-bit operands; the exact formulas are in
each module's header.

| block | done is set at edge | worst case, N = 16 |
|---|---|---|
| `exponent_determinant` (W bits, leading one at e) | W - e + 1; 1 for zero | 17 |
| `radix_selection_unit` | ED + 1 | 18 |
| `nikhilam_multiplier` | R + E + 2. R is the later RSU edge, E the longer radix ED. Zero operand: R + 1 | 38 |
| `vedic_complex_multiplier` | slowest of the four products + 1 | 39 |

The four real products run in parallel. The combiner waits until all
four have reported `done` and registers Cr and Ci in the same cycle.

## Widths

- Operands are unsigned N bits. N = 16 by default (`vedic_pkg::OPERAND_W`).
- Cr and Ci are signed 2N+2 = 34 bits. Cr reaches -(2^16-1)^2 and Ci
  reaches 2*(2^16-1)^2, which needs 33 magnitude bits.
- All internal adder-subtractor and shifter words are 34 bits.
- A residual never exceeds 2^(N-2), so the residual multiplier is
  N x N with room to spare.

## Blocks and files

| file | block |
|---|---|
| `rtl/vedic_pkg.sv` | operand width and the result-width function |
| `rtl/vedic_complex_multiplier.sv` | top: four real multipliers and the Cr/Ci adder-subtractors |
| `rtl/nikhilam_multiplier.sv` | one real product: RSUs, radix EDs, residuals, swap, shifts, adds, sequencing FSM |
| `rtl/radix_selection_unit.sv` | nearest power-of-two radix |
| `rtl/exponent_determinant.sv` | sequential leading-one search (shift register plus decrementer) |
| `rtl/mean_determinant.sv` | sum of the two candidate radices |
| `rtl/residual_subtractor.sv` | residual magnitude and sign |
| `rtl/urdhva_multiplier.sv` | residual product, column by column (vertical and crosswise) |
| `rtl/left_shifter.sv` | barrel shifter |
| `rtl/add_sub.sv` | two's-complement adder-subtractor |

`urdhva_multiplier` forms the bits of product column c from all cross
products a[i]&b[c-i] plus the carry from column c-1. This is the
vertical-and-crosswise arrangement done by hand. The column carries ripple
upward, which is this design's choice.

## Where this RTL departs from, or adds to, the described design

- The described design is a transistor-level circuit characterised at
  90 nm. It was reported at about 4 ns propagation delay and 6.5 mW for
  the 16-bit complex multiplier. This is synthesizable RTL, with no timing
  or power claims. Because of the bit-serial exponent search, it takes up
  to 39 clock cycles per complex product, and each cycle is short.
- The adder-subtractors are plain two's-complement units. No special
  carry-free "Vedic" adder structure was described in enough detail to
  build one.
- The exponent determinant's shifter is a one-place shift register. The
  multi-line shifter select of the original is not reproduced.
- These parts are this design's own: the operand swap, the zero bypass,
  the handshake, the registered outputs, the doubled-mean comparison, the
  tie-breaking rule and all widths beyond the 16-bit operands.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb/vedic_ref_pkg.sv` restates in integer arithmetic the leading-one
index, the nearest radix and the cycle counts above. The sequential
testbenches check results and latencies against it.

- The combinational blocks are compared with `+`, `-`, `*` and `<<` on
  corner values and thousands of random inputs; the Urdhva multiplier is
  also checked exhaustively at 4 x 4.
- `tb_nikhilam_multiplier` covers zero, one, powers of two, values next
  to every radix mean, all ones and 1500 random pairs of mixed magnitude.
- `tb_vedic_complex_multiplier` runs the top at its default size (N = 16)
  for about 600 complex products. It checks Cr, Ci and latency, and counts
  these events:
  - upper and lower radix choices
  - operand swaps
  - zero factors
  - residual products that are added and ones that are subtracted
  - negative Cr
  - Ci above 2^32

  Any event that never occurs counts as a failure.

For every module, a deliberately broken copy was run against its
testbench, and each testbench reported failures.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/vedic_pkg.sv tb/vedic_ref_pkg.sv tb/tb_vedic_complex_multiplier.sv \
        --top-module tb_vedic_complex_multiplier
    ./obj_dir/Vtb_vedic_complex_multiplier

Replace the testbench name to run any other block's test. To change the
operand width, set `N` on `vedic_complex_multiplier` or
`nikhilam_multiplier`. The widths of all internal words follow from `N`.
