# VPIAC — a variable-precision, interval arithmetic coprocessor

Floating-point numbers of fixed width (IEEE double) are not precise enough for some
problems, and software multi-precision libraries are slow. Interval arithmetic has
a different problem: each operation needs two results, each rounded in a different
direction, so in software it costs at least twice as much as point arithmetic.

This coprocessor handles both. It works on **variable-precision numbers**, whose
significand is 1 to 32 words of M bits (32 to 1024 bits for M = 32). It runs
interval operations directly in hardware. Every result is computed **exactly** in
a wide fixed-point **long accumulator**, then rounded once in the requested
direction. Dot products are therefore exact until the final rounding.

The RTL is parameterised by the word size M. The default is the 32-bit design
(M = 32), a compromise between area and speed. M = 16 and M = 64 are the other
two sizes the design is meant for. They are selected by the parameter and are
simulated by smaller tests.

## Number format

A number is a 32-bit **header** plus L+1 **significand words**:

| header bits | field | meaning |
|---|---|---|
| 31:16 | exponent | biased by 32768 |
| 15 | sign | 1 = negative |
| 14:13 | type | 0 normal, 1 zero, 2 infinity, 3 NaN |
| 12:8 | length L | the significand has L+1 words |
| 7:0 | index | address of the most significant significand word |

- The significand is normalised as 1.xxx. The binary point follows the top bit of word 0.
- The value is (−1)^sign × 1.f × 2^(exponent − 32768).
- The index says where the significand words sit in the significand memory.
- Several numbers can share storage, and a result may be written into the
  significand area that its destination header already points at.
- The field widths are the published ones. The bit order, the type codes and the
  instruction encodings are choices of this design, fixed in `rtl/vpiac_pkg.sv`.

An **interval** [a, b] uses two consecutive registers: r holds the lower end and
r+1 the upper end.

## Block structure

```
 host ──► vpiac ─┬─ vp_interval_seq   instruction -> sequence of point micro-ops
                 ├─ vp_dp_ctrl        executes one micro-op
                 │    ├─ vp_multiplier  M x M, two stages (reduce, final add)
                 │    ├─ vp_selector    word alignment / comparison
                 │    ├─ vp_exp_unit    16-bit exponent add/sub/compare
                 │    ├─ vp_long_acc    64 x 2M-bit accumulator with flags
                 │    │    ├─ vp_adder, vp_shifter
                 │    └─ vp_divsqrt     bit-serial divide / square root
                 ├─ vp_header_mem     64 x 32   (2 read, 1 write)
                 └─ vp_signif_mem     256 x M   (2 read, 1 write)
```

`vp_regfile` is the generic two-read, one-write memory behind both register-file
memories. Reads are combinational and writes are synchronous.

## The long accumulator (the hard part)

`vp_long_acc` holds 64 segments of 2M bits as one two's-complement fixed-point
number, 4096 bits for M = 32. Each operation adds one 2M-bit addend at a bit
position chosen by the controller:

1. `vp_shifter` aligns the addend to a segment boundary and splits it over two
   adjacent segments.
2. `vp_adder` adds the two pieces into those segments, with the carry passed
   between them.
3. A carry or borrow out of the upper segment must travel further up. That could
   take up to 64 cycles. Instead, each segment carries a 2-bit flag: all zeros,
   all ones, or neither. A priority search over the flags finds the nearest
   segment above that is not all ones. The segments in between are marked all
   zeros by flipping their flags, without rewriting their data, and the found
   segment gets +1. This takes one extra cycle.
4. A borrow does the same in the other direction.
5. When a segment is read, its flag overrides the stored data. A segment marked
   all zeros or all ones reads as that constant.

So an addition takes a fixed small number of cycles, whatever the length of the
carry chain.

The controller uses the accumulator for everything:

- **Add/subtract:** both significands are added in, each with its own sign.
- **Multiply:** M × M partial products are added at position (i+j)·M, least
  significant column first. A square forms only the products with i ≤ j and adds
  the off-diagonal ones at twice their weight.
- **Dot product:** `MAC` adds a product without clearing first, and `ACCRND`
  rounds the total.

**Rounding** works directly on the accumulator:

1. Find the leading one of the magnitude. The sign and the lowest non-zero
   segment come from the flags.
2. Take the last kept bit, the guard bit and a sticky bit (the OR of everything
   below).
3. If the rounding mode says so, add one unit in the last place inside the
   accumulator.
4. Find the leading one again, because rounding may have carried into a new top
   bit.
5. Write out the L+1 words after the leading one.

All four IEEE directions are supported: nearest-even, toward zero, up (+∞) and
down (−∞). Exponent overflow gives ±∞ and sets `exc_ovf`. Underflow gives zero and
sets `exc_unf`. An exact zero result is +0.

## Division and square root

`vp_divsqrt` loads both significands, then produces one result bit per cycle:

- **Division** uses restoring division.
- **Square root** uses the restoring digit recurrence with trial value 4Y+1. The
  radicand is doubled when the exponent is odd.

(prec+1)·M + 2 bits are produced. A non-zero remainder adds a sticky one below
them. The bits go into the cleared accumulator, and the normal rounding path
makes the result correctly rounded in all four modes.

Special cases:

- 0/0, ∞/∞ and the square root of a negative number give NaN and set `exc_inv`.
- x/0 gives ∞.
- x/∞ gives 0.

**Departure:** the reference design uses a short-reciprocal division and a
similar square-root method, but does not give their steps. This unit is the
simplest correct replacement. It is much slower for long operands: about
(n+1)·32 cycles instead of roughly 3n² cycles. For 1–4 words this is 53/89/123/165
cycles for division, against a target of 27/40/59/84.

## Interval operations

`vp_interval_seq` turns each interval instruction into a short program of point
micro-ops. Both ends are computed with directed rounding: the lower end rounds
down (written ∇ below) and the upper end rounds up (Δ).

| instruction | how it runs |
|---|---|
| `X_ADD`, `X_SUB` | two additions, down and up |
| `X_MUL` | the signs of the four endpoints select which endpoint pair forms each end, so only 2 multiplications are needed. The exception is when both factors contain zero in their interior: then four products are formed and compared through scratch register 63. |
| `X_SQR` | the sign of each end selects [a², b²], [b², a²] or [0, max] |
| `X_DIV` | a sign table selects the end pairs, as for multiplication. A divisor containing 0 gives a half-line or [−∞, +∞] (see below). |
| `X_SQRT` | square root of each end. A negative end gives NaN. |
| `X_HULL`, `X_ISECT` | min/max by comparison. An empty intersection sets `empty`. |
| `X_MID`, `X_WID` | (a+b)/2 by an exponent decrement; b−a rounded up |
| `X_DOTLO`, `X_DOTHI` | accumulator += lower (upper) end of X·Y, exact |
| `X_EQ`, `X_SUBSET`, `X_SUPSET`, `X_INSIDE`, `X_DISJ` | two comparisons; the outcome is on `rel` |

Definitions of the relational operators:

- equal: a = c and b = d
- subset: c ≤ a and b ≤ d
- superset: a ≤ c and d ≤ b
- interior: c < a and b < d
- disjoint: b < c or d < a

**Interval dot product.** The host issues the following sequence:

1. `P_ACCCLR`, then `X_DOTLO` for each term, then `P_ACCRND` rounding down. This
   gives the lower end.
2. The same again with `X_DOTHI` and rounding up. This gives the upper end.

A term whose two factors both straddle zero needs the smaller (larger) of two
products:

1. The running sum is saved in register 61, rounded to 32 words.
2. The two candidates are formed in registers 62 and 63.
3. The chosen candidate and the saved sum are added back.

Such a term is exact only when its values fit in 32 words. All other terms are
exact. **Registers 61–63 are therefore scratch during interval instructions and
must not hold user data.**

**Division by an interval that contains zero** uses extended interval
arithmetic, as far as one register pair can hold the result:

- If 0 is one end of Y and X does not contain 0, the quotient is a single
  half-line:
  - X > 0, Y = [0, d] gives [∇(a/d), +∞].
  - X > 0, Y = [c, 0] gives [−∞, Δ(a/c)].
  - X < 0, Y = [0, d] gives [−∞, Δ(b/d)].
  - X < 0, Y = [c, 0] gives [∇(b/c), +∞].
- In every other case the result is [−∞, +∞]. That covers 0 inside Y (two
  half-lines), Y = [0, 0], and 0 in X. [−∞, +∞] is the hull of the two pieces,
  so the result is still a valid enclosure.

## Host interface

Register-file access while `busy` is low:

- Write a header with `hdr_we`/`hdr_addr`/`hdr_wdata`, or a significand word with
  `sig_we`/`sig_addr`/`sig_wdata`.
- Read back on `hdr_rdata`/`sig_rdata` (combinational).

Issuing an instruction:

1. Present `op`, `dst`, `srca`, `srcb`, `rmode` and `prec` (the length field L of
   the result) with `start` for one cycle.
2. `busy` stays high until `done` pulses.
3. Status outputs:
   - `cmp_res` (LT/EQ/GT/unordered)
   - `empty`
   - `rel`
   - `inexact`, `exc_ovf`, `exc_unf`, `exc_inv`

Two assertions in `vpiac` check the handshake rules: the data path starts only
inside an instruction, and the host does not write while `busy` is high.

Point instructions:

- `P_ADD`, `P_SUB`, `P_MUL`, `P_SQR`, `P_DIV`, `P_SQRT`
- `P_MOV`, `P_CMP`
- `P_ACCCLR`, `P_MAC`, `P_ACCRND`

A short multiplication (one-word multiplier) needs no separate instruction: give
the multiplier L = 0.

## Cycle counts

The design follows the reference algorithms but does not overlap its steps, so it
needs more cycles than the target counts. Measured in `tb_vpiac` and `tb_vp_workloads`
(n is the number of 32-bit words):

| operation | this RTL | target |
|---|---|---|
| add | 17–25 | 2n + 8 |
| multiply | 16 / 30 / 56 / 92 | n² + n + 12 |
| divide | 53 / 89 / 123 / 165 | 3n² + 4n + 20 |
| square root | 52 / 91 / 125 / 160 | 3n² + 6n + 26 |
| 16-term dot product, n = 2 / 4 | 479 / 1473 | 344 / 732 |
| interval Newton step, n = 2 / 4 | 1226 / 2034 | 672 / 1158 |

Each accumulator addition takes three cycles (align, add, resolve the carry) and
does not overlap the next one. The sequencer adds a few cycles per interval
instruction. The testbench prints these counts and checks them against bounds
that follow from this schedule, not against the targets.

## Capacity

The register file holds 64 numbers and 256 significand words. What fits:

- A 16-term point dot product at 64 or 128 bits fits entirely.
- At 256 bits and above, the operands of a 16-term dot product no longer fit at
  once. The host must reload operands between `MAC` instructions.
- A 16-term interval dot product needs more than 64 headers at every precision.
- A 20-term Horner polynomial fits up to 256 bits (point) or 128 bits (interval).
- One interval Newton step for a small function (about 30 numbers) fits up to
  256 bits.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/vp_ref_pkg.sv` is an
independent reference model. It does exact arithmetic on wide integers and
rounds them, and the testbenches compare against it.

Example with plain Verilator 5, for the end-to-end test:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/vpiac_pkg.sv tb/vp_ref_pkg.sv \
  rtl/vp_regfile.sv rtl/vp_header_mem.sv rtl/vp_signif_mem.sv \
  rtl/vp_multiplier.sv rtl/vp_adder.sv rtl/vp_shifter.sv rtl/vp_selector.sv \
  rtl/vp_exp_unit.sv rtl/vp_long_acc.sv rtl/vp_divsqrt.sv \
  rtl/vp_dp_ctrl.sv rtl/vp_interval_seq.sv rtl/vpiac.sv \
  tb/tb_vpiac.sv --top-module tb_vpiac -o sim
./obj_dir/sim
```

For another testbench, change `--top-module` to `tb_vp_long_acc`,
`tb_vp_interval_seq`, `tb_vp_dp_ctrl`, `tb_vp_divsqrt` and so on. The block
testbenches need `vpiac_pkg.sv`, `vp_ref_pkg.sv` and the files of their block.

`tb_vpiac` runs the top at its default parameters. It covers:

- random point operations in all rounding modes, checked against the reference
  model
- special values
- interval add, sub, mul (all nine sign cases), square, div, sqrt, hull,
  intersection (including empty), midpoint and width
- interval dot products
- the relational operators

It counts how often each mechanism happens and fails if one never does:

- accumulator carries and borrows
- flag toggles
- rounding increments, and increments that carry into a new leading bit
- overflow
- each interval case

`tb_vp_workloads` runs three kernels the design is meant for, at 64 and 128
bits:

- a 16-element dot product (`P_ACCCLR`, 16 × `P_MAC`, `P_ACCRND`), in all four
  rounding modes. It takes 479 and 1473 cycles, against a target of 344 and 732.
- a degree-20 polynomial by Horner's rule (`P_MUL`, `P_ADD`), in all four
  rounding modes.
- eight steps of the interval Newton method for f(x) = 10x² − 5x + 3√x − 17,
  using only interval instructions. The enclosure must hold the root at every
  step and end narrower than 1e-15. One step takes 1226 and 2034 cycles,
  against a target of 672 and 1158.

`tb_vpiac_m16` and `tb_vpiac_m64` build the top with M = 16 and M = 64. They
check add, sub, mul, div, sqrt and a dot product on random integers, whose
results are exact, and the two directed roundings of 1/3.

`tb_vp_interval_seq` drives the sequencer against a small integer model of the
data path. That lets it check every micro-op program, including the
interval-division sign table.

## Known limitations

- The random full-precision tests run only at M = 32. M = 16 and M = 64 are
  covered by `tb_vpiac_m16` and `tb_vpiac_m64`, which check exact integer
  results and directed rounding of 1/3.
- Division and square root take about one cycle per result bit, not the
  reference method's cycle count.
- None of the cycle counts reach the targets (see above).
- Multiplication forms every partial product. A cheaper scheme that skips low
  partial products and still rounds correctly is not implemented.
- Extended interval division that gives two half-lines returns their hull [−∞, +∞].
- Registers 61–63 are scratch during interval instructions.
- An interval dot-product term where both factors straddle zero is rounded at 32
  words.
- There is no instruction fetch: the host presents one decoded instruction at a
  time.
- Pipeline latches, pads and the host processor are not part of the RTL.
