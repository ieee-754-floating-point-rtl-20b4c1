# Pipelined binary32 multiplier with a radix-4 Booth significand multiplier

This is a single-precision (IEEE-754 binary32) floating-point multiplier built
as a three-stage pipeline. It accepts one operand pair per clock and delivers
the rounded product three clocks later, with overflow and underflow flags.
The expensive part, the 24 x 24-bit significand product, is a radix-4
(modified) Booth multiplier. Booth recoding halves the number of partial
products. Carry-save adders then sum those rows without carry propagation,
and a single ripple-carry adder resolves the final carries. The same
carry-save/ripple-carry adder also computes the exponent sum.

The architecture follows a published Spartan-3E design with the same
structure. That source leaves rounding, exceptional operands and several
widths open; the choices made here are listed in
[Choices and departures](#choices-and-departures).

## The number format and what the multiplier computes

A binary32 word holds the sign in bit 31, a biased exponent E in bits 30..23
and a fraction F in bits 22..0. For 0 < E < 255 the value is
(-1)^S * 1.F * 2^(E-127). The product of A and B is therefore:

* sign: S_A xor S_B
* exponent: E_A + E_B - 127 (the bias counted twice, minus once)
* significand: 1.F_A * 1.F_B, a number in [1, 4), which may need one right
  shift (and an exponent increment) to return to [1, 2)

The significand is then rounded to 24 bits (23 stored). If rounding carries
out (1.111...1 rounds up to 10.0), it is normalised again. Last, the
exponent is checked against the representable range 1..254.

## The pipeline

```
 inA, inB
    |
 [stage 1]  check_zero ............................ zero flag
    |  REG: operands + zero
 [stage 2]  check_sign | add_exponent | mantissa_multiplier
    |  REG: sign, exponent, zero   (product register inside the Booth core)
 [stage 3]  normalize_round
    |  REG: out, overflow, underflow
```

| edge | register loaded |
|------|-----------------|
| 1 | both operands and the zero flag (`stage1_t`) |
| 2 | product sign, 10-bit signed exponent, zero flag (`stage2_t`); the 48-bit significand product inside the Booth multiplier |
| 3 | `out`, `overflow`, `underflow` |

A pair applied before rising edge *n* appears on the outputs after edge
*n + 2*, three edges in all. A new pair can enter every cycle. There is no
reset and no valid signal. The outputs are meaningless until the first
operands have passed through, so a user that needs one should run a 3-deep
valid bit alongside.

**Zero operands.** Stage 1 raises `zero` when either operand has a zero
exponent field. The flag then travels with the data. It makes the exponent
adder pass 0 and forces both Booth operands to 0, so the multiplier does not
switch. Stage 3 then outputs +0 with no flag.

## The significand multiplier

This is the largest block (about 95 % of the logic) and the least obvious.

**Operand preparation** (`mantissa_multiplier`). The hidden one is put back
in front of each fraction, giving 24-bit significands. Booth recoding treats
its multiplier as two's complement, so a 24-bit unsigned value needs a zero
above it to stay positive, and one more bit to make the width even. The
Booth core is therefore 26 x 26 bits signed with a 52-bit product. Only the
low 48 bits can be non-zero. The binary point sits between bits 46 and 45.

**Recoding** (`booth_encoder`). The multiplier b is read in 13 overlapping
groups {b[2i+1], b[2i], b[2i-1]}, with b[-1] = 0. Each group selects a digit
d_i in {-2, -1, 0, +1, +2}:

| b[2i+1] b[2i] b[2i-1] | digit |
|---|---|
| 000, 111 | 0 |
| 001, 010 | +1 |
| 011 | +2 |
| 100 | -2 |
| 101, 110 | -1 |

so that b = Σ d_i·4^i. The digit is given as three lines: `one`, `two` and
`neg`.

**Partial products** (`booth_multiplier`). Row i is d_i·a. The magnitude
is a or 2a, 27 bits wide. It is sign-extended to 52 bits and shifted left
by 2i. A negative digit is applied by inverting the magnitude (one's
complement). The missing +1 of each inverted row is gathered, at bit 2i, into
one extra *correction row*. That makes 14 rows of 52 bits. Their sum modulo
2^52 is exactly the signed product, because a 26 x 26 signed product always
fits in 52 bits. So no sign-extension tricks are needed beyond the plain
extension.

**Summation** (`csa_adder`, `csa`, `rca`, `full_adder`). The 14 rows are
reduced by a chain of 12 carry-save rows. Each row is a 3:2 compressor made
of 52 independent full adders: it takes the running sum word, the running
carry word (shifted left by one) and the next row, and returns a new sum/carry
pair. No carry propagates across bit positions within a row. One 52-bit
ripple-carry adder then adds the final pair, and its result is registered.

The chain is deliberately simple. Its depth is 12 full-adder delays plus a
52-bit ripple. A Wallace or Dadda tree (about 5 levels) and a faster final
adder would shorten the stage-2 path a lot. Both can replace `csa_adder`
without changing its interface: `ops` in, `sum` out, modulo 2^W.

## Exponent path, normalisation and rounding

`add_exponent` forms E_A + E_B + (-127) as a three-operand sum. It uses the
same `csa_adder` (one carry-save row plus a 10-bit RCA), all in 10-bit two's
complement. The value lies in -127..383. It stays signed until stage 3 so
that out-of-range results can be seen.

`normalize_round` does the following:

1. **Normalise.** If product bit 47 is set (significand ≥ 2), take bits
   47..24 and increment the exponent. Otherwise take bits 46..23.
2. **Round to nearest, ties to even.** The next lower bit is the guard bit
   and the OR of all bits below it is the sticky bit. The result rounds up
   when guard & (sticky | lsb).
3. **Renormalise.** If the 24-bit increment carried out, the significand is
   1.000...0 and the exponent is incremented once more.
4. **Range check** on the final biased exponent e.
   * e ≥ 255 raises `overflow`, and the result is ±infinity.
   * e ≤ 0 raises `underflow`, and the result is ±0.
   * Otherwise the result is {sign, e[7:0], fraction}.

## Files

| file | role |
|------|------|
| `rtl/fp_pkg.sv` | field widths, bias, `fp32_t`, stage register structs |
| `rtl/fpmul_pipelined.sv` | top: the three stages and their registers |
| `rtl/check_zero.sv` | stage 1: zero-operand flag |
| `rtl/check_sign.sv` | stage 2: product sign |
| `rtl/add_exponent.sv` | stage 2: E_A + E_B - 127 with the CSA adder |
| `rtl/mantissa_multiplier.sv` | stage 2: significand preparation around the Booth core |
| `rtl/booth_multiplier.sv` | N x N radix-4 Booth multiplier, registered product (N = 26) |
| `rtl/booth_encoder.sv` | recoding of one 3-bit group |
| `rtl/csa_adder.sv` | multi-operand adder: carry-save chain + RCA (default 4 operands, 4 bits) |
| `rtl/csa.sv` | one 3:2 carry-save row |
| `rtl/rca.sv` | ripple-carry adder (default 4 bits) |
| `rtl/full_adder.sv` | generate/propagate full adder |
| `rtl/normalize_round.sv` | stage 3: normalise, round, range check, pack |

The parameters are `booth_multiplier.N` (even), `csa_adder.NOPS`/`W`,
`csa.W` and `rca.N`. The binary32 widths in `fp_pkg` are fixed by the
format.

## Choices and departures

These points are not fixed by the reference design and were decided here:

* **Rounding.** The reference only says the significand is rounded. This
  design uses round to nearest, ties to even.
* **Overflow and underflow results.** The flags are raised when the final
  biased exponent is ≥ 255 or ≤ 0. The returned value is then ±infinity or
  ±0. No subnormal results are produced.
* **Special operands.** An exponent field of 0 counts as zero, so
  subnormal inputs are flushed to zero. Infinity and NaN inputs
  (exponent 255) get no special handling: 255 is used as an ordinary
  exponent and normally ends in an overflow. The sign of a zero result is
  always +.
* **Registers.** The stage boundaries follow the reference. Where each
  register sits, the internal formats (10-bit signed exponent, 48-bit
  product) and the lack of a reset are choices of this design. The port list
  matches the reference's: clock, two 32-bit operands, a 32-bit result and
  two flags.
  This RTL holds 159 flip-flop bits after synthesis, while the reference
  reports 193 for its pipelined version. Its exact register contents are
  not known.
* **Adder arrangement.** The reference says the partial products are summed
  with carry-save adders and a ripple-carry adder. The chain order and the
  one's-complement-plus-correction-row handling of negative rows were chosen
  here.
* **Variant not built.** The reference also reports a version with no
  pipeline registers, for comparison. It is not included. Removing the
  stage-1/2 registers and the Booth output register from this RTL gives that
  variant.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends with a watchdog.

* Small blocks are checked exhaustively: full adder, 4-bit RCA (plus random
  52-bit), 4-bit CSA row, 4-operand adder (plus random 14 x 52-bit and
  3 x 10-bit), Booth encoder, sign, and every exponent pair.
* `tb_booth_multiplier` checks 26 x 26 signed corner and random products.
  It also checks that the product appears exactly one cycle after the
  operands.
* `tb_normalize_round` checks the rounding and range logic against an
  integer-division model. The cases include exact ties, rounding carries and
  both ends of the exponent range.
* `tb_fpmul_pipelined` is the end-to-end test at the default configuration,
  run with one operand pair per cycle:
  * 30,000 operand pairs plus the six published example pairs, e.g.
    0xC1900000 x 0x41180000 (-18 x 9.5) = 0xC32B0000 (-171).
  * Expected results come from exact double-precision multiplication and
    separate rounding, and each result must arrive three cycles after its
    operands.
  * It counts zero operands, normalising shifts, round-ups, rounding carries,
    overflows and underflows, and fails if any of them never occurs.

To run one with Verilator (from the project root):

```
verilator --binary --timing --top-module tb_fpmul_pipelined \
    -y rtl -y tb +libext+.sv -Irtl rtl/fp_pkg.sv tb/tb_fpmul_pipelined.sv
./obj_dir/Vtb_fpmul_pipelined
```

Replace the top module name to run another testbench. All the testbenches
finish within seconds.

**Not verified:** timing and area on any technology (the reference reports
about 160 MHz on a Spartan-3E for its pipelined version; this RTL has not
been placed and routed), and IEEE conformance for NaN, infinity and subnormal
operands, which the design does not claim.
