# Single-precision IEEE 754 floating-point adder

A combinational adder/subtractor for IEEE 754 binary32 numbers. It
supports:

- all four rounding modes;
- denormal numbers as inputs and as results;
- the overflow, underflow, inexact and invalid flags;
- optional overflow and underflow traps. A trapped result comes back
  with its exponent shifted by 192, so software can still use it.

The datapath is the textbook five-step addition: exponent difference,
alignment, significand addition, normalization and rounding. A stage
before it classifies the operands, and a stage after it handles special
values and exceptions. Each step is its own module, chained in the top
module `fpadd`.

## Interface

```
module fpadd (
  input  logic [31:0] a, b,      // binary32 operands
  input  logic [4:0]  ctrl,      // control field
  output logic [31:0] result,    // binary32 result
  output logic [3:0]  flags      // flag field
);
```

| `ctrl` bit | meaning |
|---|---|
| 4 | operation: 0 = `a + b`, 1 = `a - b` |
| 3 | underflow trap enable |
| 2 | overflow trap enable |
| 1:0 | rounding: `00` nearest-even, `01` toward zero, `10` toward +inf, `11` toward -inf |

| `flags` bit | flag |
|---|---|
| 3 | invalid |
| 2 | overflow |
| 1 | underflow |
| 0 | inexact |

The specification fixes the rounding-mode code, the operation bit and the
5-bit control width. The positions of the two trap enables and the order
of the flag bits are this design's own choice. The package `fpadd_pkg`
(`ctrl_t`, `flags_t`) is the place to change them.

There is no clock. `result` and `flags` settle one combinational delay
after the inputs change. Add registers around `fpadd` if you need
pipelining.

## Datapath

```
a,b ─┬─ fpadd_special ×2 ─────────────────────────────────────┐ classes
     └─ fpadd_align ─ fpadd_mantadd ─ fpadd_normalize ─ fpadd_rounder ─ fpadd_final ─ result, flags
```

The structs passed from stage to stage (`align_t`, `norm_t`, `round_t`)
are defined in `fpadd_pkg`.

**Classification (`fpadd_special`).** Each operand is decoded into these
classes: exponent field zero, zero, denormal, infinity, NaN, and
signalling NaN. A NaN counts as signalling when its fraction MSB is
clear.

**Alignment (`fpadd_align`).** For subtraction, the sign of `b` is
flipped, giving its effective sign. The operands are then ordered by
magnitude: bits `[30:0]` of each are compared as one unsigned number.
From here on the larger magnitude is always the minuend, so the adder
never produces a negative result and no negation is needed.

An exponent field of zero means a denormal or zero operand. It gets
hidden bit 0 and effective exponent 1, which puts it on the same scale as
the smallest normal numbers. The smaller 24-bit significand is placed at
the top of a 51-bit field. It is shifted right by the exponent
difference, clamped to 27.

The clamp loses nothing. Take a difference of 27 or more with a nonzero
smaller operand. The smaller operand is then below 1/8 of the larger
one's ULP, but it is still nonzero. Every rounding decision gives the
same answer for any such value. This holds even when a subtraction
borrows the larger operand down into the next binade below.

**Significand addition (`fpadd_mantadd`).** This is the subtle part.
Only the top 27 bits of each aligned significand go through the adder:
24 significand bits plus 3 extra. The bits of the smaller operand below
that window are kept in two bits:

- the guard bit is the first bit below the window;
- the pre-sticky bit is the OR of all the bits below the guard.

Both are appended below the window, so the operation is 30 bits wide:
carry, 27 window bits, guard, sticky. On subtraction, a nonzero sticky
borrows one unit, just as the discarded bits would.

The testbench checks this invariant on 50 000 random inputs. Let
`X` be the exact result. Then:

- `sum >> 1 == X >> 23`;
- `sum[0] == (X[22:0] != 0)`.

So the 30-bit result is exact down to the guard position, and it knows
whether anything nonzero lies below.

**Normalization (`fpadd_normalize`).** A carry out shifts the sum right
by one and increments the exponent. Without a carry, a priority encoder
counts the leading zeros. The sum is shifted left by that count, and the
count is subtracted from the larger exponent.

If the exponent would drop below 1, the shift is limited to
`exponent − 1`. The result is then denormal and gets exponent field 0.
With the underflow trap enabled the shift is not limited: a tiny result
is fully normalized and may get an exponent of 0 or below.

After the shift:

- the top 24 bits are the significand;
- the next bit is the round bit;
- the OR of all the bits below it is the sticky bit.

This stage also produces two flags:

- `zero`: the sum is exactly zero;
- `tiny`: the result is nonzero and below 2^-126.

**Rounding (`fpadd_rounder`).** The increment is chosen from four things:
the rounding mode, the sign, the significand LSB, and the round and
sticky bits. It is added to the packed word `{exponent, fraction}`, so a
carry out of the fraction lands in the exponent by itself. This covers
two cases:

- an all-ones significand becomes 1.0 with the exponent one higher;
- a denormal that rounds up to 2^-126 becomes the smallest normal.

Inexact is `round | sticky`.

**Final stage (`fpadd_final`).** The result is assembled in this order of
priority:

1. A NaN operand is returned with its quiet bit set. If both operands are
   NaNs, `a` is returned. Infinity minus infinity gives `0x7FC00000`. An
   infinity plus anything finite gives that infinity.
2. An exact zero takes the common sign of the operands. If the signs
   differ, it is +0, or −0 when rounding toward −inf.
3. Overflow means the rounded exponent is 255 or more. It always sets
   the overflow flag.
   - Untrapped: the result is infinity or the largest finite number,
     depending on the rounding mode and sign, and inexact is set.
   - Trapped: the exponent is returned reduced by 192 and the fraction is
     kept.
4. Underflow: a tiny result sets underflow when it is also inexact.
   - Untrapped: the denormal is returned.
   - Trapped: the flag is always set, and the normalized result is
     returned with its exponent raised by 192.

## Behaviour worth knowing

- **Invalid is raised for any NaN or infinity operand.** The
  specification asks for this, and the design follows it. IEEE 754 is
  narrower: it raises invalid only for signalling NaNs and for inf − inf.
  The change is one line in `fpadd_final` if you need strict IEEE flags.
- **Overflow is flagged whether or not it is trapped.** The
  specification can be read as flagging overflow only when it is
  trapped. IEEE 754 requires the flag in both cases, and this design
  sets it in both.
- **Trap bias.** The specification says a trapped result comes back with
  an extra bias on its exponent but does not give the value. The design
  uses 192, the IEEE 754-1985 value for single precision
  (`TRAP_BIAS` in `fpadd_pkg`).
- **Untrapped underflow cannot occur in addition.** Both operands are
  multiples of 2^-149, so any sum below 2^-126 is exact. The underflow
  flag therefore appears only with the trap enabled. The logic for the
  untrapped case is present and is tested at block level.
- **Zero plus a denormal** returns the denormal unchanged. The result is
  not normalized.
- **Signed operands.** The specification also describes a restricted
  form for two positive operands. This design handles both signs and
  subtraction in full.
- **Fixed format.** The widths (`EXP_W = 8`, `FRAC_W = 23`,
  `WIN_W = 27`) are package constants. The bit-field selections assume
  binary32, so the design is not meant to be re-parameterized to other
  formats as it stands.

## Verification

Each module has its own self-checking testbench in `tb/`. Each one ends
by printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_fpadd` | **End to end.** First five reference cases: two normals, two zeros, zero + inf, zero + denormal, zero + NaN. Then about 30 hand-worked corner cases and 400 000 random vectors over all 32 control values. The random vectors are compared with the golden model `fpadd_ref_pkg`. That model adds both operands exactly as wide integers in units of 2^-149 and rounds once. The testbench also counts the datapath situations: carry, deep cancellation, shift beyond the clamp, denormal in/out, rounding carry, overflow trapped/untrapped, trapped underflow, NaN, inf, inf − inf, zero result, inexact in each mode. It fails if any count stays at zero. |
| `tb_fpadd_special` | classes against magnitude-range comparisons |
| `tb_fpadd_align` | ordering, effective signs, and the aligned value against exact integers |
| `tb_fpadd_mantadd` | the `sum`/`X` invariant above |
| `tb_fpadd_normalize` | significand, exponent, round, sticky and tiny, derived from the sum's top bit position |
| `tb_fpadd_rounder` | each mode, worked out from a quarter-step reading of `{round, sticky}`, with explicit carry cases |
| `tb_fpadd_final` | hand-worked special, overflow and underflow results |

All of them pass. For each block, a version with a seeded bug makes its
testbench fail. Examples: a missing tie-to-even, an unclamped shift, a
sticky bit forced to 0.

What is not verified:

- timing;
- FPGA mapping;
- exhaustive operand coverage.

Coarse synthesis of the RTL (word-level cells) gives about 150 cells and
no flip-flops.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fpadd_pkg.sv tb/fpadd_ref_pkg.sv tb/tb_fpadd.sv --top-module tb_fpadd
./obj_dir/Vtb_fpadd
```

Swap `tb_fpadd` for any other testbench name to run that one. The
end-to-end run takes about a second. To use the golden model in your own
testbench, call `fpadd_ref_pkg::ref_add(a, b, ctrl)`. It returns the
expected `result` and `flags`.

## Files

- `rtl/fpadd_pkg.sv`: widths, control/flag structs, rounding-mode enum, stage structs
- `rtl/fpadd_special.sv`, `fpadd_align.sv`, `fpadd_mantadd.sv`,
  `fpadd_normalize.sv`, `fpadd_rounder.sv`, `fpadd_final.sv`: the stages
- `rtl/fpadd.sv`: top level
- `tb/fpadd_ref_pkg.sv`: exact-arithmetic golden model
- `tb/tb_*.sv`: testbenches
