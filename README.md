# Approximate radix-8 Booth multipliers

A radix-8 Booth multiplier recodes the multiplier three bits at a time into
digits from -4 to +4. An N-bit signed product then needs only ceil(N/3)
partial products instead of N. Every multiple of the multiplicand Y that a
digit can select is a shift of Y, except one: 3Y. That "hard multiple" needs a
real addition, Y + 2Y, and the carry chain of that adder is what makes
radix-8 slow and power-hungry.

This design forms 3Y with an **approximate recoding adder**. It is a chain of
2-bit adder slices in which no carry crosses more than one slice boundary.
The low bits of 3Y can then be slightly wrong, and the product inherits that
small error. In exchange the adder is short and cheap. The RTL contains:

* a sequential signed Booth multiplier, `booth_r8_mult`, built with this
  adder and instantiated at 16 and at 32 bits. Partial-product truncation can
  optionally be switched on.
* a separate 8-bit unsigned approximate multiplier, `approx_mult8`. It splits
  each operand into an accurate high half and an approximate low half.
* a top, `approx_booth_top`, that holds all three side by side.

## The approximate 2-bit recoding adder (`approx_add2`, `recoding_adder`)

`recoding_adder` sign-extends Y to N+2 bits and adds 2Y to it. The lowest
`APPROX_BITS` bits (default N/2) come from a chain of `approx_add2` slices.
The bits above them come from an ordinary exact adder. Its carry-in is the
carry-out of the last approximate slice.

Each `approx_add2` slice computes, with g = a & b and p = a ^ b:

```
s0   = p0 ^ cin
s1   = p1 ^ (g0 | p0 & cin)
cout = g1 | p1 & g0          // carry-in deliberately left out
```

The sum bits are exact for the carry-in the slice receives. The carry-out,
however, is the carry of a + b alone. So the critical path through the chain
is one 2-bit slice long, whatever N is. The slice goes wrong in only one
situation: both of its bit positions propagate (p1 & p0) and a carry
arrives. The true carry-out is then 1 but 0 is sent up, so the result is
4·4^k too small at slice k. Out of the 32 input combinations of one slice,
4 are affected.

Consequences:

* The approximate 3Y is never larger than the exact one.
* Its error is at most 4·(1 + 4 + … + 4^(S-1)) for S approximate slices. For
  the 16-bit default (S = 4) that is 340, against a 3Y of up to about 98,000.
* A product is affected only through digits of magnitude 3. A digit of +3
  gives a product slightly too small; a digit of -3 gives one slightly too
  large.
* In random testing, about 20 % of the 16-bit products differ from a·b. A
  digit j of magnitude 3 can move the product by at most 340·8^j, which is
  small relative to that digit's own contribution, 3·|Y|·8^j.

Setting `APPROX_BITS = 0` gives an exact multiplier.

## Radix-8 recoding and partial products (`booth_r8_encoder`, `booth_r8_ppg`)

Digit j is read from the quartet {x[3j+2], x[3j+1], x[3j], x[3j-1]}, with
x[-1] = 0, and its value is d = -4·x[3j+2] + 2·x[3j+1] + x[3j] + x[3j-1].
The encoder returns the digit as a `booth_digit_t` struct (package
`booth_pkg`) of a sign flag and a magnitude selector, `MAG_0` to `MAG_4`.
Quartets 0000 and 1111 both give zero with the sign cleared.

The partial product generator selects 0, Y, 2Y, 3Y or 4Y, sign-extended to
N+4 bits. For a negative digit it inverts every bit. The +1 that completes
the two's complement is not added here: it leaves as `cin` and is the carry
into the accumulation adder.

**Truncation.** The `TRUNC_BITS` parameter of `booth_r8_mult` (default 0,
off) drops the low product columns. Every partial-product bit that would land
below column `TRUNC_BITS` is forced to 0 after the inversion. A negative
digit whose +1 falls in those columns loses the +1 as well. Truncation only
ever removes value, so the product comes out too small. The error is less
than ceil(N/3)·2^TRUNC_BITS.

## Sequential datapath and controller (`booth_r8_mult`, `booth_fsm`)

The multiplier handles one digit per clock cycle. The accumulator is one
register `{acc_hi, acc_lo}`:

* `acc_lo` (3·ceil(N/3) bits) starts out holding the multiplier,
  sign-extended. Its low three bits, plus the bit shifted out just before
  them (`x_m1`), form the current quartet.
* `acc_hi` (N+4 bits) holds the running sum, aligned so that its bit 0 has
  the weight of the current digit.

Each ADD_SHIFT cycle computes `acc_hi + pp + cin` and, in the same cycle,
shifts the whole register right arithmetically by 3. As the multiplier bits
are shifted out at the bottom, finished product bits are shifted in from
above. After the last digit, the low 2N bits of the register are the product.

3Y is combinational from the multiplicand register. It is therefore ready
from the first ADD_SHIFT cycle and stays constant through the operation.

`booth_fsm` has four states:

| state     | cycles     | what happens |
|-----------|------------|--------------|
| WAIT_GO   | any        | idle until `go` is 1 |
| INIT      | 1          | load Y, clear `acc_hi`, load the sign-extended multiplier, clear `x_m1` |
| ADD_SHIFT | ceil(N/3)  | add one partial product and shift by 3; `step` = digit index |
| DONE      | 1          | `done` = 1, product complete, then back to WAIT_GO |

### Interface and timing of `booth_r8_mult`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `go` | in | 1 | start. It is sampled in WAIT_GO and ignored while `busy` |
| `a`, `b` | in | N | signed multiplicand and multiplier, sampled in the INIT cycle (the cycle after `go` is seen) |
| `p` | out | 2N | signed product |
| `done` | out | 1 | one-cycle pulse: `p` is valid |
| `busy` | out | 1 | 1 from INIT to DONE |

* Latency from the clock edge that sees `go` to `done` is ceil(N/3) + 2
  cycles: 8 for N = 16 and 13 for N = 32.
* A new operation can start the cycle after DONE.
* `p` is read directly from the accumulator. It changes while `busy` is 1
  and holds from `done` until the next INIT. Hold `a` and `b` until INIT.

Parameters: `N` (16), `APPROX_BITS` (N/2) and `TRUNC_BITS` (0).

## The 8-bit approximate multiplier (`approx_mult8`)

This is a different idea, kept as a separate unit. The two 8-bit unsigned
operands are split into 4-bit halves.

* **Control block (`am_ctrl`).** Two 4-input NORs check the high halves,
  and a NAND combines them. `ctrl` = 1 when either high half contains a 1.
* **Accurate part (`am_mult4`).** An exact 4 × 4 array multiplier, built as
  rows of AND gates summed by adders.
* **Approximate part (`am_apg`).** This part has no partial products and no
  carries. The low halves are scanned from the top bit down. At the first
  position i where either operand has a 1, product bit i+4 and every bit
  below it are set to 1. If both low halves are 0, the low byte is 0.
* **Multiplexer.** With `ctrl` = 1, the product is
  `{A_hi × B_hi, approximate low byte}`. The cross terms A_hi × B_lo and
  A_lo × B_hi are not computed at all. With `ctrl` = 0, both high halves are
  zero. The multiplexer then feeds the low halves through the same 4 × 4
  multiplier, and the product is exact.

Example: 230 × 50 (1110_0110 × 0011_0010) gives
14 × 3 = 42 = 0x2A in the high byte. The low halves 0110 and 0010 have
their first 1 at bit 2, so the low byte is 0111_1111 and the result is
0x2A7F = 10879. The exact product is 11500. This is a coarse approximation
whenever the high halves are non-zero, and an exact one otherwise.

## Top (`approx_booth_top`)

The top holds three independent units:

* a 16-bit Booth multiplier (`go16`, `a16`, `b16` → `p16`, `done16`,
  `busy16`);
* a 32-bit Booth multiplier (`go32`, `a32`, `b32` → `p32`, `done32`,
  `busy32`);
* the 8-bit approximate multiplier (`am_a`, `am_b` → `am_p`), which is
  combinational.

The two Booth multipliers share `clk` and `rst_n`. Parameters `APPROX_16`
(8), `TRUNC_16` (0), `APPROX_32` (16) and `TRUNC_32` (0) configure them.

## Choices beyond the original description

The architecture follows a published description:

* radix-8 recoding;
* 3Y formed as Y + 2Y with an approximate 2-bit adder;
* two's complement built as inversion plus a carry-in at accumulation;
* a four-state controller that adds and shifts in the same cycle;
* 16- and 32-bit signed versions, with and without truncation;
* the 8-bit accurate/approximate split multiplier, with its NOR/NAND control
  and leading-one rule.

The following points were not specified and are this implementation's own:

* **Gate equations of the 2-bit adder.** The adder was specified only by
  what it is for and what it should achieve. The "carry-out ignores
  carry-in" form above is the simplest adder that cuts the chain while
  keeping its sums exact.
* **Approximate width.** How many bits of 3Y are approximate
  (`APPROX_BITS` = N/2). The upper bits are exact.
* **Truncation depth.** How many columns are truncated (`TRUNC_BITS`,
  default 0 = the variant without truncation).
* **Control details.** The go/done/busy handshake, a one-cycle DONE,
  asynchronous active-low reset, and a product read straight from the
  accumulator.
* **Partial-product width.** N+4 bits; N+3 would suffice.
* **Recoding of 1111.** Recoded as zero with no sign (standard radix-8).
* **The 8-bit multiplier.** Operands are unsigned. Operand bit i of the low
  halves maps to product bit i+4, which reproduces the worked example above.
  The accurate part is a plain row-and-adder array multiplier.

FPGA resource, power and timing figures for the original implementation
exist. They belong to a different (FPGA-mapped) realisation and are not
reproduced or checked here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The integer
reference models of the approximate 3Y and of the digit-by-digit product,
with truncation, are in `tb/booth_ref_pkg.sv`.

Exhaustive tests:

* `approx_add2`: all 32 inputs, including the 4 inexact ones;
* the encoder;
* `am_ctrl`, `am_mult4` and `am_apg`;
* all 65,536 operand pairs of `approx_mult8`.

Random and edge-value tests:

* `recoding_adder`: exact and approximate 3Y, and the error bound;
* `booth_r8_ppg`: every digit, random truncation masks;
* `booth_fsm`: the state sequence, `step` counting, and `go` ignored while
  busy;
* `booth_r8_mult`: exact, approximate, truncated and 32-bit instances, with
  their latencies.

`approx_booth_top_tb` runs the top at its default parameters. It starts
overlapping operations on both Booth multipliers and the 8-bit unit, checks
every result and latency, and requires each mechanism to occur at least
once:

* 3Y digits;
* negative digits;
* products changed by the approximation;
* an ignored `go`;
* both modes of the 8-bit multiplier.

`approx_booth_top_trunc_tb` runs the top with truncation on: 8 columns for
the 16-bit multiplier and 16 for the 32-bit one.

What the tests do not establish: any claim about power, area or delay. The
reference models encode this implementation's reading of the adder and of
truncation, so they confirm the RTL is consistent with that reading, not
with a gate-level original.

## Simulating

Example for one testbench, from the directory that contains `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/booth_pkg.sv tb/booth_ref_pkg.sv tb/approx_booth_top_tb.sv \
    --top-module approx_booth_top_tb -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second. Lint a module with, for
example:

```
verilator --lint-only -Wall -y rtl rtl/booth_pkg.sv rtl/booth_r8_mult.sv
```

## Files

| file | content |
|------|---------|
| `rtl/booth_pkg.sv` | digit struct, magnitude and state enums, `booth_digits()` |
| `rtl/approx_add2.sv` | approximate 2-bit adder slice |
| `rtl/recoding_adder.sv` | 3Y = Y + 2Y, approximate low part, exact high part |
| `rtl/booth_r8_encoder.sv` | radix-8 recoder |
| `rtl/booth_r8_ppg.sv` | partial product select, invert, truncate |
| `rtl/booth_fsm.sv` | four-state controller |
| `rtl/booth_r8_mult.sv` | sequential N-bit approximate Booth multiplier |
| `rtl/am_ctrl.sv`, `rtl/am_mult4.sv`, `rtl/am_apg.sv` | parts of the 8-bit multiplier |
| `rtl/approx_mult8.sv` | 8-bit accurate/approximate split multiplier |
| `rtl/approx_booth_top.sv` | top |
| `tb/*_tb.sv`, `tb/booth_ref_pkg.sv` | testbenches and reference models |
