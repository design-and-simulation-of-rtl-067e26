# Pipelined IEEE-754 double precision adder/subtractor and multiplier

Two floating point units for 64-bit IEEE-754 doubles, each built as a
three-stage pipeline so that a new operand pair can be issued on every clock:

* `fpu_addsub` adds or subtracts (`fpu_op` = 0 / 1) in one shared datapath;
* `fpu_mul` multiplies, splitting the 53 x 53-bit significand product into
  ten small products sized for FPGA DSP multipliers (25 x 18).

Both support the four IEEE rounding modes, denormal operands and results,
infinities, NaNs and exponent overflow. `fpu_top` places the two units side
by side on one clock and reset.

## Number format and rounding modes

A double is `{sign, exponent[10:0], fraction[51:0]}`, exponent bias 1023. A
normal number has an implicit leading 1 in front of the fraction. An exponent
field of 0 means zero or a denormal. A denormal has a leading 0 and the same
scale as exponent 1. An exponent field of 2047 means infinity or NaN.

| `rmode` | mode |
|---|---|
| 00 | round to nearest, ties to even |
| 01 | round towards zero (truncate) |
| 10 | round up, towards +infinity |
| 11 | round down, towards -infinity |

## Pipeline and handshake

```
            edge c               edge c+1            edge c+2
 opa,opb -> [pre-normalise] -> s1 -> [core] -> s2 -> [post-normalise + round] -> out, ready
```

Each unit has three stages, and each stage ends in a register:

1. **Pre-normalise**: unpack the operands and bring them to a form the core can use.
2. **Arithmetic core**: add, subtract or multiply the significands.
3. **Post-normalise**: normalise the result, round it and pack it as an IEEE double.

Timing:

* `enable` marks a valid operand pair at a rising clock edge c.
* The result appears in `out` (`outfp` for the multiplier) on edge c+2, with `ready` high for that one cycle.
* Counted in clock cycles, including the cycle in which the operands are presented, the latency is three cycles.
* `enable` may stay high: one result comes out per clock, in issue order. There is no back-pressure.
* Between results, the output register keeps the last value.
* `rst` is synchronous and active high. It clears `out` and `ready` and drops every operation in flight.

Ports of `fpu_addsub`: `clk, rst, enable, rmode[1:0], fpu_op, opa[63:0],
opb[63:0]` in, `out[63:0], ready` out. `fpu_mul` has the same ports except that it
has no `fpu_op` and its result is called `outfp`. These lists give 199 and 198
I/O pins, which match the pin counts reported for the original FPGA build.

## Adder/subtractor datapath

* **Stage 1.** Subtraction flips the sign of `opb`, and from then on both operations use
  the same path. The two operands are ordered by magnitude. The 63 bits below the sign
  order like unsigned integers, so one comparison is enough. The smaller operand's
  53-bit significand, extended by three zero bits (guard, round, sticky), is shifted right
  by the exponent difference. All bits shifted out are ORed into the sticky bit. A
  difference of 56 or more leaves only the sticky bit. NaN and infinity cases are
  flagged here and carried down the pipeline.
* **Stage 2.** If the signs are equal, the aligned significands are added; otherwise the
  smaller one is subtracted from the larger. The result is a 57-bit sum, never negative.
* **Stage 3.** Several cases are handled here:
  * **Fraction overflow:** when the sum reaches bit 56, it is shifted right once and the exponent goes up by 1.
  * **Unnormalised fraction:** it is shifted left by its leading-zero count. The shift is
    limited so that the exponent does not go below 1, which gives a denormal result
    instead of underflowing.
  * **Exact zero:** it becomes +0, or -0 in round-down mode. When both operands have the
    same sign it keeps their sign, so (-0) + (-0) = -0.
  * **Everything else** goes to the rounding step.

## Multiplier datapath

* **Stage 1.** The significands, with their leading bits, go into the 53-bit registers
  `mul_a` and `mul_b`. The biased exponents are added and 1022 is subtracted. A
  denormal counts as exponent 1. The result is the biased exponent the product would
  have if its leading one were in bit 105 of the 106-bit product. The result sign is
  the XOR of the two operand signs. NaN (including inf x 0), infinity and zero are
  flagged.
* **Stage 2 (`mul_core`).** The product is built from ten partial products:

  | product | mul_a bits | mul_b bits | weight |
  |---|---|---|---|
  | a | 23:0  | 16:0  | 2^0  |
  | b | 23:0  | 33:17 | 2^17 |
  | c | 23:0  | 50:34 | 2^34 |
  | d | 23:0  | 52:51 | 2^51 |
  | e | 40:24 | 16:0  | 2^24 |
  | f | 40:24 | 33:17 | 2^41 |
  | g | 40:24 | 52:34 | 2^58 |
  | h | 52:41 | 16:0  | 2^41 |
  | i | 52:41 | 33:17 | 2^58 |
  | j | 52:41 | 52:34 | 2^75 |

  Each partial product is added in turn to the running sum of the ones before it. The
  chain is combinational and fits inside the core stage. Whether the partial products
  map onto DSP blocks is left to the synthesis tool.
* **Stage 3.** If both operands are normal, the product's leading one is in bit 105 or
  bit 104, so at most a one-bit left shift is needed. Denormal operands can need more,
  so the shift uses the leading-zero count, and is limited at exponent 1 as in the adder.
  If the exponent is below 1, the product is shifted right by `1 - exponent` instead.
  The result is then a denormal with exponent field 0, and the bits shifted out go into
  the sticky bit. The top 53 bits, a guard bit and a sticky bit make up the 56-bit
  word `product_7` that goes to the rounding step.

## Rounding step (`fpu_round`)

Both units use the same combinational rounding and packing logic. Its input is:

* the sign;
* a signed exponent, which is the exponent of the leading bit and at least 1;
* a 56-bit word `{0, leading bit, 52 fraction bits, guard, sticky}`.

It works as follows:

* **Increment.** Whether to add one is decided from the guard and sticky bits, the lowest
  fraction bit, the sign and the mode. The increment is added at bit 2, and a carry
  ripples up into the spare top bit.
* **Carry.** If the carry reaches that top bit, the significand is shifted right and the
  exponent goes up by 1.
* **Denormal that rounds up.** It gets a leading 1 and so becomes the smallest normal
  number. No special case is needed, because the exponent field is the exponent when
  the leading bit is 1 and 0 otherwise.
* **Overflow.** An exponent of 2047 or more gives +/-infinity in round-to-nearest mode and
  in the mode that rounds away from zero. In the other modes it gives the largest finite
  number. The `overflow` flag is an output of `fpu_round`. The units do not bring it out
  to their ports, because their port lists have no overflow pin.

## Choices made in this design

The following are this design's own decisions:

* **Pipeline and handshake.** One register per stage, the `enable`/`ready` pulse
  convention, and a synchronous reset.
* **Guard, round and sticky bits** in the adder, and denormal support in both units.
* **Leading-zero normalisation** in the multiplier, where a fixed one-bit shift is only
  enough for normal operands.
* **NaN results** are always the quiet NaN `7FF8_0000_0000_0000`. Input NaN payloads are
  not passed on.
* **Exceptions:** no inexact, underflow or invalid flags are produced.
* **Combinational depth:** each of the three stages holds a lot of logic, in particular
  the ten-step product sum. The clock frequency that a deeper pipeline would reach is
  not a goal here.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* **Reference model (`tb/fp_ref_pkg.sv`).** It works differently from the RTL:
  * For an addition, each operand is turned into an exact multiple of 2^-1074 in a
    2112-bit integer, and the integers are added exactly.
  * For a product, it takes the exact 106-bit product of the significands and its scale.
  * The exact value is then rounded once, by counting bits from its most significant one.
  * Round-to-nearest results are also compared with the simulator's own `real` arithmetic.
* `tb_fpu_round` checks the rounding step over directed ties, carries, overflows and
  denormal cases, plus 20 000 random words.
* `tb_mul_core` checks the partial-product multiplier against a plain 106-bit multiply.
* `tb_fpu_addsub` and `tb_fpu_mul` check each unit:
  * about 6 000 operations each, mostly issued back to back;
  * operands that include cancellations, products landing in the denormal range and
    beyond overflow, zeros, infinities and NaNs;
  * that every result arrives exactly on edge c+2;
  * a reset while operations are in flight.
* `tb_fpu_top` drives both units at once for 12 000 clocks. It also counts how often each
  mechanism occurred, and fails if any never did:
  * addition, subtraction, alignment shift, fraction overflow, left normalisation, exact zero;
  * adder overflow, denormal result;
  * each rounding mode, special operands;
  * the multiplier's one-bit shift, no-shift and right-shift cases, and its overflow;
  * back-to-back results, both units answering in the same cycle, and reset.

  One of its cases is the example 90000 x 128 (`40F5F8F000000000 x 4060000000000000`,
  round up).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fpu_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_fpu_top.sv \
    --top-module tb_fpu_top -o sim && ./obj_dir/sim
```

To run another test, replace `tb_fpu_top` with `tb_fpu_addsub`, `tb_fpu_mul`,
`tb_mul_core` or `tb_fpu_round`. Each one finishes in well under a second.

## Files

| file | contents |
|---|---|
| `rtl/fpu_pkg.sv` | shared types (`fp64_t`, `rmode_e`), constants, operand classification |
| `rtl/fpu_lzc.sv` | parameterised leading-zero counter |
| `rtl/fpu_round.sv` | rounding, overflow and packing |
| `rtl/mul_core.sv` | ten-piece 53 x 53 significand multiplier |
| `rtl/fpu_addsub.sv` | pipelined adder/subtractor |
| `rtl/fpu_mul.sv` | pipelined multiplier |
| `rtl/fpu_top.sv` | both units side by side |
| `tb/fp_ref_pkg.sv` | exact-arithmetic reference model and operand generator |
| `tb/tb_*.sv` | testbenches |
