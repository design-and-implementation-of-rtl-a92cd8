# Pipelined single-precision floating point ALU on one operand bus

This is a 32-bit ALU for IEEE 754 single-precision numbers. It is meant to sit
beside a processor that has only one data bus. Both operands travel over that
bus, one after the other: a 3-bit code `selop` says whether the word on the bus
is the first operand or the second one. The second operand also carries the
operation that should be done. The ALU adds, subtracts, multiplies and divides
floating point numbers. It also does three bitwise operations on raw 32-bit
words: NOT, NAND and shift right. The arithmetic runs in two four-stage
pipelines, so a new operation can start on every clock.

An independent integer-to-float converter shares the top level. It is
combinational and has pins of its own.

## Pins and operation codes

| pin        | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1  | clock, all registers on the rising edge |
| `rst`      | in  | 1  | synchronous, active high |
| `selop`    | in  | 3  | what the bus word is, see below |
| `operand`  | in  | 32 | the shared operand bus |
| `result`   | out | 32 | result of the most recent completed operation |
| `error`    | out | 1  | error flag that belongs to `result` |
| `conv_in`  | in  | 32 | converter input: sign-magnitude integer |
| `conv_out` | out | 32 | converter output: IEEE 754 single |

The ALU proper has 70 pins: 32 + 32 + 3 + 1 + 1 + 1.

| `selop` | action on the rising edge |
|---------|---------------------------|
| 000 | store the bus in operand register **a**; no operation |
| 001 | b = bus, start a + b |
| 010 | b = bus, start a − b |
| 011 | b = bus, start a × b |
| 100 | b = bus, start a ÷ b |
| 101 | b = bus (ignored), start NOT a |
| 110 | b = bus, start a NAND b |
| 111 | b = bus (ignored), start a >> 1 (logical; a zero enters bit 31) |

Register a keeps its value until the next `000`. You can therefore load a once
and then issue a chain of operations against it, one per clock. Each operation
brings its own b.

## Timing

```
edge     1        2     3     4     5     6
        input   unit  unit  unit  unit  output
        logic   st 1  st 2  st 3  st 4  logic
```

Call the rising edge that samples a non-zero `selop` edge 1. After edge 6,
`result` and `error` show the outcome of that operation. Every operation has
the same latency, the logical ones included. So results leave in the order the
operations were issued, one per clock at most, and two units never finish in
the same cycle. Between operations, and while a is being loaded, `result` and
`error` keep their last value. After reset both are zero.

## Structure

```
            +-------------+  a,b,selop_q   +------------------+ res0/err0
 operand -->|             |--------------->| fp_addsub  (4 st) |----------+
 selop  --->| input_logic | selmdl[0]      +------------------+          v
            |             |--------------->| fp_muldiv  (4 st) |--> output_logic --> result
            |             | selmdl[1]      +------------------+  res1    ^  (selop delayed   error
            |             |--------------->| logical_module    |--------+   by 4 cycles)
            +-------------+ selmdl[2]      |  (4 st delay)     |  res2
                                           +------------------+
```

* **input_logic** demultiplexes the bus into a and b and registers `selop`.
  It also raises exactly one bit of the one-hot enable `selmdl`: bit 0 for the
  adder/subtractor, bit 1 for the multiplier/divider, bit 2 for the logical
  module. An assertion checks that at most one bit is set.
* **output_logic** carries the registered `selop` through a delay line as deep
  as the units. When the delayed code arrives, it names the unit whose result
  is ready, and that result and error bit go into the output register. The
  units' valid bits are used only by assertions, which check that the chosen
  unit really is delivering a result.

## Adder/subtractor (`fp_addsub`)

This is the hardest block to follow. It works on signed magnitudes. The
subtraction always takes the smaller operand from the larger, so the raw
result can never be negative.

1. **Unpack and order.** The implicit leading 1 is put back in front of each
   23-bit fraction. An exponent field of 0 gives a significand of 0, so zeros
   and subnormals count as zero. For a subtraction the sign of b is flipped,
   and after that only the *effective* signs matter. The operands are compared
   as {exponent, significand}. The larger one goes to the "large" slot, and
   its sign becomes the sign of the result. The stage also registers the
   exponent difference.
2. **Align (pre-normalization).** The smaller significand is shifted right by
   the exponent difference. Three extra bits are kept below it: guard, round,
   and a sticky bit, which is the OR of everything shifted out further. A
   50-bit window holds every shift up to 26 without loss. Past 26 the
   significand lies entirely below the round bit, so only the sticky bit is
   left.
3. **Add or subtract** the two 27-bit values. The adder is 28 bits wide, to
   hold a carry out.
4. **Normalize and pack.** A carry out means the mantissa is shifted right by
   one and the exponent goes up by one. Otherwise a leading-one search over 27
   bits gives the left shift, and the exponent drops by the same amount. The
   bits below the 24-bit significand are then dropped, which is truncation.
   The sticky bit makes sure the truncation is exact. For example,
   1 − 2⁻²⁴ gives `3F7FFFFF`, not 1.0.

## Multiplier/divider (`fp_muldiv`)

The sign is the XOR of the two operand signs.

* **Multiply:** exponent = e_a + e_b − 127. The 24 × 24-bit significand
  product lies in [2⁴⁶, 2⁴⁸). If bit 47 is set, the exponent goes up by one.
* **Divide:** the stage computes the integer quotient (sig_a · 2²⁶) / sig_b,
  which lies in [2²⁵, 2²⁷). It is shifted into the same 48-bit field as a
  product, so one normalization step serves both. For that reason the
  quotient's exponent is formed as e_a − e_b + 126, and the shared
  "bit 47 set → +1" rule brings it to e_a − e_b + 127 when sig_a ≥ sig_b.
  The division is a single `/` operator in stage 2. It is the longest
  combinational path in the design.

Both results are truncated. Because the product is complete, and because
truncating the floor of the quotient gives the floor, the truncation is exact
here too.

## Error flag and special values

| condition | `result` | `error` |
|-----------|----------|---------|
| result exponent ≥ 255 (overflow) | ±infinity | 1 |
| non-zero result with exponent ≤ 0 (underflow) | ±0 | 1 |
| divide with a divisor whose exponent field is 0 (includes ±0 and 0/0) | ±infinity | 1 |
| any operand with exponent field 255 (infinity or NaN) | `7FC00000` | 1 |
| exact zero sum or difference | +0 | 0 |
| zero operand of a multiply, zero dividend | ±0 | 0 |
| NOT, NAND, shift right | the word | 0 |

Subnormal inputs count as zero, and results never come out subnormal. There
is one rounding mode, toward zero.

## Integer to float converter (`int_to_fp`)

Bit 31 of the input is the sign. Bits 30:0 are the magnitude, so the input is
sign-magnitude, not two's complement. The magnitude is shifted left until its
leading one reaches bit 31. Bits 30:8 of the shifted word become the fraction,
and the exponent is the original position of the leading one plus 127. Lower
bits are truncated: for example, 2³¹ − 1 gives `4EFFFFFF`. A zero magnitude
gives a signed zero. The sign bit goes straight from input to output.

## How far this follows its source description

The pins, the operation codes, the load-a/load-b rule of the bus, the three
units, selection of the result by `selop`, the four-level pipelines, the
pre-normalization steps, the exponent rules of multiply and divide, and the
overflow/underflow/divide-by-zero flags all come from the published
description of this ALU. The following are this design's own decisions:

* **IEEE 754 arithmetic on full significands.** The published add, subtract,
  multiply and divide steps work on the 23 stored fraction bits only, without
  the implicit 1. They also derive the add/subtract exponent from the exponent
  difference in a way that does not give IEEE 754 results. This design
  computes the standard result instead. The published simulation adds
  a = `99E00007` and b = `0EF00003` and shows a result exponent of `00110100`.
  This design returns `99E00003`, exponent `00110011`, which is the correct
  sum truncated to single precision.
* **Rounding:** truncation. None is specified. The published steps simply
  concatenate sign, exponent and computed bits.
* **Timing:** only "four level pipelined" is given. The split into stages,
  the input and output registers, the 6-edge latency, and the delay added to
  the logical unit so that it matches the others are all choices made here.
* **Shift right** moves one bit position. No distance is given.
* **err2**, the logical unit's error output, is drawn but never defined. It
  is 1 only for an op code that the input logic never issues, so in practice
  it is 0.
* **Special values** (the table above) and **reset** (synchronous, active
  high, clears a, b, the valid bits, `result` and `error`).
* An earlier 3-bit code table (000 add … 100 shift) belongs to a stand-alone
  FPU description. The ALU's `selop` table is the one implemented.
* The divider described for the stand-alone FPU also keeps a remainder. The
  ALU has no pin for it, so the remainder is neither kept nor output.
* A parity generator is named as part of the system but never described: not
  what it covers, nor its parity sense, nor a pin for it. It is not built.
* The integer converter is described only as a conversion step. Its placement
  beside the ALU, with its own pins, is this design's choice.

## Verification

Each module has a self-checking testbench in `tb/`. The reference models in
`tb/fp_ref_pkg.sv` work differently from the RTL. Add and subtract place both
significands on a common 300-bit integer grid and sum them exactly. Multiply
and divide use exact 128-bit integer products and quotients. The integer
converter goes through the simulator's double precision.

* `tb_fp_addsub`, `tb_fp_muldiv`: hand-worked cases (exact sums, cancellation,
  truncation, overflow, underflow, divide by zero, NaN operand, large exponent
  gaps), then 20 000 random operations each, with random idle cycles. The
  latency of every result is checked to be 4.
* `tb_logical_module`, `tb_input_logic`, `tb_output_logic`, `tb_int_to_fp`:
  random stimulus against bit-level models.
* `tb_fpalu_top`: the whole ALU at its default configuration, driven only
  through its pins. About 30 000 random operations, plus directed error cases
  and the operand pair of the published addition waveform. Every result must
  appear exactly 6 edges after issue, and the pins must hold in between. The
  test counts each mechanism (all seven operations, load-a, reuse of a,
  back-to-back issue, result hold, overflow, underflow, divide by zero, NaN
  operand, converter) and fails if any of them never occurred.

Each testbench was also run against a deliberately broken copy of its module,
such as a dropped sticky bit or a wrong quotient bias, and reported failures.

## Simulating

The package `rtl/fpalu_pkg.sv` must come first. For the whole ALU:

```
verilator --binary --timing --assert --top-module tb_fpalu_top \
  rtl/fpalu_pkg.sv tb/fp_ref_pkg.sv rtl/*.sv tb/tb_fpalu_top.sv
./obj_dir/Vtb_fpalu_top
```

Each testbench ends with `TB_RESULT checks=N failures=M`. To test a single
unit, replace `rtl/*.sv` and the testbench with that unit's file and its
`tb/tb_<module>.sv`. The testbenches use `$urandom` and queues, and need no
other files.

To change the pipeline depth of the logical unit and of the output logic's
delay line, edit `UNIT_DEPTH` in the package. The arithmetic units have a
fixed four stages, so `UNIT_DEPTH` must stay 4 unless their stages change
too.
