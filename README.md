# Single-precision floating-point subtractor and multiplier with a Booth significand multiplier

This design holds two IEEE 754 single-precision (32-bit) arithmetic units:

- a subtractor, which computes `x - y`;
- a multiplier, which computes `x * y`.

The multiplier forms its 24 × 24-bit significand product with a radix-2 Booth multiplier. Booth's method handles two's complement operands directly. It only adds or subtracts where the multiplier's bit pattern changes from 0 to 1 or from 1 to 0, so long runs of equal bits cost nothing.

All three units are purely combinational. They have no clock and no reset, and a result is valid one propagation delay after its operands change.

The design favours a short, easy-to-follow datapath over IEEE 754 conformance. Results are truncated, not rounded. NaN and infinity inputs get no special treatment, and denormal inputs read as zero. Where this departs from the standard is listed under [Departures from IEEE 754](#departures-from-ieee-754).

## Files

| file | contents |
|---|---|
| `rtl/fp_pkg.sv` | `fp32_t` (sign, biased exponent, fraction), the leading-zero count, and `fp_pack`, the final range check shared by both units |
| `rtl/booth_multiplier.sv` | radix-2 Booth multiplier, `WIDTH` × `WIDTH` → `2*WIDTH` |
| `rtl/fp_subtractor.sv` | `x - y` |
| `rtl/fp_multiplier.sv` | `x * y`, using `booth_multiplier` |
| `rtl/fp_arith_top.sv` | both units side by side, each with its own operands and flags |
| `tb/fp_ref_pkg.sv` | reference models in double-precision `real` arithmetic |
| `tb/tb_*.sv` | one self-checking testbench per module |

## The Booth multiplier

The product register is `P = {A, Q, q-1}`:

- `A` is an accumulator, cleared at the start;
- `Q` holds the multiplier;
- `q-1` is an extra bit to the right of `Q`, also cleared at the start.

There is one step per multiplier bit. Each step looks at the two lowest bits of `P`:

| `P[1:0]` | action on `A` |
|---|---|
| `00`, `11` | none |
| `01` | `A += multiplicand` |
| `10` | `A -= multiplicand` |

`P` is then shifted right by one. The shift is arithmetic, so the sign bit is copied. After `WIDTH` steps, `P` without `q-1` holds the signed product.

For example, 14 × (−5) with 5-bit operands gives `11101 11010` = −70.

The loop is unrolled in an `always_comb` block. In hardware it is a chain of `WIDTH` adder/subtractors, each feeding a hard-wired shift.

Details that are easy to miss:

- **Which operand is the multiplier.** The number of add/subtract steps equals the number of bit changes in the multiplier, counted upward from an implicit 0 below bit 0. The block counts these changes for both operands and uses the one with fewer as the multiplier. On a tie, `b` is the multiplier.
  - `op_count` outputs the number of steps that actually added or subtracted.
  - In this unrolled array the choice does not shorten the critical path. It sets only which adders do work, and hence switching activity.
- **Accumulator width.** `A` is one bit wider than the operands. Without that extra bit, subtracting the most negative multiplicand (for example −8 with 4-bit operands) would overflow.
- **Unsigned mode.** `SIGNED_OPS = 0` treats both operands as unsigned. It zero-extends them by one bit and runs `WIDTH + 1` steps. The floating-point multiplier needs this mode, because a significand with its hidden bit is a positive 24-bit number whose top bit is 1.

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 24 | operand width |
| `SIGNED_OPS` | 1 | 1: two's complement operands; 0: unsigned operands |

## The subtractor

`fp_subtractor` computes `x - y` as `x + (-y)` in four steps:

1. **Align.** The larger exponent becomes the result exponent. The other operand's significand (hidden bit included) is shifted right by the exponent difference. Bits shifted out are lost. With a difference of 24 or more, that operand becomes zero and the result is the larger operand.
2. **Add in two's complement.** Each aligned significand gets its sign. `y`'s sign is inverted first. Both become 26-bit two's complement numbers and are added. The sum is converted back to a sign and a 25-bit magnitude.
3. **Normalise.**
   - If the magnitude carried into bit 24, it is shifted right by one (the low bit is dropped) and the exponent goes up by one.
   - Otherwise a leading-zero count shifts it left until bit 23 is set, and the exponent goes down by the same count. After cancellation this can be up to 23 positions.
4. **Range check** (`fp_pack`, below).

Truncating at alignment means the result is not always the correctly rounded difference. For example, `1.0 - 2^-24` returns `1.0`, because the smaller operand is shifted out entirely. The error is below three units in the last place of the larger operand, and the testbench checks that bound on every case.

## The floating-point multiplier

`fp_multiplier` works in these steps:

1. If either operand has a zero exponent, the result is +0.
2. The result's sign is the XOR of the operand signs.
3. `booth_multiplier` (unsigned mode) multiplies the two 24-bit significands. The 48-bit product lies in [1, 4).
4. The exponent is `exp(x) + exp(y) - 127`, computed in 11 bits so that it cannot wrap.
5. If the product is 2 or more, the exponent goes up by one. The product is cut to the 24 bits starting at its leading one, and the bits below are dropped.
6. Range check (`fp_pack`).

Every cut drops bits, so the result is the exact product rounded toward zero. The testbench relies on that property.

## Range check and special results (`fp_pkg::fp_pack`)

Both units end by packing a sign, an unbounded biased exponent `e` and a normalised 24-bit significand:

| condition | result | flag |
|---|---|---|
| significand = 0 | +0 | none |
| `e >= 255` | ±infinity (exponent 255, fraction 0) | `overflow` |
| `e <= 0` | denormal: exponent 0, significand shifted right by `1 - e` (truncated, may become ±0) | `underflow` |
| otherwise | normal number, hidden bit dropped | none |

The two flags are the units' exception outputs. The result word is always valid as well, so a user may ignore the flags.

## Departures from IEEE 754

- **Rounding.** All results are truncated (round toward zero), with one difference: in the subtractor, the alignment truncation happens before the subtraction. IEEE 754 round-to-nearest-even is not implemented.
- **Overflow.** Overflow returns infinity, even though round-toward-zero would return the largest finite number.
- **Inputs with exponent 0.** These read as zero, so denormal inputs are flushed.
- **Inputs with exponent 255.** These are processed as ordinary numbers. No NaN is produced or recognised, and a result that reaches exponent 255 is reported as overflow.
- **Signed zero.**
  - An exact zero difference, and the product of a zero operand, are +0.
  - A product that underflows all the way to zero keeps the sign of the product.

## Which choices are this design's own

The following follow the algorithm descriptions this design implements:

- the Booth step rule;
- choosing the operand with fewer bit changes as the multiplier;
- the subtractor's align/add/normalise/check order, its truncating alignment and its two's complement handling of negative significands;
- the multiplier's zero test, sign XOR, exponent `Ex + Ey - 127`, truncation of the 48-bit product, infinity on overflow and denormal on underflow.

These are this design's own choices:

- everything is combinational;
- the Booth accumulator has an extra bit, the Booth block has an unsigned mode and an `op_count` output, and ties go to `b`;
- the internal widths (26-bit sum, 11-bit exponent);
- normalising the product before cutting it, so that a product below 2 loses no significant bit;
- the treatment of exponent-0 and exponent-255 inputs, and the sign of zero results;
- overflow and underflow are reported as flags;
- the subtractor uses the same infinity and denormal encoding as the multiplier;
- the two units have separate operand ports in `fp_arith_top`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. A watchdog ends any run that hangs.

- **`tb_booth_multiplier`** compares products with the simulator's `*`. It covers:
  - the 24-bit signed and unsigned instances, with corner values and 3000 random pairs each;
  - 4-bit and 5-bit instances, run exhaustively, including 4 × 4 = 16 and 14 × (−5) = −70.

  `op_count` is checked against an independent count of bit changes.
- **`tb_fp_subtractor`** and **`tb_fp_multiplier`** compare every result word and both flags with `fp_ref_pkg`. These models compute in `real` arithmetic and find the binade of the exact value by search. Directed cases include 2345.125 − 0.75 = 2344.375 (`0x45128600`) and 2345.125 × 0.75 = 1758.84375 (`0x44DBDB00`). Random operands are spread over the full exponent range and over ranges chosen to reach overflow and underflow. Each testbench counts how often each mechanism occurred and fails if one never did. The subtractor's mechanisms are alignment of either operand, shift-out, carry or left normalisation, zero results, overflow and underflow.
- **`tb_fp_arith_top`** drives both units at once at the design's only configuration. It checks 10,000 random operand sets and the worked example, and it counts the same mechanisms plus whether the Booth operand exchange is taken or not.

To run a testbench with plain Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/fp_pkg.sv tb/fp_ref_pkg.sv \
    rtl/booth_multiplier.sv rtl/fp_subtractor.sv rtl/fp_multiplier.sv \
    rtl/fp_arith_top.sv tb/tb_fp_arith_top.sv --top-module tb_fp_arith_top
./obj_dir/Vtb_fp_arith_top
```

Replace the last testbench file and `--top-module` to run another testbench. Each one takes well under a second.

## Timing and size

Each unit is a single combinational path. The longest path is in the multiplier: 25 chained 26-bit adder/subtractors, followed by the normalisation multiplexer and the range check. Add pipeline registers around `booth_multiplier` if a clocked design needs a higher rate. The Booth array is the natural place to cut, every few steps, since each step only passes `P` to the next one.
