# Exact floating-point sequence adder

Adding a long list of floating-point numbers one by one in an ordinary FPU rounds
after every step, so the result depends on the order of the operands:
`(u + v) + w` need not equal `u + (v + w)`. The usual remedies are software ones
(sorting the operands, compensated or Kahan summation, which turns each
addition into four additions plus bookkeeping).

This design removes the problem in hardware. It is a pipelined operational
unit that computes `o = o + x` (or `o - x`) for a stream of operands, one per
clock, and keeps `o` **exactly** in a fixed-point register wide enough to hold
every value the format can express, from the smallest to the largest exponent.
Nothing is lost while summing; the sum is rounded once, when it is converted
back to floating point at the output. Because integer addition is associative,
the same operands in any order give a bit-identical result.

The width of that register grows with the exponent range (280 bits for single
precision, 43 for half precision), which is why the scheme is meant for half
and single precision only. For double precision and wider, the accumulator
(2101 bits and more) and especially the leading-one ROM (2^40 words and more)
are out of reach, and a Kahan-style method is the better choice.

The unit is written for an out-of-order core where it would be one more
execution unit that receives micro-operations from reservation stations. The
core side (dispatch, sharing between cores) is not part of this RTL.

## Number format and the fixed-point range

Parameters (`fpsa_pkg`):

| symbol | meaning | half (N=11, M=5) | single (N=24, M=8, default) |
|---|---|---|---|
| `N` | mantissa width including the hidden bit | 11 | 24 |
| `M` | exponent width | 5 | 8 |
| `EMAX = 2^M - 1` | largest exponent | 31 | 255 |
| `R = EMAX + 1 + N` | accumulator width (with sign) | 43 | 280 |
| `L = R - 1` | magnitude width | 42 | 279 |
| `G = ceil(L / N)` | number of N-bit groups | 4 | 12 |
| `W = L mod N` | width of the top group | 9 | 15 |
| ROM | `2^G` words of `M + 1 + ceil(log2 G)` bits | 16 x 8 | 4096 x 13 |
| window | `2N` bits | 22 | 48 |

An operand is `f_x` (fraction, N-1 bits), `e_x` (biased exponent, M bits) and
`sign_x`. Its value in accumulator units is `{1, f_x} << e_x`: the hidden bit of
an operand with exponent `e` lands on bit `e + N - 1`, so the largest operand
reaches bit `R - 2` and bit `R - 1` is the sign of the two's complement sum.

The hidden bit is restored for **every** exponent, including 0. Exponent 0 is
therefore an ordinary exponent here, not the IEEE subnormal/zero encoding, and
`EMAX` is an ordinary exponent too. There is no zero, infinity or NaN operand;
a cycle without an operand is marked by `x_valid = 0`.

## Pipeline and timing

```
            segment 1                 segment 2              segment 3
 operand -> RG f_x, RG e_x, Tg sign -> sum f_o -> RG f_o  ->  MUX2/CTR1, OR1, ROM, MUX3
            MUX 1, DC, Block keys      (R-bit adder)          -> Tg sign_o, RG e_o^I, RG f_o^I
                                                              -> Coder, MUX4, CTR2, sum e_o, MUX5
```

Every segment accepts new data every clock. For an operand presented before
rising edge `t`:

| output | valid | refers to |
|---|---|---|
| `overflow` | between edges t and t+1 | the sum that edge t+1 writes, including the operand |
| `zero` | between edges t+1 and t+2 | RG f_o after the operand was added |
| `sign_o`, `e_o`, `f_o`, `inf` | after edge t+2 (latency 3) | the same sum, rounded |

`zero` comes directly from the ROM and is one clock ahead of the rounded result;
`overflow` comes directly from the adder and is two clocks ahead. Segment 3 works
on the previous content of RG f_o while segment 2 writes the new one, so the
outputs always show the running sum, and after the last operand of a sequence
(plus three clocks) they show the final one.

A new sequence starts with `seq_reset` high together with its first operand. In
the clock where that operand is added, the adder's accumulator input is forced
to zero, so RG f_o receives the operand alone. The old sum is not lost: segment
3 converts it in that same clock, and it appears at the outputs one clock before
the first partial sum of the new sequence. (`seq_reset` with `x_valid` low
clears the sum.)

## Segment 1: aligning the operand (`fpsa_operand`)

MUX 1 chooses the restored mantissa `{1, f_x}` for a positive operand and its
bitwise inverse `{0, ~f_x}` for a negative one. The exponent decoder DC drives
one of `2^M` lines, and the Block keys put the N-bit MUX 1 word at that bit
position in an R-bit word whose other bits are all copies of the sign. For a
negative operand this is the one's complement of the shifted magnitude. The
sign also goes to the carry input of the adder, which turns it into the two's
complement. So no separate negation or shifter stage is needed.

## Segment 2: the exact accumulator (`fpsa_accum`)

An R-bit adder adds the aligned operand, its carry and RG f_o. The flag
`overflow` is the XOR of the two top bits of the adder output. It rises as soon
as the magnitude of the sum reaches bit `R - 2`, which is exponent `EMAX`, the
all-ones exponent. The flag only reports this: the sum is not saturated, and if
it grows further it wraps as a two's complement number.

## Segment 3a: finding the leading one (`fpsa_group_select`, `fpsa_group_rom`)

This is the step that turns a 280-bit integer back into a float without a
280-bit leading-zero counter and a 280-bit shifter.

1. **Magnitude.** MUX 2 inverts the lower `L` bits when the sum is negative and
   CTR 1 adds the sign bit, which gives `|sum|` in `L` bits. The sign goes to
   Tg sign_o.
2. **Groups.** The magnitude is cut into N-bit groups from bit 0 upward. The
   top group is only `W` bits wide. OR 1 has one OR gate per group, and its `G`
   outputs say which groups are non-zero.
3. **ROM.** The OR vector addresses a ROM. For the highest non-zero group `j`
   the word holds:
   - `sel = j`, which tells MUX 3 to pass group `j` and group `j-1` as one
     2N-bit window;
   - `e_base = (j-1)·N`, the exponent the result would have if its leading one
     sat on the bit just below group `j`;
   - `zero`, which is set only at address 0.

   If only group 0 is non-zero, the window of groups 1 and 0 is used with
   `e_base = 0`. At address 0 the ROM gives `e_base = 0`. The table is computed
   at elaboration from these formulas.
4. **Window.** The window always contains the leading one and at least the N
   bits after it: N-1 fraction bits and a guard bit. That is all the rounding
   step needs. The window of the top group is **left-aligned**: `W` bits, then
   the N bits of the group below, then `N-W` zeros. A one-bit flag `senior`
   records this case. On the clock edge the window goes to RG f_o^I and
   `e_base` goes to RG e_o^I.

Worked example (single precision): a sum whose leading one is at bit 100. Group
`100 / 24 = 4` is the highest non-zero one, so `e_base = 72`. The window holds
bits 119..72. The leading one is at window bit 28, so `k = 47 - 28 = 19` zeros
precede it, and the exponent is `72 + 24 - 19 = 77 = 100 - 23`.

## Segment 3b: normalising and rounding (`fpsa_round`)

- **Coder.** It counts the zeros `k` before the first one of the window. The
  exponent correction is `N - k`, or `W - k` for a top-group window. An all-zero
  window gives a correction of 0.
- **MUX 4.** It passes the N bits after the leading one. The hidden bit itself
  is dropped.
- **CTR 2.** It adds 1 at the guard position. Its upper N-1 bits are the
  fraction rounded to nearest. **A tie rounds away from zero**, and bits below
  the guard bit are not considered, so this is not IEEE round-to-nearest-even.
  Its carry means the mantissa rounded up to 2.0.
- **Exponent adder.** It computes `e_base + correction + carry`. If the result
  exceeds `EMAX`, MUX 5 outputs `EMAX`, the AND group clears the fraction and
  `inf` is set. The largest exact sum has exponent `EMAX`, so `inf` can only
  come from rounding up at the very top of the range.
- **Underflow.** A subtraction can cancel to a magnitude below `2^(N-1)`, the
  smallest operand. The exponent would then be negative, and the result is
  flushed to `e_o = 0`, `f_o = 0`. The adder is two bits wider than `M` so that
  this case can be seen.

A zero sum comes out as `e_o = 0`, `f_o = 0`, `sign_o = 0`, with `zero` high one
clock earlier.

## Interface of `fpsa_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low, clears all registers |
| `x_valid` | in | 1 | an operand is presented this cycle |
| `seq_reset` | in | 1 | this operand starts a new sequence |
| `f_x` | in | N-1 | operand fraction (no hidden bit) |
| `e_x` | in | M | operand exponent |
| `sign_x` | in | 1 | operand sign; set it to subtract |
| `overflow` | out | 1 | the sum has reached exponent `EMAX` (left the range) |
| `zero` | out | 1 | the sum is zero |
| `sign_o` | out | 1 | sign of the sum |
| `e_o` | out | M | exponent of the rounded sum |
| `f_o` | out | N-1 | fraction of the rounded sum (no hidden bit) |
| `inf` | out | 1 | exponent overflow after rounding: `e_o = EMAX`, `f_o = 0` |

## Faithfulness: what is the method and what is this implementation's choice

The method itself is followed as published:
- the three segments and their register boundaries;
- the one's complement alignment with the sign used as carry;
- the R-bit accumulator and its XOR overflow flag;
- sign-magnitude conversion with MUX 2 and CTR 1;
- group detection with OR gates and a ROM;
- the 2N-bit window and the encoder corrections `N-k` and `W-k`;
- rounding with an incrementer and its carry into the exponent;
- the `EMAX`/zero-fraction substitution on exponent overflow;
- all widths of the half and single precision columns.

These points are choices of this implementation:
- `x_valid`, to allow cycles without an operand.
- `rst_n`, for power-on initialisation.
- How `seq_reset` restarts the sum: it zeroes the adder input instead of
  clearing RG f_o, so the previous sum is kept.
- The `senior` flag that tells the encoder a window came from the top group.
- The left alignment of that window.
- The choice of window when only group 0 is non-zero.
- The encoding of the ROM word.
- The underflow flush.
- Exponent overflow is found by comparing against `EMAX` in a wider adder
  instead of taking a carry out.
- MUX 4 is written as a shift by `k+1`, which is the same function as a
  `2N-1`-input multiplexer.

Single precision is the default because it is the larger of the two formats the
method targets.

## Files

| file | contents |
|---|---|
| `rtl/fpsa_pkg.sv` | format presets and width functions |
| `rtl/fpsa_operand.sv` | segment 1 |
| `rtl/fpsa_accum.sv` | segment 2 |
| `rtl/fpsa_group_rom.sv` | ROM of segment 3 |
| `rtl/fpsa_group_select.sv` | segment 3, up to RG f_o^I |
| `rtl/fpsa_round.sv` | segment 3, output logic |
| `rtl/fpsa_top.sv` | the complete unit |
| `tb/tb_fpsa_*.sv` | self-checking testbenches, one per module |
| `tb/tb_fpsa_top_sf.sv` | the complete unit in the half-precision configuration |

Synthesised at the default size (coarse, technology-independent), the unit has
about 370 flip-flops, a 280-bit adder, a 279-bit incrementer and the
4096 x 13 ROM.

## Verification

Each testbench compares against values it computes itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

- `tb_fpsa_top` (single precision, default parameters) and `tb_fpsa_top_sf`
  (half precision) run a cycle-accurate reference next to the design. The
  reference keeps the sum as a wide integer, finds the leading one bit by bit
  and rounds at the guard bit. The testbench checks `overflow`, `zero` and the
  rounded result every clock, about 27,000 checks. It sums the same 48 positive
  operands in three orders and requires identical results. It also runs random
  additions and subtractions with idle cycles and restarts, and directed cases
  for range overflow, rounding into `inf`, a rounding carry, zero, negative sums
  and underflow. An explicit check confirms that one operand added to a zero
  sum reaches `e_o`/`f_o` after exactly three rising edges. It counts each of these events and fails if one never happens.
- `tb_fpsa_operand`: every exponent with both signs, then random operands.
- `tb_fpsa_accum`: random addends, carries and restarts against a reference sum.
- `tb_fpsa_group_rom`: all 4096 addresses.
- `tb_fpsa_group_select`: random signed sums of random length. The module also
  asserts that a non-zero sum never gives an empty window.
- `tb_fpsa_round`: random windows checked against a conversion of the window
  placed at its absolute bit position.

Each module's testbench was also run against a deliberately broken copy of the
module, and every broken copy was detected.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fpsa_pkg.sv tb/tb_fpsa_top.sv --top-module tb_fpsa_top -Mdir obj
./obj/Vtb_fpsa_top
```

Each run takes well under a second.

## Changing the format

Set `N` and `M` on `fpsa_top` (for example `#(.N(11), .M(5))` for half
precision). All widths, the ROM contents and the window placement follow from
them. The ROM has `2^G` words, so large exponent ranges quickly become
impractical: `M = 11` would need 2^40 words.
