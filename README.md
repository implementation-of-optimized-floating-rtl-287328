# Decimal64 floating point arithmetic unit (DPD, add / subtract / multiply)

Binary floating point cannot represent most decimal fractions exactly (0.1,
0.0475, ...), which is unacceptable for billing, banking and currency
conversion. IEEE 754-2008 therefore defines decimal floating point formats.
This design is a combinational datapath with one output register that adds,
subtracts and multiplies two **decimal64** numbers stored in the **densely
packed decimal (DPD)** encoding. Internally every number is held as a sign,
a 3-digit BCD exponent and a 16-digit BCD significand, and all arithmetic,
the exponent arithmetic included, is done with BCD digit adders.

Three ideas shape the hardware:

* the BCD adders are built from an **equal-bypass full adder**, in which
  the carry passes through a single 2:1 multiplexer;
* operand alignment uses a **logarithmic barrel shifter** instead of a
  sequential shifter;
* the significand product comes from a **fully parallel 16 x 16 digit BCD
  multiplier**, an array of single-digit BCD multipliers and BCD adders.

## Top level and timing

```
 apkt ─► dfp_decoder ─┐                         ┌─► fpas (add/sub) ─┐
                      ├─► A, B (sign, BCD exp,  │                   ├─► op_select ─► dfp_encoder ─► opkt
 bpkt ─► dfp_decoder ─┘    BCD significand) ────┴─► fpm  (multiply)─┘   (mux)       (DPD + register)
 operation ─────────────────► op_select (also inverts B's sign into fpas for subtraction)
```

`dfp_arith_unit` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `in_valid` | in | 1 | `apkt`, `bpkt`, `operation` are valid this cycle |
| `operation` | in | 2 | `00` add, `01` subtract (A − B), `10` multiply, `11` no operation |
| `apkt`, `bpkt` | in | 64 | decimal64 operands, DPD encoding |
| `out_valid` | out | 1 | `in_valid` delayed by one cycle |
| `opkt` | out | 64 | decimal64 result, DPD (canonical declets) |
| `flags` | out | 5 | `{inf, nan, zero, overflow, underflow}` |

Everything from the decoders to the encoder's packing logic is
combinational; the only state is the encoder's output register. A result
appears one clock cycle after its operands and a new operation can be issued
every cycle. Both arithmetic units work on every operand pair; the
operation selects which result is encoded. Operation `11` yields the
all-zero packet (a +0 with biased exponent 0) and no flags.

The combinational path is long: the reference FPGA implementation of this
architecture ran at about 46 MHz, limited by the multiplier. Nothing in the
RTL is pipelined.

## Number format: decoding and encoding

A decimal64 packet is `sign[63] | combination G[62:50] | trailing[49:0]`.
The top five bits of G carry the most significant digit (MSD) and the two
leading exponent bits:

| G[12:8] | exponent bits | MSD |
|---|---|---|
| `a b c d e` (a b ≠ 11) | `a b` | `0 c d e` |
| `1 1 c d e` (c d ≠ 11) | `c d` | `1 0 0 e` (8 or 9) |
| `1 1 1 1 0` | – | infinity |
| `1 1 1 1 1` | – | NaN |

G[7:0] are the low eight exponent bits, so the biased exponent is 10 bits
(0..767, bias 398). The 50 trailing bits are five 10-bit DPD declets, each
holding three decimal digits; a declet stores "small" digits (0..7) in three
bits and "large" digits (8, 9) in one, with bits v, w, x, s, t saying which
digits are large (`dpd_to_bcd`, `bcd_to_dpd`, IEEE 754-2008 tables).

`dfp_decoder` produces the 77-bit record `dfp_num_t {sign, exp[11:0],
mant[63:0]}` (see `dfp_pkg`): the binary exponent is converted to three BCD
digits by a shift-and-add-3 converter. `dfp_encoder` does the reverse
(exponent back to binary as 100·h + 10·t + u), always emits canonical
declets, and registers the packet and the flags. NaN payloads are not
carried; NaN results are a positive quiet NaN with zero payload.

## Adder/subtractor (`fpas`)

1. `eop = As ^ Bs` (for subtraction, `op_select` has already inverted
   Bs). `eop = 1` means the magnitudes are subtracted.
2. `fpas_comparator` sets `swap = (Ae < Be)` and computes the right shift
   amount `RSA = |Ae − Be|` with a 3-digit BCD subtractor. It also converts
   RSA to a 5-bit digit count that saturates at 31.
3. The swapping logic routes the operand with the larger exponent to the
   L channel (`Ls, Le, Lm`) and the other to the S channel.
4. `bcd_rshift` shifts `Sm` right by RSA digits, giving `Srsm`.
   **The digits shifted out are lost.** Operands are not normalised first
   and no guard digits are kept, so alignment truncates. For example, 1E5
   plus 999E0 gives 1E5 (the 999 is shifted out completely).
5. `bcd_addsub` (17 digits) computes `Lm ± Srsm`. Subtraction uses the
   nines' complement of the subtrahend with carry-in 1. If a subtraction
   would go negative (`Srsm > Lm`), the two inputs are exchanged first.
6. Round logic: if the 17th digit of the sum is non-zero, the lowest digit
   is dropped (truncation) and the exponent is incremented by a 3-digit BCD
   adder. An exponent above 767 gives infinity with the overflow flag.
7. Sign: that of the operand of larger magnitude. This is `Ls`, or `Ss`
   in the exchanged case of step 5. An exact zero difference takes `Ls`.

The result exponent is always `Le` or `Le + 1`, because there is no left
shift to normalise the result. Cancellation therefore leaves leading zero
digits in the significand. In decimal floating point that is a legal,
exact value, not an error.

Special operands: a NaN operand gives NaN. Infinity plus a finite number
gives that infinity. Infinities of opposite effective sign give NaN.

### Equal-bypass full adder and BCD digit adder

`eb_full_adder` computes `p = a ^ b` and uses it to select two
multiplexers:

```
sum  = p ? ~c : c
cout = p ?  c : a      // a == b when p == 0, so a is also the carry
```

The carry passes through one multiplexer. In the transistor-level
original, the inverter on `c` is a tri-state inverter enabled by `p`, so it
does not switch when `a == b`. That is a power saving that RTL cannot
express. Here it is an ordinary inverter whose output the multiplexer
ignores when `p = 0`, with the same logic function.

`rca4` chains four of these cells. `bcd_digit_adder` is the classic
two-adder BCD cell:

* a first `rca4` forms the binary sum `z`;
* the decimal carry is `cout | z3·z2 | z3·z1`;
* a second `rca4` adds `0110` when that carry is set.

`bcd_addsub` ripples NDIG of these cells. It serves as the 17-digit
significand adder, as the 3- and 4-digit exponent adders, and as the
2N-digit row adders of the multiplier.

## Multiplier (`fpm`)

* Sign: `Rs = As ^ Bs`.
* Significand: `bcd_array_mult` (N = 16) forms the 32-digit product in one
  combinational pass:
  * `bcd_digit_mult_bin` multiplies two digits into a 7-bit binary
    product. Only BCD inputs occur, so a digit with bit 3 set has bits 2 and
    1 clear. Partial products of equal weight that can never both be 1 are
    therefore merged with OR gates, which leaves at most three terms per
    column. Two rows of half and full adders (five, then four) reduce
    the columns; bit 6 is an OR gate.
  * `bin_to_bcd_conv` turns that product (0..81) into a tens nibble H and
    a units nibble L.
  * Product column k collects the L nibbles of all digit pairs with
    `i + j = k` and the H nibbles of those with `i + j = k − 1`. For N = 4
    (the 4 x 4 example), column P3 collects P0003L, P0102L, P0201L,
    P0300L, P0002H, P0101H and P0200H.
  * Each column is summed by a chain of single-digit BCD adders. The
    first adder takes two terms, and each later one adds the running sum
    digit, the next term (or 0) and one carry from the column to its right.
    Every carry out goes to an adder of the next column. A column therefore
    gets `n(k) = max(terms(k) − 1, n(k−1))` adders, which is 0, 2, 4, 6, 6,
    ... for N = 4. The last adder's sum is product digit k.
* Round logic: count the leading zero digits of the product. If it has
  more than 16 significant digits, shift it right by the excess `k`, again
  by truncation.
* Exponent: `Re = Ae + Be + k − 398`, computed with 4-digit BCD adders and
  a BCD subtractor. A borrow is an **underflow**: the result becomes a
  signed zero with exponent 0, and `uf` and `zero` are set. `Re > 767` is an
  **overflow**: the result becomes a signed infinity, and `of` and `inf` are
  set.
* Special operands: NaN or infinity × 0 gives NaN; infinity × a non-zero
  number gives a signed infinity.

The 16 x 16 array holds 256 digit multipliers and 720 single-digit BCD adders.
It is by far the largest and slowest part of the unit: about 49 k
word-level cells after generic synthesis, most of them in this array.

## Departures and open points

* **Rounding is truncation everywhere** (round toward zero), both for
  alignment and for the final 16 digits. IEEE 754-2008 rounding modes,
  guard/round/sticky digits and the inexact flag are not implemented.
* **No normalisation** of operands or results. The preferred-exponent rules
  and exponent clamping of IEEE 754-2008 are not followed: overflow goes
  straight to infinity and underflow straight to zero.
* The multiplier's round logic keeps the 16 most significant digits, so it
  shifts only when the product has more than 16 significant digits.
* Handling of a negative difference (exchanging the adder inputs) and of
  special values in the adder is this design's own choice.
* The `in_valid`/`out_valid` handshake, the reset, the output register
  position and the `flags` port are this design's own choices.
* The equal-bypass cell's tri-state inverter is modelled as a plain
  inverter (same function, no power model).
* Multiplier adder array: the column-wise adder chains follow the
  reference 4 x 4 array. How many adders a column gets, and which carry
  enters which adder, is this design's own rule for N digits. For the high
  columns it uses more adders than the reference, which ends in a single
  ripple along its bottom row.
* Only decimal64 is built. The package constants (16 digits, bias 398,
  emax 767) and the multiplier's N would have to change for decimal128
  (34 digits), along with the decoder, encoder and exponent widths.

## Verification

Every module except four small helpers (`rca4`, `dpd_to_bcd`,
`bcd_to_dpd`, `bcd_digit_mult`) has a self-checking testbench
`tb/tb_<module>.sv`, which ends by printing
`TB_RESULT checks=N failures=M`. The helpers are tested through the
modules that use them. Expected values come from
`tb/tb_dfp_ref_pkg.sv`, which does the same arithmetic on plain 64/128-bit
binary integers and has its own DPD packer. It also contains hand-encoded
constants: 1 = `2238000000000001`, the largest finite number =
`77FCFF3FCFF3FCFF`, infinity = `7800000000000000`, NaN =
`7C00000000000000`.

* Exhaustive tests: full adder, BCD digit adder, digit multiplier,
  binary-to-BCD converter.
* Random tests: the 17-digit adder/subtractor, the shifter (every shift
  amount), the 4 x 4 and 16 x 16 array multipliers, decoder (every declet
  value), encoder, comparator, `fpas` (20 000 operand pairs) and `fpm`
  (5 000).
* `tb_dfp_arith_unit` runs the complete unit at its default size.
  * It issues 4 000 random packets, mostly back to back with some idle
    cycles.
  * It checks every result packet and its flags exactly one cycle after
    issue.
  * It counts each mechanism: the four operation codes, swap, truncating
    alignment, the adder's carry into the 17th digit, negative differences,
    the multiplier's rounding shift, overflow, underflow, infinity, NaN and
    idle cycles. A mechanism that never occurs is a failure.

Simulating with Verilator (from the project root; the same pattern works
for every testbench):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dfp_arith_unit \
    rtl/dfp_pkg.sv tb/tb_dfp_ref_pkg.sv tb/tb_dfp_arith_unit.sv -Mdir obj -o sim
./obj/sim
```

Verilator finds the other modules through `-Irtl`, one module per file.
Building the full unit takes about a minute, and the run takes about a
second. Lint with `verilator --lint-only -Wall -Irtl rtl/dfp_pkg.sv
rtl/dfp_arith_unit.sv`. The warnings that remain are about unused bits:

* the unused upper half of the shifted product;
* the exponent of the S channel;
* the upper bits of the converter's remainder;
* the carries and sums of product column 0, which has no adder;
* the carries out of the last product column, which are always 0.

## Files

| file | contents |
|---|---|
| `rtl/dfp_pkg.sv` | shared types (`dfp_num_t`, `dfp_class_e`, `dfp_flags_t`, `dfp_op_e`) and constants |
| `rtl/dfp_arith_unit.sv` | top level |
| `rtl/dfp_decoder.sv`, `rtl/dpd_to_bcd.sv` | decimal64 → sign / BCD exponent / BCD significand |
| `rtl/dfp_encoder.sv`, `rtl/bcd_to_dpd.sv` | the reverse, plus the output register |
| `rtl/op_select.sv` | operation decode and result selection |
| `rtl/fpas.sv`, `rtl/fpas_comparator.sv`, `rtl/bcd_rshift.sv` | adder/subtractor |
| `rtl/bcd_addsub.sv`, `rtl/bcd_digit_adder.sv`, `rtl/rca4.sv`, `rtl/eb_full_adder.sv` | BCD adders |
| `rtl/fpm.sv`, `rtl/bcd_array_mult.sv`, `rtl/bcd_digit_mult.sv`, `rtl/bcd_digit_mult_bin.sv`, `rtl/bin_to_bcd_conv.sv` | multiplier |
| `tb/tb_*.sv` | testbenches; `tb/tb_dfp_ref_pkg.sv` holds the reference model |
