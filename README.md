# Single precision floating point adder / subtractor

`fpa_synt` adds or subtracts two IEEE 754 binary32 numbers and returns the
result rounded to nearest, ties to even. Denormals, signed zeros, infinities
and NaNs are all handled. It follows the classic adder algorithm:

1. unpack the operands;
2. compare the exponents and swap so the larger one is in front;
3. shift the smaller significand right to line it up;
4. add, or subtract in two's complement;
5. normalize;
6. round;
7. adjust the exponent.

The split into blocks (exponent difference, swap mux, barrel shifter,
inverter, two's complement adder, normalizer, leading one detector, left
barrel shifter, exponent sum, mantissa sum) and the block names follow the
published design by R. Dhobale and S. Chaturvedi, *FPGA Implementation of
Single Precision Floating Point Adder*. This is an independent
implementation in SystemVerilog. Where that description is silent or
ambiguous, the choices made here are listed under
[Departures and choices](#departures-and-choices).

## Interface and timing

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | clock |
| `rst`   | in  | 1     | synchronous, active high; clears `sum` and `flags` |
| `a`     | in  | 32 (`fp32_t`) | first operand |
| `b`     | in  | 32 (`fp32_t`) | second operand |
| `sop`   | in  | 1     | 0: `a + b`, 1: `a - b` |
| `sum`   | out | 32 (`fp32_t`) | result, registered |
| `flags` | out | 3 (`fp_flags_t`) | `{invalid, overflow, inexact}`, registered |

The datapath is a single combinational path that ends in one register. The
result for the operands present at a rising edge appears just after that
edge, so the latency is 1 cycle. A new operation can start on every cycle.
There is no valid/ready handshake. The types and widths are in
`rtl/fpa_pkg.sv`.

## How a sum is formed

**Unpacking (`fp_special`).** Each operand is classified as zero, denormal,
normal, infinity or NaN. The hidden bit is 1 for normal numbers and 0 for
everything else, which gives a 24-bit significand. Zeros and denormals get an
*effective exponent* of 1, because a denormal has the same scale as the
smallest normal number. With this rule the rest of the datapath never needs
a special case for denormal inputs.

**Alignment (`exp_diff`, `swap_mux`, `barrel_shifter`).** The exponents are
subtracted. When `exp_a < exp_b` (`sign_d`), the swap mux puts `b` in front.
The magnitude of the difference, saturated to 31, is the right-shift amount
for the smaller significand. `big_num` marks a difference above 31. The
shifter keeps three bits below the LSB:

- guard (`g`);
- round (`r`);
- sticky (`s`), the OR of everything shifted out below the round bit.

After alignment both operands are 27 bits wide (24 + 3).

**Effective operation (`frac_comp_eff_op`, `inverter`, `comp_add`).**
`s_eff = sign_a ^ sign_b ^ sop` is 1 when the magnitudes must be subtracted.
In that case the inverter complements the aligned operand, and the adder
takes `s_eff` as its carry-in. This completes the two's complement, so the
adder computes `x - y`. The difference can only be negative when the
exponents are equal, because otherwise the operand in front is larger. With
equal exponents nothing was shifted out, so negating the result (invert,
add 1) is exact. `neg` flips the result sign.

**Two normalization paths.** This is the part of the design that needs the
most care.

- *Far path* (`normaliser`). It is taken for an effective addition, or for a
  subtraction whose exponents differ by 2 or more (`far_sel` from `shifter`).
  - An addition can carry out one bit. The result is then shifted right by
    one, the lost bit is merged into sticky, and the exponent goes up by 1.
  - A subtraction with a difference of 2 or more subtracts less than 0.5
    from a number of at least 1. The result therefore stays at or above 0.5,
    and a left shift of at most one bit is enough.
  - No leading-one search is needed on this path.
- *Near path* (`lod`, `barrel_shifter_left`). It is taken for a subtraction
  whose exponents differ by 0 or 1 (`lod_sel = s_eff & ~far_sel`). Here any
  number of leading bits can cancel. The leading one detector counts the
  leading zeros, and the left barrel shifter removes them and lowers the
  exponent by the same count. The shift is limited so that the exponent
  never goes below 1. A result that would need more shift stays denormal.
  This is exact, because such a difference has no bits below the LSB
  (gradual underflow).

Both paths deliver a 27-bit significand with its leading one at bit 26
(bit 26 is 0 for denormal results), plus guard, round and sticky.

**Rounding and exponent (`man_sum`, `exp_sum`).**

- `man_sum` selects the path and rounds to nearest even. It rounds up when
  `g & (r | s | lsb)`.
- A carry out of the rounding adder means the significand became exactly
  10.0…0. The fraction is then all zeros and `exp_sum` adds 1 to the
  exponent.
- `exp_sum` writes exponent field 0 when the rounded significand has no
  leading one (a denormal or zero result).
- An exponent of 255 or more is an overflow. The top then outputs infinity
  and sets `overflow` and `inexact`.

**Specials (in `fpa_synt`).**

- Any NaN operand, or ∞ − ∞, gives the quiet NaN `0x7FC00000`.
- `invalid` is set for a signaling NaN operand or for ∞ − ∞.
- An infinity operand otherwise passes through, with the operation applied
  to its sign.
- An exact zero from operands of opposite sign is +0. `-0 + -0` stays −0.

Underflow is never flagged. Whenever the exact sum of two binary32 values
lies below the normal range, it is representable, so the "tiny and inexact"
condition cannot occur in addition.

Two concurrent assertions in `fpa_synt` check the algorithm's key facts
during simulation:

- a far-path subtraction never loses more than one leading bit;
- a negative difference only occurs with equal exponents.

## Departures and choices

- **Operation select.** The published block diagram feeds an operation bit
  SOP into the effective-operation block and works its example with SOP = 1.
  The printed result exponent of that example is the difference of the two
  operands, so SOP = 1 means subtract. Here `sop` is a top-level input. The
  published top-level symbol shows only `A`, `B`, `clk`, `rst` and `sum`.
- **Worked example.** The example computes
  0 10000010 11111011000… − 0 10000010 11111000…, that is
  15.84375 − 15.75. This design returns `0x3DC00000` (0.09375, exponent
  01111011, fraction 100…0), which is the exactly rounded difference. The
  published fraction bits (0111111111111111 followed by zeros) are not an
  exactly rounded result and are not reproduced. The exponent agrees.
- **"Shifter" and "Inverter".** Alignment is done by the barrel shifter.
  The block called *Shifter*, whose only input is the shift amount, is
  implemented as the near/far decoder `far_sel = |shift_amt[4:1]`. This
  follows a four-input AND cell on `shift_amt` and an inverter named
  `far_sel` in the published RTL schematic. The *Inverter* block complements
  the aligned operand for a subtraction.
- **Sticky bit.** The published barrel shifter has only `g` and `r`
  outputs. A sticky output is added, because round to nearest even cannot be
  exact without it.
- **Rounding location.** The algorithm has a rounding step but no rounding
  block. Rounding sits in `man_sum`, next to the selection between the two
  normalization paths.
- **Pipeline.** There is one output register ("register output and
  exceptions"). The exponent-difference cell is combinational.
- **Leading one detector width.** The published cell is a 32-bit detector
  with a 5-bit count. Only the 27 data-carrying bits are scanned here
  (`lod #(.W(27))`); the count width is 5 as published.
- **Flags and NaN encoding.** Both are this design's own; the published
  description only mentions exception and overflow/underflow checks.
- **FPGA figures.** The published Spartan-6 utilization (33 LUTs, no
  flip-flops, 55 IOBs) is far below what a complete adder with registered
  output needs. Nothing in this RTL is sized to match it.

## Files

`rtl/`: `fpa_pkg` (types, widths), `fpa_synt` (top), and one module per
block: `fp_special`, `exp_diff`, `swap_mux`, `shifter`, `barrel_shifter`,
`frac_comp_eff_op`, `inverter`, `comp_add`, `normaliser`, `lod`,
`barrel_shifter_left`, `man_sum`, `exp_sum`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus
`fpa_ref_pkg`, a reference model shared by the top-level test. The model
computes the exact sum as a 300-bit integer in units of 2⁻¹⁴⁹ and rounds it
once. Its route is different from the design's, so it checks the design
independently.

## Verification

Each unit testbench checks its block against values computed in the
testbench. `exp_diff` and `shifter` are tested exhaustively; the others are
given random and corner inputs. `tb_fpa_synt` runs the full design at its
default configuration. It covers:

- reset;
- the worked example;
- about 20 corner cases (ties, rounding carry, ∞ − ∞, sNaN, denormal
  sums, overflow, signed zeros);
- 1 000 000 random operations, drawn from classes that force close exponents,
  tiny and huge values and rounding edges.

For each operation the testbench checks the output just before the clock
edge (still the previous result) and just after it (the new result). This
confirms the one-cycle latency. It also counts, from the operands and the
reference result, how often each mechanism happened:

- swap, shift beyond the mantissa;
- far-path right and left shifts, near path, cancellation by more than 8
  bits;
- rounding carry, negative difference;
- denormal result, exact zero, overflow, infinity, NaN, inexact.

A mechanism that never happened counts as a failure. Each testbench ends
with `TB_RESULT checks=N failures=M`. The top-level run makes about 2 000 000
checks with no failures and takes seconds.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fpa_pkg.sv tb/fpa_ref_pkg.sv tb/tb_fpa_synt.sv --top-module tb_fpa_synt
./obj_dir/Vtb_fpa_synt
```

Replace `tb_fpa_synt` with any `tb_<module>` to run a unit test.

## Changing the design

Widths are package constants in `fpa_pkg`: exponent 8, fraction 23, 3 extra
rounding bits, 5-bit shift amount, 10-bit internal exponent. The shifters,
the detector and the adder take width parameters, but the top and the
normalization, rounding and exponent blocks use the binary32 constants
directly. Changing the format means editing `fpa_pkg` (including
`SHAMT_W`, which must cover the 27-bit working width) and the constants
`QNAN` and `EXP_MAX`, and then re-running `tb_fpa_synt` with a matching
reference model. To add pipeline stages, register the signals between the
alignment, addition and normalization groups of `fpa_synt`. The testbench
expects a latency of 1 and would need its check offset changed.
