# Low-latency pipelined floating point adder, multiplier and complex butterfly

Floating point addition is hard to make fast on an FPGA because of the normalisation after a
subtraction: the leading one of the result can be anywhere, and a serial leading-zero count
followed by a barrel shift is a long path. This design keeps the adder to seven pipeline stages
by normalising *in parallel*: the unnormalised sum is cut into four-bit slices, one small
module per slice computes the normalised result under the assumption that the leading one is in
its slice, and a priority multiplexer picks the right candidate one stage later. The multiplier
is simpler: its mantissa product is built from 18x18 DSP-style products, and its normalisation
is a one-bit choice. Both units are combined into a complex radix-2 butterfly, which is the top
level.

The RTL follows a published design for Virtex-4 FPGAs (a 7-stage adder at up to 361 MHz and a
6-stage multiplier in single precision layout). The stage structure, the alignment trick and the
normaliser organisation are from that design; the places where this RTL had to choose, or
departs from it, are listed in [Departures and own choices](#departures-and-own-choices).

## Number format

```
  [EW+MW]   [EW+MW-1 : MW]     [MW-1 : 0]
   sign     exponent (excess)  fraction           value = (-1)^s * 1.f * 2^(e - (2^(EW-1)-1))
```

* Default `MW = 23`, `EW = 8`: the IEEE 754 single precision layout (bias 127). The other
  format the units were evaluated in, `MW = 15`, `EW = 10` (bias 511), is a parameter change.
* An exponent field of 0 means zero; its fraction is ignored. There are no denormals, NaN or
  infinity: the all-ones exponent is an ordinary exponent.
* No rounding: every result is truncated. In the adder the smaller operand also loses the bits
  it shifts out during alignment, so a subtraction may be one unit in the last place below the
  truncated exact difference.
* A result exponent below 1 becomes zero (all bits zero). A result exponent above `2^EW-1`
  saturates to the largest magnitude (exponent and fraction all ones) with the correct sign.

## The adder pipeline (`fp_add`, latency 7)

| cycle | step | module | what is registered |
|---|---|---|---|
| 1 | compare | `fp_add_cmpsel` | both exponents, `ea-eb` and `eb-ea` with borrow, `ma < mb`, both mantissas with implicit one |
| 2 | select | `fp_add_cmpsel` | larger exponent, non-negative difference, larger and smaller mantissa, result sign, subtract flag |
| 3 | align | `fp_add_align` | smaller mantissa shifted right by the low difference bits, `set_zero` flag |
| 4 | add | `fp_add_addsub` | 25-bit sum or difference |
| 5 | normalise 1 | `fp_normalize` | all find-first-one candidates (mantissa, exponent offset, all-zero flag) |
| 6 | normalise 2 | `fp_normalize` | the selected candidate |
| 7 | normalise 3 | `fp_normalize` | corrected exponent, packed result |

`op` selects `a + b` (`OP_ADD`) or `a - b` (`OP_SUB`). One operation can start every cycle.
Nothing in the datapath stalls and nothing has a reset.

### Compare and swap

The two exponent subtractions run in parallel, not one after the other: both `ea-eb` and
`eb-ea` are registered, so the second stage only has to select one. The decision (the *CMP*
block) is: `a` is the smaller operand if `ea-eb` borrows, or the exponents are equal and the
mantissa of `a` is smaller. The smaller operand always goes to the alignment path, so the later
subtraction can never go negative and needs no sign correction. `OP_SUB` is handled by flipping
the sign of `b` before the decision; the mantissas are subtracted when the two (effective)
signs differ, and the result takes the sign of the larger operand.

### Alignment with a short shifter

For a 24-bit mantissa any shift of 24 or more gives zero, so the barrel shifter only looks at
the five low bits of the exponent difference (`ceil(log2(MW+1))` bits in general). If any
higher bit is set, the `set_zero` flag is registered instead and the adder treats the operand
as zero. This keeps the shifter to five levels, and clearing the operand costs nothing extra in
the adder, see below.

### The adder bit cell

Each bit of `fp_add_addsub` is written the way it maps onto one four-input LUT plus the
FPGA's carry chain:

```
p     = A xor Sub xor (B and not SetToZero)     -- one LUT
cout  = p ? cin : A                             -- carry multiplexer
sum   = p xor cin                               -- carry-chain XOR
cin(bit 0) = Sub
```

A subtraction is therefore `A + not B + 1`. Because `B <= A` is guaranteed, its carry out is
always one and is dropped; in an addition the carry becomes bit 24 of the unnormalised result.

### The parallel normaliser (the part to understand)

The sum `u` is 25 bits: bit 24 is the carry of an addition, bit 23 is the implicit-one
position, bits 22..0 are fraction. Its leading one may be anywhere, or there may be none.

*Stage 1.* `u` is padded with zeros to `4*NG` bits (`NG = ceil((MW+2)/4)` = 7, so 28 bits).
Module *k* (`ff1_shift4`) receives the padded value shifted left by `4k` and looks only at its
top four bits. It finds the leading one among them (position `j` = 0..3), shifts left by `j`
more, and outputs the top 24 bits as a normalised mantissa candidate, the exponent offset
`1 - (4k + j)`, and a flag saying its four bits were all zero. The candidate of module *k* is
correct exactly when all bits above its slice are zero and its slice is not. All seven
candidates are registered; this is the costly part (seven 24-bit registers) that buys the
short logic depth.

*Stage 2.* A priority decoder finds the first module whose four bits were not all zero, and a
7-to-1 multiplexer selects that module's mantissa and offset. If every flag is set the result
is zero.

*Stage 3.* The offset is added to the exponent (which has been delayed two cycles), the
mantissa is only delayed. Then the underflow and overflow rules above are applied and the
result is packed. The leading one of the selected mantissa is the implicit one and is dropped.

Example: `1.000...001 * 2^e - 1.000...000 * 2^e` gives `u = 1` (only bit 0 set). The three
padding zeros put `u[0]` at bit 3 of the padded value. Modules 0..5 see all-zero slices;
module 6, whose input is shifted left by 24, finds the one at the top of its slice, so `j = 0`
and the offset is `1 - 24 = -23`. The result is `1.0 * 2^(e-23)`, as expected.

## The multiplier (`fp_mul`, latency 6; 3 for `MW = 15`)

The mantissas with their implicit ones are multiplied in `mant_mult`; in parallel the exponent
sum `ea + eb - bias` and the sign `sa xor sb` are formed and delayed to match. For normalised
inputs the product lies in [1, 4), so its leading one is in one of the two top bits; the final
stage selects the 23 fraction bits below it and adds one to the exponent when it was the upper
bit. An operand with exponent field zero makes the product zero.

`mant_mult` is organised like a chain of 18x18 signed DSP slices, each multiplying 17-bit
unsigned slices of the operands. For 24-bit operands (up to 34 bits) it uses four slices,
`a = A1*2^17 + A0`, `b = B1*2^17 + B0`:

| stage | operation |
|---|---|
| 1 | input registers |
| 2 | `A0*B0`, `A1*B0`, `A0*B1`, `A1*B1` |
| 3 | `(A0*B0 >> 17) + A1*B0`; product bits 16..0 are final |
| 4 | previous `+ A0*B1`; product bits 33..17 are final |
| 5 | `(previous >> 17) + A1*B1`; top bits |

For operands of 17 bits or fewer (the 15-bit fraction format) a single product with input and
output registers is used, latency 2. The latency is `fp_pkg::mant_mult_latency(W)`.

## The butterfly and the top level

`fp_butterfly` computes the decimation-in-time butterfly

```
t = w * b:   t_re = b_re*w_re - b_im*w_im,   t_im = b_re*w_im + b_im*w_re
x = a + t,   y = a - t
```

with four multipliers, one subtractor and one adder for `t`, and two adders and two subtractors
for the outputs. `a` is delayed by `mul_latency + 7` cycles to meet `t`. Latency
`mul_latency(MW) + 14`: 20 cycles by default, 17 for `MW = 15`.

`fp_butterfly_top` puts two register stages in front of the butterfly and one behind it, so
that pad and routing delays do not land in the arithmetic stages, and carries a valid bit
alongside. Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst` | in | 1 | synchronous, active-high reset of the valid pipeline only |
| `in_valid` | in | 1 | start a butterfly with the operands on this cycle |
| `a_re a_im b_re b_im` | in | `EW+MW+1` | operands |
| `w_re w_im` | in | `EW+MW+1` | twiddle factor |
| `out_valid` | out | 1 | `x_*`, `y_*` hold a result |
| `x_re x_im y_re y_im` | out | `EW+MW+1` | `a + w*b`, `a - w*b` |

Latency from `in_valid` to `out_valid` is `IN_REGS + mul_latency(MW) + 14 + OUT_REGS` = 23
cycles at the defaults; one butterfly can start every cycle. There is no back-pressure.

## Latencies at a glance

| unit | `MW=23, EW=8` | `MW=15, EW=10` | published design |
|---|---|---|---|
| `fp_add` | 7 | 7 | 7 / 6 |
| `fp_mul` | 6 | 3 | 6 / 3 |
| `mant_mult` | 5 | 2 | 5 (24x24) |
| `fp_butterfly` | 20 | 17 | not given |
| `fp_butterfly_top` | 23 | 20 | not given |

## Departures and own choices

* **Normaliser width.** The published normaliser drawing shows six four-bit modules (shifts 0
  to 20) and a 6-to-1 multiplexer, which covers 24 bits. The adder result has 25 bits, and a
  result whose only one is in the lowest bit is possible (equal exponents, mantissas differing
  in the last bit). Here the number of modules is derived from the sum width: seven for
  single precision, five for `MW = 15`.
* **Adder latency in the 15/10 format.** The published 15-bit-fraction adder has six stages;
  which stage was merged is not stated, so this RTL keeps seven stages in every format.
* **Multiplier latency in the 15/10 format.** Three cycles is reached by assuming the 16x16
  product fits one DSP slice with two register stages.
* **Overflow and underflow** are not specified by the source; the saturate/flush-to-zero rules
  above are this design's.
* **Zero operand detection** (exponent field zero) and sign rules of the adder are this
  design's, chosen to match IEEE 754 where it does not conflict with the "no denormals" rule.
* **Butterfly structure.** The source uses a complex radix-2 butterfly to test its units but
  does not draw it; the textbook arrangement with separate units is used. Sharing the compare
  stage between the adder and subtractor that see the same operands, mentioned as a possible
  further optimisation, is not done.
* **Valid bit and reset** in the top level are additions for ease of use.
* **DSP slices** are not instantiated as vendor primitives; `mant_mult` is plain RTL that a
  synthesis tool can map onto them.
* Clock frequencies and resource counts of the original FPGA implementation are properties of
  its device and tool flow and are not reproduced or checked here.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. The floating point testbenches compare with
`tb/fp_ref_pkg.sv`, a reference written directly from the number format with plain integer
arithmetic (align with truncation, add, find the leading one with a loop, truncate). The
single precision reference is itself cross-checked against `shortreal` arithmetic: every
result must lie within two units in the last place.

| testbench | what it covers |
|---|---|
| `tb_fp_add_cmpsel` | swap decision incl. equal exponents, zero operands, sign and subtract flag |
| `tb_fp_add_align` | shifts within and beyond the 5-bit range, `set_zero` |
| `tb_fp_add_addsub` | add with carry out, subtract down to zero, `set_zero` |
| `tb_fp_normalize` | leading one at each of the 25 positions, zero, underflow, overflow |
| `tb_fp_add` | 20 000 operations in both formats: cancellation, far operands, zero, carry |
| `tb_mant_mult` | 24-bit (latency 5) and 16-bit (latency 2) products |
| `tb_fp_mul` | 20 000 operations in both formats, both normalisation cases, overflow, underflow |
| `tb_fp_butterfly` | random butterflies in both formats at their exact latencies |
| `tb_fp_butterfly_top` | top at default parameters with gaps in `in_valid`; checks every result and its 23-cycle latency, and counts inside the design that each mechanism (swap, set-to-zero, subtraction, carry, long cancellation, zero result, saturation/underflow, both multiplier normalisation cases) occurred |

Every latency is checked by comparing each result at exactly the expected cycle.

Running a testbench with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --top-module tb_fp_add -y rtl -y tb \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_add.sv
./obj_dir/Vtb_fp_add
```

Testbenches that do not use the reference package (`tb_fp_add_cmpsel`, `tb_fp_add_align`,
`tb_fp_add_addsub`, `tb_fp_normalize`, `tb_mant_mult`) do not need `tb/fp_ref_pkg.sv`. Lint
the RTL with `verilator --lint-only -Wall -y rtl rtl/fp_pkg.sv rtl/fp_butterfly_top.sv`;
the remaining warnings are bits that are unused by construction (the leading one of the
selected normaliser candidate, which is the implicit one, and the bits a candidate shifts out)
and package constants that a given top does not use.

## Changing the design

* **Format:** set `MW` and `EW` on any unit (`MW + 1 <= 34` for the multiplier). Bias, shifter
  width, number of normaliser modules and multiplier latency follow automatically.
* **I/O registers:** `IN_REGS` and `OUT_REGS` on `fp_butterfly_top` (at least one stage in
  total is needed by the valid pipeline: `IN_REGS + OUT_REGS + latency >= 2`).
* **Latency constants** live in `rtl/fp_pkg.sv` (`ADD_LATENCY`, `mul_latency()`,
  `mant_mult_latency()`); anything that delays data to match a unit should use them.

## Files

| file | content |
|---|---|
| `rtl/fp_pkg.sv` | format defaults, `addsub_op_e`, latency and bias functions |
| `rtl/fp_add.sv` | adder/subtractor, wires the four steps |
| `rtl/fp_add_cmpsel.sv`, `rtl/fp_add_align.sv`, `rtl/fp_add_addsub.sv`, `rtl/fp_normalize.sv`, `rtl/ff1_shift4.sv` | adder steps |
| `rtl/mant_mult.sv`, `rtl/fp_mul.sv` | multiplier |
| `rtl/fp_butterfly.sv`, `rtl/fp_butterfly_top.sv` | butterfly and top level |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | testbenches |
