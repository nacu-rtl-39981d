# NACU: one sigmoid table for sigmoid, tanh, exponential and softmax

Neural-network fabrics need several non-linear functions: the sigmoid σ,
the hyperbolic tangent, and the exponential that softmax is built from.
Giving each its own table or polynomial unit wastes area. This unit
computes all of them from **one** piecewise-linear (PWL) table that holds
the sigmoid for non-negative inputs only. Three identities do the rest:

| identity | used for |
|---|---|
| σ(−x) = 1 − σ(x) | sigmoid of negative inputs |
| tanh(x) = 2σ(2x) − 1 | tanh, both signs |
| eˣ = 1/σ(−x) − 1 | exponential, and through it softmax |

Every function then reduces to one line `coef·|x| + bias`, where the slope
and bias come from a single table entry `{m, q}`. The line is evaluated on
a multiply-add unit that doubles as an ordinary MAC. The exponential also
goes through a pipelined divider and a decrementor. All arithmetic is
16-bit two's-complement fixed point, Q4.11.

This RTL implements the architecture of the NACU published by Baccelli,
Stathis, Hemani and Martina (DAC 2020). The structure, the subtractor-free
bias circuits, the number format, the table size and the latencies follow
that publication. The table contents, stage boundaries, interface,
rounding and overflow behaviour are this implementation's own; they are
listed under [Choices made here](#choices-made-here).

## Number format

Q4.11 means a sign bit, 4 integer bits and 11 fractional bits, so values
run from −16 to +16 − 2⁻¹¹. The integer width comes from a saturation rule.
The largest input, In_max = 2^IB − 2^−FB, must push σ to within one output
LSB of 1, so e^−In_max < 2^−FB. With the same format at the input and the
output, this becomes

    2^IB > ln(2) · FB / (1 − 2^(1−N))

For N = 16 the rule first holds at IB = 4 (16 > 7.6; IB = 3 fails,
8 < 8.3), which leaves FB = 11. `nacu_pkg::format_saturates` evaluates the
rule, and `nacu` asserts it for its `DW`/`FW` parameters.

## The sigmoid table

`sigmoid_lut` holds 53 entries. Entries 0–51 are uniform segments of width
h = 0.25 that cover [0, 13). Entry 52 is the saturated line m = 0, q = 1,
used for every larger input. The table is addressed by the input magnitude.
Bits `[15:9]` of the magnitude give the segment number, and any number
from 52 up selects entry 52.

No table file exists. The entries are computed at elaboration, with real
arithmetic, by `nacu_pkg::pwl_coef`:

* slope `m` is the chord slope (σ(b) − σ(a))/h, rounded to 11 fractional bits;
* bias `q` is the midpoint between the largest and smallest value of
  σ(x) − m·x, taken over 17 points of the segment. It is rounded, then
  clamped to [0.5, 1].

The bias is fitted after the slope has been rounded. This keeps the error
centred on the curve even where x is large and a small slope error gets
multiplied by x. The worst error of the table line is 5.8·10⁻⁴, a little
over one LSB (2⁻¹¹ ≈ 4.9·10⁻⁴).

## Deriving the other lines without subtractors

For every function and sign, the bias lies in a narrow, known interval:
q ∈ [0.5, 1], 2q ∈ [1, 2]. Each of the three corrections 1 − q, 2q − 1 and
1 − 2q therefore reduces to fixed bit wiring plus, at most, a negation of
the 11-bit fraction. `nacu_coef_calc` selects:

| function, input sign | coef | bias | circuit |
|---|---|---|---|
| σ, x ≥ 0 (also eˣ) | m | q | table output |
| σ, x < 0 | −m | 1 − q | `one_minus_q` |
| tanh, x ≥ 0 | 4m | 2q − 1 | `two_q_minus_one` |
| tanh, x < 0 | −4m | 1 − 2q | `one_minus_two_q` |

The coefficient always multiplies |x|. That is why the slopes for negative
inputs are negated: σ(x) = 1 − σ(|x|) = −m·|x| + (1 − q). For tanh the
table is read at 2|x|, and the slope is scaled by 4 instead of the input
by 2, since 2·(m·2|x| + q) − 1 = 4m·|x| + (2q − 1).

**`one_minus_q` (1 − q, q ∈ [0.5, 1]).** The result lies in [0, 0.5], so its
sign and integer bits are zero. Its fraction is the two's complement of the
fraction of q. At q = 1 the fraction is zero and so is its complement, so
the same wiring gives the correct result 0.

**`two_q_minus_one` (a − 1, a ∈ [1, 2]).** The fraction passes through.
The two lowest integer bits are `01` for a ∈ [1, 2), which must become `00`,
and `10` for a = 2, which must become `01`. Moving integer bit 1 into
integer bit 0 and clearing everything above covers both cases. The output
of the divider on the exponential path lies in the same interval [1, 2], so
this module is also the decrementor after the divider.

**`one_minus_two_q` (1 + a, a = −2q ∈ [−2, −1]).** The input is the negated
doubled bias. The fraction passes through. For a ∈ [−2, −1), integer bit 0
is 0 and the result's integer part is −1 (all ones). For a = −1, bit 0 is 1
and the integer part is 0. Driving the inverse of bit 0 onto the sign bit
and all integer bits covers both cases. Example: a = −1.5 has integer part
…1110 and fraction .1; the result is …1111.1 = −0.5 = 1 − 1.5.

The slope negations, the ×4 shift and the −2q input use ordinary
two's-complement logic. Only the three bias corrections are the special
circuits.

## The exponential and softmax

Softmax is evaluated in the normalised form sm_i = e^(x_i − x_max) / Σ_j
e^(x_j − x_max), so every exponent is ≤ 0 and every exponential lies in
(0, 1]. For such an input, σ(−x) = σ(|x|) ∈ [0.5, 1] comes from the
positive-range table line. The divider forms 1/σ(−x) ∈ [1, 2], and
`two_q_minus_one` subtracts 1. Since σ ≤ 1 on this path, the error gain
of eˣ over σ, 1/(1 − σ(x))², is at most 4. Measured over [−16, 0], the
worst error is 1.8·10⁻³.

The unit does not sequence softmax itself. The issuing fabric runs it as
three passes:

1. `OP_EXP` with x0 = x_j − x_max for each j, keeping the results e_j;
2. `OP_MAC` with x0 = e_j, x1 = 1.0 (`acc_clr` on the first), giving the sum;
3. `OP_SOFTMAX` with x0 = e_j and sm_in = the sum, giving e_j / sum.

The sum must stay below 16. This always holds for vectors of up to 15
elements, because one element is exactly 1 and all others are at most 1.

## Pipeline and timing

One operation can be issued every cycle. There is no back-pressure.

| cycle | stage |
|---|---|
| t | table lookup and coefficient selection (combinational on the inputs) |
| t+1 | coefficient, bias and operands registered |
| t+2 | product registered (rounded to 11 fractional bits) |
| t+3 | `mac_out`: result of `OP_SIGMOID`, `OP_TANH`, `OP_MAC` |
| t+4 … t+7 | divider, 4 quotient bits per stage |
| t+8 | decremented quotient (`OP_EXP`) or plain quotient (`OP_SOFTMAX`) |

Latency is 3 cycles for σ, tanh and MAC, and 8 for eˣ and softmax.
The published unit reports 3, 3 and 8 cycles for σ, tanh and eˣ at
3.75 ns (267 MHz) in 28 nm. The divider takes most of its area (81%).

Two rules apply to the issuer:

* **No collisions.** A 3-cycle operation must not be issued exactly 5 cycles
  after an 8-cycle one, because both would finish in the same cycle. An
  assertion in `nacu` reports it. Any other interleaving is allowed, and
  results then leave in completion order rather than issue order.
  `out_op` tells them apart.
* **`mac_out` is shared.** The same register holds the σ/tanh/eˣ result
  and the MAC accumulator, so an accumulation must not be interleaved with
  those operations. `OP_SOFTMAX` leaves it untouched.

## Interface of `nacu`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | an operation is issued this cycle |
| `op` | in | `op_e` (3) | `OP_MAC`=0, `OP_SIGMOID`=1, `OP_TANH`=2, `OP_EXP`=3, `OP_SOFTMAX`=4 |
| `acc_clr` | in | 1 | `OP_MAC` only: start from 0 instead of the accumulator |
| `x0` | in | 16 | function input; first MAC operand; softmax numerator |
| `x1` | in | 16 | second MAC operand |
| `sm_in` | in | 16 | softmax denominator |
| `out_valid` | out | 1 | a result leaves this cycle |
| `out_op` | out | `op_e` | operation of that result |
| `out_data` | out | 16 | the result |
| `mac_out` | out | 16 | the result/accumulator register |

Parameters: `DW` (16) is the word width, `FW` (11) the fractional bits,
`DIV_STAGES` (4) the divider stages, `ENTRIES` (53) and `SEGF` (2)
the table size and segment width 2^−SEGF. The divider spreads the `DW`
quotient bits as evenly as it can over its stages.

Arithmetic details:
* products are rounded half up;
* products and sums saturate to the 16-bit range;
* the quotient is truncated;
* a negative dividend counts as 0;
* a divisor ≤ 0, or a quotient of 16 or more, gives 0x7FFF.

The most negative input (−16) is handled with magnitude 16 − 2⁻¹¹.

## Measured accuracy (Q4.11, against real arithmetic)

| function | range | worst absolute error seen |
|---|---|---|
| σ | [−16, 16) | 7.5·10⁻⁴ |
| tanh | [−16, 16) | 1.2·10⁻³ |
| eˣ | [−16, 0] | 1.8·10⁻³ |
| softmax, 8 elements | inputs in about [−7.8, 7.8] | 1.0·10⁻³ |

## Other word widths

The RTL is written in terms of `DW` and `FW`, and `nacu_width_tb` runs the
whole unit at the other widths the published unit was compared at. Where
only the width was given, the integer part is the smallest that the
saturation rule allows. The table stays at 53 entries of width 0.25, so the
wider formats reach the table's own error and no further:

| format | σ max error | tanh max error | eˣ max error |
|---|---|---|---|
| Q2.3 (6 bits) | 7.6·10⁻² | 1.2·10⁻¹ | 2.8·10⁻¹ |
| Q3.6 (10 bits) | 1.4·10⁻² | 2.1·10⁻² | 3.8·10⁻² |
| Q4.13 (18 bits) | 4.1·10⁻⁴ | 7.3·10⁻⁴ | 7.0·10⁻⁴ |
| Q4.16 (21 bits) | 3.8·10⁻⁴ | 7.5·10⁻⁴ | 6.7·10⁻⁴ |
| Q4.18 (23 bits) | 3.8·10⁻⁴ | 7.4·10⁻⁴ | 6.6·10⁻⁴ |

More accuracy at the wide formats would need a larger table
(`ENTRIES`, `SEGF`). The published description gives no table size
for them.

## Choices made here

The published description fixes the overall structure. It does not fix the
following, and this implementation chose:

* **Segment layout.** Uniform segments of width 0.25 with a saturated last
  entry. The published unit has 53 entries, but neither their placement nor
  their values are given.
* **Table values.** The fitting rule is the one described above.
* **Multiplier operand.** The multiplier takes |x| in the activation modes,
  which the negated slopes require. For tanh the table is read at 2|x|.
* **Decrementor.** The decrementor is the a − 1 circuit. The published
  text points to the 1 − 2q circuit for it instead, but σ' − 1 with
  σ' ∈ [1, 2] is the a − 1 operation.
* **The 1 − 2q input.** The 1 − 2q circuit takes −2q, which is the reading
  under which its bit rule is exact.
* **Divider.** It is a radix-2 restoring divider in 4 stages, chosen so
  that eˣ takes 8 cycles in total. The published text also mentions 90 ns
  to fill the pipeline (24 cycles at 3.75 ns), which does not match the
  8-cycle latency; this design follows the 8 cycles.
* **Divider operands.** For eˣ the divider computes 1 / `mac_out`; for
  softmax it computes `x0` / `sm_in`. The published block diagram shows
  which signals reach the divider in each mode, but not which one is the
  dividend.
* **Interface.** The valid-only interface, the `acc_clr` input, the
  softmax latency of 8, synchronous reset, rounding and saturation are all
  this design's own.
* **Not built.** The reconfigurable fabric that feeds the unit is not part
  of this RTL. Neither are the subtraction x − x_max and the softmax
  sequencing, which that fabric performs.

## Files

| file | contents |
|---|---|
| `rtl/nacu_pkg.sv` | widths, `op_e`, table generator, format rule |
| `rtl/sigmoid_lut.sv` | 53-entry PWL table |
| `rtl/one_minus_q.sv`, `rtl/two_q_minus_one.sv`, `rtl/one_minus_two_q.sv` | subtractor-free bias corrections |
| `rtl/nacu_coef_calc.sv` | table + corrections + selection |
| `rtl/nacu_mac.sv` | two-stage multiply-add / accumulate |
| `rtl/nacu_divider.sv` | pipelined divider |
| `rtl/nacu.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `nacu_width_tb` |
| `tb/nacu_width_check.sv` | sweeps one instance of a given width (used by `nacu_width_tb`) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`, and each stops
itself with a failure after a fixed number of cycles. With Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/nacu_pkg.sv tb/nacu_tb.sv --top-module nacu_tb
    ./obj_dir/Vnacu_tb

Replace `nacu_tb` with any other testbench name. `nacu_width_tb` also needs
`-y tb`, for its checker module `nacu_width_check`. `nacu_tb` runs the top at
its default parameters through every operation:

* sweeps of σ, tanh and eˣ;
* accumulation chains, including saturation;
* neurons: a dot product on the MAC, then σ of the sum;
* twenty softmax vectors;
* a division by a zero sum;
* 3000 cycles of random mixed traffic.

It checks every result's value, operation and latency. It also counts each
mechanism and fails if one never occurs: both signs of σ and tanh, the
saturated table entry, accumulation, clearing, MAC and divider saturation,
and out-of-order completion. It runs in well under a second. The module
testbenches are exhaustive for the three bias circuits. For the table and
the coefficient selection they sweep the whole input range against real
arithmetic. For the MAC and the divider they compare random traffic
against cycle-accurate integer models.
