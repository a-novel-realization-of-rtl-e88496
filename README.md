# Two small unsigned multipliers: a 2x2 LUT/multiplexer tiling and a zero-skipping partial product chain

A 4x4 unsigned multiplier takes two 4-bit operands and returns their 8-bit
product. This repository gives two different ways of building one, for DSP
datapaths where the multiplier's area, power and delay matter:

* **LUT multiplier** (`lut_mul4x4`). The operands are cut into 2-bit
  halves. Four 2x2 multipliers form the cross products, and an adder network
  of half and full adders adds them. Each 2x2 multiplier contains no adder:
  it is a 4-to-1 multiplexer that picks among the four possible products.
* **Partial product multiplier** (`pp_mul`). The product is built from the
  rows `B * A[k]`, one stage per row. A stage whose row is zero bypasses its
  adder, which saves switching activity. The width is a parameter `N`
  (default 4), and the multiplier has `N-1` stages.

Both are purely combinational. There is no clock, no reset and no handshake,
and the product is valid one logic delay after the operands change.
`multiplier_top` puts the two side by side, each with its own ports.

## The 2x2 cell: a multiplexer instead of an adder

`lut_mul2x2` computes `o = a * b` for 2-bit `a` and `b`. Operand `a` is the
select of a 4-to-1 multiplexer:

| `a` | selected input | value        |
|-----|----------------|--------------|
| 00  | constant       | `0000`       |
| 01  | `b`            | `{00, b}`    |
| 10  | `b << 1`       | `{0, b, 0}`  |
| 11  | `TRIPLE[b]`    | `3*b`        |

Three of the four products are only shifts of `b`. The fourth, `3*b`, is read
from a four-entry constant table indexed by `b`, where `TRIPLE[i] = 3*i`
(0, 3, 6, 9). So the cell is one multiplexer level after a table read.

## Tiling four cells into a 4x4 multiplier

Write `a = 4*AH + AL` and `b = 4*BH + BL`. Then

    a*b = AL*BL + 4*(AH*BL + AL*BH) + 16*AH*BH
        =   p0  + 4*(  p1  +   p2 ) + 16*p3

`lut_mul4x4` sums these terms in two ripple-carry rows:

1. `o[1:0] = p0[1:0]`. Nothing else has weight 1 or 2.
2. Row 1: `s = p1 + p2` gives 5 bits. It uses one half adder and three full
   adders.
3. Row 2: `o[7:2] = {p3, p0[3:2]} + s`. This 6-bit add uses one half adder,
   four full adders and one XOR for the top bit. The carry out of the top bit
   would be product bit 8, which is always 0, because 15*15 = 225. An
   immediate assertion checks that in simulation.

The split into four 2x2 products feeding one adder block, and the
half/full-adder cells, come from the design this RTL implements. How the
adders are arranged (these two rows, ripple carry) is this implementation's
own choice.

## The zero-skipping partial product chain

`pp_mul` names its partial products `temp(k) = B & {N{A[k-1]}}`, for k = 1..N.
A running sum `r` starts as `temp(1)`. Each stage shifts `r` right by one
place, because the bit it drops is already a finished product bit. It then
adds the next partial product only if that partial product is non-zero:

    c[0] = r(0)[0],  r(0) = temp(1)
    stage k = 1 .. N-1:
        add(k) = temp(k+1) != 0
        r(k)   = add(k) ? temp(k+1) + (r(k-1) >> 1) : (r(k-1) >> 1)
        c[k]   = r(k)[0]
    c[2N-1 : N-1] = r(N-1)          (the last stage gives the top N+1 bits)

For N = 4, the intermediate sums `r(1)` and `r(2)` are the values often
written `temp5` and `temp6`, and the last stage gives `c[7:3]`. In the example
A = 0101, B = 1111, the partial products are temp1 = 1111, temp2 = 0000,
temp3 = 1111 and temp4 = 0000. Stages 1 and 3 bypass their adders, and the
product is 01001011 (75).

The bypass is implemented as a real multiplexer in front of each stage's
adder result. The per-stage enable is the internal signal `add_en[k]`. Adding
zero changes nothing, so the bypass never changes the product. What it
changes is which path carries the value. Any power saving depends on how
synthesis and the target technology handle the idle adder. The RTL does not
isolate the adder's operands further.

The flow chart this method is usually drawn with has two branches where `temp2`
is non-zero and `temp3` is zero. Those branches read `C[7:3] = {0,0,0,0,temp5[2]}`
and `C[7:3] = temp4 + temp5[4:3]`, and both drop bits of the running sum. For
example, 0010 x 1111 would not give 30. This RTL applies the same rule as every
other branch (the running sum shifted right by one, `temp5[4:2]`), so it
returns the true product in every case.

## Files

| file | contents |
|------|----------|
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit adder cells |
| `rtl/lut_mul2x2.sv` | 2x2 multiplexer/table multiplier |
| `rtl/lut_mul4x4.sv` | 4x4 multiplier from four 2x2 cells and the adder network |
| `rtl/pp_mul.sv` | N x N zero-skipping partial product multiplier, `N` = 4 by default |
| `rtl/multiplier_top.sv` | both 4x4 multipliers side by side: ports `p1_a`, `p1_b`, `p1_o` (LUT) and `p2_a`, `p2_b`, `p2_c` (partial product) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the outputs with products computed in the testbench
using integer arithmetic. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* The adder cells are checked over their full truth tables, and `lut_mul2x2`
  over all 16 operand pairs.
* `lut_mul4x4` is checked over all 256 operand pairs.
* `pp_mul` is checked over all pairs at N = 4 and at N = 8 (65536 pairs). At
  N = 4 it also checks, for every pair, that stage k uses its adder exactly
  when `B != 0` and `A[k] = 1`.
* `tb_multiplier_top` runs both multipliers at their default sizes over all
  256 pairs, feeding them different operands at the same time. It also
  requires that every mechanism occurs at least once: each multiplexer select
  value of every 2x2 cell (including the table read), a carry rippling into
  the top product bit, and both the add and the bypass in each of the three
  stages.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl tb/tb_multiplier_top.sv --top-module tb_multiplier_top
    ./obj_dir/Vtb_multiplier_top

Swap in any other `tb_<module>` the same way.

## Limits and departures

* Operands are unsigned only. Signed multiplication is not supported.
* The LUT multiplier is fixed at 4x4. Only the partial product multiplier is
  parameterised (`N`, tested at 4 and 8).
* No timing, area or power figures are claimed for this RTL. Results measured
  on one FPGA are 16, 22 and 43 slices and 4.804, 3.751 and 2.824 W for a
  conventional, the LUT and the partial product multiplier. They belong to
  that device and tool flow, and these files were not measured against them.
* The conventional multiplier used as a baseline is not included.
