# A 4 x 4 FIR block built on heterogeneous adders

This design computes a small FIR filter in one combinational pass. There are four 8-bit
coefficients `h0..h3` and four 8-bit samples `x(n)..x(n-3)`. The block produces all seven
outputs of their linear convolution:

    y(k) = sum over i + j = k of h_j * x(n-i),      k = 0 .. 6

Sixteen multipliers form every product `h_j * x(n-i)`. The products on each anti-diagonal
are then summed by a ladder of nine adders. Each adder is *heterogeneous*: it does not use
one architecture across the whole word. Instead it splits the word into three sections,
each with the adder style that suits its position:

| bits   | section                  | why it sits there                                                         |
|--------|--------------------------|---------------------------------------------------------------------------|
| 3:0    | 4-bit ripple carry adder | smallest circuit; over 4 bits its carry is ready early anyway             |
| 13:4   | 10-bit carry look-ahead  | covers the long middle span without a linear carry chain                  |
| 17:14  | 4-bit carry select       | both possible results are ready when the middle carry arrives; a mux picks one |

The aim is area and delay between those of a single homogeneous adder. The word is also
only as wide as the data needs: 18 bits, not a generic 32-bit integer adder. Eighteen bits
hold any sum of four 16-bit products (at most 4 x 255 x 255 = 260100).

## The multiplier array and the adder ladder

Products are numbered `m[4*i + j] = h_j * x(n-i)`, giving `m0..m15`. Output `k` collects the
products with `i + j = k`. Its number of terms is 1, 2, 3, 4, 3, 2, 1 across the seven
outputs. The 16 − 7 = 9 additions are arranged as follows. `add_out1..add_out4` are internal
signals of `fir_hetero`, and the testbench checks them by hierarchical reference.

    fir_filter_out1 = m0
    fir_filter_out2 = m1 + m4
    fir_filter_out3 = add_out1 + m8          add_out1 = m2 + m5
    fir_filter_out4 = add_out3 + m12         add_out2 = m3 + m6,  add_out3 = add_out2 + m9
    fir_filter_out5 = add_out4 + m13         add_out4 = m7 + m10
    fir_filter_out6 = m11 + m14
    fir_filter_out7 = m15

Seen as a grid (rows = outputs, columns = successive products added), the adders form a
diamond. There are five adders between the first and second product columns, three
between the second and third, and one before the fourth. The longest path is the
`fir_filter_out4` chain: one multiplier followed by three adders in series.

Worked example with h = 5, 4, 3, 2 and x(n..n-3) = 6, 7, 8, 9:
products 30 24 18 12 / 35 28 21 14 / 40 32 24 16 / 45 36 27 18,
intermediate sums 46, 33, 65, 38, outputs 30, 59, 86, 110, 74, 43, 18.

## Inside the heterogeneous adder

`hetero_adder` chains its three sections carry to carry:

- `rca` is a chain of `full_adder` cells.
- `cla` forms generate `g = a & b` and propagate `p = a ^ b` for every bit, then derives
  all carries with a look-ahead unit. The carry in is folded into bit 0. A parallel-prefix
  network of ⌈log2 10⌉ = 4 levels then combines `(G, P)` pairs at distances 1, 2, 4 and 8.
  After the last level, `G[i]` is the carry out of bit `i`. The module brings out the full
  carry vector `c[10:0]` (`c[0]` = carry in, `c[10]` = carry out to the next section).
  That makes it usable, and testable, as a stand-alone 10-bit adder.
- `csla` holds two 4-bit ripple adders with fixed carry-in 0 and 1. The incoming carry
  selects one result.

Every piece is combinational and parameterised by width. `hetero_adder` takes the
section widths `RCA_W`, `CLA_W` and `CSL_W` (defaults 4, 10 and 4).

## Widths, number format and overflow

| quantity                    | width | note                                   |
|-----------------------------|-------|----------------------------------------|
| coefficients, samples       | 8     | unsigned                               |
| products `m0..m15`          | 16    | unsigned 8 x 8                         |
| adder operands and sums     | 18    | never overflow                         |
| outputs `fir_filter_out1..7`| 16    | low 16 bits of the exact 18-bit result |

The outputs are specified as 16 bits, so an output wraps modulo 65536 when its exact value
is larger. That can happen for outputs 2 to 6 with large operands; outputs 1 and 7 are
single products and always fit. The two upper sum bits and the adders' carry-outs are not
used; lint reports them as unused signals. If the full result is needed, widen
`OUT_W` in `fir_pkg` to 18.

All arithmetic is unsigned. Signed (two's complement) coefficients would need
sign-extended products and a signed multiplier. That is not built here.

## Timing

There is no clock, register or reset anywhere. Outputs follow the inputs after the
combinational delay of one multiplier and at most three 18-bit adders. To use the block in
a streaming filter, place a 4-deep sample delay line ahead of `x_n..x_n_3` and, if needed,
registers around the block. Neither is part of this design.

## What is specified and what was chosen here

Taken from the specification of the design:
- the 4 x 4 structure, 16 multipliers and 9 heterogeneous adders with the grouping above
- the 8-bit inputs and 16-bit outputs, and the port names
- the three adder kinds and their 4 / 10 / 4 bit split
- the 10-bit look-ahead adder's ports, including its 11-bit carry vector

Chosen in this design, where the specification is silent:
- The order of the adder sections: ripple lowest, carry select highest.
- The inside of each adder section. The look-ahead unit uses the prefix form, not
  flattened sum-of-products carry equations. Both compute the same carries.
- The multiplier is written as a shift-and-add array. Synthesis may restructure it.
- Unsigned arithmetic and 16-bit wrap-around at the outputs.
- Purely combinational operation, with no sample delay line inside the block.

Not built:
- A 2-bit input `s_in` appears next to the filter's signals in its reference simulation.
  Its purpose is not described, so the block has no such port.
- Everything outside the digital filter in a complete signal chain: anti-aliasing filter,
  sample-and-hold, ADC, DAC, output filter and amplifier. These are analog parts.

## Files

| file                      | contents                                                  |
|---------------------------|-----------------------------------------------------------|
| `rtl/fir_pkg.sv`          | shared widths and types                                   |
| `rtl/fir_hetero.sv`       | top: multiplier array and adder ladder                    |
| `rtl/hetero_adder.sv`     | 18-bit ripple / look-ahead / carry select adder           |
| `rtl/rca.sv`, `rtl/cla.sv`, `rtl/csla.sv`, `rtl/full_adder.sv` | adder sections and cell |
| `rtl/multiplier.sv`       | 8 x 8 unsigned multiplier                                 |
| `tb/tb_<module>.sv`       | self-checking testbench for each module                   |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs.

- `tb_full_adder`, `tb_rca`, `tb_csla`: exhaustive.
- `tb_multiplier`: all 65536 operand pairs.
- `tb_cla`: sum and whole carry vector. It applies a reference vector (`0000111100 +
  1111000011` gives `1111111111` with no carries), a full-length carry chain and 20000
  random operands. The expected carry into bit `i` is recomputed from the exact sum of the
  low `i` bits.
- `tb_hetero_adder`: directed carries across each section boundary, then 20000 random
  operands. It counts the boundary carries and fails if either never occurs.
- `tb_fir_hetero`, end to end at the default sizes:
  - It checks five reference coefficient/sample sets against their published outputs and
    intermediate sums.
  - It then runs 20000 random sets (a quarter of them with small values) against a direct
    convolution.
  - It counts three events: carries into the look-ahead section, carries into the carry
    select section, and outputs that wrap. It fails if any of them never happens.

Running one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv tb/tb_fir_hetero.sv \
        --top-module tb_fir_hetero -Mdir obj -o sim && ./obj/sim

Use the same command with another `tb_<module>` for the other blocks. Each build takes
seconds to a minute, and each run well under a second.
