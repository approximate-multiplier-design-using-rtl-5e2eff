# Approximate Dadda multipliers built from approximate 4:2 compressors

Most of a multiplier's delay, area and power goes into partial-product
reduction: adding up the `n` rows of `a[j] & b[i]` bits until only two rows
remain for a final adder. A 4:2 compressor takes four bits of one column and
returns a sum bit in that column and a carry bit in the next. An exact one
needs two full adders and a carry chain between neighbouring columns.
For error-tolerant work such as image processing, a compressor that is
wrong for a few rare input patterns can drop the chain and most of the
gates. Such a multiplier is smaller and faster, and its products are close to
the exact ones but not always equal.

This RTL holds four 4:2 compressors (one exact, three approximate) and two
unsigned multipliers built from them:

* `dadda_mult8`: an 8x8 multiplier whose compressors are, by default, all
  the new approximate compressor. Its product is then never above the exact
  one. A parameter switches every compressor position to the dual-stage
  pair instead.
* `extension16bit2`: a 16x16 multiplier that mixes three compressors by
  column. The high columns use exact compressors, the columns around the
  tallest one use a two-stage "dual-stage" pair, and the low columns use a
  high-speed approximate compressor.

`approx_mult_top` puts the two side by side. Everything is combinational and
has no clock, no reset and no pipeline registers.

## The compressors

All four compressors take four bits of equal weight and return a carry
(weight 2) and a sum (weight 1). The exact one also takes a carry-in and
returns a carry-out. In the tables below, "value" is `2*carry + sum` and
"ED" (error distance) is value minus the number of input ones.

### Exact compressor (`exact_compressor42`)

This is two cascaded full adders. The first adds A1, A2 and A3 and gives
COUT plus an intermediate sum. The second adds that sum, A4 and CIN and
gives CARRY and SUM. So `A1+A2+A3+A4+CIN = SUM + 2*(CARRY+COUT)`. COUT does
not depend on CIN, so in a row of these cells COUT of column x can feed CIN
of column x+1 without a ripple.

### High-speed area-efficient compressor (`hs_compressor42`)

```
ca = v1 | v2
su = (v1 ^ v2) ? (v3 & v4) : (v3 | v4)
```

It has one XOR, one AND, two ORs and a 2:1 mux, and no chain. It is wrong
for four of the sixteen inputs (written v1 v2 v3 v4):

| input | value | exact | ED |
|-------|-------|-------|----|
| 0011  | 1     | 2     | -1 |
| 0100  | 2     | 1     | +1 |
| 1000  | 2     | 1     | +1 |
| 1111  | 3     | 4     | -1 |

The errors sum to zero over all inputs. Note, however, that a single 1 on v1
or v2 is doubled. So in a multiplier the input order matters, and even a
product with a power-of-two operand can be inexact.

### Dual-stage pair (`ds_compressor42_n`, `ds_compressor42_p`)

This is the high-speed compressor rebuilt from inverting gates, which are
cheaper in CMOS. The first stage uses NOR for the carry, and a mux that picks
the NAND or NOR of v3,v4. So it computes exactly the complements of the
high-speed compressor's outputs:

```
ca_n = ~(v1 | v2)
su_n = (v1 ^ v2) ? ~(v3 & v4) : ~(v3 | v4)
```

Its outputs are not used as they are. They feed the next reduction stage,
which uses the second cell. That cell takes four complemented bits and,
through De Morgan, returns the true high-speed result:

```
ca = ~(vn1 & vn2)               = v1 | v2
su = (vn1 ^ vn2) ? ~(vn3 | vn4)  = (v1 ^ v2) ? v3 & v4
                 : ~(vn3 & vn4)  :              v3 | v4
```

So a first-stage cell that feeds a second-stage cell behaves like two
high-speed compressors in cascade, with no inverters between them. This is the part of the design
that is easiest to get wrong. A bit can arrive at a cell in the wrong
polarity: a complemented bit going to a full adder, or a true bit going to a
second-stage cell. The 16-bit netlist inserts an explicit inverter for
each such bit; these are the nets named `*_i`, 14 of them. In the 8-bit tree's
dual-stage setting, the inversions are written at the cell inputs (`~x`). The source
describes only the first-stage cell. It says only that cascading in
multiples of two removes the inversion. The gate form of the second stage
given here is this design's own.

### New approximate compressor (`novel_compressor42`)

A full adder adds a0, a1 and a2, giving c0 and s0. A half adder adds s0 and
a3, giving the sum s1 and a carry. The output carry is `c0 | carry`. Both
carries are 1 only when all four inputs are 1. So the cell is exact except
at 1111, where it returns 2 instead of 4. It has no carry-in and no
carry-out, so there is no chain. Its error is never positive, which is why
`dadda_mult8` never overestimates.

## The multipliers

### Partial products and final adder

`pp[i][j] = b[i] & a[j]` has weight `2**(i+j)` (in the 16-bit module the
operands are `in` and `v`). After the reduction stages each column holds at
most two bits. They form two rows, which a ripple-carry adder (`rca`) adds.
The products are `2n+1` bits wide: the top bit is the final adder's carry,
and it was 0 in every simulated case.

### Reduction schedule

The column heights go 8 → 4 → 2 for 8x8, and 16 → 8 → 4 → 2 for 16x16. Each
stage halves them with 4:2 compressors, with full and half adders where a
column is only one or two bits too high. The cells are placed by a Dadda-style
rule, applied the same way in both trees:

1. In each stage, columns are handled from bit 0 upwards.
2. A column's list of bits starts with the COUTs of the exact compressors
   one column lower in this stage, followed by its pool.
3. The column is too high while (its list) + (carries already sent to it
   by the column below in this stage) exceeds the stage's target. While
   it is, it takes the first bits of its list into the largest cell that
   does not overshoot:
   * an exact compressor with CIN (removes 4; exact region only);
   * a 4:2 compressor of the column's region (removes 3; an exact
     compressor then has CIN = 0);
   * a full adder (removes 2);
   * a half adder (removes 1).
4. The column's pool for the next stage is: the carries from the column
   below, then its own new sums, then its untouched bits.
5. Cell inputs are wired in list order. For the approximate cells that is
   A1/v1/a0 first. A five-input exact compressor takes the first bit as CIN.

Rule 4 puts the complemented outputs of the dual-stage first stage at the
head of the next stage's lists. That way they mostly reach second-stage
cells without inverters.

Cells used:

| module            | 4:2 cells | FA | HA | inverters |
|-------------------|-----------|----|----|-----------|
| `dadda_mult8`     | 17 (new, or 7 dual first stage + 10 dual second stage) | 1 | 6 | 0 |
| `extension16bit2` | 34 exact, 16 dual first stage, 10 dual second stage, 35 high-speed | 7 | 10 | 14 |

The two multiplier modules are flat lists of these instances. Net names give
the stage and column (`s2_c13_sum0` is the first sum made in column 13 by
stage 2). To change a tree, change the rule above and re-derive the list.
Do not edit single instances.

### Column regions of the 16x16 tree

| columns | stage 1 | stage 2 | stage 3 |
|---------|---------|---------|---------|
| 18..31  | exact   | exact   | exact   |
| 13..17  | dual-stage, first cell | dual-stage, second cell | high-speed |
| 0..12   | high-speed | high-speed | high-speed |

Exact compressors sit in the high columns, so the large weights are summed
exactly. All approximation happens at or below weight `2**17`, plus the
carries it sends upward.

## Accuracy measured in simulation

Each product is compared with the exact product:

| multiplier | operands | products inexact | mean error | error range |
|------------|----------|------------------|------------|-------------|
| 8x8 (new compressor, default) | all 65 536 pairs | 5 775 (8.8 %) | −209 | ≤ 0 |
| 8x8 (`COMP = M8_DUAL_STAGE`) | all 65 536 pairs | 62 574 (95.5 %) | +1 337 | both signs |
| 16x16 (mixed)        | 100 260 (random + corners) | 99.8 % | +252 165 (mean abs. 281 372) | −1 441 800 … +964 608 |

For scale, the mean 16x16 product is about 1.07·10⁹, so the mean error is
about 0.03 % of it. The 16-bit tree is wrong almost every time. It is biased
upward because its low columns use the high-speed compressor, which doubles
a lone 1 on its first two inputs. These figures depend on the placement rule
above: a different assignment of bits to compressor inputs changes them.

## How far to trust it, and where it departs from the source

* The four compressors follow the published equations, truth table and
  block diagrams. The exception is the dual-stage second cell, which is this
  design's own (see above). For the new compressor, the source's text says
  input 1111 returns carry=1, sum=1 (value 3). Its block diagram (full adder,
  half adder, OR) gives carry=1, sum=0 (value 2). The RTL follows the
  diagram.
* The multipliers follow the published stage counts, cell kinds and region
  labels. They do not follow the published dot diagrams cell for cell:
  placement comes from the rule above. The 16-bit region boundaries
  (columns 13 and 18) were read off a drawing without numbers. The choice of
  the high-speed cell in stage 3 of columns 13..17 is this design's own.
* The source's comparison table calls its proposed 8-bit multiplier one
  "using dual stage" compressors. Its text, though, introduces the 8-bit
  Dadda multiplier as the test vehicle for the new compressor. `dadda_mult8`
  therefore has a parameter `COMP` (type `amul_pkg::mult8_comp_e`).
  `M8_NEW_COMP` (the default, used by the top) puts the new compressor in
  every position. `M8_DUAL_STAGE` puts the dual-stage pair there instead.
* The 16-bit module keeps the published name and ports (`in`, `v`, `z`, with
  `z` 33 bits wide). The source's waveform table also shows a 16-bit signal
  `out`, whose meaning is not given, so it is not built.
* Signedness is not stated; the multipliers are unsigned.
* The comparison baselines are not included: 8-bit multipliers built only
  from high-speed or only from dual-stage compressors, and the existing
  16-bit multiplier. The FPGA area, delay and power figures are not
  reproduced.

## Files

`rtl/`:

* `amul_pkg.sv`: the enum type of the 8x8 compressor choice.
* `full_adder.sv`, `half_adder.sv`: one-bit adders.
* `exact_compressor42.sv`, `hs_compressor42.sv`, `ds_compressor42_n.sv`,
  `ds_compressor42_p.sv`, `novel_compressor42.sv`: the compressors.
* `rca.sv`: ripple-carry final adder, parameter `W` (default 32).
* `dadda_mult8.sv`: 8x8 multiplier, ports `a`, `b`, `p[16:0]`, parameter
  `COMP`.
* `extension16bit2.sv`: 16x16 multiplier, ports `in`, `v`, `z[32:0]`.
* `approx_mult_top.sv`: both multipliers side by side, ports
  `a8`, `b8`, `p8` and `in`, `v`, `z`.

`tb/`:

* `mult_ref_pkg.sv`: behavioural reference models. It holds the compressor
  truth tables and a bit-list implementation of the reduction rule for
  both trees. It is written independently of the RTL. It treats a
  dual-stage pair as the high-speed compressor, so it also checks the
  inverters.
* `tb_<module>.sv`: one self-checking testbench per module. The compressors
  and adders are tested exhaustively. `tb_dadda_mult8` runs all 65 536
  operand pairs. `tb_extension16bit2` runs 100 260 pairs.
  `tb_approx_mult_top` drives both multipliers together. It counts how often
  each mechanism fires: the new compressor's 1111 case, over- and
  under-estimates, dual-stage complement and restore, and exact COUT→CIN
  chaining. If any of them never fires, the testbench fails. Each testbench
  ends with a `TB_RESULT checks=… failures=…` line.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb rtl/amul_pkg.sv tb/mult_ref_pkg.sv tb/tb_approx_mult_top.sv \
    --top-module tb_approx_mult_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_approx_mult_top` with any other testbench name to run it. Every
testbench finishes in a few seconds. Each also has a watchdog that reports
a failure if it does not finish in time.
