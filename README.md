# Majority-logic approximate adders and an approximate 8×8 multiplier

In several emerging nanotechnologies (quantum-dot cellular automata among them) the basic logic
element is not a NAND but a three-input **majority gate**: M(a, b, c) is 1 when at least two inputs
are 1. Addition maps well onto it, since a full adder's carry *is* M(a, b, c). This RTL is a set of
small arithmetic circuits built from nothing but majority gates and inverters, which trade some
accuracy for fewer gates and shorter paths:

* three **approximate multi-bit adder cells** (MLFAFA-a, MLFAFA-b, MLFAFA-2). Each is designed as a
  whole rather than as a chain of one-bit adders. None forms the carry between its bits exactly. Each
  uses one operand bit or the carry-in as a stand-in for that carry, so an inexact carry is never
  rippled on to the higher bits;
* an **approximate 8×8 unsigned multiplier** (`mlam_8x8`). Its partial-product reduction is a
  Wallace-style tree with **approximate parallel 6:3 compressors** in its tallest columns. A 6:3
  compressor takes six bits of equal weight and returns a 3-bit count of them.

Everything is combinational: there is no clock, no reset and no register anywhere. Every module is
written structurally from `ml_gate`, so gate counts and logic depths can be read off the source.

## The majority gate

`ml_gate` has ports `a_in`, `b_in`, `c_in` and `ml_out`, and computes
`ml_out = a_in&b_in | b_in&c_in | a_in&c_in`. Two derived forms appear throughout:

| use            | form                        |
|----------------|-----------------------------|
| AND            | M(a, b, 0)                  |
| OR             | M(a, b, 1)                  |
| full adder     | carry = M(a, b, c), sum = M(¬carry, c, M(a, b, ¬c)) |
| half adder     | carry = M(a, b, 0), sum = M(¬carry, M(a, b, 1), 0)  |

The exact full and half adders are the helper modules `ml_fa` and `ml_ha`. `ml_rca` is a ripple
adder built from `ml_fa`.

## The approximate adder cells

All three cells have single-bit ports, named as on their published schematics. Their gate
instances are named `ML_GATE_0`…`ML_GATE_3` to match those schematics.

### MLFAFA-a (`mlfafa_a`): 4 gates, 2 inverters, depth 3

```
sum0 = cin                       (a wire: bit 0 does no arithmetic)
g0   = M(0, a0, b0)              (generate of bit 0)
cout = M(b0, a1, b1)             (b0 stands in for the carry into bit 1)
sum1 = M(g0, M(¬b0, a1, b1), ¬cout)
```

The value {cout, sum1, sum0} is wrong for 16 of the 32 input patterns. It is then always off by
exactly 1, so the mean error distance is 0.5. The same netlist is published under a second name,
MLFAFA-1. The schematic does not settle which low input is `a0` and which is `b0`. This RTL takes
the input that feeds the inverter and the carry gate as `b0`. Swapping `a0` and `b0` at an
instance changes the function.

### MLFAFA-b (`mlfafa_b`): 3 gates, 1 inverter, depth 2

```
cout = M(a1, b1, cin)            (cin stands in for the carry into bit 1)
sum0 = M(a1, b1, ¬cout)
sum1 = M(a0, b0, ¬cout)
```

**Read the port names carefully.** The published schematic labels the output of the gate on the
*upper* operand pair `sum0`, and the output of the gate on the lower pair `sum1`. The RTL keeps
those names. Over all 32 patterns:

* read as named, {cout, sum1, sum0} is wrong for 16 patterns;
* read with the two sum ports swapped, it is wrong for 14 patterns.

The mean error distance is 0.5 either way. If you want the upper gate as the upper sum bit, swap
the two ports at the instance.

### MLFAFA-2 (`mlfafa_2`): 4 gates, 2 inverters, depth 3

```
cout = M(a3, b3, b2)             (b2 stands in for the carry into bit 3)
t    = M(a3, b3, ¬b2)
sum3 = M(¬cout, b2, t)           (= a3 ^ b3 ^ b2: exact for that stand-in carry)
sum0 = t
sum1 = sum2 = M(¬b2, a1, a2)
```

The gate wiring is the published one. The bit numbers of the port names are this design's reading:
the published labels settle only the letters a and b. The names were chosen so that the one exact
part (cout, sum3) is the top of a 4-bit word. The other operand bits (a0, b0, b1) and a carry-in
are not ports, because the published cell has only five inputs. Treat this cell as a faithful
netlist with uncertain port semantics. The testbench checks its truth table and the exactness of
{cout, sum3}, and claims no error metrics for it.

## The approximate 6:3 compressor (`approx_compressor_6_3`)

Only the compressor's role is given: six partial products in, three bits out, built "in parallel",
and simpler than chaining two 4:2 compressors. The approximation below is this design's own:

```
(s1, c1) = ML full adder of x[2:0]        (s2, c2) = ML full adder of x[5:3]
y[0] = M(s1, s2, 1)                       s1 OR s2: the carry of s1 + s2 is dropped
y[1] = c1 ^ c2,  y[2] = c1 & c2           exact ML half adder
```

The exact count is s1 + s2 + 2(c1 + c2). The only error is an undercount of 1 when both triples
have odd parity. That happens for 16 of the 64 input patterns. The two halves never feed each
other, so y[0] is three gates deep. The compressor uses 11 majority gates.

## Partial-product reduction and the multiplier

`mlam_8x8` computes `product_out ≈ a_in × b_in` in three steps:

1. **Partial products.** 64 AND gates, each written as M(a, b, 0), give `pp[i][j] = a_in[j] & b_in[i]`.
2. **Reduction (`mlam_ppr`).** Every stage treats all columns at once, from the least significant
   column up:
   * each column is cut into groups of six, and each group goes through a 6:3 compressor;
   * the remainder is cut into groups of three for exact full adders;
   * two bits left over from a column that held more than two go through a half adder;
   * anything else passes through.

   The bits of a column are taken in the order they were produced. Stages repeat until every column
   holds at most two bits. For 8×8 this gives six stages with 5 compressors, 25 full adders and
   5 half adders. The five compressors all sit in stage 1, one on each of columns 5 to 9, where the
   tree is tallest (heights 6, 7, 8, 7, 6). The later stages mostly ripple a few carries through
   the upper columns. The column heights after each stage are listed as comments in
   `rtl/mlam_ppr.sv`.
3. **Final adder.** `ml_rca` is an exact 16-bit ripple adder of ML full adders. It adds the two
   rows. An immediate assertion in `mlam_8x8` checks that this adder never carries out of bit 15.

The compressors are the only inexact parts, and each can only undercount. So the product **never
exceeds the exact product**. The error is a sum of some of 2^5 … 2^9 (for each compressor, its
column weight).

Measured over all 65 536 operand pairs:

| metric | value |
|---|---|
| error rate | 38 422 / 65 536 (58.6 %) |
| mean error distance | 189.9 |
| NMED (MED / 255²) | 2.92 × 10⁻³ |
| mean relative error | 1.92 × 10⁻² |
| largest error | 992 |

The published simulation shows 54 × 212 giving 12 640 (exact 11 448). This RTL gives 10 872 for
that pair. The published reduction and compressor are not specified in enough detail to match
them. The published FPGA result, 22 LUTs for a circuit with 16 input and 16 output bits and no
registers, also points to a far more aggressive approximation than this one. This multiplier has
the same I/O and is also register-free, but is much larger. Use it as a working multiplier of the
described structure, not as a reproduction of those numbers.

## Top level (`ml_approx_top`)

The four circuits are independent. The top places them side by side, each with its own prefixed
ports:

| prefix | cell | ports |
|---|---|---|
| `fa_` | mlfafa_a | `fa_a[1:0]`, `fa_b[1:0]`, `fa_cin` → `fa_sum[1:0]`, `fa_cout` |
| `fb_` | mlfafa_b | `fb_a[1:0]`, `fb_b[1:0]`, `fb_cin` → `fb_sum[1:0]`, `fb_cout` (`fb_sum[0]` is the cell's `sum0` as named) |
| `f2_` | mlfafa_2 | `f2_a1`, `f2_a[3:2]`, `f2_b[3:2]` → `f2_sum[3:0]`, `f2_cout` |
| `mul_` | mlam_8x8 | `mul_a[7:0]`, `mul_b[7:0]` → `mul_p[15:0]` |

Bit k of an adder vector is operand or sum bit k.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares against a model
written differently from the RTL:

* majority is computed by counting ones;
* the compressor is modelled as popcount minus a parity term;
* the multiplier is modelled by `tb/mlam_model_pkg.sv`, a bit-level simulation of the reduction
  rule with column lists rather than the fixed netlist.

Coverage is exhaustive wherever that is possible: 8, 32, 64 and 65 536 patterns. The tree is also
fed 20 000 random 64-bit patterns that no multiplication produces. `tb_ml_approx_top` drives all
four circuits at once through 65 536 steps. It fails if any approximation mechanism never fired: an
adder cell off the exact sum, MLFAFA-2's stand-in carry differing from the real one, a multiplier
undercount, or an exact product. Each testbench ends with a `TB_RESULT checks=… failures=…` line.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_mlam_8x8 \
    -y rtl -y tb +libext+.sv -Irtl -Itb tb/mlam_model_pkg.sv tb/tb_mlam_8x8.sv
./obj_dir/Vtb_mlam_8x8
```

Replace the testbench name to run another. Every run finishes in well under a second. The
testbenches print the error figures quoted above.

## Changing it

* **The reduction tree** in `rtl/mlam_ppr.sv` is a flat list of instances that follows the rule
  above. To try another compressor placement or another grouping, change the instances, and change
  `ppr_value` in `tb/mlam_model_pkg.sv` to the same rule. The testbenches check the RTL against that
  function.
* **Another compressor approximation** needs only `approx_compressor_6_3.sv` and `approx63` in the
  model package to change.
* **The adder cells** are fixed netlists with no parameters.
