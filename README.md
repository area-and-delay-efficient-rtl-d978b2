# Vedic 4x4 multipliers, with and without a pipeline

Urdhva Tiryakbhyam ("vertically and crosswise") is a multiplication rule
from Vedic mathematics. Applied to binary numbers, it forms each column of
the product straight away. Column *k* adds every cross product
`a[i] & b[j]` with `i + j = k`, plus whatever the column before it carried
over. All cross products exist at once. Only the carries ripple from column to
column. This RTL gives two 4-bit by 4-bit unsigned multipliers built on that
rule:

* `vedic_4x4` is a purely combinational multiplier. It is small, and its
  delay runs through the whole chain of columns.
* `vedic_4x4_pipe` splits the operands into 2-bit halves. It forms the four
  half products with 2x2 Vedic multipliers and adds them in a two-level adder
  tree, with registers between the steps. It takes a new operand pair on every
  clock, and each product comes out after a fixed latency. It uses more
  flip-flops and more adders, but its path between registers is much shorter.

`vedic_mult_top` holds the two side by side. They share no signals.

## The 2x2 building block (`vedic_2x2`)

```
q[0] = a0 b0                                   vertical
{c, q[1]}    = half_add(a1 b0, a0 b1)          crosswise
{q[3], q[2]} = half_add(a1 b1, c)              vertical
```

It has four AND gates and two half adders (`half_adder`).

## Column-wise 4x4 multiplier (`vedic_4x4`)

Sixteen AND gates make all the cross products. Seven columns then reduce them.
Each column's total is split into the product bit (bit 0) and the carry word
(the rest), which goes to the next column:

| column | cross products          | carry in | adder              | max total | carry out |
|--------|-------------------------|----------|--------------------|-----------|-----------|
| 0      | a0b0                    | –        | none               | 1         | –         |
| 1      | a1b0 a0b1               | –        | half adder         | 2         | 1 bit     |
| 2      | a2b0 a1b1 a0b2          | 1 bit    | `ut_column_adder`  | 4         | 2 bits    |
| 3      | a3b0 a2b1 a1b2 a0b3     | 2 bits   | `ut_column_adder`  | 6         | 2 bits    |
| 4      | a3b1 a2b2 a1b3          | 2 bits   | `ut_column_adder`  | 6         | 2 bits    |
| 5      | a3b2 a2b3               | 2 bits   | `ut_column_adder`  | 5         | ≤ 2       |
| 6      | a3b3                    | 2 bits   | half adder + OR    | 3         | q[7]      |

Column 5 never hands on more than 2, so column 6 totals at most 3. That is why
a half adder plus one OR gate is enough at the end: the half adder's carry and
the high carry bit can never both be 1. `ut_column_adder` simply adds its
cross-product bits to the carry-in word. Synthesis is free to turn that into
any compressor.

Timing is purely combinational. The critical path runs from an operand bit
through columns 2, 3, 4 and 5 to q[7].

## Pipelined 4x4 multiplier (`vedic_4x4_pipe`)

With `a = {aH, aL}` and `b = {bH, bL}`:

```
a*b = aL*bL + (aH*bL << 2) + (aL*bH << 2) + (aH*bH << 4)
```

The pipeline has four register ranks:

| rank | registers            | contents                                          |
|------|----------------------|---------------------------------------------------|
| 0    | `a_reg`, `b_reg`     | operands, loaded when `ld = 1`, held otherwise    |
| 1    | `temp1`..`temp4`     | the four 2x2 products at their weights (8 bits)   |
| 2    | `s1_reg`, `s2_reg`   | `temp1 + temp2`, `temp3 + temp4`                  |
| 3    | `q`                  | `s1_reg + s2_reg`                                 |

The longest path between registers is one 8-bit addition, or one 2x2 multiply.

### Timing

```
edge          E0        E1        E2        E3
a1,b1,ld=1  sampled
a_reg,b_reg   X
temp1..4                X
s1,s2                             X
q                                           X  = a1*b1
```

A pair sampled at edge E0 is on `q` just after E3, three edges later. A new
pair may be sampled at every edge, giving one product per clock. When `ld` is
low, the operand registers keep their pair. Three edges later `q` settles to
that pair's product and stays there. There is no valid flag. The user counts
the latency.

`rst_n` is asynchronous and active low. It clears every register, so `q`
reads 0 at once and the pipeline holds the product 0 x 0.

## Ports

`vedic_mult_top`:

| port     | dir | width | meaning                                         |
|----------|-----|-------|-------------------------------------------------|
| `a`, `b` | in  | 4     | operands of the combinational multiplier        |
| `q`      | out | 8     | `a*b`, combinational                            |
| `clk`    | in  | 1     | clock of the pipelined multiplier               |
| `rst_n`  | in  | 1     | asynchronous active-low reset                   |
| `ld`     | in  | 1     | load enable of the pipelined operand registers  |
| `a1`,`b1`| in  | 4     | operands of the pipelined multiplier            |
| `q_pipe` | out | 8     | `a1*b1`, three edges after the loading edge     |

All values are unsigned. There are no parameters: both multipliers are
4 bits wide.

## What is original and what is chosen here

These parts follow the design being reproduced:

* the Urdhva Tiryakbhyam rule;
* the three modules (2x2, 4x4, and pipelined 4x4);
* the unpipelined structure: 16 AND gates, a half adder at each end of a
  staircase of four column adders;
* the pipelined structure: operand registers, four product words, two adders
  into two registers, and a final adder into the output register;
* the port names `clk`, `rst`, `ld`, `a1`, `b1` and `q`;
* the example results: products 0, 9, 24, 45, 40, 5, 84, 77, 16, 45 for
  a = 0..9, b = 15, 9, 12, 15, 10, 1, 14, 11, 2, 5, and a pipelined run with
  a1 = 10 giving 40, 60, ... 140, 0, 20.

These are choices made in this RTL:

* how each column adder is built inside;
* which two products share a first-level adder;
* edge-triggered registers where the original speaks of latches;
* an asynchronous, active-low reset (named `rst_n` here);
* `ld` holding the operand registers while the later ranks keep running.

The original also names "self testing" as an aim, but describes no such logic.
None is included. Its FPGA results are not reproduced here: 33 against 44
logic elements, 12.1 ns against 2.37 ns delay, and 65 mW against 188 mW
power, on a Cyclone III device. This RTL's pipeline has 64 register bits as written: 8 operand,
32 product-word, 16 partial-sum and 8 output. Synthesis drops the ones that
are always zero, such as the unused bits of the shifted product words.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_vedic_2x2` checks all 16 operand pairs.
* `tb_vedic_4x4` first checks the ten example vectors listed above, then all
  256 pairs.
* `tb_vedic_4x4_pipe` checks:
  * reset;
  * the exact latency: 225 appears after the third edge and not the second;
  * the example pipelined run, with `b1` changing every half clock so that
    only even values are sampled;
  * 400 random cycles with `ld` dropping at random, against a model of the
    operand registers;
  * an asynchronous reset while products are in flight.
* `tb_vedic_mult_top` drives both multipliers with the same operands. It sends
  all 256 pairs back to back through the pipeline, then 300 random cycles. It
  checks each pipelined product against the integer product and against the
  combinational product. It counts resets, back-to-back loads, `ld` holds and
  combinational products, and fails if any of them never happens.

Run any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic_mult_top.sv \
          --top-module tb_vedic_mult_top
./obj_dir/Vtb_vedic_mult_top
```

Each run takes well under a second.

## Files

`rtl/`:

* `half_adder.sv`
* `vedic_2x2.sv`
* `ut_column_adder.sv`
* `vedic_4x4.sv`
* `vedic_4x4_pipe.sv`
* `vedic_mult_top.sv`

`tb/`: one testbench per module above, except the two helpers
(`half_adder`, `ut_column_adder`).
