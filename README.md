# Selectable accurate / error-efficient 32-bit ripple-carry adder

Many workloads (image processing, signal processing, machine learning)
tolerate small numeric errors. This design exploits that in a 32-bit
ripple-carry adder (RCA) in a simple way. The eight least significant bit
positions are not added at all. Each of those sum bits is the OR of the two
operand bits, and no carry leaves them. Only the upper 24 positions form a
carry chain. The critical carry path becomes 24 cells long instead of 32,
and eight full adders become eight OR gates.

Because an exact answer is still sometimes needed, an exact 32-bit RCA sits
beside the approximate one. Both see the same operands. A 2:1 multiplexer,
driven by a user select line, puts one of the two sums on the output.

```
            +-------------------+   S1 (32)
 a,b,c_in ->| rca_accurate      |---------+---------+
            |  32 full adders   |--> c_acc |  MUX  |
            +-------------------+          |  2:1  |--> y (32)
            +-------------------+   S2 (32)|       |
 a,b,c_in ->| rca_error_efficient|---------+-------+
            | 8 OR + 24 FA      |--> c_erreff    ^
            +-------------------+                s
```

The whole design is combinational: no clock, no registers, no reset.

## The error-efficient adder

For operands `a`, `b` and carry input `cin`, with `lo` the bottom 8 bits and
`hi` the top 24:

```
sum[7:0]           = a_lo | b_lo
{cout, sum[31:8]}  = a_hi + b_hi + cin      (exact 24-bit ripple chain)
```

The carry input enters the first exact cell, at bit 8. The OR positions
neither use nor produce a carry.

Per bit, OR agrees with the exact full-adder sum on four of the eight
`(a_i, b_i, c_i)` input rows (000, 010, 100, 111) and differs on the other
four. A wrong bit is not the whole story, though. What matters is the error
of the full 33-bit result `{cout, sum}` against the exact `a + b + cin`:

```
approx - exact = cin * 255 - (a_lo & b_lo)
```

Reasons:
* `a_lo | b_lo = a_lo + b_lo - (a_lo & b_lo)`, so the low part loses
  `a_lo & b_lo`. That is the carry the OR gates throw away.
* `cin` is added at weight 256 instead of weight 1, which adds 255.

So the error always lies in `[-255, +255]`. It never reaches the upper 24
bits, which are always the exact sum of the upper operand bits. With
uniformly random operands, the end-to-end testbench measures a mean absolute
error of about 127.5. It sees the maximum of 255 and gets an exact result in
about 5 % of cases.

Use `cin = 0` if the carry input is unused. The error then reduces to
`-(a_lo & b_lo)`: the approximate result is never larger than the exact one.

## The accurate adder

`rca_accurate` is the textbook chain. Cell `i` takes the carry out of cell
`i-1`, cell 0 takes `cin`, and the carry out of cell 31 is `cout`. It gives
`{cout, sum} = a + b + cin` exactly.

## Output selection

| `s` | `y`                              |
|-----|----------------------------------|
| 0   | accurate sum (`rca_accurate`)    |
| 1   | error-efficient sum              |

Only the sum goes through the multiplexer. The carry outputs of both adders
are separate ports, `c_acc` and `c_erreff`, and both are valid whatever `s`
is.

## Cost model

The design was sized with a transistor-level cell library:
* full adder: 62 transistors
* OR gate: 6 transistors
* approximate XOR-based full adder: 46 transistors

Those numbers reproduce the transistor totals reported for the three
32-bit variants:

| variant                                   | cells                 | transistors         | reported delay (FPGA) |
|-------------------------------------------|-----------------------|---------------------|-----------------------|
| accurate RCA                              | 32 FA                 | 32*62 = 1984        | 84.6 ns               |
| approximate RCA (XOR/inverter low cells)  | 24 FA + 8 approx. FA  | 24*62 + 8*46 = 1856 | 78.7 ns               |
| error-efficient RCA (this design's `S2`)  | 24 FA + 8 OR          | 24*62 + 8*6 = 1536  | 61.4 ns               |

The delays are totals reported from a place-and-route flow on an Altera
ACEX 1K device. They are not modelled by the RTL. The second row is a
comparison point only, and this RTL does not contain it. In that variant,
each low cell computes its sum as `a ^ b ^ c` and passes the inverted sum on
as carry.

## Modules

| file                        | module                | what it is                                                |
|-----------------------------|-----------------------|-----------------------------------------------------------|
| `rtl/approx_adder_pkg.sv`   | package               | default sizes (32, 8) and the select enum `sum_sel_e`     |
| `rtl/full_adder.sv`         | `full_adder`          | 1-bit exact full adder, gate-level                        |
| `rtl/rca_accurate.sv`       | `rca_accurate`        | `WIDTH`-bit exact RCA                                     |
| `rtl/rca_error_efficient.sv`| `rca_error_efficient` | `APPROX_BITS` OR positions + exact RCA above              |
| `rtl/sum_mux.sv`            | `sum_mux`             | `WIDTH`-bit 2:1 multiplexer                               |
| `rtl/approx_rca_top.sv`     | `approx_rca_top`      | top: both adders and the multiplexer                      |

Parameters: `WIDTH` (default 32) and `APPROX_BITS` (default 8, must be
below `WIDTH`). The error bound above generalises to
`±(2**APPROX_BITS - 1)`.

Top-level ports: `a[31:0]`, `b[31:0]`, `c_in`, `s` (inputs); `y[31:0]`,
`c_acc`, `c_erreff` (outputs).

## Where the RTL makes its own choices

* **Full-adder cell.** The reference cell is a transistor-level
  hybrid-CMOS full adder. Only its logic function can be expressed in RTL,
  so `full_adder` is the plain XOR/AND/OR form. What a synthesis tool maps
  it to decides the real area and delay.
* **Carry input of the accurate adder.** It is a port (`c_in`, shared with
  the approximate adder). Tie it to 0 for a plain `a + b`.
* **Carry input position in the approximate adder.** It enters at bit 8.
  It is not added into the OR positions.
* **Parameterisation** of widths, and the enum type on the select line, are
  additions. With the defaults, the structure is exactly the 32-bit one
  described above.
* **Timing.** No clock and no pipeline. The reported nanosecond delays are
  properties of the original FPGA implementation and are not checked.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
integer arithmetic computed in the testbench and ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_full_adder`: all 8 input rows. It checks `{cout,sum}` against `a+b+cin`
  and `sum` against the exact truth-table column.
* `tb_rca_accurate`: corner cases, full-length carry ripples and 5000
  random operand pairs.
* `tb_rca_error_efficient`: the low byte swept exhaustively (65 536
  combinations, alternating `cin`) plus random operands. It checks the OR
  truth-table column bit by bit, the upper 24 bits and carry, and the exact
  error formula `cin*255 - (a_lo & b_lo)`.
* `tb_sum_mux`: both select values on random data.
* `tb_approx_rca_top`: the whole design at default sizes. It sweeps both low
  bytes exhaustively with both `cin` values, then runs 20 000 random
  operands, each with `s = 0` and `s = 1`. It checks `y`, `c_acc`, `c_erreff`
  and the ±255 error bound. It also counts that each behaviour occurred:
  * each select value
  * each carry output set
  * carry input set
  * approximate results both wrong and exact

  Finally it prints error statistics. This is also the full-size test.
* `tb_truth_table`: replays the per-bit comparison of the exact sum and the
  OR sum through the complete design. `(Ai, Bi, Ci)` go on bit 0 of the
  operands and on the carry input. It prints the 8 rows and checks that
  exactly four of them differ.

Run one with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/approx_adder_pkg.sv tb/tb_approx_rca_top.sv --top-module tb_approx_rca_top
./obj_dir/Vtb_approx_rca_top
```

Each testbench finishes in seconds.
