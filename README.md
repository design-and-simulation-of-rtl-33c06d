# Approximate full adders and ripple-carry adders built from them

Many signal-processing workloads, such as image and video coding, can absorb small arithmetic
errors in their least significant bits. This design exploits that with a family of 1-bit full
adders that are deliberately wrong on a few input rows. Each one comes from a CMOS mirror adder
with transistors removed, which makes it smaller, faster and lower in power. The cells are then
chained into ripple-carry adders. The most useful arrangement is a hybrid adder: approximate
cells handle the low bits, and exact cells handle the high bits, so the error stays bounded.

The RTL describes each cell by its logic function, its truth table. Transistor counts, power
and delay belong to the circuit level and are not modelled. What the RTL does show exactly is
where each cell is wrong and how those errors travel along a carry chain.

## The cells

All cells have the same ports: `a`, `b`, `cin` in, `sum`, `cout` out. All are combinational.
In the table, each column lists the eight input rows `a b cin` = 000 … 111 from left to right.
Entries in brackets differ from an exact full adder.

| module         | sum               | cout              | wrong rows | what was removed                                  |
|----------------|-------------------|-------------------|-----------:|---------------------------------------------------|
| `mirror_adder` | 0 1 1 0 1 0 0 1   | 0 0 0 1 0 1 1 1   | 0          | nothing: exact mirror adder                       |
| `ama1`         | 0 1 [0] 0 [0] 0 0 1 | 0 0 [1] 1 0 1 1 1 | 2        | parts of both the carry and sum stages            |
| `ama2`         | [1] 1 1 0 1 0 0 [0] | exact           | 2          | whole sum stage; sum = NOT cout via a buffer      |
| `ama3`         | [1] 1 [0] 0 1 0 0 [0] | 0 0 [1] 1 0 1 1 1 | 3      | AMA1's carry stage plus AMA2's buffered sum       |
| `ama4`         | 0 1 [0] [1] [0] 0 0 1 | 0 0 0 [0] [1] 1 1 1 | 3    | carry reduced to `cout = a`                       |
| `fa_9t`        | 0 1 1 0 [0] [1] 0 1 | 0 0 0 1 [1] 1 1 1 | 2        | 9-transistor cell, exact only when `a = 0`        |

The closed forms used in the RTL are:

* `mirror_adder`: `cout_n = ~(a·b + cin·(a+b))`, then `sum_n = ~((a+b+cin)·cout_n + a·b·cin)`, then both are inverted. This is the two-stage mirror structure: the inverted carry is computed first and the sum stage reuses it.
* `ama1`: `cout = b + a·cin`, `sum = cin·(a XNOR b)`.
* `ama2`: exact carry, and `sum = ~cout`. In six of the eight rows a full adder's sum is the complement of its carry, so the sum stage can be replaced by a buffer on the inverted carry node.
* `ama3`: `cout = b + a·cin`, `sum = ~cout`.
* `ama4`: `cout = a`, `sum = cin·(~a + b)`. Its `cout` is wired straight through from `a`; that is the cell's function, not a defect.
* `fa_9t`: split on `a`. When `a = 0` the cell is exact: `sum = b ^ cin`, `cout = b·cin`. When `a = 1`: `sum = cin`, `cout = 1`.

`mirror_adder`, `ama2`, `ama3` and `ama4` keep the inverted-carry node of the circuit, and the
AMA2/AMA3 sums are buffered copies of it. Beyond that, each cell is the simplest logic that gives
its truth table; the RTL does not copy the transistor networks.

`fa_cell` wraps all six cells. Its `CELL` parameter has the enumerated type
`approx_adder_pkg::fa_cell_e` (`FA_ACCURATE`, `FA_AMA1` … `FA_AMA4`, `FA_9T`), and exactly one
cell is built.

## Ripple-carry adders

`parallel_adder #(WIDTH, CELL)` chains `WIDTH` copies of one cell type. Stage `i` adds `x[i]`,
`y[i]` and the carry out of stage `i-1`. `cin` feeds stage 0, and `cout` is the carry out of the
top stage. The default is 4 bits of `FA_9T` cells. The same module with `CELL = FA_ACCURATE` is
the exact 4-bit adder used as the reference.

A wrong carry from an approximate cell is passed on like any other carry. As a result, errors
are not confined to the bit where the cell is wrong. With 4 bits of 9T cells, 350 of the 512
possible inputs give an inexact result.

`approx_rca #(WIDTH, APPROX_LSBS, APPROX_CELL)` is the hybrid adder, built from two
`parallel_adder` instances:

```
 x[W-1:K] y[W-1:K]                x[K-1:0] y[K-1:0]
       |     |                           |     |
  +---------------------+  mid_carry  +---------------------+
  | accurate cells      |<------------| APPROX_CELL cells   |<-- cin
  | (mirror_adder)      |             | (K = APPROX_LSBS)   |
  +---------------------+             +---------------------+
       |                                    |
 cout, sum[W-1:K]                      sum[K-1:0]
```

The upper part is exact, given the carry it receives. The error of the whole result is
therefore less than `2^(K+1)`. Defaults: `WIDTH = 16`, `APPROX_LSBS = 9`, `APPROX_CELL = FA_9T`.
The 9 approximate bits and the choice of the 9T cell come from an image-compression evaluation
in which that cell saved the most power. The 16-bit width is a choice of this design.
`APPROX_LSBS = 0` gives an exact adder, and `APPROX_LSBS = WIDTH` a fully approximate one.

The error seen in simulation at 9 approximate LSBs, over 12 288 random 16-bit operand pairs with
`cin = 0`, comes from `tb_lsb_workload`:

| cell | inexact results | mean abs. error | max abs. error |
|------|----------------:|----------------:|---------------:|
| AMA1 | 10 845 | 69.4  | 496 |
| AMA2 | 11 361 | 120.6 | 504 |
| AMA3 | 12 093 | 142.9 | 504 |
| AMA4 | 12 082 | 133.3 | 504 |
| 9T   | 11 370 | 129.6 | 509 |

Nearly every result is inexact, but the mean error is below 1 % of the 16-bit range. On image
data the values would differ, because random operands exercise every cell row equally.

## Top level

`approx_adders_top` places the designs side by side. The source evaluates them one at a time and
connects them into no larger datapath. The top holds:

* the six cells on shared inputs `cell_a`, `cell_b`, `cell_cin`. The outputs `cell_sum[5:0]` and `cell_cout[5:0]` are indexed by `fa_cell_e`: 0 is exact, 1–4 are AMA1–AMA4, 5 is 9T;
* two 4-bit parallel adders on shared operands `pa_x`, `pa_y`, `pa_cin`: one of 9T cells (`pa9_*`) and one exact (`pa28_*`, after the 28-transistor full adder it stands for);
* the hybrid adder (`rca_*`), with parameters `RCA_WIDTH`, `RCA_APPROX_LSBS` and `RCA_APPROX_CELL`.

There are no clocks, registers or resets anywhere. Every output follows its inputs after the
propagation delay of its carry chain.

## Where this departs from the source, or fills gaps

* **The 9T cell, `a = 1` half.** The source's truth table for this cell marks rows 100 and 101 as deliberate errors. Its prose instead says that for `a = 1` the sum is `b XNOR cin`, which would be exact. The RTL follows the truth table.
* **Fifth approximate mirror adder.** The source says five approximate mirror adders exist but defines only four. Only the four are built.
* **Image/video encoder.** The approximate adders were evaluated inside the DCT and IDCT of a motion-compensated video encoder. That encoder is a standard structure whose transform size, word lengths and coefficients are not given. None of it is built: not the motion estimation and compensation, DCT and IDCT, quantization and its inverse, entropy coding, or frame memory. `tb_lsb_workload` exercises only the adder part of that experiment.
* **Truncation**, the baseline the approximate adders were compared with, is not built.
* **Transistor-level figures.** The power, delay and transistor counts behind the design cannot be reproduced in RTL and are not claimed.
* **Choices of this design:** the 16-bit hybrid width, the enum encoding of the cells, and the purely combinational interfaces.

## Files

| file | content |
|------|---------|
| `rtl/approx_adder_pkg.sv` | `fa_cell_e` cell enum, `NUM_CELLS` |
| `rtl/mirror_adder.sv`, `ama1.sv` … `ama4.sv`, `fa_9t.sv` | the cells |
| `rtl/fa_cell.sv` | cell selected by parameter |
| `rtl/parallel_adder.sv` | N-bit ripple-carry adder of one cell type |
| `rtl/approx_rca.sv` | hybrid approximate/accurate adder |
| `rtl/approx_adders_top.sv` | top level |
| `tb/fa_ref_pkg.sv` | reference truth tables and a bit-level ripple model `ref_ripple` |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_lsb_workload.sv` | 9-LSB error statistics for every approximate cell |

## Verification

Each testbench compares the RTL with `fa_ref_pkg`. That package holds each cell's truth table as
two 8-bit constants, written independently of the RTL, plus a ripple model built on them.
Exact paths are also compared with ordinary `+`.

* Cell testbenches apply all 8 rows. They also check how many rows differ from an exact adder, which catches a cell that has become exact by accident.
* `tb_parallel_adder` instantiates all six cell types and applies all 512 inputs.
* `tb_approx_rca` tests the default, fully exact, fully approximate and 4-bit AMA1 splits on corner cases plus 4 000 random inputs. It also checks directly that the upper part adds exactly, using the carry that leaves the lower part.
* `tb_approx_adders_top` runs the top at its default parameters. It counts each behaviour and fails if one never occurs: a wrong row in every approximate cell, a carry through all four exact stages, an inexact 9T parallel-adder result, a carry from the approximate into the accurate part, a final carry out, and an inexact hybrid result.

Every testbench prints `TB_RESULT checks=N failures=M` and has a time-out. Each one was also
run against a copy of its module with one deliberate fault, and each detected the fault.

## Simulating and changing it

Using Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_approx_adders_top \
  -y rtl -y tb +libext+.sv rtl/approx_adder_pkg.sv tb/fa_ref_pkg.sv \
  tb/tb_approx_adders_top.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run another testbench. The packages must come
first on the command line.

* To change the split of the hybrid adder, set `APPROX_LSBS` and `APPROX_CELL` (on the top: `RCA_APPROX_LSBS`, `RCA_APPROX_CELL`).
* To add a new approximate cell:
  1. Write it with the common five-port interface.
  2. Add an enumerator to `fa_cell_e` and a branch to `fa_cell`.
  3. Add its two truth-table columns to `fa_ref_pkg`.
  4. Widen the top's cell arrays, since they use `NUM_CELLS`.
