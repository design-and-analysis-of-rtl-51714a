# Two-product MAC with a merged partial-product tree, and an 8-tap FIR filter

This is a multiply-accumulate (MAC) unit for DSP datapaths. It computes

    mac_out = a*b + c*d          (unsigned, N-bit operands, 2N+1-bit result)

without first building two finished products. Both products are generated as
AND-gate dot matrices and interlinked: the bits of the same weight from both
products are stacked into one column. Then one tree of full and half adders
compresses the whole matrix. The sum of the two products falls out of the tree
the way a single product falls out of a multiplier tree. The tree removes the
carry-propagate adder that a "multiply, then add" unit needs between its two
multipliers and its accumulator. It also shares the reduction work of both
products, so fewer adder cells sit on the critical path.

Two reduction plans are provided:

* **Design 1** (default) uses as few adder cells as it can.
* **Design 2** is a Wallace-style tree. It compresses every column in every
  stage and spends more cells.

Both are bit-exact equivalents. An 8-tap FIR filter built from four design-1 MAC
units shows the unit in an application.

## Datapath of one MAC unit

```
 a ─┐                 c ─┐
 b ─┴─ ppg (N×N AND)  d ─┴─ ppg (N×N AND)
          │                      │
          └──── ppi_reduce ──────┘   interlink columns, FA/HA stages
                  │ row0   │ row1      (≤ 2 bits per column left)
                  └── rca ─┘          ripple-carry adder, 2N+1 bits
                      │
                 result register  ──► mac_out
```

* `ppg`: `pp[i][j] = a[j] & b[i]` has weight 2^(i+j). Row i is the multiplicand
  shifted by i places and masked by one multiplier bit.
* `ppi_reduce` does the interlinking and the compression (next section).
* `rca` is a ripple-carry adder made of `full_adder` cells. It adds the two rows
  that remain.
* The result register captures the sum on the rising clock edge.

## The interlinked reduction tree

This is the heart of the design. After interlinking, column c holds every
partial-product bit of weight 2^c from both products. For N-bit operands the
column heights are 2, 4, …, 2N, …, 4, 2. For N = 4 that is seven columns of
heights 2 4 6 8 6 4 2, which is 32 bits.

A compression stage works on each column as follows:

* A **full adder** takes three bits of the column. It leaves one sum bit in that
  column and sends one carry bit to the next column.
* A **half adder** takes two bits and does the same.
* Any bit that no adder takes passes through to the next stage.

Stages repeat until no column holds more than two bits. The two remaining rows
then go to the carry-propagate adder. Bits inside a column have equal weight, so
which bit feeds which adder does not change the result. Only the number of
cells and the logic depth depend on the plan.

### Design 1, 4-bit: the reference plan

Adders per column in each stage. Column 0 is the least significant. "F" is a
full adder and "H" a half adder.

| stage | heights in (col 7…0) | full adders          | half adders |
|-------|----------------------|----------------------|-------------|
| 1     | 0 2 4 6 8 6 4 2      | col1, 2×col2, 2×col3, 2×col4, col5 | col0, col3, col6 |
| 2     | 1 2 4 5 5 3 3 1      | col1 … col5          | col3, col4  |
| 3     | 1 3 4 4 3 2 1 1      | col3 … col6          | col2        |
| 4     | 2 2 3 3 2 1 1 1      | col4, col5           | col3, col6, col7 |
| out   | col8…0: 1 2 2 2 2 1 1 1 1 | —               | —           |

That is 19 full adders and 9 half adders. Columns 4 to 7 are left two bits high.
A ripple addition over them costs four more full adders, so the whole unit uses
23 full adders and 9 half adders. The plan is lazy on purpose. It leaves bits
alone whenever a later stage can still absorb them, which keeps the cell count
near the minimum. The minimum is 23 full adders, because each full adder removes
exactly one bit and 32 bits must end as a 9-bit number.

### Generalisation to other widths (this implementation's choice)

The table above is used cell for cell when `N = 4` and `METHOD = 1`. For any other
width, `mac_pkg::sched()` computes a plan at elaboration time:

* `METHOD = 1`, N ≠ 4: **Dadda-style**. Each stage reduces every column only down
  to the next Dadda height (…, 13, 9, 6, 4, 3, 2). It follows the same "reduce only
  what is necessary" idea. For N = 8 it needs 6 stages, 96 full adders and
  9 half adders, before the final adder.
* `METHOD = 2`, any N: **Wallace-style**. Every group of three bits gets a full
  adder and a leftover pair gets a half adder, in every stage. For N = 4 it uses
  18 full adders and 12 half adders in 4 stages. For N = 8 it uses 98 full adders
  and 39 half adders in 6 stages.

The design-2 plan is a reconstruction. The published second design is a heavier
tree (33 full and 14 half adders at 4 bits) whose exact cell placement is not
available. The Wallace rule reproduces its character: more cells than design 1,
and the same result. It does not reproduce its cell count.

The generator builds the network from the plan with generate loops. It uses one
array of column bits per stage level, so no net feeds itself. The final `row1` bits
of columns that end with a single bit are constant zero.

## The FIR filter (`fir8`)

```
 filter_in = x[n] ─► Z⁻¹ ─► Z⁻¹ ─► … ─► Z⁻¹        (7 registers: x[n-1] … x[n-7])
   MAC0: coef0·x[n]   + coef1·x[n-1]
   MAC1: coef2·x[n-2] + coef3·x[n-3]
   MAC2: coef4·x[n-4] + coef5·x[n-5]
   MAC3: coef6·x[n-6] + coef7·x[n-7]
   filter_out = ((MAC0 + MAC1) + MAC2) + MAC3       (chain of three rca adders)
```

Each MAC unit serves two taps, so four units make eight taps. The coefficients
are ports, so the response can be reloaded at run time. The output keeps full
precision, 2N+3 bits (11 bits at N = 4), so the largest possible sum 8·(2^N−1)²
fits.

## Interfaces and timing

| module | ports | timing |
|---|---|---|
| `mac_unit #(N=4, METHOD=1)` | `clk`, `rst_n`, `a`,`b`,`c`,`d` [N], `mac_out` [2N+1] | operands set up before a rising edge; the result is on `mac_out` after that edge. One result per cycle, latency 1. |
| `fir8 #(N=4, METHOD=1)` | `clk`, `rst_n`, `filter_in` [N], `coef` [8][N], `filter_out` [2N+3] | the sample and coefficients taken at edge t appear in `filter_out` right after edge t. One sample per cycle. The adder chain after the MAC registers is combinational. |
| `mac_dsp_top #(N=4)` | the above, with `mac1_out` (design 1) and `mac2_out` (design 2) sharing `a`…`d` | as above |

`rst_n` is asynchronous and active low. It clears the MAC result registers and
the FIR delay line. All arithmetic is unsigned.

## Files

| file | contents |
|---|---|
| `rtl/mac_pkg.sv` | reduction-plan generator `sched()`, the 4-bit design-1 table, Dadda/Wallace rules |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | the two counter cells |
| `rtl/ppg.sv` | AND-array partial product generator |
| `rtl/ppi_reduce.sv` | interlinking and FA/HA reduction network |
| `rtl/rca.sv` | ripple-carry adder |
| `rtl/mac_unit.sv` | complete registered MAC |
| `rtl/fir8.sv` | 8-tap FIR filter from four MAC units |
| `rtl/mac_dsp_top.sv` | top level: design-1 MAC, design-2 MAC, FIR filter |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Build one
with Verilator 5 from the repository root. The package goes first:

```
verilator --binary --timing --assert -Irtl rtl/mac_pkg.sv tb/tb_mac_dsp_top.sv \
          --top tb_mac_dsp_top -Mdir obj_top -o sim && obj_top/sim
```

Replace `tb_mac_dsp_top` with any other testbench name. `-Irtl` lets Verilator
find the modules by file name.

What the testbenches check:

* `tb_full_adder`, `tb_half_adder`: all input combinations.
* `tb_ppg`: every bit of every 4-bit product, and the weighted sums at 8 bits.
* `tb_rca`: carry ripples through all bits, and random operands.
* `tb_ppi_reduce`: all 65,536 operand sets at N = 4 for both designs, and 20,000
  random sets at N = 8 for both designs. The partial products are formed in the
  testbench, so the tree is checked on its own.
* `tb_mac_unit`: all 4-bit operand sets, one per cycle, with the one-cycle latency
  checked. It also runs a published 8-bit sequence, for example
  49·67 + 84·105 = 12103, on both designs, plus random 8-bit data and reset.
* `tb_fir8`: the 4-bit filter and an 8-bit design-2 filter are compared with a
  direct-form model. The inputs are an impulse, a full-scale step, a sampled
  sine, random data with a coefficient reload, and a full-scale input.
* `tb_mac_dsp_top`: the whole top level at its default size. It counts that
  reset, a result using the MAC's top bit, agreement of both designs, a full FIR
  delay line, a coefficient change and the full-scale FIR output all occurred.

## What is faithful and what is chosen

Taken from the design description:

* the function a·b + c·d with a registered result;
* AND-array partial products;
* interlinking of both products into one tree;
* the stage-by-stage 4-bit design-1 reduction and its cell count;
* the output width (2N+1, that is 9 bits at 4-bit and 17 bits at 8-bit);
* unsigned operands;
* the 8-tap filter from four two-tap MAC units with a summation chain.

Chosen here where the description is silent or unclear:

* The design-2 tree is a Wallace reconstruction, and its cell count differs (see
  above).
* Plans for widths other than 4 are Dadda-style for design 1 and Wallace-style for
  design 2.
* The final adder is ripple-carry, and it is written at full width. Synthesis
  removes its cells that only ever see zeros.
* Reset is asynchronous and active low.
* The FIR filter has seven delay registers, with x[n] feeding the first tap
  directly. Its coefficients are run-time inputs and its output is full
  precision. The published filter appears to bring out only N output bits, and
  which bits is not stated.
* The default width is 4 bits. 8-bit operation, which the published 8-bit
  results refer to, is a parameter setting (`N = 8`) and is tested.

Not reproduced: the published FPGA area, delay and power figures, and the
baseline MAC that the proposal is compared with.
