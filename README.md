# Low-cost HEVC 16- and 32-point DCT with configurable constant multipliers

This is synthesizable SystemVerilog for the forward integer DCT of HEVC: 1-D transforms of
16 and 32 points, and a row-column 2-D transform of 32×32 blocks (16×16 with one parameter
changed). Every transform produces **two coefficients per clock cycle**. A 32-point transform
takes 16 cycles and a 32×32 block 512 cycles. Its results are bit-exact with the HEVC core
transform matrices.

The main idea is to save area in the odd half of each transform. The odd coefficients of an
N-point DCT need an (N/2)×(N/2) matrix of constant multiplications. The usual way is to
multiply every input by every constant in parallel. This design instead computes **one odd
coefficient per cycle** with N/2 *configurable* constant multipliers. Each multiplier is one
shift-add network that can be switched between two constants, and a small multiplexer in front
of each multiplier routes the right input to it. A 2-bit select (C1) drives the input muxes and
a 1-bit select (C2) drives the constant choice. Together they step the same hardware through
all the rows of the odd matrix.

## Contents

| file | what it is |
|---|---|
| `rtl/dct2d.sv` | top: row 1-D DCT → transposition memory → column 1-D DCT |
| `rtl/dct1d.sv` | registered 1-D DCT (N = 16 or 32) with valid/ready handshakes and optional rounding shift |
| `rtl/transpose_mem.sv` | N×N transposition memory that writes one block while the previous one is read |
| `rtl/dct32_core.sv` | 32-point step: butterfly + 16-point DCT (even part) + 16-point odd block |
| `rtl/dct16_core.sv` | 16-point step: butterfly + 8-point DCT (even part) + 8-point odd block |
| `rtl/dct8_core.sv` | 8-point DCT, one coefficient per step |
| `rtl/odd_block.sv` | odd block: input muxes (C1), configurable multipliers (C2), signed adder tree |
| `rtl/odd_ctrl.sv` | control ROM: step → C1, C2 and product signs |
| `rtl/mux_mcm.sv` | configurable constant multiplier y = x·c[sel] |
| `rtl/sign_adder_tree.sv` | adder tree that sums ±products |
| `rtl/butterfly.sv` | a_i = x_i + x_{N−1−i}, b_i = x_i − x_{N−1−i} |
| `rtl/dct_pkg.sv` | HEVC coefficient function, odd-block schedules, CSD helpers |
| `tb/*.sv` | self-checking testbenches, one per module, plus `tb_dct2d_16` |

Hierarchy: `dct2d` → 2 × `dct1d` + `transpose_mem`. Each `dct1d` contains `dct32_core` →
`butterfly`, `dct16_core` (→ `butterfly`, `dct8_core`, `odd_ctrl`, `odd_block`), `odd_ctrl`
and `odd_block`. Each `odd_block` and `dct8_core` is built from `mux_mcm` and
`sign_adder_tree`.

## The arithmetic: even-odd decomposition

HEVC defines integer matrices T_N (N = 4…32), with Y = T_N·x. T_N[i][j] is ± one of 33
integers (90, 90, 90, 89, 88, 87, 85, 83, …, 9, 4), chosen by the angle i·(2j+1) in units of
π/(2N). `dct_pkg::hevc_coef` computes any element from that list.

An N-point transform splits in two after a butterfly:

* a_i = x_i + x_{N−1−i} and b_i = x_i − x_{N−1−i}, for i < N/2;
* the even coefficients are the N/2-point DCT of a: Y_{2k} = DCT_{N/2}(a)_k;
* the odd coefficients are Y_{2k+1} = Σ_j O[k][j]·b_j. O (N/2 × N/2) is made of the odd rows
  of T_N, restricted to their first N/2 columns.

The design applies this twice: the 32-point core contains a 16-point core, which contains an
8-point core. On every cycle ("step" k), each core delivers the pair (Y_{2k}, Y_{2k+1}).

## The odd block: how one set of multipliers covers every row

Every row of O is a signed permutation of the same N/2 magnitudes. For N = 16 those
magnitudes are 90, 87, 80, 70, 57, 43, 25 and 9. So a row can be computed by N/2 multipliers
if each multiplier is given the right input. The input depends on the row, which is what the
C1 muxes handle.

With two constants per multiplier, the rows can be grouped into pairs (r, r′). Within a pair
the same input routing works for both rows: column j of row r and column j of row r′ go to the
same multiplier, and that multiplier holds the pair (|O[r][j]|, |O[r′][j]|). Row r uses C2 = 0
and row r′ uses C2 = 1. For the 16-point transform this gives the following schedule (lanes
I0…I7):

| lane | constants (C2=0 / C2=1) | inputs for C1 = 0, 1, 2, 3 |
|---|---|---|
| I0 | 90 / 80 | b0, b4, b7, b3 |
| I1 | 70 / 87 | b3, b0, b4, b7 |
| I2 | 57 / 25 | b4, b7, b3, b0 |
| I3 | 9 / 43 | b7, b3, b0, b4 |
| I4 | 87 / 9 | b1, b2, b6, b5 |
| I5 | 80 / 70 | b2, b6, b5, b1 |
| I6 | 43 / 57 | b5, b1, b2, b6 |
| I7 | 25 / 90 | b6, b5, b1, b2 |

| odd output | Y1 | Y3 | Y5 | Y7 | Y9 | Y11 | Y13 | Y15 |
|---|---|---|---|---|---|---|---|---|
| C1 | 0 | 1 | 0 | 1 | 3 | 2 | 3 | 2 |
| C2 | 0 | 1 | 1 | 0 | 0 | 1 | 1 | 0 |

Lanes I0–I3 only ever see b0, b3, b4 and b7, and lanes I4–I7 only b1, b2, b5 and b6, so every
mux is 4:1. The sign of each product (the sign of O[k][j]) does not go through the multipliers.
The adder tree applies it instead: each of its M−1 nodes adds or subtracts, and one final
negation sets the overall sign. The multipliers therefore stay unsigned in the constant.

The 32-point odd block is built by the same rule, with rows 0 and 2 as the reference pair.
This gives 16 two-constant multipliers (90/88, 90/67, 88/31, 85/13, 82/54, 78/82, 73/90,
67/78, 61/46, 54/4, 46/38, 38/73, 31/90, 22/85, 13/61, 4/22) behind 8:1 muxes, with a 3-bit
C1. The full tables are in `dct_pkg.sv`. `tb_odd_ctrl` checks them exhaustively against the
matrix.

### The configurable multiplier (`mux_mcm`)

Each constant is written in canonical signed digit (CSD) form, starting from its most
significant non-zero digit. Term t of all constants shares one add/subtract unit. Per term, a
mux selects the shift of x and whether to add or subtract. A set whose longest CSD form has K
digits therefore needs K−1 add/subtract units, whatever the number of constants. For example,
11 = 16 − 4 − 1 and 21 = 16 + 4 + 1 share two units and differ only in their add/subtract
choices. In the 8- and 16-point odd blocks each multiplier needs two or three units: 22 for
O8 plus 7 in the tree, and 38 for O16 plus 15 in the tree.

The 8-point core (`dct8_core`) is built in the same style. After a 4-point butterfly, one
multiplier per column holds that column's eight magnitudes of T8. Step k selects constant k,
and a 2:1 mux feeds the lane the sum a_j for even k or the difference b_j for odd k.

## Timing and dataflow

**1-D unit (`dct1d`).** A block of N samples is taken in parallel (`in_valid`/`in_ready`) into
an input register. The combinational core is then stepped k = 0…N/2−1. Each cycle one
registered pair (Y_{2k}, Y_{2k+1}) comes out, with `out_idx` = k and `out_last` on the final
pair. The pair is registered on the clock edge after the block is accepted. The next block is
accepted in the cycle the last pair is produced, so back-to-back blocks flow with no gap.
`out_ready` low stalls the unit and holds the output.

**Transposition memory (`transpose_mem`).** The row unit writes its pairs into an N×N
register array. When the last row of a block is in, `row_ack` pulses and the column unit reads
whole columns, one per handshake. When the last column has been read, `col_ack` pulses. Only
one array is needed for two blocks in flight, because the write orientation alternates:

* block n is written along the physical rows, so its logical column c is physical column c;
* block n+1 is written along the physical columns, so its row r goes into physical column r;
* physical column r is free as soon as column r of block n has been read, even in the same
  cycle, because the read is combinational from the old contents.

A row write therefore waits only if the column it would overwrite has not yet been read.

**2-D top (`dct2d`).** One input row is taken per handshake. In steady state a block takes
N²/2 cycles (512 for 32×32), with both 1-D units busy all the time: the column unit works on
block n while the row unit works on block n+1. From the first input row to the first output
pair takes 516 cycles at N = 32. The outputs come out column by column: for each horizontal
frequency u = `out_u`, the pairs (Y[2k][u], Y[2k+1][u]) for k = `out_k` = 0…N/2−1.
`out_last` marks the final pair of a block.

## Word widths and scaling

Inputs are IN_W = 9-bit residuals, i.e. 8-bit video. Inside a 1-D transform nothing is
rounded: an N-point core outputs IN_W + 7 + log2(N) bits, enough for any input. Between and
after the stages the top applies the HEVC forward-transform rounding shifts:

* after the row stage, SHIFT1 = log2(N) − 1 + (IN_W − 1 − 8), which is 4 for 32×32;
* after the column stage, SHIFT2 = log2(N) + 6, which is 11 for 32×32;
* each shift is computed as (y + 2^(s−1)) >> s.

The intermediate values are 18 bits and the outputs 20 bits. No clipping to 16 bits is done,
so the result is the exact rounded HEVC forward transform. All widths are parameters derived
from IN_W and N.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dct2d` | `N` | 32 | block size, 16 or 32 |
| `dct2d` | `IN_W` | 9 | input sample width |
| `dct2d` | `SHIFT1`, `SHIFT2` | 4, 11 | rounding shifts after each stage |
| `dct1d` | `N`, `IN_W`, `SHIFT` | 32, 9, 0 | size, input width, output shift |
| `mux_mcm` | `NC`, `CONSTS` | 2, {21, 11} | constant count; constants packed 8 bits each, constant n in bits [8n+:8] |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. For example, the full-size
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dct2d \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/dct_pkg.sv tb/tb_ref_pkg.sv tb/tb_dct2d.sv
./obj_dir/Vtb_dct2d
```

For any other test, replace `tb_dct2d` with its name. All tests run in seconds.

| testbench | checks |
|---|---|
| `tb_dct2d` | 4 blocks of 32×32 at the default parameters. Every coefficient against a direct rounded matrix product; block period exactly 512 cycles; counts and requires overlap of two blocks, input back-pressure, output stalls, and `row_ack`/`col_ack` |
| `tb_dct2d_16` | the same for the 16×16 configuration (period 128) |
| `tb_dct1d` | N = 16 and N = 32 (with shift 4): values, two coefficients per cycle back to back, latency, random stalls |
| `tb_transpose_mem` | N = 8: column contents and order over 6 blocks with a fast and a slow reader; overlapped writes and write waits must both occur |
| `tb_dct32_core`, `tb_dct16_core`, `tb_dct8_core` | every step against the HEVC matrix, random and extreme inputs |
| `tb_odd_block`, `tb_odd_ctrl` | odd outputs against O·b; C1/C2/sign schedules against the matrices |
| `tb_mux_mcm`, `tb_sign_adder_tree`, `tb_butterfly` | unit arithmetic |

The reference model (`tb/tb_ref_pkg.sv`) computes the transforms as plain matrix products,
independently of the hardware's schedules. Concurrent assertions in `dct1d` (a stalled output
holds) and `transpose_mem` (a block's last row is never written over an unread block) are
checked during simulation.

A generic coarse synthesis of the 32×32 top gives about 3.2 k word-level cells, 982 flip-flop
bits and 19 440 memory bits. The transposition array accounts for 18 432 of those bits.

## Where this design makes its own choices

The structure follows the published architecture: the even-odd split, the 16-point odd block
with its constant pairs and mux groups, the 32-point version built from a 16-point DCT and a
16-point odd block, the rate of two coefficients per cycle, and the row-column 2-D transform
with a transposition memory shared by two blocks in flight. The following are this design's
own:

* **Multiplier networks.** They come from the simple CSD rule above, not from an optimised
  time-multiplexed MCM algorithm. Adder counts are therefore close to, but not the same as,
  a hand-optimised design.
* **32-point odd block.** Only its size is published (16 muxes, 16 multipliers, 15 adders).
  The constant pairs and 8:1 routing here come from the rule that reproduces the published
  16-point block.
* **8-point core.** It is used inside the 16-point design but not described there; the
  column-multiplexed structure is this design's.
* **Signs.** They are applied in the adder tree. This adds one negation per tree.
* **Interfaces.** The valid/ready handshakes, the single output register stage and
  ROWACK/COLACK as status pulses are this design's. The published block diagram shows
  enable/clock on the 1-D units and draws their outputs as N parallel values. Here they are
  two values per cycle, matching the stated rate.
* **Scaling.** The HEVC rounding shifts between and after the stages are applied; clipping is
  not.
* **No pipelining.** The core is combinational between two registers. A 370 MHz target in a
  90 nm process would probably need pipeline registers inside the cores, which would add
  latency but not change the rate.
* **Not built.** There is no run-time switching between 16- and 32-point transforms (the size
  is a parameter) and no inverse transform. Both were left as future extensions of the
  architecture.

Throughput check for 3840×2160 at 60 fps: luma needs 497.7 M samples/s. At 370 MHz the design
delivers 740 M coefficients/s. Adding 4:2:0 chroma (746.5 M/s) would need at least 373.3 MHz.
