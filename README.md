# H.264 intra prediction with one shared arithmetic unit

H.264 has 17 intra prediction modes: nine for luma 4x4 blocks, four for luma
16x16 macroblocks and four for chroma 8x8 blocks. Written out directly, they
take dozens of adders, several multipliers and many shifters. This design
rewrites every mode in terms of a single operation

    F(W, X, Y, Z, a) = (W + X + Y + Z + 2) >> a

and computes it on one **common operations unit (COU)**. The COU holds four
adders, one shifter and the circuit's one multiplier. Intermediate results
go into a register file of four 15-bit registers, R0..R3. Everything else
supports that unit:

- predictor memories for Y, Cb and Cr;
- an input data selector that picks predictors P0..P32 and forms the COU
  operands;
- a controller that schedules one COU operation per cycle;
- an output generator that delivers prediction rows of four pixels;
- an adder that combines those rows with the IDCT residuals.

The architecture follows Shim, Lee and Cho, "Design of Intra Prediction
Circuit for H.264 Decoder Sharing Common Operations Unit" (2008). That paper
gives the COU, the equations of the modes in terms of F, the use of the
buffers and the block diagram. The cycle schedule, the predictor memory
organisation, the interfaces and the handling of picture edges are this
implementation's own. Each departure is listed below.

## Every mode as F

The constant +2 inside F is fixed. Unused operands are set to make the
rounding come out right, and a negative operand can cancel the +2.
Predictors are numbered as in the original design:

- luma 4x4: P0..P7 above (P4..P7 above-right), P16..P19 to the left, P32 the
  corner above-left;
- luma 16x16: P0..P15 above, P16..P31 left, P32 corner;
- chroma: P0..P7 above, P16..P23 left, P32 corner.

| Computation | As F | Gives |
|---|---|---|
| 3-tap filter (all luma 4x4 directional modes) | `F(Pi, Pj, Pj, Pk, 2)` | `(Pi + 2Pj + Pk + 2) >> 2` |
| 2-tap average | `F(Pi, Pj, 0, -1, 1)` | `(Pi + Pj + 1) >> 1` |
| HU special pixel | `F(L2, L3, L3, L3, 2)` | `(L2 + 3L3 + 2) >> 2` |
| copy of a pixel (HU tail) | `F(L3, L3, L3, L3, 2)` | `L3` |
| group sum (DC) | `F(Pa, Pb, Pc, Pd, 0)` | sum + 2 |
| accumulate (DC) | `F(R0, R1, 0, -2, 0)` | R0 + R1 |
| DC value, n >= 2 groups (every row cycle) | `F(R0, R1, 0, -2, log2(4n))` | `(S + 2n) >> log2(4n)` |
| DC value, one group | `F(R0, 0, 0, -2, 2)` | `(S + 2) >> 2` |
| chroma DC sub-block, one side | `F(Pa, Pb, Pc, Pd, 2)` | `(S + 2) >> 2` |
| no neighbour (DC) | `F(0, 0, 0, 126, 0)` | 128 |
| plane difference | `F(P(8+i), ~P(6-i), 1, -2, 0)` | `P(8+i) - P(6-i)` |
| H, V accumulate | `F(R0, (i+1)*R1, 0, -2, 0)` | multiplier on X |
| B, C | `F(5*H, 0, 0, 30, 6)` | `(5H + 32) >> 6`, 34*H for chroma |
| A | `F(P15, P31, 0, -2, 0)`, then `F(0, 16*R0, 0, -2, 0)` | `16 (P15 + P31)` |
| 2C | `F(C, C, 0, -2, 0)` | into R1 |
| first sub-block base | `F(A, -7*B, 0, 12, 0)`, then `F(R0, -7*C, 0, -2, 0)` | `A - 7B - 7C + 14` into R0 |
| next 4x4 column | `F(R0, 4*B, 0, -2, 0)` | R0 + 4B |
| next row of 4x4 blocks | `F(R0, -12*B, 0, -2, 0)`, then `F(R0, 2C, 2C, -2, 0)` | R0 - 12B + 4C |
| plane pixel, dx, dy in 0..3 | `F(R0, dx*B, Y, Z, 5)`, Y + Z = dy*C from 0, C, 2C | `(A + B(x-7) + C(y-7) + 16) >> 5`, then clipped |

The DC sums keep the extra +2 of each group sum: n groups add 2n, which is
exactly the H.264 rounding term. The final F cancels its own +2 with Z = -2. Chroma plane uses
4 terms, 34*H and (x-3), (y-3), as H.264 requires; its base moves by -4B
at a new row of 4x4 blocks.

The multiplier sits on the X input of the COU. H.264's plane pixel needs
two products, B*(x-7) and C*(y-7), but there is only one multiplier. So R0
holds a base for the current 4x4 block, `A + B(x0-7) + C(y0-7) + 14`, where
(x0, y0) is the block's top-left pixel. Inside the block a pixel needs
`dx*B` from the multiplier and `dy*C` for dy = 0..3. The Y and Z operands
get that from C in R3 and 2C in R1 (3C = 2C + C). The base moves by 4B to
the next 4x4 column, or by -12B + 4C to the next row of 4x4 blocks.

Where the registers hold what:

| Mode group | R0 | R1 | R2 | R3 |
|---|---|---|---|---|
| H, V (all sizes) | - | - | - | - |
| DC (luma) | running sum | last group sum | - | - |
| DC (chroma) | top sum | left sum | - | - |
| luma 4x4 directional | pixel 0 of row | pixel 1 | pixel 2 | - |
| plane | H, V accumulator, then A, then 4x4 block base | difference, then 2C | B | C |

For the directional modes the fourth pixel of a row comes straight from the
COU in the cycle the row is formed.

## Schedule and throughput

The COU produces one result per cycle. A job is one luma 4x4 block, one
16x16 macroblock or one chroma 8x8 block (Cb or Cr). Each job has two
parts:

1. **Set-up** (`PH_PRE`): one COU operation per cycle.
   - DC: 2n-2 cycles for n >= 2 groups of four predictors, 1 cycle for one
     group. Chroma DC: 2 cycles when both neighbours exist (see below).
   - Plane: 37 cycles for 16x16, 21 for chroma. The first difference of H
     goes to R0, then each further one to R1, followed by R0 += (i+1)*R1;
     then B, V in the same way, C, A in two steps, 2C, and the first block
     base in two steps.
   - Horizontal, vertical and luma 4x4 directional modes: no set-up.
2. **Rows** (`PH_ROW`): output rows in 4x4-block raster order. That is the
   order in which an IDCT delivers residual rows.
   - H, V, DC: 1 cycle per row. For DC the COU forms the final value
     `F(R0, R1, 0, -2, a)` in every row cycle, and it fills all four lanes.
   - Luma 4x4 directional: 4 cycles per row.
   - Plane: 4 cycles per row. The first row of every 4x4 block after the
     first adds one cycle to move the base (two at a new row of blocks).

Chroma DC follows the H.264 rule that each 4x4 sub-block of the 8x8
block has its own DC value.
- Sub-block 0 (top-left) and sub-block 3 (bottom-right) average their top
  and left neighbours.
- Sub-block 1 (top-right) uses only its top neighbours.
- Sub-block 2 (bottom-left) uses only its left neighbours.

With both neighbours present it runs like this, using only R0 and R1:

| Cycles | COU | Row |
|---|---|---|
| set-up 0, 1 | top sum of sub-block 0 into R0, left sum into R1 | - |
| row 0 | `F(R0, R1, 0, -2, 3)` | DC of sub-block 0 |
| rows 1, 2 | top sum of sub-block 3 into R0, left sum into R1 | row 0 repeated |
| row 3 | unused | row 0 repeated |
| rows 4..11 | `F(Pi, Pj, Pk, Pl, 2)` on one side | sub-blocks 1 and 2 |
| rows 12..15 | `F(R0, R1, 0, -2, 3)` | DC of sub-block 3 |

That makes 18 cycles. With one neighbour missing, every sub-block uses
one side directly. With both missing, every sub-block is 128. Both cases
take 17 cycles, including one empty set-up cycle.

Busy cycles per job when the IDCT never holds it up, compared with the
published per-macroblock counts:

| Mode | This design | Published |
|---|---|---|
| luma 4x4 V/H (16 blocks) | 16 x 4 = 64 | 64 |
| luma 4x4 DC, both neighbours | 16 x 6 = 96 | 96 |
| luma 4x4 directional | 16 x 16 = 256 | 64 |
| 16x16 H/V | 64 | 64 |
| 16x16 DC, both neighbours | 78 | 78 |
| 16x16 plane | 37 + 256 + 18 = 311 | 279 |
| chroma H/V | 16 | 16 |
| chroma DC, both neighbours | 18 | 18 |
| chroma plane | 21 + 64 + 4 = 89 | 87 |

The published 64 cycles for luma 4x4 directional modes is not reachable with
one COU, because it would need four COU results per cycle. The published
interface timing shows one 4x4 row every four cycles, which is what this
design's directional modes deliver. The published 61 frames/s at 1280x1024
and 100.9 MHz leaves 323 cycles per macroblock, luma and both chroma blocks
together. Here a macroblock of luma 4x4 directional blocks with
horizontal/vertical chroma takes 256 + 2 x 16 = 288 busy cycles and fits. A
plane-coded macroblock takes 311 + 2 x 89 = 489 and does not. Any time spent
waiting for the IDCT comes on top of these counts.

## Pairing with the IDCT

The IDCT delivers one row of a 4x4 block (four residuals) per pulse of
`idct_out`. The published timing puts the first row 40 cycles after
`intra_start` and the next rows every 4 cycles.

Here the prediction row waits in the output generator with `pred_valid`.
It is consumed in the cycle where `idct_out` is also high. `idct_ready`
(equal to `pred_valid`) tells the IDCT that its row was taken, so an IDCT
that holds its row until then never loses one. Either side can wait:

- If the prediction is ahead, the controller stalls (`pred_stall`) until
  the output register frees up.
- If the IDCT is ahead (for example at the extra cycles of a DC or plane
  set-up), the IDCT's row waits.

The sum, clipped to 0..255, appears on `recon_row` with `recon_valid` and
its position (`recon_plane`, `recon_y`, `recon_col4`). In the same cycle it
is written into the plane's predictor memory.

## Predictor memory

Each plane has an `nbr_sram` instance: luma with 16x16 macroblocks and
width `IMG_W`, chroma with 8x8 blocks and width `IMG_W/2`. Each instance
holds four things:

- a line memory of the full picture width, as 4-pixel words, holding the
  bottom row of the macroblock row above. For 640-pixel pictures this is the
  640-pixel line of the original design.
- the right column of the macroblock to the left;
- the corner pixel above-left of the current macroblock;
- the reconstructed pixels of the current macroblock, so that later 4x4
  blocks find their upper and left neighbours inside it.

When the last row of a macroblock is written, that macroblock is retired in
the same cycle:

- its bottom row moves into the line memory;
- its right column becomes the left column;
- the line pixel that will be the next macroblock's corner is saved.

All reads are combinational. Predictors are gathered from this state by the
input data selector.

Neighbour availability is decided only by the picture edges (`mb_x`,
`mb_y`):

- DC falls back to one-sided sums, or to 128 when no neighbour exists.
- Missing above-right pixels are replaced by P3.
- Luma 4x4 blocks are processed in raster order inside the macroblock
  (1..16 left to right, top to bottom). Blocks in column 3 below the first
  row therefore have no above-right neighbour.
- Modes that need a missing neighbour must not be requested. A conforming
  stream never does.

## Using the top level

`intra_pred_top #(IMG_W = 640, IMG_H = 480)`

1. Wait for `intra_busy` low.
2. Pulse `intra_start` for one cycle with:
   - `intra_mode` (0..16), using the H.264 numbering for 0..8: 0 vertical,
     1 horizontal, 2 DC, 3 diagonal down-left, 4 diagonal down-right,
     5 vertical-right, 6 horizontal-down, 7 vertical-left, 8 horizontal-up.
     The other codes are 9..12 for luma 16x16 (horizontal, vertical, DC,
     plane) and 13..16 for chroma (horizontal, vertical, DC, plane).
   - `blk_idx` for luma 4x4 jobs, or `chroma_cr` for chroma jobs.
   - `mb_x` and `mb_y`.
3. Supply one residual row per prediction row:
   - 4 rows for a luma 4x4 job;
   - 64 rows for a 16x16 job;
   - 16 rows for a chroma job.

Issue the jobs of a macroblock in raster block order, and macroblocks in
raster order over the picture. The two chroma jobs of a macroblock come
after its luma jobs.

Two assertions in the top check the protocol:

- a start only arrives while idle;
- a residual row stays presented until it is taken.

## Departures from the original design

- **Mode numbering 0..8:** follows H.264 and the original direction
  diagram. The original tables list horizontal as 0 and vertical as 1, and
  name modes 5..8 in a different order (vertical-left, vertical-right,
  horizontal-up, horizontal-down).
- **16x16 DC:** follows the defining equation (sum of 32 predictors plus
  16, shifted by 5) and the step-by-step procedure. The compact F form given
  for it does not produce that rounding.
- **Cycle counts:** see the table above. Horizontal, vertical and DC
  match the published counts. Luma 4x4 directional modes
  give one pixel per cycle. Plane also gives one pixel per cycle, but
  because of the single multiplier it spends 3 extra set-up cycles and 18
  cycles (16x16) moving the block base.
- **Register usage:** 16x16 DC uses two registers rather than the four
  listed for it.
- **Not in the original, built here:**
  - neighbour availability rules, chroma DC per 4x4 sub-block and clipping,
    all taken from H.264;
  - the row handshake with the IDCT and the memory organisation, which are
    this design's own.
- **Not built:** constrained intra prediction, slice boundaries and
  field/MBAFF coding.
- **Widths chosen here:** 10-bit signed residuals, 22-bit COU datapath.
  The 15-bit registers are the original's.

## Verification

Every module has a self-checking testbench in `tb/`. The main ones:

- `tb_input_selector`: runs the selector's COU operations through a model
  of F and compares every pixel of every mode, block position and edge case
  with the H.264 equations.
- `tb_intra_pred_top`: decodes a 64x64 picture through the whole circuit
  against an independent H.264 reference model. It uses randomly spaced
  IDCT rows, so that both kinds of wait, every mode, every DC availability
  case, above-right substitution and clipping all occur. It also checks
  the set-up latency of every job.
- `tb_intra_pred_full`: does the same for a full 640x480 picture at the
  default parameters with the published IDCT timing. That is 1200
  macroblocks, about 930,000 cycles and 1.28 million checks.
- `tb_intra_pred_workloads`: runs a 640x480 and a 1280x1024 picture side by
  side, each in a circuit whose line memories match the picture width
  (`IMG_W=1280, IMG_H=1024` for the second one). It prints the frame cycle
  counts: 930,485 and 3,970,325. With the IDCT timing above, the IDCT
  rather than the predictor sets the pace. So 1280x1024 at 61 frames/s,
  which allows 1,654,098 cycles per frame at 100.9 MHz, is not reached
  with that IDCT.

The reference model in `tb/intra_tb_driver.sv` works on its own copy of the
reconstructed picture and never uses F.

To simulate with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_intra_pred_top \
        rtl/intra_pkg.sv tb/tb_intra_pred_top.sv
    ./obj_dir/Vtb_intra_pred_top

Any other testbench runs the same way with its own name. Each one ends by
printing `TB_RESULT checks=N failures=M`.

## Files

- `rtl/intra_pkg.sv`: widths, pixel and operand types, mode codes, clip.
- `rtl/cou.sv`: the common operations unit and the multiplier.
- `rtl/reg_file.sv`: R0..R3.
- `rtl/nbr_sram.sv`: predictor memory of one plane.
- `rtl/input_selector.sv`: predictor gathering and COU operand routing for
  all modes.
- `rtl/pred_controller.sv`: job and row sequencing.
- `rtl/output_gen.sv`: OUT0..OUT3 rows, staging, clip, handshake.
- `rtl/recon_adder.sv`: prediction plus residual.
- `rtl/intra_pred_top.sv`: everything wired together.
- `tb/tb_<module>.sv`: the testbench of each module.
- `tb/intra_tb_driver.sv`: stimulus, IDCT model and H.264 reference for the
  picture-level testbenches.
- `tb/intra_workload_run.sv`: one circuit plus driver sized for one
  picture, used by `tb_intra_pred_workloads`.
