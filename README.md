# H.264 luma macroblock engine: intra prediction, mode decision and TQ/IQIT

This is the part of an H.264 encoder that decides how each 16x16 luma
macroblock is predicted, then transforms, quantises and reconstructs it. For
every macroblock it:

- tries the nine intra 4x4 modes on each of the sixteen 4x4 blocks;
- tries the four intra 16x16 modes;
- tries the four chroma intra modes on Cb and Cr;
- compares both with the cost of the inter prediction delivered by a motion
  estimator;
- sends the residual of the winning prediction through the forward integer
  transform and quantiser (TQ) and back through inverse quantisation and the
  inverse transform (IQIT);
- works out the coded block pattern;
- writes the reconstructed pixels back as neighbours for the next
  macroblocks.

It follows the architecture of Suh, Park and Cho, "An Efficient Hardware
Architecture of Intra Prediction and TQ/IQIT Module for H.264 Encoder". Two
ideas in that architecture are worth knowing before reading the RTL.

1. **The 4x4 loop runs out of flip-flops, not memory.** A 4x4 block's
   prediction needs the reconstructed pixels of the blocks before it. So TQ
   and IQIT must run inside the prediction loop, block by block, before the
   macroblock type is even known. The neighbours of the current block are
   held in prediction flip-flops that are updated with every reconstructed
   block. Because of that, the loop never waits for a memory.
2. **Intra 16x16 costs no extra TQ/IQIT time.** An I16 macroblock normally
   needs a Hadamard transform of the sixteen DC coefficients before any
   inverse transform can start. The 16x16 prediction unit already computes
   the Hadamard distortion of every 4x4 block. It keeps each block's DC
   term, and it forms the DC Hadamard of the chosen mode while writing out
   its prediction. In the final pass those DC values are quantised in the
   first four cycles and inverse-transformed before block 0 leaves the
   quantiser. IQIT therefore starts as early as for any other macroblock
   type.

The luma path is complete. Two chroma units are included:

- the 8x8 chroma intra prediction, which runs alongside the 16x16 unit;
- the 2x2 chroma DC transform and quantiser, on its own ports.

The transform pass over the chroma 4x4 blocks, chroma reconstruction and
the chroma line memory are not built. See "Limits and departures".

## Macroblock flow

`mb_engine` processes one macroblock per `start` pulse. Every macroblock
takes the same number of cycles:

| phase | cycles after `start` | what happens |
|---|---|---|
| load | 1-7 | Five 32-bit words are read from the horizontal intra prediction SRAM: the 16 pixels above and the 4 above-right. The 16 left pixels come from the vertical flip-flops. Both go into the prediction flip-flops and the 16x16 unit's neighbour registers. The most probable mode SRAM supplies the 4x4 modes of the blocks above. |
| 4x4 loop | 8-567 | 16 blocks x 35 cycles. Each block is predicted in nine modes and the best mode is chosen. The block's residual goes through TQ and IQIT, is added to the prediction and updates the flip-flops. The 16x16 unit works in parallel (255 cycles). |
| decide | 568 | `best_mode_sel` picks I4, I16 or inter. |
| final pass | 569-651 | The current block and the chosen prediction (MUX2 over the 4x4, 16x16 and inter prediction SRAMs) are subtracted. The 16 blocks go through TQ back to back, and IQIT follows each one. Levels leave on `coef_*`; IDCT results go to the IDCT value SRAM; the CBP is formed. |
| reconstruct | 652-717 | 64 words: prediction plus the IDCT values, or zeros for an 8x8 block the CBP leaves uncoded, clipped. The words go out on `rec_*`. The bottom row updates the horizontal SRAM, the right column the vertical flip-flops, and the bottom and right 4x4 modes the mode memories. `done` pulses. |

That is 717 cycles from `start` to `done`. At 54 MHz this is 75,300
macroblocks per second: 720x480 (1350 macroblocks) luma at about 55 frames/s.

## The 4x4 loop (`intra4x4_pred`, `intra_pred_ff`)

The schedule of one block, with `start` in cycle 0:

- cycles 1-4: the current block is read, one row per cycle;
- cycles 2-5: the nine predictions of the row (`intra4x4_pel`, 36 pixels per
  cycle) are subtracted and fed to nine Hadamard SAE units (`sae4x4`);
- cycle 12: the SAEs are ready;
- cycle 13: `intra4x4_modesel` picks the mode with the smallest
  `SAE/2 + lambda * bits`. Here `bits` is 1 when the mode equals the most
  probable mode and 4 otherwise. Ties go to the lower mode number;
- cycles 13-16: the block is read again;
- cycles 14-17: the prediction rows and residual rows of the chosen mode go
  to the 4x4 prediction SRAM and to TQ.

The levels leave TQ 8 cycles after the first row. The residual rows leave
IQIT 9 cycles after the first level column. The last reconstructed row
reaches the flip-flops in cycle 34, and the next block starts in cycle 35.

The prediction flip-flops hold:

- `hff[0..19]`: the row above the macroblock plus 4 above-right pixels. A
  block's bottom row replaces its four columns.
- `vff[0..15]`: the column to the left. A block's right column replaces its
  four rows.
- `mff[0..15]`: the above-left pixel M of each block.

M is the subtle part. M of a block is the pixel at column 4*bx-1 of the row
above. Later blocks overwrite that pixel in `hff`. So just before block n
writes its bottom row, the old `hff` value at its rightmost column is saved
in `mff[n]`. Block n then reads `mff[MIDX[n]]` with

    MIDX = 5 0 7 2 1 4 3 6 13 8 15 10 9 12 11 14

Slots 5, 7, 13 and 15 are read by blocks whose M lies in a neighbouring
macroblock: blocks 0, 2, 8 and 10. These slots are filled at load time with
the macroblock's above-left pixel and left pixels 3, 7 and 11.

The above-right pixels E-H are only valid when the above-right block is
already reconstructed. That is never the case for blocks 3, 7, 11, 13 and 15.
For block 5 it depends on the macroblock to the upper right (`mb_tr_av`),
and for blocks 0, 1 and 4 on the macroblock above. Where the block is not
available, E-H are replaced by D.

The most probable mode is the smaller of the modes of the blocks above and
to the left. It is DC when one of them lies outside the picture. Blocks of a
non-I4 macroblock count as DC.

## Intra 16x16 and the luma DC (`intra16_pred`, `luma_dc_iq`)

The four modes (V, H, DC, plane) are evaluated by four SAE units in
parallel:

- Cycles 1-2 compute the plane parameters a, b, c and the DC value.
- The macroblock is then walked in 16 slots of 11 cycles, one 4x4 block per
  slot. For each mode, the AC part of the block's Hadamard SAE is
  accumulated, and the DC term (the sum of the block's prediction error) is
  stored in that mode's DC register file.
- A 17th slot runs the sixteen DC values, divided by 4, through the same SAE
  units.
- The cost of a mode is (AC sum + DC SAE) / 2. The cheapest available mode
  wins.
- Its 64 prediction words are written to the 16x16 prediction SRAM. On the
  first four of those cycles, the halved 4x4 Hadamard transform of that
  mode's DC registers leaves on `dcq_*`.

The engine keeps these values. In the final pass of an I16 macroblock, TQ's
DC input quantises them with the DC rule. `luma_dc_iq` applies the inverse
Hadamard and DC scaling, `(f*V) << (QP/6-2)` or the rounded right shift
below QP 12. IQIT then substitutes the result for each block's DC.

## TQ and IQIT (`tq4x4`, `iqit4x4`)

Both datapaths are four samples wide.

`tq4x4`:

- A residual row enters every cycle and passes the 1-D integer transform.
- Rows go into a double-buffered transpose file.
- Columns come out, pass the second 1-D transform, and reach four parallel
  quantisers: `(|w|*MF + f) >> (15+QP/6)`. The offset f is 2^qbits/3 for
  intra and 2^qbits/6 for inter, and the standard MF tables are used.
- Levels leave one column per cycle, 8 cycles after the first row.
- `ac_only` zeroes the DC level for I16 blocks.

`iqit4x4`:

- Dequantises one column per cycle: `level*V << QP/6`.
- Runs the row transform, then the column transform, then `(x+32)>>6`,
  bit-exact with the standard.
- Rows come out 9 cycles after the first column.

Both accept a new block every four cycles.

## Chroma prediction (`intra8x8_chroma_pred`)

Cb and Cr are predicted with one shared mode: DC, horizontal, vertical or
plane. The unit has the same organisation as the 16x16 unit:

- two set-up cycles compute each component's plane parameters, and the DC
  value of each 4x4 quadrant. The quadrants follow the H.264 rules: the
  top-right quadrant prefers the pixels above, the bottom-left one the
  pixels to the left;
- eight slots of 11 cycles walk the Cb blocks and then the Cr blocks through
  four SAE units, one per mode;
- one cycle picks the cheapest available mode, with cost = SAE/2;
- 32 cycles write the prediction to the 8x8 prediction RAM.

That is 125 cycles, which fit within the luma 4x4 loop. The chroma
neighbours enter on ports (`c_top`, `c_left`, `c_tl`), because
reconstructed chroma is not produced here.

## Chroma DC (`chroma_dc_tq`)

The DC coefficients of the four 4x4 blocks of an 8x8 chroma component go
through a 2x2 Hadamard transform. This unit is a four-stage
pipeline:

- cycle 0: the four DC values enter;
- cycle 1: the Hadamard result is held in flip-flops;
- cycle 2: four parallel quantisers produce the levels with the DC rule;
- cycle 3: the inverse 2x2 Hadamard and the chroma DC scaling
  `((f*V) << QP/6) >> 1` give the DC values for the inverse transform of
  each chroma block.

In `mb_engine` the unit sits on the `cdc_*` ports. Its rounding follows the
type of the macroblock decided last.

## Coded block pattern and the IDCT value store (`cbp_calc`)

For an inter macroblock, H.264 encoders drop 8x8 blocks that hold only a few
isolated ±1 levels:

- In zig-zag order, each ±1 level costs 3, 2, 2, 1, 1 or 1 for a preceding
  zero run of 0-5, and nothing after longer runs. Any larger level makes the
  block's cost unbounded (63 here).
- An 8x8 block whose cost is at most 4 is not coded.
- If the costs of the remaining 8x8 blocks add up to at most 5, no luma
  block is coded.

This decision is only known after all 16 blocks. IQIT results therefore go
to the 64x64-bit IDCT value SRAM first, and the reconstruction pass adds
either those values or zeros according to `cbp_luma`. Intra macroblocks use
the plain rule: an 8x8 block is coded when any of its levels is non-zero. For
I16, the DC is excluded, and the CBP is all or nothing.

## Memories (`sram_1r1w`)

| memory | size | use |
|---|---|---|
| luma current RAM | 64 x 32 | current macroblock; two read ports (4x4 unit and 16x16 unit) |
| 4x4 prediction RAM | 64 x 32 | prediction of the chosen 4x4 modes |
| 16x16 prediction RAM | 64 x 32 | prediction of the chosen 16x16 mode |
| inter prediction RAM | 96 x 32 | inter prediction (words 0-63 luma) |
| IDCT value SRAM | 64 x 64 | four 16-bit residuals per word, address {block, row} |
| intra prediction RAM (Y) | 4*MB_COLS x 32 | bottom row of the previous macroblock row |
| most probable mode RAM | 4*MB_COLS x 4 | bottom 4x4 modes of the previous macroblock row |
| chroma current RAM | 32 x 32 | current Cb and Cr, word c*16 + row*2 + column/4 |
| 8x8 prediction RAM | 32 x 32 | prediction of the chosen chroma mode |

`MB_COLS` (default 45) is the picture width in macroblocks: 720 pixels. The
vertical neighbours (16 pixels) and the left 4x4 modes are flip-flops. All
memories are written as arrays with synchronous read, one cycle of latency.
They are not reset.

## Using `mb_engine`

1. Write the 64 words of the current macroblock through `cur_we`,
   `cur_waddr` and `cur_wdata`. The word address is row*4 + column/4, and
   pixel k sits in bits 8k+7:8k.
2. For P/B slices, also write the inter prediction through `inter_*` and
   set `inter_en` and `inter_cost`.
3. Pulse `start` with the following values. They are sampled there:
   - `mb_x`;
   - the availability of the macroblocks above, left, above-left and
     above-right;
   - `qp`;
   - `lambda`.
4. Read the results while the macroblock runs and after `done`:
   - Levels appear on `coef_*`, one column of a 4x4 block per cycle:
     `coef_lvl[i]` is row i, `coef_blk` is the block in scan order, and
     `coef_isdc` marks the four luma DC columns of an I16 macroblock.
   - Reconstructed words appear on `rec_*`.
   - After `done`: `mb_type` (0 I4, 1 I16, 2 inter), `i16_mode`, `i4_modes`
     and `cbp_luma`.

5. For chroma, write the 32 words of the current Cb and Cr through
   `ccur_*` before `start`, and hold the chroma neighbours on `c_top`,
   `c_left` and `c_tl` while `busy` is high. After `done`, `c_mode` and
   `c_cost` hold the chroma decision, and the prediction can be read
   through `cpred_re`, `cpred_raddr` and `cpred_rdata`.
6. Optionally, after `done`, send the DC coefficients of each chroma
   component on `cdc_valid`, `cdc_in` and `cdc_qp`. The levels appear on
   `cdc_lvl` two cycles later, and the dequantised DC values on `cdc_dq`
   three cycles later.

Macroblocks must be processed in raster order, because the neighbour
memories assume it. `busy` is high from `start` to `done`.

## Verification

Every unit has a self-checking testbench in `tb/`. Each compares the unit
against reference models in `tb/h264_ref_pkg.sv`, which are written
directly from the standard's equations: matrix-product transforms,
per-pixel prediction formulas and integer quantisation. The testbenches
check values and cycle counts:

- TQ: levels 8 cycles after the first row;
- IQIT: rows 9 cycles after the first column;
- SAE: result 10 cycles after the first row;
- 4x4 prediction: rows on cycles 14-17;
- 16x16 prediction: 255 cycles;
- chroma prediction: 125 cycles;
- chroma DC: levels after 2 cycles and values after 3;
- macroblock: 717 cycles.

`tb_mb_engine` runs the engine at its default parameters over a picture 45
macroblocks wide and 2 rows high. A complete reference encoder in the
testbench predicts every level, DC level, reconstructed pixel, mode,
macroblock type and CBP. The macroblock content is chosen so that every
mechanism occurs, and the test fails if one never happens:

- I4, I16 and inter are each chosen;
- single 8x8 blocks are dropped;
- a whole inter CBP is cleared;
- non-zero luma DC levels occur;
- the most probable mode is chosen;
- picture edges occur;
- above-right pixels are replaced;
- chroma DC values are processed after intra and after inter macroblocks,
  so both rounding offsets are used;
- each chroma mode is chosen; the chroma decision and all 32 prediction
  words are checked.

To run a testbench with plain Verilator:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/h264_pkg.sv tb/h264_ref_pkg.sv tb/tb_mb_engine.sv \
        --top-module tb_mb_engine --Mdir obj_mb
    ./obj_mb/Vtb_mb_engine

Each testbench prints `TB_RESULT checks=N failures=M`. The end-to-end test
takes about half a minute including compilation.

## Limits and departures from the published design

- **Chroma is partial.** The published engine quotes 927 cycles per
  macroblock for all types, chroma included. This one predicts chroma and
  has the chroma DC unit, but it has no transform pass over the chroma 4x4
  blocks. It also has no chroma reconstruction and no chroma line memory or
  vertical flip-flops. The chroma neighbours and the chroma DC inputs must
  therefore come from outside. The 717 cycles cover luma only.
- **Chroma prediction has a unit of its own.** The published design runs it
  on the 16x16 module. Here it is a copy of that organisation, and it runs
  in parallel. Its cost has no rate term and no DC Hadamard term.
- **35 instead of 34 cycles per 4x4 block.** The next block starts the cycle
  after the last reconstructed row is in the flip-flops.
- **Rate terms are this design's choice.** The intra 4x4 block cost is
  SAE/2 + lambda x (1 or 4 bits). The I4 macroblock adds 6 x lambda. The
  16x16 cost is the halved SAE with no rate term. The inter cost is taken as
  given. The source specifies only "SAE plus a term proportional to the mode
  bits".
- **DC Hadamard timing.** The luma DC Hadamard of the 16x16 unit is one
  combinational step at the end, rather than a twelve-cycle pipeline. The DC
  quantisation is done by the TQ module's DC input.
- **IDCT value SRAM** is organised as 64 x 64 bits (the same 4096 bits as
  256 x 16).
- **Interfaces are plain ports.** The inter cost and inter prediction are
  input ports instead of a bus interface. Reconstructed pixels leave on a
  port instead of going into a loop-filter buffer.
- **Picture width.** At the default `MB_COLS = 45` the line memories hold
  720 pixels. 1280-pixel pictures need `MB_COLS = 80`.
- **Datapath width.** The dequantised luma DC path is 24 bits wide. That is
  enough for levels produced by 8-bit video, but not for arbitrary level
  values at very high QP.
