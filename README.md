# H.264 intra 4x4 luma encoder in SystemVerilog

This is an H.264/AVC baseline-style intra-frame encoder for the luma plane of a
live video stream. Pixels arrive one component per clock from a camera-style
interface: frame and line strobes, with Y Y Cb Y Y Cr order. The encoder codes
each 16x16 macroblock as sixteen 4x4 blocks. For every block it:

1. forms all nine 4x4 intra predictions from already reconstructed neighbours;
2. picks one with a rate-distortion cost: Hadamard SATD + λ·R;
3. transforms and quantises the residual;
4. reconstructs the block exactly as a decoder would, for use as the next neighbour;
5. entropy-codes the levels with CAVLC.

The result leaves as 32-bit words.

The hard part of the design is the feedback loop. Each 4x4 block needs the
*reconstructed* samples of the blocks to its left, above, and above-right.
Blocks therefore go through prediction → decision → transform → quantisation
→ inverse → reconstruction strictly one after another. Everything else is
arranged around that loop.

## Data flow

```
pixels ─► video_flow_control ─► flow_ctrl_4x4 ───────────────► coefficient FIFO ─► stream writer ─► bitstream_packer ─► 32-bit words
          (2 x 16-line RAMs)    │ intra4x4_pred  (2 cycles)                       │ cavlc + level FIFO
                                │ residual_calc  (2)                              │ exp_golomb (CBP)
                                │ mode_select_4x4 (6)                             └─ mode flag / rem mode
                                │ forward_transform (2)
                                │ quant_iquant (4 / 7)
                                │ inverse_integer_transform (3)
                                └ reconstruction + neighbour store
```

### Input buffer (`video_flow_control`)

- Luma samples are packed four per 32-bit word into one of two line RAMs. Each RAM holds 16 lines of up to `MAX_WIDTH` samples.
- Every third component (Cb or Cr) is discarded.
- The RAMs alternate: one is coded while the other fills.
- When the 16th line of a RAM is complete, `row_ready` hands that macroblock row to the coding loop.
- If the input wraps round to a RAM the loop has not yet released, the sticky `overrun` output is set.
- The line width is measured on the first line of every frame. It must be a multiple of 16.

### Coding loop (`flow_ctrl_4x4`)

- For each macroblock, 64 RAM words are read into a 16x16 register array. The sixteen blocks are then coded in the standard order: 8x8 quadrants in raster order, and 4x4 blocks in raster order inside each quadrant.
- Neighbour samples come from three places:
  - the current macroblock's reconstruction;
  - the right column of the previous macroblock;
  - the reconstructed bottom line of the macroblock row above, one `MAX_WIDTH` line.
- The above-left corner of block 0 is saved before that line is overwritten.
- Above-right samples are used only when that block is already coded. This rules out blocks 3, 7, 11, 13 and 15, and the right edge of the picture. Otherwise sample D is repeated, as the standard requires.
- The chosen mode and the number of non-zero levels of every block are kept for the row below and the block to the right. They are used for the most-probable-mode rule and for the CAVLC nC context.

### Mode decision (`mode_select_4x4`)

- Nine `hadamard4x4` and nine `distortion_calc` units work in parallel. Distortion is D = (Σ|H·X·Hᵀ| + 1) >> 1.
- `most_probable_mode` returns min(left, upper) when both neighbours exist, otherwise DC (2).
- `rate_calc` gives λ to the most probable mode and 4λ to the others. λ(QP) = round(√(0.85·2^((QP−12)/3))), so λ(40) = 23.
- `cost_calc` adds the two terms into 22-bit costs. Modes without their neighbours cost 2²²−1.
- Three `find_min3` units each reduce three modes. `find_best_mode` then picks the winner and forwards its residual. Ties go to the lower mode number.
- The decision is ready 6 cycles after the residuals.

### Transform and quantisation

- `forward_transform`: the 4x4 integer core transform, columns then rows, 2 cycles.
- `quant_iquant`:
  - Quantisation: |Z| = (|W|·MF + f) >> (15 + QP/6), with f = 682·2^(4+QP/6). Levels are limited to ±2063.
  - Rescaling: Z·V·2^(QP/6).
  - Sixteen multipliers serve both steps. Levels are ready after 4 cycles and rescaled values after 7.
- `inverse_integer_transform`: rows, then columns, then (x+32) >> 6, 3 cycles. Rows go first because that is the decoder's order, so the encoder's reconstruction matches a standard decoder exactly.

### Entropy coding

`cavlc` codes one block at a time through these sub-modules:

| Sub-module | What it does | Time |
|---|---|---|
| `cavlc_zigzag` | zig-zag scan | 1 cycle |
| `cavlc_scan_ctrl` | walks the scan from the high-frequency end and collects TotalCoeff, TrailingOnes and their signs, the levels, total_zeros and the runs | one cycle per coefficient |
| `cavlc_total_coeff` | coeff_token, from nA/nB | 3 cycles |
| `cavlc_total_zeros` | total_zeros | |
| `cavlc_run_code` | run_before | |
| `cavlc_level_code` | level_prefix/level_suffix, with suffix length growth and the escape code | |

- Level codes are written into an external 16-deep level FIFO. Each FIFO word has the code in bits [27:0] and its length in bits [32:28].
- `data_ready` rises when every part is finished.
- The consumer reads the codes and pulses `data_read`.

`exp_golomb` codes ue(v), se(v), me(v) and te(v). me(v) uses two 48-entry coded_block_pattern tables, one for intra and one for inter. ue/se/te take 4 cycles, me takes 6, and one-bit te takes 2.

`bitstream_packer` concatenates codes of 1–32 bits, most significant bit first, into 32-bit words. At the end of a frame it pads the last word with zeros.

### Stream layout

The encoder does not write the standard's macroblock layer, nor any parameter
sets, slice headers, NAL units or chroma data. It writes:

- **Per 4x4 block:**
  - The prediction mode: `1` when it equals the most probable mode, otherwise `0` followed by the 3-bit remaining mode.
  - The block's CAVLC codes, in this order: coeff_token, trailing-one signs, levels, total_zeros, run_before.
- **After the 16th block of a macroblock:** the luma coded_block_pattern as me(v), intra table.

Every block's residual is written, even when its coded_block_pattern bit is 0.
The syntax elements are the standard's, so a decoder front end can parse the
stream once the missing headers and the element order are supplied.

## Timing and throughput

- **Per block:** about 24 cycles (prediction 2, residual 2, decision 6, transform 2, quantisation/rescale 7, inverse 3, reconstruction 1, plus control).
- **Per macroblock:** about 560 cycles measured, including the 65-cycle load.
- **Input per macroblock:** only 384 components, so the source must leave line blanking. The testbenches use a blanking period equal to the line width.
- **Example:** 640x512 at 25 frames/s needs about 18 M cycles/s of coding.

The stream writer runs in parallel with the loop and is decoupled from it by an
8-entry FIFO. Between frames, the vertical blanking must cover the coding of the
last macroblock row. `frame_done` pulses when the last word of a frame has left.

## Top-level ports (`h264_intra_encoder`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rstn | in | 1 | asynchronous reset, active low |
| active_frame / active_line | in | 1 | frame and line strobes |
| pixel_valid / pixel_data | in | 1 / 8 | one component per valid clock, Y Y Cb Y Y Cr |
| bitstream_valid / bitstream | out | 1 / 32 | coded word, first bit in bit 31 |
| overrun | out | 1 | input overran the line RAMs (sticky) |
| frame_done | out | 1 | last word of the frame written |

Parameters:

- `MAX_WIDTH` (default 1920) sizes the line RAMs and the neighbour line.
- `QP` (default 26) is the fixed quantiser.

Frames are coded in whole macroblock rows. A height that is not a multiple of
16, such as 1080, loses its last partial row.

## Where the design departs from its source description

- **Reconstruction storage.** The source keeps reconstructed neighbours and modes in FIFOs. Here they are register arrays addressed by block position, which gives the same function with simpler addressing.
- **λ.** The Lagrange multiplier uses the formula above. It reproduces the λ = 23 used in the source's QP 40 example.
- **Example cost values.** The example cost values in the source do not equal distortion + rate; this design computes J = D + λR.
- **Widths.** Three widths are larger than the source's port lists:
  - total_coeff_number is 5 bits;
  - the level FIFO length field is 5 bits;
  - the rescaled coefficients are 18 bits, which holds the largest value a full-range residual produces.
- **Above-right availability.** The rule is the standard's. It covers blocks 5 and 13 as well as the blocks the source lists.
- **Added handshakes.** `cavlc` has a `data_read` input, and `exp_golomb` has a `te_max1` input that gives the te(v) range.
- **Not built:** 16x16 and chroma prediction, chroma coding, and stream headers.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/h264_ref_pkg.sv`, a behavioural model written from the standard's
equations. That model covers prediction, transform, quantisation, inverse
transform, SATD, λ and the CAVLC bit writer; only the VLC tables are shared
with the RTL. Checks include:

- the worked numbers of the source;
- cycle latencies (2 / 2 / 6 / 2 / 4+3 / 3 cycles, Exp-Golomb 4 / 6 / 2);
- large random sweeps.

The worked numbers are:

- the Hadamard example (−51, 1, 11, 7, 17);
- the transform and quantisation example at QP 5, 10, 20 and 40;
- the find-best-mode example;
- the CAVLC example block, reproduced bit for bit: `0000000101 10 01 11 010 000010 011 0010010`.

`tb_h264_intra_encoder` runs the whole encoder on two 64x48 frames at QP 20.
`tb_h264_intra_encoder_full` runs it at the default parameters on two 1920x32
frames. Both compare every output word with a reference encoder, and both count
a failure for any mechanism that never occurs:

- each of the nine modes chosen;
- most-probable-mode hits and misses;
- above-right substitution and above-right use;
- picture borders;
- all four nC tables;
- trailing ones, level suffix growth and large levels;
- empty blocks;
- zero and non-zero coded_block_pattern;
- input overrun.

To run a test with verilator:

```
verilator --binary --assert -Irtl -Itb -y rtl --top-module tb_cavlc \
          rtl/h264_pkg.sv tb/h264_ref_pkg.sv tb/tb_cavlc.sv
./obj_dir/Vtb_cavlc
```

## Files

- `rtl/h264_pkg.sv`: types, MF/V tables, λ table, scans, and the CAVLC and coded_block_pattern code tables.
- One module per file in `rtl/`. The top is `h264_intra_encoder`. `sync_fifo` is the FIFO used for coefficients and level codes.
- `tb/`: one `tb_<module>.sv` per module, the reference model package, and `enc_check.svh`, the shared encoder-level checker.
