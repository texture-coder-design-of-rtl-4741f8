# MPEG-4 texture-coding block engine with interleaved DCT/IDCT

An MPEG-4 encoder codes each 8x8 block in a loop: DCT, quantization (Q),
DC/AC prediction, then inverse quantization (IQ) and IDCT, which rebuild the
picture that the next frame is predicted from. Usually each stage waits for a
whole block from the stage before it. That costs block buffers between the
stages. It also costs buffers in motion compensation (MC), which must keep its
prediction of a block until the reconstructed error of that block comes back.

This block engine follows the interleaved DCT/IDCT schedule described in the
paper *Texture Coder Design of MPEG-4 Video by Using Interleaving Schedule*.
One 1-D transform engine and one 64-word transpose memory compute a block's
forward DCT **and** the inverse DCT of its quantized coefficients at the same
time. Each coefficient goes from the second DCT pass through Q and IQ straight
into the first IDCT pass, 8 cycles later. The loop has no block buffers, and
MC needs only two prediction buffers, used in ping-pong.

The prediction divides and multiplies by QP and by the DC scaler. That work is
also folded into the loop. The quantizer is idle while a block's first 1-D DCT
runs, so in that slot it does the divisions. The inverse quantizer already
multiplies each level by QP, and it stores that product as the predictor for
later blocks. There is no separate multiplier or divider for prediction.

All RTL is SystemVerilog-2017 and synthesizable. Every block has a
self-checking testbench.

## Contents

| file | block |
|---|---|
| `rtl/be_pkg.sv` | shared widths, schedule constants, DCT coefficient function, types |
| `rtl/block_engine.sv` | top: wires the blocks below into the coding loop |
| `rtl/be_controller.sv` | macroblock and block sequencer, owns the 8-cycle engine frame |
| `rtl/dct_idct_unit.sv` | interleaved 2-D DCT and IDCT on one engine and one transpose memory |
| `rtl/dct_1d_core.sv` | 8-point 1-D DCT/IDCT engine with two time-shared channels |
| `rtl/transpose_mem.sv` | 8x8 transpose memory with separate read and write address generators |
| `rtl/quantizer.sv` | Q, also the divider for DC/AC prediction |
| `rtl/inv_quantizer.sv` | IQ, also the level x QP multiplier for the prediction buffer |
| `rtl/dcac_pred.sv` | adaptive DC/AC prediction and the DMA sequencer for predictor data |
| `rtl/pred_local_buf.sv` | local predictor buffer (above bank and left bank) |
| `rtl/mc_pingpong_buf.sv` | two MC prediction buffers and the reconstruction adder |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## The 1-D engine (`dct_1d_core`)

The engine uses the usual even/odd split of the 8-point DCT. The basis is
C[u][k] = c(u)/2 · cos((2k+1)uπ/16), with c(0) = 1/√2. It is held as 15-bit
integers with 13 fractional bits.

- **Forward.** After 8 samples have arrived, the engine works for 4 cycles. In
  cycle j, four multipliers (called ACF) take the butterfly sum
  x(j)+x(7−j) times C[2i][j]. Four more multipliers (called BDEG) take the
  difference x(j)−x(7−j) times C[2i+1][j]. Eight accumulators then hold the
  even and odd outputs.
- **Inverse.** The same multipliers take y(2j) and y(2j+1) with the transposed
  coefficients. An add/sub stage then forms x(i) = E(i)+O(i) and
  x(7−i) = E(i)−O(i).

So one vector occupies the multipliers for 4 cycles out of every 8. The engine
has two channels, each taking and giving one sample per cycle:

- channel 0 owns the multipliers in phases 0–3 of a free-running 8-cycle frame;
- channel 1 owns them in phases 4–7;
- the direction (DCT or IDCT) is chosen per vector.

A channel-0 vector must therefore end on phase 7 and a channel-1 vector on
phase 3. Assertions check this. The first result leaves 12 cycles after the
first input (`L1D`).

## The interleaved schedule (`dct_idct_unit`, `block_engine`)

Channel 0 always runs DCT passes and channel 1 always runs IDCT passes. Times
below count from a block's first input sample (cycle 0).

| cycles | channel 0 (DCT) | transpose memory | channel 1 (IDCT) |
|---|---|---|---|
| 0–63 | row pass, input from outside | written row-by-row (12–75) | IDCT column pass of the previous block |
| 64–127 | column pass, input from memory | read column-by-column (64–127) | — |
| 76–139 | coefficients → Q → prediction / IQ | — | — |
| 84–147 | — | written column-by-column (96–159) | first pass, input from IQ |
| 148–211 | next block's row pass from 152 | read row-by-row (148–211) | second pass, input from memory |
| 160–223 | — | — | reconstructed error → adder → pixels (161–224) |

One memory serves both transforms. This works because every write pass
**trails** a read pass over the same addresses in the same order. The DCT
column read is followed by the IDCT first-pass write, 32 cycles behind it. The
IDCT row read is followed by the next block's DCT row write. Each word is read
before it is overwritten.

The other half of the trick is reading early. A read pass in the transposed
order may begin while its write pass is still running. With row-by-row writing
and column-by-column reading, once address 49 has been written every later
read finds its word already in place. That lets each second pass start as soon
as its channel is free (cycle 64, or 148), without waiting for the first
pass's 12-cycle tail. Reading and writing therefore need separate address
generators (`transpose_mem`).

**Block period.** The single write port limits how close blocks can be. The
IDCT first-pass writes of block n end at cycle 159. The DCT row writes of block
n+1 start 12 cycles after that block begins. So blocks must start at least 148
cycles apart. Block starts fall on the 8-cycle frame, so the period is
`BLK_PERIOD` = 152. The published design reports 144 cycles per block and 935
per macroblock; its internal latencies are not given. Here a lone macroblock
takes 1023 cycles from start to last pixel. Back to back, including the
predictor DMA, a macroblock takes about 984 cycles (6 macroblocks in 5903).

**Real-time check.** 720x480 at 30 frames/s is 40,500 macroblocks/s. At 984
cycles each that is 39.9 M cycles/s, which fits in 54 MHz.

`QIQ_LAT` = 8 is the time from the DCT output to the IDCT input. It is made up
of quantizer (1 cycle), inverse quantizer (1 cycle) and a 6-stage pad. The pad
makes the IDCT input start on phase 4, which channel 1 needs.

## DC/AC prediction with shared Q and IQ (`dcac_pred`)

The three neighbours of block X are A (left), B (above-left) and C (above).

1. **Phase 1**, during the first 1-D DCT. Send the reconstructed DCs of A, B
   and C to the quantizer with divisor dc_scaler. The quantizer's rounding
   division (`Q_DIVR`, rounds half away from zero) returns QDC_A, QDC_B and
   QDC_C.
2. If |QDC_A − QDC_B| < |QDC_B − QDC_C|, predict from C (vertical). Otherwise
   predict from A (horizontal).
3. Send the chosen neighbour's 7 stored AC values, each already multiplied by
   that block's own QP, to the quantizer with divisor QP of the current block.
   The results are the scaled AC predictors.
4. **Phase 2**, as the quantized levels stream out. Subtract the DC predictor.
   If AC prediction is on, also subtract the first-row predictors (vertical)
   or the first-column predictors (horizontal). The result goes to `vlc_*`.
5. At the same time the inverse quantizer's output for the first row and first
   column is written into the local buffer as this block's predictor data.
   That output is the reconstructed DC and level × QP.

Storing level × QP means the QPs of earlier blocks never need to be kept.

**Buffer layout.** `pred_local_buf` keeps 4 slots x 8 words of 12 bits in each
of two banks:

- The **above** bank holds the predictors for the two luma columns and for Cb
  and Cr. Before each macroblock it is loaded from external memory: 32 words at
  address `mb_x*32`. After the macroblock it is stored back, by which time it
  holds Y3, Y4, Cb and Cr for the macroblock row below.
- The **left** bank stays on chip, because the next macroblock is to the right.

The B neighbour's DCs come from registers. Y1, Cb and Cr use the previous
load. Y2 and Y3 use values saved at load time. Y4 uses Y1's DC.

**Missing neighbours.** Neighbours outside the picture, and blocks of inter
macroblocks, count as DC 1024 and AC 0. Availability is given per macroblock
by `left_avail`, `top_avail` and `topleft_avail`.

## Interfaces of the top (`block_engine`)

- **Macroblock.** `mb_start` with `mb_in` (type `mb_param_t`: intra, ac_pred,
  qp, dc_scaler_y, dc_scaler_c, availability flags, mb_x) while `mb_ready` is
  high. `mb_done` pulses after the predictor data is stored back.
- **Input (point A).** `in_req` is high for 64 cycles per block. In each of
  those cycles the source must present sample `in_idx` of block `in_blk` on
  `in_data` and its MC prediction on `in_mc`. The sample is a pixel for intra
  blocks and the prediction error for inter blocks.
- **To scan/VLC.** `vlc_valid`, `vlc_level`, `vlc_u`, `vlc_v`, `vlc_blk` and
  `vlc_vert`. Levels leave in the engine's column order (all u for v = 0,
  then v = 1, …), together with the prediction direction so that the scan
  can be chosen. The scan and VLC themselves are outside the engine.
- **Reconstruction (point B).** `rec_valid`, `rec_idx`, `rec_blk` and
  `rec_data` give reconstructed pixels in raster order.
- **External predictor memory.** `ext_*` is 12-bit wide with a read latency of
  one cycle.

## Where this RTL departs from, or adds to, the published design

- **Block period.** 152 cycles instead of 144 (see above). The interleaving
  itself matches the published timing diagram.
- **Loop latency.** A block's first reconstructed pixel appears 160 cycles
  (2.5 block times) after its first input, counting both 1-D passes of each
  transform. The published comparison quotes one block time of latency for
  the loop. The buffer count it implies still holds: one transpose memory in
  the loop and two MC buffers.
- **Engine timing.** The published design names the engine's blocks but not
  its cycle-level operation. The 4+4-cycle channel split, the 12-cycle latency
  and the fixed point are this design's own: 13-bit coefficients, 3 extra
  fractional bits between passes, 18-bit intermediate words.
- **Quantizer rules.** The quantizer and inverse quantizer use MPEG-4's second
  (H.263-style) method; matrix quantization is not implemented. Predictor words
  are 12 bits, so level × QP saturates at ±2047. MPEG-4 itself does not clip
  there.
- **AC prediction flag.** `ac_pred` is an input. How it is decided is not
  specified.
- **Prediction DMA.** Loads and stores happen before and after each macroblock
  and are not overlapped with coding.
- **Local buffer size.** The local buffer is 768 bits plus 8 DC registers. The
  published design reports 912 bits.
- **MC buffers.** The ping-pong buffers and the reconstruction adder sit in the
  top, at point B of the coder.
- **Not built.** Motion estimation, motion compensation proper, scan, VLC, and
  the frame and predictor memories are outside the engine.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_block_engine` codes a 3x2-macroblock picture at default parameters. The
  picture mixes intra and inter macroblocks, random QPs, and AC prediction on
  and off. The testbench compares every output level and reconstructed pixel
  with its own model. That model has a bit-exact fixed-point transform,
  written as plain matrix products, and the MPEG-4 prediction rules applied on
  a picture-wide grid. The testbench also checks latencies and the block
  period. It counts each mechanism (intra/inter, both prediction directions,
  AC prediction, edge neighbours, DMA, DCT/IDCT overlap, early transposed
  reads) and fails if one never occurs.
- `tb_frame_720x480` runs the same model over a whole 720x480 picture: 45x30
  macroblocks, 8,100 blocks. It also checks that the picture fits in the
  1,800,000 cycles of one frame at 30 frames/s with a 54 MHz clock. The
  measured time is 1,317,647 cycles, about 976 per macroblock, and the run
  takes about 20 s.
- `tb_dct_idct_unit` compares against floating-point 2-D DCT and IDCT (±1).
  `tb_dct_1d_core` compares against floating-point 1-D transforms, allowing for
  the coefficient rounding.
- The other testbenches check their block against values computed in the
  testbench.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/be_pkg.sv tb/tb_block_engine.sv \
          --top-module tb_block_engine -o sim && ./obj_dir/sim
```

The full-size run takes well under a second.

## Changing it

- `L1D` in `be_pkg` is not a setting. It records the fixed latency of
  `dct_1d_core`, and must be updated if the core's pipeline is changed.
  `QIQ_LAT` and `BLK_PERIOD` can be set, but together with `L1D` they must
  stay consistent:
  - `BLK_PERIOD` must be at least 128 + `QIQ_LAT` + `L1D` and a multiple of 8;
  - `QIQ_LAT` + `L1D` must be 4 mod 8, so the IDCT input lands on phase 4;
  - `L1D` must be at most 14, or the early transposed read would overtake the
    write.
- `CW` (coefficient width), `PW` (predictor word) and `COEF_FRAC` are also in
  `be_pkg`.
