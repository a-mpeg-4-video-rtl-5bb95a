# Low-power MPEG-4 codec core: skip-first coarse motion estimation with frame-level clock gating

Motion estimation is the most power-hungry part of a video encoder. This RTL
implements two architectural techniques that cut it, taken from a published
MPEG-4 Simple Profile codec chip for mobile terminals (QCIF, 30 frames/s at 27 MHz):

1. **Motion estimation skip.** Before any search, the motion vector of the
   current macroblock is predicted as the median of its neighbours' vectors, and
   the SAD (sum of absolute differences) of that one prediction is computed. If
   it is already smaller than the *largest* SAD found for the neighbours, the
   prediction is accepted and the full search is not run at all.
2. **Frame-level clock gating.** The codec never encodes and decodes at the
   same time. A controller runs image download, encoding and decoding as
   exclusive phases and only clocks the engines of the active phase.

The motion estimation is the coarse stage of a hierarchical search. It works on
2:1 down-sampled pictures with a tiny local memory (64 + 576 bytes) and eight SAD
processing elements. A separate fine engine, not included here, refines the
coarse vector.

## What is built and what is not

The full chip combines an ARM7TDMI-class RISC with about fifteen dedicated
engines: video input, coarse and fine motion estimation, DCT/Q/IQ/IDCT,
reconstruction, texture VLC, stream producer, host interface, input stream
control, video output, deblocking/VLD, four-MV/MV-differential, DMA/external
memory interface and local memories. This RTL builds three of these parts:

* the clock generator controller, following the chip's description;
* the coarse motion estimation unit, following the chip's description;
* the texture engine: 8x8 DCT/IDCT, quantiser and inverse quantiser, and intra
  AC/DC prediction. The bit-serial transform follows the chip's description.
  The description only names quantisation and AC/DC prediction, so these
  follow the MPEG-4 standard.

The top level brings out the gated clocks and phase handshakes for the missing
engines. It also brings out the pixel-load ports and register bus that the
DMA and the processor would drive.

```
codec_top
├── clkgen_ctrl          phase sequencer (download → encode → decode → encode …)
├── clk_gate ×4          latch-based clock gates: gclk_dl, gclk_enc, gclk_dec, gclk_tex
├── dct2d                8x8 DCT / IDCT (clocked by gclk_tex)
│   └── dct8_da          8-point engine: 8 bit-serial distributed-arithmetic units
├── quant                quantiser / inverse quantiser, dc_scaler (clocked by gclk_tex)
├── acdc_pred            MPEG-4 intra AC/DC prediction (clocked by gclk_tex)
└── me_unit              (clocked by gclk_enc)
    ├── downsample2 ×2   16x16 → 8x8 current block, 48x48 → 24x24 search window
    ├── cur_mem          8x8 current memory
    ├── ref_mem          24x24 window as two 24x12 banks behind a write demux
    ├── addr_gen         scan of the block per candidate group
    ├── me_skip          median predictor + 1 SAD PE
    ├── me_coarse        8 SAD PEs (sad_pe)
    ├── skip_decision    SADmcp < max(SADa, SADb, SADc)
    ├── sad_compare      mux (skip / coarse) + minimum comparator
    └── me_ctrl          FSM, register bus, neighbour store
```

`dct_pkg` holds the transform's cosine constants and widths. `me_pkg` holds the shared types: `pix_t` (8 bit), `sad_t` (14 bit), and `mv_t`
(4-bit signed x and y, range −8..+7).

## The skip decision, in detail

Neighbours are named as in MPEG-4 vector prediction: A is the macroblock to the
left, B the one above, C the one above-right of the current macroblock X.

```
 . B C
 A X
```

For each macroblock:

1. **Predict.** `MVP = median(MVa, MVb, MVc)`, taken separately for x and y.
2. **Motion-compensate the prediction.** One PE accumulates
   `|cur(r,c) − ref(r+MVP.y, c+MVP.x)|` over the 8x8 down-sampled block. This
   is SADmcp. It takes 64 cycles.
3. **Threshold.** `SADmax = max(SADa, SADb, SADc)`, where each neighbour's SAD
   is the final SAD stored when that macroblock was finished.
4. **Decide.** If `SADmcp − SADmax < 0`, the skip flag is set. The multiplexer
   then routes SADmcp and MVP to the comparator, and the macroblock is done.
   Otherwise the skip flag is clear, and the 8-PE coarse search runs over all
   256 displacements. The comparator keeps the smallest SAD.

The threshold is the maximum, not the median, of the neighbour SADs. A
prediction is accepted when it matches at least as well as the *worst* of its
neighbours' final matches. The comparison is strict. A macroblock at the
picture edge gets vector 0 and SAD 0 for each missing neighbour. The first
macroblock of a picture (no neighbours, SADmax = 0) is therefore always
searched. This edge rule is a choice of this implementation; the source gives
none.

Neighbour results live in a store with one entry per macroblock column
(`MB_COLS`, 11 for QCIF). Macroblocks are processed in raster order. When
macroblock (x, y) starts, entry x−1 already holds this row's left neighbour,
while entries x and x+1 still hold the top and top-right neighbours from the
row above. Entry x is overwritten when the macroblock finishes.

The source publication reports that, on its QCIF test sequences (Carphone,
Foreman, Coast, Stefan), the full search was disabled for 24.6–37.4 % of
macroblocks. It reports a computation load of 32 % of a conventional two-step
search, with a PSNR loss below 0.1 dB. These figures are not reproduced here,
because the sequences are not part of this RTL. The testbenches use a synthetic
moving texture with noise.

## Coarse search

* **Down sampling.** Each down-sampled pixel is `(a+b+c+d+2)>>2` of a 2x2
  full-resolution square. Pixels arrive as 32-bit words of four horizontally
  adjacent pixels, leftmost in bits 7:0, row by row. Even rows are parked as
  pair sums in a half-line buffer. On odd rows, every input word produces two
  output pixels one cycle later.
* **Memories.** The current memory is 8x8 bytes (one 16x16 macroblock). The
  reference memory is 24x24 bytes, covering a 48x48 full-resolution area that
  starts 16 pixels above and left of the macroblock. It is split into two 24x12
  banks: even window rows in bank 0, odd rows in bank 1. The read port returns
  eight consecutive pixels of one row.
* **Scan.** Displacements run over −8..+7 in both directions, which is −16..+14
  full-resolution pixels. For each `dy` (outer) and each `dx0 ∈ {−8, 0}`
  (inner), the 64 block pixels are read row by row. The current pixel goes to
  all eight PEs, and PE k gets the reference pixel at `dx0 + k`. One group gives
  eight SADs in 64 cycles. 32 groups take 2048 cycles.
* **Comparator.** It takes a whole group in one cycle. Among equal SADs it keeps
  the first in raster order (smaller dy, then smaller dx).
* **Vectors** are in down-sampled pixels; double them for full resolution.

## Timing

| event | cycles (encoder clock) |
|---|---|
| load one macroblock (current 64 words in parallel with reference 576 words) | 576 |
| start write → `done`, skipped macroblock | 69 |
| start write → `done`, searched macroblock | 2118 |
| worst-case QCIF frame (99 MBs, all searched, loads not overlapped) | < 273,240 |
| budget per frame at 27 MHz, 30 frames/s (encode + decode) | 900,000 |

In the end-to-end test, a QCIF frame of motion estimation takes 134,019 cycles
with loads included, and 65 of the 99 macroblocks are skipped.

## Register interface of the motion estimation unit

Each access takes one cycle: `bus_sel` with `bus_we` writes, and `bus_rdata` is
combinational on `bus_addr`.

| addr | name | access | bits |
|---|---|---|---|
| 0 | CTRL | W | bit0 start a macroblock (only when idle), bit1 new frame (clears counters) |
| 1 | MBPOS | RW | [7:0] macroblock column, [15:8] macroblock row |
| 2 | STATUS | R | bit0 busy, bit1 done, bit2 skip flag of the last macroblock |
| 3 | RESULT | R | [3:0] mv x, [11:8] mv y (two's complement), [29:16] SAD |
| 4 | COUNT | R | [15:0] skipped macroblocks, [31:16] searched macroblocks |

To process a macroblock:

1. Pulse `load_restart`.
2. Stream the 16x16 current block (64 words) and the 48x48 window (576 words).
   Out-of-picture pixels must already be padded (unrestricted vectors).
3. Write MBPOS, then CTRL = 1.
4. Wait for `done`, or poll STATUS.

An assertion flags a start written while busy. The results also appear directly
on `min_mv`, `min_sad` and `skip_flag`.

## Frame-level clock gating

`clkgen_ctrl` leaves idle when `run` is raised. It runs the download phase once,
then for each frame an encoder phase followed by a decoder phase. With only
`enc_mode` or only `dec_mode` set, it runs just that phase each frame. Exactly
one of `en_dl`, `en_enc`, `en_dec` is high, and an assertion checks this.

Entering a phase raises its enable and pulses its `start_*` output in the same
cycle. The phase's gated clock delivers its first edge one cycle later, and the
domain sees the start pulse there. The phase ends when its `*_done` input is
seen. A `done` in the first cycle of a phase is ignored: a domain whose clock
was stopped still holds its last done pulse until its clock ticks once. When
`run` is low at the end of a frame, all clocks stop. `frame_cnt` counts
completed frames.

`clk_gate` is the usual latch-and-AND gate. The latch is transparent while the
clock is low, so enables that change while the clock is high cause no glitch.
`test_en` forces the clock on. The latch is intentional. A synthesis flow should
map this module to the library's integrated clock-gating cell.

The source estimates about 20 % power saving from this scheme. Power is not
modelled here.

## 8x8 DCT / IDCT with bit-serial distributed arithmetic

`dct2d` computes the orthonormal 2-D DCT, or its inverse, of one 8x8 block. It
uses the row-column method on a single shared 8-point engine.

A block is written as 64 samples, 12-bit signed, in raster order. `inv` is taken
with the first sample. The block store holds 16-bit values. The eight rows are
transformed in place, rounded to two fractional bits. Then the eight columns are
transformed and rounded to integers. The 64 results leave in raster order,
saturated to 12 bits.

The 8-point engine `dct8_da` computes no products. It first splits the transform
into an even and an odd half:

* **Forward:** `a_i = x_i + x_{7-i}` feeds the even outputs and
  `b_i = x_i − x_{7-i}` the odd ones.
* **Inverse:** the even and odd coefficients give `E_n` and `O_n`. The outputs
  are `x_n = E_n + O_n` and `x_{7-n} = E_n − O_n`.

Each of the eight results is then a dot product of four inputs with four fixed
coefficients. One distributed-arithmetic unit computes each of them.

Every cycle, each unit takes one bit of each of its four inputs, most
significant bit first. These four bits index a 16-entry table that holds every
sum of a subset of the four coefficients. The unit updates
`acc = 2·acc + table[bits]`, and the first slice, which carries the sign,
subtracts. After 17 slices the dot products are exact in units of 2^-13.

The coefficients are `round(4096·cos(jπ/16))`; `C[0][n]` uses `j = 4`. A 1-D
transform takes 19 cycles. A block takes 432 cycles: 64 in, 16 × 19 transforms,
64 out. Against a floating-point transform, every output is within ±1.

The transform runs on its own gated clock, `gclk_tex`. It is on in encoder and
decoder phases, because encoding needs both the DCT and the IDCT, and decoding
needs the IDCT. It is off during download.

## Quantiser and inverse quantiser

`quant` processes one coefficient per cycle and has one register stage, so it
can follow the DCT output stream. It uses the H.263-style quantisation method
of MPEG-4. The method with weighting matrices is not built.

| | quantise (`inv = 0`) | inverse (`inv = 1`) |
|---|---|---|
| intra DC | `(F + dc_scaler/2) / dc_scaler` | `QF · dc_scaler` |
| intra AC | `\|F\| / (2QP)`, with the sign of F | `QP(2\|QF\|+1)`, minus 1 if QP is even; 0 stays 0 |
| inter | `(\|F\| − QP/2) / (2QP)`, not below 0 | same as intra AC |

Levels are clipped to ±2047. Reconstructed coefficients saturate to
−2048..2047. The caller marks the intra DC sample with `is_dc`.

`dc_scaler` comes from QP, as in the standard:

| QP | 1–4 | 5–8 | 9–24 | 25–31 |
|---|---|---|---|---|
| luminance | 8 | 2QP | QP + 8 | 2QP − 16 |
| chrominance | 8 | (QP + 13)/2 | (QP + 13)/2 | QP − 6 |

The inverse rule is the standard's decoder rule. The forward divisions are
the usual encoder choice. In `codec_top`, the quantiser's `dc_scaler` also
feeds the AC/DC prediction.

## Intra AC/DC prediction

`acdc_pred` implements the intra prediction of MPEG-4 Simple Profile. It works
on one block of quantised coefficients at a time. The neighbours are A
(left), B (above-left) and C (above). The caller supplies 1024 as the DC and 0
as the AC values of any neighbour that is missing or not intra coded.

1. **Direction.** From the dequantised DC values: if `|F_A − F_B| < |F_B − F_C|`,
   the prediction comes from C (vertical). Otherwise it comes from A
   (horizontal).
2. **DC.** The predictor is `F_pred // dc_scaler`. Here `//` divides and rounds
   to the nearest integer, with halves rounded away from zero.
3. **AC**, only when `ac_pred` is set. For vertical prediction, the first row
   `QF[0][1..7]` is predicted from C's first row, scaled by `QP_C // QP_X`. For
   horizontal prediction, the first column is predicted from A's first column,
   scaled by `QP_A // QP_X`. The exact term is `QF_nb[i]·QP_nb // QP_X`.
4. **Apply.** The encoder (`inv = 0`) subtracts the predictors and the decoder
   (`inv = 1`) adds them. The result is registered one cycle after `start`.

The rule is the standard's. The chip description only names the function. The
inputs are parallel ports. Storing the neighbours' coefficients, choosing
`ac_pred` and choosing the scan order are left to the texture buffer and VLC
logic, which are not part of this RTL.

## Departures and choices to be aware of

* Only the coarse stage of motion estimation is built. The ±15.5 pixel
  half-pel range of the original comes from the fine engine, which is absent.
* Bit widths, load word format, register map, handshakes, reset (asynchronous,
  active low), rounding of the down sampler, bank split, tie-breaking and the
  picture-edge rule are all choices of this implementation.
* The search window is reloaded for every macroblock. Overlapping windows are
  not reused.
* The neighbour store is sized for QCIF (`MB_COLS = 11`). CIF, the largest
  Simple@L2 picture, needs `MB_COLS = 22`.
* The texture engine has no zig-zag scan and no texture buffer. Its
  coefficient streams are ports. VLC/VLD, the RISC, the DMA and the other
  engines are not included.
* The chip description only names quantisation and AC/DC prediction. Their
  rules here are those of the MPEG-4 standard.
* At 432 cycles per block, one QCIF frame of 594 blocks (99 macroblocks × 6)
  takes 256,608 cycles per transform direction. Encoding needs a DCT and an
  IDCT of every block, which is 513,216 cycles. Motion estimation runs
  alongside on its own engine and needs at most 273,240 cycles. Decoding needs
  one IDCT pass, 256,608 cycles. That totals about 770,000 of the 900,000
  cycles in a frame. The transform engine itself does not overlap input,
  computation and output. A block occupies it for the whole 432 cycles.

## Simulating

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Build any of them with
Verilator 5, for example the end-to-end test at full QCIF size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/me_pkg.sv rtl/dct_pkg.sv tb/me_ref_pkg.sv tb/tb_codec_top.sv --top-module tb_codec_top
./obj_dir/Vtb_codec_top
```

* `tb_codec_top` runs download, then two QCIF frames of encode and decode
  phases: 198 macroblocks, about 0.4 s of simulation.
  * It checks every vector, SAD, skip flag and cycle count against
    `me_ref_pkg`.
  * It checks that the encoder clock is silent outside encoder phases, and
    the other clocks inside them.
  * It sends blocks through the DCT and IDCT in both phase types. In encoder
    phases they run while motion estimation is busy.
  * It quantises and inverse-quantises a few intra coefficients in each
    encoder phase.
  * It runs one AC/DC prediction per phase. The encoder direction runs in
    encoder phases, and the decoder direction restores the block in decoder
    phases.
  * It counts skipped and searched macroblocks, edge macroblocks, gated
    cycles, phase changes, transform blocks and cycles with both engines busy.
    It fails if any of these never occurs.
* `me_ref_pkg` is an independent behavioural model of the unit. It generates
  the synthetic video, down-samples directly from pixels, applies the median,
  maximum and skip rule, and runs an exhaustive search.
* `tb_me_unit` covers two macroblock rows at the unit level, including the
  registers. Each leaf module has its own `tb_<module>`.
* `tb_dct2d` sends random residual blocks (−255..255) through the forward
  transform, and sparse random coefficient blocks through the inverse, plus
  flat and extreme blocks. It compares every output with a floating-point
  transform, allowing ±1. It also checks the 432-cycle block period and the
  305-cycle latency from last input to first output.
* `tb_quant` sends random coefficients at every QP, intra and inter, luminance
  and chrominance, through both directions. It checks every result and
  `dc_scaler` against its own model. It also checks that each reconstruction
  lies within one quantiser step of the input.
* `tb_acdc_pred` runs 400 random blocks, with tied gradients, missing
  neighbours and `ac_pred` off among them. It checks the direction and every
  result against a model in real arithmetic. It then passes every encoder
  result back through the decoder direction and checks that the original
  coefficients return.

To change the picture width, set `MB_COLS` on `codec_top` or `me_unit`. The
search range, block size and PE count are fixed by the package constants and
the address arithmetic.
