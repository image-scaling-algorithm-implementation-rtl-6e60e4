# Adaptive edge-enhanced bilinear image scaler

This RTL enlarges a grey-scale image. By default it turns 64×64 pixels into 96×96 (factor 1.5). It uses bilinear interpolation, which on its own blurs edges. To counter that, each 2×2 interpolation cell is first checked by a cheap edge detector. Where the cell sits on or next to an edge, the interpolator gets the cell's pixels after a sharpening filter; elsewhere it gets the raw pixels. The scaler stores a single image line and works on a window of eight 8-bit registers, so it can process a pixel stream without a frame buffer of its own.

It is based on the architecture in *Image Scaling Algorithm Implementation of FPGA Using VHDL Programming*: a line buffer, a register bank, a sharpening filter, an edge detector driven by an "asymmetric parameter" A, a multiplexer, a bilinear interpolator and a controller. That paper gives the block structure, the one-line memory, the 8-bit registers, the formula for A and the 64×64 → 96×96 test configuration. It does not give the sharpening mask, the gradient operator, the selection rule, the interpolation arithmetic or anything inside the controller. Those parts are this design's own choices; they are listed in "Design choices" below.

## Data flow

```
                 req_row (which source row to send next)
 source  <-------------------------------------------------+
   |                                                       |
   | in_pix (lower row)                                     |
   +------------------+                                     |
   |                  v                                     |
   |  line_buffer --> reg_bank (2 x 4) --+--> sharp_filter --+--> pixel_mux --> bilinear_interp --> out reg --> out_pix
   |  (upper row)     t0 t1 t2 t3        |                      ^    ^
   +--> (write-back)  b0 b1 b2 b3        +--> raw cell ----------+    |
                                          +--> edge_detector ---------+ sel_sharp
                         scaler_controller: DDA, row/column sequencing, handshakes
```

| module | role |
|---|---|
| `scaler_pkg` | pixel/weight types, the `win_t` 2×4 window, the `quad_t` 2×2 cell, the register-bank operation enum, the fixed-point step function |
| `line_buffer` | one line (`DEPTH` pixels): asynchronous read, synchronous write, read-before-write |
| `reg_bank` | eight 8-bit registers as two rows of four; hold / fill / shift / pad |
| `sharp_filter` | sharpened version of the four cell pixels |
| `edge_detector` | gradients, edge strength, asymmetric parameter A, `sel_sharp` |
| `pixel_mux` | raw or sharpened cell |
| `bilinear_interp` | interpolated pixel from the cell and weights `wx`, `wy` |
| `scaler_controller` | walks the output image, sequences input, line buffer, bank and output |
| `image_scaler` | top level: wires the above, output register |

## Row sequencing with one line buffer

This part is the least obvious, because the design keeps only one line of memory.

Output pixel (ox, oy) is interpolated at source position sx = ox·IN_W/OUT_W, sy = oy·IN_H/OUT_H. The 2×2 cell is made of source rows iy = ⌊sy⌋ and iy+1, and columns ix = ⌊sx⌋ and ix+1. The output is produced row by row, one **pass** per output row:

* the line buffer supplies the **upper** row iy;
* the input stream delivers the **lower** row iy+1 (clamped to the last row), from left to right;
* every accepted input pixel shifts the register bank by one column. The new upper pixel comes from the line buffer at the same column, and the new lower pixel from the stream;
* once the bank holds columns ix−1 … ix+2 of the cell the next output pixel needs, the controller stops the input. It then emits every output pixel whose ⌊sx⌋ equals that ix, one per clock: for factor 1.5 that is one or two pixels.

At the end of a pass, the next output row needs one of three things:

1. **The next pair of rows** (upper row iy+1). The lower row that just streamed in is what the line buffer needs next, so during the pass each input pixel was also written into the line buffer at its column. The read returns the old pixel before the write lands.
2. **The same pair again.** With enlargement, two output rows often fall between the same two source rows; for factor 1.5, rows (0,1) serve output rows 0 and 1. In that case the line buffer is *not* written, keeps row iy, and the controller asks for row iy+1 a second time.
3. **A pair further down.** This only happens when reducing. A **priming pass** first loads the new upper row into the line buffer and produces no output. Every frame also starts with a priming pass of row 0.

Whether the current pass writes the line buffer is decided before the pass starts, from the position of the next output row.

Because a row can be requested twice, the pixel source must be able to deliver any row on request. `req_row` names the row that the next input pixel belongs to. It is stable from the first to the last pixel of a row, and the source sends the pixels of that row in column order. In a system, the source is the memory the image is read from. For the default size the request sequence per frame is 0 (prime), 1, 1, 2, 3, 3, 4, 5, 5, … 63, 63.

**Borders.** The first pixel of a row is loaded into all four bank columns (`BANK_FILL`), which makes column −1 equal to column 0. Past the last input pixel, the bank is shifted without input and repeats its last column (`BANK_PAD`). This gives columns IN_W and IN_W+1 for the cells at the right border. Rows below the image are clamped to the last row. All border pixels are therefore replicated.

**Position arithmetic.** sx and sy are fixed-point numbers with 16 fraction bits. They advance by the constant step ⌈IN·2¹⁶/OUT⌉ per output pixel, so no divider is needed. The step is rounded up, so an exact integer position (for example ox = 3 → sx = 2) never falls just below its integer. The interpolation weights are the top 8 bits of the fraction: 0, 170 and 85 out of 256 for factor 1.5.

## Edge-adaptive selection

The edge detector looks at the 2×4 window (t = upper row, b = lower row, columns 0…3; the cell is columns 1 and 2):

* grad_h = |t2 − t1| + |b2 − b1|,  grad_v = |b1 − t1| + |b2 − t2|,  edge = grad_h + grad_v
* A = |t2 − t0| − |t3 − t1|, which is the asymmetric parameter |P(m+1) − P(m−1)| − |P(m+2) − P(m)| over the four upper-row pixels around the cell.

A is zero across a ramp and across a step centred in the cell. It is large when a step sits next to the cell on one side. The sharpened cell is used when `edge >= EDGE_TH` **or** `|A| >= ASYM_TH` (defaults 64 and 32). So a strong edge inside the cell and an edge just beside it both switch to the sharpened pixels.

The sharpening filter replaces each cell pixel c, with left and right neighbours l and r, by

  s = clip(((2^S + 2)·c − l − r + 2^(S−1)) >> S, 0, 255), with S = `SHARP_SHIFT` = 2, i.e. the mask [−1, 6, −1]/4.

The weights sum to one, so flat areas pass unchanged. The mask is horizontal because the register bank holds only two rows.

## Bilinear interpolation

Instead of four weighted products, the interpolator computes two nested linear steps:

```
top = p00·256 + wx·(p01 − p00)
bot = p10·256 + wx·(p11 − p10)
out = (top·256 + wy·(bot − top) + 2^15) >> 16
```

The result is exactly the four-product weighted sum, rounded to the nearest integer, and it needs three multipliers of 8-bit weights.

## Interface and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_pix[7:0]` | in/out/in | input pixel stream (valid/ready) |
| `req_row[$clog2(IN_H)-1:0]` | out | source row that the input pixels must come from |
| `out_valid`, `out_ready`, `out_pix[7:0]` | out/in/out | output pixels in raster order (valid/ready) |
| `out_eol`, `out_eof` | out | with an output pixel: last of its row / last of the image |

Parameters of `image_scaler`: `IN_W`, `IN_H`, `OUT_W`, `OUT_H` (64, 64, 96, 96), `EDGE_TH` (64), `ASYM_TH` (32), `SHARP_SHIFT` (2, must be ≥ 1). The pixel width (8) and the weight width (8) are in `scaler_pkg`.

Each clock either accepts one input pixel, pads the bank, or emits one output pixel. Each output row costs one more clock. Frames follow each other without a gap. With a source and sink that never stall, a 64×64 → 96×96 frame takes 64 + 96·(64 + 2 + 96 + 1) = 15 712 clocks. The output is registered. The path from the register bank through the filter, mux and interpolator to the output register is one combinational stage and is not pipelined.

Synthesised for the default size, the design is about 240 word-level cells, 158 flip-flops and a 512-bit line buffer.

## Design choices and differences from the paper

* **Taken from the paper:** the block set and how the blocks connect; one line buffer; eight 8-bit registers; 8-bit grey pixels; the formula for A; the sharpening filter as a pre-filter whose output, or the raw pixels, reach the interpolator through a multiplexer; bilinear interpolation simplified by algebraic rearrangement; the 64×64 → 96×96 configuration.
* **Chosen here:** the 2×4 arrangement of the bank; the 1×3 sharpening mask; gradients as sums of absolute differences; A taken from the upper row; the OR selection rule and both thresholds; the nested-lerp arithmetic, 8-bit weights and rounding; the DDA; the pass sequencing with re-requested rows and priming passes; border replication; valid/ready handshakes; the reset style; the output register.
* **Not reproduced:** the paper reports a 6.67 K-gate, 280 MHz implementation in a 0.13 µm process. No clock target is claimed here, and the datapath is not pipelined to reach one. The paper's test images, and the PSNR/MSE results for them, are produced and evaluated in host software, which is not part of this RTL. The paper also mentions hardware sharing in its simplified interpolator without describing it; here each output pixel simply uses the three multipliers above. Reduction (OUT < IN) works and is tested, but bilinear reduction without a low-pass pre-filter aliases.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `image_scaler_tb`: the whole scaler at its default size, with no parameter overrides. It runs two frames. The first runs without stalls and must take exactly 15 712 clocks. The second has random input stalls and output back-pressure. A reference model (`tb/scaler_env.sv`) recomputes every output pixel from the test image: position, replicated window, gradients, A, selection, sharpening and the four-product bilinear sum. Every pixel, `out_eol`/`out_eof` and the order of requested rows are compared with it. The test also requires each mechanism to occur: sharpened cells, raw cells, repeated rows, right-border padding, input held off by the scaler, source stalls and output back-pressure. The test images are synthetic: ramps, hard-edged checkerboards, noise, a diagonal edge and thin lines.
* `image_scaler_ratio_tb`: the same checks at 10×7 → 20×14, 16×12 → 20×17 and 24×20 → 11×7. The last one exercises priming passes that skip rows.
* `scaler_controller_tb`: the controller alone at four ratios. The model tracks which source (row, column) each bank register and line-buffer word holds, and checks the window at every emitted pixel, the weights, the flags and the clock count.
* `image_scaler_psnr_tb`: image quality in the 64×64 → 96×96 configuration, as MSE and PSNR = 10·log10(255²/MSE). Six synthetic images are sampled from continuous functions, so the ideal 96×96 enlargement is known exactly. The edge-adaptive scaler at its defaults runs beside a copy whose thresholds are out of reach, which is plain bilinear interpolation. The test passes if every frame is complete and both stay above 24 dB. Measured PSNR (adaptive / plain bilinear), in dB: smooth shading 55.1 / 55.1, ramp 57.5 / 57.5, fine texture 48.2 / 48.5, hard-edged disk 28.6 / 29.6, chirp 50.3 / 50.5, vertical ramp 58.4 / 58.4. Against an exact reference, the sharpening with the default mask and thresholds does not raise PSNR: it makes edges steeper, but also overshoots them. These numbers are not comparable with PSNR measured on natural photographs.
* One testbench per datapath block (`line_buffer_tb`, `reg_bank_tb`, `sharp_filter_tb`, `edge_detector_tb`, `pixel_mux_tb`, `bilinear_interp_tb`), each checked against formulas evaluated in integers.

All of them pass. The top level and the controller also carry assertions: an output waits unchanged under back-pressure, and no pixel is emitted without a ready cell.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/scaler_pkg.sv tb/image_scaler_tb.sv --top-module image_scaler_tb -o sim
./obj_dir/sim
```

Replace `image_scaler_tb` with any other testbench name to run that test. To change the image size or ratio, set the parameters of `image_scaler`. To drive it from real images, convert each image to 8-bit pixel values, serve `req_row` from that memory, and collect `out_pix` in raster order.
