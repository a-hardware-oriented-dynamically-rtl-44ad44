# AWDE: adaptive-window stereo disparity estimation in hardware

This is synthesizable SystemVerilog for a stereo-matching engine. It takes a rectified left/right image pair and computes, for every left-image pixel, the horizontal shift (disparity) to the matching right-image pixel. Real-time operation is the goal: 1024x768 at a 120-pixel disparity range and 60 frames per second on a 190 MHz FPGA clock.

The algorithm is Adaptive Window Disparity Estimation (AWDE). Its main idea is that the matching window adapts to the local texture, while the hardware cost stays constant:

* Every window has exactly 49 samples, taken on a 7x7 grid with stride 1, 2 or 4. The window therefore covers 7x7, 13x13 or 25x25 pixels.
* A textured region gets the small window. A flat region gets the large one, which collects enough detail to match.
* Two costs are combined:
  * the Hamming distance between 48-bit Census vectors, which is cheap and robust;
  * a binary-window SAD (BW-SAD), which only adds pixels whose intensity is close to the centre pixel and so respects object edges.
* A refinement pass then replaces each disparity by the most frequent value among 17 neighbours that lie in the same object.

The rest of this file explains how the hardware does this, how far it has been verified, and where it departs from the algorithm as originally published.

## The algorithm, as built

The design works on blocks of 7x7 left-image pixels. All 49 pixels of a block are searched in parallel.

1. **Window size.** The centre pixel of the block has two mean absolute deviations (MADs): one over a 7x7 window with stride 1, one over a 13x13 window with stride 2.
   * If MAD7 > tr7 (5), the block uses 7x7.
   * Otherwise, if MAD13 > tr13 (2), it uses 13x13.
   * Otherwise it uses 25x25.

   The comparison is done on the sum of 48 absolute differences against 48·tr, so no divider is needed.
2. **Metrics.** Each window yields two 48-bit vectors:
   * a Census vector, with a bit set where the neighbour is smaller than the centre;
   * a Shape vector, with a bit set where |neighbour − centre| ≤ threshold_w (8).

   Bit b is sample b for b < 24 and sample b+1 above that, so the centre (sample 24) is skipped. Samples are numbered n = 7·row + column.
3. **Costs.**
   * The Hamming distance is computed for all 49 pixels.
   * BW-SAD is computed only for the 9 pixels at block rows and columns 1, 3 and 5, counted from 0. It sums |left − right| over the 49 samples, masked by the left Shape.
   * The other 40 pixels get a BW-SAD interpolated linearly from the nearest computed ones. The edge rows and columns 0 and 6 copy their neighbour.
4. **Hybrid cost.** HC = BW-SAD + Hamming · ap. The penalty ap depends on the window size: 32, 16 or 4. It is a power of two, so the multiply is a shift. The disparity with the smallest HC wins. On a tie, the first (largest) disparity searched is kept.
5. **Refinement.** Each pixel gets 17 contributors:
   * itself and its four adjacent pixels, which always count;
   * three pixels at each of the four window corners, 3·stride rows and columns away. Each corner group counts only if the pixel's Shape bit for that corner sample is 1. These are bits 0, 6, 41 and 47, the "activation bits".

   Rows outside the seven rows of the band are clipped to the band. The most frequent active value replaces the pixel's disparity. On a tie, the pixel's own disparity wins, then the lower contributor index.

The default thresholds and penalties are tr7 = 5, tr13 = 2, ap = 32/16/4 and threshold_w = 8. They are parameters of `awde_top`.

## Datapath and timing

```
 line buffers           data allocation                 metrics    selection     refinement
 31 left rows  --+                                   +-> Census  -> align   ->  DR-array
 31 right rows --+-> image -> colour -> vertical  -> DFF array -> weaver -> Shape      interpolate    7x35
 (awde_line_bram) sel        sel       rotator       31x25        7 process   Hamming    add penalty    7 DR-PEs
                                                                  rows        BW-SAD     49 minima      at col 14
                                                                  + (15,8)    deviation  hold reg.
                                       control unit: addresses, image select, rotation, tags, flow control
```

### Line buffers and rotation

The module keeps 31 rows of each image in 62 one-row memories (`awde_line_bram`, 1024 x 24 bit).

* Image row y lives in buffer y mod 31. Each buffer word is {Y, Cb, Cr}, and `cfg_color` picks the byte used.
* A band is seven output rows y0..y0+6. It needs rows y0−12..y0+18.
* The vertical rotator turns the buffer order into image order, using the rotation (y0−12) mod 31.
* Column addresses are clamped to 0..IMG_W−1. The image border therefore repeats the edge column.

### DFF array and weaver

One pixel column is read per cycle and enters column 0 of the 31x25 register array. Every cycle the array shifts one column to the right. The weaver is fixed wiring plus a 3-way multiplexer per sample, selected by the block's window size.

* **Process rows.** The weaver takes seven windows ("process rows") centred at array row 12+r, column 12. Sample (i, j) sits at array row 12+r+(i−3)s and column 12−(j−3)s, with stride s = 1, 2 or 4. A 25x25 window of the bottom process row reaches row 30.
* **Refinement masks.** The contributor positions follow one rule for all three window sizes: corners 3·stride away, with rows clipped to the band. For 7x7 and 13x13 this matches the published example masks. The published 25x25 example is not fully legible, so the 25x25 masks may differ from the original in their corner rows.
* **Deviation windows.** Two more windows, 7x7 and 13x13, are centred at array location (15, 8). The block's centre column passes array column 8 four cycles before it reaches the process-row tap at column 12. So the window-size decision is taken at (15, 8) one cycle before the block's first column reaches the tap.

### Per-block schedule

The control unit runs each block of the band, at columns x0..x0+6, through two phases. The cycle counts are for a disparity range `dmax`.

| phase | columns read | cycles | what happens at the weaver tap |
|---|---|---|---|
| left | left image x0−12 .. x0+18 | 31 | deviation capture (k = 15), then the 7 block columns (k = 12..18): Census, Shape and the 9 BW-SAD windows are stored |
| right | right image x0−dmax−12 .. x0+18 | dmax+31 | candidate columns pass the tap (k = 12 .. dmax+18); each is compared with all 7 block columns |

* **Block period.** A block takes dmax+62 cycles: 182 at dmax = 120.
* **Latencies.** A column read at cycle t is at the process-row tap at t+14 and at the deviation tap at t+10. These latencies are carried by tag delay lines in the control unit.
* **Alignment in the selection unit.** When block column 0 sees disparity d, column c sees d+c. The selection unit delays column c's costs by 6−c cycles. After that, all 49 pixels see the same d = dmax+6−j, where j is the index of the search column.

### Refinement timing and flow control

The selection unit (`awde_ads`) copies its 49 results, with the Shapes and window size, into a hold register. This lets the next block start straight away.

The refinement unit (`awde_dr`) is slower:

* Its array is 7 rows by 35 columns, i.e. five blocks. Blocks enter at columns 28..34 and shift left.
* Seven processing elements (PEs) refine column 14. A PE runs a 17-cycle compare-and-accumulate: a rotating copy of the 17 values is compared with the fixed copy and counts matches. It then runs a 17-cycle compare-and-select over the counts.
* The array shifts when a column's accumulation ends. One column therefore takes 18 cycles and a block 127 cycles. A result appears 35 cycles after its start.

So the search runs at dmax+62 cycles per block for ranges of 65 and up, and at 127 cycles per block below that. The control unit starts a block only while fewer than two are in the selection and refinement units; otherwise it raises `stall`. At the end of a band it pushes two blank blocks through the refinement array so the last real block reaches column 14. It then pulses `band_done`.

## Interface of `awde_top`

| port | dir | meaning |
|---|---|---|
| `wr_en, wr_img, wr_row[4:0], wr_addr, wr_data[23:0]` | in | write one pixel {Y,Cb,Cr} into line buffer `wr_row` (image row mod 31) of the left (0) or right (1) image |
| `cfg_dmax[6:0]` | in | disparity range; disparities 0..dmax are searched (up to 120 for the 190 MHz timing) |
| `cfg_color[1:0]` | in | component used: 0 Y, 1 Cb, 2 Cr |
| `band_start, band_y0[10:0]` | in | process rows band_y0..band_y0+6 |
| `band_done, busy` | out | end-of-band pulse, band in progress |
| `out_valid, out_x, out_y0, out_disp[7]` | out | one refined image column: 7 disparities of rows out_y0.. |
| `stall` | out | search waiting for the refinement |
| `block_ws, refine_changed[7]` | out | window size of the latest block; refinement changed that output value |

Using the band protocol:

1. Before `band_start`, write rows y0−12..y0+18 of both images. Rows outside the image are the caller's choice; repeating the edge row works well.
2. Do not overwrite those rows until `band_done`. For the next band, only the seven new rows y0+19..y0+25 need writing.
3. Outputs come in image-column order, 0..IMG_W−1, once per band.

`IMG_W` (default 1024) sets the line length and must be at least the image width. For a narrower image, set `IMG_W` to the image width; otherwise the right-hand border is not clamped where the image ends.

## Where this design departs from the published architecture

* **Cycles per block.** The published figure is 195 cycles per block at a 120-pixel range. This design takes 182 cycles, because its left and right phases are not separated by idle cycles. The published cycle breakdown is not known.
* **Refinement at short ranges.** The published rates at range 60 imply fewer cycles per block than the 127 of this refinement unit. At range 60, CIF therefore comes out about 3% short of the quoted rate (see below). The PE structure follows the published one; the schedule around it is this design's.
* **Deviation windows.** The two deviation windows have their own weaver outputs at array location (15, 8). In the published architecture the deviation is taken through the weaver at that location at the start of the search.
* **Choices of this design:**
  * the Census direction (neighbour < centre);
  * the bit order of the Census and Shape vectors;
  * the tie rules in the selection and the refinement;
  * the BW-SAD edge interpolation;
  * clipping the refinement rows to the band;
  * the hold register;
  * the blank-block flush;
  * the pixel word layout;
  * the band protocol.
* **Not included:**
  * the external system: camera interface, DDR memory and its controller, DMA, bus and processor;
  * the PC link.

  The line-buffer write port is where a DMA engine would connect.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each compares the module with an independent model written in the testbench and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_awde_census`, `_shape`, `_hamming`, `_bwsad`, `_deviation` | random windows against reference functions; deviation thresholds at their boundaries |
| `tb_awde_vrotator`, `_dff_array`, `_weaver`, `_data_alloc` | every rotation; shifting; every sample position for all three strides |
| `tb_awde_line_bram` | random writes and reads |
| `tb_awde_rcm` | stored Census/Shape and every Hamming and BW-SAD against a model of the windows |
| `tb_awde_ads` | alignment, interpolation, penalties and minimum search against a cost model (range 20) |
| `tb_awde_dr_pe`, `tb_awde_dr` | most-frequent selection with activation bits, ties, the 35-cycle latency; full contributor masks for all window sizes |
| `tb_awde_control` | read addresses, image select, rotation and tags for a small band |
| `tb_awde_top` | a 98-pixel-wide image at ranges 10 and 100: correct disparities, block period dmax+62, stalls, all three window sizes, blank flush and refinement changes |
| `tb_awde_top_full` | one full 1024x768 frame at range 120 with the default parameters |
| `tb_awde_workloads` | full 640x480 and 352x288 frames at range 60 |

The frame tests use a synthetic pair. The left image is noise at three amplitudes, so all three window sizes are chosen. The right image is the same noise shifted by a known disparity. Every refined disparity whose windows lie inside the image must equal that shift.

Measured cycle counts, counting only the search and not the row writes, converted at 190 MHz:

| frame | range | search cycles | rate | published rate |
|---|---|---|---|---|
| 1024x768 | 120 | 2,989,580 | 63.6 fps | 60 fps |
| 640x480 | 60 | 833,727 | 227.9 fps | 224 fps |
| 352x288 | 60 | 288,792 | 657.9 fps | 680 fps |

No image-quality benchmark was run, so error rates on standard stereo datasets are not reproduced. The wider test images of 1282 to 1390 pixels need an `IMG_W` of 2048.

## Simulating

Every testbench builds the same way with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/awde_pkg.sv tb/tb_awde_top.sv \
          --top-module tb_awde_top -Mdir obj_top -j 8
./obj_top/Vtb_awde_top
```

* Replace `tb_awde_top` with any testbench name.
* `tb_awde_top_full` runs in about a minute and `tb_awde_workloads` in under one.
* Simulation starts from random register values; all state that is read is reset.
* To change the thresholds or penalties, override the parameters of `awde_top`. The package `awde_pkg.sv` holds the defaults and all shared types and sizes.
