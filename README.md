# An 8-bit dynamic fixed-point CNN accelerator with all data on chip

This RTL classifies a 3×256×256 hand-sign image into one of 32 classes, each a letter of a fingerspelling alphabet. The network is a SqueezeNet/ZynqNet-style CNN with 26 convolution layers: conv1, eight fire modules (squeeze, expand 1×1, expand 3×3), conv10, then global average pooling and an arg-max.

Everything lives in on-chip block RAM: all 1.79 M weights, the 3,456 biases, the image and every intermediate activation volume. Nothing goes off chip during an inference. Once the weights are loaded, each new image only has to be streamed in.

Two ideas keep that possible and cheap:

* **8-bit dynamic fixed point.** Every activation, weight and bias is a signed 8-bit integer. Each layer has its own fractional lengths for its input, its weights and its output. A value is `mantissa × 2^-fl`, and `fl` may be negative, meaning the 8 bits sit above the binary point. The products and sums are exact; the result is rounded back to 8 bits once per input channel.
* **Block processing.** Feature maps are cut into 8×8 blocks. The datapath only ever sees one block, padded to 10×10, and one 3×3 kernel per core. The loop nest therefore does not depend on the map size. The layer table only changes how many times the loops go round.

## Network and number formats

`rtl/cnn_pkg.sv` holds the layer table `NET`. For each layer it gives input and output channels, map size, kernel (3×3 or 1×1), stride, and the three fractional lengths `fl_in`, `fl_w` (weights and bias share it) and `fl_out`:

| layers | kernel / stride | map in | channels in → out |
|---|---|---|---|
| conv1 | 3×3 / 2 | 256 | 3 → 64 |
| fire2…fire9 squeeze | 3×3 / 2 in fire2, 4, 6, 8; otherwise 1×1 / 1 | 128 → 16 | see `NET` |
| fire expand1x1 / expand3x3 | 1×1 and 3×3 / 1 | 64 … 8 | outputs concatenated |
| conv10 | 1×1 / 1 | 8 | 736 → 32 |
| pool10 | 8×8 average | 8 | 32 → 32 values |

The squeeze layers of fire2, 4, 6 and 8 are 3×3 with stride 2, in place of max-pooling layers. The class is the index of the largest of the 32 pooled values. There is no softmax. The division by 64 in the average is left out because it does not change which channel is largest.

## Data layout

| memory | rows × width | contents |
|---|---|---|
| `weights_cache` | 199,366 × (9 × 8 bit) | one 3×3 kernel per row, row `base + ci·CHout + co`; 1×1 weights packed nine to a row at element `ci·CHout + co`; each layer starts on a new row |
| `bias_cache` | 3,456 × 8 bit | `b_base + co` |
| `fm_cache` 0 | 24,576 × (8 × 8 bit) | image, squeeze outputs, conv10 output |
| `fm_cache` 1 | 131,072 × (8 × 8 bit) | conv1 output, fire expand outputs |

A feature-map cache row is one 8-pixel row of one block. Each pixel column is a separate bank with its own write enable. The row of pixel row `r` of block `(bx, by)` of channel `ch` is `((ch·B + by)·B + bx)·8 + r`, where `B` is the number of blocks per side. The two caches take turns being input and output (`in_sel`). The two expand layers of a fire module both read the same squeeze output. The 3×3 branch writes its channels after those of the 1×1 branch, which gives the concatenation at no cost. `layer_def_rom` works all the bases out at elaboration time from `NET`.

## The loop nest and its schedule

`main_process_unit` runs:

```
for layer, for input channel ci, for block (bx, by) in raster order:
    load the padded 10×10 block                          17 cycles
    for each group of NCORE output channels:
        fetch NCORE kernels (two weight rows per cycle)   NCORE/2 cycles
        all cores convolve, one output row per cycle      8 cycles
        ALU: for each core, for each row                  8·NCORE cycles
            read the stored 8-bit partial sum, add,
            on the last ci add bias and apply ReLU,
            round, saturate, write back
```

The ALU (`alu_row`) handles one row of 8 pixels per cycle, and the cores one after the other. This serial write-back dominates the run time. With the default 8 cores, one image takes about 21.6 M cycles, about 216 ms at 100 MHz. More cores shorten only the convolution part; the write-back takes 8 cycles per output channel whatever the core count, unless the output cache is also banked per core.

Between input channels the running sum is stored as a rounded 8-bit value in the output feature map. This keeps the caches 8 bits wide, but it rounds once per input channel. A bit-exact model has to do the same.

## Arithmetic (`alu_row`)

All terms are aligned to `F = fl_w + max(fl_in, 0)` fraction bits, using left shifts only:

* the convolution sum is shifted left by `max(-fl_in, 0)`;
* the stored partial sum by `F - fl_out`;
* the bias by `max(fl_in, 0)`.

The total is rounded to `fl_out` by adding half an LSB and shifting right arithmetically, so ties round up. On the last input channel, negative results become 0 (ReLU). The result then saturates to [-128, 127]. `sat` and `relu` flag rows where this happened.

## Padding and the block loader

The 10×10 register array holds the 8×8 block plus a one-pixel border:

* at the edge of the feature map the border is zero;
* elsewhere it is copied from the neighbouring blocks.

The block loader reads 10 padded rows, each as left neighbour pixel, centre 8 pixels and right neighbour pixel. That is 30 reads. It issues them two per cycle, one on each cache port, so start to `done` takes 17 cycles. Reads that would fall outside the map are not issued; their register is cleared instead.

## Convolution core and unit

`conv_unit` is 9 multipliers and an adder tree, fully combinational. `conv_core` has 8 of them, one per output column. It produces one output row per cycle from the 10×10 array and its 3×3 kernel register. `done` comes 9 cycles after `start`.

Kernels are expected already flipped, so the hardware computes a correlation. A 1×1 kernel is loaded as the centre tap of a zero 3×3 kernel. 1×1 layers therefore use exactly the same path.

**Stride 2** is computed at stride 1, and only the even rows and columns are kept. The resulting 4×4 block is written, with lane masks, into quadrant `(bx&1, by&1)` of output block `(bx>>1, by>>1)`.

## Interface and load stream (`cnn_accel`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | begin an inference |
| `ld_valid`, `ld_ready`, `ld_data` | in/out/in | 1/1/72 | load stream |
| `busy`, `done` | out | 1 | running; one-cycle pulse when `class_idx` is valid |
| `class_idx` | out | 5 | inferred class |

After reset, the first `start` consumes words in this order:

1. 199,366 weight rows (tap `t` in bits `8t+7:8t`, taps in row-major order of the flipped kernel);
2. 3,456 biases (bits 7:0);
3. 24,576 image rows (pixel `x` in bits `8x+7:8x`), channel by channel, the blocks of a channel in raster order, 8 rows per block.

Later starts take only the image rows. Parameters: `NCORE` (1, 2, 4 or 8), `W_ROWS`, `N_BIAS`, `FM0_ROWS`, `FM1_ROWS`. The layer table is fixed in `cnn_pkg`.

## Departures and open points

* Cache 0 is sized for the largest volume it ever holds: the 196,608-pixel image, i.e. 24,576 rows. Cache 1 holds the 1,048,576-pixel conv1 output. A design with two equal 131,072-row caches is equally valid; set `FM0_ROWS`.
* The network table gives 1,794,240 weights. Packed as above, they fill exactly the 199,366 weight rows.
* The convolution core works one output row per cycle, i.e. 8 pixels. A wider core would need a matching change in the ALU schedule.
* The trained weights and biases are not included (the per-layer fractional lengths are, in `NET`). The testbenches use random values, so classification accuracy is not shown here; only bit-exactness against an independent model is.
* The host interface (PCIe, DMA, external memory) is not part of this RTL. The load stream is where it would connect.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_cnn_accel` runs the top at full default size: 2 images, about 45 M cycles, a few minutes in Verilator. It checks the class, the complete conv10 and fire9-expand volumes against a pixel-by-pixel reference model (written without blocks or padding buffers), and that the second image reloads no weights. It also counts each mechanism: stride 2, 1×1, concatenation, zero and neighbour padding, saturation, ReLU, pooling, skipped reload.
* `tb_main_process_unit` runs the controller alone for two full inferences with stand-in datapath blocks. It checks the load counts, block and core-run counts per the loop nest, pooling, and latency within 10 % of 22.2 M cycles.
* The unit testbenches (`tb_conv_unit`, `tb_conv_core`, `tb_alu_row`, `tb_block_loader`, `tb_avg_pool_argmax`, `tb_mem_ctrl`, `tb_layer_def_rom`, `tb_fm_cache`, `tb_weights_cache`, `tb_bias_cache`) compare against models written independently in the testbench.

Run one, for example:

```
verilator --binary --timing --assert -Irtl rtl/cnn_pkg.sv rtl/conv_unit.sv tb/tb_conv_unit.sv --top-module tb_conv_unit
./obj_dir/Vtb_conv_unit
```

For the top, list `rtl/cnn_pkg.sv` first, then the other `rtl/*.sv` files and `tb/tb_cnn_accel.sv`.
