# Lookup-table CNN accelerator for power-of-two weights

This is a convolution accelerator for CNNs whose weights have been quantized
so that every weight is a signed power of two or zero. Incremental Network
Quantization (INQ) produces such weights, for example at 5 bits for AlexNet
with no loss of accuracy. With such weights a multiplication is a shift. The
accelerator goes one step further and does no per-weight arithmetic at all:

1. Each input feature that enters the array is shifted **once** by every
   quantization level (the *pre-computation*). There are only 16 levels, so
   this gives a small table of every product that feature can take part in.
2. Each compute unit then "multiplies" by **looking up** the product chosen by
   the weight's index, and negates it when the weight's sign bit is set.
3. The looked-up terms of a whole input tile are summed into an accumulator.

One pre-compute unit serves all compute units. The shifters are therefore
shared by `P_VEC` output channels, and the compute units need no multipliers.
The RTL follows the structure of the accelerator described by M. Sit,
R. Kazami and H. Amano, "FPGA-based Accelerator for Losslessly Quantized
Convolutional Neural Networks" (FPT 2017 design competition). That paper gives
the block structure and the main sizes (`C_VEC = 16`, `P_VEC = 32`). The
feature layout, the command format, the number formats and the handshakes are
this implementation's own. They are marked as such below.

## Number formats and the filter code

| item | format | origin |
|---|---|---|
| feature | signed 16-bit, Q7.8 | this design |
| filter code | `{sign, idx[3:0]}`, 5 bits | paper (1 sign bit + 4-bit index) |
| shift table entry | `{zero, dir, mag[2:0]}` | paper gives direction + magnitude; `zero` and the 3-bit width are this design's |
| product | signed 23-bit (16 + 7 bits of left-shift growth) | this design |
| accumulator | signed 32-bit | this design |

The index selects a level of an ordered quantization set. The shift table,
written before a run, turns each level into a shift. For the set
{2^1, 2^0, 2^-1, 2^-2, 2^-3} the table is {+1, 0, -1, -2, -3}, and the weight
-2^-2 is encoded as sign 1, index 3. `dir = 0` shifts left by `mag` and
`dir = 1` shifts right. Right shifts are arithmetic and drop the bits shifted
out, so they round towards minus infinity. Left shifts are exact. INQ also
produces zero weights. Here a table entry with `zero = 1` stands for the level
0, and its product is 0 whatever the feature. Reset marks every entry as zero.

The feature 2.0 under the table {+1, 0, -1, -2, -3} gives the products
{4, 2, 1, 0.5, 0.25}. The paper's illustration of this example prints
{4, 2, 0.5, 0.25, 0.125}, one right shift further for the negative entries.
The RTL does what the table entries say.

Each inner product is saturated to 16 bits when it leaves the compute array,
so that it can be stored as a feature again. This means every layer's output
keeps the Q7.8 format of its input. Scaling between layers, if a network
needs it, has to be folded into the weights' exponents.

## Data path

```
 host loads ──► buffer_controller ──(tile address)──► K_VEC*C_VEC feature_map_buffer banks
                    ▲       │                                     │ one tile / cycle
                    │       │ column mask (zero padding)──────────┤
                    │       │                                     ▼
                    │       │                              precompute_unit
                    │       │                         (shift table + shifters, shared)
                    │       │ first/last, filter address          │ TILE x 16 products
                    │       ▼                                     ▼
                    │   P_VEC x compute_unit:  lookup table ◄─────┘
                    │        filter_cache ──► TILE x inner_product_unit ──► adder + accumulator
                    │                                                             │
                    └─ write-back ◄── P_VEC x post_processor (saturate, ReLU, max-pool | bypass)
```

`TILE = K_VEC * C_VEC` (48 at the defaults). The pipeline has fixed latencies:

| cycle | event |
|---|---|
| n | controller issues a tile; all banks read the same address |
| n+1 | bank data, masked for padding, enters the pre-compute unit |
| n+2 | products and the delayed control word reach every compute unit; lookup table and filter word are registered |
| n+3 | terms are summed; the accumulator (or the result register on the last tile) is written |
| n+4 | post-processor output (when it completes a pooling window) |
| n+5 … | write-back, `P_VEC / C_VEC` cycles (2 at the defaults) |

A tile is issued every cycle. The only exception is a **write-back stall**. A
result set must be written back before the next one can arrive. So the
controller holds back the tile that would complete the next output position
while the previous result set is still waiting. With long inner products
(hundreds of tiles in real layers) this never triggers. It does trigger for
1x1 convolutions over few channels.

## Feature buffer layout (the part to read twice)

One address applied to all `K_VEC * C_VEC` banks must return a whole input tile:
`K_VEC` neighbouring kernel columns of `C_VEC` channels. To make this work,
each feature is stored `K_VEC` times, once per column bank, shifted:

* bank `(j, l)` (index `j*C_VEC + l`) holds channel `l` of every channel
  group `g` (channel `g*C_VEC + l`);
* for row `row = g*H + y` with `row_base = base + row*W`, the word at
  `row_base + x` in bank `(j, l)` holds `I[row][x + j]`;
* so feature `I[row][x]` is written to address `row_base + x - j` of bank
  `(j, l)` for every `j`. The controller does this replication both for host
  loads and for write-back.

The price is `K_VEC` times the storage of a plain layout. A copy with `x < j`
lands in the previous row's slot for a column past that row's end. Such a slot
is never used unmasked. Addresses wrap modulo the depth, so a map placed at
address 0 also touches the last `K_VEC-1` addresses of its half.

**Zero padding** is done on the read side. For a tile at input row `y` and
first column `x` (both may be negative), column `j` is kept only if
`0 <= y < H` and `0 <= x + j < W`. Otherwise its features are replaced by 0
before the pre-compute unit.

Each bank has two halves. A command reads half `in_half` and writes its
results into the other half. Chaining layers is therefore a matter of
alternating `in_half`, and intermediate maps never leave the chip.

## Running a layer

The host (the SoC's processor and DMA, not part of this RTL) does the following:

1. Writes the 16 shift table entries (`st_we`, `st_idx`, `st_entry`).
2. Loads features while `busy` is low: one feature per cycle through
   `hw_en`, `hw_half`, `hw_lane = c mod C_VEC`,
   `hw_row_base = base + ((c / C_VEC)*H + y)*W`, `hw_x = x` and `hw_data`.
3. Loads each compute unit's filters into one half of its `filter_cache`
   (`fc_wr_*`). Word `t` holds the codes of tile number `t` of one inner
   product, with position `j*C_VEC + l` holding
   `W[m][g*C_VEC + l][i][jc*K_VEC + j]`. Here `t` enumerates `(g, i, jc)` in
   that nesting order, `jc` being the column chunk. Positions past the kernel
   width or past the layer's channel count **must** hold a zero-level code.
   The spare lanes carry whatever the banks hold, and only the zero level
   cancels it. A half that is not being read can be loaded while a command
   runs.
4. Issues a command (`cmd_valid` with a `layer_cfg_t`, accepted while `busy`
   is low) and waits for the `done` pulse.
5. Reads results with `hr_en`, `hr_half`, `hr_lane` and `hr_addr`. The data
   (from bank `(0, lane)`) is on `hr_data` one cycle later.

One command computes `P_VEC` output channels (`out_cg0*C_VEC` onwards) of one
convolution:

| field | meaning |
|---|---|
| `in_half`, `filt_half` | feature half read (output goes to the other), filter cache half read |
| `in_base`, `out_base` | start addresses of input and output maps |
| `in_cg`, `in_h`, `in_w` | input channel groups of `C_VEC`, rows, columns |
| `k`, `stride`, `pad` | square kernel size (up to 15), stride, zero padding |
| `out_h`, `out_w` | output size **after** pooling |
| `out_cg0` | first output channel group written |
| `pool_en`, `pool_k`, `pool_s` | max-pooling window and stride |
| `relu_en`, `bypass` | ReLU; `bypass` skips ReLU and pooling (saturation stays) |

The loop nest, outermost first, is: pooled row, pooled column, pooling window
row, pooling window column, input channel group, kernel row, kernel column
chunk (step `K_VEC`). An inner product thus takes
`in_cg * k * ceil(k / K_VEC)` tiles. The outputs of one pooling window come
out back to back, so the post-processor only keeps a running maximum over
`pool_k^2` results. Overlapping windows (3x3 stride 2, as in AlexNet)
recompute the outputs they share. This costs `(pool_k/pool_s)^2` times the
convolution work on pooled layers. It keeps the post-processor free of line
buffers.

Further cases:

* **Grouped convolutions** (AlexNet conv2, conv4, conv5) run as separate
  commands, with `in_base` pointing at the group's input channels.
* **Fully-connected layers** run as convolutions whose kernel covers the
  whole input (fc6 as a 6x6 kernel over 256x6x6) or as 1x1 convolutions over
  `H = W = 1`.
* **More output channels than `P_VEC`** take one command per group of
  `P_VEC`. The next group's filters can be loaded into the other filter-cache
  half while the current command runs.

## Sizes

| parameter | default | origin |
|---|---|---|
| `C_VEC` | 16 | paper (peak configuration) |
| `P_VEC` | 32 | paper (peak configuration) |
| `K_VEC` | 3 | this design (not given) |
| `FM_DEPTH` | 8192 words per half per bank | this design |
| `FC_DEPTH` | 256 tile words per half per compute unit | this design |

At these defaults there are 48 banks of 2 x 8192 x 16 bits (12.6 Mbit) and
32 filter caches of 2 x 256 x 240 bits (3.9 Mbit). `P_VEC` must be a multiple
of `C_VEC`.

Against AlexNet (layer sizes from the standard network definition):

* **conv2 to conv5 and the three FC layers** fit the buffers. The largest
  feature map is 384x13x13, which takes 4,056 of 8,192 addresses per bank
  lane. fc7 and fc8 fill the filter cache exactly: 256 channel groups give
  256 words.
* **conv1** does not fit in one piece. Its 3x227x227 input needs 51,529
  addresses per lane. It must be run in row stripes, using `in_base` and
  `out_base` to place each stripe.

## How far to trust it, and where it departs from the paper

* Interpretations made here:
  * `K_VEC` and the tile layout are this design's reading of "an input tile
    of `K_vec x C_vec`".
  * The paper gives the compute-unit rate as "an inner product per `C_vec`
    cycles". Here the number of tiles per inner product follows from the
    layer (`in_cg * k * ceil(k/K_VEC)`).
  * Each filter-cache word carries one code per feature of the tile, and
    each inner product unit uses its own code.
* Not built:
  * the off-chip memory interface and DMA: the host ports stand in for them;
  * average pooling;
  * any clock or resource target: the paper's figures (155.1 GOPS,
    12.9 GOPS/W, 108 DSPs on an XC7Z045) come from an HLS implementation and
    cannot be compared with this RTL.
* Numbers follow the formats above. The testbenches check bit-exact
  agreement with an integer model of exactly these formats, so they check
  the hardware's arithmetic, not a network's accuracy.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_precompute_unit` | shifters against multiplication / floor division, zero levels, latency |
| `tb_inner_product_unit` | index selection and sign |
| `tb_filter_cache`, `tb_feature_map_buffer` | both halves, read during write of the other half, latency |
| `tb_compute_unit` | random inner products of random length, back to back, two-cycle latency |
| `tb_post_processor` | saturation, ReLU, max over windows of 1, 5 and 9, bypass |
| `tb_buffer_controller` | tile addresses, padding masks, first/last marks, filter addresses, replicated host writes and write-back |
| `tb_qcnn_top` | two chained layers end to end at `K_VEC=2, C_VEC=2, P_VEC=4` |
| `tb_qcnn_full` | the same two-layer test at the default sizes (32 compute units, 48 banks) |
| `tb_alexnet_fc6` | AlexNet's fc6 run as a 6x6 convolution over 256x6x6 (192 tiles per inner product) for 32 of its outputs, default sizes |
| `tb_alexnet_conv5` | one group of AlexNet's conv5 (192x13x13 input, 3x3, pad 1, ReLU, 3x3/2 max-pool) for 32 output channels at the default sizes, 11,664 tiles |

The two end-to-end tests compare every output with an integer model of the
network. They also check that a layer takes one cycle per tile plus stalls
and a short tail. They count each mechanism: left and right shifts, zero and
negative weights, saturation, ReLU, overlapping max-pool, bypass, write-back
stalls, filter loading during a command, kernels wider than a tile, stride,
several channel groups, zero padding and the buffer half swap. A mechanism
that never occurs is a failure.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_qcnn_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/qcnn_pkg.sv tb/tb_qcnn_top.sv -o sim
./obj_dir/sim
```

Replace `tb_qcnn_top` with any testbench name. The default-size test takes
about a minute to compile and well under a second to run.

## Files

`rtl/qcnn_pkg.sv` holds the widths, the filter code, the shift table entry
and the command struct. There is one module per file: `qcnn_top`,
`buffer_controller`, `feature_map_buffer`, `precompute_unit`,
`compute_unit`, `filter_cache`, `inner_product_unit` and `post_processor`.
Each file opens with a description of its interface and timing.
