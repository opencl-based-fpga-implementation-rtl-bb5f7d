# A pipelined Tiny-YOLOv2 layer accelerator for a SoC FPGA

Tiny-YOLOv2 is a compact object detector: nine convolution layers and six
max-pool layers turn a 416x416 RGB image into a 13x13 grid of box predictions.
Almost all of its work is 3x3 convolutions over many channels. This design
computes those layers on the FPGA half of an ARM + FPGA system-on-chip
(the DE1-SoC class of board). The ARM host and the FPGA share one DDR memory.

The host writes the image and the weights into that memory. It then starts
the accelerator once per layer. Each layer reads its input feature map from
memory and writes its output feature map back. The next layer reads that
output.

The accelerator is a single pipeline that accepts one *beat* per clock:

* A **data mover** walks the loops of the layer. Every clock it issues one
  read of eight input channels of one pixel. For a convolution it also reads
  the matching weights for four output channels.
* A **convolution kernel** of four **compute units** (CUs) consumes the beat.
  The eight features are broadcast to all four CUs. Each CU multiplies them by
  its own eight weights, so 32 multiply-accumulates happen per clock. Each CU
  builds one output channel of the current pixel.
* A **max-pool unit** takes the beat instead when the layer is a pooling
  layer.
* A **result writer** writes finished values back to memory.

The "4 compute units x 8-lane vectors" configuration is the one the original
OpenCL implementation found fastest. This design follows it: `NUM_CU = 4`,
`VEC = 8`. Both are parameters.

## Provenance and trust

This RTL re-creates an OpenCL (high-level synthesis) accelerator as
hand-written SystemVerilog. Only the high-level structure comes from that
design:

* a deeply pipelined kernel for Tiny-YOLOv2;
* an ARM host that launches the work, with data in shared global memory;
* a data-mover stage that feeds a convolution kernel;
* results written by the convolution kernel to global memory;
* compute units and vector width, with 4 CUs x 8 lanes as the best
  configuration.

Everything below that level is this design's own choice:

* the 16-bit fixed-point format;
* the memory layout;
* the loop order;
* the bias and padding mechanism;
* the max-pool datapath;
* the leaky-ReLU slope;
* all pipeline timing.

These choices were made to be simple, and every block is verified against
an independent integer model. Do not expect bit-exact agreement with a
floating-point Tiny-YOLOv2, or cycle counts that match the OpenCL build.

## Block diagram

```
             cfg, start                                      done, busy
                 |                                               ^
                 v                                               |
          +-------------+  feat_re/addr   +--------+            |
          | data_mover  |---------------->|        |  feat_rdata |
          | (loop nest, |  w_re/addr      | global |  w_rdata    |
          |  addresses) |---------------->| memory |---------+   |
          +-------------+                 | (DDR)  |         |   |
                 | beat_valid, tag        +--------+         |   |
                 v                            ^              v   |
          [ MEM_LAT delay ] ------------------|-------> +--------------+
                                              |         | conv_kernel  | 4 x conv_cu
                                              |         |  or          |
                                              |         | maxpool_unit |
                                              |         +--------------+
                                              |                |
                                              |   wr_en/addr   v
                                              +---------- result_writer
```

The DDR memory and the host are outside this RTL. The top module
`yolo_accel_top` exposes two read ports and one write port for the memory,
plus the layer description and the start/done handshake for the host.

## Memory layout (what the host must prepare)

All addresses are **word** addresses. A feature word is `VEC*16 = 128` bits.
A weight word is `NUM_CU*VEC*16 = 512` bits. In the formulas, `H`/`W` are
the input map size and `CG = ceil(C/8)` is the number of input channel
groups.

**Feature maps.** Word `base + (y*W + x)*CG + g` holds channels
`8g .. 8g+7` of pixel `(y, x)`. Channel `8g+i` is in bits `16i +: 16`.
Channels are padded with zeros to a multiple of 8. For example, the RGB
input uses lanes 0-2, and lanes 3-7 are zero.

**Weights.** Output channels are taken in groups of four, so `OG = ceil(OC/4)`.
Group `og` has a block of `1 + K*K*CG` words at
`w_base + og*(1 + K*K*CG)`:

* word 0 is the **bias word**. CU `c` finds its bias in lane 0 of its vector,
  that is bits `(8c)*16 +: 16`.
* word `1 + (ky*K + kx)*CG + g` holds the weights for tap `(ky, kx)` and
  input channel group `g`. Output channel `4*og + c` and input channel
  `8g + i` are at bits `(8c + i)*16 +: 16`.

Channels beyond the real count carry zero weights. This covers the 125-channel
last layer, which is computed as 128 channels.

**Output maps** use the feature layout with `OCG = ceil(4*OG/8)` groups.
Output group `og` fills lanes `(4*og) mod 8 .. +3` of word
`(y*W + x)*OCG + (4*og)/8`:

* A write at lane 0 writes the whole word and clears lanes 4-7.
* A write at lane 4 writes only lanes 4-7.

Groups are computed in increasing order. So any output channel above the
layer's last group is zero when the next layer reads it.

## How a layer is walked

`data_mover` issues exactly one beat per clock from one clock after `start`
until the layer ends. There are no bubbles.

Convolution (stride 1, "same" padding `(K-1)/2`, `K` = 1 or 3):

```
for og in 0..OG-1:
    bias beat                      (weight read of the bias word only)
    for oy, ox in the map:
        for ky, kx in the kernel:
            for g in 0..CG-1:      (first: ky=kx=g=0, last: ky=kx=K-1, g=CG-1)
                feature read of (oy+ky-pad, ox+kx-pad, g)  or a pad beat
                weight read of tap (ky, kx, g)
```

Max-pool (2x2 window, stride 2 halves the map, stride 1 keeps its size):

```
for oy, ox in the output map, g in 0..CG-1:
    4 beats: pixel (min(oy*S+py, H-1), min(ox*S+px, W-1)), py, px in {0,1}
```

Three details matter here.

* **Padding.** A tap outside the map becomes a *pad* beat. No feature is
  read, and the convolution kernel multiplies zeros.
* **Stride-1 pool edges.** The window is clamped at the edge. A 13x13 map
  stays 13x13, and the edge windows take the maximum over the pixels that
  exist.
* **Bias beat.** Each output group starts with one bias beat. The
  convolution kernel uses it only to load the four bias registers. Each CU
  samples its bias with every beat and carries it down its own pipeline. So
  a new group can follow the previous one directly, while the old group's
  last pixel is still being finished.

Every beat carries a tag through the pipeline: `first`, `last`, `pad`,
`bias`, and the output word address and lane. No stage needs a counter of
its own.

Layer length in clocks (beats):

* convolution: `OG * (1 + H*W*K*K*CG)`
* max-pool: `OH*OW*CG*4`

`done` pulses `MEM_LAT + 5` clocks after the last beat, which is one clock
after the last write. Measured from the clock edge that samples `start`,
that is `beats + MEM_LAT + 5` clocks.

## Compute unit arithmetic

Features, weights and biases are signed 16-bit fixed point with 8 fraction
bits (Q8.8). One `conv_cu` works in three stages:

1. Eight 16x16 products are registered.
2. An adder tree sums them into 48 bits. This is registered.
3. The sum is accumulated. The accumulator restarts on `first`. On `last`,
   the unit computes `x = acc + bias*256`. If ReLU is on and `x < 0`, then
   `x = floor(x*26/256)`: a leaky slope of 0.1016 instead of 0.1. Then
   `y = floor(x/256)`, saturated to 16 bits.

The result appears 3 clocks after the last beat. The 48-bit accumulator
holds the largest Tiny-YOLOv2 sum (3x3x1024 products of 32 bits) without
overflow. Batch normalisation is assumed folded into the weights and bias
by the host. ReLU is enabled per layer; the last 1x1 layer is linear.

`maxpool_unit` keeps a lane-wise signed running maximum. It restarts on
`first` and emits the result one clock after `last`.

## Running Tiny-YOLOv2

The host runs 15 layers, swapping two feature buffers. `cfg` is a
`cnn_pkg::layer_cfg_t`:

| layer | mode | H=W | cg | og | ksize | relu | stride | beats |
|---|---|---|---|---|---|---|---|---|
| conv1 | conv | 416 | 1 | 4 | 3 | 1 | - | 6,230,020 |
| pool1 | pool | 416 | 2 | - | - | - | 2 | 346,112 |
| conv2 | conv | 208 | 2 | 8 | 3 | 1 | - | 6,230,024 |
| pool2 | pool | 208 | 4 | - | - | - | 2 | 173,056 |
| conv3..conv6 | conv | 104, 52, 26, 13 | 4..32 | 16..128 | 3 | 1 | - | about 6.23 M each |
| pool3..pool5 | pool | 104, 52, 26 | 8, 16, 32 | - | - | - | 2 | 86,528 / 43,264 / 21,632 |
| pool6 | pool | 13 | 64 | - | - | - | 1 | 43,264 |
| conv7 | conv | 13 | 64 | 256 | 3 | 1 | - | 24,920,320 |
| conv8 | conv | 13 | 128 | 256 | 3 | 1 | - | 49,840,384 |
| conv9 | conv | 13 | 128 | 32 | 1 | 0 | - | 692,256 |

One frame is 113,547,164 clocks, because the datapath never waits. The
weights take 496,400 weight words (about 31.8 MB at 16 bits).

Every clock does 32 useful multiply-accumulates, except on bias and pad
beats. Throughput therefore scales with `NUM_CU` (more output channels in
parallel) and `VEC` (more input channels per clock). `VEC` must be a power
of two and a multiple of `NUM_CU`.

## Limits and departures

* **Memory bandwidth.** Each clock reads 128 feature bits and 512 weight
  bits. Nothing is cached on chip, and weights are re-read for every pixel.
  A real DDR interface cannot sustain that. A practical build needs an
  on-chip weight buffer per output group and a feature line buffer. Both
  would be added in front of the read ports.
* **No back-pressure.** Reads must return after exactly `MEM_LAT` clocks,
  and writes are always accepted. A DDR controller with variable latency
  needs a FIFO and a stall path that this design does not have.
* **Fixed point.** The original OpenCL kernel's arithmetic is not
  reproduced. Q8.8 with floor rounding and saturation will differ from
  floating-point Tiny-YOLOv2 in the low bits, and saturates for large
  activations.
* **Scope.** Only convolution layers (stride 1, K = 1 or 3), 2x2 max-pool
  and leaky ReLU are built. The final region/detection step, the image
  pre-processing and the data rearrangement are host software.
* **Clock rate and resources** have not been measured on an FPGA.

## Files

| file | contents |
|---|---|
| `rtl/cnn_pkg.sv` | parameters, `layer_cfg_t`, `beat_tag_t`, layout notes |
| `rtl/yolo_accel_top.sv` | top: wiring, read-latency alignment, completion |
| `rtl/data_mover.sv` | loop nest and address generation |
| `rtl/conv_kernel.sv` | 4 compute units, bias registers, padding |
| `rtl/conv_cu.sv` | one compute unit |
| `rtl/maxpool_unit.sv` | lane-wise max over a window |
| `rtl/result_writer.sv` | lane-masked result writes |
| `tb/cnn_ref_pkg.sv` | integer reference arithmetic for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_yolo_accel_top.sv \
    --top-module tb_yolo_accel_top -o tb && ./obj_dir/tb
```

| testbench | what it shows |
|---|---|
| `tb_conv_cu` | 400 random sums of 1-6 beats, leaky ReLU and saturation, 3-clock latency |
| `tb_conv_kernel` | 6 output groups back to back, bias beats, pad beats, tag alignment |
| `tb_maxpool_unit` | 300 windows with idle clocks, 1-clock latency |
| `tb_result_writer` | lane offsets, lane clearing, pool writes |
| `tb_data_mover` | exact beat sequence for 3x3 and 1x1 convolutions and stride-2/1 pools; one beat per clock |
| `tb_yolo_accel_top` | a 5-layer network on shared memory. It checks every output value and every layer's clock count, and requires each mechanism to occur: padding, bias beats, lane-offset writes, negative leaky outputs, clamped windows, conv/pool mode switches |
| `tb_tiny_yolo_net` | all 15 Tiny-YOLOv2 layers with the real channel counts on a 64x64 input (2.7 M beats, seconds) |
| `tb_tiny_yolo_full` | one complete Tiny-YOLOv2 inference at 416x416 with default parameters: 113.5 M beats, every output map of all 15 layers compared (about 3 minutes) |

The testbenches use an array model of the memory with one-clock reads. The
expected values come from plain integer loops in the testbenches, not from
the RTL.
