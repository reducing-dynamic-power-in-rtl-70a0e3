# Streaming LeNet accelerator with ReLU prediction

In a CNN, most convolution results that feed a ReLU are negative. ReLU then
replaces them with zero, so the multiply-accumulate work spent on them is
wasted. This accelerator predicts the sign of every convolution result with a
cheap approximate convolution first. It then runs the exact convolution only
for the results predicted to be positive. The exact units of the results
predicted non-positive are held idle (NO-OP) and output 0. In a streaming
design, where every layer has its own fully unrolled hardware and all layers
work at the same time, idle units save dynamic power directly.

The RTL implements the convolutional part of LeNet for 28x28 MNIST images as
a streaming pipeline:

```
pixels 28x28x1 ─► layer 1: CONV 5x5 x20 ─► ReLU ─► MAX 2x2/2 ─► 12x12x20
               ─► layer 2: CONV 5x5 x50 ─► ReLU ─► MAX 2x2/2 ─► 4x4x50 ─► out
                   (with sign prediction)
```

The fully connected classifier is not part of the accelerator. By default,
layer 1 is computed exactly. Layer 2 uses the prediction with a single
power-of-two level. This is the setting with the best power result for this
scheme: about 12% less dynamic power than the same accelerator without
prediction.

## Data format and interface

- All activations and weights are signed 8-bit integers (`cnn_pkg::act_t`).
  Accumulators are 32 bits wide.
- Input: one pixel per `in_valid` cycle, in raster order. There is no
  back-pressure. Gaps between pixels are allowed, and frames may follow each
  other with no gap. Frame boundaries come from counters that wrap after 28x28
  pixels, so there is no start-of-frame signal. After reset, the first valid
  pixel is pixel (0,0).
- Output: `out_pix` carries all 50 maps of one pooled layer-2 pixel per
  `out_valid`. There are 16 such pixels per image, in raster order.
- Statistics: `l*_stat_valid` pulses once for every window that is issued to a
  layer's CONV units. `l*_stat_noops` then gives how many of those units got a
  NO-OP. Dividing NO-OPs by (windows x maps) gives the fraction of exact
  convolutions that were skipped.
- Reset: `rst_n` is asynchronous and active low. It clears the valid flags and
  the counters. Data registers are not reset.

Throughput is one input pixel per clock. The last output of an image leaves
14 cycles after its last input pixel: 6 cycles for layer 1 and 8 cycles for
layer 2. Layer 2 needs 2 more cycles than layer 1 because of the prediction
stage. Each layer starts as soon as it holds a complete window, so both layers
overlap with the input stream.

## One layer (`cnn_layer`)

The plain layer is the baseline streaming structure:

- **`line_buffer`** keeps one register shift chain per input map. Each chain
  holds (K-1) rows of W pixels plus K window registers. Fixed taps on the
  chain form the KxKxNi window. The window is valid only when the newest pixel
  completes a full neighbourhood. There is no padding, so a 28x28 input gives
  24x24 windows.
- **`conv_unit`**, one per output map, all in parallel. Each has KxKxNi
  multipliers whose weights are elaboration-time constants, so synthesis
  builds constant-coefficient multipliers. A binary adder tree and the bias
  follow. The result is rescaled to int8 by an arithmetic right shift (`SHIFT`)
  and saturated.
- **`relu`** zeroes every pixel whose sign bit is set.
- **`max_pool`** is split into `pool_vertical`, which keeps Kp-1 rows and
  outputs column maxima on the rows that close a window, and
  `pool_horizontal`, which keeps Kp-1 inputs and outputs row maxima on the
  columns that close a window.

### The prediction path (`APPROX = 1`)

This is the part that needs care. It adds three units and a second line
buffer:

```
in ─┬─► line_buffer ─► approx_conv x NO ─► relu_pred ─► en[NO] ──┐
    │        (1)            (1)               (1)                 ▼
    └─► pixel_delay_buffer (2) ─► line_buffer ─► conv_unit x NO (gated) ─► relu ─► max_pool
```

- **`approx_conv`** has the same shape as `conv_unit`. Every weight is
  replaced by the nearest of 0, ±2^E, ±2^(E-1), …, ±2^(E-NL+1). Each product
  is therefore a constant shift, and with constant weights that is only
  wiring. The exact bias is added. Only the sign of the sum is used.
- **`relu_pred`** sets `en[o] = 1` when the approximate sum of map `o` is
  strictly positive. Otherwise it issues a NO-OP. A sum of exactly 0 is a
  NO-OP, because ReLU would output 0 anyway.
- **`pixel_delay_buffer`** delays the raw input stream by the 2 cycles that
  `approx_conv` and `relu_pred` take. It delays by clock cycles, not by pixels,
  so gaps in the stream stay as they are. The exact path's line buffer
  therefore produces each window in the same cycle as the command for that
  window arrives. An assertion in `cnn_layer` checks this alignment.
- In **`conv_unit`**, `en` is the clock enable of the operand register. For a
  NO-OP, the multipliers and adders see no new inputs and do not toggle, and
  the result register outputs 0. This is the FPGA form of clock gating. No
  gated clock is generated.

Two kinds of prediction error can occur:

- **False positive:** the prediction is positive but the exact result is not.
  This costs only power, because the following `relu` removes the value.
- **Missed positive:** the prediction is non-positive but the exact result is
  positive. The value becomes 0, which is the accuracy cost of the scheme.

The level count NL trades accuracy against the size of the approximate units.

### Where the power-of-two levels come from

The levels of a layer are derived from its exact weights, using the same
procedure as the offline mapping:

1. Take the magnitude at the 99th percentile of all weights of the layer
   (W99).
2. Round W99 to the nearest power of two 2^E.
3. Map each weight to its nearest level. Ties go to the smaller magnitude.

The level index is packed into a code of ceil(log2(2·NL+1)) bits: 2 bits for
NL = 1 and 3 bits for NL = 2. Code 0 means zero, 1..NL are the positive
levels, and NL+1..2NL are the negative ones. `cnn_pkg::w99_exponent` and
`cnn_pkg::approx_code` do all of this at elaboration time. Because the weights
are integers here, the levels are left shifts, and E-NL+1 must be ≥ 0 (an
elaboration assertion checks this).

Choosing NL for a network is a separate software step. It tries decreasing
level counts and keeps the smallest NL whose accuracy loss on a validation set
stays under 1%. That step is not hardware and is not included. For LeNet it
gives NL = 1 when layer 1 is left exact (the default here), and NL = 2 when
both layers are approximated.

## Weights

No trained LeNet weights come with this RTL. `cnn_pkg::conv_weight` and
`cnn_pkg::conv_bias` return a fixed stand-in set instead. The stand-in values
come from a 32-bit hash of (layer, output map, input map, row, column). They
are bell-shaped int8 weights in [-63, 63] and mostly negative biases. With
these weights, about half of the layer-2 results are negative, which exercises
the prediction. To run a real network, replace these two functions. The
approximate levels, the multipliers and the testbench references all follow
from them. With real weights, also re-check `L1_SHIFT` (8) and `L2_SHIFT` (9).
These are this design's own choice of int8 rescaling. A proper calibration,
for example per-layer scales, would replace them.

## Configuration (`lenet_stream_top` parameters)

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 28 | input image size |
| `C1`, `C2` | 20, 50 | maps of layer 1 and layer 2 |
| `KC` | 5 | convolution kernel |
| `KP`, `SP` | 2, 2 | pool kernel and stride |
| `L1_SHIFT`, `L2_SHIFT` | 8, 9 | int8 rescaling shifts |
| `L1_APPROX`, `L1_NL` | 0, 2 | prediction in layer 1 and its level count |
| `L2_APPROX`, `L2_NL` | 1, 1 | prediction in layer 2 and its level count |

- The other evaluated setting approximates both layers with two levels:
  `L1_APPROX=1, L1_NL=2, L2_NL=2`.
- The plain baseline without prediction is `L1_APPROX=0, L2_APPROX=0`.

At the defaults, the design has 25,500 constant multipliers (500 in layer 1,
25,000 in layer 2) and 25,000 shift terms in the approximate units.

## Files

| file | content |
|---|---|
| `rtl/cnn_pkg.sv` | types, stand-in weights, power-of-two level mapping, saturation |
| `rtl/line_buffer.sv` | register line buffer and window taps |
| `rtl/conv_unit.sv` | exact convolution of one map, NO-OP gated |
| `rtl/approx_conv.sv` | shift-add approximate convolution of one map |
| `rtl/relu_pred.sv` | sign check → enable / NO-OP commands |
| `rtl/pixel_delay_buffer.sv` | cycle delay aligning the exact path |
| `rtl/relu.sv` | ReLU |
| `rtl/max_pool.sv`, `rtl/pool_vertical.sv`, `rtl/pool_horizontal.sv` | two-stage max pool |
| `rtl/cnn_layer.sv` | one CONV-ReLU-MAX layer, with or without prediction |
| `rtl/lenet_stream_top.sv` | the two-layer accelerator |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | frame-level reference model of a layer |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one has
a watchdog. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cnn_pkg.sv tb/tb_ref_pkg.sv \
  rtl/*.sv tb/tb_lenet_stream_top.sv --top-module tb_lenet_stream_top -o sim
./obj_dir/sim
```

The unit testbenches need only `rtl/cnn_pkg.sv`, the module under test and its
submodules. `tb_cnn_layer` and `tb_lenet_stream_top` also need
`tb/tb_ref_pkg.sv`.

What the tests cover:

- **Units:** each unit test checks its outputs against values computed
  independently in the testbench. It also checks the latency in cycles.
  - `conv_unit`: saturation in both directions and NO-OPs.
  - `approx_conv`: zero, positive and negative levels.
  - `max_pool`: overlapping 3x3/2 windows as well as 2x2/2.
- **`tb_cnn_layer`:** a small layer (2→4 maps, 3x3, 8x8), with and without
  prediction. The stream has random gaps. The test compares every output and
  the NO-OP count with the reference model. It requires that NO-OPs, enabled
  windows and false positives all occur.
- **`tb_lenet_stream_top`:** the full-size design with default parameters. It
  streams three synthetic digit-like images: two back to back, and one after a
  pause with random gaps. Each image gives 16x50 outputs, and all are compared
  with the reference. The test also checks the layer-2 NO-OP count and the
  14-cycle output latency of every image. Building the full-size model takes
  several minutes, because of the 50,000 unrolled constant terms. The
  simulation itself takes seconds.
- **`tb_lenet_prop1`:** the same end-to-end test in the other configuration,
  with prediction in both layers and NL = 2, at reduced width (4 and 6 maps).
  The test also checks the layer-1 NO-OP count and the 16-cycle latency.

## Departures and limits

- **Network shape.** The layer shapes are those of the usual Caffe LeNet:
  5x5 kernels, 20 and 50 maps, 2x2/2 max pooling. That network has no ReLU
  after its convolution layers. This design uses a CONV-ReLU-MAX layer for
  both layers, because prediction only makes sense in front of a ReLU.
- **Prediction path.** The predictor has its own line buffer, and the exact
  path gets a delayed copy of the input stream. This choice fits the
  description, including its extra registers, but other arrangements would
  work too. One example is delaying the window instead of the pixels.
- **Latencies.** The latencies of 2 cycles per CONV unit and 2 cycles for the
  prediction are this design's own pipelining. Real implementations may
  pipeline the adder trees more deeply for 100 MHz and above.
- **Adder widths.** All adder trees use 32-bit accumulators. Sized trees
  would be cheaper: about 23 bits suffice at the defaults, and less in the
  approximate units. This matters for area and power, not for results.
- **Gating.** Clock gating is modelled as register enables. A real ASIC flow
  would map them to gating cells.
- **Weights and rescaling.** Weights are stand-ins (see above). Requantisation
  is a fixed shift with saturation.
- **Not included.** The fully connected layers and the software search for
  NL are not part of this RTL.
- **No power figures.** The design reports skipped work through the
  statistics outputs. It does not estimate power.
