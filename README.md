# LeNet-5 inference accelerator with approximate multiply-accumulate

This is a small FPGA-style accelerator for the LeNet-5 digit classifier
(32x32 grey image in, ten class scores out). It saves resources in
three ways:

- **Short fixed-point numbers.** Everything the network stores (pixels,
  activations, weights, biases) is an 8-bit word with 2 integer bits and
  6 fraction bits. Sums are kept in 12 bits with 6 integer bits.
- **Approximate multiply-accumulate (MAC) in the convolution layers.**
  Each product is cut from 18 bits to 12 bits before it is added. Two cheap
  ways of doing this cut are offered: rounding toward zero, or plain
  truncation plus a carry bit.
- **Layer-level pipelining.** Each layer has its own engine, and a
  two-bank buffer sits between every pair of layers. While Conv2 works on
  image *n*, Conv1 can already work on image *n+1*.

Images and parameters enter as IEEE-754 single-precision floats and the
scores leave as floats. All arithmetic in between is fixed point, and
nothing uses a hardware multiplier wider than 8x8 or 12x8 bits.

The RTL reimplements an accelerator that was published as a high-level
synthesis design for a Zynq UltraScale+ device. That publication gives the
number formats, the two approximate MAC units, the layer sequence and the
pipelining idea. It does not give the layer sizes, the unroll factors,
the memory organisation, the interfaces or the tanh circuit. Those come
from the classic LeNet-5 network or are this design's own choices. They
are listed in [What is taken over and what is chosen here](#what-is-taken-over-and-what-is-chosen-here).

## Number formats

| name  | width | integer bits (incl. sign) | fraction bits | range              | used for                              |
|-------|-------|---------------------------|---------------|--------------------|---------------------------------------|
| Q2.6  | 8     | 2                         | 6             | -2 .. +1.984       | every stored value; layer inputs/outputs |
| Q6.6  | 12    | 6                         | 6             | -32 .. +31.984     | accumulators, pooling arithmetic       |
| Q6.12 | 18    | 6                         | 12            | -32 .. +31.9998    | a Q2.6 x Q2.6 product before the cut   |

Six integer bits are enough to add 25 products in -1..1 (one 5x5 window)
without overflow. Longer sums (Conv2 adds 150 products, Conv3 adds 400)
can overflow with unlucky weights. All 12-bit additions **wrap** in two's
complement. There is no saturation, so trained weights must keep the sums
in range.

Every layer ends in tanh, whose result lies in -1..+1. That result fits
Q2.6, so the 12-bit sum goes back to 8 bits at the activation.
`tanh_lut` is a 512-entry table over -4 .. +3.984 holding
`round(64*tanh(x))`. Inputs outside that range are clamped, because the
rounded result there is already +-1. The table is computed at
elaboration with `$tanh`, so there is no data file.

## The approximate MAC (`approx_mac`)

This is the part of the design that differs from a textbook MAC. One
8x8 product of two Q2.6 numbers is a Q4.12 number. It is sign-extended to
18 bits (Q6.12) and then cut to 12 bits (Q6.6) **before** it is added.
The cut throws away six fraction bits, and `MODE` selects how:

| MODE          | reduction of the 18-bit product `p`                      | effect                                    |
|---------------|----------------------------------------------------------|-------------------------------------------|
| `MAC_ROUNDED` | `p >>> 6`, plus 1 if `p < 0` and `p[5:0] != 0`            | round toward zero: same error for + and - |
| `MAC_CARRY`   | `p >>> 6`, and the sign bit of that result goes into the adder as a carry-in | negative values pulled one LSB up          |
| `MAC_TRUNC`   | `p >>> 6`                                                 | floor, biased toward -infinity            |

Worked examples (values in units of 1/4096 before the cut and 1/64
after it):

| product `p` | floor (`MAC_TRUNC`) | round to zero (`MAC_ROUNDED`) | carry (`MAC_CARRY`) |
|-------------|---------------------|-------------------------------|---------------------|
| +100        | 1                   | 1                             | 1                   |
| -68         | -2                  | -1                            | -2 + 1 = -1         |
| -64         | -1                  | -1                            | -1 + 1 = 0          |

Truncation alone rounds every negative product down, and the error builds
up over the 25 to 400 terms of a sum. Both approximate variants remove
that bias. The rounded variant is exact in the "toward zero" sense but
has to test the six dropped bits. The carry variant costs only a carry-in
to the adder, but it is off by one LSB on negative products whose dropped
bits are all zero. The source reports 99.01 % MNIST accuracy for the
rounded unit and 98.17 % for the carry unit, against 99.42 % for a float
design. The rounded unit is the default (`CONV_MODE = MAC_ROUNDED`).

`LANES` unrolls the multiply: `LANES` products are cut individually, summed
in a binary adder tree and added to the accumulator in one cycle. With the
carry variant, the carry bits of all lanes are added as well. The
accumulator starts from `init` on a beat marked `first`, which is how each
output's bias enters. After a beat marked `last`, `out_valid` pulses with
the finished sum. Pooling and fully connected layers use the same unit
with `MAC_TRUNC`, the plain 12-bit shortening.

## The network

| layer | engine       | input       | output      | parameters (weights + biases) | cycles per image at `LANES=1` |
|-------|--------------|-------------|-------------|-------------------------------|-------------------------------|
| Conv1 | `conv_layer` | 1 x 32x32   | 6 x 28x28   | 150 + 6                       | 117,600 + 2                   |
| Pool1 | `pool_layer` | 6 x 28x28   | 6 x 14x14   | 6 + 6                         | 4,704 + 2                     |
| Conv2 | `conv_layer` | 6 x 14x14   | 16 x 10x10  | 2,400 + 16                    | 240,000 + 2                   |
| Pool2 | `pool_layer` | 16 x 10x10  | 16 x 5x5    | 16 + 16                       | 1,600 + 2                     |
| Conv3 | `conv_layer` | 16 x 5x5    | 120         | 48,000 + 120                  | 48,000 + 2                    |
| FC1   | `fc_layer`   | 120         | 84          | 10,080 + 84                   | 10,080 + 2                    |
| FC2   | `fc_layer`   | 84          | 10          | 840 + 10                      | 840 + 2                       |

- **Convolution** (`conv_layer`): 5x5 kernel, stride 1, no padding. Every
  output map is connected to every input map, and the bias is added.
  Addresses come from a counter loop nest over (output map, row, column,
  input map, kernel row, kernel column group). Each beat sends `LANES`
  products to the MAC.
- **Pooling** (`pool_layer`): for each map, the four values of a 2x2
  window are summed exactly, divided by 4 with an arithmetic shift,
  multiplied by the map's trained weight, cut back to Q6.6 (floor) and
  added to the map's bias. The layer reads one value per cycle.
- **Fully connected** (`fc_layer`): the bias plus one product per cycle,
  with 12-bit truncating arithmetic.
- Every layer finishes with `tanh_lut` and writes Q2.6 results.

A layer's memory layout is always map-major, then row, then column.
Weights are ordered `[out][in][ky][kx]` for convolutions and `[out][in]`
for FC layers, followed by one bias per output.

## Dataflow between the layers

Every link between two layers is a `pingpong_buf`, a memory with two banks
of the feature-map size:

```
pixels -> flp2fix -> b0 -> Conv1 -> b1 -> Pool1 -> b2 -> Conv2 -> b3 -> Pool2
       -> b4 -> Conv3 -> b5 -> FC1 -> b6 -> FC2 -> b7 -> fix2flp -> scores
```

The producer writes one bank in any order and pulses `wr_commit`. The
consumer sees `rd_ready`, reads at up to `NRD` addresses per cycle (the
data comes one cycle later) and pulses `rd_release` when done. A layer
starts only when its input bank is committed **and** its output buffer
has a free bank. When it finishes, it commits its output and releases its
input in the same cycle. So a layer never takes a new image before it has
finished the current one, and it never overwrites data that the next
layer has not yet read.

The result is a seven-stage pipeline at the level of images. The first
image takes the sum of all layer times: **422,848 cycles** from the last
pixel to the first score at `LANES = 1`, compared with 432,610 cycles
reported for the original. After that, a new image completes every
**240,004 cycles**, which is Conv2's 240,000 beats plus 4 cycles of
handover. When the slowest layer is busy, the input buffer fills and
`pix_ready` drops. With `LANES = 5` the convolution layers run five
times faster: 98,369 cycles of latency and 48,003 cycles per image.

Inside each layer engine there is a three-stage pipeline. Addresses are
issued at cycle *t*. The registered memories deliver operands at *t+1*,
where the MAC adds them. The tanh result is written at *t+2*.

## Interfaces of `lenet5_top`

| signal                          | dir | width | meaning                                                     |
|---------------------------------|-----|-------|-------------------------------------------------------------|
| `clk`, `rst_n`                  | in  | 1     | clock; asynchronous active-low reset                         |
| `cfg_valid`, `cfg`              | in  | 1, 51 | parameter write: `cfg.layer` (0 = Conv1 .. 6 = FC2), `cfg.addr`, `cfg.value` (float) |
| `pix_valid`/`pix_ready`/`pix_data` | in/out/in | 1/1/32 | pixel stream, 1,024 floats per image, row-major     |
| `res_valid`/`res_ready`/`res_data` | out/in/out | 1/1/32 | score stream, 10 floats per image               |
| `res_idx`, `res_last`           | out | 4, 1  | class of the current score; high on class 9                  |
| `layer_busy`                    | out | 7     | one busy flag per layer, Conv1 in bit 0                      |

Both streams move a word in every cycle where valid and ready are both
high. A score held back by `res_ready = 0` stays stable, and an immediate
assertion checks this. Parameters are converted to Q2.6 (floor, with
saturation) as they are written. Load all of them once after reset and
before the first image. Writing them while images are in flight is not
supported.

Top-level parameters:

| parameter   | default       | meaning                                                  |
|-------------|---------------|----------------------------------------------------------|
| `LANES`     | 1             | products per cycle in the convolution layers (1 or 5)    |
| `CONV_MODE` | `MAC_ROUNDED` | approximate MAC variant of the convolution layers        |
| `FC_MODE`   | `MAC_TRUNC`   | product reduction in the FC layers                       |

Memory at the defaults: 61,750 parameter bytes (Conv3 alone holds 48,120)
and 2 x 9,118 bytes of feature buffers. Buffers with `NRD > 1` need that
many read ports, so a real FPGA build would replicate them or bank them.

## What is taken over and what is chosen here

Taken from the source accelerator:

- The layer sequence Conv1, Pool1, Conv2, Pool2, Conv3, FC1, FC2, with
  bias and tanh after each layer.
- The 5x5 kernels and the 2x2 average pooling with a weight and a bias
  per map.
- Q2.6 storage and the 12-bit Q6.6 accumulation.
- The 18-bit product and the two approximate MAC units.
- The 12-bit truncating arithmetic for pooling and FC.
- Float conversion at the input and output.
- Parameters kept on chip after one load.
- Pipelining at the level of layers.

Chosen here, because the source does not specify it:

- **Layer sizes.** The classic LeNet-5 map counts are used (6, 16, 120,
  84, 10).
- **Full Conv2 connectivity.** Conv2 connects every input map to every
  output map, where the original LeNet-5 uses a sparse connection table.
  With full connectivity the per-image MAC count (422,824) matches the
  reported cycle count closely.
- **FC2 activation.** FC2 ends in tanh like every other layer. The
  classic LeNet-5 output uses Gaussian (RBF) connections instead.
- **No argmax.** The ten scores are returned as they are.
- **Unrolling.** One product per cycle by default, or a kernel row with
  `LANES = 5`. The original's unroll factors are unknown. The default
  reproduces its cycle count.
- **Rounding and overflow.** Floor rounding is used wherever a value is
  shortened, except in the approximate MAC. 12-bit sums wrap. The input
  converter saturates and flushes subnormals and NaN to zero.
- **tanh.** A table with round-to-nearest, clamped to -4..4.
- **Infrastructure.** The two-bank buffers, the valid/ready streams, the
  parameter load bus and its address layout.

Not modelled: the processor system that trains the network and feeds the
accelerator, the accuracy study (no trained weights are included), and
the float and wider fixed-point comparison designs.

## Verification

Each block has a self-checking testbench in `tb/`. It compares the block
with an integer or real-number model in `tb/tb_ref_pkg.sv`, which is
written independently of the RTL (integer division, `$floor`, `$exp`):

| testbench            | checks                                                                         |
|----------------------|--------------------------------------------------------------------------------|
| `tb_flp2fix`         | grid values, 3,000 random floats, saturation, zero/subnormal/inf/NaN            |
| `tb_fix2flp`         | every Q2.6 and Q6.6 code converts exactly                                       |
| `tb_tanh_lut`        | every 12-bit input against `round(64*tanh)`                                     |
| `tb_approx_mac`      | all three modes at 1 lane, rounded and carry at 5 lanes, random sums with gaps  |
| `tb_pingpong_buf`    | bank alternation, both-full stall, two read ports, flags                        |
| `tb_param_ram`       | three read ports against a model                                                |
| `tb_conv_layer`      | reduced 2x7x7 -> 3x3x3 layer, 1 lane rounded and 5 lanes carry, exact cycle count |
| `tb_pool_layer`      | reduced layer, exact outputs and cycle count, wait for a free bank               |
| `tb_fc_layer`        | reduced layer, exact outputs and cycle count                                     |
| `tb_lenet5_top`      | full-size network at default parameters, 3 images back to back                   |
| `tb_lenet5_lanes5`   | full-size network with `LANES = 5` and the carry MAC                              |

The two network tests, through `tb/lenet5_tb_driver.sv`:

- Load random weights as floats, with extra bits below the Q2.6 grid so
  that the input conversion has bits to drop.
- Stream three random images back to back, with random back-pressure on
  the score stream.
- Require every score to equal the integer model bit for bit.

They also check the following:

- The first image's latency, against the sum of the layer beats and
  against 432,610 cycles +-3 % at `LANES = 1`.
- The steady-state image spacing, which must be the slowest layer's
  beats plus at most 8.
- Each of these mechanisms occurs at least once: layers overlapping,
  input stall, output back-pressure, conversion floor, tanh saturation,
  and approximate-rounding events.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
  rtl/lenet5_pkg.sv tb/tb_ref_pkg.sv tb/tb_lenet5_top.sv \
  --top-module tb_lenet5_top -Mdir obj_top
./obj_top/Vtb_lenet5_top
```

For a block test, name that block's testbench instead (for example
`tb/tb_conv_layer.sv` with `--top-module tb_conv_layer`). The `-y`
options let Verilator find every other module by its file name.
Each test ends by printing `TB_RESULT checks=N failures=M`. The full
network test simulates about 900,000 cycles in about a second, after a
C++ build of a few minutes.

The random weights check that the hardware matches its arithmetic model.
They say nothing about classification accuracy. Reproducing the accuracy
figures needs trained LeNet-5 weights, loaded through the parameter bus.

## Files

- `rtl/lenet5_pkg.sv`: formats, layer sizes, MAC mode and load-bus types.
- `rtl/lenet5_top.sv`: the accelerator: buffers, layers, input and output stages.
- `rtl/conv_layer.sv`, `rtl/pool_layer.sv`, `rtl/fc_layer.sv`: layer engines.
- `rtl/approx_mac.sv`: approximate MAC with adder tree.
- `rtl/tanh_lut.sv`: activation table.
- `rtl/pingpong_buf.sv`: two-bank inter-layer buffer.
- `rtl/param_ram.sv`: per-layer weight and bias memory.
- `rtl/flp2fix.sv`, `rtl/fix2flp.sv`: float conversions.
- `tb/`: the testbenches, the reference package and the network test driver.
