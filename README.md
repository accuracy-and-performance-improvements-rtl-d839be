# Dynamic fixed-point compute subsystem for a CNN accelerator

Trained CNN weights and feature maps cluster tightly around zero, and the
range they need changes from layer to layer. A fixed 16-bit format such as
Q8.8 spends most of its codes on values that never occur; half-precision
floating point fits better but costs far more logic per MAC on an FPGA. This
design keeps the cheap datapath of fixed point and moves the binary point
instead: all data is 12-bit two's complement, and each layer gets the format
(Q4.8, Q5.7, Q2.10, ...) that just covers its values. An input unit measures
the range of the data stream and picks the format; output units truncate the
wide accumulators to it.

The second idea is clocking. DSP slices run much faster than general FPGA
fabric, so the compute units sit on their own clock, 1.5x to 3x the fabric
clock. Small dual-clock FIFOs decouple them from the caches and register file
around them.

The RTL is the compute part of a SIMD CNN coprocessor of the Snowflake kind.
It follows the configuration of Zaidy's M.S. thesis (Purdue University, 2016),
*Accuracy and Performance Improvements in Custom CNN Architectures*:

- 12 compute units of 16 MACs each, so 192 MACs;
- 12-bit variable-precision fixed point;
- Zynq-7020 class device, fabric at 187.5 MHz.

The rest of the coprocessor is not included. That means the instruction
pipeline, the caches, the vector register file and the DMA. Its side of every
connection is a valid/ready port.

## Number format: where the binary point lives

A value is a 12-bit signed word. Its format QX.Y (X integer bits including the
sign, Y = 12 - X fraction bits) is not stored with the data. Instead, three
fraction-bit counts travel as configuration:

| count | meaning | set by |
|---|---|---|
| `cfg_in_frac` | fraction bits of the 16-bit words arriving on the input stream | host |
| `cfg_q_frac` | fraction bits of the 12-bit words the input unit produces | host |
| `cfg_prod_frac` | fraction bits of a product = pixel fraction bits + weight fraction bits | host |
| `meas_frac` | fraction bits of the layer's output words | input unit, measured |

The compute units never look at formats. A 12x12-bit product of a Q4.8 pixel
and a Q2.10 weight simply has 18 fraction bits, and the 48-bit accumulator
keeps them. The output unit then shifts each accumulator by
`cfg_prod_frac - meas_frac` places to the right (or to the left if negative).
It drops the low bits (floor, i.e. truncation toward minus infinity) and clamps
anything outside -2048..2047 to the nearest end. `sat` flags any clamped lane.

The format is chosen from the range of the data. Over one frame (stream beats
up to `tlast`) the input unit keeps the largest magnitude `M`. Let `L` be the
bit length of the integer part `floor(M)`. The format gets `L + 1` integer bits
(one for the sign) and `11 - L` fraction bits, with a minimum of zero.
Examples:

- `M` = 5.03 gives L = 3, so Q4.8;
- `M` = 1.03 gives L = 1, so Q2.10.

Only the range is used, not a fuller statistic of the distribution. This
choice never clamps the measured data, and it gives the formats listed for the
reference network (Q4.8, Q5.7, Q2.10).

The same input unit also quantizes the stream itself. Each 16-bit word is
converted from `cfg_in_frac` to a 12-bit word with `cfg_q_frac`, using the same
floor-and-clamp rule. Its `m_axis` output goes back toward memory.

## Dataflow

```
             fabric clock (clk_fab)           |   DSP clock (clk_dsp)
                                              |
 s_axis ─► dfx_input_unit ─► m_axis           |
                └─ meas_frac ──── 2-flop sync ┼──► output format of all output units
                                              |
 img port (1 per cluster) ─► async_fifo ──────┼──► pixels, broadcast to the 4 units
 wgt port (1 per unit)    ─► async_fifo ──────┼──► weights ─► vmac_cu ─► dfx_output_unit
 res port (1 per unit)    ◄─ async_fifo ◄─────┼──────────────────────────────┘
```

The compute units are grouped in 3 clusters of 4. The units of a cluster share
one image-cache read port, so they see the same pixels. Each unit has its own
kernel-cache port and so its own weights. Each unit has its own output unit and
its own result FIFO.

### Compute unit (`vmac_cu`)

A compute unit is 16 independent lanes. On each beat, lane *i* multiplies pixel
*i* by weight *i* and adds the product to accumulator *i*. The pipeline has two
registers: a product register, then the accumulator. A beat flagged `last`
ends the dot product. Two clocks later the 16 accumulated values appear for one
cycle, and the next beat starts again from zero, so there is no idle cycle
between dot products.

The unit knows nothing of convolution geometry. Mapping a layer onto lanes is
the controller's job. One way is a different kernel per lane with the same
pixel broadcast to all lanes; another is a different pixel per lane with a
shared weight. Either way, the only control signal is `last`, which travels
with the image beat.

There is no separate bias input. A bias can be added as one extra beat of the
dot product: the pixel is the word for 1.0 in the pixel format, and the weight
is the bias in the weight format.

### Cluster sequencing

This scheduling is this design's own; the source leaves it open. A cluster
advances one beat when its image FIFO and all four weight FIFOs hold data. The
beat is popped from all five FIFOs at once.

A `last` beat is held back until two conditions are true:

- no earlier result is still in the 3-stage path (compute unit, then output
  unit);
- every result FIFO of the cluster has room.

Compute units have no back-pressure of their own, so this is what guarantees a
result is never dropped. An assertion (`a_no_drop`) checks it. The cost is
throughput on very short dot products: back-to-back 1-beat dot products run at
one per four DSP clocks. Dot products of 4 beats or more run at full rate.

### Crossing clock domains (`async_fifo`)

Each FIFO has the classic Gray-pointer structure:

- `fifo_wr_logic` keeps the push pointer and the full flag;
- `fifo_rd_logic` keeps the pop pointer and the empty flag;
- two `fifo_ptr_sync` pairs of flip-flops carry each pointer, in Gray code,
  into the other clock domain;
- `fifo_ram` is a simple dual-port RAM.

Pointers are one bit wider than the address, so "full" and "empty" can be told
apart. The pointer a side receives is two to three of its own clocks old.
Because of that, full and empty are pessimistic: they clear a few cycles after
the other side has moved, and never too early.

On the read side, the RAM's registered output doubles as a one-word show-ahead
register. The FIFO therefore presents plain valid/ready on both sides. A word
takes about four read clocks to cross. Depth is 16 words (`FIFO_AW = 4`).

The measured output format reaches the DSP domain through a 2-flop synchronizer
rather than a FIFO. It is several bits wide, so this is safe only because the
format changes between layers and not while results are being produced. The
host must keep that rule.

## Top-level interface (`dfx_accel_top`)

Every transfer happens on a rising edge of the port's clock when valid and
ready are both high. Vectors are unpacked arrays of 12-bit words (`word_t` from
`dfx_pkg`).

| port | clock | description |
|---|---|---|
| `clk_fab`, `rst_fab_n` | | fabric clock; asynchronous active-low reset |
| `clk_dsp`, `rst_dsp_n` | | compute clock, any ratio to `clk_fab`; asynchronous active-low reset |
| `s_axis_*` (`tdata[4]` x 16 bit, `tlast`) | fab | input stream to the input unit |
| `m_axis_*` (`tdata[4]` x 12 bit, `tlast`, `tsat`) | fab | quantized stream |
| `meas_valid`, `meas_frac`, `meas_maxabs` | fab | per-frame measurement: pulse, chosen fraction bits, largest magnitude |
| `cfg_in_frac`, `cfg_q_frac` | fab | formats of the input unit's input and output words |
| `cfg_prod_frac` | dsp | fraction bits of the products; static while a layer runs |
| `img_valid/ready/data/last[3]` | fab | image-cache read port per cluster, 16 pixels per beat |
| `wgt_valid/ready/data[12]` | fab | kernel-cache read port per unit, 16 weights per beat |
| `res_valid/ready/data/sat[12]` | fab | 16 output words per dot product, toward the vector register file |

Parameters, with defaults: `N_CU = 12`, `CU_PER_CLUSTER = 4`, `LANES = 16`,
`ACC_W = 48`, `FIFO_AW = 4`, `IN_LANES = 4`, `IN_W = 16`. `WORD_W = 12` is
fixed in `dfx_pkg`.

## Sizing against the target workload

The reference network is AlexNet-like: 5 convolutional and 3 fully connected
layers, about 2.4 G-ops per frame.

- **Throughput.** 192 MACs at 187.5 MHz give 72 G-ops/s peak, or about 30
  frames/s if the units never starve. The source quotes 63.98 G-ops/s
  (26.66 frames/s) for its fixed-point system. Clocking the DSP domain at 2x or 3x
  raises the peak only if the caches can deliver operands fast enough.
- **Accumulators.** A product of two 12-bit operands is at most 2^22 in magnitude, so
  48-bit accumulators hold 2^25 products without overflow. That is far beyond
  the longest dot product in such a network (about 9k terms in the first fully
  connected layer).

## Where this RTL departs from, or adds to, the source design

Taken from the source:

- 12-bit data;
- per-layer formats chosen by an input unit from the data and applied by an
  output unit that truncates;
- 12 units of 16 MACs, in clusters of 4 sharing an image cache;
- compute units on a faster clock behind dual-clock FIFOs after the image and
  kernel caches and after the output unit;
- the FIFO's internal structure, including 2-flop synchronizers, Gray/binary
  conversion on both sides and pessimistic flags;
- clamping out-of-range results to the largest or smallest value instead of
  wrapping (stated there for the floating-point unit, applied here to fixed
  point).

This design's own choices:

- the range-based format rule;
- the 16-bit input word and its configured format;
- 4 words per input beat;
- 48-bit accumulators;
- the two-stage MAC pipeline;
- FIFO depth;
- the valid/ready handshakes and the show-ahead FIFO read;
- the `last` flag carried with image beats;
- cluster sequencing;
- asynchronous active-low resets.

Differences worth knowing:

- The source budgets one DSP slice per output unit (12 extra). Here the output
  unit is a shifter, so only the 192 MACs would use DSPs.
- ReLU and max pooling are not in this datapath.

Not included:

- the host coprocessor (instruction cache, decoder, hazard detection,
  dispatch, scalar pipeline, load/store units, vector register file, L1/L2
  caches);
- the DMA;
- the clock-generating PLL;
- the floating-point (FP16/FP12/FP8) MAC variants. The source evaluates these
  only as alternatives to the fixed-point unit.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on its own watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/dfx_pkg.sv tb/tb_dfx_accel_top.sv --top-module tb_dfx_accel_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*.sv` and its module name.

`tb_dfx_accel_top` runs the full default configuration in three phases, with
the DSP clock at 2x, 3x and 1.5x the fabric clock. Each phase:

- sends a calibration frame through the input unit and checks the chosen
  format, Q4.8 or Q2.10;
- runs 20 dot products of 1 to 24 beats on every compute unit, with random
  gaps on the image and weight ports and random or blocked result ports;
- checks each of the 720 result vectors, and each saturation flag, against a
  reference computed in the testbench.

The testbench also counts the design's mechanisms and fails if any never
occurs:

- image FIFO full;
- weight FIFO starving a cluster;
- last beat held;
- result FIFO full;
- clamping;
- format measurement.

The unit testbenches cover further cases:

- `tb_async_fifo` checks ordering and loss-free transfer at four clock ratios;
- `tb_vmac_cu` checks exact sums, the 2-clock latency and 4096 full-scale
  products;
- `tb_dfx_output_unit` and `tb_dfx_input_unit` check the conversion rule
  against real-number arithmetic for random formats.

`tb_alexnet_conv1_tile` is a workload test. It computes a tile of a first
convolution layer of the AlexNet kind: 11x11x3 kernels and 96 output maps at 3
output positions, so every output is a 363-term dot product.

- Pixels are Q4.8 and weights Q2.10.
- The output format Q4.8 is measured from a calibration frame.
- Each output word must match the exact integer reference.
- Each output must also lie within the worst-case quantization bound of the
  real-valued convolution.
- The mean absolute error against the real-valued convolution is printed; it
  is about 0.01, or 2.5 LSB of Q4.8.
- The pass must complete at one beat per fabric clock. That is the rate at
  which the caches supply operands, whatever the DSP clock.
