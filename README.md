# CNN training on a dataflow engine: the layer kernels

Training a convolutional network needs the forward pass, the backward pass and
the weight gradients of every layer, for every sample. This design computes
all three in streaming hardware built for a dataflow engine (DFE): an FPGA
card with a large off-chip DDR memory (LMem) and a small on-chip memory for
weights (FMem). The network is cut into *blocks* of a few layers. The FPGA
holds one block at a time and is reconfigured between blocks. Inside a block,
every layer is a streaming engine that reads its input from LMem and writes
its output back to LMem, one point per clock tick. The host CPU loads
weights, sequences the runs, computes softmax and the output error, and
applies the weight updates that the backward engines stream back to it.

Two limits shape all of the hardware:

- **LMem is accessed in bursts.** A burst is 192 bytes, which is 24 points
  here. Every stream must read or write a whole number of bursts. Layers
  therefore pad their output with zeros up to a burst boundary.
- **FMem is small.** Its arrays are limited to 65535 words. Layers therefore
  work on small slices of their weights per *run* (one start of the kernel):
  - a forward convolution run writes one output unit of 24·BurstMult points,
    with at most two kernels in FMem;
  - a fully connected run covers one 24×24 tile of the weight matrix.

  The host re-runs the layer until the whole output is done.

The RTL here is the set of layer engines, plus a top module, `cnn_dfe`, for
the small network used to validate the approach:

| block | layers |
|---|---|
| forward block 1 | conv 16×3×3 (stride 1, pad 1) + ReLU → conv 16×3×3 + ReLU → max-pool 2×2/2 |
| forward block 2 | fully connected 3136→1000 + sigmoid → fully connected 1000→10 (softmax on the host) |
| backward block 2 | the two fully connected layers, in reverse order |
| backward block 1 | pool, conv2, conv1, in reverse order |

The input is 3×28×28. Conv1 uses a burst multiple of 15, so its output unit
is 360 points. Conv2 uses parallelism 8.

## Files

| file | role |
|---|---|
| `rtl/cnn_pkg.sv` | number format, stream and control types, activation functions and their derivatives |
| `rtl/act_unit.sv` | activation unit (function or derivative) |
| `rtl/input_control.sv`, `rtl/output_control.sv` | the per-stream input and output control blocks every layer uses |
| `rtl/data_offset.sv` | stream offset buffer (pooling window) |
| `rtl/data_weight_offset.sv` | one multiply tap of the convolution with its data and weight addressing |
| `rtl/conv_fprop.sv`, `rtl/conv_bprop.sv`, `rtl/conv_wupdate.sv` | convolution engines and the weight-update block |
| `rtl/pool_fprop.sv`, `rtl/pool_bprop.sv` | pooling engines |
| `rtl/fcon_fprop.sv`, `rtl/fcon_bprop.sv` | fully connected tile engines |
| `rtl/cnn_dfe.sv` | all ten layer engines of the validation network side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_stream_src.sv` | queue-backed stream source used by `tb_cnn_dfe` |
| `tb/tb_workloads.sv` | single layers at AlexNet and VGG16 sizes |

## Control: MemControl, runs and the layer control word

Each layer engine has the same control side:

- `enable` is the layer's **MemControl** bit. While it is low, the engine
  holds. It consumes no input, computes nothing and writes nothing. The host
  lowers it for runs where the layer's input is not yet in memory. That is
  how all layers of a block can sit in one kernel and still run in sequence.
  In `cnn_dfe`, `mem_control[l]` drives layer `l`.
- `ctrl` (`layer_ctrl_t`) is sampled on `ctrl.start`. Its fields:
  - `last_run`: this is the layer's last run, so pad after it.
  - `first_in`: the first input tile of a fully connected output, so there is
    no partial sum to add.
  - `last_in`: the last input tile, so apply the activation.
  - `act`: the activation function.
  - `pool_mode`: max or mean pooling.
  - `run_units`: kernels or channels in this run, 0 meaning the maximum (two).
- `first_out` (forward convolution only) is the host's **FirstOutput**: the
  layer output point the run starts at. `cnn_dfe` has one per convolution.
- `fmem_wr` writes one FMem word per cycle. The host fills FMem before
  starting a run.
- `busy` is high from start until the run ends. `done` pulses for one cycle
  at the end.

Data streams use the `stream_t` type (`valid` plus a 16-bit `data`):

- **Input streams** have a `ready` output. A point moves when `valid` and
  `ready` are both high.
- **Output streams** and weight-update vectors are valid strobes. The sink
  must accept them on the cycle they appear.

Streams that are read together use one shared ready, for example FwdOut and
Error in the backward layers. A point pair is taken only when both are valid.

## Convolution forward: channel groups and the carry

A run of `conv_fprop` writes one output unit: 24·BurstMult points of the
layer's output, in the order kernel → row → column, starting at point
`first_out`. A layer therefore takes ⌈NKernels·OutDims²/(24·BurstMult)⌉ runs,
with `first_out` = run·unit. FMem holds two kernels: local kernel 0 is the
one containing point `first_out`, local kernel 1 the next. The host writes
their weights at `(k·NChannels + c)·K² + ky·K + kx` and streams the whole
input volume in, again for every run. The engine stores the volume. It then
splits the unit into one segment per kernel, and walks kernel segment →
channel group g → the segment's points:

- **Taps.** Each tick, PAR·K² `data_weight_offset` taps each form one product.
  A tap's input address is `c·InDims² + iy·InDims + ix` and its weight
  address is the formula above, with `iy = oy·S + ky − P`. A tap that lands in
  the zero padding contributes 0.
- **Channel groups.** The PAR channels of group g are g, g + NChannels/PAR,
  and so on. With 16 channels and PAR 8, channels 0, 2, …, 14 are summed in
  one tick and channels 1, 3, …, 15 in the next visit.
- **Carry.** The sum over a group is added to the *carried* partial sum of
  the same output point from the previous group. A carry array holds one
  value per output point. A multiplexer drops the carried value on the first
  group, because what it holds there is left over from the previous kernel
  or run.
- **Output.** On the last group the point is complete. The output control
  saturates it, applies the activation and writes it.

Timing: `NChannels·InDims²` load ticks, then `points·(NChannels/PAR)`
compute ticks, then padding, then one done cycle. Each output appears one
cycle after its compute tick. The testbench checks this cycle count exactly.

## Convolution backward: delta, flipped kernels and weight-update vectors

`conv_bprop` produces two things for up to two input channels c of the forward
layer per run:

- the error passed back to the previous layer;
- the weight-update vectors of those channels.

A run has four phases:

1. **Delta.** FwdOut and Error (NKernels·OutDims² points each) are read
   together and `delta = Error · f'(FwdOut)` is stored. The derivative is
   taken from the stored forward output:
   - ReLU: 1 where y > 0;
   - sigmoid: y(1 − y);
   - tanh: 1 − y².
2. **FwdIn.** The forward input of the run's channels is stored.
3. **Error.** For every input point (y, x) of channel c, the error is
   `Σ_k Σ_ky,kx delta[k][(y+P−ky)/S][(x+P−kx)/S] · W[k][c][ky][kx]`. A term
   counts only where the division is exact and the index is in range. This is
   the convolution of delta with the flipped kernels, and with a stride it is
   the fractionally strided form. It uses the same structure as forward
   propagation, with kernels and channels exchanged: PAR kernels × K² taps per
   tick, and a carry over kernel groups. No activation is applied, because the
   previous layer applies its own derivative when it reads this error.
4. **Weight update.** For every kernel k and every delta point, the
   `conv_wupdate` block multiplies the delta by the K×K input window under it.
   It streams that K²-wide vector to the host. The host sums the vectors into
   dW[k][c]. The vectors leave in the order channel, kernel, output row,
   output column.

Timing:
- loading takes `NKernels·OutDims² + run_units·InDims²` ticks;
- the error takes `run_units·(NKernels/PAR)·InDims²` ticks;
- the weight update takes `run_units·NKernels·OutDims²` ticks.

## Pooling

- **`pool_fprop`** reads one point per tick into a `data_offset` shift
  register. The register holds the last `(W−1)·InDims + W` points. Its W²
  taps, at offsets `y·InDims + x` back from the newest point, form the window
  whose bottom-right corner was just read. When that corner sits on the
  stride grid, the window's maximum or mean is written, two cycles after the
  corner point.
- **`pool_bprop`** forms delta from FwdOut and Error at the pooled size. It
  then multiplies each point of a host-supplied mask by the delta of its
  window: `Out[c][y][x] = Mask[c][y][x] · delta[c][y/S][x/S]`. The mask holds
  1 at each window's maximum for max pooling, or 1/W² everywhere for mean
  pooling. It works channel by channel.

## Fully connected layers: tiles and the partial-sum stream

A 3136×1000 weight matrix cannot sit in FMem. So a run of `fcon_fprop` covers
one tile of B inputs × B outputs, where B = 24·BurstMult (24 by default). The
host writes the tile's B² weights at address `in·B + out` and streams in the
tile's B inputs.

**Groups and carry.** For each output the engine sums PAR products per tick.
It takes the inputs g, g + B/PAR, g + 2B/PAR, …, so with PAR 12 these are the
even inputs, then the odd ones. Each group's sum is carried to the next
group, as in convolution.

**Partial sums across tiles.** The output of one tile is only a partial sum
over the inputs. A third input stream therefore reads back the partial
result that earlier input tiles left in LMem. This stream is skipped on the
first input tile (`first_in`). The last input tile (`last_in`) applies the
activation. If the partial-sum point has not arrived when it is needed, the
engine stalls and raises `stall`.

The validation network's first layer takes 131 input tiles × 42 output tiles.
That is 5502 runs for the forward pass and again for the backward pass.

**Backward.** `fcon_bprop` uses the same tile shape and the same FMem layout.
It does three things:
- It forms delta from FwdOut and Error of the tile's B outputs.
- It accumulates the error `Σ_j delta[j]·W[i][j]` for the tile's B inputs,
  carrying over groups and adding the earlier tiles' partial sums.
- In the same ticks it streams the PAR weight updates `delta[j]·FwdIn[i]` of
  the pairs being used.

Timing: B input ticks (2B for backward), then `(B/PAR)·B` compute ticks.

## Burst padding

A layer's output over all its runs is one LMem stream, and LMem transfers
whole bursts. After the last output point of a layer's last run, the engine
writes zeros until the layer's output is a multiple of `24·BurstMult`
points. Runs before the last continue the same stream unpadded:
- a forward convolution run is one whole unit, so only the last run, which
  holds the remainder, pads up to a unit;
- the backward convolution counts the layer's output position across its
  runs and pads after the last one;
- the fully connected streams are always whole tiles of 24·BurstMult points
  and never pad.

In the validation network:

| layer | padding |
|---|---|
| conv1 | 12544 points, padded by 56 to 35 units of 360 |
| pooling | 3136 points, padded by 8 |
| conv2 and backward conv2 | 8 points each |
| backward conv1 | 2352 points, no padding |

## Number format and activation functions

Data are signed fixed point Q7.8: 16 bits, 8 of them fractional.
- Products are shifted right by 8, which truncates toward minus infinity.
- Sums accumulate in 40 bits.
- Each stored value saturates to 16 bits.

Activations (`fx_act` in `cnn_pkg`):
- **ReLU** is clipped at 10, so that an unbounded output cannot overflow.
- **Sigmoid** is a four-segment piecewise-linear curve with the breakpoints
  |x| = 1, 2.375 and 5. It needs only shifts and adds. It is 0 (or 1) beyond
  ±5, which includes the region x ≤ −17.32 where it must be exactly 0.
- **Tanh** is `2·sigmoid(2x) − 1`, so it is 1 at and beyond 8.66.

The sigmoid is within 6 LSB of the exact function, and tanh within 12 LSB.
The `tb_act_unit` testbench checks these bounds against `$exp`.

## Where this design departs from the streaming design it follows

- **Number format.** The reference design computes in floating point with a
  user-chosen exponent and mantissa width. This RTL uses fixed point, so the
  datapath is plain integer logic. Sigmoid and tanh are approximated
  piecewise-linearly instead of through an exponential unit.
- **Input storage.** The reference convolution consumes its input as it
  streams and carries partial sums through a delay line of
  (InDims + 2·Pad)² points. Here, each engine first stores the whole input of
  the run, then computes, so a forward convolution run reloads the whole
  input. The carry becomes an array with one entry per output point. The arithmetic and the output order are the same. The cost is
  on-chip memory: conv2's engine holds 16×28×28 points. That memory grows
  with the layer size, which is why large networks do not fit (below).
- **Backward convolution order.** The error and the weight-update vectors
  come out of one engine in two phases, error first. The derivative is
  computed from the stored forward output, not from the pre-activation sum.
- **Memory control.** LMem address generation belongs to the memory
  manager and is not part of this RTL. Each engine is handed its streams
  already positioned; the forward convolutions also receive FirstOutput to
  know which points to compute. Every stream is a port of `cnn_dfe`.
- **Not here.** These are either outside the FPGA kernel or vendor
  infrastructure:
  - the DDR memory and its controller;
  - the host link;
  - reconfiguration between blocks;
  - dropout (a host-side layer);
  - softmax and cross-entropy;
  - SGD with momentum.

  The testbench `tb_cnn_dfe` plays the host and the memory.

## Larger networks

The engines are parameterised by layer geometry: channels, input size,
kernel size, stride, padding, parallelism and burst multiple. The top is
built for the validation network only. Running AlexNet or VGG16 needs each
engine instantiated with that network's geometry, just as the original
system compiles each block for its network.

- **FMem.** Weights would fit. Two 512-channel 3×3 kernels take 9216 words.
  A fully connected tile at burst multiple 5 takes 14400 words.
- **Input buffers.** The whole-input buffers would not fit for VGG16's early
  layers. A 64×224×224 input is 51 Mbit, against roughly 45 Mbit of on-chip
  memory. Streaming the input, as the reference design does, would remove
  this limit.

`tb_workloads` instantiates engines at three sizes from these networks and
checks each one's outputs, padding and cycle count. Each layer uses the burst
multiple and parallelism from its network's configuration:

| layer | geometry | burst multiple | parallelism | run | cycles |
|---|---|---|---|---|---|
| AlexNet conv1 | 3×227×227 input, 11×11 kernels, stride 4 | 125 | 1 | the layer's last run (run 96, FirstOutput 288000): 2400 points of kernel 95, padded to 3000 | 162,388 |
| VGG16 conv1 | 3×224×224 input, 3×3 kernels, pad 1 | 2000 | 1 | the second run (FirstOutput 48000): 48000 points across kernels 0 and 1 | 294,529 |
| VGG16 last fully connected layer | 144×144 tiles | 6 | 24 | two input tiles, the second adding the first's partial sums | 1,009 per tile |

## Size

Yosys coarse synthesis of `cnn_dfe` at its defaults gives:
- about 4.7k cells;
- 2.7k flip-flop bits;
- 0.88 Mbit of memory arrays: input buffers, carry arrays, delta buffers and
  FMem.

Multipliers:
- conv1 forward has 9 taps and conv2 forward has 72 (PAR 8 × 9 taps);
- each backward convolution has 9 error taps plus 9 weight-update products;
- the fully connected engines have 12 lanes each, and the backward ones have
  12 more for the weight updates.

## Verification

Each module has a self-checking testbench. It compares every output against
a reference model written in the testbench, and checks the cycle counts where
a rate is defined. Each ends with a `TB_RESULT checks=… failures=…` line and
has a watchdog.

`tb_cnn_dfe` runs one complete training step of one sample through the
validation network at full size, with the top's default parameters:
- about 15.5 M cycles in total, most of them reloading conv2's 12544-point
  input for each of its 523 runs;
- 10872 fully connected runs.

The testbench acts as host and memory. For every run it loads FMem, sets the
control word, streams the inputs and collects the outputs. It checks every
output point, every weight-update value and every padding point against its
own reference. That is about 5.7 M checks.

It also lowers MemControl at random, and puts random gaps in the partial-sum,
error and pooling-input streams. It fails unless each of the following
happened at least once:
- MemControl holds;
- partial-sum stalls;
- burst padding;
- partial-sum additions;
- a single-kernel (or single-channel) run;
- weight-update vectors.

The full-size run takes about 3 minutes, including the build.

To simulate with Verilator (5.x):

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/cnn_pkg.sv tb/tb_cnn_dfe.sv --top-module tb_cnn_dfe -Mdir obj_cnn
./obj_cnn/Vtb_cnn_dfe
```

To run a single module, replace `tb_cnn_dfe` with its testbench, for example
`tb_conv_fprop`. The module testbenches override parameters to stay small.
For example, `tb_conv_fprop` uses a 4-channel 7×7 input with stride 2 and
PAR 2. The top is parameterised too: `IN_CH`, `IN_DIM`, `N_KER`, `KSIZE`,
`STRIDE`, `PAD`, `POOL_W`, `POOL_S`, `CONV1_BM`, `CONV2_PAR` and `FC_PAR`.
The testbench's local parameters must match any change to them.
