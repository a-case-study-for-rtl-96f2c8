# An 8-bit convolution-stage accelerator for a face-detection CNN

A face-detection network scores each candidate region of an image with a
five-layer convolutional network, an AlexNet-shaped trunk taken from
HyperFace. This RTL runs the costly part of that network on an FPGA: one
**stage**, meaning a convolutional layer plus its bias, ReLU, requantization
and optional max pooling. Everything is in 8-bit integers. The design is
meant to be sized per stage. Each node of a small cluster of embedded FPGA
boards gets a build whose parallelism fits that stage and its DSP budget. The
nodes are chained so that candidate regions flow through them as a pipeline.

The RTL follows the accelerator described in *A Case Study for an Accelerated
DCNN on FPGA-based Embedded Distributed System*. It is an independent
implementation. Where that description is silent, the choices are this
design's own. They are listed in [Departures and open points](#departures-and-open-points).

## The network and its stages

| Layer | Input | Filters | Output | Follows |
|---|---|---|---|---|
| Conv1 + Max1 | 227×227×3 | 96 × 11×11, stride 4 | 55×55 → pooled 27×27 | Stage1 |
| Conv2 + Max2 | 27×27×96 | 256 × 5×5, pad 2 | 27×27 → pooled 13×13 | Stage2 (or 2_1 + 2_2) |
| Conv3 | 13×13×256 | 384 × 3×3, pad 1 | 13×13 | Stage3 |
| Conv4 | 13×13×384 | 384 × 3×3, pad 1 | 13×13 | Stage4 |
| Conv5 + Pool5 | 13×13×384 | 256 × 3×3, pad 1 | 13×13 → 6×6 | Stage5 |

The fully connected layers (3072 → 512 → 2) stay in software. The strides,
the padding and the 55/27/13 map sizes are the standard AlexNet values. The
source gives the input size, the filter sizes and the map counts.

Each stage has two kinds of parallelism:

* **intra-feature-map parallelism `P_IFM`**: input maps processed at once.
  Their partial results are summed by an adder tree.
* **intra-layer parallelism `P_OL`**: output maps (filters) computed at once
  on the same input data.

One *iteration* runs one group of `P_IFM` input maps against one group of
`P_OL` output maps. A layer needs `ceil(in_maps/P_IFM) × ceil(out_maps/P_OL)`
iterations:

| Stage | in → out maps | P_IFM × P_OL | Iterations |
|---|---|---|---|
| Stage1 | 3 → 96 | 3 × 48 | 2 |
| Stage2 | 96 → 256 | 96 × 3 | 86 |
| Stage2_1 / 2_2 | 96 → 126 / 130 | 96 × 3 | 42 / 44 |
| Stage3 / 4 / 5 | 256/384/384 → 384/384/256 | 128 × 2 | 384 / 576 / 384 |
| Stage3_4_5 (one build) | as above | 128 × 1 | 2688 |

**The RTL defaults are Stage1** (`P_IFM=3`, `P_OL=48`, 11×11 filters, a
227×227 input, 96 output maps). Other stages need their own parameter set
(see [Building other stages](#building-other-stages)).

## Dataflow

```
 input stream ─► data_saver ─► FIFO ─► input_quant_machine ──┐
                                                             ▼
 weights stream ─► weights_quant_machine ──────────────► conv_core
                                                             │ FIFO
                                                             ▼
 output stream ◄── max_pool_core ◄── FIFO ◄── bias_relu_requant
```

All cores use valid/ready handshakes. A stalled core only fills the queue in
front of it. One clock drives everything.

### conv_core: the MAC array and its clock enable

This is the heart of the design and the part that sets throughput.

* It holds `P_OL × P_IFM` multiply-accumulate units, one DSP each on an FPGA.
* MAC `(o, i)` convolves input map `i` with slice `i` of filter `o`, one
  output pixel at a time. It takes the `k·k` taps of the window one per cycle
  and accumulates them internally. So one DSP is time-multiplexed over all
  taps of its window.
* All MACs of lane `i` receive the same input value in a cycle. Each uses its
  own weight.
* After the last tap, an adder tree sums the `P_IFM` lanes of each output map
  into a 32-bit result.
* That tree, and the output register behind it, are enabled once every `k·k`
  cycles. This is the `ce` strobe: the input side effectively runs at clock/k².
* Layers with different filter sizes (up to `K_MAX`) run on the same array by
  programming `cfg.k`.

Weights are stored as one wide word per tap (all `P_OL·P_IFM` weights of that
tap). A single memory read per cycle therefore feeds the whole array. After
`iter_start`, the core loads `P_OL·P_IFM·k·k` weights in the order output map,
input map, tap (row-major). It refuses input until the last weight is in.

**Timing:** a stall-free iteration takes `out_h·out_w·k·k` cycles of
convolution. For Stage1 that is 55·55·121 = 366,025 cycles, or 2.6 ms at the
140 MHz that stage's convolution clock is given. Two iterations make 5.2 ms.
The measured per-region time for that stage is a few milliseconds, which is
consistent.

### data_saver: load once, replay per iteration

* **Load.** The input maps arrive once, one 8-bit code per beat, in
  height-width-channel order (channel fastest). Channel `c` goes to bank
  `c mod P_IFM`, at row `(c div P_IFM)·H·W + y·W + x`. One read then returns
  the same pixel of a whole input group.
* **Replay.** For each iteration the saver replays the selected group. It goes
  over output pixels in raster order and, inside each, over filter taps in
  raster order, so a window is `k·k` consecutive beats.
* **Padding.** Taps that fall in the padding, and lanes past the last input
  map, carry the input zero point. The next stage turns that into exactly 0.
* The memory read is synchronous (BRAM-like) and delivers one beat per cycle.

### Quantization machines

Both quantization machines subtract a zero point (`q − zp`, 9-bit signed):

* `input_quant_machine` does it on the `P_IFM` lanes of each replayed beat.
* `weights_quant_machine` does it on the weight stream, one weight per beat.

### bias_relu_requant: accumulation across input groups and the output arithmetic

A layer can have more input maps than `P_IFM`. Each output pixel then needs
several iterations, one per input group:

* the first (`acc_first`) writes its sums into a partial-sum buffer of
  `MAX_OUT_PIX × P_OL` words;
* the middle ones add to the buffer;
* the last one (`acc_last`) adds too and goes on to the output arithmetic.

The output arithmetic follows gemmlowp, with `rescale(x,m,s) = round(x·m / 2^(31+s))` and `m` a Q31 multiplier:

```
y   = rescale(acc, m1, s1) + (bias[o] − b_zp)     accumulator scale → bias scale
r   = max(y, 0)                                   ReLU
out = min(rescale(r, m2, s2) + out_zp, 255)       8-bit output code
```

The 8-bit biases of up to `N_OFM` output maps sit in an on-chip cache. The
host writes it through `bias_we/bias_addr/bias_data`.

### max_pool_core

Max pooling uses the same window walk as the convolution, with MAX in place of
multiply-accumulate, over the same `P_OL` maps:

* It stores the `out_h × out_w` map, then scans the `pool_k × pool_k` windows
  at stride `pool_s`. The scan takes `pool_k²` cycles per pooled pixel.
* Its input is held while it scans.
* Pooling the 8-bit codes directly is exact, because requantization is monotonic.
* With `pool_en` clear (Conv3, Conv4) beats pass straight through.

## Driving the accelerator

`dcnn_accelerator` is the top module. The host sequence is:

1. Set `cfg` (a `layer_cfg_t` from `acc_pkg`). It holds the input size and map
   count, `k`, `stride`, `pad`, and the output size `out_h/out_w`, which the
   host computes. It also holds the pooling settings (`pool_en`, `pool_k`,
   `pool_s`, `pool_oh/pool_ow`), the four zero points and `m1/s1/m2/s2`.
2. Write the biases of the layer's output maps.
3. Pulse `load_start` and stream the input maps on `in_*`. `loaded` rises at
   the end.
4. For each output group `og` and each input group `g`:
   * pulse `iter_start` with `cmd = {ifm_group: g, ofm_base: og·P_OL, acc_first: g==0, acc_last: g==last}`;
   * stream that iteration's weights on `w_*`;
   * collect the output beats on `out_*` when `acc_last` is set. One beat is
     one pixel of `P_OL` output maps, in raster order of the (pooled) map.
   * Wait for `iter_done` before the next `iter_start`.

Assertions check the rules: no `iter_start` while busy or before the load, the
output group within `N_OFM`, the filter within `K_MAX`, and no FIFO overflow.

## Building other stages

Each stage has its own build, as each node has its own bitstream. For example,
Stage3 needs `P_IFM=128, P_OL=2, K_MAX=3, MAX_IN_PIX=169, MAX_GRP=2, MAX_OUT_PIX=169, N_OFM=384`.

* Stage3_4_5 runs its three 3×3 layers on one build: change `cfg.in_ch`,
  `cfg.pool_en` and so on between layers.
* At the defaults, only Stage1 fits. The other stages need more bias entries
  and a different array shape.
* `MAX_GRP` only bounds the address range. The saver's capacity per lane is
  `MAX_IN_PIX·MAX_GRP` codes, shared by all groups.

## Files

| File | Content |
|---|---|
| `rtl/acc_pkg.sv` | layer and iteration structs, widths, the rescale function |
| `rtl/dcnn_accelerator.sv` | top: cores, queues, iteration control |
| `rtl/data_saver.sv` | input cache and window replay |
| `rtl/input_quant_machine.sv`, `rtl/weights_quant_machine.sv` | zero-point removal |
| `rtl/conv_core.sv` | MAC array, adder tree, weight store |
| `rtl/bias_relu_requant.sv` | partial sums, bias cache, rescale, ReLU, 8-bit output |
| `rtl/max_pool_core.sv` | max pooling / bypass |
| `rtl/stream_fifo.sv` | valid/ready queue |
| `tb/tb_<module>.sv` | self-checking unit tests |
| `tb/tb_stage1_full.sv` | the whole Stage1 layer at default size |
| `tb/tb_stage_workloads.sv`, `tb/stage_runner.sv` | Stage2_1, Stage3 and Stage3_4_5 builds on their layer sizes |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
Run one with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/acc_pkg.sv tb/tb_dcnn_accelerator.sv \
          --top-module tb_dcnn_accelerator -Mdir obj -o sim && obj/sim
```

* `tb_dcnn_accelerator` runs a reduced build (2×3 MACs) through two layers on
  the same hardware:
  * a 3×3, padded layer with 3 input groups × 2 output groups and no pooling;
  * a 5×5, stride 2 layer with 3×3/2 pooling.

  It checks every output code against a reference model and the cycle count of
  the convolution. It also requires that each mechanism occurs: weight-load
  stall, output back-pressure, partial-sum accumulation, padding, pooling and
  bypass, ReLU clamping, and the switch of filter size.
* `tb_stage1_full` runs the full-size Stage1 layer at the default parameters:
  2 iterations, 2×27×27×48 codes checked, and 366,025 convolution cycles per
  iteration checked. It takes about 20 s.
* `tb_stage_workloads` builds the top with the parallelism of three other
  stages and runs their real layer sizes:
  * Stage2_1 (96×3 MACs, 27×27×96 input, 5×5 filters, pooling): its first 2
    iterations;
  * Stage3 (128×2 MACs, 13×13×256 input, two input groups accumulated): its
    first 4 iterations.
  * a Stage3_4_5 build (128×1 MACs) on the Conv5 layer (13×13×384 input,
    three input groups, pooling to 6×6): 6 iterations.

  It uses the host and reference model in `tb/stage_runner.sv`.
* The unit testbenches use random data and random back-pressure.

## Departures and open points

* **One clock.** On the FPGA the convolutional core runs faster than the rest
  (100–150 MHz against 100 MHz). Here a single clock drives all cores, and
  there is no clock-domain-crossing FIFO.
* **Weights are loaded, then used.** An iteration's weights must all be in
  before its first window is computed. There is no double buffering, so
  weight loading adds `P_OL·P_IFM·k²` cycles per iteration.
* **Pooling buffers a whole map** rather than using line buffers. That is
  simple and exact, but it costs `MAX_OUT_PIX·P_OL` bytes and adds the scan
  time after each map.
* **The partial-sum buffer** holds a whole output map of `P_OL` 32-bit sums.
* **Bias arithmetic.** One reading of the bias step is used: rescale the
  accumulator, then add `bias − bias_zero_point`. The rounding (round half up
  with an arithmetic shift) and the clamp at 255 follow gemmlowp practice.
* **Stream formats** (NHWC byte stream for inputs, one weight per beat,
  `P_OL` codes per output beat) and the host protocol are this design's own.
* **Host-computed sizes.** The hardware has no dividers: the host supplies
  the output and pooled sizes.
* **Not in the RTL:**
  * the ARM host software and the fully connected layers;
  * the DMA engines and the DDR memory;
  * the clock generator;
  * FPGA reconfiguration between stages;
  * the Ethernet/MPI links between the six boards.
