# A 16-bit fixed-point convolution accelerator for VGG-16

More than 95 % of the run time of VGG-16 inference on a CPU goes into its
thirteen 3x3 convolution layers. The fully-connected layers hold most of the
weights but do little arithmetic. This design splits the work accordingly.
An SoC FPGA's processor keeps the fully-connected layers, pooling and softmax
in software. The FPGA fabric gets a convolution engine that reads weights and
feature maps from the board's SDRAM, computes a tile of outputs on an array
of multiply-accumulate units, and writes the results back.

Three ideas shape the hardware:

* **Dynamic fixed point.** Every number is 16 bits: a sign bit and 15 bits
  split between integer and fraction. The activations of VGG-16 range from
  about 1 to about 20,000 depending on the layer. So the split is chosen per
  layer, offline, and stays fixed at run time. Inputs, weights and results of
  one layer may each use a different split.
* **Weight broadcast over an output tile.** One weight is read per cycle and
  sent to all 25 processing elements (PEs). Each PE owns one output pixel of a
  5x5 output tile and keeps a running sum for each of the 64 output channels.
* **One block of weights on chip.** The weights for 64 input x 64 output
  channels x 9 kernel taps (36,864 words) are loaded once. They are then
  reused for every tile of the feature map.

## Block diagram

```
           host CPU (Avalon-MM slave, 32-bit registers)
                 |
         command_receiver ---- job registers ----+
                 | start                         |
           state_machine ---- requests ----> dma_controller ---- commands ----> dma <==> SDRAM controller
            |   |    |                           |   |   |                       |        (Avalon-MM master)
            |   |    |                  weights  |   |   | input words           |
            |   |    |                     v     |   |   v                       |
            |   |    |                    stp    |   |  input_memory             |
            |   |    |                     v     |   |   | 49 pixels/cycle       |
            |   |    +--- read address -> weight_memory  |                       |
            |   |                          | 1 weight/cycle                      |
            |   +--- tap, channel, MAC --> pe_array (5x5 PEs) <-- bias preset ---+
            |                              | partial sums
            +--- sweep -----------------> fixed_requant (shift, cut, ReLU)
                                           v
                                        output_memory ---------------------------> dma (store)
```

| Module | Role |
|---|---|
| `cnn_accel_top` | Wires everything together. It exposes the host register port and the SDRAM master port. |
| `command_receiver` | Host register file: addresses, tile/block/group counts, number formats, start, status and a cycle counter. |
| `state_machine` | Layer controller. It runs the load / calculate / output sequence and generates the calculation addresses. |
| `dma_controller` | Computes each transfer's SDRAM address and length. It steers the returned words to their destination. |
| `dma` | Avalon-MM master. It does pipelined block reads into a beat stream and block writes from the output memory. |
| `stp` | Reorders the weight stream from its SDRAM order into calculation order (serial to parallel). |
| `weight_memory` | 36,864 x 16-bit RAM holding one weight block. |
| `input_memory` | One 7x7x64 input tile in 49 banks. One read returns all 49 pixels of one channel. |
| `pe_array`, `pe` | 25 PEs with 64 accumulators each. Each PE has one multiplier. |
| `fixed_mul` | The dynamic fixed-point multiply. The PEs use its full-precision product. |
| `fixed_requant` | Turns a 32-bit partial sum into a 16-bit output in the layer's format, with optional ReLU. |
| `output_memory` | 1,600-word buffer for one finished output tile. |
| `cnn_pkg` | Shared types: job registers, number formats, controller states, transfer kinds. It also holds the shift formula. |

The SDRAM controller is not part of the RTL. It is the FPGA vendor's core on
the target board, and the top brings out its Avalon-MM master port.
`tb/sdram_model.sv` is a behavioural stand-in for simulation. It stalls at
random and has a fixed read latency.

## How a tile is computed

An input tile is 7x7 pixels by 64 input channels. The convolution has no
padding inside the tile, so the tile yields 5x5 output pixels. PE (r, c)
computes output pixel (r, c). For kernel tap (kr, kc) it needs input pixel
(r+kr, c+kc).

The calculation runs three nested loops, one step per clock:

```
for tap  in 0..8          (kr = tap/3, kc = tap%3)
  for ich in 0..63        input channel
    for och in 0..63      output channel
        w = weight[tap][ich][och]                 one read of weight_memory
        every PE: acc[och] += pixel(r+kr, c+kc, ich) * w
```

The output channel is the innermost loop, and this sets the rest of the
schedule:

* The input memory is read once per step, at channel `ich`. The 49-pixel slice
  stays the same for 64 cycles while the weights change.
* The 25 PEs share the same weight, so the weight memory needs only one read
  port of one word.
* A PE updates a different accumulator on each cycle. The same accumulator
  comes back only 64 cycles later, so the read-modify-write has no hazard.

The weights are stored in the weight memory in exactly this order:
address = `tap*64*64 + ich*64 + och`. The calculation then reads them
sequentially.

**Timing.** One input-channel group of one tile takes 9 x 64 x 64 = 36,864
cycles, plus 2 cycles to drain the pipeline. That is 36,866 cycles, doing
921,600 multiply-accumulates on 25 multipliers. The pipeline has two stages:

1. The address goes to the weight memory and the input memory.
2. The data arrives and the PE array does the MAC.

After the last group of a tile, the output phase sweeps all 64 x 25
accumulators through `fixed_requant` into the output memory, which takes 1,600
cycles. The DMA then stores the 1,600 words at about three cycles per word.

At the default sizes a job of one tile takes 90,723 cycles in simulation
against an SDRAM model that stalls 15 % of requests. Of these:

* about 43,000 cycles go to loading the weights;
* 36,866 cycles go to calculation;
* the rest are the bias and input loads, the re-quantisation and the store.

The weight load is paid once per weight block, not once per tile.

## Dynamic fixed point

A 16-bit value with `i` integer digits has `15 - i` fraction bits. For example,
with 3 integer digits, 3.625 is stored as 3.625 x 2^12.

The product of an input with `i_in` digits and a weight with `i_w` digits has
`30 - i_in - i_w` fraction bits. All of its 32 bits are kept. The bias is
stored in the output format, so it is shifted left to product scale before it
presets the accumulators.

A result with `i_out` integer digits is the partial sum shifted arithmetically
by

```
shift = 15 + i_out - i_in - i_w        (right if positive, left if negative)
```

and cut to its low 16 bits. The cut truncates toward minus infinity and
wraps on overflow; nothing saturates. The formats must therefore be chosen
with enough integer digits, as the per-layer tables below do. For example,
3.625 (3 digits) x 3 (2 digits) with a 4-digit result gives 10.875. The
`fixed_mul` testbench checks exactly this case.

The formats are profiled offline over sample images. The first layers of
VGG-16 use these integer digits:

| Data | Largest value seen | Integer digits |
|---|---|---|
| input image | 255 | 8 |
| layer 1 output | 956 | 10 |
| layer 2 output | 3,689 | 12 |
| layer 3 output | 8,024 | 13 |
| layers 4-6 output | up to 15,991 | 14 |
| layer 7 output | 20,797 | 15 |

The format register holds three 4-bit digit counts and a ReLU enable. ReLU
runs at the output, before the cut, based on the sign of the full sum.

The accumulator is 32 bits (`ACC_W`). A 64-channel group adds 576 products to
the bias. If the formats leave the products large, the sum wraps. The
reference model in the testbenches wraps the same way.

## Data layout in SDRAM

All addresses count 16-bit words. The host prepares the following layout. The
accelerator only computes base plus offset.

* **Weights.** Each block is stored as, for each input-channel group, for
  each output channel, for each input channel, the 9 taps in row-major order.
  The tap index changes fastest. `stp` converts this order into calculation
  order on the fly. Block `b` starts at `w_base + b * groups * 36,864`.
* **Bias.** 64 words per block, at `b_base + b*64`, in the output format.
* **Input tiles.** Each tile is stored as, for each group, for each channel,
  the 49 pixels in row-major order. Tile `t`, group `g` is at
  `in_base + (t*groups + g) * 3,136`. Neighbouring tiles overlap by two pixels
  and carry the layer's zero padding. Cutting them out is the host's job.
* **Output tiles.** Each tile is stored as 64 channels of 25 pixels in
  row-major order, at `out_base + (b*tiles + t) * 1,600`.

## Controller sequence

`state_machine` has seven states: initial, load weight, load bias,
load input, calculate, output and end. A job runs them as follows:

```
initial --start--> load weight --> load bias --> load input --> calculate --> output --> end --> initial
                        ^              ^             ^              |            |
                        |              |             +--- next group+            |
                        |              +------------ next tile ------------------+
                        +--------------------------- next weight block ----------+
```

* **Weight blocks.** A job covers `blocks` weight blocks. Each block is 64
  output channels.
* **Tiles.** Each block runs over `tiles` tiles. The bias is reloaded for
  every tile, because it is what clears the accumulators.
* **Groups.** Each tile sums `groups` input-channel groups of 64 channels.
  The partial sums stay in the PEs between groups.

`groups` cannot exceed the `GROUPS` parameter, because all groups of a block
must fit in the weight memory.

## Host interface

The register port is an Avalon-MM slave with 32-bit data. Reads return their
data one cycle after the request.

| Word | Register |
|---|---|
| 0 | Write bit 0 = start. Read: bit 0 = busy, bit 1 = done (cleared by the next start). |
| 1 | Weight base |
| 2 | Bias base |
| 3 | Input base |
| 4 | Output base |
| 5 | Tiles per block (16 bits) |
| 6 | Bits 7:0 = weight blocks, bits 15:8 = input-channel groups |
| 7 | Bits 3:0 = result digits, bits 7:4 = weight digits, bits 11:8 = input digits, bit 12 = ReLU |
| 8 | Cycles of the last job |

Job registers are ignored while a job runs. `irq` pulses for one cycle when a
job ends.

The SDRAM port is an Avalon-MM master with 16-bit data and word addresses.
Reads are pipelined: one request per cycle while `waitrequest` is low, and
data comes back in order with `readdatavalid`. There are no bursts. Assertions
in `dma` check the Avalon hold rule: a stalled request keeps its address and
data.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CH_IN` | 64 | Input channels per group |
| `CH_OUT` | 64 | Output channels per weight block, and accumulators per PE |
| `TILE` | 7 | Input tile edge. The output tile edge is `TILE-K+1` = 5, so there are 25 PEs. |
| `K` | 3 | Kernel edge |
| `GROUPS` | 1 | Input-channel groups whose weights fit on chip at once |
| `ACC_W` | 32 | Accumulator width |

At the defaults, synthesis maps 716,800 memory bits:

* 589,824 bits of weights;
* 51,200 bits of accumulators;
* 50,176 bits of input tile;
* 25,600 bits of output tile.

It also maps about 900 flip-flops and 25 16x16 multipliers.

## Which VGG-16 layers fit

This follows from the default sizes, the VGG-16 layer shapes and 3x3
kernels. Padding 1 is the standard VGG-16 setting.

| Layers | Feature map | Channels in -> out | Groups needed | Runs at defaults |
|---|---|---|---|---|
| conv1_1 | 224x224 | 3 -> 64 (zero-padded to 64 in) | 1 | yes, 2,025 tiles |
| conv1_2 | 224x224 | 64 -> 64 | 1 | yes, 2,025 tiles |
| conv2_1 | 112x112 | 64 -> 128 | 1 | yes, 2 blocks x 529 tiles |
| conv2_2 | 112x112 | 128 -> 128 | 2 | needs `GROUPS=2` |
| conv3_x | 56x56 | 128/256 -> 256 | 2-4 | needs `GROUPS=4` |
| conv4_x | 28x28 | 256/512 -> 512 | 4-8 | needs `GROUPS=8` |
| conv5_x | 14x14 | 512 -> 512 | 8 | needs `GROUPS=8` |

With the default single weight block on chip, layers with more than 64 input
channels cannot finish inside the accelerator. Summing per-group outputs in
software is not equivalent, because each output is already cut and passed
through ReLU. Building with `GROUPS=8` makes every layer run. The weight
memory then grows to 294,912 words (4.7 Mbit), which is more block RAM than
small SoC FPGAs offer. The fully-connected layers always run on the host.

## What comes from the original design and what does not

The following come from the original design:

* the split of work between CPU and FPGA;
* the 16-bit dynamic fixed-point scheme and its truncating multiply;
* the block set (command receiver, state machine, DMA controller, DMA, STP,
  weight / input / output memories, PE array, SDRAM controller);
* the 64x64x9 weight block and the 7x7x64 input tile;
* the order of the calculation loops;
* the seven controller states and their three loop-backs.

The following are this implementation's own choices:

* **Bus and registers.** The Avalon-MM buses and the register map.
* **PEs.** One PE per output pixel with per-channel accumulators, and the
  25-PE array size.
* **Memories.** Banking the input memory by pixel position, and the one-cycle
  read latency of all memories.
* **STP.** Reading "STP" as the stage that reorders the weight stream.
* **Bias.** Presetting the accumulators with the bias.
* **Formats.** Applying ReLU in hardware, the 32-bit accumulator and the
  4-bit digit fields.
* **Controller.** What each loop-back of the controller counts (group, tile,
  weight block), and the `GROUPS` extension.
* **Tiling.** The tiling convention: 7x7 inputs, 5x5 valid outputs,
  overlapping tiles prepared by the host.
* **SDRAM layout.** The layout of bias and output tiles in SDRAM.

A Winograd variant was evaluated for the original design and then set aside.
It is not implemented here. Pooling and softmax are left to the host.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/cnn_pkg.sv \
    tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top
./obj_dir/Vtb_cnn_accel_top
```

| Testbench | What it covers |
|---|---|
| `tb_cnn_accel_top` | End to end at reduced sizes (4 -> 3 channels, 5x5 tiles, `GROUPS=2`). It runs two jobs that together take every controller loop, SDRAM stalls, ReLU on and off and two number formats, and checks every output word against a direct fixed-point convolution. |
| `tb_cnn_accel_full` | One tile at the default sizes, with the first-layer formats. It checks all 1,600 outputs and the 36,866-cycle calculate phase. |
| `tb_vgg_conv_workload` | A 128 -> 128 channel slice shaped like conv2_2, with `GROUPS=2`: 2 blocks x 2 tiles x 2 groups. |
| `tb_<module>` | Unit tests for each block: reference models, random stimulus, and timing and order checks. |

`tb/accel_job.svh` holds the host model and the reference convolution
shared by the three end-to-end benches.
