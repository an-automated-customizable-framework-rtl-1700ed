# An 8-bit CNN accelerator with a convolution engine and a shape engine

This accelerator runs quantized convolutional networks such as YOLOv4-Tiny
layer by layer. It is built around one observation: almost all of the
arithmetic in such networks is convolution, and the rest is cheap data
reshaping. Pooling, upsampling, concatenation, channel split and element-wise
addition change the shape of the data, not the amount of arithmetic.
So the hardware has two engines:

* **Conv**: a wide multiply-accumulate array fed from on-chip weight and
  feature buffers, followed by requantization back to 8 bits.
* **Shape**: a small streaming unit with one operator per reshaping
  operation.

Several such cores can be placed side by side. One core's convolution
output can then be broadcast straight into the convolutions of other cores,
so layers that share an input run at the same time.

A host drives both engines through a register file, using a short
instruction stream. Both engines read and write external memory through
burst DMA. The Conv output can also stream straight into Shape, so that a
convolution followed by pooling makes one trip through memory, not two.

Two techniques raise the multiply rate:

* Every multiplier computes two 8-bit products at once, because the two
  weights share an activation (see "Two products per multiplier").
* The array processes 8 input channels x 8 output channels per cycle.

The source describes a generator that emits such accelerators from a
parameter set. This RTL is one instance of that family, written by hand at
the default configuration. Its parameters keep the knobs that matter for
timing and size:

| Parameter | Default |
|---|---|
| burst size | 32 bytes |
| multiplier delay | 3 cycles |
| adder delay | 1 cycle |
| buffer read delay | 2 cycles |
| total on-chip buffer | 1 MiB |

## Data format

Everything is 8-bit, unsigned, with a zero point:

* Activations are unsigned 8-bit with a zero point.
* Weights are signed 8-bit.

One 64-bit memory word holds eight channels of one pixel (lane *i* =
channel 8g+*i*). A tensor of C channels, H rows and W columns is stored
**channel-group major**:

    word index = g*H*W + h*W + w,   g = c/8, lane = c%8

The layout makes two operations trivial:

* Concatenating two tensors along channels is just placing them one after
  the other in memory.
* Splitting off the upper channels is just skipping a prefix of words.

Channel counts are multiples of 8 in practice. A partial last group is
allowed; its spare lanes carry whatever the producer wrote there.

## Control: registers and instructions

The host never touches the engines directly. It pushes 48-bit instructions
`{opcode[7:0], address[7:0], data[31:0]}` into a FIFO in the Instruction
unit:

| opcode | meaning |
|---|---|
| 0 NOP | nothing |
| 1 WRITE | write `data` to register `address` |
| 2 WAIT | stall the stream until the engines selected in `data[1:0]` are idle (bit 0 Conv, bit 1 Shape) |

Writing a ControlReg with bit 0 set starts that engine. An engine counts as
busy until its DMA has written its last result to memory, not merely until
the result has left the engine. A WAIT therefore makes the next layer safe
to read it. Dependent layers are
separated by a WAIT. Independent layers are not, so Conv and Shape can run
concurrently, for example a pooling layer on one branch while a convolution
runs on another. The host can read any register back combinationally
(`host_rd_addr` / `host_rd_data`).

Register map (32-bit registers):

| addr | register | fields |
|---|---|---|
| 0x00 | Conv StateReg | [1] done, [0] busy (read only) |
| 0x01 | Conv ControlReg | [0] start, [1] send output to Shape instead of memory, [2] send output to other cores, [3] take features from core [7:4] |
| 0x02 | Conv ImageSizeReg | [31:22] input channels, [21:11] columns, [10:0] rows |
| 0x03 | Conv ParamReg | [31] stride 2, [30:23] Z3 (output zero point), [22:20] number of Z1, [19:12] Z1 (input zero point), [11] activation enable, [10] padding enable, [9:0] output channels |
| 0x04 | Conv ConvTypeReg | [31:16] first layer, [15:0] kernel: 1 = 1x1, 3 = 3x3 |
| 0x05 | Conv ParamCountReg | [31:16] quantization words, [15:0] weight words |
| 0x06 | Conv AmendmentReg | signed constant added after scaling |
| 0x07-0x0A | Conv DMA | write address, write length, read address, read length (bytes) |
| 0x10 | Shape StateReg | [1] done, [0] busy |
| 0x11 | Shape ControlReg | [0] start, [3:1] operator (0 maxpool, 1 upsample, 2 concat, 3 split, 4 add), [4] take input from Conv, [15:8] output zero point |
| 0x12 | Shape DataSizeReg | [31:22] channels of input 1, [21:11] columns, [10:0] rows |
| 0x13 | C2Reg | channels of input 2 (concat) / first kept channel (split) |
| 0x14-0x17 | S1, S2, Z1, Z2 | scales (Q16.16) and zero points of the two inputs |
| 0x18-0x1B | Shape DMA | write address, write length, read address, read length (bytes) |

"Number of Z1" and "first layer" are stored but change nothing in this
implementation.

## The Conv engine

One start runs one layer. It has three phases.

**Load.** The read DMA streams one region of memory into the engine, in this
order:

1. `n_qparams` quantization words, one per output channel:
   * bias in [31:0]
   * 16-bit multiplier in [47:32]
   * 6-bit shift in [53:48]
2. `n_weights` weight words.
3. The input feature map.

Weight words are ordered by:

1. output group of 8
2. kernel row
3. kernel column
4. input group of 8
5. eight words, one per output channel, each holding that channel's eight
   input-channel weights

If both counts are zero, the previous layer's parameters are kept, which
lets a layer be rerun on new data.

The two buffers:

* The **weight buffer** (8192 rows of 512 bits) is eight 64-bit banks, so
  one read returns a whole 8x8 weight block.
* The **feature buffer** (65,536 words) holds the whole input map.

Together they are the 1 MiB of on-chip cache, split half and half.

**Compute.** A window generator walks these loops:

1. output group
2. output row
3. output column
4. kernel row
5. kernel column
6. input group

It issues one *beat* per cycle: a feature word and an 8x8 weight block. The
feature word goes through a preprocessing stage that subtracts the input
zero point and substitutes zero for positions in the padding. The engine
supports:

* 3x3 kernels with optional one-pixel padding, and 1x1 kernels
* stride 1 or 2

The compute array multiplies the 8 activations by the 8x8 block, sums each
row in an adder tree and accumulates over the beats of one output pixel.

**Requantize and drain.** Each finished pixel becomes one output word. Per
output channel:

    y = (acc + bias) * mult + amend
    y = y * 13 / 128                       if activation enabled and y < 0   (leaky ReLU, slope ~0.1)
    q = clamp_0_255( round(y / 2^shift) + Z3 )

The result enters a 32-word output FIFO that drains to the write DMA or to
Shape. The issue logic counts words in flight and pauses before the FIFO
could overflow. A slow memory therefore stalls the array rather than
dropping data.

**Timing.** With a free-flowing output, a layer costs one cycle per beat:

    out_groups * out_rows * out_cols * K * K * in_groups

plus the pipeline depth:

    buffer read (2) + preprocessing (1) + multiply (3) + add (1) + accumulate (1) + requantize (2)

The load phase costs one cycle per word, as fast as the memory delivers.

The delays are parameters (`MUL_LAT`, `ADD_LAT`, `BUF_LAT`). With the
largest settings the source lists (6, 3 and 4), the Conv test still gives
exact results. The only change is a pipeline 5 cycles deeper.

### Two products per multiplier

An FPGA DSP slice multiplies 25-27 bits by 18 bits, which is far more than
one 8x8 product needs. Each multiplier here is used in the (A+D)xB form. Two
weights that meet the same activation are packed into one operand:

    P = (wa * 2^18 + wd) * x

The two products are then recovered from P:

* The low product wd*x is the sign-extended `P[17:0]`.
* The high product wa*x is `(P - low) >>> 18`.

Activations are 9-bit signed after the zero point is removed, so each
product fits in 17 bits and the two never overlap. An 8x8 array therefore
needs 32 multipliers instead of 64. The multiplier is pipelined
`MUL_LAT` = 3 stages so synthesis can map it onto the DSP's internal
registers.

## The Shape engine

Shape reads a tensor through its own DMA and passes each word through an
input switch to one operator. An output switch collects the results for
the write DMA. The operator is chosen by ControlReg[3:1]. The operation ends
when the write length has been produced.

| operator | what it does | notes |
|---|---|---|
| max pool | 2x2 window, stride 2 | line buffer of cols/2 words; odd edges dropped |
| upsample | 2x nearest neighbour | each word emitted twice, each row replayed from a line buffer |
| concat | the two inputs, back to back | every lane rescaled to the output: `q = clamp(Zo + round((x - Z) * S / 2^16))`, using (S1, Z1) for the first c1/8*H*W words and (S2, Z2) after |
| split | keeps channels from C2 up | drops the first C2/8*H*W words |
| add | element-wise sum of two equal tensors | `q = clamp(Zo + round(((a-Z1)*S1 + (b-Z2)*S2) / 2^16))` |

For **add** the two operands lie back to back in memory. The read DMA runs
in *split mode*: bursts alternate between the first and second halves (A0,
B0, A1, B1, ...), and every word is tagged with its half. A words wait in a
small FIFO until their B partner arrives. This keeps the buffering at one
burst, whatever the tensor size.

With ControlReg[4] set, Shape takes its input from the Conv output stream
instead of its DMA. For that, the Conv engine must be started with its
ControlReg[1] set. This is how a convolution and its pooling run as one
fused pass.

## Memory side

Each engine owns a DMA with separate read and write engines, programmed by
address and byte length. Lengths are multiples of 8 bytes, and bursts are at
most `BURST_BYTES` = 32 bytes = 4 words. The external port is a simplified
AXI-like protocol:

* Read and write address channels carry the address and `len` = beats-1.
* Read and write data channels carry 64-bit data with `last`.
* One burst is outstanding per direction.

A write burst is requested only once its data is fully buffered. Otherwise
one engine could hold the write channel while waiting for data that depends
on a read that the other engine's burst is blocking.

The two DMAs share the port through a round-robin arbiter. It holds the read
or write channel for the whole burst, until the `last` beat.

## Several cores

`nna_multicore` holds `NUM_CORES` complete cores. The default is one core;
the structure is meant for up to four. Each core has its own instruction
stream and its own external memory port.

The cores are linked only through their Conv engines. This serves a common
pattern: a convolution whose output is the input of two or more following
convolutions. Examples are the two expand layers of a SqueezeNet Fire block,
or the branches of a YOLO cross-stage block. Without the link, the shared
map would be written to memory and read back once per consumer. With it,
the producer streams its output once and every consumer computes at the
same time.

Setting it up:

* The **producer** sets Conv ControlReg[2]. Its output then goes to the
  other cores instead of its write DMA.
* Each **consumer** sets ControlReg[3] and puts the producer's core number
  in ControlReg[7:4]. Its read DMA region holds only the quantization words
  and weights; its read length is set to match. The feature map comes from
  the producer.

The handshake is a broadcast. A consumer *listens* while its Conv engine is
busy on such a layer, and it is *ready* while it waits for feature words. A
producer word moves only in a cycle when every listening consumer is ready,
and all of them take it together. A consumer still loading weights holds
the producer back through the producer's output FIFO; nothing is lost.

The host must start the consumers before the producer. A consumer that
starts late would miss the words already sent.

## Module hierarchy

    nna_multicore            NUM_CORES cores + Conv-to-Conv broadcast
    `- nna_top (per core)
       |- instruction        instruction FIFO, WRITE/WAIT execution
       |- csr                register file, start pulses, status
       |- conv_core          Conv engine
       |  |- weight_buffer   8 banks x 64 bit
       |  |- feature_buffer
       |  |- data_preproc    zero point / padding
       |  |- conv_compute    8x8 array, adder trees, accumulators
       |  |  `- dsp_mul2     two products per multiplier
       |  |- quantization
       |  `- sync_fifo       output FIFO
       |- shape_core         Shape engine: switch + operators
       |  `- maxpool, upsample, concat, split, add
       |- dma (x2)           Conv DMA, Shape DMA (sync_fifo inside)
       `- mem_arbiter

`nna_pkg` holds the shared types:

* register addresses
* instruction and opcode types
* the decoded Conv configuration
* the shared arithmetic helpers: saturation and Q16.16 rescaling

Every file begins with a comment giving its interface and cycle timing.

## Where this design departs from the generator it follows

* **One configuration.** The source describes a generator that can vary the
  parameters and prune operators. This RTL is the default configuration, with the core
  count and the activation as parameters:
  * one core by default (`NUM_CORES`)
  * 8x8 parallelism
  * 8-bit data
  * leaky ReLU (plain ReLU with `LEAKY_RELU = 0`)
  * all five Shape operators

  The source's parameter table lists a data width of 4 as default, but its
  text and results use 8-bit quantization. 8 bits is what is built.
* **Not built:**
  * running the DSP at twice the clock
  * direct links from one core into another core's Shape engine (the
    multi-core link is Conv to Conv only; concat and add between cores go
    through memory)
  * the "Focus" input operator
  * the 4x4, 8x16 and 16x16 parallelism options
* **Own choices.** The source gives the engines' block structure, register
  names and field positions, the default sizes and latencies, and the DSP
  packing idea. The following are this design's own:
  * register addresses and the instruction format
  * memory layout and the Conv input stream format
  * the requantization formula
  * the operator windows (2x2 pool, 2x upsample)
  * Q16.16 scales
  * the DMA protocol and split mode
  * the arbiter
  * status bits
  * how cores are linked: the control bits, the broadcast handshake, and one
    memory port per core
* **Whole-map layers.** A layer's input map must fit the 512 KiB feature
  buffer, and its weights the 512 KiB weight buffer. Larger layers must be
  split by software: by output channels for weights, and by rows with
  overlap for features. Full-resolution YOLO inputs (416x416 and up) exceed
  the feature buffer in the first layers.
* **Peak rate.** One core peaks at 64 multiply-accumulates per cycle,
  which is 25.6 GOP/s at 200 MHz. The source reports much higher throughput
  for its 8x8 configuration. It does not explain how in enough detail to
  reproduce, so expect this design's figure, not the source's.

## Simulating

The testbenches are self-checking and need only Verilator 5. Each prints
`TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung run
as a failure. Shared testbench code is in `tb/tb_ref_pkg.sv` (a reference
model of the layer arithmetic) and `tb/ddr_model.sv` (a burst memory with
random stalls).

Build and run one block, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/nna_pkg.sv $(ls rtl/*.sv | grep -v nna_pkg) \
      tb/tb_ref_pkg.sv tb/ddr_model.sv tb/tb_nna_top.sv \
      --top-module tb_nna_top -o sim
    ./obj_dir/sim

(The package must be compiled first.) Every block has a testbench named
`tb/tb_<module>.sv`, built the same way with its own top.

`tb_nna_full` runs the complete design (`nna_multicore`) at its default
parameters. `tb_nna_top` runs the same program on a single core directly.
The program exercises:

* 3x3 convolutions with padding
* a strided convolution
* a 1x1 convolution
* Conv and Shape running concurrently
* every Shape operator
* a convolution fused with pooling
* a layer against a memory that stalls 75% of the time

Every output word is compared with the reference model. The test also counts
how often each mechanism fired (padding positions, output-FIFO credit
stalls, arbiter contention, add alternations, forwarded words, WAIT cycles)
and fails if any count is zero. It takes about 8,400 clock cycles.

`tb_nna_multicore` uses three cores on a Fire block:

* Core 0 runs a 1x1 convolution from 16 to 8 channels and broadcasts the
  result.
* Core 1 runs a 1x1 expand layer to 16 channels.
* Core 2 runs a 3x3 padded expand layer to 16 channels, against slow memory.

Cores 1 and 2 compute together. The test checks both results against the
reference model. It also checks that no squeeze output was written to
memory, and that the producer had to wait for the slow consumer.

`tb_yolo_csp` runs one cross-stage-partial block of YOLOv4-Tiny, scaled
down to 8x8 maps and a quarter of the channels, as a single instruction
program. The steps are:

1. a 3x3 convolution
2. a split keeping the upper half of the channels
3. two chained 3x3 convolutions
4. concatenation
5. a 1x1 convolution
6. a second concatenation
7. max pooling

Every intermediate tensor is checked. The test also shows how software must
lay out memory for this engine. Each layer's quantization words and weights
sit directly in front of the tensor the layer reads. A split that keeps all
channels serves as a copy, placing two tensors next to each other for a
concatenation.

The block testbenches check bit-exact results against independent models,
and check latencies where a latency is defined:

* the multiplier's 3 cycles
* the compute array's 5 cycles to a valid accumulator
* the buffers' 2-cycle read
* the Conv engine's one-beat-per-cycle rate
