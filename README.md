# Shift-and-add and XNOR accelerators for low-power vision networks

In a neural-network accelerator, much of the logic and energy goes into the
multiply-accumulate (MAC). This RTL has two ways of making the MAC cheap, and
they live side by side in one top level:

* **Power-of-two (PoT) layer.** Weights are quantised to signed powers of two
  in 4 bits, so `activation × weight` becomes a shift and a conditional
  negation. A row of bitshift-and-accumulate (BAC) processing elements shares
  one INT8 activation stream. A requantisation unit then scales each INT32
  sum by its own FP32 factor back to INT8.
* **Binary (XNOR) CNN classifier.** Weights and activations are ±1, so a dot
  product becomes XNOR plus a population count. A LeNet5-like network for
  32×32 traffic-sign images runs as a chain of convolution blocks and dense
  blocks. Each layer's output is held in its own block RAM.

The structure follows the architectures in D. Przewłocka-Rus's dissertation on
quantisation and acceleration of neural networks for energy-efficient vision
systems (AGH Kraków). That work gives the block diagrams and the arithmetic.
Widths, protocols, layer sizes and configuration formats are this
implementation's own choices. Each one is listed below.

## 1. The PoT bitshift-and-accumulate element (`potq_pe`)

### Weight code

A 4-bit weight code `w` has two fields:

| bits | meaning |
|------|---------|
| `w[0]` | sign, 1 = negative |
| `w[3:1]` | shift amount `m` |

`m = 0` is the zero weight. `m = 1..7` stands for `±2^m × δ`, where `δ` is
the layer's smallest step. This gives 7 non-zero magnitudes plus zero, which
is what the training-time quantiser produces for 3 magnitude bits: it clips
the lowest level to zero and the top one to `max − 1`. The constant `δ` is not
applied in the PE. It is folded into the layer's FP32 scaling factor.

### Datapath

Each cycle with `en` set:

```
shifted   = a <<< m                 (INT8 sign-extended to 32 bits)
magnitude = (m == 0) ? 0 : shifted  (zero-weight multiplexer)
product   = w[0] ? -magnitude : magnitude
acc      <= acc + product
```

`load_bias` presets `acc` with the INT32 bias, and it wins over `en`. `acc`
is the register itself, so a product shows up one cycle after its `en`
cycle. The largest term is `−128 × 2^7`, which fits easily in 32 bits.

The shift goes left, and the fraction `δ` goes into the scale. The source
shows the shifter but does not give its direction.

## 2. Requantisation with FP32 scales (`requant`)

Batch normalisation is folded into the layer like this. The BN bias goes into
the integer bias. The BN multiplier goes into the quantisation scale, so each
output map has its own scale. The weights therefore stay powers of two.

`requant` applies one IEEE-754 single-precision scale per lane without a float
unit:

1. Take `|acc|` and multiply it by the 24-bit significand `1.f`. The product
   is exact, at most 56 bits.
2. Shift right by `150 − e`, rounding to nearest with ties away from zero.
3. Apply the sign `sign(acc) xor sign(scale)` and clamp to [−128, 127].

Special cases:

* A zero or denormal scale gives 0.
* A scale of 2^23 or more saturates any non-zero input.
* Infinity and NaN are not handled.

There is one register stage. The rounding mode, the saturation and the zero
point of 0 are this implementation's choices.

## 3. The PoT layer (`pot_linear_layer`)

`N_PE` PEs (default 8) share the input activation. Each PE has its own column
of weights, its own bias and its own scale. Everything is loaded through
simple write ports:

| port group | meaning |
|------------|---------|
| `wmem_we/addr/data` | word `i` = the codes of all PEs for input `i`; PE `p` uses bits `4p+3:4p` |
| `bias_we/idx/data` | INT32 bias of PE `idx` |
| `scale_we/idx/data` | FP32 scale of PE `idx` |

To compute one output vector:

1. Pulse `start`. This presets the accumulators with the biases and raises
   `busy`.
2. Stream `N_IN` activations (default 64) on `a_valid`/`a`, at most one per
   cycle. Gaps are allowed.
3. `q_valid` pulses with `N_PE` INT8 results exactly **3 cycles** after the
   last activation: one cycle to read the weight word, one in the PE, one in
   `requant`. `busy` then falls.

The pipeline is: input count and synchronous weight read, then the PEs, then
ReQ. An assertion checks that `start` does not arrive while a product is still
in flight. The source calls this both a convolution layer and a simplified
linear layer. The structure is the same for both: PEs fed with activations in
window order compute a convolution. The layer has no window controller of its
own. `tb_pot_resnet_conv` plays that role for 3×3 layers with zero padding.
It streams the 9·C activations of each output pixel, so each output pixel
takes 9·C + 5 cycles.

## 4. The binary CNN (`xnor_accelerator`)

### Arithmetic

A ±1 value is stored as one bit, with 1 for +1. For an N-bit window `x` and a
filter `w`:

```
dot(x, w) = 2 · popcount(XNOR(x, w)) − N
```

`xnor_acc` adds the filter's 16-bit bias to this in the same registered stage.

### Convolution block (`conv_block`)

The block is parallel over filters. It is a chain of five stages:

1. **Context generator** (`context_gen`). Pixels with C binary channels
   arrive in raster order. K−1 line buffers and a K×K register window produce
   every fully-inside window: stride 1, no padding. The window appears one
   cycle after the pixel that completes it. The bit order is
   `win[(r*K + c)*C + ch]`, with `r = 0` the oldest row.
2. **XNOR + Acc**, one per filter. Each has its weight register and its bias
   register.
3. **Max filter** (`max_filter`). 2×2 max pooling with stride 2 on the signed
   sums. It keeps a line of half-width partial maxima.
4. **Point processing element** (`ppe`), one per filter. It computes
   `val = x·mul + add` from the filter's BN register, and outputs 1 (+1) if
   `val ≥ 0`.
5. Output: one pooled pixel with one bit per filter.

An output pixel leaves **4 cycles** after the input pixel that completes its
pooling window. Pooling is placed before BN, as in the source block diagram.
The two orders agree only when the BN multiplier is positive. Negative
multipliers are supported and computed in this order.

### Dense block (`dense_block`)

1. The input vector arrives as `N_IN/IN_W` chunks.
2. For each chunk, one word of the weight RAM is read. It holds the chunk's
   weights for every neuron.
3. All `N_OUT` neuron counters add `popcount(XNOR)` in parallel (the "XNOR
   ACC").
4. After the last chunk, a **serializer** emits one neuron per cycle, with
   `2·count − N_IN + bias`, through a single PPE.

The first neuron leaves 5 cycles after the last chunk. Each output bit can
feed the next dense block directly, with `IN_W = 1`. An assertion checks that
a new vector does not finish before the serializer has drained.

### Default network and frame flow

```
input BRAM 32×32×3 ─ reader ─ CB1 (5×5, 6 filters) ─ writer ─ BRAM 14×14×6
  ─ reader ─ CB2 (5×5, 16 filters) ─ writer ─ BRAM 5×5×16
  ─ FC reader (25 words of 16 bits) ─ DB1 400→120 ─ DB2 120→84 ─ DB3 84→43 ─ scores
```

Layer sizes follow LeNet5, with 43 outputs for the German traffic-sign
classes. The source only says "similar to LeNet5" with a 32×32 input. The
input is three binary channels. How a camera image is binarised is outside
this design.

A layer starts when the previous layer's map is complete in its BRAM
(`fm_writer.done` → `fm_reader.start`). The reader sends one word per cycle.
The output of the last dense block is the BN value of each class neuron. It
comes out as `score_valid/score_idx/score`, one class per cycle. `done` pulses
with the last class.

**Frame overlap.** Frames overlap between layers:

* `ready` rises once layer 1 has written its map. A new `start` is then
  accepted while layers 2–5 finish the previous frame. A `start` while
  `ready` is low is ignored, and an assertion flags it.
* `in_ready` allows the next image to be written into the single input BRAM
  right behind layer 1's reader. The RAM is read-first, so the address being
  read in a cycle may also be written in that cycle.

With the defaults, a frame takes **1518 cycles** from `start` to `done`, and a
new frame can start every **1031 cycles**. At 100 MHz that is about 97,000
frames/s for the classifier alone. Layers 2–5 together take less time than
layer 1, so they can never be overtaken. The source does not describe how
frames overlap. This is one reading of "semi-pipelined".

### Configuration bus

Every weight, bias and BN register of the XNOR network is written through one
bus, `cfg_t` (in `xnor_pkg`):

```
{en, target[3:0], row[15:0], col[15:0], data[31:0]}
```

Layer `L` (0 = CB1, 1 = CB2, 2 = DB1, 3 = DB2, 4 = DB3) owns three targets:

| target | conv block | dense block |
|--------|------------|-------------|
| `3L` weights | row = filter, col = 32-bit word of the window bits | row = chunk, col = neuron, `data[IN_W-1:0]` |
| `3L+1` bias | row = filter, `data[15:0]` signed | row = neuron, `data[15:0]` |
| `3L+2` BN | row = filter, `data[31:16]` = mul, `data[15:0]` = add | same, per neuron |

Registers are not reset. Load them before the first frame.

## 5. Top level (`vision_accel_top`)

The top holds the PoT layer (ports `pot_*`) and the XNOR classifier (ports
`xn_*`). They share only `clk` and the active-low asynchronous `rst_n`. The
parameters are `POT_N_PE = 8` and `POT_N_IN = 64`. Port meanings and timing
are those of the two modules above.

## 6. Parameters

| module | parameter | default | source |
|--------|-----------|---------|--------|
| `pot_pkg` | activation / weight / accumulator / scale widths | 8 / 4 / 32 / 32 | source design |
| `pot_linear_layer` | `N_PE`, `N_IN` | 8, 64 | chosen here |
| `requant` | `LANES` | 8 | chosen here |
| `xnor_pkg` | image size | 32 | source design |
| `xnor_pkg` | channels, kernels, filters, dense sizes | 3; 5,5; 6,16; 120, 84, 43 | chosen (LeNet5) |
| `xnor_pkg` | sum / BN / value widths | 16 / 16 / 32 | chosen here |

## 7. Where this differs from the published design

Points where the published block diagrams are drawn differently, or where
they say nothing and a choice had to be made:

* **Per-channel and per-map memories.** The block diagram shows a stack of
  input-channel BRAMs and feature-map BRAMs, with a context generator per
  stack entry. Here each layer keeps all of its maps in one RAM whose word
  holds one bit per map. A single context generator carries all channels of
  a window. The data and the timing are the same as for parallel one-bit
  RAMs.
* **Accumulation.** The diagram draws the Acc with a feedback path. Here the
  whole K×K×C window is counted in one cycle, so no accumulation over passes
  is needed. The Acc adds only the bias.
* **BN form.** Batch normalisation is `x·mul + add` on 16-bit integers
  before the sign. How the published design stores its BN parameters is
  not given.
* **Frame rate.** The published system reports almost 450 frames/s at
  100 MHz. That figure is for the whole traffic-sign system, detection on
  the camera image included. The roughly 97,000 classifications/s quoted
  above are for this classifier alone, fed from its input RAM.
* **PoT details.** The shift direction, the place of `δ` in the scale, the
  code layout, the rounding mode and the saturation are all choices made
  here (sections 1 and 2).
* **Sizes.** The sizes of the PoT layer and the XNOR layers are not given.
  The defaults in section 6 are choices made here.

## 8. Not included

* **The Siamese tracker.** The tracker's neural-network branch was generated
  with the FINN framework, so its insides are not available to write as RTL.
  Its pre- and post-processing (crop, pack, cross-correlation, upsampling,
  localisation) runs as software on the host processor.
* **The traffic-sign *detection* front end.** Only the classifier network is
  described in enough detail.
* **Baseline MAC units** (linear 4×8 and 8×8, additive powers of two). These
  are comparison points, not part of the design.
* **Training-time quantisation and pruning.** These are not hardware.

## 9. Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed independently in the testbench: integer dot products,
double-precision scaling, and a bit-level reference model of the binary
layers in `tb/xnor_ref_pkg.sv`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_potq_pe` | all 16 weight codes, bias preset, extreme values |
| `tb_requant` | random scales of both signs, ties, zero scale, saturation both ways, latency |
| `tb_pot_linear_layer` | default 8×64 layer, input gaps, 3-cycle latency |
| `tb_context_gen`, `tb_max_filter` | window contents, valid timing, frame wrap, with gaps |
| `tb_xnor_acc`, `tb_ppe` | dot product and bias; BN with a zero result |
| `tb_fm_bram`, `tb_fm_reader`, `tb_fm_writer` | RAM read-first behaviour; controller address sequences and done pulses |
| `tb_conv_block`, `tb_dense_block` | reduced layers against the reference model, with latencies (4 and 5 cycles) |
| `tb_xnor_accelerator` | full default network, three overlapping frames, all 43 scores per frame, latency 1518 |
| `tb_vision_accel_top` | both accelerators at default sizes, concurrently |
| `tb_pot_resnet_conv` | whole 3×3 ResNet layers on resized PoT layers: ResNet20 16→16 channels at 32×32 (16 PEs × 144 inputs), and an 8-channel slice of ResNet18's 64→64 layer at 56×56 (8 PEs × 576 inputs); 41,472 outputs checked |

`tb_vision_accel_top` counts each mechanism and fails if any of them never
happens:

* zero and negative PoT weights;
* input gaps;
* saturation at both ends;
* each BRAM completing;
* each serializer running;
* a frame starting while another is in flight.

Every testbench was also run against a copy of its module with one deliberate
bug, such as XOR instead of XNOR, truncation instead of rounding, or a
dropped zero-weight multiplexer. Each of those runs fails.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pot_pkg.sv rtl/xnor_pkg.sv tb/xnor_ref_pkg.sv tb/tb_vision_accel_top.sv \
    --top-module tb_vision_accel_top -o sim
./obj_dir/sim
```

The full-size top-level run takes well under a second.

## 10. How far to trust it

* Everything was lint-checked and simulated with Verilator, and parsed and
  synthesised with Yosys (slang front end). It has **not** been run on an
  FPGA, and there are no timing constraints.
* At default sizes the top synthesises to about 2,600 word-level cells
  (before technology mapping), 1,600 flip-flop bits and 92 kbit of RAM.
* The behaviour matches the reference models above. Those models encode the
  same reading of the source as the RTL. Choices such as the weight-code
  layout, the rounding mode, the BN form and the pooling window are therefore
  tested for self-consistency, not against the original implementation.
* Verilator reports `SYNCASYNCNET` on `rst_n`. This happens because the
  assertions sample `rst_n` synchronously while the flip-flops reset
  asynchronously. It is intentional.
