# Mixed-precision weights LeNet-5 accelerator

A LeNet-5 classifier for 28x28 grayscale images (Fashion-MNIST) in which every
weight layer has its own weight precision. Activations are IEEE 754 half
precision (binary16) throughout. Each weight layer stores its weights in one of
three *weight spaces*:

| Space | Values | Bits per weight | Product `w * x` formed by |
|---|---|---|---|
| F | half-precision float | 16 | a half-precision multiplier |
| B | {-1, +1} | 1 | **XSB**: one XOR gate |
| T | {-1, 0, +1} | 2 | **TBO**: one XOR and 15 AND gates |

The default build is **FTTTF**. The first convolution and the final classifier
layer keep float weights. The three middle layers, which hold 43,200 of the
44,190 weights, are ternary. Weight storage drops from 707,040 bits (all F) to
102,240 bits. None of the ternary layers needs a multiplier.

The weight space of each layer is an elaboration parameter. The same RTL
therefore builds any other combination, such as FBTBF, FFFFF or TTTTT.

## Multiplying without a multiplier

A binary16 value is `s | e[4:0] | m[9:0]`. When one operand of a product is
±1 or 0, the product needs no arithmetic, only bit operations.

**XSB (XOR signed-bits), B weights.** A binary weight is stored as a lone sign
bit: `1` means −1 and `0` means +1. The product is the activation with its sign
bit XORed with the weight bit:

    y = {w ^ x[15], x[14:0]}

**TBO (ternary bitwise operation), T weights.** A ternary weight is a 2-bit
two's-complement number: `2'b11` = −1, `2'b00` = 0, `2'b01` = +1. Bit 1 is
the sign and bit 0 says "non-zero". The product is:

    y = {w[1] ^ x[15], x[14:0] & {15{w[0]}}}

A zero weight clears exponent and mantissa, which leaves a signed zero. For a
negative activation that zero is −0. Downstream this causes no harm: −0 + a = a,
and ReLU maps −0 to +0. The code `2'b10` (−2) never occurs in a ternary layer;
if it did, it would produce a zero with a flipped sign.

Both operations are purely combinational (`rtl/xsb.sv`, `rtl/tbo.sv`).
`rtl/weight_mul.sv` picks `half_mul`, `xsb` or `tbo` for a lane according to
the layer's weight space.

## The network

    image 1x28x28 (half)
    Conv#1  6 x 5x5 (W1=F) -> BN#1 -> ReLU -> 2x2 max-pool   ->  6x12x12
    Conv#2 16 x 5x5 (W2=T) -> BN#2 -> ReLU -> 2x2 max-pool   -> 16x4x4
    flatten (channel, row, column)                            -> 256
    FC#3 256 -> 120 (W3=T) -> BN#3 -> ReLU
    FC#4 120 ->  84 (W4=T) -> BN#4 -> ReLU
    FC#5  84 ->  10 (W5=F) + bias                             -> 10 logits

- **Convolutions:** valid, stride 1, no bias. The batch-norm shift takes the
  place of the bias.
- **Batch normalization:** applied at inference as one scale and one shift per
  channel, `y = relu(x*scale + shift)`. Both the product and the sum are
  rounded to half.
- **Output:** FC#5 has a bias and no ReLU. The accelerator outputs its 10
  logits. Softmax is not computed; the largest logit is the predicted class.
- **Training-only operations:** dropout and the training form of batch norm
  play no part at inference and are absent.

## Datapath

The layers run one at a time. Each layer reads one feature-map buffer and
writes the next. A sequencer in the top starts every engine when the previous
one reports `done`:

    img -> conv1 -> c1 -> pool1 -> p1 -> conv2 -> c2 -> pool2 -> fl -> fc3 -> f3 -> fc4 -> f4 -> fc5 -> logits

**`dot_engine`** is the heart of every weight layer. Each cycle it takes one
*beat* of LANES (activation, weight) pairs. The convolutions use 8 lanes and
the fully-connected layers 16. The engine is a three-stage pipeline:

1. LANES products: `half_mul`, `xsb` or `tbo`.
2. A pairwise adder tree in lane order: `((p0+p1)+(p2+p3))+...`.
3. An accumulator. A beat marked `first` loads it; later beats add to it.

A mask bit per lane sets unused lanes to +0, which pads the tail of a dot
product whose length is not a multiple of LANES. The result appears three
cycles after the beat marked `last`.

Every addition rounds to half. The summation order is therefore part of the
specification: a reference model must add in the same order to get matching
bits. `tb/mpwn_ref_pkg.sv` does exactly that.

**`conv_layer` and `fc_layer`** wrap a dot engine with three memories:

- a weight memory of packed LANES-wide words;
- a per-channel batch-norm scale memory;
- a per-channel batch-norm shift memory.

An address generator walks output channel → row → column (FC: output neuron).
For each output it issues `WORDS = ceil(taps / LANES)` beats back to back. A
convolution tap `q` maps to input channel `q/25`, row offset `(q%25)/5` and
column offset `q%5`. The activations come from LANES read ports of the input
buffer (`fmap_buffer`). That buffer is one array with several read ports, so any
LANES addresses can be read in the same cycle. The dot-product result then
passes through `batchnorm_relu` and is written to the output buffer at the
output's index.

**`maxpool2`** reads the four elements of a 2x2 window through four ports and
writes one maximum per cycle. Its outputs are written in channel-major order.
For the second pool that order is already the flatten order of the 256-vector
FC#3 reads, so flatten costs nothing but addressing.

### Cycle budget

The engines never stall. At the default sizes one inference takes:

| Stage | Cycles | Formula |
|---|---:|---|
| Conv#1 | 13,829 | 6·576 pixels · 4 beats + 5 |
| Pool#1 | 865 | 864 + 1 |
| Conv#2 | 19,461 | 16·64 pixels · 19 beats + 5 |
| Pool#2 | 257 | 256 + 1 |
| FC#3 | 1,925 | 120 · 16 beats + 5 |
| FC#4 | 677 | 84 · 8 beats + 5 |
| FC#5 | 65 | 10 · 6 beats + 5 |
| hand-over | 7 | one cycle per stage |
| **total** | **37,086** | 0.371 ms at 100 MHz |

The 5-cycle tail of a weight layer is the following: one cycle of buffer read
latency, three cycles of dot-engine pipeline, and one cycle for the batch-norm
register.

The original design was built with high-level synthesis for a Zynq UltraScale+
ZCU102 at 100 MHz. Its per-layer latencies were 0.0264 / 0.119 / 0.0147 /
0.006 / 0.002 ms for Conv#1 / Conv#2 / FC#3 / FC#4 / FC#5, and 0.786 ms for a
whole inference. This RTL uses the same parallelism (8 and 16 lanes), but its
schedule is its own:

- The convolutions are slower here: 0.138 ms for Conv#1 and 0.195 ms for Conv#2.
- The fully-connected layers are about as fast or faster: 0.019, 0.007 and
  0.0007 ms.
- The whole inference is about half the original time.

## Half-precision arithmetic

`half_mul` and `half_add` are combinational and IEEE 754 binary16 compliant:

- rounding to nearest, ties to even;
- subnormal inputs and outputs;
- ±inf and NaN (the canonical NaN `16'h7E00` is returned);
- x + (−x) = +0.

Both compute an exact intermediate result: the 22-bit significand product, or
the two significands aligned in a 41-bit field. The adder uses one adder for
both signs: it forms `abig - asml` and negates a negative difference back to a
magnitude. They hand it to one shared
rounding function, `mpwn_pkg::round_pack(sign, p, e)`. That function finds the
leading one, shifts `p` right to 11 kept bits plus a guard bit, ORs everything
shifted out into a sticky bit, rounds, and packs. A rounding carry moves into the
exponent field on its own, because the exponent and mantissa are added as one
number. Special results (NaN, infinity, zero) are merged in with bit masks
rather than a multiplexer. As a result, synthesis tools do not treat the
rounding datapath as conditionally used and do not spend time trying to share
it. The callers register the result. In the dot engine, the adder tree is
four adders deep for 16 lanes within one cycle.

## Loading a network and running it

All weights and batch-norm parameters sit in on-chip memories. They are written
through the top's load port `ld` (a `load_req_t`) while `busy` is low. One
beat carries:

| Field | Meaning |
|---|---|
| `target` | `LT_IMAGE`, `LT_CONV1`, `LT_CONV2`, `LT_FC3`, `LT_FC4`, `LT_FC5` |
| `kind` | `LD_WGT` (weight word), `LD_SCALE`, `LD_SHIFT` (for FC#5: the bias) |
| `addr` | pixel index, or `n*WORDS + t` for weight word `t` of output `n`, or channel `n` for scale/shift |
| `data` | low bits used: a half pixel or scale/shift in `[15:0]`; a weight word in `[LANES*WB-1:0]`, lane `i` at `[i*WB +: WB]` |

Weight word `t` of output `n` holds taps `t*LANES ... t*LANES+LANES-1`. For a
convolution, tap `q` is element `q` of the kernel in (input channel, row,
column) order. For a fully-connected layer, it is input `q`. Taps past the end
of a kernel or row are masked and may hold anything.

`start` is a one-cycle pulse. `stage` shows the running layer. `done` pulses
once the tenth logit is written, and `logits[0..9]` then hold the result until
the next run. The weights stay loaded: a new image needs only 784 `LT_IMAGE` beats and
another `start`.

Batch norm folds into the two stored values as
`scale = gamma / sqrt(var + eps)` and `shift = beta - mean*scale`.

## Departures from the original design and choices made here

- **RTL instead of high-level synthesis.** The original's loops, directives
  and interfaces are replaced by the beat schedule above. The lane counts equal
  its array-partition factors. The cycle counts differ (see the cycle budget).
- **Multiple read ports instead of banked memories.** The original partitions
  the arrays into banks; here each buffer is one array with LANES read ports.
  An FPGA tool maps this to replicated or distributed RAM.
- **Load interface.** The load/start/done interface and the memory layout are
  this design's own. The original was a tool-generated IP block driven by an
  ARM host.
- **Folded batch norm.** Scale and shift are each rounded to half, and so is
  the result of each step.
- **FC#5 bias.** The bias is added once per output after the dot product.
- **Softmax** is not implemented; the logits are the output.
- **Layer order** within a stage is conv → BN → ReLU → pool.
- **Reset.** Only control state is reset (asynchronous, active low). Memories
  are not reset.

## Files

| File | Contents |
|---|---|
| `rtl/mpwn_pkg.sv` | types, weight-space enum, load-port struct, `round_pack` |
| `rtl/half_mul.sv`, `rtl/half_add.sv` | binary16 multiplier and adder |
| `rtl/xsb.sv`, `rtl/tbo.sv`, `rtl/weight_mul.sv` | weight-space products |
| `rtl/dot_engine.sv` | LANES-wide product / adder-tree / accumulator pipeline |
| `rtl/fmap_buffer.sv` | feature-map buffer, one write port, RPORTS read ports |
| `rtl/batchnorm_relu.sv` | `relu(x*scale + shift)`, or the bias add |
| `rtl/maxpool2.sv` | 2x2 stride-2 max-pool |
| `rtl/conv_layer.sv`, `rtl/fc_layer.sv` | layer engines |
| `rtl/mpwn_lenet5_top.sv` | the accelerator |
| `tb/mpwn_ref_pkg.sv` | reference model: half rounding via `real`, layer models, weight packing |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_mpwn_lenet5_top.sv` | full-size FTTTF inference, end to end |
| `tb/tb_mpwn_fbtbf.sv` | the same flow with binary Conv#2 and FC#4 (FBTBF) |
| `tb/tb_mpwn_btfbt.sv` | the same flow as BTFBT: binary Conv#1, ternary FC#5, half FC#3 |

## Verification

Each testbench compares the RTL against an independent model in
`tb/mpwn_ref_pkg.sv`. That model computes in `real` (double) and rounds to half
in software; it does not reuse the RTL's rounding. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

- **Half arithmetic:** `tb_half_mul` and `tb_half_add` run 20,000 random
  operand pairs across all binades, subnormals and specials.
- **Weight-space products:** `tb_xsb` and `tb_tbo` are exhaustive. They try
  every valid weight code with every finite 16-bit activation.
- **Dot engine:** all three weight spaces, random lengths and masks, with the
  3-cycle latency checked.
- **Layer engines:** reduced sizes (a ternary 3→4 channel 3x3 convolution on
  7x6, and a 40→5 FC layer). Every output is checked, along with the cycle
  count `COUT·pixels·WORDS + 5`.
- **Top (`tb_mpwn_lenet5_top`):** runs the default FTTTF network on two random
  images with random weights (half of the ternary weights are zero). It
  checks the following:
  - per-stage cycle counts;
  - the flattened vector and the FC#3 and FC#4 outputs;
  - all ten logits, bit for bit.

  It also counts that ReLU clamping, zero ternary weights, masked lanes and
  non-trivial pool choices all occur.
- **Other weight-space mixes:** `tb_mpwn_fbtbf` and `tb_mpwn_btfbt` run the
  same flow with the top's `W1..W5` overridden. Between them and the default
  build, every weight space runs in both the convolution engine and the
  fully-connected engine.

The full-size run takes about 20 s in Verilator. To simulate any testbench:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/mpwn_pkg.sv tb/mpwn_ref_pkg.sv rtl/*.sv tb/tb_mpwn_lenet5_top.sv \
        --top-module tb_mpwn_lenet5_top
    ./obj_dir/Vtb_mpwn_lenet5_top

Verilator prints a few width and unused-signal warnings; `-Wno-fatal` keeps
them from stopping the build.

The testbenches use random weights, not a trained network,
so they prove that the hardware computes the network exactly as specified in
half precision. They say nothing about classification accuracy.
