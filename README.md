# Encoded-activation streaming engines for CNNs (LeNet on MNIST, VGG7 on CIFAR-10/SVHN)

This is an FPGA-style inference engine for convolutional networks. It keeps
every weight and every intermediate feature map on chip. To make that
possible, numbers are not stored as fixed-point words. Each layer has a small
*codebook* of K fixed-point values (cluster centres), and a weight or an
activation is stored only as its b-bit index into that codebook
(K = 2^b, b = 1..8, chosen per layer and separately for weights and
activations). Arithmetic still happens at full fixed-point precision:

* a layer **decodes** its input codes and its weight codes through codebook
  register files;
* it multiplies and accumulates in 16-bit fixed point and applies batch
  normalization;
* it **encodes** every result back to the index of the nearest centre of its
  output codebook before the result leaves the layer.

Only the codes travel between layers, through small streaming buffers. Every
layer has its own engine, so successive images overlap in the pipeline. There
is no external memory traffic except for the input image and the output
logits.

The blocks are assembled into two engines, each built for one network. They
sit side by side in `encodeep_top` and share only the clock and reset. Each
has its own command, image and logit ports.

`encodeep_lenet` is a LeNet for 28x28 MNIST digits, with the per-layer
bitwidths of the configuration called "LeNet-I":

| layer | shape | weight bits | output code bits |
|---|---|---|---|
| conv1 | 28x28x1 -> 24x24x16, 5x5 | 3 | 2 |
| pool1 | 2x2 max -> 12x12x16 | - | 2 |
| conv2 | 12x12x16 -> 10x10x32, 3x3 | 4 | 2 |
| pool2 | 2x2 max -> 5x5x32 | - | 2 |
| fc1 | 800 -> 256 | 2 | 3 |
| fc2 | 256 -> 10 | 4 | 16-bit fixed-point logits |

All LeNet weight codes together take 439,472 bits. At 32-bit fixed point the
same weights would take about 7 Mbit.

`encodeep_vgg7` is a VGG-style network for 32x32 RGB images (CIFAR-10,
SVHN), with the bitwidths of the configuration called "VGG7-I":

| layer | shape | weight bits | output code bits | PE x SIMD |
|---|---|---|---|---|
| conv1 | 32x32x3 -> 30x30x32 | 4 | 4 | 4 x 3 |
| conv2 + pool | -> 28x28x32 -> 14x14x32 | 4 | 3 | 8 x 4 |
| conv3 | -> 12x12x64 | 4 | 3 | 4 x 8 |
| conv4 + pool | -> 10x10x64 -> 5x5x64 | 4 | 4 | 4 x 4 |
| conv5 | -> 3x3x128 | 4 | 4 | 2 x 4 |
| conv6 | -> 1x1x128 | 3 | 3 | 2 x 2 |
| fc1 | 128 -> 256 | 4 | 3 | 2 x 2 |
| fc2 | 256 -> 256 | 3 | 4 | 2 x 2 |
| fc3 | 256 -> 10 | 3 | logits | 1 x 2 |

All convolutions are 3x3. Its weight codes take 1,334,144 bits.

## Dataflow

LeNet engine:

```
 pixels (8-bit codes)
   -> swu(5x5) -> mvau conv1 -> fifo -> mpu -> fifo
   -> swu(3x3) -> mvau conv2 -> fifo -> mpu -> fifo
   -> mvau fc1 -> fifo -> mvau fc2 -> logits
 parameter writes -> init_kernel -> (one strobe per layer) -> all mvau memories
```

The VGG7 engine is the same chain, longer. Each convolution is a
`conv_stage`: swu -> mvau -> fifo, followed by mpu -> fifo where it pools.
Three FC MVAUs with FIFOs between them come last.

| module | role |
|---|---|
| `encodeep_pkg` | fixed-point types, the parameter-write command `cfg_wr_t`, saturation helper |
| `encodeep_top` | top: both engines side by side, ports prefixed `lenet_` and `vgg_` |
| `encodeep_lenet` | LeNet engine |
| `encodeep_vgg7` | VGG7 engine |
| `conv_stage` | one convolution layer (swu, mvau, fifo), optionally with 2x2 pooling |
| `mvau` | one CONV or FC layer: input decoder, PE array, controller, output encoder |
| `pe` | processing engine: encoded weight SRAM, weight codebook, SIMD MACs, accumulator, batch norm |
| `codebook_rf` | codebook register file with parallel read ports (the decoder) |
| `act_encoder` | nearest-centre encoder (linear search) |
| `swu` | sliding window unit: reorders a frame into convolution windows |
| `mpu` | max pooling directly on codes |
| `stream_fifo` | streaming buffer between engines |
| `init_kernel` | routes parameter writes from the host to the layers |

## Codes, codebooks and why pooling and ReLU come for free

Everything special about this design sits in how codes are produced and used.

**Decoding.** A codebook is a register file of K 16-bit entries, and a code is
simply its address (`codebook_rf`). It is a register file rather than an SRAM,
so all SIMD lanes decode in the same cycle. Each MVAU has one input decoder.
The decoded input word is registered once and shared by all PEs. Each PE has
its own copy of the weight codebook, because every PE reads different weights
in the same cycle. The host writes the same values into all copies.

**Encoding.** `act_encoder` returns `argmin_i |y - c[i]|` for each PE's
result. The search is linear: one codebook entry is read per cycle and
compared with all PE lanes at once. A search therefore takes K cycles (4 or 8
for the default layers) however many PEs the layer has. On a tie the lower
index wins.

**Sorted codebooks.** Output codebooks are expected in ascending order. This
has two consequences the hardware relies on:

* *ReLU.* If `c[0] = 0`, every negative result is nearest to `c[0]` and
  encodes to 0. ReLU needs no logic of its own. For another activation
  function f, the host loads `f(c[i])` instead of `c[i]` into the *next*
  layer's input codebook. Hardware does not change.
* *Max pooling on codes.* A larger code means a larger value, so the
  maximum of codes is the code of the maximum. `mpu` compares 2- or 3-bit
  codes, and its row buffer holds codes, not 16-bit words.

If a codebook is not sorted, the MVAU results are still correct, but max
pooling behind that layer is not.

**Number format.** Codebook entries, batch-norm gamma/beta and logits are
signed Q7.8 (16 bits, 8 fractional). Products are Q.16 and are summed in a
48-bit accumulator. Batch norm computes `(gamma * acc) >>> 16 + beta`:
arithmetic shift (rounding toward minus infinity), then saturation to 16 bits.
The 16-bit width is this design's choice, so that one product fits a 25x18
DSP multiplier.

## MVAU: folding, timing and flow control

A layer multiplies an MW-element input vector by an MH x MW matrix. A
convolution does this once per output pixel, with MW = kernel x kernel x
input channels. The work is split in two directions:

* `PE` engines each own a set of output neurons: neuron `n` lives on PE
  `n % PE` as fold `n / PE`. There are `NF = MH/PE` folds.
* `SIMD` lanes inside each PE take `SIMD` inputs per cycle, so one neuron
  needs `SF = MW/SIMD` beats.

The controller walks (fold, beat). In fold 0 it takes input beats from the
stream and also writes them, still encoded, into an SF-word vector buffer.
Folds 1..NF-1 replay the vector from that buffer. The weight SRAM of each PE
is split into SIMD partitions, one per lane. The weight for neuron `n` and
input `i` sits in partition `i % SIMD` of PE `n % PE`, at word
`(n / PE) * SF + i / SIMD`.

Pipeline per beat:

| stage | what happens |
|---|---|
| 0 | select the input word (stream or buffer), decode it, address the weight SRAMs |
| 1 | decoded inputs registered; weight codes read, decoded and multiplied; the sum of SIMD products is added to the accumulator (cleared on a fold's first beat) |
| 2 | the finished dot product is registered (last beat only) |
| 3 | batch norm result registered; all PEs hand their results to the encoder |
| 3+K | codes offered on the output stream |

**Stall rule.** This design allows at most one fold result in flight between
the accumulators and the output port. The last beat of the next fold is
withheld until the previous result has left the MVAU. Other beats keep
issuing, so encoding overlaps the next fold's dot product, and a stall only
appears when `SF` is shorter than about `K + 5` cycles or the consumer
applies back-pressure. `evt_stall` reports each withheld cycle. The last
layer (`ENCODE_OUT = 0`) skips the encoder and outputs the batch-normalized
words.

## Sliding window unit, pooling and buffers

`swu` stores a whole encoded input frame and then emits, for every output
pixel `(oy, ox)`, the window words in order `ky, kx, channel group`. The
element index seen by the MVAU is therefore `(ky*KD + kx)*C + c`, which is
the weight layout the host must use for convolutions. Convolutions are
"valid" (no padding). The unit has two frame banks used alternately: the next
image is loaded while the current one is replayed. `mpu` pools P x P windows
with stride P in raster order and drops rows and columns that do not fill a
window. Between engines, `stream_fifo` (depth 4) decouples the handshakes.
Its width is PE x code bits, 4 to 24 bits here.

Streams everywhere use valid/ready: a word moves on a rising edge where both
are high, and a producer keeps its word stable until it is taken. Reset is
asynchronous and active low.

## Loading parameters

Before inference the host sends one `cfg_wr_t` command per value on the
`cmd_*` port. After that, any number of images can run without reloading.

| field | bits | meaning |
|---|---|---|
| `layer` | 4 | LeNet: 0 conv1, 1 conv2, 2 fc1, 3 fc2. VGG7: 0..5 conv1..conv6, 6..8 fc1..fc3. Other values are dropped and counted in `init_errors` |
| `tgt` | 3 | `TGT_WMEM` weight code, `TGT_WCB` weight codebook, `TGT_ICB` input codebook, `TGT_OCB` output codebook, `TGT_GAMMA`, `TGT_BETA` |
| `pe` | 8 | PE index (WMEM, WCB, GAMMA, BETA) |
| `lane` | 8 | SIMD partition (WMEM) |
| `addr` | 20 | word (WMEM), code (codebooks), neuron fold `n / PE` (GAMMA/BETA) |
| `data` | 16 | code or Q7.8 value |

Pixels enter as 8-bit codes: one per beat for LeNet, and three per beat
for VGG7 (channel c in bits 8c+7:8c). Conv1's 256-entry input codebook gives
their values; for example, `c[i] = i` in Q7.8 means a pixel value of i/256. The
input codebook of conv2, fc1 and fc2 normally equals the output codebook of
the layer before it (ReLU). With the default parameters a full load is
213,428 writes for LeNet and 390,236 for VGG7, accepted one per cycle.

## Performance of the default builds

LeNet multipliers: conv1 1x8, conv2 8x2, fc1 2x8, fc2 8x1 (48 in total), chosen so
that the three large layers each need 25-29 k MAC cycles per image. In
simulation, with random back-pressure and input gaps:

* first image: 71,163 cycles from the end of loading to the last logit;
* following images: one every 37,847 cycles.

The interval is set by fc1, which replays its buffered input vector for 31 of
its 32 folds. During those folds it accepts no new input, so conv2 waits.
Double-buffering the MVAU input vector would bring the interval down to about
29 k cycles. That change is not made here.

VGG7 has 114 multipliers. They are split so that conv2 and conv4, the two
heaviest layers, each need about 230 k MAC cycles per image; the other
layers need 83 k or fewer. In simulation:

* first image: 836,890 cycles from the end of loading to the last logit;
* following images: one every 230,400 cycles, which is exactly conv4's
  576 x 64 x 100 / 16 MAC cycles.

The first image takes much longer than the interval. Each sliding window
unit must hold a whole input frame before it emits the first window, so the
six convolutions of one image start one after another. Successive images
fill the pipeline.

## Simulating

The testbenches are self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb -Itb rtl/encodeep_pkg.sv \
    tb/tb_encodeep_lenet_full.sv --top-module tb_encodeep_lenet_full -o sim
./obj_dir/sim
```

Swap in another name for the others: `tb_encodeep_top_full`,
`tb_encodeep_top_lowbit`,
`tb_encodeep_lenet`, `tb_encodeep_vgg7`, `tb_codebook_rf`, `tb_stream_fifo`,
`tb_act_encoder`, `tb_pe`, `tb_mvau`, `tb_swu`, `tb_mpu`, `tb_init_kernel`.
`-y rtl` lets Verilator find each module in the file of the same name.

The end-to-end tests share `net_env`, a test environment for any chain of
convolution (plus optional pooling) and FC layers. It builds a random
encoded network, loads it through the command port and streams random
images with random gaps. It applies random back-pressure to the logits and
compares every logit with a bit-exact model of the whole network. The model
covers decode, MAC, batch norm, encode, max pooling on codes and the raw last
layer. It also counts each mechanism and fails if one never occurs: encoder
stall, ReLU clamping, input-vector replay, output back-pressure, several
layers working at once, a rejected parameter write, and the pooling drop
when a map has odd size.

* `tb_encodeep_top_full` runs `encodeep_top` with no parameter overrides.
  Both engines work at once: two LeNet images and one VGG7 image. It takes
  about 6 seconds.
* `tb_encodeep_top_lowbit` runs the same top with narrower weights: the
  LeNet-II and VGG7-II configurations. Only the first 2^b entries of each
  codebook are loaded. Codes never point at the rest.
* `tb_encodeep_lenet_full` runs the LeNet engine alone at full size on two
  images.
* `tb_encodeep_lenet` runs a reduced LeNet on three images. It has a 12x12
  input and an odd conv2 map, so pooling drops a row and a column. Its folds
  are short, so encoder stalls occur.
* `tb_encodeep_vgg7` runs a narrow VGG7 on two images. It keeps all nine
  layers but uses 4 to 16 channels and a 33x33 input, so the first pooling
  drops a row and a column.
* The block testbenches check their blocks against independent models. They
  also check latencies: K cycles for the encoder and stage 3 for the PE
  result.

## Where this RTL departs from, or adds to, the original design

* Fixed-point width (16 bit), rounding and saturation, the command format and
  the stream handshakes are this design's choices.
* The encoder's search shared across PE lanes, the one-result-in-flight stall
  rule and the MVAU's encoded vector buffer are choices made here. The SWU's
  two frame banks and the MPU's row buffer are too.
* In the PE, the encoded weight word is registered and decoded in front of
  the multipliers. The original registers the decoded weights instead. Both
  use one register per lane.
* Pixel coding (8-bit codes plus a codebook), "valid" convolutions and the
  SIMD/PE factors are assumptions. The source names only the network shapes
  and the per-layer bitwidths.
* On a device each engine would be built on its own. `encodeep_top` puts them
  together only to hold both in one design.
* Other bitwidth configurations of the same networks fit the default builds
  when every width is no larger than the built one. LeNet-II and VGG7-II do,
  and `tb_encodeep_top_lowbit` runs them. VGG7-III needs 4-bit fc1 outputs:
  set `A7 = 4` on `encodeep_vgg7`.
* Not included: the host processor, DDR, AXI interconnect and DMA. The top's
  `cmd_*`, `in_*` and `out_*` ports sit where the DMA streams would connect.
  Softmax is left to the host.
* Also not included: the offline software that clusters weights and
  activations, picks per-layer bitwidths and fine-tunes the network. It
  produces the codebooks and codes this engine loads. It is not hardware.
* The LeNet and VGG7 engines are assembled. An AlexNet engine is not. It
  would need strided, padded convolutions (11x11 stride 4, 5x5 stride 2) and
  a platform with about 3,300 block RAMs. ResNet-18 would further need
  residual additions and average pooling. None of these are built.

## Changing the design

The network shape and bitwidths are parameters of `encodeep_lenet`: `IMG`,
`C1`, `K1`, `C2`, `K2`, `F1`, `NCLASS`, the bitwidths `A0..A3` and `W1..W4`,
and the parallelism `PE1`, `SIMD2`, `PE2`, `SIMD3`, `PE3`, `SIMD4`, `PE4`.
`encodeep_vgg7` has `IMG`, `CIN`, `C1..C3`, `F1`, `NCLASS`, `A0..A8`,
`W1..W9` and `PE1..PE9`. Its SIMD widths follow from the PE counts. In
LeNet, keep the SIMD of each layer equal to the PE of the layer before it,
since the beat widths must match. In both engines, SIMD must divide the
input channels of a convolution. PE must divide the neuron count and SIMD the vector length. A
weight or activation width can be lowered at run time without changing
hardware: load a codebook in which only the first 2^b entries are used.
