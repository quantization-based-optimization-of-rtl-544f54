# Two-bit AlexNet layers on a two-board FPGA pipeline

This RTL runs the first two convolution layers of an AlexNet whose
activations (and, from the second layer on, weights) are quantized to 2 bits
with learned LQ-Nets bases. Each layer has its own FPGA board, and every
parameter lives in on-chip block RAM: there is no DRAM traffic. The main idea
is in the second layer. A product of a 2-bit activation code and a 2-bit
weight code can take only 16 values. The host computes those 16 values once
and writes them into a small table, and the convolution then looks products
up instead of multiplying. Because each weight is 2 bits instead of 32, the
weights also need a sixteenth of the memory.

```
 host 1 (4-bit port)                                host 2 (4-bit port)
        |                                                   |     ^
        v                                                   v     | merged codes
 +---------------- board 1 ----------------+        +---------------- board 2 -----------------+
 | param_loader/rx32 -> image, W, BN, basis|        | param_loader -> table, 2-bit W, BN, basis |
 | conv_loop_ctrl -> fp_window_mac (11x11) |  link  | act buffer <- link                        |
 | -> acc plane -> bn_relu_quant -> codes  |------->| conv_loop_ctrl -> lut_window_mac (5x5)    |
 | -> maxpool3x3 -> 2-bit code stream      | 2-bit  | -> acc plane -> bn_relu_quant             |
 +-----------------------------------------+ codes  | -> code_packer -> 4-bit words             |
            layer1_core                             +-------------------------------------------+
                                                                layer2_core
```

`fic_alexnet_top` holds both boards side by side. The network that joins the
boards is a circuit-switched, time-slotted (STDM) network of the FPGA cluster
over multi-gigabit serial links, and it is not part of this RTL. Board 1's
link output (`l1_link_*`) and board 2's link input (`l2_link_*`) are top-level
ports. Each is a valid/ready stream of 2-bit codes. To run without the
network, wire the two together.

## What a 2-bit code means

LQ-Nets represents a value as the inner product of a K-bit code with a learned
basis vector. Here K = 2, so each layer has two basis values. Weights and
activations read the code bits differently:

| code (b1 b0) | weight value, basis (c, d) | activation value, basis (v1, v2) |
|---|---|---|
| 00 | -c - d | 0 |
| 01 | -c + d | v2 |
| 10 | +c - d | v1 |
| 11 | +c + d | v1 + v2 |

For a weight, each bit picks `+basis` or `-basis`. An activation has passed
through ReLU, so it is never negative: a 0 bit adds nothing.

A product table entry is `table[{a, w}] = act_value(a) * weight_value(w)`,
indexed by the activation code (bits 3:2) and the weight code (bits 1:0).
Row `a = 00` is all zeros. Zero padding relies on this: the engine reads a
position outside the image as activation code 00, and its products are 0.

The activation quantizer (`bn_relu_quant`) takes the ReLU output and returns
the code of the nearest of the four activation levels. A tie goes to the
lower code. The first layer's output basis is also the activation basis that
the second layer's table is built from, so board 2's host must compute the
table from board 1's `(v1, v2)`.

## The window engines and their schedule

Both layers use the same schedule (`conv_loop_ctrl`). For each output channel
the controller walks input channel, then output row, then output column,
issuing one (ic, oy, ox) triple per clock. The window engine consumes a whole
K x K window per clock, with all K*K products at once. Its sum is loaded into
an output-plane accumulator for input channel 0 and added to it for the
others. The loop is pipelined with an initiation interval of one. Once a pass
is done, a post phase sends each accumulator through bias, batch norm, ReLU
and the quantizer.

* **Layer 1** (`layer1_core`, `fp_window_mac`). The image and weights are
  full precision, so the engine multiplies: 121 products per cycle for 11 x 11
  kernels. The 55 x 55 code plane is then max-pooled 3 x 3 with stride 2 to
  27 x 27 (`maxpool3x3`), and the pooled codes go out on the link. Pooling
  works on codes rather than values. This is exact as long as v1 >= v2 >= 0,
  because the levels then increase with the code.
* **Layer 2** (`layer2_core`, `lut_window_mac`, `lq_lut`). Each of the 25
  window positions forms a 4-bit index `{act, weight}` into a 25-read-port
  copy of the table. An adder tree sums the 25 entries. There is no
  multiplier in the convolution.

Cycle counts at the default sizes, after loading:

| phase | cycles |
|---|---|
| layer 1, per output channel | 3 x 55 x 55 conv + 3025 post + 729 pool (plus link stalls) |
| layer 1, whole layer | 96 x 12 829 = 1 231 584 |
| layer 2, per output channel | 96 x 27 x 27 conv + 729 post (plus host stalls) |
| layer 2, whole layer | 256 x 70 713 = 18 102 528 |

Each conv pass also adds 2 cycles for the pipeline to start and drain.
Layer 2 starts only after it has received all 96 x 27 x 27 codes, so the two
boards do not overlap their work on a single image.

## Host interface

Each board has a 4-bit parallel host port (`host_nib`, `host_valid`, one
nibble per strobe, no backpressure). `rx32` assembles eight nibbles, most
significant first, into a 32-bit word. `param_loader` reads the stream as a
series of transfers. Each transfer begins with a header word: bits 31:28 give
the target and bits 27:0 the number of items. Items are written to addresses
0, 1, 2, ... of the target.

| target | id | payload |
|---|---|---|
| `TGT_IMG` | 0 | layer-1 image, `[ic][y][x]`, one word per pixel |
| `TGT_W` | 1 | layer-1 weights, `[oc][ic][ky][kx]`, one word each |
| `TGT_BIAS` | 2 | one word per output channel |
| `TGT_SCALE` | 3 | batch norm `gamma/sigma` per output channel |
| `TGT_SHIFT` | 4 | batch norm `beta - mu*gamma/sigma` per output channel |
| `TGT_QBASIS` | 5 | output activation basis: v1, then v2 |
| `TGT_LUT` | 6 | layer-2 product table, 16 words, index `{act, weight}` |
| `TGT_WCODE` | 7 | layer-2 weights as raw nibbles, two codes each, first code in bits 3:2; the count is in nibbles |
| `TGT_START` | 15 | no payload: start (layer 1) or arm (layer 2) one run |

`TGT_WCODE` is the one nibble-mode target. Its payload skips `rx32`, so
2-bit weights cost half a nibble each instead of a 32-bit word, and a nibble
may follow its header with no gap. Board 2 returns its output codes in the
same packed form: two codes per nibble, first code in bits 3:2. The order is
output channel, then row, then column. If the code count is odd, the last
code is padded with `00`. The output is a valid/ready stream (`out_*`).

Board 1 starts when it receives `TGT_START`. Board 2 starts once it has been
armed by `TGT_START` and its activation buffer is full, and it empties the
buffer when it finishes. Nothing guards against loading a board while it is
busy: the host must wait for `done`.

## Numbers

Every real-valued quantity is a 32-bit signed fixed-point number with 16
fraction bits (Q16.16). This covers pixels, layer-1 weights, table entries,
bias, batch-norm scale and shift, and the bases. Window sums are exact.
`fp_window_mac` sums 64-bit products and then shifts back once. The
accumulators and table sums are 32-bit and wrap on overflow. The batch-norm
multiply truncates (`lq_pkg::fix_mul`). Scale and shift are taken to be
folded by the host from gamma, beta, mean and sigma.

## Where this differs from the reference system, and what is this design's own

* **Fixed point, not floating point.** The reference system keeps the table,
  batch-norm parameters and layer-1 data in IEEE single precision. Q16.16
  keeps the 32-bit word and the host format, but the values differ, so a
  trained model's parameters must be converted.
* **Fully parallel windows.** Each window is computed in one cycle, which is
  the best-performing pipelining option in the HLS study this design follows.
  Cycle counts are therefore far lower than the HLS latencies reported for
  that system: about 1.7e9 cycles for layer 2 there, against 1.8e7 here.
  Resource use is correspondingly higher: 121 multipliers on board 1 and 25
  table reads on board 2.
* **Sizes from standard AlexNet.** The reference gives only the layer-2
  kernel (5 x 5) and its padded 31 x 31 input. The channel counts and the
  conv1 geometry (3 x 227 x 227, 96 kernels of 11 x 11, stride 4) are
  standard AlexNet. AlexNet's grouped convolution is not used: conv2 sees
  all 96 channels.
* **Pooling.** Pool1 (3 x 3, stride 2) sits on board 1, because the second
  layer's input is 27 x 27. No pooling follows layer 2, so its output is the
  27 x 27 map.
* **Host protocol.** The header format, target ids, nibble order, start
  command and start condition are this design's own. So are the link
  handshake and the 2-bit link width.
* **Padding.** Zero padding is done by an address check rather than by
  storing a padded image.
* **Not built.** The inter-board network and serial transceivers, the host
  computers, and the board DRAM (unused by design) are not built. Neither
  are the later AlexNet layers or a bit-serial AND/popcount variant of the
  second-layer engine that was only proposed.

## Files

| file | what it is |
|---|---|
| `rtl/lq_pkg.sv` | types (`fix_t`, `code_t`), target ids, `fix_mul` |
| `rtl/fic_alexnet_top.sv` | both boards; parameters `L1_*`, `L2_*` |
| `rtl/layer1_core.sv`, `rtl/layer2_core.sv` | one board's user logic each |
| `rtl/conv_loop_ctrl.sv` | loop nest, one window per cycle |
| `rtl/fp_window_mac.sv` | multiplying window engine (layer 1) |
| `rtl/lut_window_mac.sv`, `rtl/lq_lut.sv` | table window engine and table (layer 2) |
| `rtl/bn_relu_quant.sv` | bias, batch norm, ReLU, 2-bit quantizer |
| `rtl/maxpool3x3.sv` | 3 x 3 max over codes |
| `rtl/rx32.sv`, `rtl/param_loader.sv` | host port |
| `rtl/code_packer.sv` | 2-bit to 4-bit output merge |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_fic_alexnet_top.sv` | end-to-end, reduced size |
| `tb/tb_fic_alexnet_full.sv` | end-to-end, all parameters at their defaults |
| `tb/tb_layer2_single_plane.sv` | one 27 x 27 plane, one 5 x 5 kernel: output and rate (729 windows in 729 cycles) |
| `tb/fic_top_body.svh`, `tb/lq_ref.svh` | shared system test body and reference arithmetic |
| `tb/stdm_link_model.sv` | behavioural link with latency and slot-based backpressure |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The
simulator must start from random values and be given the include paths:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lq_pkg.sv tb/tb_fic_alexnet_top.sv --top-module tb_fic_alexnet_top
obj_dir/Vtb_fic_alexnet_top +verilator+rand+reset+2
```

The system testbenches load both boards through their host ports with random
data. Board 2's table is built from random bases. The two boards are joined
through the behavioural link. Every code on the link and every output nibble
is checked against a reference model in `tb/lq_ref.svh` and
`tb/fic_top_body.svh`. The windows issued per layer must equal
OC x IC x OH x OW, which is one per cycle. The test also requires that each
of these happened at least once: link and host backpressure, padded windows,
ReLU clamping, nibble-mode weight loading, pooling picking a non-corner
element, and every output code.

The reduced test runs in seconds. The full-size test covers one image
through both layers at the default sizes, about 21 million cycles. It takes
several minutes to build with Verilator and under a minute to run.

To change a size, override the top's parameters (`L1_IMG`, `L1_K`,
`L1_STRIDE`, `L1_IC`, `L1_OC`, `L2_K`, `L2_PAD`, `L2_OC`). The layer-2 input
size and channel count follow from layer 1. The pooling window is fixed at
3 x 3 with stride 2.

## How far to trust it

Every module has a self-checking testbench. Each testbench has been shown to
fail on a deliberately broken copy of its module. The full two-layer flow
matches the reference model bit for bit at both the reduced and the default
sizes. Nothing has been placed, routed or timed on an FPGA. The window
engines are purely combinational within one cycle: 121 multipliers plus an
adder tree on board 1, and 25 table reads plus an adder tree on board 2.
They read the image and weight arrays through wide multiplexers, and would
need to be pipelined and banked into block RAM before they could meet a
useful clock rate. The model's bases and batch-norm parameters have not
been taken from a trained network; the tests use random values.
