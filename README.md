# AdderNet ResNet20 accelerator in SystemVerilog

An AdderNet is a convolutional network in which the inner convolutions do not
multiply. Each output of an *adder layer* is the negated sum of absolute
differences between the input window and the filter:

    Y[oh,ow,oc] = - sum over kh,kw,ci of | X[oh*S+kh-P, ow*S+kw-P, ci] - W[oc,kh,kw,ci] |

Batch normalization after every layer turns the always-negative sums back into
useful activations. This RTL runs a quantized ResNet20 of this kind on 32x32x3
(CIFAR-10 sized) images. Activations and weights are 8-bit signed integers.

The main idea of the hardware is to compute the differences on the SIMD
adder of a DSP slice. Split into four 12-bit lanes, one slice produces four
8-bit differences per cycle. Those four are the 2x2 cross product of two
neighbouring output pixels and two neighbouring output channels. Every layer
of the network has its own engine built around that packed subtractor. The
engines are chained by double-buffered feature-map stores, so consecutive
layers work on consecutive frames at the same time.

## The network as built

| layer id | engine | operation | shape (default) |
|---|---|---|---|
| 0 | conv0 | 3x3 convolution (multiply), BN, ReLU | 32x32x3 -> 32x32x16 |
| 1..6 | blocks 0-2 | two 3x3 adder layers each, BN, ReLU; identity skip | 32x32x16 |
| 7, 8 + 19 | block 3 | first adder layer stride 2; 1x1 stride-2 adder downsample on the skip | -> 16x16x32 |
| 9..12 | blocks 4-5 | as blocks 0-2 | 16x16x32 |
| 13, 14 + 20 | block 6 | as block 3 | -> 8x8x64 |
| 15..18 | blocks 7-8 | as blocks 0-2 | 8x8x64 |
| (22) | average pool | mean over 8x8 per channel | 64 |
| 21 | fc | 1x1 convolution (multiply) 64 -> 10, BN | 10 scores |

A basic block computes `ReLU(BN2(adder(ReLU(BN1(adder(x))))) + r)`. Here `r` is
the block input, or on the downsample path `BN(adder1x1,stride2(x))` with no
ReLU. The first and last layers are ordinary multiply-accumulate convolutions.
The same engine does both, selected by its `OP` parameter (`OP_SAD` or `OP_MAC`).
No layer has a bias; batch normalization supplies the offsets. The result is
the ten signed 8-bit scores after the last BN. There is no argmax in hardware.

Top-level parameters of `addnet_top`:

| parameter | default | meaning |
|---|---|---|
| `IMG` | 32 | input height and width |
| `IN_CH` | 3 | input channels |
| `BASE` | 16 | channels of the first stage (then 2x, 4x) |
| `NCLASS` | 10 | scores |
| `CI_PAR` | 4 | input channels per engine per cycle (at least 2) |

## Packed subtraction: `quad_int12_sub`

This is the part that needs the most care. A DSP48E2-style ALU in SIMD FOUR12
mode adds two 48-bit words as four independent 12-bit lanes. The carry chain
is cut at bits 12, 24 and 36, and each lane has its own carry-out. The block
models that ALU in plain RTL. It does not instantiate the primitive, so any
synthesis tool can map it.

The operands are packed so that one subtraction gives the 2x2 cross product:

    AB = { x1, x0, x1, x0 }      (each value sign-extended to 12 bits)
    C  = { w1, w1, w0, w0 }
    P  = AB - C   lane by lane  (computed as AB + ~C + 1 per lane)

    lane 0: x0 - w0    lane 1: x1 - w0    lane 2: x0 - w1    lane 3: x1 - w1

`x0, x1` are the same input channel at two neighbouring output pixels. `w0, w1`
are the weights of two neighbouring output channels for that tap and channel.
So lane `l` belongs to pixel `p = l % 2` and channel `c = l / 2`. A difference of
two int8 values needs 9 bits, so the 12-bit lane never wraps. Only its low bits
carry information, and the upper bits give room for the sign. The carry-outs
are brought out as the DSP has them; the engine does not use them.

The block has two register stages, for operands and result, so its latency is
2 cycles. The testbench checks every lane and carry against plain integer
subtraction. Its fault copy lets the carry ripple into the next lane, and the
testbench catches that.

## Layer engine: `addnet_layer`

Each engine holds the weights (`COUT*K*K*CIN` bytes) and the per-channel BN
coefficients of one layer. It computes a whole output frame once its input
frame is ready.

**Loop order.** For every output row `oh`, pixel pair `owp` and channel pair
`ocp`, the engine steps through the taps `kh, kw`. For each tap it steps
through the input channels in groups of `CI_PAR`. Each cycle it reads `CI_PAR`
input channels at the two pixel positions, `2*CI_PAR` read ports in all. It
also reads the matching weights of the two output channels. It then feeds
`CI_PAR` packed subtractors. A 2x2 output group therefore takes
`K*K*ceil(CIN/CI_PAR)` cycles, and a frame takes

    HO * ceil(WO/2) * ceil(COUT/2) * K*K*ceil(CIN/CI_PAR) + 8   cycles

The 8 extra cycles are 7 to drain the pipeline plus 1 to hand the frame on.
The testbenches check each engine's busy time against this formula exactly.

**Padding.** A padded position reads as activation 0 but still contributes
`|0 - W|`. This matches an adder layer that unfolds a zero-padded input. It
is not the same as skipping the tap. Odd widths and odd channel counts are
handled by masking the unused pixel or channel of the last pair.

**Pipeline.**
1. S1: compute addresses, read the weights synchronously and the input asynchronously.
2. S2, S3: the packed subtractor in SAD mode, or a two-stage multiply in MAC mode.
3. S4: absolute values and the sum over the `CI_PAR` channels per lane.
4. S5: accumulate. SAD results are negated here.
5. S6: `bn_quant`, registered.
6. Write: `add_relu` adds the skip value and applies ReLU on the way to the output store.

A tag travels with the data, so the write stage knows the output address,
channel and lane masks. The skip value is read at the output address from a
second store.

**States.** `S_IDLE`, `S_RUN`, `S_DRAIN`, `S_DONE`. A frame starts only when the
input is full, the output bank is free and, if `RESIDUAL`, the skip frame is
full. While the input is ready but the output or skip store is not, `stall` is
high. At the end the engine releases its input (and skip) and commits its
output in the same cycle.

## Batch normalization in fixed point: `bn_quant`

Batch normalization after layer `l`, channel `c`, is folded offline into one
multiplier and one offset:

    A = round( 2^16 * gamma / sqrt(var + eps) * s_in / s_out )
    B = round( 2^16 * (beta - gamma*mean/sqrt(var + eps)) / s_out )
    y = sat8( floor( (x' * A + B + 2^15) / 2^16 ) )

`s_in` is the accumulator's scale and `s_out` the output quantizer's step. `A`
is an 18-bit signed number and `B` a 32-bit signed number. Negative `A` is
allowed and is needed, because adder outputs are never positive.

A layer can also use the *pre-scaled* form, set by a 4-bit shift `bscale`
written over the configuration bus. The accumulator is first reduced to an
8-bit integer:

    q  = sat8( round_half_to_even( x / 2^bscale ) )
    x' = q * 2^bscale

That reproduces a BN that works on a coarsely requantized input. It is used
for layers whose input scale factor is much larger than one. With
`bscale = 0` the form is plain, `x' = x`.

The reference design evaluates BN in 32-bit floating point. This RTL uses the
fixed-point fold above instead. That is the largest arithmetic departure: a float32 datapath is not
provided. A trained network's
coefficients must be converted with the formulas above. The 16 fraction bits
keep the error of `A` below 2^-17 relative to a unit scale.

## Frame hand-over: `fmap_pingpong`, `addnet_basic_block`, stalls

`fmap_pingpong` holds two banks of `DEPTH` bytes, with the feature map laid out
as (h, w, c), c fastest. The producer writes a frame through up to `NWR` ports
and pulses `wr_commit`. The consumer reads through `NRD` asynchronous ports
while `rd_full` and pulses `rd_release`. With both banks full, `wr_free` drops
and the producer's engine stalls. That back-pressure is the only flow control
in the design. Assertions check that nobody commits into a full store or
releases an empty one.

A basic block owns its stores:
- `buf_a` feeds the first layer.
- `buf_r` is a second copy of the block input, written at the same time, for
  the skip path.
- `buf_m` sits between the two layers.
- `buf_d` holds the downsample output, when the block has a downsample path.

The block's `in_free` is the AND of the two input stores' free flags. After the
last block, a store feeds `global_avgpool`, which takes `C*HW + 1` cycles and
rounds each mean to nearest, halves away from zero. Another store feeds the fc
engine. The output store is read by the host via `res_valid`/`res_ack`.

Because every store is double-buffered, up to 23 engines can be busy at once
on different frames. The slowest engine sets the frame rate. With the default
sizes that is a 32x32x16 adder layer at 147,464 cycles per frame. A single
frame needs about 2.56 M cycles from image commit to scores, since every layer
waits for the whole previous frame.

## Configuration and host interface

`cfg` is a `cfg_t` struct with these fields:
- `valid`
- `layer[4:0]`
- `sel`
- `addr[15:0]`
- `data[31:0]`

Write while the addressed engine is idle. `sel` selects:

| `sel` | target | address |
|---|---|---|
| `CFG_WEIGHT` | weight byte `data[7:0]` | `((oc*K + kh)*K + kw)*CIN + ci` |
| `CFG_BN_A` | multiplier `data[17:0]` | channel |
| `CFG_BN_B` | offset `data[31:0]` | channel |
| `CFG_BSCALE` | pre-scaling shift `data[3:0]` | ignored |

Layer ids are in the table above. Images go into the input store through
`img_we/img_addr/img_data` while `img_free`, followed by an `img_commit`
pulse. Several images can be in flight; scores come out in order.
`layer_busy[22:0]` and `layer_stall[22:0]` report every engine, indexed by
layer id, with bit 22 for the average pool.

## How it compares with the reference implementation

- **Rate.** The reference runs at 263.16 MHz with 8028 frames/s and 0.125 ms
  latency, from an element-streaming dataflow with wider parallelism. This RTL
  hands over whole frames and processes 2 pixels x 2 channels x `CI_PAR` inputs
  per cycle per engine. At the same clock that is about 1,785 frames/s and
  about 9.7 ms latency. Raising `CI_PAR` scales the rate, up to `CIN` of each
  layer. No timing closure or FPGA resource count has been measured for this RTL.
  The reference reports 682 DSP, 1.26 M LUT, 648 k FF, 116 BRAM and 12 URAM on
  its device.
- **Storage.** At the default sizes the design holds about 7.05 Mbit of
  memory, as counted by a yosys synthesis. Of that, 2.17 Mbit is weights. Most
  of the rest is the two-bank feature-map stores: each basic block keeps its
  input twice, once for each path. The reference links its layers by streams with
  buffers whose sizes it does not state, and reports 116 BRAM and 12 URAM.
- **BN** is fixed point, not float32 (see above).
- **Packed subtraction** is used in every adder engine. In the reference it is
  presented as the chosen way to pack adder layers into DSP slices, but it was
  not yet integrated into the evaluated build.
- **Layer links** are frame-level ping-pong stores instead of element streams.
- **Skip add and ReLU** are fused into the output stage of the second layer of
  a block, instead of separate stages.
- **Saturation.** Activations are saturated to signed 8 bits everywhere,
  including after ReLU (0..127).
- **Not included:**
  - the board's processor system and DRAM movers: the host drives the `cfg`,
    `img_*` and `res_*` ports directly;
  - the LUT/DSP co-packed 8-bit variant, which is only proposed as future work;
  - trained weights. Accuracy on real images depends on coefficients converted
    as above and has not been measured here.

## Simulation

All files need the package first. With plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_addnet_layer \
      -Irtl -Itb rtl/addnet_pkg.sv tb/addnet_ref_pkg.sv rtl/*.sv \
      tb/layer_harness.sv tb/tb_addnet_layer.sv
    ./obj_dir/Vtb_addnet_layer

Use the same command for the other testbenches. Leave out
`tb/layer_harness.sv` where it is not needed. Every testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb/addnet_ref_pkg.sv` is an independent integer model used by all the
testbenches. It contains:
- the adder and convolution sums;
- BN with both rounding rules;
- the skip add and ReLU;
- the average pool;
- a calibration routine that picks BN coefficients so that activations use
  the 8-bit range instead of saturating.

| testbench | what it checks |
|---|---|
| `tb_quad_int12_sub` | 3000 random and corner operand sets, all lanes and carries |
| `tb_bn_quant` | 20,000 values, plain and pre-scaled forms, ties, saturation |
| `tb_add_relu` | all modes over a sweep of operand pairs |
| `tb_fmap_pingpong` | 12 frames with a slow consumer, stall and empty cases |
| `tb_global_avgpool` | 6 frames (8 channels, 4x4) and the frame time |
| `tb_addnet_layer` | three engines via `layer_harness`: a 3x3 adder layer with skip, a 1x1 stride-2 adder, a stride-2 convolution. Reconfigured per frame, then back-to-back frames with a slow consumer. Outputs and cycle counts are checked. |
| `tb_addnet_basic_block` | a downsample block followed by an identity block, several frames |
| `tb_addnet_top` | whole network at IMG=8, BASE=4, CI_PAR=2, 3 frames (runs in seconds) |
| `tb_addnet_top_full` | whole network at default sizes, 3 frames (about 30 s, 2.56 M cycles per frame) |

The two top-level testbenches share `tb/addnet_top_tb_body.svh`. They:
- build random weights and calibrate BN on the first frame;
- give three layers a pre-scaled BN;
- load everything over `cfg`, push three frames, and compare all scores;
- check every engine's busy time against the formula;
- count the mechanisms: back-pressure stalls, engines working together, both
  downsample paths, and the pre-scaled BN. Any that never happened counts as
  a failure.

## Changing it

- Smaller networks: override `IMG` and `BASE` on `addnet_top`. `IMG` must be a
  multiple of 4.
- Throughput: raise `CI_PAR`. This costs `2*CI_PAR` input read ports and
  `CI_PAR` packed subtractors per engine.
- Store depths come from the layer shapes in `addnet_top`/`addnet_basic_block`.
  Addresses are 16 bits, so one feature map can hold at most 65,536 bytes.
