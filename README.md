# NeuroVision: a small convolutional spiking neural network in hardware

This RTL classifies an 8x8 grey-scale image (for example a down-sampled
MNIST digit) with a convolutional *spiking* neural network. A conventional
CNN computes one pass of multiply-accumulates per image. Here the features
are turned into trains of binary spikes by leaky integrate-and-fire (LIF)
neurons. The class is the output neuron that fires most often over a fixed
number of time steps. All arithmetic is signed fixed point. The layers run
one after another under a small state machine, and each layer computes one
product per clock, which keeps the logic small enough for a low-end FPGA
(it was sized for a Xilinx Spartan-7 XC7S50).

The architecture, layer sizes, number format, neuron equation and output
decoding follow the NeuroVision accelerator (F. Belemkoabga, MIT). The
number of time steps, the load port, the reuse of the convolution results
across time steps and the display geometry are choices made in this RTL.
They are listed under [Departures and choices](#departures-and-choices).

## The network

```
image 8x8 ──► conv 8 filters 3x3 ──► max-pool 2x2 ──► LIF x72 ──► flatten ──► FC 72→10 ──► LIF x10 ──► spike counter ──► class
                 (6x6x8)               (3x3x8)        spikes        (72)        currents     spikes      (10 counts)
```

| stage | module | size (default) | work per pass |
|---|---|---|---|
| parameter/image store | `param_store` | 874 words of 16 bits | written one word per cycle |
| convolution | `conv_layer` | 1→8 channels, 3x3, stride 1, no padding | 2592 MACs, 1 per cycle |
| max pooling | `maxpool_layer` | 2x2, stride 2 | 288 compares, 1 per cycle |
| hidden LIF layer | `lif_layer` (72 × `lif_neuron`) | 72 neurons | all in parallel, 1 cycle per step |
| flatten | wiring in `neurovision_top` | index = c·9 + row·3 + col | none |
| fully connected | `fc_layer` | 72 → 10 | 720 MACs, 1 per cycle |
| output LIF layer | `lif_layer` | 10 neurons | 1 cycle per step |
| decoding | `spike_counter` | 10 counters of 16 bits, arg-max | 1 cycle per step |
| display | `histogram_display` | 10 bars on 1280x720 | 1 pixel per cycle |
| sequencing | `net_controller` | FSM | — |

`nv_pkg` holds the default sizes, the 16-bit word type and the FSM state
encoding.

## Number format

Words are 16-bit two's complement with 14 fractional bits (Q2.14, range
[-2, 2), resolution 2^-14). The constant 1.0 is `16'sd16384`. Every module
takes the width `W` and fraction `FRAC` as parameters. The unit testbenches
also run the layers in Q1.15 and Q16.16.

All multipliers compute the same way. A `W x W` product gives `2W` bits. It
is shifted right by `FRAC` with an arithmetic shift, which rounds toward
minus infinity. The shifted products are summed in a wide accumulator,
which starts at the bias. Only the final sum is saturated to `W` bits.
So a convolution or FC output is exact up to the per-product truncation
and clips cleanly instead of wrapping.

## The LIF neuron (the part that makes it spiking)

Each neuron keeps a membrane potential `U`. One time step computes

```
S[t]   = U[t] > thr
U[t+1] = beta·U[t] + w·x − beta·S[t]·thr
```

- `beta·U` is the leak. The default `beta` is 0.819 (`13418` in Q2.14).
- `w·x` is the input. In the network the previous layer has already applied
  the weights, so `lif_layer` ties `w` to 1.0 and `x` is the layer's input
  current.
- The last term is a *soft reset*. After a spike the membrane is lowered by
  `beta·thr` rather than zeroed, so a strong input can keep a neuron firing
  on consecutive steps. The default threshold is 1.0.

`U` is saturated to 16 bits. `spike` is combinational from the stored `U`,
so one cycle after a `step` pulse it shows whether the new membrane is above
threshold. `clear` zeroes the membrane before a new image. In the network,
`beta` and `thr` are shared by all neurons and can be reprogrammed through
the parameter store.

In the hidden layer a neuron's input current is one pooled convolution
value, which is the same at every step. A neuron whose input `I` is larger
than `thr·(1−beta)` (about 0.18 with the defaults) charges up and then fires
at a rate that grows with `I`. So the spike trains carry the feature
strengths over time. The FC layer then sees each spike as the value 1.0 and
each missing spike as 0.

## Sequencing and timing

`net_controller` is a Moore FSM. The layers talk to it through one-cycle
`start` pulses and one-cycle `done` pulses.

```
IDLE ─start↑─► START_CONV ─► WAIT_CONV ─conv_done─► START_POOL ─► WAIT_POOL ─pool_done─┐
                                                                                     ▼
      ┌──────────────────────────── NUM_STEPS times ──────────────────────────► STEP_LIF1
      │                                                                              │
NEXT_STEP ◄── STEP_LIF2 ◄─fc_done── WAIT_FC ◄── START_FC ◄───────────────────────────┘
      │ (last step)
      ▼
    DONE ─start↑─► START_CONV ...
```

- The run starts on a rising edge of `start`, for example from a board
  switch. A switch left high runs exactly one classification.
- `START_CONV` also clears every membrane and spike counter.
- The image is the same input at every time step, so the convolution and
  pooling results do not change from step to step. They are computed once
  per image, and the FSM then loops only over
  hidden LIF → FC → output LIF → count.
- `DONE` holds `done` high, with `predicted` and `spike_count` valid, until
  the next rising edge of `start`.

Cycle count for one image with the defaults, measured from the cycle after
`start` rises until `done`:

```
1 + (2592+1) + 1 + (288+1) + NUM_STEPS·(1 + 1 + (720+1) + 1 + 1)  = 39134  (NUM_STEPS = 50)
```

About 93% of the time goes to the FC layer, which repeats at every step.

Assertions in `net_controller` check that each layer's `done` arrives only
while the FSM waits for it.

## Loading an image and parameters

`param_store` is a set of registers written through `ld_en`, `ld_addr` and
`ld_data`. Each cycle with `ld_en` high writes one word. With the default
sizes the address map is:

| address | words | contents |
|---|---|---|
| 0 – 63 | 64 | image, row-major (`y*8 + x`) |
| 64 – 135 | 72 | conv weights `[oc][ky][kx]` → `64 + oc*9 + ky*3 + kx` |
| 136 – 143 | 8 | conv biases |
| 144 – 863 | 720 | FC weights `[j][i]` → `144 + j*72 + i` |
| 864 – 873 | 10 | FC biases |
| 874 | 1 | beta (reset value 0.819) |
| 875 | 1 | threshold (reset value 1.0) |

Writes to any other address are ignored. Reset zeroes the image and the
weights. The flattening order, channel then row then column, matches
PyTorch's `flatten` of a `[C][H][W]` tensor. So FC weights trained in
PyTorch/snnTorch can be written directly after conversion to Q2.14:
`round(w · 16384)`, saturated to 16 bits.

## Output decoding and display

`spike_counter` counts the spikes of each output neuron over all time steps.
Its counters saturate at 65535. `predicted` is the index with the highest
count, and a tie goes to the lowest index.

`histogram_display` turns the counts into a bar chart for a 1280x720 video
stream. For each `hcount`/`vcount` it returns an RGB pixel, one clock later.
Bar `n` covers columns `100n+10 … 100n+89` and rises `8·count` rows from the
bottom edge. The predicted class is drawn red, the other bars green. The
video timing generator and the HDMI (TMDS) encoder are not part of this
RTL. `neurovision_top` takes `hcount`/`vcount` in and sends `pixel` out.

## Top-level ports (`neurovision_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `start` | in | 1 | rising edge starts a classification |
| `ld_en`, `ld_addr`, `ld_data` | in | 1, 12, 16 | parameter/image write port |
| `busy`, `done` | out | 1 | running / finished |
| `predicted` | out | 4 | winning class |
| `spike_count` | out | 10 × 16 | spikes per class |
| `hcount`, `vcount` | in | 11, 10 | pixel coordinates from video timing |
| `pixel` | out | 24 | histogram pixel (RGB) |

Parameters: `IMG` (8), `K` (3), `OUT_CH` (8), `N_OUT` (10), `NUM_STEPS` (50),
`W` (16), `FRAC` (14), `CW` (16, counter width), `ADDR_W` (12). The hidden
layer size follows from them: `OUT_CH·((IMG−K+1)/2)²`.

## Departures and choices

- **Time steps.** The number of steps is a parameter. 50 is an assumed
  default. The reference runs reached counts in the high 30s, so at least
  that many steps are needed.
- **Input encoding.** The image is applied as a constant input at every
  step (direct encoding). No rate or Poisson encoder is built. This is why
  conv and pool run only once per image.
- **Parameters are loaded, not fixed at build time.** The reference
  simulation hard-coded trained weights. No trained weights are included
  here; they must be written through the load port.
- **Sequential layers.** Convolution, pooling and FC each use one
  multiplier or comparator. The LIF layers update all neurons at once. A
  faster build could unroll the FC layer, which dominates the run time.
- **Rounding and overflow.** Products are truncated toward minus infinity,
  and sums and membranes saturate.
- **Only the 8x8 network is built.** There is also a 28x28 MNIST variant:
  conv 8×5x5 → pool → LIF → conv 16×5x5 → pool → LIF → FC 256→10. It needs a
  second conv/pool/LIF stage and about 6000 parameter words, and there is
  no top module for it. `conv_layer`, `maxpool_layer`, `lif_layer` and
  `fc_layer` accept its sizes as parameters (`IMG=28, K=5`;
  `IN_CH=8, OUT_CH=16`; `N_IN=256`). `tb_mnist28_network` wires them into
  that network. In it the second convolution runs at every time step,
  because its input is the spike map of the first LIF layer. That is
  204,800 cycles per step with one multiplier.
- **FC worked example.** The unit test of `fc_layer` uses the inputs
  [-0.5, 0.7, 0.2, -0.3, 0.6], weights
  [[-0.2, 0.4, -0.6, 0.8, -0.1], [0.5, -0.3, 0.2, -0.4, 0.7]] and biases
  [0.1, -0.1]. Their weighted sums are 0.06 and 0.02, and those are the
  values checked.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_lif_neuron` | Q16.16 single-neuron run (x=0.4, w=0.5, beta=0.819, thr≈1) against a real-number model, 30 steps. 400 random Q2.14 steps bit-exact against an integer model. Clear and hold. |
| `tb_lif_layer` | 72 neurons × 40 random steps, bit-exact, spikes and clear |
| `tb_conv_layer` | 2x2 Q1.15 example (outputs 0.384 and −0.267). Default size bit-exact for random data and for a saturating case. 2593 cycles per pass. |
| `tb_maxpool_layer` | 4x4 example → [[0.7, 0.9], [0.5, 0.6]]. Random 8×6x6 maps. 289 cycles per pass. |
| `tb_fc_layer` | 5→2 example. 72→10 random and spike-valued inputs, bit-exact. 721 cycles per pass. |
| `tb_spike_counter` | counts, arg-max with ties, saturation |
| `tb_param_store` | every address of the map, reset values, writes outside the map |
| `tb_net_controller` | strobe order and counts with random layer latencies, held start, restart from DONE |
| `tb_histogram_display` | bar edges, heights, colours, random pixels |
| `tb_neurovision_top` | three complete classifications at default parameters against a reference model of the whole network (see below) |
| `tb_mnist28_network` | the 28x28 two-stage variant, built from the same layer modules and sequenced by the testbench for 6 time steps. Checks the pooled maps, the spike totals of each LIF layer per step, the output spikes, the counts, the class and the per-layer cycle counts. The Verilator build of this test takes a few minutes. |

For each image, `tb_neurovision_top` compares the conv and pool maps, all
ten spike counts, the predicted class and the exact cycle count (39134)
with its reference model. The third image uses a reprogrammed beta and
threshold. The test also counts hidden and output spikes, soft resets,
membrane saturation, saturated conv outputs, restarts from DONE and lit
histogram pixels, and fails if any of them never occurred. It runs in well
under a second of simulation time.

The tests use random weights, not a trained network. They show that the
hardware computes the network equations exactly, but they do not measure
classification accuracy.

### Running a test with Verilator

```
verilator --binary --timing --assert -Irtl rtl/nv_pkg.sv tb/tb_neurovision_top.sv \
          --top-module tb_neurovision_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `-Irtl` lets Verilator find
each module in `rtl/<module>.sv`. The package has to be named first.
