# Flexible-Pruning dataflow CNN accelerator

A dataflow CNN accelerator normally hard-wires one network: every layer has its
own hardware stage, and every loop bound is a synthesis constant. This design
keeps that structure but makes the one quantity that filter pruning changes,
the **number of channels of each layer**, a run-time value. One bitstream,
built for the full (not pruned) network, can then run any pruned version of it:
a model switch takes a pipeline drain plus a weight load, instead of an FPGA
reconfiguration that costs hundreds of milliseconds. Pruned models run with
fewer loop iterations and therefore finish frames faster, so a server can trade
accuracy for throughput as its incoming frame rate changes.

The same RTL, elaborated with `FLEXIBLE = 0` and the pruned channel counts as
parameters, is a *fixed* accelerator for one pruned model: the run-time ports
are ignored and synthesis removes the loop-bound logic.

The default configuration is the CNV network with 2-bit weights and 2-bit
activations (CNVW2A2) on 3x32x32 images.

## Dataflow structure

```
 image ──► ctrl gate ─► L0: SWU ─► MVTU ─► DWC ─► L1: SWU ─► MVTU ─► DWC ─► MaxPool ─► DWC ─► L2: SWU ─► MVTU ...
                                                                      ... ─► L6..L8: MVTU (FC) ─► class scores
```

Every layer is a hardware stage and all stages run at the same time on
valid/ready streams, so the frame rate is set by the slowest stage.

| module              | role |
|---------------------|------|
| `adaflow_accel`     | top: builds the chain from the per-layer parameter arrays |
| `swu`               | sliding window unit: line buffer, emits KxK windows |
| `mvtu`              | matrix-vector-threshold unit: PE x SIMD multiply-accumulate array plus threshold activation |
| `maxpool`           | 2x2 max pool, one comparator lane per channel |
| `stream_dwc`        | re-folds a stream from one lane count to another |
| `model_switch_ctrl` | run-time channel registers and the switch protocol |
| `adaflow_pkg`       | shared types and the default CNV layer table |

Default layer table (`adaflow_pkg::CNV_*`):

| layer | kind | in map | K | channels in → out | PE | SIMD | after |
|------:|------|-------:|--:|-------------------|---:|-----:|-------|
| 0 | conv | 32x32 | 3 | 3 → 64     | 16 | 3  | |
| 1 | conv | 30x30 | 3 | 64 → 64    | 32 | 32 | 2x2 pool |
| 2 | conv | 14x14 | 3 | 64 → 128   | 16 | 32 | |
| 3 | conv | 12x12 | 3 | 128 → 128  | 16 | 32 | 2x2 pool |
| 4 | conv | 5x5   | 3 | 128 → 256  | 4  | 32 | |
| 5 | conv | 3x3   | 3 | 256 → 256  | 1  | 32 | |
| 6 | FC   | 1x1   | 1 | 256 → 512  | 1  | 4  | |
| 7 | FC   | 1x1   | 1 | 512 → 512  | 1  | 8  | |
| 8 | FC   | 1x1   | 1 | 512 → 10   | 2  | 1  | (scores, no activation) |

Convolutions are unpadded with stride 1. The folding (PE, SIMD) is the usual
one for this network; the last layer uses PE = 2 so that 10 classes divide
evenly.

## How a layer is folded (mvtu)

A layer multiplies a `COUT x (K*K*CIN)` weight matrix with each input window.
The MVTU has `PE` processing elements with `SIMD` lanes each. Per cycle it takes
`SIMD` window elements and multiplies them with `PE*SIMD` weights, so:

* `SF = K*K*cin / SIMD` cycles produce one group of `PE` outputs;
* `NF = cout / PE` groups cover all output channels;
* a window costs `SF*NF` cycles, an image `OFM*OFM*SF*NF` cycles.

The first group reads the window from the stream and keeps it in an input
buffer; the other `NF-1` groups re-read it from there. At the end of each
group every PE compares its 16-bit accumulator with its three thresholds and
outputs how many it reaches (a 2-bit activation). The last layer has no
thresholds and outputs the signed accumulators as class scores.

Weights are signed 2-bit, activations unsigned 2-bit, image pixels unsigned
8-bit.

## Run-time channel counts (the flexible part)

Pruning removes whole filters, so only channel counts change between models,
and `cin` of a layer is `cout` of the layer before. Every stage gets its counts
on 16-bit ports. Hardware is always sized for the worst case; what the count
does depends on how the stage is parallelised:

* **Counts that only bound sequential loops** (MVTU `SF` and `NF`, SWU and
  width-converter channel folds). A smaller count gives fewer iterations and
  a shorter frame. The `PE x SIMD` array is fully used.
* **Counts that bound an unrolled loop** (max pool, one comparator per
  channel). Lanes at and above the count are not fed (forced to zero) and sit
  idle. The pruned model gains nothing here, but loses nothing either.

For every lane to be fed, a layer's output count must be a multiple of its own
`PE` and of the next layer's `SIMD`. The switch controller refuses any count
that breaks this rule, is zero, or exceeds the worst case. It also refuses
writes to the last layer, because the class count is never pruned.

In the simulated full-size network, one image takes 139,856 cycles from first
input to last score with all channels. With half the filters of every hidden
layer it takes 41,466 cycles.

Buffers keep their worst-case address spacing, so one count change needs no
re-packing of any buffer. The weight memory is packed densely for the loaded
model: word `nf*SF + sf` with the run-time `SF`.

## Model switch protocol (model_switch_ctrl)

1. The host raises `sw_req`.
2. At the next image boundary, input is gated. The image currently entering
   always completes.
3. When every admitted image has left the pipeline (counted in input and
   output beats), `drained` rises and `switch_cnt` increments.
4. While `drained` is high, the host writes channel counts (`cfg_we`,
   `cfg_layer`, `cfg_value`) and weights/thresholds (`wr_*`). A refused
   channel write pulses `cfg_err`. Writes outside the window are ignored
   (weights) or refused (channels).
5. The host drops `sw_req`. Images flow with the new model.

After reset, all counts are the worst case and the weight memories are
undefined. The host must open one window to load a model before the first
image.

### Weight and threshold write format

`wr_layer` selects the layer and `wr_sel` selects the memory (`MEM_WEIGHT` or
`MEM_THRESH`).

* **Weights.** The word at `nf*SF + sf` holds lane `p*SIMD + s` =
  `W[nf*PE + p][sf*SIMD + s]`, 2 bits each.
* **Weight column order.** A column index is `(ky*K + kx)*cin + c`. This is the
  order in which the SWU emits window elements.
* **Thresholds.** The word at `nf` holds lane `p*3 + t` (16 bits each). It is
  the t-th threshold of channel `nf*PE + p`, in ascending order.

`wr_data` is as wide as the widest word: 2048 bits by default, for layer 1.

## Streams and timing

* **Input.** One beat is `SIMD_0` channels of one pixel, in row-major order. By
  default that is one 24-bit RGB pixel per beat.
* **Output.** One beat is `PE_last` 16-bit signed scores. An image gives 5 beats
  by default.
* **Handshake.** All streams use valid/ready. A beat moves when both are high.
  A held output beat does not change; this is asserted in `mvtu` and `maxpool`.
* **Clock and reset.** There is one clock and an asynchronous active-low reset.
  The reset clears the control state, not the memories.
* **SWU.** The SWU is a ring of `K+1` line buffers. It starts output row `oy`
  once input rows `oy..oy+K-1` are in, and writes the next row while it reads
  the current ones. The writer may already start the next image while the last
  windows of the current one are read.
* **Width converters.** A width converter collects one pixel, then emits it.
  This costs `ch/IN_L + ch/OUT_L` cycles per pixel, which is well under an
  MVTU's per-pixel time.

Throughput at the defaults, from the folding: the slowest stages are layers 6
and 7, at `64*512 = 32,768` cycles per image. In simulation, back-to-back
images leave 34,690 cycles apart, about 2,880 images/s at 100 MHz. The extra
6% is pipeline refill at image boundaries: the line buffers refill, and a fully
connected layer cannot start before its whole input vector has arrived. With
all channels halved, the slowest stage is layer 0, at 16,200 cycles per image.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_mvtu` | Random matrices, full and pruned counts, random back-pressure. Checks the exact output rate of one group per `SF` cycles. |
| `tb_swu` | Every window element over three back-to-back images at 4 channels, then three at 2 channels, with random gaps and back-pressure. The writer runs into the next image while the last windows are still read. |
| `tb_maxpool` | Full and pruned channel counts. The unfed lanes carry random data that must not leak. |
| `tb_stream_dwc` | 2→4→2 lanes at 8 and 4 channels. Also checks a whole-pixel output (2→8 lanes), which must give exactly one beat per pixel at 4 channels too. |
| `tb_model_switch_ctrl` | Gating at the image boundary, window opening only after drain, accepted and refused writes, no input inside the window. |
| `tb_adaflow_accel` | A five-layer network end to end. Covers a switch to a pruned model in mid-stream and back again, and checks the class scores against a reference model in the testbench. Counts the switches, the gated input, the refused writes, the back-pressure and the pruned images. Also checks that pruned images finish sooner, and that back-to-back images leave within 10% of the slowest stage's time. |
| `tb_adaflow_fixed` | The five-layer network as a fixed accelerator (`FLEXIBLE = 0`, pruned counts as parameters). Includes a weight reload. |
| `tb_adaflow_full` | The same at the default CNV size: 64 to 512 channels, about 1.5 M weights, loaded through the write port. Runs in well under a minute of simulation. |

Run one, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/adaflow_pkg.sv tb/tb_adaflow_full.sv --top-module tb_adaflow_full
./obj_dir/Vtb_adaflow_full
```

The weights, thresholds and images are random. The thresholds are placed
around the spread of each layer's accumulator, so activations use all four
levels. No trained network is included.

## Departures and limits

* **Network details.** The layer topology, the folding and the number formats
  (16-bit accumulator, unsigned activations) are this design's choices for a
  CNVW2A2-style network.
* **Loadable weights.** Weights live in writable memories so that a model can
  be switched without a new bitstream. The cost is a host write port as wide as
  the widest weight word.
* **Memory reads.** Weight, threshold and line-buffer memories are read
  asynchronously (distributed-RAM style). Mapping the large ones to block RAM
  would need a registered read and one more pipeline stage in `mvtu` and `swu`.
* **No latency overhead from flexibility.** A pruned model takes the same
  number of cycles on the flexible build as on a fixed build of that model:
  929 cycles per image in the test network, in both cases. Hardware built
  through high-level synthesis tends to lose a little latency to run-time loop
  bounds. This RTL does not, because its loop bounds are compared in the same
  cycle as the counters. The cost of flexibility is only extra logic: the
  count registers, comparators and idle max-pool lanes.
* **No FIFOs.** There are no FIFOs between stages. A burst of back-pressure
  stalls the whole chain at once.
* **No pruning checks outside the controller.** Counts must be multiples of
  `SIMD` at the input of every stage. The controller enforces this. The
  modules themselves do not check it.
* **1-bit weights.** Variants with 1-bit weights (W1A2) run on this hardware
  with ±1 weights in the 2-bit fields. They do not get the smaller arithmetic a
  dedicated 1-bit build would have.
* **Class count.** A dataset with more than 10 classes needs a different
  `L_COUT` for the last layer (with `L_PE` dividing it). For example,
  traffic-sign recognition has 43 classes.
* **Outside the hardware.** Choosing which pruned model to run, training and
  pruning the models, and reconfiguring the FPGA for a fixed accelerator all
  happen outside this hardware. The accelerator only provides the ports they
  drive.

## Changing the design

* **Layer table.** All layer properties are array parameters of `adaflow_accel`
  (`L_K`, `L_IFM`, `L_COUT`, `L_PE`, `L_SIMD`, `L_POOL`). Layer `i` takes the
  output of layer `i-1`. A fully connected layer is `K = 1` on a 1x1 map. The
  pooled size must match the next `L_IFM`. `CIN0`, `L_COUT` and the pooled
  channel counts must be multiples of the corresponding `SIMD` and `PE`.
* **Fixed accelerator.** Set `FLEXIBLE = 0` and give the pruned counts in
  `L_COUT`.
* **Formats.** `ABITS` and `WBITS` set the activation and weight widths. The
  threshold count follows as `2^ABITS - 1`. `ACC_W` must hold the largest dot
  product of any layer.
