# Low-precision speaker-identification accelerator

This design is a small FPGA inference engine for speaker identification. A
network of fully connected layers, `y = f(W·x + b)`, takes about 20 frames of
cepstral features (400 values) and scores each enrolled speaker. The weights are
stored at low precision, either 8-bit fixed point or ternary (−1, 0, +1). The
whole model therefore fits in the block RAM of a small Zynq-7020-class part
(140 blocks of 512 × 72 bits, about 630 KB), and inference never touches
external DRAM.

There are two accelerators. They share one parameterised core, `sid_accel`:

| build | PUs (`N`) | weights | per-PU arithmetic | layer scale |
|---|---|---|---|---|
| fixed point | 256 | 8-bit (`W_BITS`) | multiply-accumulate | none |
| ternary | 512 | 2-bit code | add / subtract / hold | one multiplier in the serializer |

The top, `sid_top`, places both side by side. Each has its own memory and its
own ports, prefixed `fxp_` and `tern_`. On the FPGA they are alternative builds:
each on its own uses all 140 block RAMs.

Feature extraction, the host processor, the UART link and the AXI bus are not
part of this RTL. The host is reduced to a simple write/read port into the
model memory plus a `start`/`done` pair.

## Data flow through one accelerator

```
            host_* port (while idle)
                 │
   ┌─────────────▼──────────────┐   72-bit word / cycle
   │ model_mem (140 × bram_sdp) │──────────────┐
   └─────────────▲──────────────┘              ▼
                 │                     deserializer ── fifo3 (3 entries) ── pu_array (N PUs)
                 │ 72-bit writes                                              │ N × 32-bit
                 └──────────────────────── serializer ◄───────────────────────┘
                                            (tern_scaler in the ternary build)
   controller: SLEEP → INIT → RUN, issues every read, starts the serializer
```

A layer is a matrix–vector product that is streamed **column by column**:

* Each step feeds one input value `x_i` to all PUs, together with column `i` of
  `W`. PU `k` receives `W[k][i]`.
* Every PU accumulates its own output row. After the last column, a bias token
  adds `b_k`.
* The array then holds `N` finished outputs at once. The serializer writes them
  back to memory, and they become the next layer's input.

The memory delivers one 72-bit word per cycle, so the read port is the
bottleneck. A full 256-row column of 8-bit weights takes `ceil(256/9) = 29`
reads. A full 512-row ternary column takes `ceil(512/36) = 15` reads.

### Per-tile schedule

A layer with more outputs than PUs is cut into **tiles** of at most `N` output
rows. Each tile is a complete pass over the inputs. The controller issues at
most one read per cycle, and data returns one cycle later tagged with what it
is (`rd_tag_t`):

1. Clear the PU accumulators.
2. For each input `i`:
   * on even `i`, read the activation word, which holds `x_i` and `x_i+1`;
   * then read the `ceil(tw/WPW)` weight words of column `i`, where `tw` is the
     tile width and `WPW = 72 / W_BITS`.
3. Read the `ceil(tw/2)` bias words.
4. Wait until the array has consumed the bias token.
5. Start the serializer and wait for its `done`.

The deserializer collects the weight words of a column into one `N`-lane
vector. When the last word arrives, it pushes one token `{x_i, column}` into the
FIFO. The PU array pops one token per cycle, so the FIFO rarely holds more than
one entry. The controller still stalls column issue while the FIFO is almost
full and counts those cycles (`stall_cycles`). PUs beyond row `tw` may
accumulate leftover weights from an earlier, wider tile; their outputs are
never written back.

Cost per tile, in cycles:

* input words: `ceil(in/2)`;
* weight words: `in·ceil(tw/WPW)`;
* bias words: `ceil(tw/2)`;
* serializer: `ceil(tw/2)` for fixed point, `tw` for ternary;
* plus a few cycles of fixed overhead.

The 400→256→256→256→256→300 fixed-point model takes about 45 K cycles. The
400→512→512→512→512→300 ternary model takes about 38 K cycles with no columns
skipped.

### Zero-column skipping (ternary build)

With `ZERO_SKIP = 1`, the deserializer drops a column whose tile weights are
**all** zero. Such a column would add nothing to any PU, so it never reaches the
array. It still has to be read to find that out, so skipping saves array work
and FIFO traffic but not read bandwidth. Dropped columns are counted in
`skipped_cols`.

Individual zero weights cost nothing in a ternary PU anyway: its accumulator
register is simply not enabled.

## Number formats

* **Activations, biases, accumulators and the ternary scale** are 32-bit two's
  complement Q4.28 (4 integer bits, 28 fraction bits).
* **Fixed-point weights** are `W_BITS`-bit two's complement with `W_BITS−1`
  fraction bits, so they cover [−1, 1). The product `x·w` is shifted right by
  `W_BITS−1` before it is accumulated.
* **Ternary codes**: `00` = 0, `01` = +1, `11` = −1; `10` is treated as 0.
* All additions wrap on overflow. Nothing saturates except the activation
  quantizer.

`act_quant` runs after the bias and is configured per layer:

* **ReLU** clamps negatives to 0.
* **Quantization** clips to [0, 1] and keeps only `qbits` fraction bits. The
  result stays in Q4.28.

In the fixed-point build, each PU applies `act_quant` to its own sum.

In the ternary build, the PUs only add and subtract, which gives `acc = Σ ±x_i`.
The serializer then multiplies each output once by the layer constant `Wp`
(`tern_scaler`: `(acc·Wp) >>> 28`), and applies `act_quant` after that. So that
the bias can be added before the scale, the **ternary bias words must hold
`b/Wp`**, not `b`. The host prepares this when it builds the model image.

## Memory image and model header

`model_mem` is one flat space of 71,680 words of 72 bits, with a 17-bit word
address. The upper address bits select the block RAM. Out-of-range reads return
0, and out-of-range writes are dropped. Values are packed as follows:

* **32-bit values** (inputs, activations, biases): two per word. Element `2k`
  is in bits [31:0], element `2k+1` in bits [63:32], and bits [71:64] are 0.
* **Weights**: `72/W_BITS` per word, with element `j` in bits
  `[j·W_BITS +: W_BITS]`. That is 9 per word at 8 bits and 36 per word for
  ternary codes.

The header sits at word 0:

| word | bits | field |
|---|---|---|
| 0 | [7:0] | `n_layers` (1 … `MAX_LAYERS` = 8) |
| 0 | [24:8] | `act_a`: word address of buffer A, which holds the input features |
| 0 | [41:25] | `act_b`: word address of buffer B |
| 1+2l | [11:0] / [23:12] | `in_dim` / `out_dim` of layer `l` |
| 1+2l | [40:24] | `w_base`: first weight word of layer `l` |
| 1+2l | [57:41] | `b_base`: first bias word of layer `l` |
| 1+2l | [58] / [59] / [64:60] | `relu`, `quant`, `qbits` |
| 2+2l | [31:0] | `Wp` of layer `l` (ternary build; ignored by fixed point) |

**Weight block.** The weight block of a layer is ordered by tile, then by input
column. For tile `t` and input `i`, it holds the weights
`W[t·N + r][i]` for `r = 0 … tw−1`, packed from the start of a new word. The
next column starts on the next word, and the pointer runs on from one tile into
the next. The reference model `SidModel::layout()` in `tb/sid_tb_pkg.sv`
builds exactly this image and can serve as the host-side packer.

**Biases.** The biases of tile `t` start at `b_base + t·N/2`.

**Activation buffers.** Layer `l` reads buffer A when `l` is even and buffer B
when it is odd, and writes the other one. When `done` pulses, `out_base` and
`out_dim` say where the result is and how long it is. Each buffer must hold the
widest layer, which is `ceil(width/2)` words.

## Control

The `controller` FSM has three states:

* **SLEEP**: the host owns the memory through `host_we/host_waddr/host_wdata`
  and `host_re/host_raddr` (`host_rdata` arrives one cycle after `host_re`).
  Raising `start` moves to INIT.
* **INIT**: reads the 17 header words into registers.
* **RUN**: performs the per-tile schedule above for every layer. Its internal
  phases are layer set-up, tile set-up, column issue, bias issue, bias wait and
  serializer wait.

When RUN finishes, `done` pulses for one cycle and the FSM returns to SLEEP.
`busy` is high from `start` to `done`, and host accesses during that time are
ignored. Reset is synchronous and active-low (`rst_n`). It clears control state
only: memory contents survive, so a model can be loaded once and evaluated
many times.

## Modules

| module | role |
|---|---|
| `sid_pkg` | widths, Q4.28 constants, header structs, read tags, FSM states |
| `bram_sdp` | one 512 × 72 simple-dual-port block RAM, read-first, 1-cycle read |
| `model_mem` | 140 `bram_sdp` as one word space |
| `controller` | SLEEP/INIT/RUN FSM, read sequencing, tiling, layer ping-pong |
| `deserializer` | unpacks weight words into a column, selects `x_i`, collects the bias vector, skips zero columns |
| `fifo3` | 3-entry first-word-fall-through FIFO between the deserializer and the array |
| `pu_array` | `N` PUs: `pu_fxp` or `pu_tern` |
| `pu_fxp` | 32 × `W_BITS` multiply-accumulate, bias add, `act_quant` |
| `pu_tern` | add/subtract/hold accumulate, bias add |
| `act_quant` | ReLU, then clip to [0, 1] and truncate to `qbits` fraction bits |
| `serializer` | writes the array outputs back, two values per word |
| `tern_scaler` | the single `Wp` multiplier plus `act_quant` for the ternary build |
| `sid_accel` | one accelerator: all of the above plus the host-port mux |
| `sid_top` | the fixed-point (`N=256`, 8-bit) and ternary (`N=512`) accelerators side by side |

Main parameters:

* `sid_top`: `FXP_N` (256), `FXP_W_BITS` (8), `TERN_N` (512).
* `sid_accel`: `N`, `W_BITS`, `TERNARY`, `ZERO_SKIP`, `N_BLK` (140),
  `MAX_LAYERS` (8).

`W_BITS` must divide into 72 with no loss (2, 4, 8). A 32-bit weight build
would waste 8 bits per word and has not been tested.

## Where this design departs from the original description

* **Ping-pong activation buffers.** The original description overwrites the
  layer input in place with the layer output. That breaks as soon as a layer
  needs more than one output tile, because the second tile still needs the
  inputs. Here each layer writes the other of two buffers.
* **Header-driven configuration.** The layer list, addresses, activation
  options and ternary scales live in a memory header that this design defines.
  The original only says that the model is loaded into block RAM as a parameter
  image.
* **Tiling over outputs only.** Wide layers are split into tiles of `N` output
  rows. Long inputs need no split, because the column stream already
  accumulates partial sums.
* **One FIFO.** The original mentions 3-entry FIFOs between each stage. Here
  there is one, between the deserializer and the array. Its almost-full stall
  is a safety guard that does not trigger in normal operation, because the
  array drains one token per cycle.
* **Zero skipping is per column** (all weights of the tile zero), not per
  weight. Every PU sees the same column stream.
* **Latency.** At one read per cycle, this RTL evaluates the 5-layer, 90-wide
  comparison model in about 11 K cycles, and a 256-wide 8-bit model in about
  45 K cycles. The published measurements of roughly 2.2 M cycles per
  evaluation include overheads that are not described in enough detail to
  reproduce. The read count per 512 × 512 8-bit layer (512 × 57 ≈ 29 K) does
  match.
* **32 × W_BITS multiplier** in each PU instead of a full 32 × 32 one.
* **Ternary scale.** One constant `Wp` per layer: negative weights use `−Wp`.
  Two independent constants per layer are not supported.
* **Not built:** the on-the-fly Toeplitz rewrite that would let convolutional
  and locally connected networks run on the same array. Convolutional models
  therefore run only if the host stores the expanded matrices. Also not built:
  the host CPU, MFCC extraction, voice-activity detection, UART, the AXI BRAM
  controller and the clock PLL.
* **Capacity.** The 140 blocks hold 645,120 bytes, or 71,680 words. The 8-bit
  small network and the ternary large network fit. The 4-bit large network
  (1.43 M parameters) does not fit in the default 8-bit build, and is marginal
  even in a `W_BITS = 4` build.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. Expected
values come from the reference functions in `tb/sid_tb_pkg.sv`:

* `ref_aq`, `ref_term` and `ref_scale` for the arithmetic;
* the `SidModel` class, which builds a random network and its memory image and
  evaluates it bit-exactly.

System-level testbenches:

* `tb_sid_accel` and `tb_sid_top` run random 5-layer networks through both
  builds at reduced size (`N` = 20 and 40). Between them they exercise multiple
  tiles per layer, odd widths, ReLU and quantization, and skipped
  columns. They check results, the result location and the
  cycle count against the schedule above, and fail if any mechanism never
  occurred.
* `tb_sid_top_full` runs `sid_top` at its default sizes. The fixed-point model
  is 400→256×4→300, which needs two tiles in the last layer. The ternary model
  is 400→512×4→300.

`tb/accel_drv.sv` loads a model through the host port, runs it and checks it.
It is shared by the system-level testbenches.

To simulate with Verilator 5 (the package files go first):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sid_pkg.sv tb/sid_tb_pkg.sv tb/tb_sid_top_full.sv \
    --top-module tb_sid_top_full -Mdir obj_full -j 8
./obj_full/Vtb_sid_top_full
```

Replace the testbench name to run another test; leaf tests such as `tb_fifo3`
need only `rtl/sid_pkg.sv` ahead of them. The full-size test simulates in
about a second once it has been built.
