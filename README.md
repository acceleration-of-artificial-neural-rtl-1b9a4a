# Flexible neural-network accelerators for FPGA edge devices

This repository holds synthesizable SystemVerilog for three accelerator engines. Each one targets a
different kind of network that is common at the edge:

- **A convolution processor for temporal convolutional networks (TCNs) and CNNs.** It is a
  NEURAghe-style *Convolution Specific Processor*. It is built so that any kernel length, dilation
  and stride up to 3 costs nothing extra: every DSP multiplier does one useful multiply-accumulate
  in every cycle.
- **An MBConv engine** for the inverted-residual blocks of light-weight CNNs such as MobileNet-V2.
- **A spiking neural engine** that integrates input spike events into leaky integrate-and-fire
  neurons.

The three engines are alternatives for the same platform. In `neuraghe_top` they sit side by
side, and each has its own ports. The convolution processor is the main design. It is also the
most complete.

## 1. The convolution processor (`csp`)

### 1.1 Main idea: one DSP per kernel, four windows per SoP

Older versions of this processor wired DSPs into fixed 3×3 or 5×5 trellises. Any other kernel
shape wasted multipliers or needed extra passes. Here the organisation is turned around:

- One multiplier handles a whole kernel, one tap per cycle. A kernel of `kw × kh` taps takes
  `kw·kh` cycles for each output, for any size.
- Four multipliers form a **SoP unit** (`sop_unit`). They share one weight per cycle and work on
  four neighbouring output positions (windows) of the same input feature. One weight fetch
  therefore feeds four MACs.
- SoPs form an `N_ROWS × N_COLS` **MAC matrix** (`mac_matrix`). The default is 4 × 12, the
  "12×4" build for a Zynq XC7Z020, which has 192 multipliers.
  - Column *c* works on input feature *c*. All SoPs of a column see the same four samples.
  - Row *r* produces output feature *r*. Each SoP has its own weight bank.
- One **shift adder** per row (`shift_adder`) produces the output:
  1. It adds the 12 column results.
  2. It shifts the sum right by the layer's number of fractional bits (`qf`).
  3. It can add a partial result from an earlier run.
  4. It saturates the result to 16 bits.

  Accumulating over runs is how layers with more than 12 input features are computed: chunk by
  chunk, in 12-feature pieces.

All data are 16-bit fixed point. The DSP accumulators are 48 bits wide.

### 1.2 Conflict-free strided loads (`banked_mem`)

Each SoP lane needs one sample per cycle. The four lanes of a column read the samples at
`a, a+s, a+2s, a+3s`, where `s` is the stride.

The memory of each column is therefore split into **8 interleaved banks**. Sample `n` lives in
bank `n mod 8`, row `n div 8`. With stride 1, 2 or 3, the four addresses always fall in four
different banks:

| stride | banks hit by `a … a+3s` (mod 8) |
|--------|---------------------------------|
| 1      | a, a+1, a+2, a+3                |
| 2      | a, a+2, a+4, a+6                |
| 3      | a, a+3, a+6, a+1                |

So the whole column memory delivers four samples per cycle from one address and one stride.

With only 4 banks, stride 2 would put samples 0 and 4 in the same bank. That is why the bank count
is 8. An assertion in `banked_mem` flags any access where two lanes collide.

Each bank is a 1024 × 16 RAM, the size of a RAMB18. A column memory therefore holds 8192 samples.
Each memory has two ports:

- **Port A** serves the DMA, with one 64-bit word (4 consecutive samples) per access.
- **Port B** serves the engine.

Reads are registered on both ports, so data arrive one cycle after the request.

| memory region | organisation (default 12×4) | size |
|---|---|---|
| activations | one 8-bank memory per column | 12 × 16 kB = 192 kB |
| weights (`weight_bank`) | one 1024 × 16 bank per SoP | 48 × 2 kB = 96 kB |
| outputs / partial results | per row, two sections, 8 banks each | 4 × 2 × 16 kB = 128 kB |

That makes 208 RAMB18-sized memories. The soft-core controller would add its own 32, which are not
in this repository.

### 1.3 Sources, sink and pipeline (`conv_engine`)

Three address generators drive the memories. All of them are programmed once per run:

- **`act_source`** walks three nested loops: output group `g`, kernel row `ky`, kernel column `kx`.
  For each step it issues
  `addr = act_base + 4·g·stride + ky·row_step + kx·dilation`.
  - For 1-D TCN layers, `kh = 1` and the dilation spreads the taps.
  - For 2-D CNN layers, `row_step` is the image row pitch.

  It marks the first and the last tap of each group.
- **`weight_source`** replays the kernel stored at `w_base … w_base + kw·kh − 1` once for every
  output group, in step with the activation source. All weight banks read the same address.
- **`partial_source`** and **`output_sink`** read the previous partial results and write the new
  results. Both step through the output region four samples at a time.

The pipeline runs in this order:

```
T    source requests (activation address+stride, weight address)
T+1  samples and weights reach the SoPs; products registered
T+2  accumulate; on the last tap, the partial-result read is issued
T+3  shift adder: column sum, shift, + partial, saturate
T+4  result group written to the output section
```

A run of `n_og` output groups (`4·n_og` output samples per row) takes exactly
**`n_og·kw·kh + 6` cycles** from start to done. There are no bubbles for any kernel, stride or
dilation. The testbenches check this count.

Each row has **two output sections**, and a run names the one it writes (`out_sel`):

- The run reads partial results from the other section.
- While the engine writes one section, a DMA can move last run's results out of the other one.

This is the double buffering that hides transfers behind computation.

### 1.4 DMAs (`dma_engine`) and local address map

There are three DMA units:

| unit | role | on-chip target |
|------|------|----------------|
| 0 | activation DMA: loads inputs, stores results | activation and output memories |
| 1 | weight DMA 1 | weight banks of rows `0 … ⌈N_ROWS/2⌉−1` |
| 2 | weight DMA 2 | weight banks of the remaining rows |

The two weight DMAs run at the same time. Together they double the weight bandwidth.

Each DMA moves `len` 64-bit words. Its off-chip side is a simple request port:

- `valid` / `ready` handshake, `we`, byte `addr` and `wdata`;
- in-order `rvalid` / `rdata`, with no back-pressure on read data.

This stands in for an AXI master on the processor system's 64-bit high-performance ports.

- **Loads** stream at one word per cycle. With a port that is always ready, a load takes
  `len + latency + 1` cycles.
- **Stores** take three cycles per word: local read, capture, send.

The weight DMAs can only load. Their local read path is tied to zero, so their write-data outputs
on the top level are constant.

On-chip addresses are 20 bits:

| bits | meaning |
|------|---------|
| [19:16] | region: 0 activations, 1 output section 0, 2 output section 1, 3 weights |
| [15:11] | column (activations) or row (outputs) |
| [10:0]  | 64-bit word within that memory |
| [15:8] / [7:0] | for weights: SoP index `r·N_COLS + c` / word within the bank |

### 1.5 Registers (`csp_regs`)

A controller programs the processor over a small 32-bit register bus. In the original platform
this is a RISC-V soft-core running scheduling firmware.

| addr | name | fields |
|------|------|--------|
| 0x00 | CE_CTRL | write bit 0 = start; read bit 0 = busy |
| 0x01 | CE_KER | kw [9:0], kh [21:16] |
| 0x02 | CE_DS | dilation [9:0], stride [17:16] (1..3) |
| 0x03 | CE_ROW | row_step [12:0] |
| 0x04 | CE_NOG | number of 4-sample output groups [11:0] |
| 0x05 | CE_ABASE | first activation sample [12:0] |
| 0x06 | CE_WBASE | first kernel word in each weight bank [9:0] |
| 0x07 | CE_OBASE | first output sample [12:0] |
| 0x08 | CE_MODE | acc_en [0], out_sel [1], qf [13:8] |
| 0x09 | STATUS | sticky done flags: bit 0 engine, bits 1..3 DMA 0..2; write 1 to clear |
| 0x10+4k | DMAk_CTRL | write bit 0 = start, bit 1 = direction (1 = store); read bit 0 = busy |
| 0x11+4k | DMAk_EXT | off-chip byte address |
| 0x12+4k | DMAk_LOC | on-chip address (map above) |
| 0x13+4k | DMAk_LEN | length in 64-bit words |

`irq` is high while any status flag is set. If a completion and a clear of the same flag happen in
the same cycle, the completion wins.

A typical layer runs in these steps:

1. Start the three DMA loads.
2. Wait for their flags.
3. Write the engine registers and start the engine.
4. Start the store of the previous run's section while the engine runs.
5. Clear the flags.

`tb/csp_tasks.svh` contains exactly this sequence as tasks.

## 2. The MBConv engine (`mbconv_engine`)

An MBConv block has three steps:

1. A pointwise expansion (1×1 convolution to many channels).
2. A depthwise convolution (one small kernel per channel).
3. A pointwise projection.

On a general convolution array the pointwise steps waste most of the adders. This engine instead
gives each step its **own matrix of processing units** (`pu_matrix` of `mbconv_pu`), and the three
matrices form a pipeline.

A processing unit is a MAC with a 32-bit accumulator that saturates instead of wrapping. Its
output is the accumulator shifted by a per-step amount and saturated to 16 bits.

Each matrix works on a **batch of N_COLS consecutive pixels** (columns). It produces N_ROWS
channels (rows) and walks the channel depth one channel per cycle. In each step, every unit does
a full MAC per cycle:

| step | matrix work | cycles per batch |
|------|-------------|------------------|
| PW1 expansion | `e[p][r] = Σ_i in[p][i]·W1[r][i]` | `c_in` |
| DW depthwise | `d[p][r] = Σ_k e[p−KS+1+k][r]·Wd[r][k]` | `KS` |
| PW2 projection | `o[p][r] = Σ_j d[p][j]·W2[r][j]` | `N_ROWS` |

A batch passes to the next step as soon as it is finished, so the three matrices work on three
batches at once.

- With no stalls, a new output batch appears every `max(c_in, KS, N_ROWS) + 2` cycles.
- The first batch leaves `c_in + KS + N_ROWS + 6` clock edges after it entered.

The depthwise window is **1-D and causal** along the pixel stream. The engine keeps the last
`KS−1` expanded pixels of the previous batch. `hist_clr` clears them at the start of a new stream.

The defaults are 12 × 9 units per matrix, so the three matrices use 324 multipliers, with
`KS = 3` and up to 16 input channels. At 150 MHz that is a 97.2 GOPS peak.

The following are **not** provided:

- channel tiling: there is one tile of 12 expanded and output channels;
- 2-D depthwise windows;
- stride 2;
- ReLU6;
- the residual addition;
- a data-transfer unit with its memory banks.

Batches and weights enter and leave through ports.

## 3. The spiking neural engine (`sne_engine`)

### 3.1 Events

Input and output are 32-bit events:

| bits | [31:24] | [23:16] | [15:8] | [7:4] | [3:0] |
|------|---------|---------|--------|-------|-------|
| field | x | y | time step | operation | channel |

| operation | meaning |
|-----------|---------|
| 0 | no operation |
| 1 | spike at (x, y) on a channel |
| 2 | end of a time step |

### 3.2 Cluster (`sne_cluster`)

A cluster holds the states of **64 neurons** (8 bits each) for an 8×8 tile of one output channel.
It also holds a 3×3 kernel of 4-bit signed weights for each of 16 input channels.

- **Spike event.** The cluster adds the matching kernel weight to each neuron of its tile whose 3×3
  receptive field contains the spike. That is up to 9 neurons, one per cycle, with saturation at
  the 8-bit limits.
- **End-of-time-step event.** The cluster visits all 64 neurons, one per cycle:
  `V ← V − L`; if `V ≥ Vth` the neuron emits a spike and `V ← 0`.

This is a leaky integrate-and-fire model with a linear leak `L` and a threshold `Vth`, set per
cluster.

Output spikes carry the neuron's position, the time step and the cluster's output channel. A
stalled output pauses the time-step pass.

### 3.3 Slice and engine

A **slice** (`sne_slice`) broadcasts each event to its 16 clusters. It accepts the next event when
all 16 clusters are idle, which is 10 cycles per spike. It merges their output spikes round-robin.

The **engine** has 2 slices. This is the size that fits a ZU3EG next to the other logic, down from
the 8 slices of the original chip design. A slice enable chooses which slices receive events, and
the outputs merge with fixed priority.

Configuration and kernels are written through plain ports. The original design's event and
weight streamers (DMAs), its APB configuration port and its full synaptic crossbar are not built.

## 4. Top level (`neuraghe_top`)

The top level instantiates the three engines with their default sizes. It brings out:

- **`csp_*`** — the register bus, the interrupt, and three 64-bit memory ports. These carry the
  activation DMA, weight DMA 1 and weight DMA 2, in that order. They connect to the controller
  and to DDR, which are not included here.
- **`mb_*`** — the MBConv engine's weight port, configuration, and batch streams.
- **`sne_*`** — the spiking engine's configuration port, slice enables, and event streams.

| parameter | default | meaning |
|-----------|---------|---------|
| N_ROWS, N_COLS | 4, 12 | convolution array (output × input features) |
| MB_ROWS, MB_COLS, MB_KS, MB_CIN | 12, 9, 3, 16 | MBConv matrices, depthwise taps, input channels |
| SNE_SLICES | 2 | spiking engine slices of 16 clusters |

## 5. Where this RTL departs from the original architecture

- **Controller and interconnect are outside.**
  - The RISC-V soft-core, its memories and its firmware are replaced by the register bus.
  - AXI is replaced by a simpler valid/ready port.
  - Layer tiling, batching and double-buffer scheduling are therefore the job of whatever drives
    the bus.
- **16-bit only.** The 8-bit mode that packs two MACs into one DSP is not built.
- **No zero padding in hardware.** The activation source reads what is in memory, so padding must
  be placed in the data.
- **Memory map, register map and DMA protocol** are this design's own. So is the split of weight
  banks between the two weight DMAs by row halves.
- **MBConv engine:** the 12 × 9 matrix shape is one way to split 324 multipliers. The 1-D causal
  depthwise window and the single channel tile are simplifications (see section 2).
- **Spiking engine:** it uses the simplified linear-leak neuron. The potential update is read as
  `V[t+1] = V[t] − L + Σ W·S`. The kernel size of 3, the 8×8 tile per cluster and the event field
  order and op codes are this design's choices.

## 6. Simulation

Every block has a self-checking testbench in `tb/`. Each testbench compares against a model of its
own and prints `TB_RESULT checks=… failures=…`. Shared pieces:

- `ext_mem_model.sv` — the off-chip memory model. It applies random back-pressure and has a fixed
  read latency.
- `csp_tasks.svh` — register-level driver tasks and a reference convolution.
- `sne_model.svh` — the reference model of the spiking clusters.

Run one testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/neuraghe_pkg.sv rtl/sne_pkg.sv tb/tb_csp.sv --top-module tb_csp -o sim
./obj_dir/sim
```

The testbenches check:

- **Cycle counts:** engine runs, DMA streaming, spike and time-step occupancy, and the MBConv
  pipeline rate and latency.
- **Data:** against reference models.
- **Corner cases:** saturation, bank strides, back-pressure, and the race between a flag being set
  and being cleared.

`tb_neuraghe_top` runs the whole design at its **default sizes**, with the three engines busy at
the same time:

- Random 1-D and 2-D layers on the 12×4 processor are driven purely through registers and DMAs.
  Some layers accumulate onto earlier results, and some saturate.
- MBConv streams run with stalls.
- Spike traffic runs on both slices, including a change of slice enables.

It counts each mechanism, and a mechanism that never occurred counts as a failure:

- off-chip back-pressure;
- both weight DMAs working together;
- a store overlapping a run;
- accumulation, saturation, 2-D kernels, stride 3, and section switching;
- the three MBConv steps busy together, MBConv output stalls, and history carried across batches;
- neurons firing, spike output stalls, and slice switching;
- all three engines active at once.

The top-level test takes about four minutes in Verilator. The smaller testbenches take seconds.
