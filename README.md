# Fully-pipelined multi-core VGG-16 inference accelerator

This is synthesizable SystemVerilog for a CNN inference accelerator. It targets an FPGA card with HBM2, such as an Alveo U280 at 250 MHz.

The whole VGG-16 network is laid out in hardware: one computation engine (CE) per layer, 16 in all, chained into an inter-layer pipeline. Four such chains, called cores, work on four different images at once.

The main idea is that the cores never hold their own copy of the weights. Each layer has one double-buffered kernel memory (KLM), and its read data is broadcast to that layer's engine in every core. So each weight fetched from HBM2 is used for four images.

The weights are streamed from HBM2 in kernel batches. Each layer has its own address generator (AGB) on 1 to 3 of HBM2's 256 MB AXI ports. This spreads the 31 usable ports over the layers according to how much weight data each layer needs.

Arithmetic is 16-bit fixed point, Q8.8. Products and sums stay at full width, with 48-bit accumulation. Each output is shifted back by 8 bits, passed through ReLU, and saturated to 16 bits.

## Block structure

```
cnn_accel_top
├── fsm_ctrl      pipeline steps, buffer swaps, AGB port offsets, run start/done
├── dam           data arbiter: one agb per layer + image loader, 31 AXI4 read ports
│   ├── agb ×16   kernel-batch reader (uses axi_burst_reader per port)
│   └── axi_burst_reader (image loader)
├── klm ×16       shared double-buffered kernel memory (wraps dual_buffer)
├── core ×4
│   ├── dual_buffer   IN LM (the image)
│   ├── ce ×16        one per layer
│   │   ├── mult_array   phase 1: PAR·K² multipliers
│   │   ├── adder_tree   phase 2: sum of products
│   │   └── pool_unit    phase 4: write-out / 2×2 max-pool / argmax label
│   └── dual_buffer ×15  FLM: the output maps of each layer, read by the next
└── dual_buffer   OUT LM: {label, score} of every image of the run
```

`cnn_pkg` holds the types, the AXI channel structs and the per-layer configuration table `layer_cfg_t`. Each layer entry has these fields:

- `c`: input channels.
- `d`: output channels.
- `h`: input height, which equals the width.
- `k`: kernel size.
- `par`: input channels handled per cycle.
- `pool`: max pooling after the layer.
- `last`: this is the output layer.
- `kb`: kernel batches per output row.
- `nport`: HBM2 ports.

Almost every size in the RTL is computed from this table, including:

- the memory depths;
- the address widths;
- the number of read lanes;
- the burst counts.

Two tables are provided:

- `VGG16_CIFAR` (the default): 3×32×32 images, 100 classes. It has 15.29 M parameters.
- `VGG16_IMAGENET`: 3×224×224 images, 1000 classes. It has 138.36 M parameters.

| layer | c→d | h | k | par | #Mult | pool | kb/row | ports |
|---|---|---|---|---|---|---|---|---|
| conv1 | 3→64 | 32 | 3 | 3 | 27 | | 1 | 1 |
| conv2 | 64→64 | 32 | 3 | 8 | 72 | ✓ | 4 | 1 |
| conv3 | 64→128 | 16 | 3 | 8 | 72 | | 8 | 1 |
| conv4 | 128→128 | 16 | 3 | 8 | 72 | ✓ | 16 | 2 |
| conv5 | 128→256 | 8 | 3 | 8 | 72 | | 16 | 2 |
| conv6–7 | 256→256 | 8 | 3 | 8 | 72 | conv7 | 32 | 2 |
| conv8 | 256→512 | 4 | 3 | 8 | 72 | | 32 | 2 |
| conv9–10 | 512→512 | 4 | 3 | 8 | 72 | conv10 | 64 | 3 |
| conv11–13 | 512→512 | 2 | 3 | 8 | 72 | conv13 | 128 | 3 |
| fc14–15 | 512→512 | 1 | 1 | 64 | 64 | | 16 | 1 |
| fc16 | 512→100 | 1 | 1 | 64 | 64 | label | 4 | 1 |

That is 1083 multipliers per core and 31 ports in total.

## The pipeline step

This is the part that needs the most care.

Every local memory is a ping-pong `dual_buffer`: one bank is written while the other is read. This covers the IN LM, the FLMs (feature-map memories) behind each engine, the KLMs and the OUT LM. The IN LM and the FLMs all swap on the same `swap` pulse from `fsm_ctrl`, so the pipeline advances one image per core per step.

In step `s` of a run of `G` groups (a group is one image per core):

- The image loader writes group `s` into the IN LMs.
- The AGB and engine of layer `l` (0-based) work on group `s-l-1`. They read the bank their predecessor wrote in the previous step and write the other bank.
- A unit whose group does not exist (during fill or drain) is not started.
- `fsm_ctrl` waits until the loader, every started AGB and every started engine of every core are idle. Then it pulses `swap` and starts the next step.

A run takes `G + 16` steps. At the end, `out_swap` hands the OUT LM bank with the results to the host, and `done` pulses. Image `i` of the run, in group `g` on core `n`, is stored at OUT LM address `g·NCORE + n` as `{label[15:0], score[15:0]}`.

A step lasts as long as the slowest layer. With the default table, conv2, conv4, conv6, conv7, conv9 and conv10 each take about 524 k multiply cycles per image. So the pipeline delivers four images about every 2.1 ms at 250 MHz, plus the stalls caused by kernel loading.

## Kernel batches, AGBs and the HBM2 layout

A layer's weights are cut into batches, and one batch is loaded per request. With `kb = #KBatch` per output row, a batch holds:

- `d/kb` whole kernels, laid out as `[d][c][row][col]`;
- followed by their `d/kb` biases.

The batch is split into `nport` equal parts of `wl_beats` 256-bit beats each. The last part is zero-padded. Part `p` is stored in the region of the layer's `p`-th port. So one kernel batch is read over all of the layer's ports in parallel.

The AGB computes the address of batch `b` (1-based) on a port as:

```
len(KBatch)   = words of d/kb kernels + d/kb biases, ×2 bytes
len(Workload) = len(KBatch) / nport          (rounded up to whole 32-byte beats)
Addr_base     = (b − 1) · len(Workload) + Addr_offset
burst length  = largest power of two ≤ min(256, beats still to read)
```

`Addr_offset` of accelerator port `p` (HBM2 AXI port `p+1`) is `(p+1)·256 MB`, which is that port's own partition. HBM2 AXI port 0 is left to the host's DMA.

The ports are assigned in layer order:

- conv1–3: 1 port each;
- conv4–8: 2 ports each;
- conv9–13: 3 ports each;
- fc14–16: 1 port each.

Images are read over the first port (conv1's), from `IMG_BASE` (default 384 MB, inside that port's partition). Image `i` of the run is at `IMG_BASE + i·⌈words/16⌉·32`, stored as `[channel][row][col]`.

Port 0 therefore carries two readers:

- The image loader and the conv1 AGB alternate when both have a request waiting.
- A grant is held until the request is accepted.
- Read data is steered by the AXI ID: 0 for kernels, 1 for images.

### The AGB–KLM–CE handshake

1. The AGB waits for `wr_ready` (a free KLM bank), then reads one batch over its ports and pulses `wr_done`.
2. The KLM marks that bank full. When the other bank has been released, the KLM swaps and raises `rd_ready`.
3. The engines (all cores in lockstep) compute with the batch and pulse `rd_release` after their last read.

The AGB fetches batch `b+1` while the engines compute with batch `b`. The engine stalls (`ce_stall`) when the next batch is not there yet. This sequence repeats `kb` times per output row and `h` times per image. It covers conv1 too, whose single batch is reloaded for every row.

## Inside a computation engine

The engine `ce` runs this loop for one image:

```
for v in rows:                 # output row
  for b in kernel batches:     # wait for the KLM, release after the last read
    for dd in kernels of batch:
      for u in columns:
        for g in C/PAR channel groups:   # one cycle each
```

Each cycle it reads, for one output pixel and one output channel:

- `PAR·k²` input features from the FLM (the k×k window of `PAR` channels, with zero padding of 1);
- the matching weights, plus the bias, from the KLM.

Its pipeline stages are:

1. addresses;
2. read data;
3. multipliers;
4. adder tree;
5. partial sum, with the bias `<<8` added on the last group;
6. `>>>8`, ReLU and saturation;
7. `pool_unit`.

`pool_unit` does one of three things:

- stores the value at `[d][v][u]`;
- or takes the 2×2 maximum, with a register for the horizontal pair and a line buffer of one row for the vertical pair, and writes `[d][v/2][u/2]`;
- or, in the last layer, keeps the running maximum and its index. The index is the label, and ties keep the lower index.

Fully connected layers run as a 1×1 convolution on a 1×1 map with `c` inputs. Their batches split the outputs: a batch holds all the weights of `d/kb` outputs. So no partial sums have to be stored between batches.

## Interface of `cnn_accel_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | one clock, asynchronous active-low reset |
| `start`, `n_groups[15:0]` | in | start a run of `n_groups` × `NCORE` images |
| `busy`, `done` | out | run in progress; one-cycle pulse at the end |
| `out_raddr`, `out_rdata[31:0]` | in/out | OUT LM read port, `{label, score}`, 1-cycle latency |
| `m_axi_ar*[31]`, `m_axi_r*[31]` | | AXI4 read address and read data channels, one per HBM2 port (`axi_ar_t`: id, 33-bit addr, len, size, burst; `axi_r_t`: id, 256-bit data, resp, last) |

Write channels are not needed. The host fills HBM2 with images and weights through its own DMA before `start`.

The top's parameters are:

- `NCORE` (default 4);
- `NL` (default 16);
- `CFG` (default `VGG16_CIFAR`);
- `OUT_GROUPS` (default 256);
- `IMG_BASE`.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. Shared pieces:

- `tb_pkg`: the HBM2 content, a hash of the address; the data layout described above; and a behavioural reference of a layer.
- `hbm_model`: an AXI4 read slave with latency and occasional `arready` back-pressure.
- `ce_harness`: feature and kernel memories for the engine test.

To build and run one testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/cnn_pkg.sv tb/tb_pkg.sv rtl/*.sv tb/hbm_model.sv tb/ce_harness.sv \
  tb/tb_cnn_accel_top.sv --top-module tb_cnn_accel_top -o sim
./obj_dir/sim
```

Run it from the repository root. Change the `tb_…` name for another test.

| testbench | what it checks |
|---|---|
| `tb_mult_array`, `tb_adder_tree` | products and sums against integer arithmetic, extremes included |
| `tb_dual_buffer`, `tb_klm` | bank exchange, multi-word writes, KLM full/free handshake with random timing |
| `tb_pool_unit` | write-out, 2×2 max-pooling and argmax against a model |
| `tb_agb` | every burst address (the `Addr_base` formula) and length over several batches and ports, KLM write addresses and data, waits on a full KLM |
| `tb_ce` | a conv+pool layer and an fc output layer, against the reference |
| `tb_dam` | kernel routing for 3 layers, image delivery to the right core, port-0 sharing |
| `tb_fsm_ctrl` | step sequence, who starts in which step, swap and end timing |
| `tb_core` | a 3-layer core, image to label, over several images in flight |
| `tb_cnn_accel_top` | whole accelerator on a 3-layer network with 2 cores and 3 groups, every label and score against the reference |

`tb_cnn_accel_top` also counts each mechanism of the design and fails if one never happens:

- an engine stalled for a batch;
- an AGB held back by a full KLM;
- AXI back-pressure;
- image and kernel requests meeting on port 0;
- several layers busy at once;
- one batch released by all cores together;
- buffer swaps;
- bursts shorter than 256 beats.

**Largest size simulated to completion:**

- `tb_cnn_accel_top`: the complete accelerator with 2 cores on a 3-layer network (conv, conv+pool, fc), 3 image groups, about 700 cycles.
- `tb_core`: a single core of the same network.

The default configuration (4 cores, 16 layers, 31 ports) builds with Verilator in about 90 s. One group of four images needs about 4.5 M cycles, plus the reference network in the testbench. That run did not finish within ten minutes, so the default size has only been compiled and linted, not simulated end to end.

## Departures and open points

- **Pipeline granularity.** Layers are pipelined image by image, and all feature memories swap together. An engine therefore keeps whole output maps in each FLM bank. This is simple and exact, but costs memory: for ImageNet-size images the FLMs alone would need about 139 MB for four cores. That is far beyond the on-chip memory of a U280. Only the CIFAR-size default fits, at about 4 MB in total.
- **Conv1 weights** are reloaded for every output row, like every other layer, instead of being loaded once per run.
- **Fully connected layers** split their batches by outputs. They do not keep temporary sums in the FLM.
- **Batch sizes for ImageNet fc layers.** `kb` is 1024, 1024 and 40. These values are chosen to divide the layer sizes; they do not come from a published table.
- **HBM2 behaviour.** The 4 KB burst boundary is not enforced. The KLM always has two banks, conv1's included.
- **Fixed-point format.** Q8.8 is an assumption. Rounding is by truncation (arithmetic shift).
- **Not built:** the HBM2 stacks, the HBM2 controller and its AXI3/AXI4 interconnect, the host's PCIe DMA and the host program. The design stops at the AXI4 read ports and the start/done/OUT LM ports.
- **Memories** are plain arrays with many read ports (up to 73). A real FPGA build would map them onto banked BRAM/URAM. No vendor primitive is used.
