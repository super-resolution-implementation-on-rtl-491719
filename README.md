# SRCNN super-resolution accelerator in SystemVerilog

This is a streaming hardware implementation of the three-layer
super-resolution convolutional network (SRCNN). A low-resolution image,
already interpolated up to the target size, goes in one pixel at a time. The
restored image comes out the same way. The three layers are:

| Layer | Operation | Output per pixel |
|-------|-----------|------------------|
| stage 1 | 9x9 correlation with 64 filters, plus bias, then ReLU | 64 feature maps |
| stage 2 | 1x1 convolution, 64 inputs to 32 maps, plus bias, then ReLU | 32 maps |
| stage 3 | 5x5 correlation of each of the 32 maps with its own filter, summed over the maps | 1 output pixel |

Borders are handled by replicating the edge pixels, so every layer's output
has the same size as the image.

Around the pipeline sits a memory application block for an FPGA board. It:
- reads the input image from DDR3 over an OCP master port into a block RAM;
- streams the image through the pipeline;
- collects the result in a second block RAM;
- writes the result back to DDR3.

A host starts a run with `app_go` and sees `app_done` when it has finished.

All hardware lives in `rtl/`. The testbenches and reference models are in
`tb/`.

## Hierarchy

```
sr_top                      top: OCP master port, app_go/app_done, coefficient bus
├── blk_mem_app             memory application block
│   ├── sr_bram  bram1      input image, four 16-bit pixels per 64-bit word
│   ├── sr_bram  bram2      output image
│   ├── ocp_bram_fsm        OCP burst reads into bram1 and burst writes from bram2
│   └── host_controller     load / run / store sequencing, drives the pixel streams
└── super_resolution        A -> stage1 -> B -> stage2 -> C -> stage3 -> D
    ├── stage1              toep_top(9x9) -> 64 x pe(81 taps, ReLU) -> piso
    ├── stage2              32 x pe(64 inputs, ReLU), all on the serial B stream
    └── stage3              toep_top(5x5, 32 channels) -> 32 x pe(25 taps) -> pipe_add
```

`sr_pkg` holds the types that are shared by several modules:
- the pixel type `pix_t`;
- the coefficient load bus `wload_t`;
- the OCP bundles `ocp_m2s_t` and `ocp_s2m_t`;
- the rounding and saturation function.

## Minor cycles and the sync/start scheme

The pipeline has no valid/ready handshake. Time is divided into **minor
cycles**, and one minor cycle carries one pixel. Every block has the same
synchronisation ports:

| Port | Meaning |
|------|---------|
| `reset`, `clk` | common reset and clock |
| `sync_minor_in` | one-clock pulse at the start of every minor cycle |
| `start_in` | high on the `sync_minor_in` pulse that carries pixel 0 of a frame |
| `sync_minor_out`, `start_out` | the same pulses, delayed |

Each block delays its outputs by a fixed number of whole minor cycles plus a
fixed number of clocks. That is enough to keep data and markers aligned
through the whole chain.

Every block passes on **every** `sync_minor` pulse, even when it has no valid
data. This is essential. The window generators need further minor cycles
after the last input pixel to emit the last rows of windows. The source
therefore has to keep pulsing until the last output pixel has appeared.

Names along the chain:

| Link | Data | Sync | Start |
|------|------|------|-------|
| into stage 1 | A | `sync1` | `start_A` |
| stage 1 to stage 2 | B | `sync2` | `start_B` |
| stage 2 to stage 3 | C | `sync3` | `start_C` |
| out of stage 3 | D | `sync4` | `start_D` |

Latency of each block, in clocks from a sync pulse in to the matching sync
pulse out:

| Block | Clocks | Extra minor cycles |
|-------|--------|--------------------|
| `toep_top` | 2 | window of pixel n leaves D = h*IMG_W + h + 1 minor cycles after pixel n arrives, with h = (K-1)/2 |
| `pe` | N+1 | none |
| `piso` | 1 | none |
| `pipe_add` | log2(N)+2 | none |
| `stage1` | K*K+4 = 85 | h1*IMG_W + h1 + 1 |
| `stage2` | NIN+1 = 65 | none |
| `stage3` | K*K+10 = 35 | h3*IMG_W + h3 + 1 |
| `super_resolution` | 185 | (h1+h3)*(IMG_W+1) + 2 = 1544 for a 256-wide image |

Constraints on the minor cycle:
- It must be at least 81 clocks long. A PE has one multiplier and takes one
  tap per clock, and stage 1 has 81 taps.
- Stage 2 needs 64 clocks and stage 3 needs 25.
- The host controller uses `MINOR = 96` clocks.
- Several modules check the spacing with assertions.

## toep_top: the window generator

`toep_top` is the hardest part to follow. It turns a raster stream into K x K
neighbourhoods.

Storage:
- There is one memory of K*IMG_W words, each CH pixels wide.
- Image row r is stored in slot r mod K.
- Each incoming pixel is written at (row mod K, column).

Output schedule:
- Window n, centred on pixel n = (r, c), is emitted in the minor cycle that
  arrives D = h*IMG_W + h + 1 pulses after pixel n.
- At that point row r+h up to column c+h has been written. The rows r-h and
  above are still present, because K rows fit in the buffer.

Reading a window:
- For each of the K*K taps, in row-major order, the generator forms the
  coordinate (r+i-h, c+j-h).
- It clamps that coordinate into the image. This clamping produces the
  replicated border.
- It reads one tap per clock. The taps follow the `sync_minor_out` pulse.

Requirements and limits:
- A window's source pixels may be overwritten only after the window has been
  read. This is why IMG_W must exceed K.
- A new frame may start only after the previous frame's last window.
- Within a frame the rows are kept strictly in order; nothing else about the
  frame is tracked.

Stage 3 uses the same module with CH = 32. It buffers all 32 maps of five
rows and sends all 32 channels of a tap in parallel, one to each PE.

## Processing elements and the stage datapaths

**`pe`** is a serial MAC unit:
- It multiplies N consecutive inputs by an internal N-word weight memory,
  one product per clock.
- The products are added into a 48-bit accumulator.
- It adds the bias, shifts back to Q8.8, applies ReLU if `RELU` is set, and
  saturates to 16 bits.

**`stage1`**:
- 64 PEs share the tap stream of `toep_top`.
- Their 64 results (Btemp) are loaded into `piso`, which sends map 0 first,
  one map per clock.
- So B carries the 64 values of a pixel on 64 consecutive clocks.

**`stage2`** puts 32 PEs with N = 64 on that serial stream. Each PE computes
one output map, so C is 32 values wide and parallel.

**`stage3`**:
- The window generator works on the 32-channel C.
- PE i receives channel i and applies its 5x5 filter. These PEs have no bias
  and no ReLU.
- `pipe_add` sums the 32 results in a registered binary tree, then
  saturates.

## Number format

All pixels, map values, weights and biases are 16-bit two's complement with
8 fraction bits (Q8.8).

A PE result is:

```
sat16( (sum(x_i * w_i) + (bias << 8)) >>> 8 )     then ReLU in stages 1 and 2
```

- Products are Q16.16 and are summed at 48 bits, so no overflow is possible
  before the final saturation.
- The shift truncates toward minus infinity.
- In stage 3 each PE result is saturated to Q8.8 before the adder tree. The
  tree sum is saturated again.

## Coefficient loading

Coefficients are written through `wload` (type `wload_t`) before a run, one
word per clock. The fields are:

| Field | Meaning |
|-------|---------|
| `we` | write strobe |
| `bias` | 1 writes the bias, 0 writes the weight at `addr` |
| `stage` | 1, 2 or 3 |
| `unit` | the PE within the stage |
| `addr` | the tap index |
| `data` | Q8.8 value |

Tap indices per stage:
- **stage 1:** `addr = i*9 + j` for filter row i and column j.
- **stage 2:** `addr` is the input map.
- **stage 3:** `unit` is the input map and `addr = i*5 + j`.

Stage 3 has no biases, so bias writes to it are ignored. `reset` clears the
biases but not the weight memories.

## Memory path: blk_mem_app and OCP

The input image is stored in DDR3 as packed 16-bit pixels in raster order,
four pixels per 64-bit word, with pixel 4k+l in bits 16l+15:16l. The output
image is written in the same layout.

`host_controller` runs three phases after `app_go`:

1. **LOAD.** `ocp_bram_fsm` reads IMG_W*IMG_H/4 words from `in_addr` into
   bram1.
2. **RUN.** Pixels are read from bram1 and sent as A, one per minor cycle,
   with `start_A` on pixel 0. The sync pulse falls on clock 2 of each minor
   cycle. Output pixels, counted from `start_D`, are written into their lane
   of bram2 through the lane write enables. Sync pulses continue after the
   input is exhausted, until the last output pixel has arrived.
3. **STORE.** `ocp_bram_fsm` writes bram2 to `out_addr`.

`app_done` then rises. It stays high until the next `app_go`.

`ocp_bram_fsm` is an OCP master with one burst outstanding at a time. Bursts
are BURST = 8 words long, and the last burst is shorter if needed.

| | Read burst (DDR3 to bram1) | Write burst (bram2 to DDR3) |
|---|---|---|
| Command | RD, held until CmdAccept | WR, held until CmdAccept |
| Data | returns with Resp = VALID while RespAccept is held high | offered with DataValid and full DataByteEn |
| Per word | written to bram1 as it arrives | held until DataAccept |

Other conventions:
- The burst's first write word is presented together with the command.
- Addresses are byte addresses, and the address steps by 8 per word.
- Tag is the burst number, and a read response must echo it.
- Assertions check the tag and a burst-length field that is never zero.

The board's infrastructure is not part of the RTL. This includes the host
link, clocking, register slave, the OCP switch that merges several masters,
and the DDR3 controller. `sr_top` exposes `app_m2s`/`app_s2m` at the point
where the application block would connect to the OCP switch. Its `app_go`,
`app_done`, `in_addr`, `out_addr` and `wload` stand in for the host's
control registers.

## Parameters

| Module | Parameter | Default | Note |
|--------|-----------|---------|------|
| `sr_top`, `super_resolution`, `host_controller`, `toep_top`, stages | `IMG_W`, `IMG_H` | 256, 256 | image size; IMG_W*IMG_H must be a multiple of 4 for the packing |
| `super_resolution` | `K1`, `N1`, `N2`, `K3` | 9, 64, 32, 5 | network sizes |
| `sr_top`, `blk_mem_app`, `host_controller` | `MINOR` | 96 | clocks per pixel, at least K1*K1 |
| `sr_top`, `ocp_bram_fsm` | `BURST` | 8 | OCP burst length |
| `sr_bram` | `DEPTH`, `DW`, `LANES` | 16384, 64, 4 | one image per BRAM |

At the defaults a frame takes about (65536 + 1544) x 96 = 6.4 M clocks of
pipeline time, plus the two DDR3 transfers of 16384 words each.

## Departures from the reference design, and choices made here

- **Multipliers.** Each PE has one multiplier and takes one tap per clock.
  The design uses 128 multipliers in total and needs 96 clocks per pixel. The
  reference implementation reports 1024 DSP slices, so it is considerably
  more parallel. Its exact arrangement is not known.
- **Stage 2.** Stage 2 is drawn as a single PE in the reference. Here it is
  32 PEs side by side, one per output map, all fed by the same serial stream.
- **Stage 3.** Stage 3 has no bias and no ReLU. This follows the reference
  algorithm as described, in which the last layer only sums the 32 filtered
  maps.
- **Choices made in this design.** The following are this design's own and
  not taken from the reference:
  - image size (256 x 256);
  - number format (Q8.8 with truncation and saturation);
  - minor-cycle length;
  - coefficient load bus;
  - OCP field widths and encodings (32-bit byte address, 64-bit data, 4-bit
    tag);
  - pixel packing in memory;
  - the load / run / store sequencing.
- **Reset.** Reset is synchronous and active high. It clears control state
  only.
- **Board blocks.** The board-support blocks are not included (see *Memory
  path*). The testbenches replace DDR3 and its controller with a behavioural
  OCP memory.

## Simulation

Every testbench checks itself. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops. Each has a watchdog that
counts a failure if the run hangs.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/sr_pkg.sv tb/sr_model_pkg.sv tb/tb_sr_top.sv --top-module tb_sr_top
./obj_dir/Vtb_sr_top
```

Replace `tb_sr_top` with any testbench name.

**Reference models:**
- `tb/sr_model_pkg.sv` holds `sr_model`, a bit-exact software model of the
  three layers. It uses the same Q8.8 arithmetic and clamped borders. It
  generates random images and coefficients and has counters for ReLU
  clipping and saturation.
- `tb/ocp_mem_model.sv` is a behavioural OCP memory. It randomly delays
  CmdAccept and DataAccept and inserts gaps between read responses. It counts
  those stalls and checks byte enables.

**Testbenches:**

| Testbench | What it covers |
|-----------|----------------|
| `tb_pe` | MAC, bias, ReLU, saturation, back-to-back vectors, latency |
| `tb_piso` | load and shift order, latency |
| `tb_pipe_add` | sums and saturation in both directions, latency |
| `tb_sr_bram` | lane write enables, read latency |
| `tb_toep_top` | every tap of every window over two frames, for K = 9 (12x10, 1 channel) and K = 5 (8x6, 2 channels), including borders, against direct indexing |
| `tb_stage1` | 8 filters on a 12x10 image, against the model |
| `tb_stage2` | all 32 outputs for random B vectors |
| `tb_stage3` | 8x6 image, 32 channels |
| `tb_super_resolution` | full channel counts on a 12x10 image, every output pixel, start alignment and latency |
| `tb_ocp_bram_fsm` | load and store with random slave stalls, short last burst, tags, byte addresses |
| `tb_host_controller` | phase sequence, minor-cycle spacing, start placement, output capture |
| `tb_blk_mem_app` | whole memory path with a loopback in place of the pipeline |
| `tb_sr_top` | end to end on 12x10 images, two back-to-back runs |
| `tb_sr_top_full` | end to end at every default (256x256, full network) |

`tb_sr_top` loads coefficients over `wload`, then runs the design against
the OCP memory model. It compares every output pixel with the model. It also
counts, and requires at least one of, each of the following:
- command stalls, write-data stalls and read-response gaps;
- ReLU clipping;
- output saturation;
- a second run started after `app_done`.

`tb_sr_top_full` runs the same checks, except the second run, on one 256x256 frame with no parameter
overrides.

To see how robust a change is, shrink `IMG_W`/`IMG_H` in a testbench
first. Every size-dependent quantity derives from the parameters, and a
12x10 run finishes in seconds.
