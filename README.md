# Streaming stencil accelerators for iterative stencil loops and CNN layers

Iterative stencil loops (Jacobi and Heat solvers in 1, 2 or 3 dimensions) and
the convolutional layers of a CNN have the same access pattern: every output
element is a small function of a fixed neighbourhood of input elements. This
RTL builds both on one idea. The input array streams through a chain of FIFOs
in row-major order, so the whole neighbourhood of the current element is held
in registers at the same moment. Then a processing element computes the
result and the output streams on in the same order.

For stencil loops, each such engine does one timestep, and engines are
chained, so one pass of the data performs many timesteps. A long chain can be
spread over several FPGAs connected in a ring by serial links. One master
board talks to the host over PCIe. For CNNs, the same buffer feeds a bank of
time-shared multiply-accumulate units. One "coarse layer" (convolution, bias,
ReLU, requantisation, pooling) is one pipeline stage.

All of it is synthesizable SystemVerilog. Parameters default to the
configuration of the reference system:
- 48 Jacobi-2D timestep engines per FPGA on a 1024x1024 array, with 4 elements per clock.
- The first AlexNet stage: 227x227x3 input, 96 filters of 11x11, stride 4, 3x3/2 max pooling.

## Module map

| module | role |
|---|---|
| `stencil_pkg` | shared enums: stencil kind (Jacobi/Heat), pooling type (max/min) |
| `sst_fifo` | show-ahead FIFO, the storage element of every line buffer |
| `sst_filter` | one tap of the stencil channel: holds one word, tracks its position |
| `isl_pe` | pipelined fixed-point stencil update (Jacobi or Heat, 1D/2D/3D) |
| `sst_mux_engine` | per-lane choice between PE result and unchanged border value |
| `sst` | one stencil timestep engine (filters + lane FIFOs + PEs + mux engine) |
| `isl_accelerator` | `CHAIN_LENGTH` engines in series |
| `cnn_line_buffer` | K-1 row FIFOs + KxK window register, stride handling, freeze |
| `cnn_mem_subsystem` | zero padding, line buffer, time-sharing sequencer, weight stall |
| `conv_kernel` | one MACC fed by a K*K-to-1 multiplexer |
| `weights_engine` | DMA-beat gearbox into one small weight memory per MACC |
| `accumulation_core` | registered adder tree over the intra-map parallel kernels |
| `requant_core` | bias, ReLU, rounding shift, saturation to 8 bits |
| `pooling_core` | line buffer + one time-shared comparator per map |
| `coarse_layer` | the above CNN cores composed into one layer stage |
| `intercv7_gearbox` | packs/unpacks accelerator words into 512-bit link beats |
| `pcie_controller_engine` | cuts the output into host packets, watchdog dummy fill |
| `stencil_system_top` | master node: host -> ISL chain -> link out, link in -> host; CNN stage alongside |

## The stencil timestep engine (`sst`)

This is the part that takes the most care to read.

**Stream format.** An array of `COLS x ROWS x PLANES` elements arrives in
row-major order, `LANES` consecutive elements per word, element 0 in the low
bits. A row therefore has `WPR = COLS/LANES` words. `COLS` must be a multiple
of `LANES`.

**The channel.** For a cross-shaped stencil, the neighbours of the word at
stream position *p* are:
- the word itself (the centre);
- the words at *p±1*, for the west and east neighbours of the edge lanes;
- the words at *p±WPR*, north and south;
- in 3D, the words at *p±WPR·ROWS*, the planes below and above.

The engine keeps one `sst_filter` register for each of these `2*DIM+1`
positions, ordered by distance from the newest word. Between two filters that
are more than one position apart, it places `LANES` one-lane FIFOs holding the
words in between. Each FIFO is popped exactly when it holds *distance−1*
words, so the chain is a rigid delay line. On each advance, every filter
shows its neighbour of the same window.

**Lanes.** Lane *l* of the centre word finds:
- its north/south/up/down neighbours in lane *l* of the corresponding filters;
- its west neighbour in lane *l−1* of the centre word, or in the last lane of the west filter when *l*=0;
- its east neighbour in the same way, from the east filter.

`LANES` PEs then compute `LANES` updates per clock. This is the intra-timestep
parallelism.

**Position tracking and borders.** Each filter counts the column word, row and
plane of the word it holds. The centre filter flags which lanes are interior
(not on the first or last column, row or plane). `sst_mux_engine` delays those
flags by the PE latency. It outputs the PE result for interior elements and
the unchanged centre value for border elements, so the border is a constant
boundary condition.

**Advance and drain.** The whole channel moves on one signal, `adv`. It fires
when a new word is accepted. It also fires after a whole array has entered:
the engine then inserts empty slots until the last rows have left the channel.
Empty slots appear only between arrays, so a window never contains a hole.
Arrays can follow each other back to back. A two-word output FIFO decouples
`out_ready` from the channel, and `in_ready` comes from registered state only.
In a long chain this stops the ready path from becoming one combinational
path through all engines.

**Timing.** At steady state an engine takes one word per clock. The first
updated word of an array appears after the south-to-centre distance
(`WPR+1` words in 2D), plus `PE_LATENCY`, plus 2 clocks.

**Arithmetic.** Elements are signed 32-bit fixed point with 16 fractional bits
(`FRAC`):
- Jacobi multiplies the neighbourhood sum by `round(2^FRAC/(2*DIM+1))` and drops the fraction bits (rounding toward minus infinity).
- Heat computes `(sum of neighbours − 2·DIM·centre) >> 3`, plus the centre in 2D and 3D, so its weights are exact shifts.

The reference system uses single-precision floating point. Swapping `isl_pe`
for a floating-point unit with the same ports and `PE_LATENCY` leaves the rest
unchanged.

## Chaining across boards (`isl_accelerator`, `stencil_system_top`)

`isl_accelerator` puts `CHAIN_LENGTH` engines in series. In the top level,
the path is:
1. The host stream enters the chain.
2. `intercv7_gearbox` packs four 128-bit words into each 512-bit beat (8 link lanes × 64 bits) of the outgoing link, and marks the last beat of every array.
3. Each remaining board of the ring is the same chain between two links: an incoming gearbox, an `isl_accelerator` and an outgoing gearbox. No separate module is provided for such a board.
4. Their result returns on the incoming link. A second gearbox unpacks it.
5. `pcie_controller_engine` cuts it into packets of `host_pkt_len` words for the host DMA.

If the stream stops in the middle of a packet for `WDOG_TIMEOUT` clocks, the
engine completes the packet with zero words flagged `host_out_dummy`. The
host's transfer therefore always ends. It can tell filler from data, and
`host_dummy_words` counts the filler. To test a single board, connect
`link_tx_*` to `link_rx_*`.

The link protocol cores, transceivers, PCIe endpoint, DDR memory and soft
processor are not part of the RTL. Their user-side streams are the top-level
ports.

## The CNN coarse layer (`coarse_layer`)

**Memory subsystem.** `cnn_mem_subsystem` adds `PAD` rows and columns of
zeros, then streams `FM_PARAL` input maps in parallel through
`cnn_line_buffer`:
- *K−1* row FIFOs of *DIM−K* words, plus a KxK register window, so a whole window is visible.
- Windows that the stride skips slide by at full rate.
- For each window that produces an output, the chain freezes for `K*K` clocks while an index steps through the window elements.

**Convolution kernels.** Every `conv_kernel` multiplexes element *idx* of its
window into one multiplier and accumulates. The accumulator restarts on
element 0, and the result is ready one clock after element `K*K−1`. There are
`FM_PARAL x LAYER_PARAL` kernels (288 for AlexNet layer 1), each using one
DSP instead of `K*K`.

**Weights engine.** `weights_engine` receives `DMA_WIDTH`-bit beats and
writes weight *n* to entry *n mod K²* of memory *n div K²*. Memory *o·FM_PARAL+f*
serves the kernel for output map *o* and input map *f*. Weights within a
window are in row-major order. A window sequence starts only when the whole
set is loaded. Until then the subsystem stalls, and `weight_stall` shows it.
After the last window of the map, the set is released and the next one may
load.

**After the kernels.**
- `accumulation_core` adds the `FM_PARAL` partial results of each output map in a tree of registered two-input levels.
- `requant_core` adds the bias, applies ReLU, shifts right by `shift` bits with round-half-up, and saturates to 0..127.
- `pooling_core` reuses the line buffer idea with one comparator per map, scanning each 3x3 window (stride 2) in 9 clocks.

A 4-entry FIFO in front of the pooling core absorbs bursts. A window starts
only while that FIFO has room for every result already in flight.

**Rate.** A layer produces one output pixel of all `LAYER_PARAL` maps every
`K*K` clocks, plus the clocks spent passing over skipped windows.

## Departures from the reference architecture

- **ISL arithmetic.** Fixed point (Q15.16) instead of floating point.
- **Handshakes.** Every stream uses valid/ready. Reset is synchronous and active high.
- **Draining, output FIFO and frame marking.** The SST drain by empty slots, the two-word output FIFO in each SST, and the frame marking on the link are this design's own solutions.
- **Requantisation.** The scheme (run-time shift, rounding, saturation) is an assumption. In the reference system this core is produced by HLS.
- **Single-buffered weights.** The next set loads after the current map is finished, so weight loading is not overlapped with computation.
- **Multi-pass layers are not built.** Layers with more input maps than `FM_PARAL` need their partial output maps accumulated over several passes. So do the shared stages of AlexNet layers 3–5 and of VGG16. That needs the data-reordering state machine and off-chip buffers, which are not part of this RTL. The coarse layer covers one pass, which is the whole of AlexNet layer 1.
- **Fixed implementation choices.** Some tuning knobs of the reference cores are fixed here rather than parameters:
  - stencil shape: only the cross-shaped windows of Jacobi and Heat are built, not square windows;
  - the number of pipeline registers and multiplexers between the line buffer and the MACCs;
  - how many MACCs map to DSP blocks (left to synthesis);
  - how a line-buffer FIFO is split into narrower FIFOs;
  - the number of layers sharing one stage.
- **Accumulation width.** When `D_WIDTH_OUT` is smaller than `ACC_WIDTH`, the accumulation core keeps the most significant bits.
- **One system, two halves.** The top carries the ISL chain and one CNN stage side by side, each with its own ports. The reference system uses the boards for one workload at a time.

## Verification

Every module has a self-checking testbench in `tb/`. Each one:
- compares against an independent reference model;
- ends with a `TB_RESULT checks=… failures=…` line;
- has a watchdog.

Reference models:
- `isl_ref_pkg` computes one fixed-point stencil timestep with the same rounding.
- `cnn_ref_pkg` computes convolution, requantisation and pooling directly on arrays.

Random input gaps and random output back-pressure are used throughout.

- `tb_sst` runs five engine configurations: 2D Jacobi, 2D Heat, a gap-free 2D stream, 1D Heat and 3D Jacobi.
- `tb_isl_accelerator` checks a chain against repeated reference timesteps.
- `tb_coarse_layer` checks complete small layers, including padding and stride, and also checks that the layer stalls for weights.
- `tb_stencil_system_top` runs the system at reduced size, with the link in loopback through a model that stalls at random. It counts each mechanism and fails if any never happens: drain slots, output back-pressure, link beats, host packets, watchdog dummy words, weight-load stall, strided window skipping, padding and pooling windows.
- `tb_system_full` runs the same check on the top at its default parameters. A 1024x1024 array passes through all 48 Jacobi-2D engines in loopback, and all 2²⁰ of its elements are compared. One whole 227x227x3 AlexNet frame passes through the first layer, and all 27x27x96 outputs are compared. This is the largest configuration simulated. It takes about two minutes with Verilator.

To run a testbench with plain Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/stencil_pkg.sv tb/isl_ref_pkg.sv tb/cnn_ref_pkg.sv tb/tb_sst.sv --top-module tb_sst
./obj_dir/Vtb_sst
```

Replace `tb_sst` with any other testbench name. The reduced system test sets
its sizes as local parameters at the top of `tb/tb_stencil_system_top.sv`,
and those can be changed freely. The body it shares with the full-size test
is `tb/system_tb_body.svh`.

## Changing the design

- **Stencil shape and size.** Change the parameters of `stencil_system_top` or `sst`:
  - `DIM`, `KIND` (from `stencil_pkg`), `COLS`, `ROWS`, `PLANES`, `LANES` (must divide `COLS`) and `CHAIN_LENGTH`.
  - The line-buffer depth per engine is `2·WPR` words in 2D and `2·WPR·ROWS` in 3D.
- **A new stencil formula.** Write a new `isl_pe` with the same neighbour ordering: centre, west, east, north, south, down, up.
- **A different CNN layer.** Set `K`, `STRIDE`, `PAD`, `IN_DIM`, `FM_PARAL`, `LAYER_PARAL` and the pooling parameters of `coarse_layer`.
  - The weight stream must carry `LAYER_PARAL·FM_PARAL·K²` bytes per set, in the order given above.
  - The input dimension after padding must satisfy *(DIM+2·PAD−K) mod STRIDE = 0* for every input pixel to be used, as in AlexNet.
