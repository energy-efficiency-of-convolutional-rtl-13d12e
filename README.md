# Streaming CNN layer overlays: convolution, fully connected and pooling

This is RTL for three FPGA accelerators, one per common CNN layer type. Each is
a stand-alone overlay that a host processor drives. The host writes the
tensors into shared DRAM, passes their addresses over AXI4-Lite and starts a
run. The overlay then streams the tensors in and out through AXI4 master ports
with long bursts and raises `done`. All three target a small SoC FPGA of the
Zynq-7020 class: narrow integers (8-bit by default), no external memory of
their own, and on-chip storage that scales with the image width but not with
its height.

The three overlays are:

| overlay  | computes | default size | memory ports |
|----------|----------|--------------|--------------|
| `conv2d` | full 2D convolution, stride 1, zero padding K-1 | 1024 x 80 input, 5x5 kernel, 8-bit | 1 |
| `fc`     | `z = W·y + b`, no activation | 256 inputs, 256 outputs, 8-bit | 4 (P = 3) |
| `pool2d` | max or average pooling, no padding | 1024 x 80 input, 5x5 window, stride 1, 8-bit | 1 |

`cnn_blocks_top` puts the three side by side. They share only clock and reset.
Each overlay's control slave, memory ports and `busy`/`done` are top-level
ports.

## Convolution by tiles, carries and a Row Memory

The convolution overlay (`rtl/conv2d.sv`) is the hard part of the design. It
computes

    out[i][j] = sum over n,m of in[i-n][j-m] * k[n][m]

for all `(IMG_H+KH-1) x (IMG_W+KW-1)` output positions. This is a true
convolution with the kernel flipped, and the input is zero outside the image.

**Tiles.** The input is cut into `TH x TW` tiles, 2x2 by default. They are
taken left to right along a row of tiles, then row after row. `tile_conv`
multiplies one tile with the whole kernel in a single cycle. That is
`TH·TW·KH·KW` multipliers, 100 at the defaults. Because of the padding, a
tile's contribution covers a `(TH+KH-1) x (TW+KW-1)` patch of the output,
6x6 at the defaults. The patch falls into three parts:

```
        TW        KW-1
     +-------+-----------+
  TH | final | carry  -> |   right part: added into the next tile of the row
     +-------+-----------+
KH-1 |  Row Memory  ->   |   bottom part: added into the next row of tiles
     +-------------------+
```

* **Top-left `TH x TW` corner.** The tile to the left already contributed its
  part here (the carry), and the row of tiles above contributed through the
  Row Memory. Adding those two makes these cells final, so they go to the
  output buffer.
* **Top-right `TH x (KW-1)` strip.** This overlaps the next tile. It is held
  in carry registers and added to that tile's patch one cycle later. At the
  end of a row of tiles there is no next tile, so the whole top `TH` rows are
  final.
* **Bottom `(KH-1)` rows.** These overlap the next row of tiles. They are
  added into the Row Memory, an array of `KH-1` rows by the padded output
  width of `ACC_W`-bit partial sums. When the next row of tiles reaches the
  same columns, the Row Memory band is read back into its patch.

After the last row of tiles, the Row Memory holds the last `KH-1` output
rows. They are already complete, so a flush copies them to the output buffer.
Every input element is read from DRAM once, and the kernel is read once per
run.

**Pipeline.** One row of tiles passes through five stages:

1. **Buffering Inputs**: burst-reads `TH` input rows into an input bank.
2. **Initializations**: picks the tile and its Row Memory band.
3. **Tile Convolution**: multiplies, then adds the carry and the Row Memory
   partial sums.
4. **Storing Results**: writes the final cells to an output bank and the rest
   back into the Row Memory.
5. **Buffering Outputs**: burst-writes `TH` finished output rows.

Stages 2 to 4 take one tile per clock. Input and output banks are double
buffered, so reading row of tiles r+1 and writing row r overlap the
computation of row r. Between two rows of tiles the three middle stages drain
for three cycles, so that a Row Memory entry is never read before its last
write. At the defaults one run takes 20,480 tile cycles plus the drains, the
kernel load and the flush. The simulation measures about 22,000 cycles to
`done` with a memory that stalls at random.

**Widths and quantization.** The sum is kept at `ACC_W = IN_W + K_W +
clog2(KH·KW)` bits, 21 at the defaults, so it cannot overflow. The stored
output is truncated to its top `OUT_W` bits, meaning the low bits are dropped.
With `PREVENT_OVF = 0` every value uses `OUT_W` bits and sums wrap instead.
This models the cheaper variant in which all data share one type.

**Known limits.** Stride is fixed at 1 and padding at K-1. A strided
convolution would need a different data path (tile size equal to the stride,
one output per interval), and that is not built. Very wide kernels make
`tile_conv` large, since nothing splits the kernel into pieces.

## Fully connected: shared input chunks, P outputs at a time

`rtl/fc.sv` computes `z[o] = b[o] + Σ w[o][i]·y[i]`. It first reads all
biases into the **Temp Output** memory. It then computes the outputs in
groups of `P`:

* **Buffering Inputs** streams a chunk of `CHUNK` input neurons on port 0.
  At the same time, port `1+p` streams the matching chunk of weight row `p`.
* **Calculations** runs alongside. Each cycle it multiplies `LANES` pairs per
  output, 8 at 8-bit, and adds them to a running sum. The sum starts from the
  bias in Temp Output and is written back there when the group ends.

The chunk buffers are double buffered, so the next chunk is fetched while the
current one is used. Each input chunk is fetched once per group and serves `P`
outputs. That is the only reuse a fully connected layer offers. When every
group is done, Temp Output is written to DRAM in one transfer on port 0.
Outputs are truncated to `OUT_W` bits, as in the convolution. No activation
function is applied.

`P = 3` gives four AXI ports (the "fast" configuration, the default). `P = 1`
gives two ports (the "slow" one). The weights dominate the traffic, so speed
is set by how many weight rows can stream in parallel. At the defaults one
256x256 layer takes about 4,900 cycles. `CHUNK` must be a multiple of the
number of elements per 64-bit word.

## Pooling: an output-oriented row ring

`rtl/pool2d.sv` computes `TPO` neighbouring outputs of one output row per
cycle, 2 by default. Each output reads its whole `PH x PW` window at once.

Input rows are kept in the **Input Memory**, a ring of `PH+SH` rows. While
output row y is computed from input rows `y·SH .. y·SH+PH-1`, the `SH` rows
that row y+1 needs are burst-read into the spare slots. Every input element is
therefore read from DRAM exactly once. Finished output rows go to a
double-buffered output buffer and are written back while the next row is
computed.

`MODE` chooses max or average pooling when the design is built. Average
pooling divides the window sum by `PH·PW` and rounds toward zero. There is no
padding: the output is `((IMG_H-PH)/SH+1) x ((IMG_W-PW)/SW+1)`. The default
run of 77,520 outputs takes about 39,800 cycles, and the row fetches keep up
with the computation.

## Memory interface and host control

**Tensor layout in DRAM.** Elements are signed two's complement, packed
`64/width` per 64-bit word, the lowest element in the lowest bits. Every
tensor row starts on a new word. So the element width must divide 64: 1, 2,
4, 8, 16 or 32 bits. The convolution kernel is one packed row-major vector.
Each FC weight row (all `N_IN` weights of one output) starts on a new word.

**AXI4 masters.** The buses are 64 bits wide, carried in the packed structs
`axi_req_t` and `axi_rsp_t` from `cnn_pkg`.

* `axi_rd_engine` reads N consecutive words in bursts of up to 256 beats.
* `axi_wr_engine` writes N consecutive words the same way and counts the run
  as finished only after the last write response.

Both split bursts at 4 KiB boundaries and keep one burst in flight at a time.
An overlay with one port runs one read engine and one write engine on the
same port. A read and a write can be active at once because they use
different channels.

**Control slave (`axil_ctrl`).** The register map follows the usual layout
of HLS-generated blocks:

| offset | register |
|--------|----------|
| 0x00 | bit 0 start (write 1), bit 1 done (sticky, cleared when read), bit 2 idle |
| 0x10 + 8·i | byte address of tensor i |

| overlay | tensor 0 | tensor 1 | tensor 2 | tensor 3 |
|---------|----------|----------|----------|----------|
| `conv2d` | input | kernel | output | |
| `fc` | input neurons | weights | biases | outputs |
| `pool2d` | input | output | | |

A start written while the overlay is busy is ignored.

**Reset.** `rst_n` is active low and asynchronous. It clears every control
register. The data memories are not reset: each is written before it is
read.

## How far it follows the reference design

These parts follow the published design this RTL reproduces:

* **Convolution:** the tiling order; the carry and Row Memory scheme; the five
  stage names; the 2x2 tile with one tile per cycle; one shared AXI port;
  truncation to the output width.
* **Fully connected:** the 4-port/3-output and 2-port/1-output split; Temp
  Output preloaded with the biases; no activation.
* **Pooling:** the Input Memory refilled while output tiles are computed; no
  padding; max and average modes.
* **All overlays:** the default sizes listed above.

These choices are this RTL's own, because the reference leaves them open:

* the 64-bit bus width;
* the data layout and the register map;
* the chunk size of 128 and the number of pooling outputs per cycle (2);
* one outstanding burst per engine;
* the rounding of average pooling;
* which tensors share FC port 0.

In pooling, the reference keeps freshly fetched input cells ("Input FM")
apart from the Input Memory. It also copies each window into registers
before pooling it. Here both buffers are one ring, and the window is read
straight from the ring.

Timing can only be compared in cycles. The reference reports latencies in
milliseconds (about 0.45 ms for convolution and pooling at 1024x80, 0.07 ms
for the fast FC layer) but does not state its clock. The cycle counts above
come from this RTL's own simulation and are not checked against those numbers.

Not built:

* the strided convolution version;
* the pooling variants with extra ports for strides;
* the 4x2-tile convolution (initiation interval 2);
* the host processor and its DRAM, which the testbenches model.

## Files

| file | content |
|------|---------|
| `rtl/cnn_pkg.sv` | bus widths, AXI/AXI4-Lite structs, register offsets, pooling mode enum |
| `rtl/axil_ctrl.sv` | AXI4-Lite control slave |
| `rtl/axi_rd_engine.sv`, `rtl/axi_wr_engine.sv` | AXI4 burst read / write masters |
| `rtl/tile_conv.sv` | one-cycle tile x kernel convolution |
| `rtl/conv2d.sv`, `rtl/fc.sv`, `rtl/pool2d.sv` | the three overlays |
| `rtl/cnn_blocks_top.sv` | all three side by side |
| `tb/axi_mem_model.sv` | behavioural AXI4 memory with random stalls, standing in for host DRAM |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks the outputs against a reference model written
independently in the testbench. It ends by printing
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends a hung run. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cnn_pkg.sv tb/tb_conv2d.sv --top-module tb_conv2d
./obj_dir/Vtb_conv2d
```

The block testbenches run reduced sizes that still exercise every corner:

* non-square kernels;
* image sizes that are not a multiple of the tile;
* bursts shorter than a row;
* a 4 KiB crossing;
* P outputs over several chunks;
* both pooling modes and strides.

`tb_cnn_blocks_top` runs all three overlays at their full default sizes. It
checks every output, about 164,000 checks in total, and takes a few seconds.
It also counts how often each mechanism occurred and fails if one never did:

* convolution: carries, Row Memory reads, the flush, both input banks full,
  output bursts overlapping computation;
* FC: bias preload and chunk prefetch during calculation;
* pooling: ring wrap-around and row fetch during pooling;
* all: memory stalls.

Three more testbenches run the configurations the reference design was
measured on. Each runs many overlay instances side by side, every one with its
own memory model, and checks every output:

* `tb_conv2d_workloads`: 3x3 and 7x7 kernels; 1-, 4- and 16-bit data with
  overflow allowed; and a full 1024x1024 image. The 1024x1024 run takes
  265,064 cycles for 262,144 tiles, so the one-tile-per-cycle rate holds.
* `tb_fc_workloads`: the fast configuration on 256→256, 1024→36 and 8192→12
  layers, and the slow one on 256→256. They take 4,966, 2,782, 7,290 and
  13,892 cycles.
* `tb_pool2d_workloads`: max and average pooling with 2-, 4- and 16-bit data;
  3x3, 7x7 and 9x9 windows; and strides 2x1, 2x2, 2x4 and 4x4 (rows x
  columns).

These share the helpers `conv_layer_check`, `fc_layer_check` and
`pool_layer_check`. Each helper runs one overlay instance on pseudo-random
data and counts its checks.

## Changing sizes

All sizes are parameters with the reference defaults.

* **`conv2d`:** `IMG_W` sets the on-chip storage (input and output banks,
  Row Memory). `IMG_H` only changes counters, so a 1024x1024 image costs the
  same memory as 1024x80. `KH`, `KW`, `TH` and `TW` set the size of
  `tile_conv`.
* **Widths:** element widths must divide 64.
* **`fc`:** `N_OUT` sets the Temp Output size. `N_IN` changes only counters
  and the accumulator width. `N_OUT` need not be a multiple of `P`.
