# Artificial-retina track finder for a VELO quadrant

This design finds straight tracks in the hits of 16 pixel-detector layers. It
runs on 8 FPGA boards that work in parallel. It is built on the "artificial
retina" idea, a hardware cousin of the Hough transform:

* The space of track parameters (u, v) is cut into a matrix of **cells**.
* Each cell has its own small **engine** in logic. Each engine stands for one
  reference track.
* Every hit is delivered to each engine whose reference track passes near it.
  The engine adds a weight that falls off as a Gaussian of the hit's distance
  from the reference track on that layer.
* When the event ends, each cell's sum is its **excitation**. Local maxima of
  the excitation over a threshold are the tracks found. Each track's
  parameters are the centroid of the 3 x 3 cluster around its maximum.

The hard part is getting the hits to the engines. One hit can matter to many
cells, on several boards. So hits travel through a **distribution network**
built from tiny 2 x 2 switches. The network copies a hit only where its routes
split. Each board is one segment of that network, and the boards are joined
by a full mesh of links.

The default configuration follows the demonstrator it models:

* 8 boards.
* 2 detector layers ("modules") read by each board, 16 in all.
* 392 engines per board, 3136 in all, tiling a 56 x 56 cell matrix.

## Words, events and back-pressure

Every channel in the design is a stream with the same three signals:
`valid`, `data` and `hold`.

* A word moves on a rising clock edge when `valid && !hold`.
* A receiver that cannot take a word raises `hold`.
* The sender keeps its word until it is taken. Nothing is ever dropped for
  lack of room.

Hit channels carry `word_t`, defined in `retina_pkg`. It is 49 bits:

| field   | bits | meaning |
|---------|------|---------|
| `ee`    | 1    | 1 = EndEvent word |
| `ev`    | 8    | event number (EE) / event tag (hit) |
| `layer` | 4    | detector layer 0..15 |
| `x`, `y`| 10+10| hit position |
| `bmask` | 8    | destination boards (pre-switch routing) |
| `gmask` | 8    | destination engine groups on a board (post-switch routing) |

Events are separated by **EndEvent (EE)** words. No block needs a global event
strobe: each block closes an event when its EE arrives. The event number in
every word is what makes the integrity checks possible:

* `ee_checker` expects consecutive numbers.
* Mergers compare the numbers of the EEs they join.
* The cell matrix checks that all engine groups agree.

The track output carries `track_t`, which is 41 bits: `ee`, `ev`, global cell
`row` and `col`, signed centroid offsets `du` and `dv` in 1/16 of a cell, and
`peak`, the excitation. The tracks of one event are followed by one EE word.

## The distribution network

### Splitter, merger, dispatcher

* **`retina_splitter` (2s)** has one input and two outputs. A hit goes to one
  output or both. Every EE goes to both.
  * Each output has its own register, so one side can stall while the other
    drains.
  * The input is taken only when every output that the hit needs has room.
* **`retina_merger` (2m)** has two inputs and one output.
  * Hits are interleaved round robin.
  * An EE waiting at one input is held until the other input also presents
    its EE. Then one EE goes out. Hits of the next event therefore never
    overtake the end of the current one.
  * If the two EE numbers differ, `ev_err` pulses.
  * An input whose `live` flag is low has no source behind it, and the merger
    does not wait for it.
* **`retina_dispatcher` (2d)** is two splitters and two mergers. Splitter `s`
  output `o` feeds merger `o` input `s`. Any input reaches any output, or
  both. The latency is 2 cycles.

### Switch

`retina_switch` is an N x N network, with N a power of two. Its recursive
definition:

* An N-port switch is two N/2-port sub-switches followed by a layer of N/2
  dispatchers.
* Output `i` of the left sub-switch feeds input L of dispatcher `i`.
* Output `i` of the right sub-switch feeds input R of dispatcher `i`.
* Dispatcher `i` drives outputs `2i` and `2i+1`.

In the RTL the recursion is unrolled into log2 N stages. Stage `s` works on
blocks of `B = 2^(s+1)` ports. Dispatcher `i` of the block at `base`:

* takes ports `base+i` and `base+B/2+i`;
* drives ports `base+2i` and `base+2i+1`.

Each stage is a pipeline stage. The switch therefore passes one word per port
per cycle at any N, with a latency of 2·log2 N cycles (6 for N = 8).

**Routing.** Routing uses a destination mask in the word, with one bit per
final output. A splitter in a stage whose outputs lead to blocks of `STRIDE`
final outputs sends a hit to output `o` if any bit of block `LO+o` is set. The
switch parameter `SEL_G` picks the mask field: `bmask` for the pre-switch,
`gmask` for the post-switch.

### Pre-switch, links, post-switch

The full network is far too wide for one chip. It is cut vertically into one
segment per board. All connections that cross a segment boundary are
collected into one layer of point-to-point links. What is left on each board
is two independent sections:

* The **pre-switch** (NB x NB) takes the board's two hit lanes on ports 0..1.
  Its port `b` leaves on the link to board `b`.
* The **post-switch** (NB x NB) takes link `a` from board `a` on its port `a`.
  Its output `g` feeds engine group `g`.

`retina_top` wires board `a` pre-switch port `b` to board `b` post-switch port
`a`, for all `a` and `b`. This is a full mesh in which each board also sends
to itself. Each link is a `LINK_DEPTH`-word `stream_fifo` with the same
valid/hold back-pressure.

### Where the masks come from

`hit_mapper` stamps the routing mask onto each hit. It runs in front of each
switch:

* in front of the pre-switch, with targets = boards;
* behind every link, with targets = this board's engine groups.

A hit on layer `l` is sent to a target when it lies within the search
distance of the bounding box of that target's receptors on layer `l`. Those
boxes are constants worked out at elaboration from the geometry in
`retina_pkg`, so no table has to be loaded. A hit near a boundary goes to
several targets. This is where hits get duplicated.

## Geometry and the engine

The geometry model is defined in `retina_pkg` and is this design's own. The
engine hardware does not depend on it beyond two functions.

* Cell `(r, c)` of the global matrix has centre `u = 16c + 8`, `v = 16r + 8`.
* Its receptor on layer `l` is `x = (u·S_l) >> 8`, `y = (v·S_l) >> 8`, with
  `S_l = 160 + 6l`. These are straight tracks from the origin crossing planes
  at increasing distance.
* The weight is `round(15·exp(−d²/50))` for `d² ≤ 144` (search distance 12),
  and 0 beyond.

To use another detector, change `receptor()` and `gauss_weight()`. The
engines and the mappers follow from them; the testbench model in
`tb_retina_ref_pkg` keeps its own copy of the formulas and must be changed too.

`retina_engine` handles one cell. It takes one hit per cycle, has no hold
input, and is a 3-stage pipeline:

1. `|dx|` and `|dy|` to the receptor of the hit's layer, with a "far" flag
   beyond the search distance.
2. `d² = dx² + dy²`, then a lookup in a weight table built at elaboration.
3. A saturating 8-bit accumulate.

On an EE, the sum is latched to `exc` and `exc_valid` pulses 3 cycles later.

`cell_matrix` holds a board's engines: `G_ROWS x G_COLS` groups of `GR x GC`
engines, by default 2 x 4 groups of 7 x 7 = 392.

* Each group is fed by one post-switch output. It broadcasts every hit to all
  its engines, and each engine applies its own weight.
* The latched excitations form a **frame**.
* A group whose frame has not yet been taken holds its next EE (raises
  `hold`) until the cluster finder acknowledges. Hits of the next event keep
  flowing meanwhile.
* `frame_valid` is high when every group is full.

## Cluster finding and output

`cluster_finder` copies a frame in one cycle (`frame_ack`) and then emits one
track per cycle, lowest cell index first, followed by an EE. A cell is a track
candidate when both hold:

* its excitation is at least `THRESH` (64);
* it is a 3 x 3 local maximum: strictly greater than the neighbours before it
  in row-major order, and not less than those after it, so a flat top gives
  one track.

The offsets are `du = 16·Σ dc·E / Σ E` and `dv = 16·Σ dr·E / Σ E` over the
3 x 3 cluster, truncated toward zero. Cells outside the board count as zero.
Maxima are therefore found per board: a track right on a board edge can be
reported by both boards, or its centroid can be biased.

`output_prescaler` keeps one event in `prescale` (0 and 1 keep all) and drops
the others whole. This lets a slow host check complete events bit by bit.
Tracks then enter the output FIFO that the host drains.

## Hit sources and live data

Each board has `NLANES = 2` `hit_source`s, one per detector layer it reads.
`mode` selects where the hits come from:

* **Mode 0:** a `HIT_DEPTH`-word hit RAM that the host loads. It is read in a
  loop over `ram_len` words, with the event number stamped by the source.
  This gives an endless stream of test events.
* **Mode 1:** a `FIFO_DEPTH`-word input FIFO that the host pushes live data
  into, with the host's own event numbers.

A mode change takes effect only at an event boundary.

* With `stop_en`, no event numbered `ev_stop` is started from RAM. All lanes
  of all boards then stop after the same event, and the host can switch to
  live data with consistent numbering.
* `run = 0` pauses the loop at the next boundary.

## Integrity checks

* An `ee_checker` sits on every received link and counts two errors:
  * EE corruption: an EE with an unexpected number. The checker then
    resynchronises on the number it received.
  * Event mixing: a hit tagged with another event than the one in progress.
* Merger EE mismatches and cell-matrix group mismatches are counted as
  `err_net`.
* Each board also reports `frames`, the events processed, and `dropped`, the
  events removed by the prescaler.

## Latency

| stage | cycles |
|-------|--------|
| hit RAM read / input FIFO | 1 |
| hit_mapper (boards) | 1 |
| pre-switch, N = 8 | 6 |
| link FIFO | 1 |
| hit_mapper (groups) | 1 |
| post-switch, N = 8 | 6 |
| engine, EE to excitation | 3 |
| cluster finder | 1 to copy, then 1 per track, then the EE |
| output FIFO | 1 |

These figures assume no hold is raised. Throughput is one word per cycle per
lane and per switch port. An event of H hits on a lane costs H + 1 cycles.

## Files

Everything uses `retina_pkg`.

| module | role |
|--------|------|
| `retina_top` | 8 boards plus full-mesh links; host ports per board |
| `retina_board` | one FPGA: sources, mapper, pre-switch, link ports, checkers, mappers, post-switch, cells, cluster finder, prescaler, output FIFO |
| `retina_switch`, `retina_dispatcher`, `retina_splitter`, `retina_merger` | distribution network |
| `hit_mapper` | routing masks |
| `retina_engine`, `cell_matrix` | cells and their grouping |
| `cluster_finder` | local maxima and centroids |
| `output_prescaler` | prescaling of the track output |
| `hit_source` | hit RAM loop / input FIFO |
| `stream_fifo` | FIFO with valid/hold (input, output, link) |
| `ee_checker` | EE corruption and event-mixing check |

The top's ports are plain arrays indexed by board (and lane):

* hit RAM write port;
* input FIFO push port;
* track output stream;
* configuration: `mode`, `run`, `stop_en`, `ev_stop`, `ram_len`, `prescale`;
* counters.

They stand in for the host (PCIe) interface. The serial transceivers and the
host link are not part of the RTL.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. `tb_retina_ref_pkg` is an
independent floating-point model used by the testbenches to compute:

* receptors and weights;
* excitation frames;
* local maxima and centroids, found by brute force.

To build and run one testbench, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/retina_pkg.sv tb/tb_retina_ref_pkg.sv tb/tb_retina_top.sv \
        --top-module tb_retina_top -j 4
    ./obj_dir/Vtb_retina_top

`tb_retina_top` runs the whole design end to end at reduced size: 2 boards
of 2 groups of 4 x 4 engines.

1. It loads events of straight tracks and noise into the hit RAMs, runs two
   loop passes and stops at an event.
2. It runs a pass at prescale 3.
3. It preloads new events into the input FIFOs while the boards are stopped,
   switches to live mode once a FIFO is full and lets them drain. The last
   event carries a corrupted EE.

Every track of every kept event is compared with the reference. The output is
held at random throughout. The testbench counts each of the following and
fails if any never happens:

* tracks;
* hits copied to several boards;
* output stalls;
* input FIFO full;
* prescaled drops;
* loop wrap;
* mode switch;
* detected EE corruption;
* EE held at an engine group.

`tb_retina_top_full` runs the same sequence with every parameter at its
default: 8 boards, 3136 engines, 4 events in the hit RAMs and 150 live
events, enough to fill a 512-word input FIFO. Verilator takes several minutes
to compile it.

## How far to trust it, and where it departs from the demonstrator

**Taken from the demonstrator's description:**

* cells and engines with truncated Gaussian weights;
* accumulation closed by EndEvent words;
* local maxima over threshold with centroids;
* hold-based back-pressure;
* splitter/merger/dispatcher switches, one pipeline stage per layer;
* pre-switch / links / post-switch segmentation;
* 8-board full mesh;
* 2 modules per board from RAM in a loop or from input FIFOs;
* output FIFOs;
* prescaled output;
* EE-corruption and event-mixing checks;
* 392 engines per board.

**This design's own choices:**

* **Geometry.** The numbers are illustrative and are not the VELO's.
* **Routing.** The routing as a geometric mask computed at elaboration.
* **Engine groups.** Eight groups of 7 x 7 engines with broadcast inside a
  group.
* **Widths.** All word widths and the 8-bit event number.
* **Engine arithmetic.** Weight table, sigma, search distance and threshold.
* **Maxima.** The tie rule, and per-board maxima with zero padding at board
  edges.
* **Merger details.** The round-robin merging and the `live` flags.
* **Prescaler.** Which events it keeps.
* **Hit source.** The stop-at-event control for switching sources.
* **Sizes.** All FIFO and RAM depths.

**Not modelled:**

* the serial link protocol (links are FIFOs);
* the PCIe interface and its driver;
* the optical patch panel (its function is the mesh wiring in `retina_top`);
* the host-side software chain.

**Not reproduced:** whatever the demonstrator's "optimized" switch does beyond
the plain recursive switch.

**No clock frequency is claimed.** Throughput in events per second is
`f_clk / (H + 1)` on the busiest lane or switch port.
