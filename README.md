# Hierarchical primitive lists for a tile-based renderer

A tile-based GPU renders the screen one 32x32-pixel tile at a time, so its
depth and colour buffers fit on chip. The price is a binning pass: every
primitive must first be recorded in the primitive list of every tile its
bounding box touches. Large primitives are recorded dozens of times, and list
storage grows with scene complexity and resolution.

This RTL records a primitive once per *group* of tiles instead. Besides the
plain per-tile lists it keeps lists for coarser layers and for three other
kinds of tile group. A small combinational circuit picks, in a fixed number of
steps, the group kind and size that fits each primitive's bounding box. All
lists share one block-chained list buffer, so adding list kinds costs only
index-table entries. The reverse path is also here: for any tile, a reader
walks every list that covers that tile and streams out the recorded primitives. A
small sequencer supplies the tiles in recursive-Z order, which renders the tiles
of one group together.

The scheme follows a thesis on hierarchical primitive lists for tile-based
rendering. That work builds on an earlier square-hierarchy listing scheme, adds
unaligned grids and rectangular layers, and gives a fitting circuit and a
list-buffer organisation. Where the thesis leaves details open, this RTL makes
its own choices. They are listed in [Choices and departures](#choices-and-departures).

## The four kinds of list

Layer *L* groups 2^L x 2^L tiles into one *layered tile*. Layer 0 is the
plain tile grid, layer 1 uses 2x2 groups, layer 2 uses 4x4 groups, and so on.
At every layer there are up to four kinds of list (`ltype_e` in `hpl_pkg`):

| code | kind | cell shape at layer L | cells (screen of TX x TY tiles, G = 2^L) |
|---|---|---|---|
| `00` | square | G x G, aligned to multiples of G | ceil(TX/G) x ceil(TY/G) |
| `01` | horizontal rectangle | G tiles high, half the screen wide | 2 x ceil(TY/G) |
| `10` | vertical rectangle | G tiles wide, half the screen high | ceil(TX/G) x 2 |
| `11` | unaligned grid (L >= 1) | G x G, shifted by G/2 in x and y | (ceil(TX/G)-1) x (ceil(TY/G)-1) |

- **Square** lists are the basic hierarchy.
- **Horizontal and vertical rectangles** hold long, thin primitives. Such a
  primitive would otherwise need many square cells along its long side. The
  screen halves are split at ceil(TX/2) and ceil(TY/2).
- The **unaligned grid** holds primitives that sit across a group edge. An
  example is a 2x2-tile box that starts on an odd tile: the square layers need
  four cells for it, but one shifted cell holds it. The shifted grid covers
  only the screen interior, so some boxes near the screen edge do not fit it.

For a 1600x1200 screen (50x38 tiles) with five layers there are 2552 square,
348 rectangle and 570 unaligned-grid lists: 3470 in total. The index table
holds 4096.

## Fitting a primitive: `hier_fit`

This is the core of the design and is purely combinational. Its inputs are a
primitive's tile box and the screen configuration. Its outputs are a list kind
and a layer.

1. **Tile-based bounding box** (`tile_bbox`). The minimum vertex coordinate is
   rounded down to a tile edge. The maximum is rounded up, and a maximum
   lying exactly on an edge moves to the next edge. With 32-pixel tiles this is
   `x0 = min(x) >> 5` and `x1 = max(x) >> 5` (inclusive), and
   `w = x1 - x0 + 1`. Every later step then works on small tile counts.
2. **Reference side and shape** (`shape_comparator`). The shorter side is the
   reference side. If the longer side exceeds it by **more than** `thresh`
   tiles, the box is *wide* or *high*; otherwise it is *normal*. A tie counts
   as high, with a difference of zero.
3. **Layer select** (`layer_select`). The layer is ceil(log2(reference
   side)): the smallest layer whose group spans the short side. Using the
   shorter side rather than the longer one keeps the chosen cells close to the
   primitive's shape, so fewer tiles read the primitive for nothing. No
   logarithm is computed. Lengths above 8 give layer 4. Below that, the four
   low bits, A (bit 3) down to D (bit 0), give:

   ```
   id[0] = A | B&D | C&~D
   id[1] = A | B | C&D
   id[2] = 0
   ```

   `hier_fit` then caps the result at the highest layer in use (`top_layer`).
4. **Misalignment** (`misalign_check`). Take a dimension whose length fits in
   one group of the selected layer. If its first and last tiles fall in
   different groups, the box straddles an edge it need not straddle. In
   hardware this compares the coordinate bits above bit L.
   - **Boundary check:** a misaligned box passes it when it lies inside the
     shifted grid of that layer. It must also sit inside one shifted group in
     every dimension that fits one group.
   - **Rectangle misalignment:** for a wide box, the height straddles a group
     edge; for a high box, the width does.
5. **Layer type select** (`layer_type_select`) is a priority table.
   Rectangles come first, then the unaligned grid, then the square hierarchy:

   | misalignment | shape | kind | layer |
   |---|---|---|---|
   | none | normal | square | L |
   | fits shifted grid | normal | unaligned grid | L |
   | boundary check failed | normal | square | L-1 |
   | any | wide / high | horizontal / vertical rectangle | L |
   | any | wide / high, misaligned | horizontal / vertical rectangle | L-1 |

Some examples, on a 1600x1200 screen with threshold 10:

- A box 1 tile wide and 4 high goes to layer 0 as 4 square cells.
- An aligned 2x4 box goes to layer 1 as two 2x2 cells.
- A 2x2 box at tiles (1..2, 1..2) straddles the layer-1 edge at tile 2. The
  shifted layer-1 cell covering tiles 1..2 holds it, so it gets one
  unaligned-grid record.

A box whose short side is longer than a top-layer group is never called
misaligned in that dimension. The `clamped` output flags this case.

**Turning list kinds off.** Driving `ug_en` low disables the unaligned
grids. A box that would have gone to a shifted cell then follows the
boundary-check-failed row instead, so it steps down one layer in the square
hierarchy. Setting `thresh` to 255 disables the rectangles, because no side
difference can exceed it. With both disabled, the unit fits square
hierarchies only. This is the baseline that the unaligned grids and
rectangles are measured against.

## Storing the lists

The storage is made of four modules:

- **`list_buffer`** is one memory shared by all lists. It is cut into blocks
  of `N` entries (8 by default). The first N-1 entries of a block hold 24-bit
  scene-buffer addresses. The last entry is the *link slot* and holds the
  address of the list's next block.
- **`list_index_table`** has one entry per list, with three fields:
  - `entry`: the first block;
  - `next`: the next free slot;
  - `count`: the number of records.

  A per-entry valid bit stands for a NULL entry. `clear` drops every valid bit
  in one cycle at the start of a frame.
- **`addr_accumulator`** is the allocator. It returns the next free block and
  adds N. Blocks are never freed within a frame. It reports `full` when fewer
  than N entries are left.
- **`list_manager`** appends one record, in one of three cases:
  - **NULL list:** take a block, write the record into its first slot, and set
    `entry = next - 1 = block` and `count = 1`.
  - **`next` is a link slot** (its low log2(N) bits are all ones, which is the
    same as `count` being a positive multiple of N-1): take a block and write
    its address into the link slot. In the next cycle, write the record into
    the new block.
  - **Otherwise:** write at `next`, then increment `next` and `count`.

  An append takes 2 cycles, or 3 when it chains a block. If no block is left,
  the record is dropped, `ev_drop` pulses and the sticky `overflow` flag is
  set.

**Where a list lives.** `layer_offset_table` has `NUM_LAYERS x 4` entries.
Each entry gives the first index-table entry of one (layer, kind) segment. A
list's index is:

```
index = offset[layer][kind] + row * columns(kind, layer) + column
```

Here `columns` is the cell count across, from the table above. The host
writes the offset table once per screen size. The testbenches use a
layer-major layout: kinds in code order inside each layer, and no
unaligned-grid segment at layer 0. Each segment's base is the sum of the sizes
of the segments before it. Any layout that does not overlap works.

**Binning** (`tile_binner`) takes a primitive in one cycle and fits it. It
then walks the covered cells row by row and sends one append request per cell.
Without stalls a primitive that covers k cells takes 1 + k cycles.

## Reading a tile back: `list_reader`

The primitives of tile (x, y) are spread over the hierarchy. For each layer
from 0 to `top_layer`, the reader visits four lists in this order:

1. the square cell that holds the tile;
2. the horizontal rectangle that holds it;
3. the vertical rectangle that holds it;
4. the shifted cell that holds it, if the shifted grid reaches the tile.

The reader skips NULL lists. It walks each list through the list buffer,
following link slots, and streams the records on `rec_*` with valid/ready.
`tile_done` pulses at the end.

Each list visited costs 2 cycles, a missing shifted cell costs 1, and each
list-buffer read (record or link slot) costs 2. The request and `tile_done`
add 2 cycles per tile.

A primitive reaches every tile its box touches. It can also reach tiles the
box does not touch: for example, a square cell chosen for the short side may
cover tiles beyond the box. These *redundant reads* are the price of the
smaller list storage.

## Tile order: `rz_sequencer`

A record in a layer-L list is read by every tile of its 2^L x 2^L group.
Rendering those tiles one after another keeps the record and its primitive
warm in any cache. Rendering them in rows scatters the reads. The sequencer
therefore produces the *recursive-Z* order:

- It first visits the four tiles of a 2x2 group: x first, then y.
- Then it visits the next 2x2 group inside the same 4x4 group, and so on up
  the layers.

For a screen six tiles wide, with tiles numbered from 1 row by row, the order
begins 1, 2, 7, 8, 3, 4, 9, 10.

In hardware this is a counter whose even bits are the tile x and odd bits the
tile y (a Morton code). Codes beyond the screen edge are skipped, one per
cycle. A walk of a 1600x1200 screen (50x38 tiles) therefore takes 3364 cycles
for 1900 tiles. After `rz_start`, the top offers the tiles on the `rz_*`
valid/ready stream, and the renderer sends them back as tile requests.

## Top level: `hpl_top`

`hpl_top` connects the binner, the list manager, the three tables and the
reader. A frame is binned completely before it is rendered, and the top
enforces this:

- A tile request is accepted only while neither the binner nor the list
  manager is busy.
- A primitive is accepted only while the reader is idle.

| port group | meaning |
|---|---|
| `tiles_x`, `tiles_y`, `thresh`, `top_layer`, `ug_en` | screen size in tiles, rectangle threshold in tiles, highest layer in use, unaligned grids on |
| `off_we`, `off_wlayer`, `off_wtype`, `off_wdata` | layer offset table write port |
| `frame_clear` | one-cycle pulse: all lists NULL, buffer empty, overflow cleared |
| `prim_valid/ready`, `prim_saddr`, `prim_vx[3]`, `prim_vy[3]` | primitive to bin: scene-buffer address, integer pixel vertices (12 bits) |
| `tile_valid/ready`, `tile_x`, `tile_y` | tile to read back |
| `rec_valid/ready`, `rec_saddr`, `rec_ltype`, `rec_layer`, `tile_done` | records of that tile, with the kind and layer of the list each came from |
| `rz_start`, `rz_valid/ready`, `rz_x`, `rz_y`, `rz_last`, `rz_busy` | recursive-Z tile order for the renderer |
| `fit_*`, `ev_*`, `overflow`, `lb_used`, `bin_busy` | fitting result of each accepted primitive, list-manager events, status |

The source design chooses the threshold per resolution: 2 tiles for 320x240,
4 for 640x480, 8 for 1280x1024 and 10 for 1600x1200. It uses three layers at
320x240 and four at the higher resolutions. The fitting circuit itself is
sized for five.

Parameters and their defaults:

| parameter | default | origin |
|---|---|---|
| `NUM_LAYERS` | 5 | five-layer fitting circuit of the source design |
| `N` (block size) | 8 | source design's best trade-off of sizes 2 to 1024 |
| `LB_DEPTH` | 65536 | this design's choice |
| `NUM_LISTS` | 4096 | this design's choice; holds the 3470 lists of 1600x1200 |

The fixed widths are in `hpl_pkg`:

- 12-bit pixel coordinates;
- 7-bit tile coordinates;
- 24-bit scene-buffer addresses;
- 16-bit list-buffer addresses;
- 12-bit list indices.

## What the sweeps show

`tb_hpl_workloads` runs on random triangles, not on recorded game frames, so
its figures show trends, not benchmarks. In one run, with 300 triangles per
frame, the stored records were this much fewer than a flat per-tile list
needs:

| screen | square only (3 or 4 layers) | unaligned grids + rectangles |
|---|---|---|
| 320x240, 3 layers | 37 % | 52 % |
| 640x480, 4 layers | 53 % | 66 % |
| 1280x1024, 4 layers | 73 % | 83 % |
| 1600x1200, 4 layers | 70 % | 82 % |

The extra kinds trade reads for storage. At 1600x1200 the redundant reads
rose from about 4000 (square only) to about 5100 (all kinds), because a
coarser cell is also read by tiles the primitive misses.

Block size sets how much of the list buffer is wasted. Most lists hold only
a few records, and each list that holds any record takes at least one whole
block. For the 1600x1200 square-only frame with four layers, the entries
needed were:

| N | 2 | 4 | 8 | 16 | 32 | 64 |
|---|---|---|---|---|---|---|
| entries | 3584 | 4920 | 9312 | 18624 | 37248 | 74496 |

From N = 64 up, that frame no longer fits the default 65536-entry buffer.
Small blocks waste the least space but cost a link read every N-1 records.
N = 8 keeps the link overhead to one read in eight while staying far below
the buffer size.

## Choices and departures

These points are not specified by the source design and are this RTL's
choices:

- **Misalignment rule.** The exact straddle test is applied per dimension,
  and only to dimensions that fit one group. The boundary check's rule is to
  stay inside the shifted grid and inside one shifted group. The source design
  says only that misalignment comes from the low coordinate bits and that a
  boundary check decides whether the shifted grid can take the box.
- **Letter order of the layer select equations.** A is the most significant
  input bit. This is the only order under which the equations reproduce the
  ceil(log2) table.
- **Threshold test.** It uses "greater than", as in the comparator's
  behavioural description. One prose passage says "reach a threshold".
- **Table rows that cannot happen.** The rows with a misaligned rectangle but
  no square misalignment cannot occur under these rules. They are still in the
  table.
- **Top layer.** The layer is capped at `top_layer`, and a box larger than a
  top-layer group is not treated as misaligned. The source design does not say
  what happens there.
- **Rectangle lists at every layer in use.** Rectangle lists exist even at a
  layer whose single group would already cover the screen. The source design
  omits them there. At the evaluated sizes this never matters.
- **Storage details.** This RTL chooses the following:
  - the NULL valid bits;
  - detecting a full block from the link-slot address;
  - the overflow drop;
  - the field widths;
  - the buffer and table sizes;
  - the host-written offset table;
  - the run-time `top_layer`;
  - the binning/rendering interlock;
  - the reader's visiting order.
- **List-kind enable.** The `ug_en` input and the use of `thresh = 255`
  to switch list kinds off are this RTL's additions. They make the
  square-only baseline run on the same circuit.
- **Input coordinates.** Vertices are assumed to be clipped to the screen and
  given in integer pixels.
- **Not included.** The parallel tile renderers and their list and
  primitive caches are outside this design. The source design sketches them
  as future work. Of that work, only the recursive-Z tile order is built. The
  scene buffer itself is external memory; only its addresses pass through
  this design.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<m>`. `tb/hpl_ref_pkg.sv` is a
reference model that the larger testbenches share. It is written with integer
division and loops, independently of the bit-level circuits, and covers:

- the fitting rules;
- the offset layout;
- the cells a primitive covers;
- the lists that cover a tile.

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hpl_pkg.sv tb/hpl_ref_pkg.sv tb/tb_hpl_top.sv --top-module tb_hpl_top
./obj_dir/Vtb_hpl_top
```

The same command, with the testbench name changed, builds every testbench
without warnings.

- **`tb_hpl_top`** runs three frames on a top with a reduced 4096-entry list
  buffer:
  - 640x480 with four layers;
  - 320x240 with three layers and enough primitives to overflow the buffer;
  - 1600x1200 with five layers, read back in recursive-Z order.

  For every tile it checks the exact record sequence against the model,
  including which records were dropped. It checks that every primitive
  reaches every tile its box touches, and that each mechanism occurs at least
  once:
  - every list kind;
  - both kinds of step-down;
  - clamping;
  - first and chained blocks;
  - overflow;
  - redundant reads;
  - a tile request held back by binning;
  - the recursive-Z tile order.
- **`tb_hpl_workloads`** sweeps the configurations in which the scheme is
  normally judged. It drives ten copies of the top, with N = 2, 4, ... 1024,
  from the same primitive stream. Each frame has 300 random triangles.
  - Square hierarchies only: 2 to 5 layers at 320x240, 640x480, 1280x1024
    and 1600x1200.
  - Unaligned grids only, rectangles only, and both: three layers at
    320x240 and four above, with thresholds 2, 4, 8 and 10.

  Every copy reads back every tile, and each tile is checked against the
  model. Per frame the testbench prints the flat-list record count, the
  stored record count, the redundant reads, and, per block size, the
  list-buffer entries needed and the records dropped.
- **`tb_hpl_top_full`** runs the top at its default sizes. It bins one
  1600x1200 frame of 3000 primitives with four layers and reads back all 1900
  tiles.
- **Unit testbenches:**
  - `tb_layer_select` and `tb_layer_type_select` are exhaustive;
  - `tb_tile_binner` and `tb_list_reader` also check cycle counts;
  - `tb_list_manager` checks chaining and overflow against an allocation model.
  - `tb_rz_sequencer` checks the order and the cycle count of a walk on seven
    screen sizes, including the six-wide example above.
