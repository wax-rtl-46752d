# WAX: a wire-aware CNN accelerator in SystemVerilog

Most of the energy of a CNN accelerator goes into moving operands across long
wires: from large global buffers, across big systolic arrays, or in and out of
per-PE scratchpads. WAX turns this around. It is built like a small cache (an
H-tree of SRAM subarrays) and puts a narrow row of 8-bit MACs right next to
every subarray. Each MAC reads its operands from three one-row registers
(A for activations, W for weights, P for partial sums) that sit directly under
the subarray's sense amplifiers. Reuse comes from a cheap byte rotation of the
A register instead of from a deep register file, and partial sums are added up
by a small adder tree before they ever go back to the subarray.

This repository holds synthesizable RTL for the whole accelerator in its main
configuration:

| Item | Value |
|---|---|
| Subarray | 256 rows x 24 bytes = 6 KB, one read/write port |
| Tile | subarray + 24 MACs + A, W, P registers (24 bytes each) + adder tree |
| Chip | 4 banks x 4 subarrays = 16 tiles, 96 KB |
| MAC tiles | 7 (168 MACs); the other 9 subarrays are *output tiles* |
| H-tree | 72-bit root per bank, four 18-bit leaves, 11 beats per 24-byte row |
| Arithmetic | signed 8-bit operands, 16-bit products and adders, results kept as the low 8 bits |
| Dataflows | WAXFlow-3 (convolution) and the fully connected (FC) dataflow |

## The tile and the WAXFlow-3 dataflow

This is the part that takes the most thought, so it comes first.

### Row layout

A 24-byte row is split into four *partitions* of 6 bytes. Each partition
belongs to one input channel:

```
activation row (A):   | ch0: a0..a5 | ch1: a0..a5 | ch2: a0..a5 | ch3: a0..a5 |
weight row (W):       | k0: w0 w1 w2 , k1: w0 w1 w2 | ... same for ch1..ch3 ... |
```

In an activation row a partition holds six consecutive x positions of one
channel's feature-map row. In a weight row the same partition holds one
3-wide kernel row of two different kernels (group 0 = kernel 0, bytes 0-2;
group 1 = kernel 1, bytes 3-5), for that channel. A 24-byte weight row
therefore covers 4 channels x 2 kernels x 3 taps.

### One slice

A slice is six MAC cycles on one A row and one W row. Each cycle:

1. the 24 multipliers form `A[i] * W[i]`;
2. inside each partition, the three products of each kernel group are summed
   (intra-partition aggregation);
3. the group sums of the four partitions are summed (inter-partition
   aggregation), giving **two partial sums per cycle**, one per kernel, each
   covering 3 taps x 4 channels;
4. the two sums are added into two entries of the P register;
5. A rotates right by one byte *inside every partition* (wraparound at the
   partition edge).

After cycle `s` of the slice, group `g` faces the activation window that
starts at `x = (3g - s) mod 6`. Only windows that do not wrap (`x <= 3`) are
real outputs, so each kernel gets four outputs per slice, and the sequencer
accumulates only those. The sum of kernel `g` at window `x` goes to P entry

```
p_slot*12 + g*6 + x          (x = 0..3)
```

so P holds two slices' worth of results (`p_slot` 0 and 1); entries
`g*6+4` and `g*6+5` stay unused. Because a slice rotates A by a full turn, A
is back where it started at the end of it and can be reused by the next
slice with a different W row (another kernel row, or other kernels) without
re-reading the subarray. P can be kept in the register across slices to
accumulate more taps or channels, or read from and written back to a psum
row of the subarray.

To cover a full feature-map row, the host places overlapping windows of six
activations (a step of four, so the two-pixel halo of a 3-wide kernel is in
every window), and spreads more channels or kernel rows over further slices
and tiles.

### Timing inside a tile

The subarray has a single port. A read issued in cycle t lands in its
register at the end of cycle t+1 and can feed the MACs in cycle t+2; reads
can be issued back to back. A slice command costs

```
CONV = ld_a + 1 (W) + ld_p + 1 + 6 (MAC/shift) + st_p  cycles
```

and during the six MAC cycles the subarray is idle. Those idle cycles are what
lets the H-tree load the next rows while the tile computes.

### Fully connected layers

For FC layers the A register does not rotate. An activation row (24 inputs)
is read once; then one kernel row per cycle is read into W, each holding 24
weights of one output neuron, and all 24 products are summed into a single P
entry. The next kernel row is already being read while the current one is in
the MACs, so a tile does 24 MACs every cycle:

```
FC = ld_a + ld_p + n_rows + 2 + st_p  cycles     (n_rows = 1..24, results in P[p_base .. p_base+n_rows-1])
```

A 1x1 convolution (pointwise layer) is the same computation and can use the
FC command.

## Port sharing in a tile

The subarray port of every tile has three users, in fixed priority:

1. the MAC datapath (micro-ops from the sequencer);
2. a row received over the H-tree leaf: written, or for a Y-accumulate
   read, added byte-wise to the incoming row (8-bit wrap) and written back;
3. a read-out: the row is sent up the leaf.

A lower-priority user waits while a higher one holds the port. The tile
raises `rx_busy` while it is collecting or still holding a received row, and
the controller does not start another row to it until `rx_busy` drops, so a
tile that is busy computing slows the transfer down (the chip's `link_stall`
output shows such cycles) instead of losing data.

An output tile is the same subarray and leaf logic with no MACs.

## The H-tree and data movement

Each bank has a 72-bit root bus that splits into four 18-bit leaves, one per
subarray. A 24-byte row is 192 bits, so it takes 11 beats of 18 bits (the
last beat half used, low bits first). Moves are:

* **Load from off-chip**: 72 bits per cycle go to one bank, lane i to
  subarray i, so four rows (one per subarray, selected by `lane_mask`) are
  written in 11 cycles.
* **Sibling move**: subarrays 0-1 and 2-3 of a bank share a split point. The
  split point has a mux that can feed a leaf with its sibling's up-going
  beats, so a row goes from one subarray to its neighbour in 11 cycles without
  reaching the root.
* **Any other move**: there are no links between banks, so the central
  controller gathers the row (11 beats) and sends it down to the destination
  (11 beats).
* **Y-accumulate**: a move with the `acc` flag. The destination adds the
  arriving row into the row already stored there. This is how the partial
  sums that several tiles computed in parallel are combined.
* **Read-out**: the row goes up to the controller and out on `out_data`,
  11 beats of 18 bits.

The destination row address and the accumulate flag travel with the beats
on each leaf, the way the address lines of a cache H-tree would.

## Controller and command set

`wax_top` is driven by a host through a command port (`cmd_valid`, `cmd`,
`cmd_ready`, accepted when both are high) and an off-chip input stream
(`in_valid`, `in_data[71:0]`, `in_ready`). Commands are `cmd_t` structs
(`rtl/wax_pkg.sv`):

| `op` | Meaning | Main fields |
|---|---|---|
| `CMD_LOAD` | 11 input beats into row `dst_row` of the subarrays `lane_mask` of bank `dst_tile/4` | `dst_tile`, `dst_row`, `lane_mask` |
| `CMD_MOVE` | row `src_row` of `src_tile` to row `dst_row` of `dst_tile`, optionally accumulating | `src_*`, `dst_*`, `acc` |
| `CMD_READ` | row `src_row` of `src_tile` to `out_valid`/`out_data` | `src_tile`, `src_row` |
| `CMD_CONV` | one WAXFlow-3 slice on every MAC tile | `a_row`, `w_row`, `p_row`, `ld_a`, `ld_p`, `clr_p`, `st_p`, `p_slot` |
| `CMD_FC` | one FC pass on every MAC tile | `a_row`, `w_row`, `n_rows`, `p_base`, `p_row`, `ld_a`, `ld_p`, `clr_p`, `st_p` |

Every command also has a `nowait` bit, described below.

Tiles are numbered bank-major (tile = 4 x bank + subarray); tiles 0-6 carry
MACs and 7-15 are output tiles. Compute commands go to the flow sequencer,
which broadcasts one micro-op per cycle to all seven MAC tiles; they all run
the same slice on their own data, as the tiles of a layer do in WAX. Data
commands go to a transfer engine that runs **at the same time** as the
sequencer. Each engine takes its commands in order; a command for a busy
engine holds the command port.

The ordering rules between the two engines:

* `CMD_MOVE` and `CMD_READ` wait until no compute command is running, and a
  compute command waits until no `CMD_MOVE` is in flight and the moved row is
  written. A Y-accumulate issued right after the slices that produce its
  partial sums therefore reads the finished rows.
* `CMD_LOAD` is **not** ordered against compute. This is what lets the next
  activation or weight rows stream in while the tiles compute. The host must
  not load a row that a running or queued compute command still reads. It
  must also wait for `busy` to drop before computing on rows it has just
  loaded.
* A command with `nowait` set skips the first rule. The host uses it when it
  knows that the command touches no row the other engine is using, for
  example to Y-accumulate the results of one pass while the next pass runs.
  The moved row then fills the subarray cycles the compute leaves idle.

Simulation assertions check the rules the RTL can see. A command must be
held unchanged until it is taken. An FC command must have 1 to 24 kernel
rows. A tile must never receive a row while the previous one is still
waiting for its subarray.

`busy` is high while either engine works. `rx_overflow` is a sticky error
flag that would show a row arriving at a tile that still held one; with the
controller's flow control it stays low.

## Module map

| Module | Role |
|---|---|
| `wax_pkg` | constants, row/micro-op/command types |
| `wax_subarray` | 6 KB single-port SRAM, written as an array |
| `wax_areg` | A register with per-partition rotation |
| `wax_mac_array` | 24 signed 8x8 multipliers |
| `wax_adder_tree` | intra- and inter-partition adders, FC reduction |
| `wax_preg` | P register: load, clear, accumulate with 8-bit truncation |
| `wax_link_if` | 18-bit leaf port: row receive (11 beats) and send |
| `wax_tile_mem` | subarray + leaf port + port arbitration (= output tile) |
| `wax_tile` | MAC tile: `wax_tile_mem` plus A, W, P, MACs and adders |
| `wax_htree_bank` | bank H-tree node with the split-point steering mux |
| `wax_bank` | a bank: H-tree node and four tiles |
| `wax_flow_seq` | WAXFlow-3 / FC micro-op sequencer |
| `wax_central_ctrl` | root controller: commands, loads, moves, read-out |
| `wax_top` | the chip |

Every file starts with a comment describing the module's interface and
timing.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/wax_pkg.sv tb/tb_wax_ref_pkg.sv tb/tb_wax_top.sv \
    --top-module tb_wax_top -o sim && ./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. For another block,
replace `tb_wax_top` with its testbench (`tb_wax_ref_pkg.sv` is only needed by
the tile, bank and top testbenches).

`tb_wax_layer` maps layer work onto the chip with commands only, and is the
best starting point for writing a host-side mapping of your own:

* A strip of a 3x3 convolution layer shaped like those of VGG-16: 16 input
  channels, 8 kernels, one 16-pixel output row. It uses six MAC tiles, one
  per kernel row and kernel set. Each A row serves two slices, one per
  kernel pair, in the two halves of P. P accumulates over the channel groups.
  The kernel rows are combined with Y-accumulate moves that run while the
  next window computes.
* A depthwise 3x3 layer, as in MobileNet. Each kernel covers one channel,
  so its weights fill one partition of the W row and the others hold zeros.
  Only a quarter of the MACs do useful work on such layers.
* A 48-input, 10-neuron FC layer at batch 2. The weights stay in place
  across the batch, and the second input vector loads during the first pass.

Every output is checked against the layer's definition, and the cycle count
of each layer is printed.

`tb_wax_top` runs the chip at its full size: it loads rows into all seven
MAC tiles, runs convolution slices (with A reused, P carried across slices
and a psum row reloaded), an FC pass of 24 kernel rows, Y-accumulates the
results of three tiles (one sibling move, one move across banks), copies the
result to an output tile and reads rows back, comparing everything with a
direct convolution or dot product. It also checks cycle counts (4 rows in
11 cycles, 9-cycle slices, a 28-cycle FC pass) and makes sure that
overlap of loads with compute and link stalls actually happen.

## Where this design goes beyond or departs from the original description

* **Only WAXFlow-3 and the FC dataflow are built.** WAXFlow-1 and WAXFlow-2
  were stepping stones on the way to WAXFlow-3, and the tile width of 24 is
  the one chosen for WAXFlow-3.
* **Wrapped windows are discarded.** With the A row rotating inside a
  6-byte partition, two of the six windows of each kernel wrap around the
  partition edge; their sums are not accumulated. Each slice gives 8 valid
  outputs per tile (4 per kernel), and the host must overlap activation
  windows. The original accounting counts two partial sums in every cycle.
* **P layout and slice length.** The P entry for each output and the
  two-slice capacity of P are this design's choices; with 32-byte rows the
  original fills P in 16 cycles.
* **Transfers take 11 beats everywhere.** A row through the 18-bit leaf is
  11 beats in each direction, so a move through the controller costs 22
  cycles plus a few cycles of handshake. A 1-cycle-in/1-cycle-out figure for
  output-tile accesses, and a 64-bit tile link, are stated for other
  configurations and are not used.
* **Sibling pairs.** Which subarrays share a split point is not specified;
  pairs 0-1 and 2-3 are used.
* **Placement of MAC tiles.** Tiles 0-6 (all of bank 0 and three of bank 1)
  carry MACs.
* **One sequencer for all MAC tiles.** All MAC tiles execute the same
  micro-op with their own data; independent per-tile schedules are not
  possible.
* **Hazards between moves and compute are checked coarsely.** The
  controller does not track which rows a command touches. By default a move
  waits for the running compute command (and the reverse). Overlapping a
  Y-accumulate or an output copy with the slices, as the original design
  does, takes the `nowait` bit, and the host must then know that the rows
  are independent.
* **Pass orchestration is left to the host.** X-, Z- and Y-accumulate passes,
  tiling of large layers, halo handling, strides other than 1 and kernels
  wider than 3 are sequences of commands, not hardware.
* **No DRAM model or energy model.** The off-chip memory is a port. Energy,
  area and the 200 MHz clock of the original evaluation are not modelled.
* **Signedness and reset.** Operands are treated as signed two's complement
  (the stored 8-bit results are the same either way); all registers reset
  asynchronously, and SRAM contents are not reset.
