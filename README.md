# A tiled NN accelerator with buffer sharing and fine-grained layer forwarding

Split one neural-network layer across many small engines in the ordinary way and every
engine keeps its own copy of the data they all need. With output parallelisation, for
instance, each engine computes different output maps, but every engine needs all the input
maps. Sixteen engines in a row then hold sixteen copies. Their SRAM buffers together look
large, yet they hold little distinct data, so the input maps are fetched from DRAM over and
over.

This design removes the duplication. Each engine in a group holds a different *subset* of
the shared data. The group **skews** its computation so that every engine starts on the
subset it already holds. Then the engines **rotate** the subsets around the group, each
passing its subset to a neighbour, until every engine has used every subset. The buffers of
a group thus behave like one large buffer with no copies. The data being computed on are
always local, and each transfer is a single hop to a neighbour.

The second idea is about the boundary between layers. When two consecutive layers run on
different engines at once (layer pipelining), the consumer need not wait for the producer's
whole output. The producer forwards its output in small groups. Each group is tracked in the
consumer's buffer and can be used as soon as it is complete. This shortens pipeline fill and
drain, and shrinks the buffer space that intermediate data occupy.

Both ideas run on a statically scheduled machine. Each engine executes a short program of
data-movement and compute instructions, and no part of the chip makes scheduling decisions.
The only run-time synchronisation is a counter per buffer region, called MEMTRACK. A region
must receive enough writes before it may be read, and enough read passes before it may be
overwritten.

## The machine

- **`tangram_top`**: 16 × 16 tiles on a 2D mesh network-on-chip (NoC), 256 engines in all.
  - Totals: 16,384 PEs and 8 MB of SRAM.
  - Four off-chip memory channel ports: two on the west edge and two on the east edge.
  - Each tile is one engine (`tangram_engine`) plus one router (`tangram_router`).
- **`tangram_engine`**, one tile, contains:
  - an 8 × 8 array of PEs (`tangram_pe_array` and `tangram_pe`), each with a 64-byte
    register file of 32 16-bit weights;
  - a 32 kB SRAM buffer (`tangram_sram`): 2048 lines of 128 bits, which is 8 16-bit values
    per line;
  - the buffer controller that runs the tile's program (`tangram_buf_ctrl`), with a BSD
    (buffer-sharing dataflow) loop sequencer (`tangram_bsd_agu`);
  - the MEMTRACK counters (`tangram_memtrack`);
  - a few reserve lines for incoming data.
- **Data and timing**:
  - Data are 16-bit two's-complement fixed point. Accumulators are 32 bits.
  - The intended clock is 500 MHz. One clock and an asynchronous active-low reset serve
    the whole chip.
- **The 128-bit line** is the unit of everything:
  - one buffer read feeds the PE array for one cycle;
  - one NoC packet carries one line;
  - MEMTRACK counts lines.
- **The PE array** computes dot products:
  - PE (r, c) holds weights W[r][c] for a range of register-file words.
  - A buffer line of 8 input values is broadcast to the columns, one value per column.
  - Each row adds its 8 products into a row accumulator.
  - Streaming n input lines with the right register-file words therefore gives 8 outputs of
    a fully connected layer, O[o] += Σ W[o][i]·I[i].

## Buffer sharing: skew and rotation

Take p engines sharing N values, each engine buffering one subset at a time. Engine x walks
this loop nest:

```
for g in 0 .. ngroups-1           -- a new set of p subsets comes from DRAM
  for o in 0 .. r-1               -- rotation rounds (e.g. one per output subset)
    for s in 0 .. p-1             -- rotation steps
      use subset i0 = g*p + (x + s) mod p
```

Flattened to a step count T, this is

    i0 = floor(T / (r·p))·p + (x + T mod p) mod p.

- The `(x + s)` term is the skew: at step 0, engine x works on subset x.
- After each step, every engine hands its subset to engine x−1. At step s+1, engine x
  therefore holds subset x+s+1.

`tangram_bsd_agu` produces i0 and the step flags with counters, without dividing:

- `fetch`: first step of a group; the subset must come from DRAM.
- `first` / `last`: first and last step of a round; clear or store the accumulators.
- `send`: forward the subset after this step. This holds on every step except the last of
  a group.

The sequencer runs inside the buffer controller:

- **`CFGBSD`** loads p, r, the group count, x, the subset size S in lines, and two buffer
  slots A and B.
- **`FETCH` with the skew flag** reads subset i0 from DRAM (memory address + i0·S) into the
  current slot.
- **Each `ROT` instruction** is one step:
  1. it streams the S lines of the current slot through the PE array, with register-file
     words `sub·S ..`, where sub = (x + s) mod p;
  2. unless the step is the last of a group, it sends the same lines to the other slot of
     the neighbour;
  3. it then switches slots.
- **Accumulators** are cleared on the first step of a round. A `STORE` after the p steps of
  a round writes the round's outputs.

### Keeping the rotation in step

The engines are not in lock step, and the rotation does not need them to be. The neighbour
writes into slot B while the engine computes on slot A. Three rules keep this safe:

1. **Credits.** Rotation is flow-controlled end to end.
   - Each engine sends a one-flit credit (`F_CREDIT`) to its upstream engine, the one that
     rotates into it. It sends one at `CFGBSD`, when its second slot is free, and one after
     each step that frees a slot.
   - A `ROT` step that forwards its subset first takes a credit. Without one it waits.
   - So a sender is never more than one slot ahead of its receiver.
   - Without credits, an engine could run up to p−1 steps ahead around the ring. Its lines
     would pile up at a slower neighbour, filling the neighbour's reserve lines and then
     blocking the neighbour's own DRAM replies behind them.

2. **MEMTRACK.** The engine may start a step only when the slot is complete (S writes
   received). A slot may be refilled only after the engine has finished reading it (one
   read pass).
3. **Generation tags.** A slot alternates between filling and draining. A line that
   overtook the credit protocol could therefore reach a slot that is still waiting for
   step T−2's data to be consumed. The tags guard against that independently of the
   credits.
   - Each rotation line carries a tag: the number of times the receiving slot must have
     been emptied before the line belongs there. For step T this is floor((T+1)/2).
   - MEMTRACK counts how often each region has been emptied (`gen`).
   - A line whose tag does not match is not written yet.

### Reserve lines: why the NoC cannot lock up

A line that may not be written yet must not sit in the router's ejection port. If it did,
it would block every line behind it, including the one that would let the engine finish and
free the region. That is a circular wait.

- **Parking.** Each engine keeps `RESERVE` = 4 reserve ("parking") lines beside its
  buffer. A line that cannot be written is parked there and the ejection port moves on.
  A parked line is written as soon as its region and generation allow it.
- **Write priority.** The buffer write port serves `STORE` first, then parked lines, then
  arriving lines.
- **Back-pressure.** The engine pulls `ej_ready` low only when all reserve lines are full.
- **Scheduling rule.** A schedule must never have more lines in flight towards an engine's
  busy regions than it has reserve lines.
  - Rotation never needs reserve lines: credits guarantee that its lines find their slot
    free.
  - Reserve lines absorb data sent ahead into a region that is still being read. An example
    is the next layer's weights prefetched into a weight region before the current weights
    are loaded into the PEs.

## MEMTRACK

- **Regions.** The buffer is split into 16 regions of 128 lines. A program configures a
  region with `CFGTRK`:
  - `need_upd`: line writes before the region becomes readable;
  - `need_rd`: read passes before it may be overwritten.
- **Counting.**
  - Each buffer write counts one update.
  - Each instruction that reads the buffer waits until its first line's region is
    readable. It reports one read pass when done.
  - The last pass empties the region and increments its generation.
- **Unconfigured regions** (`need_upd` = 0) are always readable and writable. Weights and
  scratch lines live there.
- **Layer forwarding** uses the same counters:
  - The consumer configures one region per forwarded group, for example `need_upd` = lines
    per group and `need_rd` = 1.
  - The producer simply `SEND`s its stored output lines there.
  - The consumer's `MAC` on a group starts as soon as that group's region is full, while
    later groups are still being produced.

## Instruction set

- **Storage.** Programs are up to 64 instructions per engine. They arrive as
  `F_WR_INSTR` packets and are started by an `F_START` packet.
- **Fields.** An instruction has:
  - an opcode and flags (`CLEAR`, `RELU`, `SKEW`);
  - two local line addresses a and b;
  - a count n;
  - a destination tile (dx, dy);
  - a 28-bit remote line address;
  - an 8-bit immediate.

| op | effect |
|----|--------|
| `CFGTRK` | configure MEMTRACK region a: `need_upd` = n, `need_rd` = imm |
| `CFGBSD` | load the BSD sequencer. Slots a/b; S = n; p = imm; x = dx; r, group count and upstream column in the remote-address field; upstream row = dy. Sends the first credit upstream |
| `FETCH` | request n lines from the channel at (dx,dy), starting at remote line maddr, into local line a. With `SKEW`: maddr + i0·S into the current slot |
| `LDW` | load weights from local lines a.. into register-file word b.., one line per PE row |
| `MAC` | stream n lines from a through the array with register-file words b..; `CLEAR` clears the accumulators first |
| `STORE` | write the 8 accumulators to line a: arithmetic shift right by imm, optional `RELU`, saturation to 16 bits |
| `SEND` | push n lines from a to line maddr of tile (dx,dy); the destination can be an engine or a memory channel |
| `ROT` | one BSD step, as described above |
| `END` | stop; `done` rises |

- **Streaming.** Lines move at one per cycle. The SRAM read is issued a cycle ahead.
  Back-pressure from the NoC holds the stream, and the SRAM holds its read data meanwhile.
- **Engine status.** Each engine reports pulses for MEMTRACK stalls, rotation sends,
  skewed fetches and parked lines. The top brings these out per engine, so the activity of
  each mechanism can be counted.

## NoC and memory channels

- **Packets.** A packet is one flit. It carries:
  - a type: line write, read request, instruction write, start or rotation credit;
  - the destination and source tiles;
  - the target line address and a second address field (the reply address of a read
    request, or the generation tag);
  - one 128-bit line.
- **Coordinates.** Engine (column i, row j) sits at x = i+1, y = j. The memory channels are
  just outside the mesh:

  | channel | position |
  |---------|----------|
  | 0 | x = 0, row MESH_Y/4 |
  | 1 | x = 0, row 3·MESH_Y/4 |
  | 2 | x = MESH_X+1, row MESH_Y/4 |
  | 3 | x = MESH_X+1, row 3·MESH_Y/4 |

- **Routers** have five ports and a two-entry input FIFO per port. Each output arbitrates
  round-robin.
- **Routing** goes x first, towards column clamp(dst_x, 1, MESH_X), then along y. Packets
  for a channel then leave through the edge.
  - The only y-to-x turn leads into a memory channel, and a channel always drains. So
    dimension-order routing stays free of deadlock.
  - A packet routed off an edge with no channel sets `misroute`.
- **Memory channels.** DRAM and its controllers are not part of the RTL. The top exposes,
  per channel:
  - an outgoing valid/ready flit stream: read requests and write-backs;
  - an incoming stream: read data, programs, start commands and preloads.
- **Remote reads.** Engines never read a remote buffer. Data move only by pushing:
  - a read request to an engine is dropped;
  - a read request to a memory channel is answered with line writes.

## Verification

Each block has a self-checking testbench in `tb/` that compares against a model. Each run
prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_tangram_pe`, `tb_tangram_pe_array` | products and row accumulations, including clears |
| `tb_tangram_sram` | latency, hold, and read-during-write |
| `tb_tangram_memtrack` | random traffic against a model of the counting rule and generations |
| `tb_tangram_bsd_agu` | every step of several loop nests against the i0 formula, computed with division |
| `tb_tangram_router` | random traffic with back-pressure at the mesh edge: the routing decision, delivery exactly once, and order |
| `tb_tangram_buf_ctrl` | a BSD group as the middle engine of three: skewed fetch addresses, rotation tags, credits in and out, waits and round results |
| `tb_tangram_engine` | a full fetch / load / MAC / store / write-back program with a parked stray line, then a two-engine rotation gated by a credit |

The end-to-end test, `tb_tangram_top` (scenario in `tb_top_core`), runs a two-layer fully
connected segment:

- **Layer 1** runs with buffer sharing on the P engines of row 0. The input maps come from
  DRAM as P skewed subsets and rotate around the row.
- **Each layer-1 engine** stores its 8 outputs and forwards them to a layer-2 engine.
- **The layer-2 engine** receives its input in four MEMTRACK-tracked groups and starts on
  each group as soon as it is complete. It then writes its result to a memory channel.
- **The result** depends on every input value and every layer-1 output, and is compared
  with a model.
- **Mechanism counts.** The test counts how often each mechanism happened and fails any
  that never did: skewed fetches, rotation sends, MEMTRACK stalls, parked lines,
  memory-port back-pressure and the write-back. A misroute also fails the test.
- **Sizes.** `tb_tangram_top` runs on an 8 × 4 mesh, with an 8-engine rotation ring, in
  about 1,900 cycles. `tb_tangram_top_full` runs the same scenario on the default 16 × 16
  chip with no parameter overrides: a 16-engine ring and 128 input maps.
  - At full size the scenario takes about 3,700 cycles: 16 skewed fetches, 240 rotation
    steps and 16 parked lines.
  - verilator needs about ten minutes to compile the full-size model. Running it takes
    seconds.

Simulate with plain verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/tangram_pkg.sv \
          tb/tb_tangram_top.sv --top-module tb_tangram_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another test.

- The testbenches use `$urandom`.
- Initialisation must not depend on x-propagation, because the code is written for
  two-state simulation.
- Assertions in the RTL check protocol rules:
  - no write into a region that is not writable;
  - no read before a region is readable;
  - no `ROT` outside a configured loop nest.

## Where this design departs from the described architecture, and what it leaves out

- **Dot-product PE mapping.** The reference engine maps convolutions onto its PE array with
  a row-stationary dataflow. Here, each row computes one output as a dot product over 8
  input lanes. Fully connected and LSTM gate layers map onto it directly. Convolutions
  would have to be lowered to matrix products by the compiler: the controller has no
  sliding-window address generation.
- **Push-only remote access.** The controller is meant to access both DRAM and other
  engines' buffers. Here, remote buffers are only ever written by their producer; nothing
  reads a remote buffer.
- **Region-granular MEMTRACK.** Counting is per 128-line region, not per line. Credits,
  generation tags and reserve lines are this design's own means of keeping the rotation
  safe when engines drift apart. The architecture only asks that rotation be synchronised
  and that a few free lines per buffer prevent deadlock.
- **Own formats.** The instruction set and encoding, the flit format, the routing, the
  FIFO depths, the memory-channel positions and the number of reserve lines (4) are own
  choices. The architecture leaves them open.
- **One-dimensional rotation only.** One `CFGBSD` context rotates one kind of data around
  one ring of engines. 2-D rotation (weights vertically, then inputs horizontally) for
  hybrid parallelisation would need two nested contexts. The controller has only one, so
  2-D rotation is not implemented.
- **No multi-destination forwarding.** Forwarding one output to several consumers takes one
  `SEND` per destination; there is no multicast.
- **Not modelled:**
  - DRAM timing and bandwidth (25.6 GB/s over four LPDDR4-3200 channels);
  - energy and area;
  - the search tool and compiler that choose the schedule and generate programs. The test
    programs are written by hand in the testbenches.
