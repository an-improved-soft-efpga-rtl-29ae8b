# Soft island-style eFPGA in SystemVerilog

An embedded FPGA (eFPGA) normally comes as a fixed hard macro. This design is the other kind: a
*soft* eFPGA, a programmable-logic fabric written entirely as synthesizable RTL, so it can be
sized to the job and built with the same standard-cell flow as the rest of a system-on-chip. The
fabric is a regular island-style array. Only one tile is designed; the array is that tile
replicated. Synthesis and layout can work on a single tile and copy it, which keeps tool memory
and run time low for large arrays.

The default instance is a 14 x 14 array of tiles with four 4-input LUTs per tile, 784 LUTs in
all. The array size, LUT size, cluster size, channel width, cluster input count and
configuration word width are all parameters.

## The array

```
   io_n (column 0 .. DX)
  +-----+-----------+-----------+
  | SB  |  H   SB   |  H   SB   |   row DY   <- regular tiles: CLB below-left of their SB
  | V   | CLB  V    | CLB  V    |
  +-----+-----------+-----------+
  | SB  |  H   SB   |  H   SB   |   row 1
  | V   | CLB  V    | CLB  V    |
  +-----+-----------+-----------+
  | SB  |  H   SB   |  H   SB   |   row 0: bottom edge tiles (switch block only)
  +-----+-----------+-----------+
  corner  column 1 .. DX
  column 0: left edge tiles (switch block only)
```

Switch blocks (SB) sit on a (DX+1) x (DY+1) grid, at positions (i, j). For x, y >= 1, the tile
at (x, y) is a **regular tile**. It holds:

- a CLB (logic cluster);
- the switch block at the CLB's top-right corner;
- the input multiplexers that feed the CLB;
- the tile's configuration memory.

Column 0 holds the **left edge tiles**, row 0 the **bottom edge tiles**, and (0, 0) the **corner
tile**. These three kinds carry a switch block and its configuration memory only. With them, every
CLB is surrounded by channel segments on all four sides:

- `H(x, y)` runs above CLB (x, y), between SB (x-1, y) and SB (x, y);
- `V(x, y)` runs right of CLB (x, y), between SB (x, y) and SB (x, y-1).

The CLB reads the segments above it, right of it, below it (`H(x, y-1)`) and left of it
(`V(x-1, y)`).

The array's I/O is the set of wires that cross its boundary. At a switch block on the edge of the
grid, the side facing outwards has W/2 wires arriving, which are the `io_*_in` ports, and W/2
wires leaving, which are the `io_*_out` ports. The north and south ports are indexed by column
0..DX, the east and west ports by row 0..DY.

## Routing: single-length directional wires

Every routing wire spans exactly one tile. It is driven at one switch block and ends at the next.
Each channel segment has W wires: W/2 in each direction. In `H(x, y)`, bits `[W/2-1:0]` are the
east-going wires of SB (x-1, y) and the upper bits are the west-going wires of SB (x, y). In
`V(x, y)`, the low bits are the south-going wires of SB (x, y) and the upper bits are the
north-going wires of SB (x, y-1).

Each wire leaving a switch block on side `s` (0 north, 1 east, 2 south, 3 west), track `t`, is
driven by its own **switch multiplexer**. Its configuration select means:

| select | drives |
|---|---|
| 0 | constant 0 (wire unused) |
| 1, 2, 3 | track `t` arriving on side `(s + sel) mod 4` |
| 4 .. 4+N-1 | output `sel-4` of the tile's own CLB |
| others | 0 |

So a wire can go straight on, turn either way or reverse direction on the same track number (a
disjoint switch pattern). A signal crosses the array as a chain of one-tile hops. Seen from a
wire's destination, "straight on" is select 2: for example an east-going wire that continues east
is the west-side input of the next block.

CLB outputs enter the routing only through the switch multiplexers of their own tile. Any
multiplexer on any side can pick any of the N outputs.

**Connection to the CLB.** CLB input pin `p` has an input multiplexer that takes any of the W
wires of the segment on side `p mod 4` of the CLB. The default I = 10 gives three pins north,
three east, two south and two west.

**Combinational loops.** Because the routing is programmable, the netlist contains loops: a wire
can be routed round a ring of switch blocks, and a combinational BLE can feed itself. This is
inherent to any FPGA fabric, and lint tools report it (for example Verilator's `UNOPTFLAT`). A
correct bitstream never closes a loop without a flip-flop in it. An all-zero configuration closes
none, because every switch multiplexer is off.

## Logic: cluster of BLEs

A CLB holds N basic logic elements (BLEs). Each BLE has:

- a K-input LUT;
- a D flip-flop on the LUT output;
- an output multiplexer choosing the registered or the combinational value.

Every LUT input has its own **LUT input multiplexer**. It selects one of the I CLB input pins
(selects 0..I-1) or one of the N BLE outputs fed back (selects I..I+N-1). Any larger select
reads 0, which ties an unused LUT input off. LUT input 0 is the least significant truth-table
address bit.

## Configuration

Each tile stores one **frame** in flip-flops. The frame is written CFG_W bits at a time, word by
word. Its bit layout (LSB first), with the widths in `efpga_pkg` (`SSEL_W = 3`, `GSEL_W = 3`,
`MSEL_W = 4` at the defaults), is:

| bits | content |
|---|---|
| `(side*W/2 + track)*SSEL_W` | switch multiplexer selects, 4*W/2 of them (48 bits) |
| `SB_BITS + pin*GSEL_W` | input multiplexer select of each CLB pin (30 bits) |
| `SB_BITS + CB_BITS + n*BLE_BITS` | BLE n: 2^K truth-table bits, then K LUT-input selects, then 1 bit "registered output" (33 bits each) |

At the defaults a frame has 210 bits, stored as 7 words of 32 bits. Edge and corner tiles keep
only the switch-block part, which is the first two words, and ignore writes to the rest. The
helper functions `off_sb`, `off_cb` and `off_ble` in `efpga_pkg` return these offsets. The
testbenches use them to assemble bitstreams.

**Loading.** The configuration state machine (`config_fsm`) loads the array:

1. Pulse `cfg_start` for one cycle.
2. Stream the words on `cfg_valid`/`cfg_data`. One word is taken per cycle in which `cfg_ready`
   is high.

The order is all WORDS words of a tile, then the tiles of a row from column 0 to DX, then the
rows from 0 to DY: (DX+1)(DY+1)·WORDS words in all, which is 1575 at the defaults. For each word
the state machine drives binary row, column and word addresses. A row decoder and a column
decoder turn these into one-hot selects, and the one tile whose row and column are both selected
stores the word on the next rising edge. `cfg_done` rises on the cycle after the last word.

While `cfg_done` is low, all BLE outputs and flip-flops are held at 0. That happens during a load
and from reset until the first load completes. A half-loaded configuration therefore cannot drive
the routing. A new `cfg_start` reprograms the fabric at any time.

Reset (`rst_n`, asynchronous, active low) clears every configuration bit and every user
flip-flop. The fabric then drives 0 on all its outputs.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `DX`, `DY` | 14, 14 | array size in tiles | 14 x 14 reference array |
| `K` | 4 | LUT inputs | reference design |
| `N` | 4 | BLEs per CLB | reference array: 784 LUTs in 196 tiles |
| `W` | 8 | wires per channel segment, W/2 per direction | own choice |
| `I` | 10 | CLB input pins | own choice, I = K/2·(N+1) |
| `CFG_W` | 32 | configuration word width | own choice |

The defaults live in `efpga_pkg` (`DEF_*`). The top, `efpga_top`, takes all of them as
parameters.

## Where this design departs from a full-custom eFPGA

- **Multiplexers instead of tristate buffers.** Bidirectional tracks with tristate drivers cannot
  be written as two-state, standard-cell logic. Every wire is therefore directional and has
  exactly one driver, a multiplexer.
- **Configuration memory in flip-flops.** This is what a plain standard-cell flow gives. An
  implementation with custom SRAM cells or pass-transistor multiplexer cells would replace
  `config_memory` and `cfg_mux` cell by cell, without changing the function. Those custom cells,
  the routing buffer chains, the clock tree and pads are physical design and are not part of this
  RTL.
- **Own choices** (no reference value exists):
  - the channel width;
  - the CLB pin count and the pin-to-side assignment;
  - full connectivity of the connection and LUT-input multiplexers;
  - the disjoint switch pattern;
  - the I/O placement on the boundary switch blocks;
  - the frame layout and the word order;
  - the stream handshake;
  - holding the fabric quiet until configuration is complete.

## Capacity

The default array holds 784 4-LUTs. Circuits of up to a few hundred LUTs fit in it, LUT-count
wise. Whether they route at W = 8 depends on the circuit. Circuits of more than about 1100 LUTs
need a larger array:

| `DX = DY` | 4-LUTs |
|---|---|
| 16 | 1024 |
| 17 | 1156 |
| 19 | 1444 |

The parameters scale freely.

## Files

`rtl/`, bottom-up:

| file | content |
|---|---|
| `efpga_pkg.sv` | default parameters, side encoding, frame-layout functions |
| `lut.sv` | K-input lookup table |
| `cfg_mux.sv` | configuration-selected multiplexer (switch, input and LUT-input multiplexers) |
| `ble.sv` | LUT + flip-flop + output multiplexer |
| `clb.sv` | N BLEs with LUT input multiplexers and local feedback |
| `connection_block.sv` | CLB input-pin multiplexers |
| `switch_block.sv` | switch multiplexers of one switch point |
| `config_memory.sv` | per-tile configuration frame in flip-flops |
| `addr_decoder.sv` | row/column one-hot decoder |
| `config_fsm.sv` | bitstream loader |
| `efpga_tile.sv` | regular tile |
| `efpga_edge_tile.sv` | left/bottom/corner tile |
| `efpga_top.sv` | the array |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and two for the whole
fabric:

- `tb_efpga_top.sv` runs at the default 14 x 14 size. It assembles a bitstream and loads it,
  checking one word per cycle. It runs a combinational 4-input function and a registered copy of
  it in tile (1,1), a 2-bit counter built from the local feedback, and an AND gate in the far
  corner tile whose output crosses the whole array and turns a corner. Then it reprograms the
  fabric with another function and checks again. It also checks that the fabric is silent before
  configuration and that every unused output stays 0.
- `tb_efpga_2x2.sv` programs a 2 x 2 array with a full adder and a counter with enable.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_efpga_top \
    rtl/efpga_pkg.sv $(ls rtl/*.sv | grep -v efpga_pkg) tb/tb_efpga_top.sv
./obj_dir/Vtb_efpga_top
```

Replace `tb_efpga_top` with any other testbench name to run that test. Verilator reports the
fabric's structural combinational loops as `UNOPTFLAT` warnings. They are expected; see above.
Building the full 14 x 14 array takes a few minutes; the simulation itself runs in seconds.

To program your own circuit, set fields of `frame[x][y]` with `off_sb`, `off_cb` and `off_ble`,
then stream the frames in the loading order above. `tb_efpga_2x2.sv` is the shortest example.
