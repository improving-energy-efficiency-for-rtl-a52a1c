# An energy-efficient CGRA: ponds and per-tile power domains

This design is a 32 x 16 coarse-grained reconfigurable array (CGRA) that
saves energy in two ways.

- **Ponds.** Every PE tile has a small streaming register file, called a
  pond, next to its ALU. Data with high reuse is read from the pond: DNN
  weights, input tiles and partial sums. A pond read costs far less than a
  memory-tile access or a long route across the array. The pond has no
  instructions. Small configured address generators push data to the ALU
  and take results back.
- **Per-tile power domains.** Every tile is its own power domain. An
  application uses only part of the array, and the tiles it does not use
  are switched off through one configuration register per tile. A powered-off
  tile produces floating outputs. The powered-on tiles around it must never
  let those values through. This is done by building the isolation into the
  routing multiplexers themselves, so there are no separate isolation cells
  and no isolation controller.

The array has 384 PE tiles and 128 MEM tiles. Each PE tile supports INT16
and BFloat16 and has a 64-byte pond. Each MEM tile has 4 KB of SRAM. The
tiles are joined by a statically configured island-style interconnect, with
a 16-bit data network and a 1-bit control network.

## Source design and this design's choices

The following comes from the source design:

- the array size and its PE/MEM mix;
- the 2-read/1-write pond with its controllers and configuration fields;
- the 64 B pond size;
- the read-modify-write delay settings;
- the three-stage power-domain-aware multiplexer;
- the constant-zero connection-box input;
- one power domain per tile, controlled by `ps_en_reg`;
- the global signals passing through each tile's always-on logic;
- the tie-cell tile id;
- the OR chain used to read back configuration data;
- the wake-up times (17.5 ns for MEM tiles, 9 ns for PE tiles, with a 750 MHz configuration clock).

The following are this design's own choices, because the source gives no
details for them:

- 5 tracks per side on each network, with track t connecting only to track t;
- registered switch-box outputs, so each hop takes one cycle;
- connection boxes that see every track;
- MEM tiles in every fourth column;
- the configuration address layout and the configuration register layout;
- the ALU opcode set;
- the MEM tile's streaming controller;
- the number of power switches per tile;
- resetting all switched configuration to all ones;
- the behaviour of the floating-output model.

Every file in `rtl/` and `tb/` starts with a comment that describes the
block and separates the source design from this design's choices in the
same way.

## The pond (`pond.sv` and its controllers)

The pond is the hardest part of the datapath. Its storage is simple: 32
words of 16 bits in flip-flops. What matters is how the ports are driven.
The pond has one write port and two read ports, and five controllers share
them.

- **Write port.** It has three sources.
  - `pond_init_ctrl` (`init0`) loads a block from a stream.
  - A second `pond_init_ctrl` (`init1`) does the same, so two streams
    can be loaded.
  - The accumulation write returns the ALU result to the address that
    update0 read a few cycles earlier. This is the read-modify-write (RMW)
    loop.

  The init controllers handle multicast. A stream from a MEM tile can feed
  several ponds in turn. Each init controller counts valid words in groups of
  `init_block_factor`. It takes its group when the turn counter, which runs
  modulo `init_cyclic_factor`, equals its own `init_index`. The words it
  takes are written one after another from `init_offset`.
- **Read port 0** is used by `pond_update_ctrl` (`update0`). It generates a
  two-level affine address pattern: range, stride and offset per level. It
  issues one read every `update_cycle_stride` cycles. This port feeds the
  RMW loop.
- **Read port 1** is shared by a second update controller (`update1`) and
  the write-back controller `pond_wb_ctrl`. Write-back creates its own valid
  signal. It sends `wb_range` words from `wb_offset`. When several ponds
  share one output track, each pond sends in its own slots: the slots are
  `wb_block_factor` cycles long and rotate over `wb_cyclic_factor` ponds, and
  a pond uses the slots that match its `wb_index`.
- **`pond_acc_delay`** turns update0's read into the accumulation write. It
  delays the read enable and address by `update_acc_delay` cycles, from 0
  to 4 as in the source design, so the write matches the ALU pipeline depth
  chosen by the mapping. A delay of 0 writes in the same cycle as the read.

When two sources want the same port in one cycle, fixed priorities decide.
On the write port, accumulation wins over init0, which wins over init1. On
read port 1, write-back wins over update1. A correct schedule never needs
these priorities, and assertions check that no clash happens. Reads are
combinational, so data appears in the same cycle as the read enable. The
fabric stall freezes every controller.

## Power-domain-aware routing (`pd_mux.sv`, `switch_box.sv`, `connection_box.sv`)

This is the hardest part of the power work. A powered-off neighbour drives
unknown values into a tile. The usual fix is an isolation cell on every
boundary wire, with a controller that enables it. Here the protection is
built into the routing multiplexers instead, using three stages:

1. The configured binary select is decoded to one-hot.
2. Every data bit is ANDed with its one-hot enable. An input that is not
   selected is forced to 0, whatever value it floats to.
3. An OR tree merges the clamped inputs.

A data input therefore always meets an AND gate first. No separate
isolation enable is needed, because the configuration already says which
inputs are in use. To isolate a tile from an off neighbour, you simply do
not select that neighbour. A select value past the last input enables
nothing and gives 0.

**Switch boxes.** Each side and track of each network has a switch box
output. It chooses between the same track on the other three sides and the
tile's core outputs, and it is registered.

**Connection boxes.** Each connection box chooses a core input from all 20
tracks, then the tile-local inputs, then a constant 0 as the last input. The
constant matters when every neighbour is off. The core still gets a defined
value.

**Reset state.** The switched configuration resets to all ones. This puts
every select past its last input, so a tile that has just been switched on
and is not yet configured drives zeros. It also ignores anything floating
around it.

## Tile power control (`pd_config_reg.sv`, `pd_read_isolation.sv`, `power_switch.sv`)

Each tile has an always-on part and a switched part.

The always-on part contains the following:

- **`pd_config_reg`** compares the configuration address with the tile's
  tied-off `tile_id`. It holds `ps_en_reg`, at register 0. A value of 1
  turns the tile's power switches off, and the reset value is 0 (on). It also
  decodes accesses to the switched configuration words, and it blocks writes
  to them while the tile is off.
- **`pd_read_isolation`** is one stage of the configuration read-back
  chain. The chain ORs each tile's read data into the data from the tile
  above. A powered-off tile's switched data is ANDed with `~ps_en_reg`, so
  only its always-on `ps_en_reg` can still be read. This lets a debugger
  read every tile even when some are off.
- **Feed-through.** Reset, stall and the configuration bus go through the
  tile to the tile below it in the column.

**`power_switch`** is a behavioural model of the daisy-chained header
switches. Each switch adds `STAGE_PS` of delay. The switched supply counts
as good only once every switch is on. It is lost as soon as the first
switch opens.

With 18 switches for a PE tile and 35 for a MEM tile at 0.5 ns each, the
wake-up takes 9 ns and 17.5 ns. At the 750 MHz configuration clock this is
7 and 14 cycles.

While the tile is off:

- its switched registers are held in reset, so its configuration is lost and
  must be rewritten after power-up;
- its outputs carry a fixed pseudo-random pattern that stands in for
  floating values.

## The PE tile core (`pe_core.sv`, `bf16_unit.sv`)

The PE core is a three-input ALU. Its INT16 operations include add,
subtract, multiply, multiply-add, min/max, absolute value, ReLU, shifts,
logic, compares and
select. Compare results go onto the 1-bit network.

Its BFloat16 operations are add, multiply and multiply-add. They use
round-to-nearest-even and flush subnormals to zero. Multiply-add is not
fused: it rounds after the product and again after the sum.

Inside a PE tile:

- both pond outputs can feed the ALU operands through the ALU connection
  boxes;
- the ALU result can be written into the pond;
- both pond outputs also drive the switch boxes, so a neighbouring PE can
  use them.

## The MEM tile core (`mem_core.sv`)

The MEM tile core is 2048 x 16-bit SRAM (4 KB) with a streaming controller.

- **Writes** land at consecutive addresses from a start offset.
- **Reads** follow a three-level affine pattern. They produce a valid
  signal, plus a block-start signal that can start a pond's
  initialization. In this way, one MEM tile can feed the blocks of a blocked
  loop nest to a group of ponds.

## The tile and the array (`cgra_tile.sv`, `cgra_top.sv`, `cgra_pkg.sv`)

`cgra_tile` puts the parts above together. It contains the following:

- the core;
- two switch boxes, one per network;
- the connection boxes;
- 16 configuration words of 32 bits each;
- the always-on logic;
- the power switch.

`cgra_top` builds the array:

- **Tiles.** Columns with `x % 4 == 3` are MEM columns. Each tile id is
  `{x[7:0], y[7:0]}`, with row 0 at the top.
- **Edges.** The tracks at the array edge are brought out as ports.
- **Configuration bus.** The bus carries an address of the form
  `{8'h00, register[7:0], tile_id[15:0]}` and 32 bits of data. Register 0 is
  `ps_en_reg`, and registers 1..16 hold the tile configuration `tile_cfg_t`.
  In `tile_cfg_t`, the routing fields are in the low bits and the core fields
  above them.
- **Read-back.** The read-back chains of all columns are ORed into
  `rd_data_o`.

## What is not built

- The global buffer: 4 MB, in 16 banked tiles with streaming units. The
  array edge is exposed as ports in its place.
- The host processor.
- The physical parts of the power design: always-on buffer cells with a
  backup supply, the tie-hi/tie-lo cells and the power-intent description.
  The RTL models what these do: the always-on feed-through in each tile, and
  the constant tile ids.

## Simulating

Every testbench prints a final `TB_RESULT` line with its pass/fail count.
Each one builds on its own with plain Verilator (version 5, with timing
support), for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/cgra_pkg.sv tb/tb_pond.sv --top-module tb_pond
./obj_dir/Vtb_pond
```

Replace `tb_pond` with any other file in `tb/`. The testbenches are:

- `tb_pd_mux`, `tb_switch_box`, `tb_connection_box`: routing and isolation.
- `tb_pond_init_ctrl`, `tb_pond_wb_ctrl`, `tb_pond_update_ctrl`,
  `tb_pond_acc_delay`, `tb_pond`: the pond.
- `tb_pe_core`: the ALU. The BFloat16 results are checked against a
  double-precision reference.
- `tb_mem_core`: the MEM tile core.
- `tb_pd_config_reg`, `tb_pd_read_isolation`, `tb_power_switch`: power
  control.
- `tb_cgra_tile`: one tile at a 750 MHz clock. It checks wake-up in 7 or 14
  cycles, and that configuration is lost while the tile is off.
- `tb_cgra_top`: runs on an 8 x 4 array. It checks power-off and isolation,
  multicast pond loading, RMW accumulation, write-back, stall, a MEM-to-pond
  stream and multi-hop routing.

The largest array simulated is the 8 x 4 array of `tb_cgra_top`. At the
default 32 x 16 size, the Verilator build alone took more than 15 minutes,
so no testbench at that size is included. The array is built from the same
generate loops at every size, so the 8 x 4 run exercises the same code as
the full array.
