# Unicast configuration of a two-level reconfigurable array over its H-tree

A coarse-grain reconfigurable array of 32 x 32 cells holds about 744,000
configuration bits: each cell has a processing core (512 bits) and two 8x8
I/O crossbars (64 bits each), neighbouring cells are joined by local mesh
switches (20 bits each), and a binary H-tree of 511 global switches (96 bits
each) connects clusters of cells. This RTL loads all of those bits without a
separate configuration network: the downstream half of the H-tree itself
carries the configuration words, 256 bits per clock at the root. The array is
programmed from the bottom of the hierarchy up: cells and local switches
first, then the global switches level by level, each layer closing itself
off once it is done, so the switches above it can stay in a fixed *default*
routing until their own turn comes.

Only two extra wires travel with the bus, pipelined through every switch
with the data:

* **P** (programming mode): every switch uses its default routing, and the
  cell crossbars turn on two extra default cross-points.
* **C** (control): the word on the bus is a control word, not
  configuration data.

## Lanes, groups and the tree

The root bus is 256 bits = 32 lanes of 8 bits. Below the level of a 32-cell
subtree (a *group*) the tree splits the bus: a switch above 2^L cells gets
8 x 2^L bits and gives each child its half. The lowest global switches
(level 2) each feed four cells, one 8-bit lane each. So within a group, lane
k of the root word ends at cell k, and one root word gives every cell of the
group one byte.

Above the group level the bus stays 256 bits wide. These switches steer:
each word goes to one child only, and the other child gets the all-zero
control word, which closes anything still open below it. The child is
chosen by a route bit in the last control word: the switch H levels above
the group level reads bit 0 of lane H-1. Filling the route bits with the
binary group number g sends the stream to group g. (Cell numbering: cells
32g .. 32g+31 form group g; global switches are numbered in heap order, the
root is 0 and the children of n are 2n+1 and 2n+2.)

Every global switch adds one register stage, and the array has one input
register, so a word reaches the cells `LEVELS` clocks (10 by default) after
it is presented.

## Control words

A control word is decoded lane by lane (bit 7 is the MSB of the lane):

| bits  | global form (G = 1)            | local form (G = 0)                       |
|-------|--------------------------------|------------------------------------------|
| 7     | G = 1                          | G = 0                                    |
| 6     | level [3]                      | local (mesh) switch                      |
| 5     | level [2]                      | cell core                                |
| 4     | level [1]                      | cell I/O switch                          |
| 3     | level [0]                      | SEL: which of the two switches           |
| 2:1   | reserved                       | reserved                                 |
| 0     | route bit (lanes 0..4 only)    | route bit (lanes 0..4 only)              |

The global level is log2 of the number of cells below a switch (2 to 10).
A global switch reads the control word from lane 0 of its own input, so a
global control word should be repeated in every lane. A component opens on
the control word that names it and stays open for the data words that
follow; the next control word, of any kind, closes it. A word that names no
component (all zero) just closes everything. P low closes everything too.

G, the local-switch / core / cell-switch flags and their order are the
scheme's; the level encoding, SEL, the route bits and the idle word are
choices made here.

## Programming a cell's crossbar

The two I/O crossbars (`xbar8_cfg`) are written a row at a time, through a
3-to-8 row decoder on the word lines and a 3-to-8 column decoder on the bit
lines. An 8-bit data word is:

| bits | meaning                                                    |
|------|------------------------------------------------------------|
| 2:0  | column (input) to connect                                  |
| 5:3  | row (output) to program                                    |
| 6    | all rows: raise every word line                            |
| 7    | clear: drive 0 on every bit line                           |

A row is written with a one-hot column pattern, so a word both connects one
input and disconnects all others from that row. Eight words program a
switch; `8'hC0` (clear + all rows) turns the whole switch off in one cycle.
While P is high two default cross-points drive H-tree lines 0 and 1 (lane
bits 1:0) onto rows 0 and 1, on top of whatever the SRAM cross-points do.

## Configuration sequence and timing

Per group, on the 256-bit bus (each cell receives its own bytes in its lane):

| step                         | control | data | cycles |
|------------------------------|---------|------|--------|
| cell cores (64 x 8 memory)   | 1       | 64   | 65     |
| I/O switch 0 (8 rows)        | 1       | 8    | 9      |
| I/O switch 1 (8 rows)        | 1       | 8    | 9      |
| local switch 0 (20 bits)     | 1       | 3    | 4      |
| local switch 1 (20 bits)     | 1       | 3    | 4      |
| global switches, level 2     | 1       | 3    | 4      |
| global switches, level 3     | 1       | 2    | 3      |
| global switches, level 4     | 1       | 1    | 2      |
| global switch, level 5       | 1       | 1    | 2      |
| **total per group**          |         |      | **102**|

A global switch uses its whole input bus for its 96 bits (32, 64, 128 and
256 bits at levels 2 to 5), and all switches of one level inside a group are
written by the same word. 32 groups take 3,264 cycles. The 31 switches
above the groups are then written one at a time, 2 cycles each (62 cycles),
and one closing word ends the sequence. Reconfiguring only the global
switches takes 32 x 11 = 352 cycles plus the same 62; the cells and local
switches keep their bits.

The order follows the layering: everything a group's cells hold first, then
the group's global switches from level 2 up, then the switches above the
groups. Because the default routing under P ignores a switch's stored bits,
the RTL itself does not enforce this order; the source of the words does.

The 3,264 and 352 cycle counts are the figures the scheme is designed for;
the 62 cycles for the switches above the groups are what this RTL adds.
There are 2,048 local switch stores (two per cell, east and south link);
the 64 that belong to edge cells with no neighbour are loaded but unused,
so the array stores 745,376 bits for the 744,096 that are needed.

## Modules

| file                      | what it is                                                                 |
|---------------------------|----------------------------------------------------------------------------|
| `rtl/cfg_pkg.sv`          | widths, control-word bit positions, `cell_tgt_e`, decode helpers           |
| `rtl/unicast_cfg_array.sv`| top: input register, 511 `gsw_node`, 1,024 `cfg_cell`                      |
| `rtl/gsw_node.sv`         | global switch: pipeline stage, default split/steer, 96-bit store           |
| `rtl/cfg_cell.sv`         | one cell: controller, core memory, two crossbars, two local switch stores  |
| `rtl/cell_cfg_ctrl.sv`    | decodes the lane, opens/closes one of the cell's five components           |
| `rtl/core_cfg_mem.sv`     | 64 x 8 core configuration memory, auto-incrementing address                |
| `rtl/xbar8_cfg.sv`        | 8x8 crossbar with row/column decoders and default cross-points             |
| `rtl/cfg_word_reg.sv`     | N-bit store loaded word after word (local and global switches)             |

Top parameters: `LEVELS` (log2 of the cell count, default 10, at least 2)
and `ROOT_W` (root bus width, default 256; it fixes the group size at
`ROOT_W/8` cells). The top's outputs are the configuration bits of the parts
whose logic is outside this RTL, and the datapaths of every cell crossbar.

## What is not here

* **Cell processing cores.** Only their 512-bit configuration memories are
  built (`core_cfg`).
* **Local mesh switches and global switch cross-point networks.** Their
  stores are built and their bits brought out (`lsw_cfg`, `gsw_cfg`); the
  switching networks that use them in normal operation, and the upstream
  half of the H-tree, are not. With P low the configuration path idles and
  drives zeros.
* **The SRAM bit.** The cross-point storage is a clocked register with a
  reset, standing in for a 6-transistor SRAM cell with a write gate that
  drives a pass gate.
* **An 8-bit external loading port.** The array is fed from a 256-bit source
  (an on-chip configuration cache). Loading one byte per clock from outside
  would take 1,024 x 83 + 1,984 x 4 + 511 x 13 = 99,571 cycles, but how such
  a byte would be addressed to one cell is not defined here.
* **The configuration cache** that supplies the 256-bit words; the
  testbenches generate the words.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Itb rtl/cfg_pkg.sv rtl/*.sv \
          tb/tb_unicast_cfg_array.sv --top-module tb_unicast_cfg_array
./obj_dir/Vtb_unicast_cfg_array
```

The package must come first on the command line. The testbenches:

* `tb_xbar8_cfg`, `tb_cfg_word_reg`, `tb_core_cfg_mem`, `tb_cell_cfg_ctrl`,
  `tb_cfg_cell`, `tb_gsw_node`: unit tests against reference models;
  `tb_cfg_cell` also checks the 83-cycle cell sequence.
* `tb_unicast_cfg_array`: 128 cells (four groups, two levels of steering
  switches). Full configuration with cycle count, check of every bit,
  crossbar datapaths in normal operation, the default cross-points, then a
  global-only partial reconfiguration. The test body is
  `tb/cfg_array_test.svh`.
* `tb_unicast_cfg_full`: the same test on the default 32 x 32 array,
  expecting 3,264 + 62 cycles for the full configuration and 352 + 62 for
  the partial one. Verilator needs about 13 minutes and 3 GB to build it
  (single-threaded make); it then runs in about 12 seconds.

`cell_cfg_ctrl` and `gsw_node` carry concurrent assertions (one open
component at a time; P alike on all children; a steering switch closes the
child it does not serve). Build with `--assert` to check them.

All test data is a hash of the cell or switch number, so expected values
are recomputed rather than stored.
