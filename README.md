# SFRA: a fixed-frequency FPGA fabric with a corner-turn interconnect

An ordinary FPGA runs each loaded design at whatever clock that design's
critical path allows. The SFRA instead runs at one fixed clock whatever is
loaded. That makes it easy to couple to a processor, and a pipelined design
runs faster on it. To make this work, every path in the fabric is
pipelined: logic outputs, interconnect and the switch points where signals
change direction. User designs are C-slowed or repipelined to fit this
timing model.

Putting a register at every switch of a conventional switch box costs too
many registers. The SFRA avoids this by changing the switch box. Where a
horizontal channel crosses a vertical one, any wire can still reach any
wire, but only a few signals may actually change direction. Each of these
**turns** is one register per direction. Routes therefore run in straight
lines and turn rarely. This is the "corner-turn" interconnect. It can be
routed with fast polynomial-time heuristics, and because each channel is
independent, wire assignment within a channel is a simple greedy packing.

The logic block is the Virtex CLB with whatever C-slowing makes meaningless
taken out, so conventional synthesis, mapping and placement still apply.

This repository is a synthesizable SystemVerilog model of the whole fabric:
logic, interconnect, turns, pipeline registers and configuration storage.

## Array and tile

`sfra_array` is a `ROWS x COLS` Manhattan array of `sfra_tile`s (default
12 x 12). Each tile contains:

| part | module | what it is |
|---|---|---|
| CLB | `sfra_clb` | two slices (`sfra_slice`), 20 inputs, 8 registered outputs |
| T-box | `tbox` | two extra turns: each has one H-to-V register and one V-to-H register |
| input C-box | `input_cbox` | full crossbar: any CLB input from any of the 240 wires (H and V) |
| output C-boxes | `output_cbox` x 2 | one per channel; any CLB or turn output onto any wire group |
| channel pieces | `chan_seg` x 2 | the tile's length of its H channel (below the CLB) and V channel (left of the CLB) |
| configuration | `tile_config` | all configuration bits of the tile (1550 bits) |

Each tile has **six turns**: the two T-box turns, plus, in each slice, the
BX input routed straight to the XB output and the BY input routed to YB. A
signal that enters a CLB input from one channel and leaves on an output
driven onto the other channel has also changed direction. That path goes
through a LUT and is counted as logic, not as a turn.

## Channels: segments, breaks and registers

Each channel has 120 wires. Every wire is cut every 3 tiles by a
bidirectional buffer. Every third cut (so every 9 tiles) is a bidirectional
register instead. The cuts are staggered across the wires:

* wire `w` is cut at the low-side boundary of position `p` (the tile's
  column for H channels, its row for V channels) when `(p + w) mod 3 == 0`;
* that cut is a register when `(p + w) mod 9 == 0`.

So at every tile boundary one third of the wires are cut and one ninth are
registered. Each cut has two configuration bits, `fwd` (towards higher
coordinates) and `bwd`. With neither bit set, the two segments are
separate wires. The bits for the 40 wires cut at a tile's boundary live in
that tile (`brk_h[w/3]`, `brk_v[w/3]`).

A bidirectional wire cannot be written as plain two-state logic without
combinational loops. `chan_seg` therefore carries each wire as two directed
values:
`fwd_in` arrives from the low side, not yet through this tile's cut;
`bwd_in` arrives from the high side, already through the next tile's cut.
Tristate drivers are modelled as OR: an undriven wire reads 0. The value
seen by the tile's input C-box is the local drive OR both directed values.

The longest combinational path runs from a register (a CLB output or a
turn) through an output C-box, along at most 9 tiles of wire, through an
input C-box, and into the first register of a retiming chain.

## Output C-box: two levels

Each driver feeds 40 tristates, one per **intermediate wire**. The
intermediate wire `r` can drive channel wires `3r`, `3r+1` and `3r+2`, each
through its own tristate. The configuration is
`src_en[source][r]` and `wire_en[r][k]`. One output may enable several rows
(fanout), and each channel has its own box, so one output can reach both
channels. Two drivers of the same tile cannot share a group of three wires.
If they are configured to, the box raises `contention` and the array raises
`cfg_err`. Sources 0-7 are the CLB outputs (slice 0 X, Y, XB, YB, then
slice 1); sources 8-9 are the two T-box turns entering that channel.

## Slice

Each of the ten inputs (F1-F4, G1-G4, BX, BY) passes through a
`retime_chain`. This is an 8-stage shift register whose tap sets a delay of
1 to 8 clocks, so the retiming tool can balance unequal routes. Then:

* two 4-LUTs, F and G (`lut4`, truth table bit `{i4,i3,i2,i1}`);
* carry logic per half. A multiplexer passes the carry on when the LUT
  output (or a forced 1) is high; otherwise it takes a data input that is
  0, 1, the first LUT input, or the product of the first two LUT inputs.
  An XOR forms the sum. The chain runs CIN, F half, G half, COUT, and it
  can start from BX instead of CIN;
* F5 = BX ? F : G, and F6 = BY ? (this slice's F5) : (other slice's F5);
* registered outputs: X (F, F-sum or F5), Y (G, G-sum or F6),
  XB (the carry after the F half, or BX) and YB (COUT, or BY).

There are no clock enables, set/reset, LUT RAM or unregistered XQ/YQ
outputs. Under C-slowing these would change meaning, so user designs express
resets and enables as logic. Latency from a channel wire to a slice output
is `tap + 2` clocks.

Each column has two carry chains, one per slice position. They are
registered after every 4th row (after rows 3, 7, 11, ...).

## Configuration

Configuration is written one 32-bit word per clock: `cfg_we`, the tile
address `cfg_x`/`cfg_y`, the word index `cfg_word` (0-48), and
`cfg_data`. The bit layout is the packed struct `sfra_pkg::tile_cfg_t`.
Word `i` holds bits `32i+31 .. 32i`. Reset clears every bit, which leaves
all switches open and all LUTs at 0. The testbenches build a `tile_cfg_t`
in SystemVerilog and write it out word by word; `sfra_array_tb` shows a
small "router" that sets break directions along a path.

## Edges

I/O blocks are not modelled. The ends of every channel are top-level ports:
`h_west_in/out`, `h_east_in/out`, `v_south_in/out`, `v_north_in/out`. An
`*_in` is ORed onto the wire end, so keep unused ones at 0. The carry chains
appear as `carry_in` (bottom) and `carry_out` (top).

## Where this model departs from the architecture, or fills gaps

* **Array size** is not fixed by the architecture; 12 x 12 is a default.
  A 6000-LUT design such as a small SPARC core would need about 41 x 41.
* **Retiming-chain depth** (8) and its minimum delay of one register are
  choices of this model.
* **Slice details.** The figure of the slice gives the parts and their
  wiring. This model's choices are: which multiplexer input is selected by
  0 or 1 (F5, F6), which LUT inputs feed the carry product term (first and
  second), and whether BX/BY are inverted.
* **C-box internals.** The input crossbar is a plain multiplexer with a
  binary select. In silicon it is a hierarchy of local wires, tristates and
  a final multiplexer with row/column-addressed configuration cells; the
  logical function is the same.
* **Configuration** is held in flip-flops and loaded through the word port
  above. The real fabric loads SRAM cells in parallel over bit-lines.
* **Two-state wires.** Floating wires read 0. Wire contention between
  drivers in *different* tiles on the same segment is not detected; only
  contention inside an output C-box and breaks enabled both ways are.
* The interconnect registers reset to 0.

## Simulating

All files are plain SystemVerilog 2017. Each module in `rtl/` has a
self-checking testbench `tb/<module>_tb.sv`, which ends by printing
`TB_RESULT checks=N failures=M`. With Verilator:

```
verilator --binary --timing -Wno-fatal -j 4 --top-module sfra_array_tb \
  -Irtl -Itb -y rtl -y tb rtl/sfra_pkg.sv tb/sfra_array_tb.sv -o sim
obj_dir/sim
```

Replace `sfra_array_tb` by any other testbench. `tb/sfra_ref_pkg.sv` is the
slice reference model used by the slice, CLB and tile tests; add it to the
command line for those.

`sfra_array_tb` is the end-to-end test, run on a 5 x 5 array. It configures
three circuits through the configuration port and checks them with random
data, cycle-exactly:

* an edge-to-edge path that crosses buffer and register breaks, a 4-clock
  retiming chain, a LUT, a channel change inside the logic block and a
  T-box turn;
* a westward path through a BX-to-XB slice turn;
* a carry chain through the row-3 carry register, then switched to
  generate.

It also checks that a contradictory configuration raises `cfg_err`. The
largest size simulated is 5 x 5. The full 12 x 12 array compiles under
Verilator lint and elaborates, but building it for simulation takes more
than half an hour.
