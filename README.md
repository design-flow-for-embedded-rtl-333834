# An arithmetic-oriented embedded FPGA fabric

This is a parametrisable embedded FPGA (eFPGA) fabric meant to sit next to a
processor as a reconfigurable accelerator for signal-processing datapaths.
General-purpose FPGAs pay for their flexibility in area and power. This
fabric bets on one observation instead: arithmetic datapaths are regular. An
n-bit datapath is made of *function slices*, where each slice is one
elementary operation such as an n-bit add. It is also made of *bit slices*,
where each slice is all elements of one bit weight. Most traffic is local,
between neighbouring slices, and operands are broadcast to a whole slice.
Every part of the fabric is shaped around that pattern, and every size is a
parameter.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It is configured
through a serial bitstream. A default 2 x 2 tile instance, `efpga_top`, runs an
8-bit adder and a 4-tap FIR filter in the included testbenches.

## The tile

```
            H-channel (TRK_H tracks)           RS
   ==========[ H-CB ]=========================[##]=====
                 | column broadcast lines       ||
                 v                              ||
          +-----------------+                 [V-CB]  V-channel
   <--    | LE  LE  LE  LE  |  <-- row lines --  ||   (TRK_V tracks)
   west   | LE  LE  LE  LE  |                    ||
   outs   | LE  LE  LE  LE  |  register stages   ||
          | LE  LE  LE  LE  |  after rows 1, 3   ||
          +-----------------+                    ||
                 | south outputs
                 v
```

Tile (i,j) has i = 0 at the west edge and j = 0 at the north edge. Each tile
holds five things:

* a **cluster** of LE_Y x LE_X logic elements (LEs), 4 x 4 by default. A row is
  a function slice. A column is a bit slice: column 0 holds the least
  significant bit and sits at the east edge, and significance grows towards
  the west.
* a **horizontal connection box (H-CB)** on the channel above the cluster. It
  feeds the column broadcast lines.
* a **vertical connection box (V-CB)** on the channel east of the cluster. It
  feeds the row broadcast lines.
* a **routing switch (RS)** where the two channels cross, at the tile's
  north-east corner.
* two **feedthrough stages**. These let the cluster use the column lines of the
  cluster above, or the row lines of the cluster to the east, instead of its
  own. Several clusters then behave as one larger cluster.

Tiles also connect directly, without the routing network:

* Cluster (i,j) reads the bottom-row sums and carries of cluster (i,j-1) as its
  "above" neighbours.
* It reads the west-column carries of cluster (i+1,j) as its carry-in, so
  ripple-carry chains cross tile borders.

LE outputs also enter the routing network:

* The south-border outputs of a cluster can be driven onto the H-CB of the tile
  below.
* The west-border outputs can be driven onto the V-CB of the tile to the west.

At the fabric edge, every channel ends in ports (`edge_n_*`, `edge_s_*`,
`edge_w_*`, `edge_e_*`). The bottom-row and west-column cluster outputs are
also brought out directly (`south_s/c`, `west_s/c`).

## Broadcast lines instead of per-LE inputs

A conventional cluster gives each LE its own inputs through a central
connection box. Here, all LEs in a row share BC_ROW **row lines**, and all LEs
in a column share BC_COL **column lines**. An n-bit operand that the whole
function slice needs arrives once per bit slice on a column line, not once per
LE. This cuts the number of connection-box outputs, which is where much of an
FPGA's area goes.

Line numbering is chosen so that bus bits stay adjacent:

* column line k of column x is `bc_col[k*LE_X + x]`
* row line k of row y is `bc_row[k*LE_Y + y]`

## Logic element: DRB plus core logic

Each LE has a **dedicated routing block (DRB)**: four multiplexers that choose
the operands a, b, carry-in c and gate g. The candidate sources are numbered
as in `efpga_pkg`:

| index | source |
|---|---|
| 0, 1 | constant 0, constant 1 |
| 2, 3 | sum and carry of the LE above, offset (0,-1) |
| 4 | sum of the LE above-left, offset (+1,-1): one bit more significant |
| 5 | sum of the LE above-right, offset (-1,-1) |
| 6 | carry of the LE to the right, offset (-1,0): the ripple carry |
| 7 .. | row lines, then column lines |

The **core logic** computes one of these functions:

* full add
* gated full add, `s = (a&g)^b^c`: the cell of an array multiplier
* AND, OR, XOR
* 2:1 mux (`g ? b : a`)
* pass
* off

The `FUNCS` mask removes functions from the built logic. An LE's
configuration word is `{func[2:0], sel_g, sel_c, sel_b, sel_a}`, 19 bits with
the defaults.

Neighbour sources that lie outside the cluster come from the adjacent
cluster. The exception is the diagonal ones, which read 0 at the border.

## Register stages

Registers are not placed after every LE. A `register_stage` follows every
REG_EVERY-th row (default: every second row). It registers the row's sums, or
sums and carries when REG_OUTS = 2, on their way down. Each bit has its own
bypass bit. The sideways carry is never registered, so carry chains stay
combinational. The flip-flops reset asynchronously to 0 on `rst_n` and load
only while `run` is high. With `REG_LATCH = 1`, the stages are built from
level-sensitive latches instead. A latch is transparent while `clk` and `run`
are high and holds while `clk` is low.

## Routing switch

The routing switch is a matrix of TRK_H horizontal and TRK_V vertical tracks,
32 x 32 by default. Switch points sit on the diagonal: switch point k joins
horizontal track k with vertical track k. There are two types of switch point:

* **type 1** has only the straight connections `n-s` and `e-w` (2
  configuration bits)
* **type 2** adds the four turns `n-e`, `e-s`, `s-w`, `w-n` (6 bits)

Groups of SHD adjacent switch points share one configuration block, and the
groups alternate type 1, type 2, starting at k = 0. The default 32 x 32
switch therefore has 16 x 2 + 16 x 6 = 128 configuration bits.

A signal can change tracks only where a type-2 point lies on its track. So in
a default fabric, turns happen on the odd-numbered tracks.

**Segmentation.** Each track has a segment length L (`SEG_H`, `SEG_V`, default
1). The track enters the switch points only in routing switches whose column
(or row) position is a multiple of L. Elsewhere it passes straight through.
Long segments are fast, lightly loaded wires.

**Modelling of pass switches.** A physical switch point is a set of
bidirectional pass transistors. Here each track is a pair of directed wires,
and each closed connection becomes two directed paths. A side's output is the
OR of the enabled paths into it. This equals the real wire value whenever a
net has a single driver, which every valid configuration ensures. Two drivers
on one net give a wired OR here, whereas in silicon they would be a short.

## Connection box: fully connected, periodic and unconnected tracks

A channel is split into up to four **track groups**, each of one of three
kinds:

* **unconnected**: no connection points. These are fast tracks that only pass
  by.
* **fully connected**: every track reaches every line. This is flexible and
  expensive.
* **periodic**: each line sees a window of `win_w` consecutive tracks.
  * The window for line b starts at `(win_p + win_v * floor(b / win_per)) mod
    width` and wraps around.
  * So as the line index grows, the window slides across the group at
    "velocity" `win_v`.
  * Bits of a bus are ordered by weight, so a bus laid out on consecutive
    periodic tracks lands on consecutive broadcast lines. This costs only a
    few connection points per line.

The default channel has 8 unconnected, 8 fully connected and 16 periodic
tracks. The periodic tracks use a 2-track window that moves 1 track per line.
With only 8 lines per box, the windows cover periodic tracks 0 to 8. The
remaining 7 periodic tracks then behave like unconnected ones and simply pass
through. More lines, or a larger velocity, would reach them.

**Selects are ranks.** A line's select names the r-th connection point of that
line, not a track number; 0 means none. Two things follow:

* Lines that share a configuration block (SHD > 1) make the same relative
  choice. On a periodic group, that means consecutive tracks for consecutive
  lines, which is exactly a bus.
* The same rule, with LE outputs in place of lines, decides which LE output
  may drive which track. A driven track carries the value in both directions
  and drops whatever arrived.

## Configuration

Every configurable block holds its bits in a `cfg_sram` block, written as a
shift register. All blocks form one chain from `cfg_in` to `cfg_out`, so the
bitstream is simply the concatenation of every block's contents in chain
order:

* tiles in order `j*NX + i`
* inside a tile: RS, H-CB, V-CB, column feedthrough, row feedthrough, cluster

With `cfg_en` high, one bit is shifted per clock. The bit shifted in first ends
up in the highest position of the last block.

With the defaults, a tile needs 776 bits and the fabric 3104:

| block | bits |
|---|---|
| RS | 128 |
| H-CB | 160 |
| V-CB | 160 |
| feedthroughs | 8 + 8 |
| cluster | 312: 16 LE words of 19 bits, plus 2 register stages of 4 bits |

The bits are not reset, so the fabric must be loaded before use. While
`cfg_en` is high or `run` is low, every LE output and every routing switch
output is held at 0. Any closed loop in the fabric passes through one of
these. So an unloaded or half-loaded bitstream cannot make the fabric
oscillate, and no stale value stays trapped in a track loop. Raise `run` once
the bitstream is in. Sharing
(`SHD_LE`, `SHD_CB`, `SHD_RS`) shortens the chain. `efpga_pkg` has functions
that give each block's width and offsets, for use by a bitstream builder.

## Files

Each `.sv` file holds one module or package.

| file | contents |
|---|---|
| `rtl/efpga_pkg.sv` | types, source numbering, switch point types, connection-point rule, configuration widths |
| `rtl/cfg_sram.sv` | configuration block (shift register) |
| `rtl/le_core.sv` | core logic functions |
| `rtl/drb_mux.sv` | one DRB multiplexer |
| `rtl/logic_element.sv` | DRB plus core |
| `rtl/register_stage.sv` | optional registers after a row |
| `rtl/cluster.sv` | LE array with broadcast lines and register stages |
| `rtl/feedthrough.sv` | neighbour broadcast line selection |
| `rtl/switch_point.sv` | one switch point |
| `rtl/routing_switch.sv` | switch matrix with segmentation and sharing |
| `rtl/connection_box.sv` | track groups, line and drive selection |
| `rtl/efpga_top.sv` | tile array |

### Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert rtl/efpga_pkg.sv rtl/*.sv tb/tb_efpga_top.sv \
          --top-module tb_efpga_top -o sim && ./obj_dir/sim
```

Substitute any other `tb/tb_<block>.sv`:

* `tb_efpga_top`: configures the default fabric. It runs an 8-bit adder split
  over two clusters with the carry crossing the border, and routes its results
  through both kinds of connection box and through straight and turning switch
  points. It also exercises both feedthrough stages and a register stage, and
  counts each of these mechanisms.
* `tb_fir4`: maps `y[n] = x[n] + 2x[n-1] + 2x[n-2] + x[n-3]` onto the same
  fabric. It uses 4-bit samples and an 8-bit result. The mapping is in
  transposed form, one function slice per LE row, with the register stages as
  the delay line. Column line 1 carries `2x` because the connection box picks
  shifted tracks. The output is checked each cycle against the sample history.
* `tb_cluster`, `tb_routing_switch`, `tb_connection_box` and the small-block
  testbenches compare each block against reference models written
  independently in the testbench.

Verilator reports circular combinational logic (UNOPTFLAT) for the fabric.
The track network, connection boxes and clusters form structural loops, as
every FPGA routing fabric does. A valid configuration closes none of them.

## What is this design's own choice

The architecture describes a template, not one instance. These choices were
made here and can be changed:

* **Sizes.** The 2 x 2 tile array, the 4 x 4 cluster, 2 lines per row and
  column, and the track-group split are this design's picks. The 32-track
  routing switch follows the architecture's worked example. A register stage
  after every second row follows its example.
* **Switch point types.** Type 1 is straight connections only; type 2 adds all
  turns. The architecture's connection lists for the two types are
  incomplete, so this split is a choice.
* **Hold while not running.** Holding LE and routing switch outputs at 0
  while configuring or stopped is this design's addition.
* **Fixed directions.** Broadcast-line directions are fixed: column lines enter
  from the north and row lines from the east. Output directions are fixed too:
  south and west. The template allows any set of the four directions for each.
* **DRB sources.** The set of neighbour offsets is fixed (listed above).
* **Function list.** The LE functions beyond full add and gated full add are
  added here.
* **Register type.** Register stages are flip-flops by default. A latch
  variant exists, and no other storage types are built.
* **Configuration storage.** Configuration is stored in a shift chain rather
  than in addressable SRAM cells.
* **Bitstream size.** The 32 x 32 routing switch needs 128 configuration bits
  here. The architecture's own example needed more than 200 bits with switch
  point lists that are not fully known.
* **What is not covered.** The layout, the 90nm cells and the efficiency
  figures are physical results. The RTL does not model them.
