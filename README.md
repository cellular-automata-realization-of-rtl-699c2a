# Reversible Davio lattice on a door-gated cellular automaton

This design computes Boolean functions with a regular, reversible circuit: a
grid of identical Toffoli gates that talk only to their neighbours, a
*Davio lattice*. The lattice is then built inside a three-dimensional
cellular automaton that has a single update rule. Every wire, fan-out,
EXOR, AND and the Toffoli gate itself is made of automaton cells, and the
only thing that differs from cell to cell is which of its six faces are open.

The RTL has two levels that can be compared directly:

* **Boolean level**: `toffoli_gate`, `davio_tile`, `davio_lattice`. This is
  combinational logic, the specification of what the lattice computes.
* **Automaton level**: `ca_cell` and the structures made of it: `ca_channel`,
  `ca_exor`, `ca_eeckhaut`, `ca_toffoli`, `ca_toffoli_tile` and
  `ca_davio_lattice`. There is also `ca_space`, a programmable 3-D automaton
  that runs any door pattern loaded into it.

`davio_ca_top` places the Boolean lattice, the automaton lattice and a
24 × 24 × 24 automaton space side by side.

## 1. The Toffoli gate and the Davio lattice

A Toffoli gate has three wires. The two controls `y` and `z` pass through
unchanged, and the target becomes `x ^ (y & z)`. The gate is its own inverse,
so no information is lost.

`davio_tile` places the gate's wires on the edges of a square so that tiles
can be abutted:

| edge       | wire                     | leaves as                     |
|------------|--------------------------|-------------------------------|
| west upper | control (row variable)   | east upper, unchanged         |
| north      | control                  | east lower, unchanged         |
| west lower | target                   | south, `west_lo ^ (west_up & north)` |

`davio_lattice` (default 3 × 3) abuts the tiles:

* Each row carries one variable along its upper wire: C, B, A from top to
  bottom.
* The west lower wires of the rows carry the constants C3, C2, C1 (top to
  bottom).
* The north wires of the columns carry C4, C5, C6.
* F leaves south of the bottom-right tile.
* Every other edge output is *garbage*: it is needed for reversibility but
  not used. It is still brought out.

Each tile applies one positive-Davio step, so F is an EXOR polynomial of A,
B and C, and the constants select its terms. Examples:

* C5 = 1 and all other constants 0 gives the majority function
  `AB ^ BC ^ CA`.
* Over all 64 constant settings the lattice produces exactly 16 distinct
  functions, and they are the 16 symmetric functions of three variables.
  This is checked by simulation in `tb_davio_lattice`.

`ROWS` and `COLS` are parameters. Larger lattices are the same code.

## 2. The automaton

`ca_cell` is one cell. It has one *pulsing* bit (its activation) and six
*frozen* door bits, one per face: West, East, North, South, Upper, Lower
(bit 0 to bit 5, see `ca_pkg::door_e`). A door decides whether the cell sees
the neighbour behind that face. The rule is the elementary symmetric
function S1:

```
act(t+1) = 1  iff exactly one open door faces a neighbour that is active at t
```

Doors are set before a computation and held while it runs. In this RTL they
are an input (`doors_i`) that the owner keeps constant, and hardwired
structures tie them to constants. The cell also has `step_i`, which advances
one generation, and `load_i`/`load_act_i`, which overwrite the activation so
a host can inject pulses. It has a synchronous reset, `rst_n`, that clears
the activation. These three controls are additions of this design for
driving the automaton as a clocked circuit.

**Signals are pulses.** A logic 1 on a wire is one active cell moving one
cell per generation, and a logic 0 is no pulse. Every structure below is
feed-forward: no cell watches a cell downstream of it. So all of them are
pipelines and accept a new operand set every generation.

Port convention for all `ca_*` structures: an input is the activation of the
cell just *outside* the structure (its input cell), and an output is the
activation of the structure's own edge cell. Latencies count from input cell
to output cell, so structures chain without extra delay.

## 3. Logic made of cells

### Channel (`ca_channel`)

A channel is a chain of cells, each with one door open toward the previous
cell, and it delays a pulse by `LEN` generations. Bends in a plane and
changes between layers (using the U/L doors) do not change its behaviour.
The RTL therefore models it as a straight chain. `ca_space`'s testbench
runs a layer change and a bent path in a real 3-D space.

### EXOR (`ca_exor`)

An EXOR is one cell with its West and East doors open, between two input
cells. One active neighbour fires it and two cancel:
`e(t+1) = x(t) ^ y(t)`. The parameter `Y_DOOR` moves the second operand to
another side. The cellular Toffoli gate uses it with North, and its `xr`
cell is an instance of `ca_exor`.

### Eeckhaut gate: AND from an exactly-one rule (`ca_eeckhaut`)

S1 cannot compute AND in one cell, so the Eeckhaut gate uses six cells and
three generations. Layout, North up:

```
row 0:   x   x1            x1: W
row 1:   p   q   e         p: N     q: N W S     e: W S
row 2:   y   y1  y2        y1: W    y2: W
```

* **x alone**: `x1` and `p` fire together. `q` sees two active neighbours
  and stays dark, so `e` sees nothing.
* **y alone**: `y1` fires, then `q` and `y2` fire together. `e` sees two and
  stays dark.
* **x and y together**: `q` sees three and stays dark. `e` sees only `y2`
  and fires.

So `e(t+3) = x(t) & y(t)`. The module also exports `x1_o` and `y1_o`, so a
larger structure can take a copy of an operand.

### Cellular Toffoli gate (`ca_toffoli`): the hard part

The Toffoli gate needs the product `y & z` to reach the `x` wire, while `y`
and `z` must also continue to the outputs. In a plane these paths would
cross, so the gate uses two layers. Cell map, with row 0 at North and
column 0 holding the outside input cells:

```
        upper layer                      lower layer
 r0:  z    .    .    zo          z0   z3   z4   z5
 r1:  .    [Eeckhaut   ]         z1   z2   y2   y3
 r2:  y    .    a1   yo          .    y0   y1   y4
 r3:  .    .    a2   .           x1   x2   .    .
 r4:  x    xu   xr   xo          x0   x3   .    .
```

* The upper layer holds the Eeckhaut gate, mirrored top to bottom: the `y`
  row has two cells and the `z` row three. Its output `e` fires at t+3.
* The product runs south through `a1` and `a2` and reaches `xr` at t+6.
* `xr` opens West and North, so it is an EXOR of the delayed `x` and the
  product.
* The three operand copies detour through the lower layer so that they
  cross the product path and arrive in step:
  * `z`: taken from the `z` input cell; path `z0 z1 z2 z3 z4 z5`, then up
    into `zo`.
  * `y`: taken from the second `y` cell; path `y0 y1 y2 y3 y4`, then up
    into `yo`.
  * `x`: path `x0 x1 x2 x3`, then up into `xu`, then through `xr` to `xo`.

All three wires take exactly 7 generations (`ca_pkg::TOFFOLI_LATENCY`):

```
x_o(t+7) = x(t) ^ (y(t) & z(t))     y_o(t+7) = y(t)     z_o(t+7) = z(t)
```

The gate has 28 cells in all. Because each wire's delay is fixed by its
path, changing a single door breaks the timing. The testbenches catch that.

### Tile (`ca_toffoli_tile`)

The tile has the same edge placement as `davio_tile`, and every wire takes
`TILE_LATENCY` = 18 generations. This equal delay is what lets tiles be
abutted with no further timing care. It is built as `ca_toffoli` followed by
an 11-cell channel on each wire (61 cells).

The original tile folds the same delay into a three-layer layout of its own.
That layout is not reproduced cell for cell here. The tile's function and
timing are the same.

## 4. The lattice in the automaton (`ca_davio_lattice`)

The tiles are wired exactly like the Boolean lattice. Because values are
pulses, all three operands of a tile must arrive in the same generation.

* Tile (r, c) works on operands that entered the lattice `18·(r+c)`
  generations earlier.
* The row variables and west constants of row r therefore pass through
  channels of `18·r` cells.
* The north constant of column c passes through a channel of `18·c` cells.

All inputs are presented in one generation t, and then:

* **F** appears at `t + 18·(ROWS+COLS-1)`, which is t+90 for 3 × 3.
* **South outputs**: `bottom_o[c]` appears at `t + 18·(ROWS+c)`.
* **East outputs**: `right_up_o[r]` and `right_lo_o[r]` appear at
  `t + 18·(r+COLS)`.
* **Throughput** is one input set per generation.

The 3 × 3 lattice has 711 cells: 549 in the tiles and 162 in the delay
channels. The delay channels are this design's way of bringing operands to
their tiles on time. The original layout does the same with its own routing.

## 5. Programmable space (`ca_space`)

`ca_space` is an `NX × NY × NZ` array of `ca_cell` (default 24 on each axis).
Each cell has its own door register.

* **Neighbours**: West/East along x, North/South along y, Upper/Lower along
  z. A face on the boundary sees an inactive neighbour.
* **Write port**: `cfg_we_i` with the cell's coordinates, `cfg_doors_i` and
  `cfg_act_i`. It writes one cell's doors and activation per clock, and a
  write overrides the rule for that cell. Writes are also how input pulses
  are injected.
* **Run control**: `run_i = 1` steps every cell by one generation;
  `run_i = 0` holds.
* **Outputs**: `act_o` exposes every activation, bit `(z·NY + y)·NX + x`.
* **Reset** clears all activations and closes all doors.

The testbench loads the two-layer Toffoli door map of section 3 into the
space and checks the complete space state for all eight operand vectors.
After 7 generations exactly the expected output cells are active, and one
generation later the space is empty. This confirms the hardwired
`ca_toffoli` cell by cell. The same testbench also runs a channel that
changes layer, a channel with two bends in one layer (one active cell per
generation along the path), and the EXOR cell with one and two active
neighbours.

At 24³ the space is 13,824 cells, about 97k flip-flops.

## 6. Top level (`davio_ca_top`)

| port | meaning |
|------|---------|
| `launch_i`, `a_i`, `b_i`, `c_i`, `const_i[5:0]` | on a clock with `launch_i = 1`, each variable and constant that is 1 becomes a pulse in the CA lattice; `const_i[k-1]` is Ck |
| `f_logic_o` | F of the Boolean lattice for the current inputs, combinational |
| `f_o` | F pulse of the CA lattice, 90 clocks after the launch |
| `ca_bottom_o`, `ca_right_up_o`, `ca_right_lo_o` | CA lattice garbage outputs (timing as in section 4) |
| `space_*` | the write port, run control and activations of the 24³ space |

The launch strobe is this design's choice of input interface.

## 7. Where the RTL follows the source and where it does not

Taken from the source description:

* the Toffoli gate
* the tile's edge placement
* the 3 × 3 lattice and its constants
* the S1 rule with frozen doors
* the EXOR cell
* the Eeckhaut gate's cells
* the upper layer of the cellular Toffoli gate
* the 18-generation tile delay
* the 24-cell edge of the space

Completed or chosen here:

* **Lower layer of the cellular Toffoli gate**: the detour paths were
  completed so that all three wires take 7 generations.
* **Tile layout**: a Toffoli gate plus padding channels, not the original
  three-layer layout.
* **Lattice timing**: the skew channels in front of the lattice.
* **Control ports**: the space's write port and run control, and the cell's
  load, step and reset.
* **Space depth**: `NZ = 24`.
* **Top interface**: the launch strobe.

The original lattice was laid out inside one automaton module by a design
tool. Here the automaton lattice is hardwired cells (`ca_davio_lattice`).
The 711 cells would fit in the 24³ space by count, but no placement into
`ca_space` is provided.

## 8. Simulating

The testbenches are in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ca_pkg.sv tb/davio_ref_pkg.sv tb/tb_ca_davio_lattice.sv \
  --top-module tb_ca_davio_lattice -Mdir obj && ./obj/Vtb_ca_davio_lattice
```

* `tb/davio_ref_pkg.sv` is an integer reference model of the lattice, used
  by the lattice and top testbenches.
* The CA testbenches drive random pulse streams, one operand set per
  generation, and check every output at its exact latency.
* `tb_davio_ca_top` launches all 64 × 8 constant/input combinations back to
  back, then random launches with gaps. It checks F from the Boolean lattice
  and the 90-clock CA output against the reference. It also loads an
  Eeckhaut gate and an EXOR cell into the space. It counts each mechanism
  and fails if one never occurs: back-to-back launch, idle clock, F pulse,
  F zero, majority setting, AND firing and blocking, EXOR firing and
  cancelling.

The lattice runs at its full default size in every testbench. The `ca_space`
and top testbenches set the space edge to 8 (`NX/NY/NZ` or `SPACE_N`) for
build time only: at 24³ Verilator's generated C++ for the space takes more
than 15 minutes to compile on a single core. The logic is identical at any
size.
