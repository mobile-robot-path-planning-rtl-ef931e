# Breadth-first path planner for a grid map, with VGA display

A mobile robot moves on a floor plan divided into square cells. Each cell is
free or an obstacle, and the robot may step only north, south, west or east.
This design finds a shortest path from a start cell to a goal cell in
hardware, using breadth-first search (BFS). It marks the path in the map and
shows the result on a monitor.

The design implements the FPGA planner described in *Mobile Robot
Path-planning Implementation in Software and Hardware* (Vacariu, Roman, Timar,
Stanciu, Banabic, Cret). The published description gives the partition into
units, their port lists, the algorithm and measured run times. It does not give
the insides of the units. Everything below the unit boundaries is this
design's own, and the section "Choices made here" lists those choices.

## The idea in one paragraph

The map lives in block RAM, one 2-bit word per cell. The search uses the map
as its own "visited" list. When a free neighbour is found, its word is changed
from *free* to *visited* and the cell goes into a FIFO. A second memory, the
*direction map*, receives one 2-bit word for that neighbour. The word says
which direction leads back to the cell that found it. After the search reaches
the goal, a second unit starts at the goal and follows these directions back to
the start. At each cell on the way it writes *path* into the map. So the only
per-cell state is four bits plus one FIFO entry. No predecessor addresses are
stored.

## One planning operation

`interface_top` is the whole system. A rising edge on `Start` makes the
sequencer (`comp_mare`) step through four states:

| state   | unit        | what happens |
|---------|-------------|--------------|
| STANDBY | –           | waits for the button; `Ready` is high after an operation |
| INIT    | `copy_mem`  | copies the read-only initial map into the working map (one word per clock) |
| BF      | `bf`        | breadth-first search from `START_CELL` to `GOAL_CELL` |
| PATH    | `mark_path` | walks back from the goal and marks the path (skipped if there is none) |

In each state the sequencer gives the unit a one-clock start pulse. It then
waits for the unit's finished flag. Meanwhile it routes the memories' algorithm
ports to that unit alone. Then it moves on. `Found` reports whether the goal
was reached.

Take C as the number of cells (ROWS × COLS), E as the number of cells the
search expands, and L as the number of cells on the path (start and goal
included). The edge that sees the button counts as cycle 1. `Ready` is then
high after:

* **C + 10E + 2L + 10** cycles when a path exists
* **C + 10E + 8** cycles when it does not

This breaks down as INIT C + 3, BF 10E + 5, PATH 2L + 1, plus 1 for STANDBY.
The testbenches check this count exactly.

## The memories (`central_unit`)

| memory        | ports | content per cell |
|---------------|-------|------------------|
| initial map (`init_rom`) | 1 read | 0 free, 1 obstacle |
| working map (`dp_ram`)   | port 1 read/write (algorithm), port 2 read (display) | 0 free, 1 obstacle, 2 visited, 3 path |
| direction map (`dp_ram`) | port 1 read/write (algorithm), port 2 read (display) | 0 N, 1 S, 2 W, 3 E: where the discovering cell lies |

* Each memory has 2^ADDR_W words. Cell (r, c) is at address r·COLS + c, so
  the neighbours of address a are a−COLS, a+COLS, a−1 and a+1.
* All reads are synchronous, with one clock of latency. A read of a word
  being written returns the old word, like block RAM in read-first mode.
* The working map is not cleared at reset. It is rebuilt from the initial map
  at the start of every operation.

The initial map is fixed when the device is configured. By default its
contents are computed by `bf_pkg::init_cell`:

* the outer ring of cells is obstacle;
* the start and goal cells are free;
* every other cell is an obstacle when `hash(address, SEED) mod 100 < OBST_PCT`.

To load your own map instead, set `INIT_FILE` to a `$readmemh` file with one
hex digit per cell.

**The map must be closed.** Every cell on the border must be an obstacle. The
search computes neighbour addresses without bounds checks and relies on this
ring to stay inside the map.

## The search engine (`bf`, `bf_queue`)

The engine follows textbook BFS with a FIFO:

1. Mark the start visited and enqueue it.
2. Dequeue a cell. If it is the goal, stop with `found`.
3. Otherwise examine its neighbours in the order N, S, W, E. For each
   neighbour whose map word is *free*:
   * write *visited* into the working map;
   * write the opposite direction into the direction map;
   * enqueue the neighbour.
4. When the queue is empty, stop without `found`.

Like the original algorithm, the engine tests for the goal when it dequeues a
cell, not when it discovers one.

The single map port is shared by the read and the write. Each neighbour
therefore takes two clocks:

* drive the address;
* test the returned word and, if it is free, write in the same clock.

A dequeue also takes two clocks: pop, then compare with the goal. That makes
10 clocks per expanded cell.

A cell is marked visited at the moment it is enqueued, so it can be enqueued
only once per search. A FIFO with one entry per cell (2^ADDR_W) therefore
cannot overflow. An assertion checks this.

The FIFO is a circular buffer in a RAM array with synchronous read.

## Path reconstruction (`mark_path`)

The walk starts at the goal. In one clock, it writes *path* into the current
cell and reads that cell's direction. In the next clock, it steps one cell in
that direction. The walk ends after the start cell is marked.

A step counter stops the walk after 2^ADDR_W steps in case the direction map
has been corrupted.

## The display (`vga`, glue in `interface_top`)

`vga` sweeps a 1344 × 806 frame. With a 65 MHz pixel clock this gives
60.004 Hz, using 1024×768-mode sync positions with negative sync pulses.

* It publishes the current pixel as `ADDR = {y[10:0], x[10:0]}`.
* It expects a 3-bit code on `DATA` one clock later.
* It delays its syncs by that clock to stay aligned.
* It colours the 800 × 600 picture area. Everything outside that area is
  black.

`interface_top` turns the pixel into a cell address. Cells are 8 × 8 pixels
(`CELL_SHIFT = 3`), and the glue reads both memories' display ports:

* **left picture** (from x = 0): the working map, showing the path and every
  cell the search reached;
* **right picture** (from x = `RIGHT_X` = 400): for reached cells, the stored
  direction; other cells as in the working map;
* everything else in the picture area is blue.

| DATA | meaning      | colour  |
|------|--------------|---------|
| 0    | free         | white   |
| 1    | obstacle     | blue    |
| 2    | visited      | green   |
| 3    | path         | red     |
| 4    | direction N  | yellow  |
| 5    | direction S  | cyan    |
| 6    | direction W  | magenta |
| 7    | direction E  | black   |

The start cell has no discoverer, so its direction word is never written. On
the right picture it shows whatever that word holds.

## Parameters and sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 11 | cell address width; the port widths of the original units |
| `COLS`, `ROWS` | 40, 40 | grid size; ROWS·COLS ≤ 2^ADDR_W |
| `OBST_PCT`, `SEED` | 25, 1 | generated initial map |
| `START_CELL`, `GOAL_CELL` | (1,1), (ROWS−2, COLS−2) | endpoints, as addresses |
| `INIT_FILE` | "" | optional map file |
| `CELL_SHIFT`, `RIGHT_X` | 3, 400 | display cell size and right-picture offset |

At the defaults the system uses four RAMs of 2048 words:

* three memories of 2 bits per word (initial, working and direction map);
* the FIFO, at 11 bits per word.

Grid sizes, their address widths, and how fast they run:

* Up to 45 × 45 fits in 11-bit addresses.
* 50 × 50 needs `ADDR_W = 12`.
* 100 × 100 needs `ADDR_W = 14`.

All of these were simulated. Measured times exist for random maps of 10×10 to
100×100 cells on a Virtex-II Pro. Against those times, this design's search
takes about 1.2–1.4 × as many clocks on generated maps of the same sizes. For
example, a 100 × 100 map takes 70,994 cycles, which is 592 µs at 120 MHz,
against 475 µs measured. The generated maps are not the measured ones, so
this is a comparison of magnitude only.

A uniformly random fill of 50 % almost always walls the start in, because it
is below the percolation threshold of the grid. On such maps the search ends
after a few dozen cells.

## Choices made here

These are not given by the original description:

* **Encodings:** the cell and direction codes, and the DATA colour code.
* **Control signals:**
  * a synchronous active-high reset to every unit;
  * level `ready`/`done` flags, cleared by the next start pulse;
  * an added `found` output on `bf` and the top level;
  * an added write strobe `outwe` on `copy_mem`.
* **Naming:** the units' `solve` input is called `solve_req`, because `solve`
  is a SystemVerilog keyword.
* **Predecessors:** they are stored as 2-bit directions, not addresses. The
  walk back ends at the start address instead of at a "no predecessor" mark.
* **Start and goal:** they are elaboration parameters. The original system
  has no inputs for them.
* **Clocking:** one clock for everything. The published description uses a
  65 MHz display clock but measured the search at 120 and 150 MHz; a design
  that needs both would add a clock-domain crossing on the display read
  ports.
* **Display:** the display asks for both "800×600" and "65 MHz, 60 Hz".
  These do not form one standard mode. Here the clock and refresh rate are
  kept: 1024×768 frame timing, with the 800×600 picture in its top-left
  corner.
* **Cycle schedule:** no cycle schedule was given. The 10-clocks-per-cell
  search and the 2-clocks-per-cell walk are this design's own.
* **Not implemented:** the option of an external DRAM for maps larger than
  the block RAMs, the board's clock, and the video DAC. These connect at
  `Clock` and `HSync`/`VSync`/`RGB`.

## Verification

Every unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Results are compared with independent
models:

* `tb/bf_ref_pkg.sv` is a software BFS.
* The memories and the video timing are written out separately.

| testbench | what it checks |
|-----------|----------------|
| `tb_bf_queue` | random push/pop against a queue model, full/empty flags, clear |
| `tb_bf` | 41 random 12×10 maps, one with the goal walled in: found flag, every map word and direction, the shortest back-walk, exactly 10E+4 / 10E+3 cycles |
| `tb_mark_path` | 30 maps: exactly the shortest-path cells change, direction map untouched, 2L cycles |
| `tb_copy_mem` | three copies: contents, no write beyond C words or after `done`, C+2 cycles |
| `tb_central_unit` | initial-map formula, all four ports with random traffic, read-first behaviour |
| `tb_vga` | two frames at default timing: address sweep, sync positions and widths, frame period, every pixel's colour |
| `tb_comp_mare` | path and no-path systems, three operations, cycle counts, every map word afterwards |
| `tb_interface_top` | the whole system, path and no-path, two operations, every pixel of a frame of each |
| `tb_interface_full` | the whole system at default parameters (40×40), two operations and a full frame each |
| `tb_workloads` | 10×10 to 100×100 maps at 25 % and 50 % fill, exact cycles and contents, times printed |

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_interface_full \
  -y rtl -y tb +libext+.sv rtl/bf_pkg.sv tb/bf_ref_pkg.sv tb/tb_interface_full.sv
./obj_dir/Vtb_interface_full
```

Testbenches that do not use the reference model need only `rtl/bf_pkg.sv`
ahead of the testbench file. The full-size run and `tb_workloads` are the
longest. No unit is trusted beyond what these runs cover. In particular:

* timing closure at 65–150 MHz has not been checked;
* the display has been checked only in simulation.
