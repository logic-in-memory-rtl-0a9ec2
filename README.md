# Logic-In-Memory grid for NanoMagnet Logic

In a conventional computer the processor waits on memory. A logic-in-memory
(LIM) array removes the split: it is a grid of small identical cells, and
each cell holds a few words of memory, the logic that works on them and a
router that talks to the four neighbouring cells. All cells work at the same
time, and data move only between neighbours, with no global buses. That
suits algorithms where each element mostly interacts with the elements next
to it. It also suits NanoMagnet Logic (NML). In NML a magnet stores its value
for free, but long wires cost a lot of area.

This repository is synthesizable SystemVerilog for that architecture. It
holds:

* the cell, built from a **memory plane**, a **routing plane** and a
  **logic plane**;
* logic planes for two algorithms, an **odd-even transposition sort** and a
  **3x3 binomial filter**;
* a 4 x 4 **grid** of cells;
* an RTL model of the NML **majority-voter ripple-carry adder**. In this
  model each NML clock zone is one register stage.

Read the RTL as a functional model of the architecture. It is not a
magnet-level netlist. The physical side cannot be expressed in RTL: the
two-wire "virtual" clock, the two stacked magnet layers, area and power.

## Top level

`lim_top` puts three independent designs side by side. Each has its own
ports.

| instance   | module     | what it is                                            |
|------------|------------|-------------------------------------------------------|
| `u_sort`   | `lim_grid` | 4 x 4 grid with odd-even sort logic planes            |
| `u_filter` | `lim_grid` | 4 x 4 grid with binomial filter logic planes          |
| `u_rca`    | `nml_rca`  | 4-bit NML ripple carry adder, one register per zone   |

Hierarchy: `lim_grid` → `lim_cell` → `lim_memory_plane`, `lim_routing_plane`
and either `lim_oddeven_logic` or `lim_binomial_logic`. Then `nml_rca` →
`nml_full_adder`. Shared types are in `lim_pkg`.

## Words

Cells talk only by sending *words* over point-to-point links. A word has
five fields (`lim_pkg::word_t`, 25 bits):

| field | bits | meaning                                                     |
|-------|------|-------------------------------------------------------------|
| TAG   | 3    | operation (below)                                           |
| TCA   | 6    | address of the cell that created the word: row (3), col (3) |
| WA    | 2    | word address in the target's memory plane                   |
| DATA  | 8    | data written, or data returned by a read                    |
| DEST  | 6    | address of the destination cell                             |

Row 0 is the north edge and column 0 the west edge. Neighbours also have a
2-bit relative code, numbered clockwise from east: E = 00, S = 01, W = 10,
N = 11. This code indexes every 4-entry link array in the RTL.

| TAG            | issued by        | effect                                                   |
|----------------|------------------|----------------------------------------------------------|
| `TAG_LOCAL_WR` | own logic        | write own memory                                         |
| `TAG_LOCAL_RD` | own logic        | read own memory, reply to own logic                      |
| `TAG_TOC_WR`   | logic            | "toc-toc" write: the adjacent cell in DEST writes its memory |
| `TAG_TOC_RD`   | logic            | toc-toc read: the adjacent cell replies with the word     |
| `TAG_REM_WR`   | logic or host    | remote write: forwarded hop by hop to DEST, written there |
| `TAG_REM_RD`   | logic or host    | remote read: forwarded to DEST, reply routed back to TCA  |
| `TAG_LOGIC`    | logic            | logic-logic: delivered to the adjacent cell's logic plane |
| `TAG_RESP`     | routing plane    | read reply, routed to its DEST (the reader's TCA)         |

The field widths, the tag encoding and the memory map are this design's
choices. The architecture names the fields but gives no widths. Memory map:
word 0 holds the cell's value, word 1 the sort configuration and word 2 the
filter result.

## Links and the nack handshake

A link in each direction is a `link_t` (valid + word), plus a `nack` bit
going back. The sender keeps the same word on the link until a cycle in
which `nack` is low; at that clock edge the receiver has taken it. `nack`
depends combinationally on the incoming `valid` and on registered state in
the receiver, and every link output is a register, so there is no
combinational path from one cell to the next.

## Routing plane (the part that needs most care)

`lim_routing_plane` is controlled by one FSM, `S_IDLE → S_EXEC (→ S_REPLY)`.
It handles one word at a time.

1. **Input interface.** There are five sources: the own logic plane and
   the N, W, S and E neighbours.
2. **Priority manager.** In `S_IDLE` it grants one source in the fixed
   order logic > N > W > S > E. Every other source that shows a word gets
   `nack` and tries again in a later cycle.
3. **Selection unit.** The granted word goes into the
   TAG/TCA/WA/DATA/DEST registers and is decoded into one action:
   * write the memory;
   * read the memory into the memory data register (MDR) and send a reply.
     A small tag generator builds the reply word: `TAG_RESP`, TCA = this
     cell, DEST = the reader;
   * hand the word to the own logic plane;
   * forward it.
4. **Output interface.** Each direction has two output registers, one
   for requests and one for replies. There is also a one-cycle delivery
   port to the logic plane, which always accepts. When both registers of a
   direction are full, the link sends the reply first.

**Routing.** Remote words and replies use dimension-ordered routing. They
first move north or south until the row matches, then east or west. Going
row-first keeps every route inside the grid, including the route to the
host, which sits just east of row 0. A toc-toc word sent by the logic goes
to the neighbour given by its DEST. That neighbour executes it without
checking the address.

**Why there are two output registers and a "feasible" grant.** In the
filter, every cell reads all of its neighbours at the same moment. Suppose
each link had one output register and the FSM waited whenever the output
it needed was full. Then two neighbours reading each other can deadlock:
each holds a request for the other, and each needs that same register for
its reply. Two rules prevent this:

* A source is granted only if the output register its word will need is
  empty now. The FSM therefore never waits after a grant. If the
  highest-priority source cannot go, the next one is served.
* Replies have their own registers. A reply either leaves the grid or ends
  at a logic plane, which always accepts it, so replies always drain, and
  requests waiting for reply space are eventually served.

Both rules are this design's own. The architecture gives only the single
FSM, the priority order and the refusal bit.

**Timing.** A granted word is latched in the grant cycle and executed in
the next one. A read takes one more cycle to build the reply. A local read
therefore reaches the logic plane three cycles after the routing plane
accepts it. A toc-toc read between two idle neighbours returns its reply
six cycles after acceptance.

## Memory plane

`lim_memory_plane` holds 4 words of 8 bits. Writes take effect at the clock
edge, and the read data follow the address combinationally. All words reset
to 0. The architecture says only that the memory plane is a small array of
memory cells.

## Odd-even sort logic plane

The numbers to sort form a chain of cells, one number per cell. The chain
must step only between adjacent cells. The test benches use a snake:
row 0 runs west to east, row 1 east to west, and so on. In an **even
phase**, every even cell of the chain that has a next cell works through
these steps:

1. read its own number (local read);
2. read the next cell's number (toc-toc read);
3. compare the two with a subtractor (a > b when b − a borrows);
4. if they are out of order, write the neighbour's number locally and send
   its own number to the neighbour (toc-toc write);
5. stand by until the phase ends.

Odd cells wait. In an **odd phase** the roles swap. Pairs are disjoint
within a phase, so their traffic never crosses.

Before the first phase, each cell reads its **configuration word**
(memory word 1):

| bits | meaning                                              |
|------|------------------------------------------------------|
| 0    | position in the chain is odd                         |
| 1    | the cell has a next cell                             |
| 3:2  | relative code (E/S/W/N) of the next cell             |

Cells keep in step by counting, not by exchanging messages:

* `start_i` reaches every cell in the same cycle;
* each phase lasts `PHASE_CYCLES` (32) cycles;
* a 3-bit round counter stops the plane after `ROUNDS` = 8 rounds of an
  even and an odd phase. That is 16 phases, enough to sort 16 numbers.

`done_o` rises exactly 2 × ROUNDS × PHASE_CYCLES = 512 cycles after the
edge that samples `start_i`. The phase length is this design's choice; an
assertion fires if a compare-and-swap does not finish inside its phase.

To sort a chain of length L, set `ROUNDS` ≥ L/2. `PHASE_CYCLES` must cover
the slowest compare-and-swap. 32 leaves a wide margin on a 4 x 4 grid.

## Binomial filter logic plane

Each cell holds one pixel in memory word 0. After `start_i` its plane
computes

    result = (4·C + 2·(E + S + W + N) + NE + SE + SW + NW) / 16

and writes it to memory word 2. The pixel is kept, so no cell ever reads a
half-updated image. The four edge neighbours are read with toc-toc reads.
The four corner neighbours are not adjacent, so they are read with remote
reads routed through the grid. A neighbour outside the grid is replaced by
the centre pixel. The architecture gives the division by 16. The 4/2/1
weights, the border rule and the choice of result word are this design's.
The plane issues one read at a time. With all 16 cells running at once, a
4 x 4 image takes about 130 cycles.

## Host access

The architecture does not say how data enter the array. Here the host is
connected to the east link of cell (row 0, column COLS−1) and has the
address (row 0, column COLS).

* **Load.** The host sends `TAG_REM_WR` words with TCA = host address.
  Writes are posted: no acknowledgement comes back. Before `start_i`, give
  the last writes a few tens of cycles to reach their cells.
* **Read back.** The host sends `TAG_REM_RD` words. The replies come out
  on `host_out_o`.
* **Other edges.** The remaining edge links are unconnected: nothing comes
  in, and a word sent off the edge is lost.

## NML adder model

In NML the gates are majority voters and inverters, and a value advances
one clock zone per clock phase. The RTL model puts an ideal gate in front
of one register per zone.

`nml_full_adder` uses three voters:

* zone 1: carry = MAJ(a, b, cin) and MAJ(a, b, ¬cin);
* zone 2: sum = MAJ(¬carry, cin, MAJ(a, b, ¬cin)).

The carry is ready after 1 cycle and the sum after 2. `nml_rca` chains N
of these adders (N = 4):

* the operand bits of bit i are delayed by i cycles, to meet the carry;
* the sum bits are realigned at the output;
* `{cout, s}` appears N + 1 cycles after the inputs;
* a new addition can start every cycle.

There is no reset, as in NML, so the first N + 1 outputs after power-up
mean nothing.

## How far to trust it, and where it departs from the architecture

* **Follows the architecture:**
  * the three planes per cell and the 4 x 4 grid;
  * the word fields and the four kinds of operation;
  * the relative neighbour codes;
  * the single-FSM routing plane with its four regions, the priority order
    logic > N > W > S > E, and a refusal bit to losing senders;
  * the sort plane's sequence and datapath: configuration, local and
    toc-toc read registers, comparator built from an adder, multiplexer,
    FSM, phase counter and 3-bit stop counter;
  * the filter plane's sequence and datapath: local read register, adder
    with sum register, multiplexer, FSM fed with the cell's row and column;
  * the register-per-clock-zone modelling of NML and a 4-bit ripple adder.
* **This design's own choices:**
  * all widths and encodings;
  * the nack retry handshake, the separate reply registers and the
    feasible-grant rule;
  * row-first routing;
  * the host port;
  * fixed-length phases started by a common pulse;
  * the configuration-word format and the snake chain;
  * the filter weights and border rule;
  * the zone split of the full adder.
* **Not modelled:**
  * The NML pipeline inside the cell. In NML every clock zone adds a stage,
    and instructions take 79 to 131 cycles at 100 MHz. Here a routing
    operation takes 2 to 3 cycles.
  * Area and power: about 2200 µm² and 18.4 mW (field clock) or 2.6 mW
    (spin-Hall clock) per cell.
  * The virtual clock and the magnet layout.
* **Verified by simulation:** every module has a self-checking test bench,
  listed below. `tb_lim_top` runs the whole design at its default size:
  * it loads, sorts and reads back 16 random numbers;
  * it filters a random 4 x 4 image;
  * it checks 200 pipelined additions.

  It counts the mechanisms and fails if any never happened: remote
  writes/reads, multi-hop forwarding, toc-toc reads/writes, swaps in even
  and odd phases, refused requests and logic-logic delivery. It also checks
  the sort's 512-cycle duration.
* **Not verified:** grids larger than 4 x 4, and traffic patterns other
  than the two algorithms plus host access. Deadlock freedom is argued
  above, not proven.

## Simulating

Every file holds one module or package. The package must come first. For
example, to run the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_lim_top \
        -y rtl -y tb -Irtl rtl/lim_pkg.sv tb/tb_lim_top.sv
    ./obj_dir/Vtb_lim_top

Each test bench prints `TB_RESULT checks=N failures=M` and stops itself
after a watchdog limit. Available test benches:

* `tb_lim_memory_plane`
* `tb_lim_routing_plane`: every operation, the priority order, back-pressure
* `tb_lim_oddeven_logic`: against a routing-plane model with random nacks
* `tb_lim_binomial_logic`: every cell position of a 4 x 4 image
* `tb_lim_cell`: a sort cell and a filter cell with modelled neighbours
* `tb_lim_grid`: a 2 x 3 sort grid and a 3 x 2 filter grid
* `tb_nml_full_adder`
* `tb_nml_rca`
* `tb_lim_top`
* `tb_lim_workloads`: both algorithms at full size on several data sets,
  including reverse-ordered numbers (the sort's worst case), a single
  bright pixel and a full-scale image

**Parameters.** `ROWS` and `COLS` (up to 7 columns and 8 rows with 3-bit
coordinates), `PHASE_CYCLES` and `ROUNDS` on the grid and top. `N` on the
adder.

**Package constants.** `DATA_W`, `WA_W` and `COORD_W` live in `lim_pkg`.
If you change `DATA_W`, also change the 4-bit padding in the configuration
word.
