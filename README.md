# Node-swap FPGA placement accelerator

Placement decides which logic block (CLB) of a mapped netlist goes to which
site of an island-style FPGA. The usual goal is a short total wire length,
and with horizontal and vertical routing channels each wire's length is the
Manhattan distance between its two blocks. Simulated annealing gives good
placements but is slow. This design is a hardware engine for a simpler,
deterministic heuristic:

1. Start from a random, non-overlapping placement.
2. For every CLB `i` in turn, look at the sites of a small square box around
   it. Take the first site where moving `i` shortens the total wire length.
   If the site is free, `i` moves there. If another CLB `k` sits there, `i`
   and `k` swap places.
3. Repeat whole passes ("iterations") over all CLBs until a pass no longer
   shortens the total. The result is a local minimum.

The heuristic only accepts improvements, so the engine needs no random numbers
after the start placement and no temperature schedule. The work is the
wire-length change of each candidate. For a circuit of `n` CLBs, one
candidate means visiting all `n` blocks, and the hardware does that with a
small, simple datapath.

Two versions of the heuristic exist: *node-move*, which only moves into free
sites, and *node-swap*, which also swaps. Node-swap is the main one here. It
finds noticeably shorter placements, especially on sparse netlists, at the
cost of evaluating more candidates. A `swap_en` input still selects node-move.

## Sizes

The default build handles up to **550 CLBs on a 47×47 grid**, the largest
problem the original accelerator targeted. The number of CLBs (`n_clbs`), the
grid side used (`grid_size`) and the neighbourhood half-width (`radius`) are
run-time inputs. So any smaller problem runs on the same build.

| Memory | Entries | Width | Bits |
|---|---|---|---|
| Connected RAM | 550·549/2 = 150975 CLB pairs | 4 (wires per pair) | 603,900 |
| Locations RAM | 550 CLBs | 12 (x, y) | 6,600 |
| Occupied RAM | 47·47 = 2209 sites | 10 (CLB number or -1) | 22,090 |

That is about 79 KB in total, well inside the roughly 420 KB of block memory
on the Stratix-class device the design was sized for. The sizes are set by
the parameters `N_MAX` and `GRID` of `placer_top`. The field widths are in
`place_pkg`: 10-bit CLB numbers, 6-bit coordinates, 4-bit wire counts and a
32-bit signed wire-length change.

## How a candidate is evaluated

This is the heart of the design (`difference_ctrl`). Let `old` be the current
site of CLB `i`, `new` the candidate site, and `k` the CLB at `new` (or none).
Let `w(a,b)` be the number of wires between CLBs `a` and `b`. For every other
CLB `j`:

- moving `i` from `old` to `new` changes its wires to `j` by
  `w(i,j)·(d(new,j) − d(old,j))`;
- moving `k` from `new` to `old` changes its wires to `j` by
  `w(k,j)·(d(old,j) − d(new,j))`.

Both terms use the same two distances, so one pass over `j` does both:

    delta = Σ_j  (w(i,j) − w(k,j)) · (d(new,loc[j]) − d(old,loc[j])),   j ≠ i, j ≠ k

Wires between `i` and `k` keep their length in a swap and are skipped. For a
plain move, `w(k,j)` is taken as 0. A candidate is taken when `delta < 0`.

Per `j` the controller reads three things: `loc[j]` from the Locations RAM,
and `w(i,j)` and `w(k,j)` from the two read ports of the Connected RAM. Two
Manhattan distance units (`manhattan_dist`: two differences and a sum) feed
one small multiply–accumulate. The distance is computed for every `j`,
connected or not. The time to evaluate one candidate therefore does not depend on
how dense the netlist is, unlike a software loop that skips unconnected pairs.

The Connected RAM stores only the lower triangle of the connection matrix. A
pair (`i`, `j`) with `i > j` lives at `i·(i−1)/2 + j` (`pair_addr_encoder`).
Two encoders turn (`i`, `j`) and (`k`, `j`) into the two read addresses, and a
third turns the host's write pair into an address.

The datapath is deliberately not pipelined. Each `j` takes a fetch clock and
an accumulate clock, so one evaluation takes `2·n_clbs + 1` clocks from
`start` to `done`. Pipelining the distance calculation would give about one
`j` per clock. It is the obvious next step, but it is not built here.

## Control: the Improve controller

`improve_ctrl` runs the whole heuristic. Per CLB `i` it:

1. reads `loc[i]`;
2. clips the box `loc[i] ± radius` to the `grid_size × grid_size` array;
3. scans the box column by column (outer loop x, inner loop y), skipping
   `loc[i]` itself;
4. for each candidate, reads the Occupied RAM to find `k`, then starts the
   Difference controller. In node-move mode the candidate is evaluated as a
   plain move even when the site is occupied, and an occupied site is then
   refused whatever its delta. This is how the node-move pseudocode is
   written, and it makes node-move spend the same time per candidate as
   node-swap.
5. On the first `delta < 0` it writes the update in two clocks: first
   `loc[i] = new` and `occ[new] = i`, then `loc[k] = old` and `occ[old] = k`.
   For a move, `occ[old] = -1`. It then goes on to CLB `i+1`.

The deltas taken are summed over each iteration. A new iteration starts while
that sum is negative. Because every accepted step strictly shortens the total
length, a run always ends.

Clock count of a run, from the `place_start` clock to the `place_done` pulse:

    T = 2 + Σ_iterations [ 2 + Σ_CLBs ( 3 + Σ_candidates c ) ]
    c = 2          candidate is the CLB's own site
        2n + 4     evaluated, not taken (or refused as occupied in node-move mode)
        2n + 5     evaluated and taken (then the CLB's scan ends)

Almost all the time goes into the `2n` term. On the full-size case (550 CLBs,
47×47, 13227 random wires, radius 2) a run takes about 3·10⁸ clocks. That is
7.6 s at the 40 MHz clock the original accelerator reached.

## Start placement

`init_placer` makes the random start placement on chip. It first writes -1 to
every site of the Occupied RAM (`GRID²` clocks). Then, for each CLB, it draws
a site from a 32-bit Galois LFSR seeded by the host. The draw takes 32 LFSR
steps, and the coordinates are scaled into range by multiplication. The placer
reads the site and writes the CLB there if the site is free; otherwise it
draws again. Each draw takes 3 clocks. Instead, the host can write any start
placement directly through the load ports.

## Using `placer_top`

The host talks to the engine through plain ports. Use them only while `busy`
is low.

1. **Netlist.** For every pair `a ≠ b` of the problem, pulse `conn_we` with
   `conn_a`, `conn_b` and `conn_w` (0 means unconnected). The Connected RAM
   is not reset, so every pair must be written, zeros included.
2. **Start placement.** Set `n_clbs`, `grid_size` and `seed`, pulse
   `init_start`, and wait for `init_done`. Or write the Occupied RAM (every
   site, with -1 for free ones) and the Locations RAM through `occ_*` and
   `loc_*`. Keep `n_clbs ≤ grid_size²`.
3. **Place.** Set `radius` and `swap_en`, pulse `place_start`, and wait for
   `place_done`. Keep the configuration inputs stable during the run.
4. **Read back.** `rd_clb` gives `rd_loc` one clock later, and `rd_cell`
   gives `rd_occ`. `iterations`, `moves`, `swaps`, `evals`, `skipped` (occupied sites refused in node-move mode) and
   `total_delta` describe the last run. `total_delta` is the change in total
   wire length, each wire counted once.

Port ownership: the Improve controller owns the RAM ports while placing, the
initial placer while initialising, and the host otherwise. Assertions flag a
command issued while busy.

## What follows the original design and what does not

Taken from the original accelerator:

- the node-move/node-swap heuristic, with first-improvement acceptance and
  iteration until no gain;
- the three RAMs and their contents: CLB→site, site→CLB or -1, and wires per
  CLB pair stored as a linear lower triangle behind an address encoder;
- the Improve/Difference controller split;
- distance computed for all pairs, connected or not;
- a non-pipelined distance datapath;
- the 550-CLB limit and a 40 MHz target clock.

Choices made in this implementation:

- **Wire weighting.** The wire-length change is weighted by the number of
  wires per pair. The source pseudocode adds one distance per connected pair,
  but its memory stores a wire count and its netlist is a multigraph. On a
  netlist with at most one wire per pair both give the same result.
- **Swap in one pass.** The swap partner `k` is handled in the same pass over
  `j` through the two-read-port Connected RAM, using the formula above.
- **Field widths.** The widths are chosen here. A pair can hold at most 15
  wires.
- **Neighbourhood shape and size.** The box is a square of half-width
  `radius`, scanned x-major. No value for its size is fixed; the testbenches
  use 2.
- **Everything around the core.** The host interface, the on-chip random
  initial placer, the statistics counters and the two-clock update sequence
  are this design's own.
- **Mode switch.** Node-move mode is kept as a `swap_en` input rather than as
  a separate design.

Not verified: synthesis for an FPGA, the 40 MHz clock, and resource use. Only
simulation and lint/elaboration checks have been done.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
`tb/place_ref_pkg.sv` is a software model of the heuristic. It visits CLBs and
candidates in the same order as the hardware, so final placements must match
exactly. It also predicts the exact clock count of a run.

| Testbench | What it checks |
|---|---|
| `tb_manhattan_dist` | corner cases and random pairs against \|dx\|+\|dy\| |
| `tb_pair_addr_encoder` | all 150975 pairs in both orders get consecutive, distinct addresses |
| `tb_locations_ram`, `tb_connected_ram`, `tb_occupied_ram` | full fill and read-back, read latency, read during write, out-of-grid accesses |
| `tb_difference_ctrl` | deltas of moves and swaps against the model, `2n+1` latency, up to 550 CLBs |
| `tb_improve_ctrl` | complete runs against modelled RAMs and Difference controller: placement, counters, exact clocks |
| `tb_init_placer` | non-overlap, consistency of both RAMs, a completely full grid, 550 CLBs on 47×47 |
| `tb_placer_top` | end-to-end at 64 CLBs / 16×16. Every mechanism must occur: move, swap, occupied candidate refused in node-move mode, multi-iteration run, box clipped at the grid edge, placer collision, host-loaded placement |
| `tb_table1_workloads` | default build; test cases of 20/150/280 CLBs with sparse and dense random netlists; node-move and node-swap from the same start placement |
| `tb_table1_case4` | default build; 410 CLBs on 41×41, sparse and dense, node-swap |
| `tb_placer_full` | default build, one complete 550-CLB, 47×47 run (about 3 minutes of simulation) |

The test netlists are random multigraphs with a given number of wires. The
"dense" cases use `n(n−1)/2` random wires, so some pairs get several wires and
others none. With exactly one wire on every pair, no swap could ever change
the length.

Some results from `tb_table1_workloads` and `tb_table1_case4` (radius 2,
lengths count each wire once, times are clocks at 40 MHz). Both heuristics
start from the same random placement:

| Case | Netlist | Node-move length (time) | Node-swap length (time) |
|---|---|---|---|
| 20 CLBs, 9×9 | 27 wires | 44 (2.0 ms) | 39 (1.9 ms) |
| 20 CLBs, 9×9 | 190 wires | 514 (2.2 ms) | 445 (2.1 ms) |
| 150 CLBs, 25×25 | 1118 wires | 8457 (0.44 s) | 6455 (0.23 s) |
| 150 CLBs, 25×25 | 11175 wires | 88320 (0.20 s) | 81125 (0.45 s) |
| 280 CLBs, 34×34 | 3255 / 39060 wires | – | (1.23 s / 1.29 s) |
| 410 CLBs, 41×41 | 6987 / 83845 wires | – | 72967 / 1046951 (4.0 s / 3.9 s) |
| 550 CLBs, 47×47 | 13227 wires | – | 167071 (7.6 s) |

Node-swap always ends shorter. Its run time relative to node-move depends on
how many iterations each needs. Every candidate costs the same `2n+4` or
`2n+5` clocks in both modes. The dense netlist of the largest case (550 CLBs,
150975 wires) and node-move on the larger cases were not simulated, because
of simulation time.

### Running with Verilator

All packages come first on the command line; `-y` lets Verilator find the
other modules. For example, for the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/place_pkg.sv tb/place_ref_pkg.sv tb/tb_placer_top.sv \
      --top-module tb_placer_top -o sim
    ./obj_dir/sim

Swap `tb_placer_top` for any other testbench name. For lint only:
`verilator --lint-only -Wall -Irtl rtl/place_pkg.sv rtl/placer_top.sv -y rtl`.

## Files

- `rtl/place_pkg.sv`: sizes, widths and the `loc_t` type
- `rtl/placer_top.sv`: top level, host ports, port multiplexing
- `rtl/improve_ctrl.sv`, `rtl/difference_ctrl.sv`: the two controllers
- `rtl/init_placer.sv`: random start placement
- `rtl/locations_ram.sv`, `rtl/occupied_ram.sv`, `rtl/connected_ram.sv`: the memories
- `rtl/pair_addr_encoder.sv`, `rtl/manhattan_dist.sv`: address encoder and distance unit
- `tb/`: testbenches, the reference model (`place_ref_pkg.sv`) and the shared host tasks (`placer_host_tasks.svh`)
