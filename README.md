# A* path-planning accelerator for a 256 x 256 grid

This is synthesizable SystemVerilog for a hardware A* search engine. It finds the
least-cost path between two nodes of a 256 x 256 grid map in which every node
is either free or an obstacle. Moves go to any of the eight neighbours: a
straight step costs 10 and a diagonal step costs 14.

Software A* is slow for two reasons. Every iteration makes many memory accesses,
and every iteration has to keep its open list sorted. This design attacks both:

* **Parallel evaluation.** The eight children of the node being expanded are
  costed at the same time by eight evaluators.
* **Eight sorted open lists.** Each evaluator owns one shift-register priority
  queue that sorts a new entry in a single cycle. A one-phase comparator engine
  picks the best of the eight queue heads.
* **A register cache of the map.** A *memory manager* keeps the 5 x 5 block of
  node records around the current node in registers. When the search steps to a
  neighbour, the new 3 x 3 neighbourhood is already there and is served at once.
  The window then refills itself from memory in the background.

The structure follows the paper "Fast RTL Implementation of A* Path Planning
Algorithm" (Osama et al.). That paper gives the block diagram, the 5 x 5 window
idea, the queue type and its length (313), and the comparator scheme. Widths,
handshakes, cost weights, the write-back policy and every cycle-level detail
are this implementation's own. They are listed under "Departures and own
choices" below.

## Block diagram

```
              map_* (host)             start/start_pos/goal_pos
                  |                              |
            +-----v------+   +-------------+   +--v------------+   path_*
            | node_mem   |<->| mem_manager |<->| nodes_manager |---> path_extractor --->
            | 65536 recs |   | 5x5 window  |   |  controller   |      (reads node_mem)
            +------------+   +-------------+   +--+---------^--+
                                                  | 3x3      | best node
                                    +-------------v--+    +--+----------------+
                                    | evaluator x 8  |--->| priority_queue x 8|
                                    | G, H, F        |    | 313 entries each  |
                                    +----------------+    +--+----------------+
                                                             | 8 heads
                                                       +-----v-------------+
                                                       | comparator_engine |
                                                       +-------------------+
```

Every node has one record in `node_mem` (`astar_pkg::node_t`, 38 bits):

| field      | bits | meaning                                         |
|------------|------|-------------------------------------------------|
| `parent`   | 16   | x, y of the node it was reached from            |
| `g`        | 20   | cost from the start; all ones means "not reached" |
| `closed`   | 1    | the node has been expanded                      |
| `obstacle` | 1    | the node cannot be entered                      |

## One search, iteration by iteration

`nodes_manager` runs this loop:

1. **Fetch.** It asks the memory manager for the node to expand. The first
   node is the start node. Every later node is the least-F queue head that the
   comparator engine names. That entry is popped in the same cycle.
2. **Inspect.** It waits until the memory manager shows the node's 3 x 3
   neighbourhood.
   * If the node is already `closed`, the entry was a stale duplicate. It is
     skipped.
   * If the node is the goal, the search ends.
   * Otherwise the node is marked `closed`, and the eight evaluators start.
3. **Evaluate.** Evaluator *k* looks at child *k* and computes
   `G_new = G + 10` (or `+ 14` for a diagonal child), the octile heuristic
   `H = 10*(|dx|+|dy|) - 6*min(|dx|,|dy|)` to the goal, and `F = G_new + H`.
   The child is kept if it is inside the map, not an obstacle, not closed, and
   `G_new` is below its stored `g`.
4. **Write.** One cycle later, each kept child gets its new `g` and its parent
   in the window, and `{F, child}` goes into that evaluator's own queue.
5. **Next.** Back to step 1. If all eight queues are empty, no path exists.

A child can be improved again after it has been queued, so a queue may hold
stale entries for the same node. Instead of searching the queues to remove
them, the design drops them when they are popped (the `closed` test in step 2).
The heuristic is consistent with the step costs, so the first time a node is
expanded it already has its final cost.

When the goal is reached, the memory manager writes its window back. Then
`path_extractor` follows the `parent` pointers from the goal to the start and
streams the nodes out.

Best case, one iteration takes 3 controller cycles: fetch, inspect and
evaluate. In practice the memory manager's refill sets the pace (next section).

## The 5 x 5 window (`mem_manager`)

This block is the part that matters most for speed, and the hardest to follow.

The window `w[r][c]` holds the records of the nodes at `(cx+c-2, cy+r-2)`,
where `(cx, cy)` is the current node (`center`). The inner 3 x 3 is served on
`nb[0..8]`, indexed `(dy+1)*3 + (dx+1)`; the centre is index 4. Each cell has
two state bits:

* `have`: the record is present.
* `need`: the record still has to be read from memory.

Cells outside the map are given a fixed obstacle record and never go to memory.

**Hit: the request is one of the eight neighbours, or the centre itself.**
In the cycle the request is accepted, the whole window shifts by
`(dx, dy)`.

* The inner 3 x 3 of the new centre was part of the old 5 x 5, so `nb_valid`
  is high in the very next cycle.
* The column and/or row that shifted out (5 cells, or 9 for a diagonal step)
  goes into a write-back buffer.
* The cells that shifted in are marked `need`.
* Each following cycle does one read and one write-back. So a straight step
  costs 5 memory cycles and a diagonal step 9.
* These transfers overlap with the controller's evaluate cycle.
* A read address can never be waiting in the write-back buffer: the cells that
  left are outside the new window.

**Miss: any other node.** The window moves by the same rule:

* cells that the old and new windows share are kept;
* the rest are written back;
* the new cells are read.

On a jump of five or more nodes the windows share nothing, so all 25 cells go
out and all 25 come in. The new inner 3 x 3 now has to come from memory, so
`nb_valid` stays low until those nine cells are loaded. This low `nb_valid` is
the "halt" the controller waits on. The inner nine are always read first, so
the halt lasts about 10 cycles. The rest of the window fills while the
controller evaluates.

Reads and write-backs never collide, for either kind of move:

* a cell is read only if it was not in the old window;
* a cell is written back only if it is not in the new one.

That is why both can run at full rate in parallel, one of each per cycle.

**Write-back policy.** Records that the controller changes (new `g`, `parent`,
`closed`) are written only into the window registers. They reach `node_mem`
when their cell leaves the window, or on `flush`. A new request is accepted
(`req_ready`) only when:

* no read is pending or in flight, and
* the write-back buffer is empty.

The window therefore never moves while memory traffic is in flight.

Refill order: the inner 3 x 3 first, then the outer ring in row-major order.

## Open list: queues and comparator engine

`priority_queue` is a sorted shift register of `DEPTH` entries `{F, x, y}`,
with the least F at position 0.

* **Insert.** A new entry is compared with all stored entries at once. Each
  cell then keeps its entry, takes the new one, or takes its left neighbour's.
  Insertion and sorting take one cycle.
* **Pop.** A pop shifts the queue towards the head. A pop and an insert can
  happen in the same cycle.
* **Ties.** A new entry goes in front of stored entries with the same F, so
  among equal costs the newest node wins. Along open ground this makes the
  search run straight at the goal.
* **Overflow.** When the queue is full, the largest entry is lost (`dropped`
  pulses). After such a loss the path found may be longer than the shortest
  one. The default length, 313, is the paper's choice for eight queues.

`comparator_engine` compares all eight heads with each other in one
combinational phase. Only the 28 comparators for pairs `i < j` exist. The
opposite outcome ("j beats i") is the inverse of the same comparator, which
saves about half of them. Ties go to the lower queue index, so exactly one
queue is selected.

## Interface (`astar_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `map_we`, `map_pos`, `map_obstacle` | in | write one map node per cycle, only while `busy` is low |
| `start`, `start_pos`, `goal_pos` | in | one-cycle pulse starts a search; only while `busy` is low |
| `busy`, `done`, `found` | out | `done` pulses at the end; `found` holds the result |
| `path_valid`, `path_pos`, `path_last` | out | the path, goal first, one node every 2 cycles; `path_last` marks the start node |
| `path_error` | out | the parent chain did not reach the start (cannot happen in a correct run) |
| `stat_*` | out | for the last search: cycles, expanded nodes, window hits, misses, stale entries skipped, queue entries dropped |

Protocol:

1. Write **all** 65536 nodes. A map write stores `g` = "not reached",
   `closed` = 0 and the obstacle bit. A search leaves costs and flags behind,
   so the map must be rewritten before each new search.
2. Pulse `start`.
3. Collect `path_*` until `done`.

The only parameter of the top is `QDEPTH` (default 313). The map size
(`CW` = 8 bits per coordinate), the cost widths and the cost weights are
constants in `astar_pkg`.

## Measured behaviour

`tb_astar_full` runs the design at its default size. It searches from (0,0) to
(255,255) on three random maps per obstacle density. Times assume a 200 MHz
clock, the frequency reported for the original FPGA implementation.

| obstacles | maps with a path | avg. time, searches that found a path | cycles per map (found) | searches with no path |
|-----------|------------------|----------------------------------------|------------------------|-----------------------|
| 10 %      | 3 of 3           | 0.26 ms                                | 47 744 – 59 067        | –                     |
| 20 %      | 3 of 3           | 0.65 ms                                | 115 639 – 147 219      | –                     |
| 30 %      | 3 of 3           | 1.06 ms                                | 196 029 – 223 239      | –                     |
| 40 %      | 2 of 3           | 1.07 ms                                | 193 482 – 234 181      | 5.76 ms: 39 317 nodes expanded before the queues ran dry |
| 50 %      | 2 of 3           | 1.74 ms                                | 314 132 – 382 333      | 0.001 ms: start was walled in |

The testbench prints, per search, the expanded nodes, window hits and misses,
stale entries and queue drops.

Every path returned is legal: adjacent steps, no obstacle, from the goal back
to the start. The testbench checks that its cost is never below the exact
least cost computed by the reference model. When no queue entry was dropped,
the cost must equal it. In these runs every path found had the least cost,
even on the 10–40 % maps where queue overflow dropped entries. No entries
were dropped at 50 %.

The paper reports 0.198 / 0.379 / 0.556 / 0.765 / 1.078 ms for 10–50 %, as
averages over 1000 maps. The searches above that found a path took 1.3–1.9
times as long, on far fewer maps. Most of the time goes into misses. Stale
queue entries also cost a fetch each before they can be recognised: on the
first 10 % map, 965 of the 3 349 fetches were stale.

## Departures and own choices

Taken from the paper:

* the block structure;
* the record fields;
* the 256 x 256 map;
* the octile heuristic;
* eight evaluator/queue lanes;
* shift-register queues of 313 entries with one-cycle insertion;
* the one-phase comparator with inverter sharing;
* the 5 x 5 window that serves a 3 x 3 block and halts on a non-neighbour move.

Chosen here, because the paper leaves them open:

* **Cost weights.** D = 10, D2 = 14, also used as the step costs.
* **Widths.** G is 20 bits and F is 21 bits. Corner cutting is allowed:
  diagonal moves past obstacles are legal.
* **Memory.** One read and one write port with one-cycle read latency. The
  memory manager uses write-back and moves one record per cycle in each
  direction. Misses are handled as window moves that keep the shared cells,
  and the inner cells are read first.
* **Queues.** The tie rule and the overflow rule (drop the largest entry).
  Stale entries are removed lazily.
* **Controller.** The controller's state sequence. The search ends when the
  goal is expanded.
* **Path extractor.** The paper only names it, next to the nodes manager in
  its block diagram. Here it is started by the nodes manager and reads the node
  memory directly, through the read port the memory manager leaves idle after
  its flush. It walks the parent pointers and streams the path.
* **Host side.** The host map port, and the statistics counters. The FPGA
  debug cores (virtual I/O, logic analyser, clock generator) are replaced by
  plain top-level ports and a single clock.

The paper's UVM environment, formal property set and Vivado floorplanning are
not reproduced.

## Files

`rtl/` (one unit per file):

* `astar_pkg.sv`: constants, record and queue-entry types, child numbering, the octile function
* `node_mem.sv`: map memory
* `mem_manager.sv`: 5 x 5 window cache
* `nodes_manager.sv`: controller
* `evaluator.sv`: child cost evaluation, parameter `K` = direction
* `priority_queue.sv`: sorted shift-register queue
* `comparator_engine.sv`: best-of-eight selection
* `path_extractor.sv`: path read-out
* `astar_top.sv`: top level

`tb/` (self-checking; each prints `TB_RESULT checks=N failures=M`):

* `tb_<block>.sv`: one per block. `tb_astar_top.sv` is the end-to-end test
  with short queues, so that overflow occurs. It makes window hits, misses,
  stale entries, queue drops, map-border cells, an unreachable goal and
  start = goal each happen, and it checks every path against the reference.
* `tb_astar_full.sv`: the default-size workload above. It takes about 4
  minutes in Verilator.
* `astar_ref_pkg.sv`: the reference model. It computes exact least costs by
  repeated forward/backward relaxation sweeps and checks paths.

To simulate with Verilator, run from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/*.sv tb/astar_ref_pkg.sv tb/tb_astar_top.sv \
  --top-module tb_astar_top
./obj_dir/Vtb_astar_top
```

A unit test needs only the package, its block and its testbench, for example
`rtl/astar_pkg.sv rtl/priority_queue.sv tb/tb_priority_queue.sv`.
