# HMPM: a reconfigurable hybrid macro-pipeline multiprocessor

Some applications split into independent parallel parts, and others are long
chains of dependent steps. A multiprocessor built only for parallel work wastes
its processors on the chains. A pure processor pipeline wastes them on the
parallel parts. The hybrid macro-pipeline multiprocessor (HMPM) does both:

* **Between clusters the work runs in parallel.** A task is split into four
  subtasks, one per cluster, and the four clusters run at the same time.
* **Inside a cluster the work is a macro pipeline.** A subtask is split again
  into stages, and each processing element (PE) of the cluster runs one stage.
  Each PE passes its result to the next PE, so several data items are in the
  cluster at different stages at once.
* **Clusters change size.** A new task loads the clusters differently. The
  machine counts the cycles of each cluster's subtask and gives each cluster a
  share of the PEs in proportion to that count. It then moves PEs between
  neighbouring clusters, one at a time, until each cluster has its share.

This repository holds synthesizable SystemVerilog for the interconnect,
buffering and reconfiguration logic of such a machine. The processors inside
the PEs, and the controller software that splits tasks, are outside it (see
*What is not in the RTL*).

## Structure

```
                 upper buses (one per cluster; the last stage of a cluster drives its bus)
  res[0] <====================================================================
  res[1] <====================================================================
  res[2] <====================================================================
  res[3] <====================================================================
              ^                 ^                    ^                  ^
         +----|------+   +------|-------+   +-------|-----+   +--------|-----+
         | PE->PE->PE|-->|PE->PE->PE->PE|-->|PE->PE->PE  |-->|PE->PE->PE->PE|   one PE chain
         +-^---------+   +-^------------+   +-^-----------+   +-^------------+
           |  cluster 0    |  cluster 1       |  cluster 2      |  cluster 3
  =========+===============+==================+=================+=========  lower bus
                                   ^
                            [ input queue ]  <- external data, tagged with a cluster
```

All sixteen PEs sit on **one linear chain**. A cluster is a contiguous run of
that chain, so the whole configuration is given by three boundaries. Moving a
boundary by one place hands one PE from a cluster to its neighbour. Each PE
keeps a **cluster status** register. A PE works out its role by comparing its
status with its two chain neighbours:

| role | condition | input from | output to |
|---|---|---|---|
| first stage | left neighbour has another status | lower bus, items tagged with its cluster | next PE |
| middle stage | both neighbours have the same status | previous PE | next PE |
| last stage | right neighbour has another status | previous PE | upper bus of its cluster |

A one-PE cluster is both first and last. The chain link between two clusters
exists, but it is never used: the last PE of a cluster does not send to the
right, and the first PE of the next cluster does not accept from the left.

| module | job |
|---|---|
| `hmpm_pkg` | default sizes; the power-on layout (an even split) |
| `sync_fifo` | input queue for tagged external data (8 words) |
| `lower_bus` | shows the queue head to every PE; the first PE of the tagged cluster takes it; can be held |
| `pe_node` | one per PE: status register, role detection, input/output switch, one-word output register |
| `upper_bus` | one bus per cluster. The PE whose switch is closed onto a bus is its only sender, so there is no arbiter. An assertion checks this. |
| `reconfig_ratio` | target PE count of each cluster from the subtask cycle counts |
| `reconfig_ctrl` | moves cluster boundaries one PE per clock until they reach the targets |
| `hmpm_top` | wires the above; sequences a reconfiguration |

## How a data item travels

1. The controller writes a word and its cluster number into the queue
   (`ext_valid/ext_ready`, `ext_cluster`, `ext_data`).
2. The lower bus shows the oldest word to all PEs. The PE that is currently
   the first stage of the tagged cluster takes it, once its processor is ready.
   While that processor is busy, the word waits at the head of the queue. This
   also blocks words for other clusters, because there is a single lower bus
   and a single queue.
3. Each processor receives the word on `core_in_*` and returns a result on
   `core_out_*`. The `pe_node` keeps the result in its output register until
   the next stage takes it. A full output register drops `core_out_ready`, so
   a slow stage stalls the stages before it.
4. The last stage sends the result on its cluster's upper bus, which is
   `res_valid/res_data/res_ready[k]` at the top. Results of one cluster leave in
   the order their words entered.

Every transfer uses a valid/ready handshake. A word entering a first stage is
combinational from the queue head to `core_in`. A result accepted from a
processor in cycle n is offered to the next stage in cycle n+1.

## Reconfiguration

This is the part of the design that needs the most care.

### The target sizes

With cycle counts `x_i` for the four subtasks and `P` PEs in all, cluster `i`
gets

```
PE_i' = x_i * P / Tc,        Tc = x_0 + x_1 + x_2 + x_3
```

so a cluster's share of PEs equals its share of the work. The general form
is `Tc = sum(x_i) + v`, where `v` is the queue and bus overhead in cycles. The
heuristic takes `v` as zero. Here `v` is an input (`cfg_v`), so drive it with
zero for that behaviour. A non-zero `v` shrinks every floor, and the most
loaded cluster picks up the PEs that frees. The formula does not give whole numbers, so
`reconfig_ratio` rounds as follows (these rules are this design's own):

* it takes `floor(x_i * P / Tc)`;
* it raises any zero to one, because a cluster with no PE could not run its
  subtask;
* it adds any PEs still unassigned to the most loaded cluster (largest `x_i`,
  lowest index on a tie), or takes any surplus from it, so that the targets
  always add up to `P`.

If all `x_i` are zero, the even split is returned. The correction cannot push
the most loaded cluster below one PE as long as `P >= C*C`; the defaults
(`P = 16`, `C = 4`) meet this.

Example: `x = {7000, 1000, 1000, 1000}` gives floors `{11, 1, 1, 1}`. That sums
to 14, so cluster 0 gets the two spare PEs: `{13, 1, 1, 1}`.

One restoring divider, shared by all clusters, computes the four quotients at
one bit per clock. `done` is high `C*(CYC_W + clog2(P+1)) + 1` = 149 clocks
after `start` at the defaults.

### Moving PEs

`reconfig_ctrl` keeps boundary `b_i`, the index of the first PE of cluster
`i+1`. Each clock it moves one boundary one step towards its target:

* **grow** (`b_i` below its target): the first PE of cluster `i+1` joins
  cluster `i`;
* **shrink** (`b_i` above its target): the last PE of cluster `i` joins
  cluster `i+1`.

Each move goes out on `move_*`, and the PE concerned rewrites its status
register. A move that would leave a cluster with no PE is not made. The
lowest-numbered boundary that may legally move goes first. When the targets
are all at least one and add up to `P`, some boundary can always move. The walk
therefore ends after exactly `sum_i |b_i - target_i|` moves: no more than
needed, and never a deadlock.

Example: going from `{4,4,4,4}` to `{13,1,1,1}`, all three boundaries must
move right (by 9, 6 and 3). Boundary 0 moves first, until cluster 1 is down to
one PE. Then boundary 1 moves one step, which lets boundary 0 move one more,
and so on. That is 18 moves in all.

### The sequence at the top

1. The controller pulses `cfg_start` with `cfg_x` while `cfg_busy` is low.
2. The lower bus is held at once, so no new word enters a cluster.
   `lb_stalled` shows when words are waiting in the queue because of this.
3. The ratio is computed. At the same time, words already inside the clusters
   keep flowing out. An in-flight counter tracks them: it rises when the lower
   bus hands a word to a cluster and falls when a result leaves an upper bus.
4. The moves start only when the ratio is ready **and** the in-flight count is
   zero. Changing a PE's status while it holds data would send that data to the
   wrong place, and two assertions check that this never happens.
5. One PE moves per clock (`cfg_move`, `cfg_move_grow`). When the moves are
   done, `cfg_done` pulses and the lower bus is released.

When nothing has to drain, `cfg_done` is high `152 + N` clocks after
`cfg_start` (N = PEs moved). If results are held back on the upper buses, the
moves wait for them.

## Top-level interface (`hmpm_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (even split, empty pipeline) |
| `ext_valid/ext_ready` | in/out | 1 | write into the input queue |
| `ext_cluster`, `ext_data` | in | 2, 32 | destination cluster and data word |
| `cfg_start` | in | 1 | request a reconfiguration (taken when `cfg_busy` is low) |
| `cfg_x` | in | 4 x 32 | cycle count of each cluster's subtask |
| `cfg_v` | in | 32 | queue and bus overhead cycles added to the task cycle count (normally 0) |
| `cfg_busy`, `cfg_done` | out | 1 | reconfiguration in progress / finished (pulse) |
| `cfg_move`, `cfg_move_grow` | out | 1 | a PE changes cluster this cycle / it joins the left cluster |
| `cluster_size` | out | 4 x 5 | current PE count per cluster |
| `pe_cluster`, `pe_first`, `pe_last` | out | 16 x 2, 16, 16 | status and role of each PE |
| `queue_count`, `lb_stalled` | out | 4, 1 | queue fill level; queue blocked by a reconfiguration |
| `res_valid/res_data/res_ready` | out/out/in | 4, 4 x 32, 4 | upper bus of each cluster |
| `core_in_valid/_data/_ready` | out/out/in | 16, 16 x 32, 16 | word to each PE's processor |
| `core_out_valid/_data/_ready` | in/in/out | 16, 16 x 32, 16 | result from each PE's processor |

Parameters: `CLUSTERS` = 4, `PES` = 16, `DATA_W` = 32, `CYC_W` = 32 (width of a
cycle count), `Q_DEPTH` = 8. The architecture fixes only the four clusters and
four buses. The PE count, the widths and the queue depth are choices of this
design. Keep `PES >= CLUSTERS*CLUSTERS`.

## What is not in the RTL

* **The PE processor.** The architecture uses identical processors as PEs,
  but specifies no instruction set or datapath. Their handshake ports are
  brought out of the top. For simulation, `tb/pe_core_model.sv` stands in for
  one: it adds one to each word after 1 to 4 cycles.
* **The partitioning controller.** This is itself a processor. It splits a
  task into subtasks, using the parallelism of the task across clusters and its
  critical path within a cluster, and reads the cycle counts stored with the
  application. That is software. Here it appears only as the `ext_*` and
  `cfg_*` ports that it would drive.

## Where this design chooses for itself

These points are not fixed by the architecture description:

* All buses are modelled as one-way multiplexed paths with valid/ready, not as
  bidirectional tri-state buses.
* The lower bus only carries words towards the clusters.
* Each upper bus returns its cluster's results and closes the loop from the
  cluster's last stage back to the controller side.
* Words on the lower bus carry a cluster tag.
* There is one queue, so a word that cannot enter its cluster blocks the words
  behind it.
* Rounding of the ratio, the one-PE minimum, the order of moves, one move per
  clock, and draining the clusters before any move are all this design's own.
* The overhead `v` in the task cycle count is supplied from outside, because
  how it would be measured is not defined.
* Clusters exchange no data with each other. Each cluster's results go back
  to the controller side on its own upper bus. The architecture says that the
  buses also carry traffic between clusters, but gives no protocol for it.
* A cluster's load is not sensed by hardware. The controller supplies the
  subtask cycle counts and asks for a reconfiguration when a new task
  arrives.
* The original heuristic updates the PE count in its shrink branch by `+1`.
  This design decreases the count by one, since the shrinking cluster gives a
  PE away.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares against
values worked out in the testbench, and ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | checks |
|---|---|
| `tb_sync_fifo` | order, full/empty, simultaneous read and write, count, against a reference queue |
| `tb_lower_bus` | broadcast, hold, handshake, per-cluster take strobe |
| `tb_upper_bus` | random single-sender configurations: data, valid, owner, ready |
| `tb_pe_node` | random traffic against a reference model: roles, switching, output register, stalls, status updates |
| `tb_reconfig_ratio` | targets against a reference model for fixed and random loads; latency of 149 clocks |
| `tb_reconfig_ctrl` | each move is legal, no cluster ever empty, final layout, minimal move count, done timing |
| `tb_hmpm_top` | whole machine at default size with 16 processor models (below) |

`tb_hmpm_top` streams random words to random clusters while the result
buses push back at random. Every result must equal its input word plus the
size of its cluster, and must come out in order. Between bursts the test
reconfigures to several loads, including ones that send PEs in both
directions. It checks cluster sizes, PE status and roles, and the
reconfiguration time. One reconfiguration is requested in the middle of a
burst, with the results held back for longer than the ratio takes, so the
moves must wait for the drain. The test also counts how often each mechanism
happens, and fails if any never does:

* the queue filling up;
* the lower bus being held;
* draining, and moves waiting for it;
* grow moves and shrink moves;
* a stage stalling;
* backpressure on the results;
* results on every bus.

It runs in seconds.

To run one with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/hmpm_pkg.sv tb/tb_hmpm_top.sv --top-module tb_hmpm_top -o sim
./obj_dir/sim
```

Swap in another testbench name to run a single block's test.

## How far to trust it

* Simulation and lint cover all of it. It has not been built in an FPGA or
  run with real processors.
* Verilator `-Wall` and the slang front end accept every file. There are no
  latches, combinational loops or multiply-driven nets. The only remaining
  warnings are for unused helper outputs and two unused arithmetic carry bits.
* The processor interface is a plain valid/ready stream. A real processor core
  needs a shell that maps its I/O onto it.
* The architecture defines the interconnect and the reconfiguration rule only
  at block level. Every handshake, width and timing here is this design's own,
  and is documented in the opening comment of each file.
