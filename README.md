# Autonomic reconfiguration control for a tile-based FPGA

A self-adaptive embedded system, such as a drone tracking a target with a
camera, keeps several hardware implementations of each of its tasks. The
implementations differ in how much FPGA area they use and how fast or how well
they run. At run time the system picks one implementation per task and loads
it into shared, partially reconfigurable regions of the FPGA called *tiles*.
Deciding *which* version to run and *when* to reconfigure is a control
problem. This RTL implements it as three layers that talk through narrow
interfaces:

```
 mission layer (outside)     start/stop, good-performance interval, target speed
        |                                   ^ no_config
        v                                   |
 reconfiguration manager   automaton of the task + control logic  (reconfig_manager)
        |  version to run                   ^ execution time of each iteration
        v                                   |
 scheduling layer          table generator -> double-banked table -> scheduler
        |  load bitstream / start node      ^ load done / node done
        v                                   |
 tiles and partial-reconfiguration port (outside)
```

The example task is an object tracker with three versions. Version *v* runs
*v* KLT trackers in parallel. More trackers mean more area and a shorter
execution time. The manager watches the measured execution time of each
iteration and moves between versions to stay inside an interval given by the
mission layer.

## The reconfiguration manager

`tracking_task` is an automaton with four states: OFF, Version 1, Version 2 and
Version 3. Each version carries fixed attributes:

| version | res (area) | win (tracker window) | wcet |
|---------|-----------:|---------------------:|-----:|
| 1       | 1          | 1                    | 5    |
| 2       | 2          | 2                    | 4    |
| 3       | 3          | 1                    | 3    |

The automaton itself has no policy. It follows three *controllable* inputs
c1..c3: a request `r` starts the version whose c is set, `e` stops the task,
and a running version Vi moves to Vj when cj is set and ci is not.

The policy lives in `tracking_ctrl`, a purely combinational block. It picks
c1..c3 so that these objectives hold across a step:

* a run that was too slow (time >= max_thres) leads to a version with a smaller wcet;
* a run that was too fast (time <= min_thres) leads to a version with a larger wcet;
* a report of high target speed leads to a wider window, and a report of low speed to a narrower one;
* a fresh start uses the version with the fewest resources.

If no objective applies, the version stays. If one applies, the controller
takes the qualifying version whose wcet is closest to the current one, with
ties going to fewer resources. So the task climbs 1 → 2 → 3 one step at a time
and comes back the same way. If nothing qualifies (for example, too fast while
already on version 1), the version stays and `no_config` tells the mission
layer that its constraints cannot be met.

`reconfig_manager` is the integration logic around the automaton and the
controller. The thresholds and the speed are latched when their strobes
arrive. A *step* (one reaction of the automaton) happens only in a cycle with
a start request, a stop request, or a new execution time (`time_valid`). A
speed report is used by the first step after it and then dropped. `cmd_valid`
marks the cycle after a step that changed the version.

## The scheduling table

The scheduling layer does not run tasks directly. It runs a table in which
each row is one node of a task's DAG (directed acyclic graph of hardware
functions), and each node is one bitstream:

| col | field      | meaning |
|----:|------------|---------|
| 0   | TileID     | tile the node runs on |
| 1   | FileID     | bitstream of the node |
| 2   | Next       | row released when this node completes (same DAG) |
| 3   | Load       | row that takes over this node's tile when it completes (-1: keep the bitstream) |
| 4   | Activate   | row released when this node *starts* (parallel siblings) |
| 5   | Countdown  | dependencies still outstanding; the node is ready at 0 |
| 6   | Count      | number of dependencies; Countdown is reloaded from it |
| 7   | TaskID     | task the node belongs to |
| 8   | ReplaceBy  | -1: keep running; -2: stop this DAG; n: continue in row n of the next table |
| 9   | Starting   | first node of a DAG |

Row references are signed 6-bit values (`row_id_t` in `amr_pkg`).

### How the scheduler runs a table (`scheduler`)

This is the core of the design. Each tile has an *owner* row.

* **Table start.** When a table becomes active, every tile goes to the lowest
  row mapped to it, and the working countdowns are copied from column 5.
* **Loading.** A tile whose owner needs a bitstream the tile does not hold is
  reconfigured through the single load port (`ld_req` … `ld_done`). This
  happens as soon as ownership passes, so loading overlaps with work on other
  tiles. A tile that already holds the right bitstream is not reloaded, and a
  row with Load = -1 keeps its bitstream from one iteration to the next.
* **Start.** A node starts when it owns its tile, the bitstream is loaded, the
  tile is idle and its countdown is 0. Starting reloads its countdown from
  Count. It also decrements the countdown of its Activate row, which is how
  several children of one parent are released together.
* **Completion.** When a node completes (`ex_done`), the countdown of its Next
  row is decremented and its tile passes to its Load row. If the Next row is
  a starting node, one iteration of the DAG is over. `met_valid` then reports
  the task ID and the cycles since that starting node began. DAGs repeat
  because their last node's Next points back to their starting node.

One row is examined per clock, round robin. A cycle that retires a
completion does not scan. Start and load commands are one-cycle pulses.

### Switching to a new table without interrupting a DAG

`sched_table` holds two banks: the active table and the next table. The
generator writes the next table, commits it with its length, and then
rewrites ReplaceBy in the active table's starting rows. A starting row whose
ReplaceBy is not -1 is not started again once its countdown reaches 0, so its
DAG parks at the end of its current iteration. When every DAG of the active
table has parked, no tile is busy and no load is running, the scheduler
pulses `swap` and takes over the next table. Tiles keep their bitstreams
across the switch, so an unchanged node is not reloaded.

### Generating a table (`table_gen`)

The generator receives a list of (task ID, version) pairs. It lays out the
DAG of each version one after the other. The DAG library is the function
`dag_node()` in `amr_pkg`. For the tracker, version *v* is:

    motion estimation (tile 0) -> Harris (tile 1) -> v trackers (tiles 2..v+1, started together)
                               -> object localizer (tile 0, waits for all v trackers) -> back to the start

Load is computed per tile: each row points to the next row in row order,
wrapping around, that uses the same tile. A row alone on its tile gets -1.
Motion estimation and the localizer share tile 0, so tile 0 is reconfigured
twice per iteration. The trackers' tiles keep their bitstream.

The table is then written row by row, committed, and followed by the
ReplaceBy writes. A task that is in the new list continues at its new
starting row. A task that is not gets -2. A generation takes 2·NROWS + 2
cycles, and it waits while a previous next table has not yet been taken.
`overflow` flags DAGs that do not fit in NROWS rows.

## Behavioural models for the manager

The reconfiguration layer is built from small automata, each in its own
module. In all of them one clock edge is one reaction and reset gives the
initial state.

* `tile_model` — OFF / Processing / Storage allocation of a tile.
* `task_model` — a two-version task with {res, wcet} outputs (the values are parameters).
* `battery_model` — Low / Normal / High.
* `device_model` — Avail / Busy.
* `delayable` — a task that is Idle, Waiting or Active.
* `twotasks` — two delayable tasks under a controller that keeps them from
  being active at the same time. An assertion checks this.

In `amr_top`, one `tile_model` per tile follows node starts and completions.
The other models stand beside the loop with their ports brought out.

## Top level (`amr_top`)

Parameters: `NROWS = 16` table rows, `NUM_TILES = 6` tiles, `TIME_W = 16`-bit
times and thresholds. All times are in clock cycles.

The top has these port groups:

* **Mission layer:** `m_start`, `m_stop`, `m_thres_valid`/`m_min_thres`/`m_max_thres` and `m_speed_valid`/`m_speed` in; `run`, `ver_id`, the version's attributes and `no_config` out.
* **Load port:** `ld_req`, `ld_tile`, `ld_file` out, `ld_done` in. Drive `ld_done` one pulse per request.
* **Tiles:** one `ex_start` bit per tile, plus `ex_row` and `ex_file`, out; one `ex_done` pulse per tile in, once the node has finished.
* **Observation:** the metrics (`met_*`), `table_swap`, `table_overflow`, `gen_busy`, `sched_loading`, `sched_parking` and the model outputs.

The iteration time reported by the scheduler is the execution time the
manager reacts to, which closes the loop.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/amr_pkg.sv tb/tb_amr_top.sv \
          --top-module tb_amr_top -Mdir obj && obj/Vtb_amr_top
```

Replace `tb_amr_top` with any other testbench in `tb/`. The testbenches are:

* `tb_amr_top` — whole design at default parameters. Runs start, 1→2→3, 3→2→1, widening on high speed, and stop. It counts every mechanism: loads, kept bitstreams, parallel starts, parking, table switches, no_config.
* `tb_scheduler` — an 11-row table of two DAGs sharing tiles. It checks dependencies, tile order, bitstream reuse, metric times, and a switch that stops one DAG.
* `tb_reconfig_manager` — replays the reference run: max_thres 16 → versions 2 and 3; min_thres 18 → back to 2 and 1.
* `tb_tracking_ctrl` — an exhaustive check of the objectives.
* `tb_table_gen`, `tb_sched_table`, `tb_tracking_task`, and one testbench per small automaton.

## Where this design makes its own choices

The control structure, the automata, the version attributes, the objectives,
the table columns and their meaning are the reference architecture's. These
points are this implementation's own, and a user should know them:

* **The control logic.** In the reference flow it is produced by discrete
  controller synthesis and is not given. The nearest-wcet rule in
  `tracking_ctrl` reproduces the reference behaviour (one version per step).
  Other synthesized controllers could choose differently, for example
  dropping straight from version 3 to version 1.
* **Speed objectives.** They apply once per speed report. Read as a
  permanent invariant, "high speed ⇒ wider window" could not be met after
  one widening.
* **The mutual-exclusion controller** of `twotasks` is one maximally
  permissive solution, with priority to task 1.
* **Scheduler details.** Tile ownership at table start (lowest row), eager
  bitstream loading, the round-robin scan, and when Countdown is reloaded
  (at start) are choices.
* **ReplaceBy.** Any value other than -1 parks the DAG. The row number it
  holds is not otherwise used: after the switch, all starting rows of the new
  table start.
* **The tracker DAG library.** The tiles, the bitstream numbers and the "v
  trackers share the work" structure are invented to make the loop
  runnable. Replace `dag_size()`/`dag_node()` in `amr_pkg` with real DAGs.
* **Execution time.** The manager's execution time is the measured DAG
  iteration time. A metric from the iteration that was running when a
  version changed can still trigger one more step. `tb_amr_top` shows this
  as a `no_config` after the drop to version 1.
* **Widths and sizes.** NROWS = 16, 6-bit row references, 8-bit file IDs,
  4-bit counts and task IDs, and 16-bit times are choices. The six tiles
  match the reference floorplan (Tile1A–Tile2C).
* **The reference example table.** Its row for node 7 says tile 3, while
  its DAG drawing puts node 7 on tile 1. `tb_scheduler` uses tile 1, which is
  the only reading under which every tile's Load chain stays on that tile.

Not included: the mission manager, the processor system, memories, the
partial-reconfiguration port and the image-processing functions in the
tiles. These appear only as ports. The testbenches model the port and the
tiles with fixed latencies.
