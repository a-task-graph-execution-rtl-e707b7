# Task-graph execution manager for reconfigurable multi-tasking systems

An FPGA can be split into a few reconfigurable units (RUs). Each RU is a
region that can be loaded at run time with a hardware task (a partial
configuration) while the other RUs keep working. Applications then hand
the hardware a *task graph*: a directed acyclic graph of tasks, each
assigned to an RU by a scheduler, with an order of execution per RU.

Running such a graph takes two things. Every dependency must be respected.
And the slow reconfigurations (milliseconds each, through a single
configuration port) must be hidden as far as possible. This RTL is a
small hardware manager that does both. The processor sends it the graph
once and gets one interrupt back when the graph has finished. Meanwhile the
manager:

* starts each reconfiguration as early as possible (**prefetch**), in a
  sequence fixed at design time by task weight;
* skips a reconfiguration when the RU already holds that configuration
  (**reuse**), including configurations left over from the previous graph;
* starts each loaded task as soon as its last predecessor ends.

The design follows the hardware execution manager of Clemente, González,
Resano and Mozos, "A Task-Graph Execution Manager for Reconfigurable
Multi-tasking Systems". Where that description is silent, this RTL makes
its own choices; they are listed under [Design choices](#design-choices-and-departures).

## How a graph runs

### What the manager is given

For every task (node) of the graph:

| item | where it goes |
|---|---|
| tag (unique in the graph), predecessor count, successor tags | table of task dependencies |
| RU, configuration id, reconfiguration time, execution time | FIFO of that RU, in the RU's execution order |
| position in the reconfiguration sequence | reconfiguration FIFO |

Two nodes may run the same configuration; in the example below two nodes
are both "task 2". The tag tells the nodes apart. The configuration id is
what reuse compares.

The reconfiguration sequence is worked out off-line. Each task gets a
weight: its execution time plus the largest weight among its successors,
that is, the longest path from its start to the end of the graph. The
sequence is the tasks in decreasing weight. A predecessor always weighs
more than its successors, so this order is topological. If each RU's
schedule uses the same order, the manager can never deadlock: every
task ahead in the sequence gets loaded and can eventually run.

### Unit states and the rules

Each RU has a state register:

| state | meaning |
|---|---|
| `RU_FREE` | nothing waiting to execute (the last configuration stays inside and is valid) |
| `RU_RECONF` | being reconfigured |
| `RU_LOADED` | holds a task that has not run yet |
| `RU_EXEC` | executing |

The whole policy comes down to three rules:

1. **Load.** The head of the reconfiguration FIFO is loaded only when
   both of these hold:
   * no RU is in `RU_RECONF` (there is one reconfiguration port);
   * the target RU is `RU_FREE`.

   A loaded task is never replaced before it has executed. The RU
   controller compares the configuration id with the one it holds. If
   they match, it goes straight to `RU_LOADED` and raises *reused task*.
   Otherwise it starts the reconfiguration and raises *end of
   reconfiguration* when that finishes.
2. **Execute.** A task in an RU in `RU_LOADED` is started once its
   predecessor counter in the table is zero.
3. **Complete.** When a task ends, its table entry is freed, and each of
   its successors has its predecessor counter decremented.

The rules are applied by an event-driven control unit. The RU controllers
and the graph input write events into an event queue. The control unit
handles one event at a time:

| event | actions, in order | cycles |
|---|---|---|
| new graph | look for a reconfiguration | 3 |
| end of execution | read and free the task's entry; update successors (one per cycle); look for a reconfiguration; scan all RUs and start every `RU_LOADED` task that is ready | about 6 + successors + 2 per loaded RU |
| end of reconfiguration, reused task | check the task just loaded and start it if ready; look for a reconfiguration | 5 |

"Look for a reconfiguration" issues at most one load order. A reuse
takes only a cycle. The next load is then tried when the reused-task
event is handled.

### Worked example

Five tasks run on three RUs, with a reconfiguration time of 4 ms:

```
            1 (16 ms, RU1, w 40)
           /                   \
  2 (8 ms, RU2, w 16)     3 (12 ms, RU3, w 24)
           \              /            \
        5 = config 2 (8 ms, RU2, w 8)   4 (12 ms, RU1, w 12)

reconfiguration sequence (by weight): 1 3 2 4 5
```

| time (ms) | event handled | what the manager does |
|---|---|---|
| 0 | new graph | load 1 on RU1 (nothing to overlap with) |
| 4 | end of reconf. 1 | 1 is ready, start it; load 3 on RU3 (prefetch) |
| 8 | end of reconf. 3 | 3 waits for 1; load 2 on RU2 (prefetch) |
| 12 | end of reconf. 2 | 2 waits; next in sequence is 4 on RU1, but RU1 still holds 1 |
| 20 | end of exec. 1 | successors 2, 3 updated; load 4 on RU1; start 2 and 3 |
| 24 | end of reconf. 4 | 4 waits for 3; 5 targets RU2, which is busy |
| 28 | end of exec. 2 | RU2 free: 5 uses configuration 2, already present, so it is a **reuse** |
| 28 | reused task 5 | 5 waits for 3 |
| 32 | end of exec. 3 | start 4 and 5 |
| 44 | end of exec. 4 | last task: interrupt |

Only the first reconfiguration delays the graph. Three are hidden behind
execution and one is avoided. In simulation at 100 MHz (1 ms = 100,000
cycles) the graph ends **40 cycles** after the ideal 4,400,000. That is
the whole management delay on the critical path.

Run the same graph again and RU1, RU2 and RU3 still hold configurations
4, 2 and 3. Tasks 3, 2 and 5 are then reused, and only 1 and 4 are
reconfigured.

## Blocks

```
tgem_system                     top: manager + counter-based RU models
├── exec_manager                the manager
│   ├── graph_loader            graph record stream -> table / FIFOs / new-graph event
│   ├── dep_table               associative table of task dependencies
│   │   └── dep_table_entry     x ENTRIES
│   ├── del_update_unit         successor walk for deletion-and-update
│   ├── sync_fifo               reconfiguration FIFO
│   ├── ru_info                 x NUM_RU: schedule FIFO, current task, unit state, controller
│   │   └── sync_fifo
│   ├── event_queue             event FIFO behind a fixed-priority arbiter
│   │   ├── event_arbiter
│   │   └── sync_fifo
│   └── control_unit            event processing
├── graph_timer                 execution time of each graph, in cycles
└── ru_sim                      x NUM_RU: reconfiguration and execution counters
```

`tgem_pkg` holds the shared types: `task_info_t`, `sched_entry_t`,
`rec_entry_t`, `event_t`, `graph_rec_t`, and the enums `ev_code_e`,
`ru_state_e`, `rec_kind_e`.

### Table of task dependencies (`dep_table`, `dep_table_entry`)

Each entry holds a valid bit, the tag, a predecessor counter, the number
of successors and up to `MAX_SUCC` successor tags. The table has a single
tag input, which every entry compares against. It supports four
operations:

* **Insertion** writes a free entry. A fully associative table with a
  single free-entry pointer would slow the clock as it grew. Instead the
  entries form sub-tables of `SUB_SIZE` (8), each with a register that
  points to its first free entry. Each cycle one sub-table is tried,
  starting with the first. An insertion therefore takes `k+1` cycles when
  the first sub-table with room is number `k`. The pointers are computed
  from next cycle's valid bits, so back-to-back insertions work.
* **Check.** Present a tag; `task_ready` (hit and counter zero) is
  registered and valid the next cycle.
* **Update.** `solved_dep` decrements the counter of the tagged entry.
  It saturates at zero.
* **Deletion.** `clear` frees the tagged entry.

`hit`, `num_succ` and `succ` form the combinational data out for the
current tag.

### Deletion and update (`del_update_unit`)

While the finished task's entry is read and freed, `del_update_unit`
captures its successor tags and loads the successor count into a control
counter. The counter then selects one successor per cycle through a
multiplexer whose input 0 is grounded. The unit drives that tag and
`solved_dep` into the table and counts down; at zero it is done.
Successors are visited last to first. During this walk the table's tag
input comes from the unit instead of the control unit (`tbl_use_du`).

### RU info and controller (`ru_info`)

Each unit has a schedule FIFO (head = next task to run there), a
current-task register (tag, configuration, execution time, a
configuration-valid flag) and the unit-state register. Its controller
turns load and execute orders into `rec_start`/`exec_start` strobes with
the cycle counts to program. It turns the unit's `rec_done`/`exec_done`
into events. An event is held until the arbiter grants it. Meanwhile the
unit ignores new orders (`ev_pending`), and the control unit does not
issue any. This matters: a task already started by an end-of-execution
scan can never be started a second time by its own late
end-of-reconfiguration event.

### Event queue (`event_queue`, `event_arbiter`)

Several RUs can finish in the same cycle. The arbiter grants one source
per cycle, lowest index first; the RUs are indices `0..NUM_RU-1` and the
graph input is index `NUM_RU`. It grants nothing while the queue is
full. Each entry stores the event code, the task tag and the RU index.

### Graph input (`graph_loader`)

The processor side is a valid/ready stream of `graph_rec_t` records. In
a system this stream would come from a bus-interface FIFO or a DMA
engine.

| `kind` | fields used | effect |
|---|---|---|
| `REC_TASK` | `info` | table insertion (held until the table answers) |
| `REC_SCHED` | `ru`, `sched` | push onto RU `ru`'s schedule |
| `REC_RECONF` | `info.tag`, `ru` | push onto the reconfiguration FIFO |
| `REC_END` | `num_tasks` | start the graph: new-graph event, interrupt after `num_tasks` completions |

No records are accepted while a graph is running. `load_error` flags a
full table or an RU index out of range. `irq` is a level that rises
after the last end of execution and is cleared by `irq_ack`.

### RU model (`ru_sim`)

The RUs here are stand-ins for real reconfigurable regions. Each has two
programmable down-counters and a state register holding the task tag.
A start loaded with N cycles gives a done strobe in the N-th cycle
after the start cycle. The unit is busy for exactly N cycles.

### Graph timer (`graph_timer`)

`graph_timer` measures how long each graph takes. It restarts when the
manager starts a graph and counts clock cycles while the graph runs. When
the last task ends it stops, and it holds the count on the top's
`graph_cycles` output until the next graph. Comparing this count with the
graph's ideal time (the critical path, plus any reconfiguration that could
not be hidden) gives the delay added by management. For the worked example
it reads 4,400,040.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_RU` | 4 | as evaluated in the original work |
| `ENTRIES` (table) | 8 | as evaluated |
| `SUB_SIZE` | 8 | as described |
| `FIFO_DEPTH` (reconfiguration, RU and event FIFOs) | 16 | this design |
| `TAG_W`, `CFG_W` (package) | 8, 8 | this design |
| `MAX_SUCC` (package) | 4 | this design |
| `CNT_W` (package) | 4, so up to 15 predecessors | this design |
| `CYC_W` (package) | 32, about 43 s at 100 MHz | this design |

The package widths are shared by every module; change them in
`rtl/tgem_pkg.sv`.

### Workloads of the original evaluation

The original work measured graphs from multimedia applications on 4 RUs:

| graph | tasks | initial time |
|---|---|---|
| JPEG | 4 | 79 ms |
| Parallel-JPEG | 8 | 54 ms |
| MPEG-1 | 5 | 37 ms |
| HOUGH | 6 | 94 ms |
| Pocket-GL | 20 graphs of 2, 4, 5 or 6 tasks | up to 48.75 ms |

All of them fit the defaults, as far as their sizes are known:

* 8 tasks at most, against 8 table entries;
* at most 8 schedule entries per RU and 8 reconfigurations, against FIFOs
  of 16;
* 9.4 M cycles at most at 100 MHz, against 32-bit counters.

The graphs' shapes were not published, so the successor limit (4) and the
predecessor limit (15) could not be checked against them.

`tb_tgem_workloads` runs graphs with these task counts and critical-path
times, in shapes of its own: chains for JPEG and Pocket-GL, two parallel
chains of four for Parallel-JPEG, fork-joins for MPEG-1 and HOUGH. Task
*i* goes to RU *i* mod 4. Each graph runs twice in a row. The testbench
works out, on its own, when every reconfiguration and execution would
start if management took no time. It then checks that the hardware is
never earlier and at most 300 cycles later:

| graph | reconfigurations (1st / 2nd run) | management delay, cycles |
|---|---|---|
| JPEG | 4 / 0 | 51 / 50 |
| Parallel-JPEG | 8 / 8 | 91 / 91 |
| MPEG-1 | 5 / 2 | 63 / 63 |
| HOUGH | 6 / 4 | 63 / 63 |
| Pocket-GL A-D | 2-6 / 0-4 | 22-75 |

On 4 RUs Parallel-JPEG reuses nothing: each RU runs two of its tasks, so
the first one's configuration is always overwritten. The same testbench
also runs Parallel-JPEG on a 5-RU system (`NUM_RU = 5`). There two RUs
keep a single task each, the second run reuses both, and the graph takes
62.0 ms instead of 99.5 ms. The delays are the
manager's own processing only. Input transfer and the processor's
interrupt handling are outside this RTL. Runs on 2 or 3
RUs work with the default of 4: leave the extra RUs without tasks.

## Design choices and departures

* **Node tag and configuration id are separate.** Reuse compares
  configurations; the table works on tags.
* **The reconfiguration sequence must visit each RU's tasks in that RU's
  execution order.** The loaded task is the head of the RU's schedule
  FIFO. An assertion (`a_seq_match`) checks that both agree.
* **Order of actions on end of execution:** update the successors, then
  look for a reconfiguration, then scan the RUs.
* **Look for a reconfiguration issues one load order.** A reuse
  continues the sequence through its own event, so the reconfigurations
  of a sequence are issued one event at a time.
* **Event holding.** Each RU holds one pending event. It takes no new
  order until the event is granted.
* **One graph at a time.** A new graph is accepted only after the
  previous one has finished. The configurations left in the RUs carry
  over, so the next graph can reuse them.
* **Interface.** The record format, the valid/ready input and the
  level interrupt with acknowledge are this design's own.
* **Not modelled.** The processor, its buses, the DMA engine, memories
  and the real configuration port are outside this RTL. `ru_sim` replaces
  real RUs, as in the original evaluation platform.
* **Error handling.** A full table drops the insertion and sets
  `load_error`. Successor counts above `MAX_SUCC` are clamped.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The RTL is plain SystemVerilog-2017 and
needs no other files. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/tgem_pkg.sv tb/tb_tgem_system.sv -y rtl -y tb +libext+.sv \
  --top-module tb_tgem_system -o sim
./obj_dir/sim
```

Swap in another testbench's name to run it. `-y tb` lets Verilator find
`tb_workload_runner`, which `tb_tgem_workloads` instantiates.

| testbench | what it shows |
|---|---|
| `tb_tgem_full` | the whole system at default size and real time scale (100 MHz, 4 ms reconfigurations): the worked example twice, checking every reconfiguration, reuse and start time, the 44 ms end and the graph timer (about 10 s of simulation) |
| `tb_tgem_workloads` | the whole system at default size and real time scale on graphs with the task counts and times of the evaluated workloads, each run twice, against a zero-delay reference, plus Parallel-JPEG on 5 RUs (about 2 min; `tb_workload_runner` drives one system) |
| `tb_tgem_system` | 40 random graphs of 2 to 12 tasks on 4 RUs, with 16 table entries, checked against the testbench's own bookkeeping (details below) |
| `tb_exec_manager` | the worked example on the manager alone (RUs modelled in the testbench, 1 ms = 200 cycles), both runs |
| `tb_control_unit` | event actions against models of the queues, RUs and table |
| `tb_dep_table` | insertion latency per sub-table, check timing, update, deletion |
| `tb_graph_timer` | exact cycle count of a graph span, hold and restart |
| `tb_dep_table_entry`, `tb_del_update_unit`, `tb_ru_info`, `tb_event_queue`, `tb_event_arbiter`, `tb_sync_fifo`, `tb_graph_loader`, `tb_ru_sim` | each block on its own |

`tb_tgem_system` checks that:

* no task starts before its predecessors have ended;
* each RU runs its tasks in schedule order, with the right configuration
  loaded;
* there is never more than one reconfiguration at a time;
* a configuration already present is never reconfigured;
* the start latency stays within 300 cycles;
* the reconfiguration and execution times are exact;
* the interrupt comes only after the last task.

It also counts each mechanism (reuse, prefetch, a reconfiguration held
back by a busy RU, one held back by the busy port, a task waiting for its
dependencies, simultaneous events, insertion into the second sub-table,
successor updates). Any mechanism that never occurs counts as a failure.

Assertions in the RTL cover:

* FIFO overflow and underflow;
* one grant per cycle in the event queue;
* unique table hits;
* no event lost in an RU controller;
* done strobes only in the matching state;
* agreement between the reconfiguration sequence and each RU's schedule.
