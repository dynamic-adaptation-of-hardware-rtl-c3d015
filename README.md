# Run-time hardware HW/SW scheduler for a reconfigurable SoC

A platform has two software processors, a *master* and a *slave*, and a
reconfigurable computing unit (RCU). The RCU is an FPGA area cut into equal
tiles, and each hardware task occupies one tile. The application is a
periodic data-flow graph (DFG), for example the processing of one camera
image. Each task runs on one of the three units. When the load changes, a
run-time partitioner moves tasks between software and hardware. Each new
mapping then needs a new schedule and a new estimate of the period's total
execution time. In software that costs time the application does not have.

This RTL does the scheduling in hardware. Each task of the graph gets its own
small scheduling node, and all nodes work in parallel. Each clock cycle:

* every hardware task whose predecessors all have dates gets dated at once;
* each processor's manager picks one of its ready tasks.

A pass therefore takes from *(longest chain of tasks)* cycles (all tasks on the
RCU) to about *(number of tasks)* cycles (all tasks on one processor). On the
20-task reference graph that is 10 to 20 clock cycles.

## The scheduling rule

Tasks on the RCU never wait for a resource. They start at their **ASAP date**:
the latest finish date of their predecessors.

A processor runs one task at a time. Its manager picks among the ready tasks
mapped on it by three criteria, in this order:

1. **smallest ASAP date**;
2. **largest urgency** (defined below). The tasks still tied after 1 and 2
   form the `tasks_ready` set;
3. **largest execution time**.

If tasks are still tied, the lowest task index wins. The chosen task starts at
`max(ASAP, SW_Total_Time)`. `SW_Total_Time` is the date at which the processor
becomes free; it then moves on by the task's execution time.

### Urgency

A software task is *urgent* when its work unblocks work on another unit. Its
urgency is the largest execution time among its successors mapped on a
*different* unit. A successor on the *same* unit contributes its own urgency
instead. In this way, a same-unit chain passes back the urgency of the first
cross-unit task at its end:

```
urg(i) = max over successors s of ( impl(s) != impl(i) ? texe(s) : urg(s) ),   0 if none
```

Example (exercised in `tb_hw_scheduler`):

* A and B run on the slave, 5 ms each.
* A feeds D, also on the slave (5 ms).
* B feeds C on the RCU (13 ms).

Both A and B have ASAP 0. B's urgency is 13 and A's is 0, so B goes first:

| task | unit  | dates (ms) |
|------|-------|------------|
| B    | slave | 0–5        |
| C    | RCU   | 5–18       |
| A    | slave | 5–10       |
| D    | slave | 10–15      |

The total is 18 ms. Taking A first would give 23 ms.

### How the urgency is computed in hardware

The recursion runs from the sinks of the graph back to its sources, while
scheduling runs from the sources forward. Here each node keeps an urgency
register. On every clock edge it loads the right-hand side of the formula,
computed from its neighbours' current registers.

This iteration runs all the time, not only during a pass, and `start` does
not clear it. On an acyclic graph the formula has exactly one fixed point.
The iteration reaches it from any starting values within as many cycles as
the longest chain of same-unit successors. A cycle in which no node changes
can therefore only happen at the right answer. `urg_valid` is high while that
holds during a pass, and the two processor managers only choose while it is
high.

RCU tasks do not need urgency. They are dated even while `urg_valid` is low.

The practical consequence concerns when the mapping is written:

* If `impl`, `texe` and `dep` are written at least that many cycles before
  `start`, the urgencies are already final. A software task then costs exactly
  one cycle.
* If they change together with `start`, the managers may lose a few cycles at
  the beginning of the pass.

The final urgencies are checked against the recursive definition in
`tb_dfg_ip_sched`.

## The updated graph

Scheduling turns the partial order of the graph into a total order on each
processor. `dfg_update` records that order as extra edges: each task a manager
schedules gets, as a predecessor, the task scheduled just before it on the
same processor. No edges are added between RCU tasks, because each has its
own tile.

The output `dep_upd` is the input matrix OR these edges. A useful property
follows from this, and the testbenches check it on every pass: in `dep_upd`,
every task starts exactly at the latest finish of its predecessors. So
`total_time` is the longest weighted path of the updated graph.

## Blocks

| file | role |
|------|------|
| `rtl/sched_pkg.sv` | `impl_e` (`IMPL_HW`, `IMPL_MS`, `IMPL_SL`, `IMPL_NONE`), default sizes |
| `rtl/hw_scheduler.sv` | top: the four parts below wired together |
| `rtl/dfg_ip_sched.sv` | N `task_ip` nodes, pass control (start/busy/done), urgency convergence, cycle counter, total time |
| `rtl/task_ip.sv` | one task: Ready, ASAP, urgency register, scheduled flag, start/finish dates |
| `rtl/sw_manager.sv` | one processor's manager; instantiated as master (`UNIT=IMPL_MS`) and slave (`UNIT=IMPL_SL`) manager |
| `rtl/dfg_update.sv` | adds the processor-order edges to the dependency matrix |

The processors, the RCU fabric and the shared memory that holds the partial
bitstreams are outside this RTL. The scheduler only plans; it does not start
tasks or reconfigure tiles. Reconfiguration latency is assumed to be
accounted for by the partitioner when it decides a task's unit: it does not
appear in the schedule.

## Interface of `hw_scheduler`

| parameter | default | meaning |
|-----------|---------|---------|
| `N`  | 20 | task slots (the reference application graph has 20 tasks) |
| `TW` | 16 | width of every time value (execution times, dates) |

Inputs. These must be held stable from `start` until `done`:

* `impl[N]` — the unit of each task. `IMPL_NONE` marks an unused slot, so a
  graph smaller than N can be scheduled.
* `texe[N]` — execution time of each task.
* `dep[N]` — the dependency matrix. Rows are successors and columns are
  predecessors: `dep[s][p] = 1` means task p must finish before task s
  starts. The graph must be acyclic; a cycle makes the pass never finish.
  Edge communication times are not modelled, so fold them into the execution
  times.

Handshake:

1. Pulse `start` for one cycle. `busy` then stays high during the pass.
2. `done` pulses for one cycle at the end. From then until the next `start`,
   these outputs are valid:
   * `total_time`;
   * `sched_cycles` — the cycles spent scheduling, not counting the start and
     done cycles;
   * `start_vec`, `finish_vec`;
   * `dep_upd`;
   * `ms_total_time`, `sl_total_time` — the processors' busy-until dates.

`task_done`, `ms_tasks_ready` and `sl_tasks_ready` show the progress during a
pass.

Time arithmetic wraps at 2^TW. Keep the total time below 65536 units, or
raise `TW`.

Reset is asynchronous and active low.

## Choices made in this RTL

The following are this design's own choices, where the original description
says nothing, or says something different:

* **The graph is an input, not wiring.** The original scheduler is built in
  the shape of one application graph. Here, all N×N possible edges are wired,
  and the graph comes in as a 400-bit matrix (at N = 20). One netlist serves
  any acyclic graph of up to N tasks. The cost is area: the results below are
  not comparable with a scheduler built for one fixed graph.
* **Urgency by free-running iteration**, as described above. The settling
  time after a change of mapping is this design's choice.
* **ASAP is not clamped** by the processor's free date when the candidates
  are compared. When several candidates' ASAP dates all lie before the
  processor becomes free, criterion 1 still separates them.
* **Only ready tasks compete.** A task whose predecessors are not yet dated is
  not waited for, even if its ASAP would turn out smaller.
* **Ties** left after all three criteria go to the lowest index.
* **No preemption.** A dated task keeps its dates.
* **The RCU has unlimited tiles.** Every ready hardware task is launched.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|-----------|----------------|
| `tb_task_ip` | Ready, ASAP, one urgency step, hardware self-launch, software grant, clear, against expected values computed in the testbench |
| `tb_sw_manager` | master and slave instances under random ties; expected winner found by pairwise comparison; `tasks_ready`, start date, free date |
| `tb_dfg_update` | random grant sequences; expected matrix built from the grant order |
| `tb_dfg_ip_sched` | random graphs, with the testbench acting as the managers; RCU dates, final urgencies against the recursion, `urg_valid` staying high, chain-length cycle count for all-RCU graphs |
| `tb_hw_scheduler` | full size (N = 20, default parameters); see below |
| `tb_partition_sweep` | full size; see below |

Both full-size testbenches use a 20-task graph with the shape of the
reference application: a sequential chain of ten tasks plus ten tasks in
fork, join and sequential branches, with a longest chain of ten tasks. The
exact edges and execution times are the testbenches' own.

`tb_hw_scheduler` compares every pass with a behavioural reference model
written in the testbench. It covers:

* a 20-task graph with a 10-task chain:
  * all on the RCU: 10 cycles;
  * all on the master: 20 cycles;
  * a mixed mapping;
  * split between the two processors, with the mapping written 25 cycles
    before `start`: no urgency wait, and at most 20 cycles;
* the urgency example above;
* 300 random graphs and mappings.

It also counts how often each mechanism occurred, and fails if one never did:

* an RCU launch;
* a decision by ASAP, by urgency and by execution time;
* urgency fed back through a same-unit task;
* managers waiting for the urgency;
* a task delayed by a busy processor;
* both processors scheduling in one cycle;
* an added order edge;
* an unused slot.

`tb_partition_sweep` schedules the 20-task graph under the all-RCU, all-master
and all-slave mappings, then 400 random mappings. It checks that every
schedule is consistent and that the cycle count stays within its bounds. It
measured 10 to 20 cycles.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sched_pkg.sv tb/tb_hw_scheduler.sv --top-module tb_hw_scheduler -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second of simulation time.

## Size

Coarse Yosys synthesis of `hw_scheduler` at N = 20, TW = 16 gives about 8,800
word-level cells and 1,458 flip-flop bits. Most of the logic is the
per-node comparators over all N possible predecessors and successors. The
original, graph-specific scheduler fits in about 12 % of a Virtex-II Pro
XC2VP100. That figure does not carry over to this general version.
