// hw_scheduler: run-time hardware HW/SW scheduler for a reconfigurable
// system-on-chip made of a master processor, a slave processor and a
// reconfigurable computing unit (RCU).
//
// Given a HW/SW partitioning of a data-flow graph (which unit runs each task),
// the tasks' execution times and the graph's dependency matrix, one pass of
// the scheduler dates every task and returns the total execution time of the
// application period (the longest path of the mapped graph). It is meant to
// be re-run each time the partitioning changes at run time.
//
// Structure:
//   u_sched  (dfg_ip_sched) - one node per task: Ready, ASAP, urgency,
//                             dates; schedules RCU tasks as soon as ready;
//   u_ms_mgr (sw_manager)   - orders the tasks of the master processor;
//   u_sl_mgr (sw_manager)   - orders the tasks of the slave processor;
//   u_update (dfg_update)   - adds the processor-order edges to the graph.
//
// Interface and timing: hold impl, texe and dep stable and pulse start for one
// cycle; busy stays high during the pass; done pulses for one cycle when all
// tasks are dated, and total_time, sched_cycles, start_vec, finish_vec and
// dep_upd are then valid until the next start. task_done, ms_tasks_ready and
// sl_tasks_ready show the progress of the pass (scheduled tasks, and each
// manager's candidates left after the ASAP and urgency criteria).
// Each cycle schedules every ready RCU task and at most one task per
// processor; the managers wait until the urgencies are final. A chain of k
// dependent tasks therefore takes at least k cycles, and an all-software
// graph about one cycle per task.
//
// The split into these four blocks and their roles follow the original
// design; the handshake and the widths are this design's choices.
module hw_scheduler
  import sched_pkg::*;
#(
  parameter int unsigned N  = N_TASKS_DEF,
  parameter int unsigned TW = TW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  impl_e         impl       [N],
  input  logic [TW-1:0] texe       [N],
  input  logic [N-1:0]  dep        [N],
  output logic          busy,
  output logic          done,
  output logic [TW-1:0] total_time,
  output logic [CW-1:0] sched_cycles,
  output logic [TW-1:0] start_vec  [N],
  output logic [TW-1:0] finish_vec [N],
  output logic [N-1:0]  dep_upd    [N],
  output logic [TW-1:0] ms_total_time,
  output logic [TW-1:0] sl_total_time,
  output logic [N-1:0]  task_done,
  output logic [N-1:0]  ms_tasks_ready,
  output logic [N-1:0]  sl_tasks_ready
);

  logic [N-1:0]  ready_vec;
  logic [TW-1:0] asap_vec [N];
  logic [TW-1:0] urg_vec  [N];
  logic          urg_valid;
  logic [N-1:0]  ms_grant, sl_grant;
  logic [TW-1:0] ms_start, sl_start;

  dfg_ip_sched #(.N(N), .TW(TW)) u_sched (
    .clk, .rst_n, .start, .impl, .texe, .dep,
    .ms_grant, .sl_grant, .ms_start, .sl_start,
    .ready_vec, .asap_vec, .urg_vec, .urg_valid,
    .done_vec(task_done), .start_vec, .finish_vec,
    .busy, .done, .total_time, .sched_cycles
  );

  sw_manager #(.N(N), .TW(TW), .UNIT(IMPL_MS)) u_ms_mgr (
    .clk, .rst_n, .clear(start), .enable(urg_valid), .impl,
    .ready_vec, .asap_vec, .urg_vec, .texe,
    .tasks_ready(ms_tasks_ready), .task_scheduled(ms_grant),
    .sched_start(ms_start), .sw_total_time(ms_total_time)
  );

  sw_manager #(.N(N), .TW(TW), .UNIT(IMPL_SL)) u_sl_mgr (
    .clk, .rst_n, .clear(start), .enable(urg_valid), .impl,
    .ready_vec, .asap_vec, .urg_vec, .texe,
    .tasks_ready(sl_tasks_ready), .task_scheduled(sl_grant),
    .sched_start(sl_start), .sw_total_time(sl_total_time)
  );

  dfg_update #(.N(N)) u_update (
    .clk, .rst_n, .clear(start), .dep, .ms_grant, .sl_grant, .dep_upd
  );

endmodule
