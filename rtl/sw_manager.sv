// sw_manager: task manager of one software processor (master or slave).
//
// A processor runs one task at a time, so its ready tasks must be put in a
// total order. Every clock cycle this block picks one of the ready tasks
// mapped on its processor (impl == UNIT) by three criteria in turn:
//   1. the smallest ASAP date;
//   2. among those, the largest urgency  -> these form tasks_ready;
//   3. among those, the largest execution time -> task_scheduled (one-hot).
// A remaining tie goes to the lowest task index. The chosen task starts at
// max(ASAP, sw_total_time), and sw_total_time, the date at which the
// processor becomes free, advances to that start plus the task's execution
// time. One task is scheduled per clock cycle; the outputs task_scheduled and
// sched_start are combinational and are taken up by the task nodes at the
// next clock edge, together with the new sw_total_time.
//
// clear (start of a pass) resets sw_total_time to 0. enable is high while the
// pass runs and the urgencies are final; no task is chosen while it is low.
// The same block serves as master manager (UNIT = IMPL_MS) and as slave
// manager (UNIT = IMPL_SL).
//
// As in the original scheduler design: the three criteria and their order,
// the Tasks_Ready, Task_Scheduled and SW_Total_Time signals, one task per
// cycle. This design's
// own choices: the index tie-break and the enable/clear handshake.
module sw_manager
  import sched_pkg::*;
#(
  parameter int unsigned N    = N_TASKS_DEF,
  parameter int unsigned TW   = TW_DEF,
  parameter impl_e       UNIT = IMPL_MS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          enable,
  input  impl_e         impl      [N],
  input  logic [N-1:0]  ready_vec,
  input  logic [TW-1:0] asap_vec  [N],
  input  logic [TW-1:0] urg_vec   [N],
  input  logic [TW-1:0] texe      [N],
  output logic [N-1:0]  tasks_ready,
  output logic [N-1:0]  task_scheduled,
  output logic [TW-1:0] sched_start,
  output logic [TW-1:0] sw_total_time
);

  logic [N-1:0]  cand;
  logic [TW-1:0] min_asap, max_urg, max_texe;
  logic [TW-1:0] sel_asap, sel_texe;
  logic          any_sel;

  always_comb begin
    for (int i = 0; i < N; i++)
      cand[i] = enable && ready_vec[i] && (impl[i] == UNIT);

    // Criterion 1: minimum ASAP.
    min_asap = '1;
    for (int i = 0; i < N; i++)
      if (cand[i] && asap_vec[i] < min_asap) min_asap = asap_vec[i];

    // Criterion 2: maximum urgency among the earliest.
    max_urg = '0;
    for (int i = 0; i < N; i++)
      if (cand[i] && asap_vec[i] == min_asap && urg_vec[i] > max_urg) max_urg = urg_vec[i];

    for (int i = 0; i < N; i++)
      tasks_ready[i] = cand[i] && asap_vec[i] == min_asap && urg_vec[i] == max_urg;

    // Criterion 3: maximum execution time; lowest index on a tie.
    max_texe = '0;
    for (int i = 0; i < N; i++)
      if (tasks_ready[i] && texe[i] > max_texe) max_texe = texe[i];

    task_scheduled = '0;
    any_sel        = 1'b0;
    sel_asap       = '0;
    sel_texe       = '0;
    for (int i = 0; i < N; i++)
      if (!any_sel && tasks_ready[i] && texe[i] == max_texe) begin
        task_scheduled[i] = 1'b1;
        any_sel           = 1'b1;
        sel_asap          = asap_vec[i];
        sel_texe          = texe[i];
      end

    sched_start = (sel_asap > sw_total_time) ? sel_asap : sw_total_time;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sw_total_time <= '0;
    else if (clear)   sw_total_time <= '0;
    else if (any_sel) sw_total_time <= sched_start + sel_texe;
  end

  // The grant is one-hot or empty.
  assert property (@(posedge clk) $onehot0(task_scheduled));

endmodule
