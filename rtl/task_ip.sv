// task_ip: the scheduling node of one task of the data-flow graph.
//
// The scheduler holds one such node per task, wired with the same structure
// as the application graph. Each node works out, every clock cycle, the
// task's own scheduling characteristics:
//   * ready  - all predecessors have been scheduled and this task not yet;
//   * asap   - the ASAP date: the latest finish date of its predecessors
//              (0 for a source task);
//   * urg    - the urgency: the largest execution time among the successors
//              mapped on another unit; a successor on the same unit passes
//              its own urgency back instead. The node iterates
//              urg <= max over successors s of
//                       (impl(s) != impl ? texe(s) : urg(s))
//              every clock cycle, whether a pass runs or not. On an acyclic
//              graph this reaches the single fixed point, from any starting
//              value, within as many cycles as the longest chain of same-unit
//              successors; urg_stable reports a cycle that changed nothing,
//              which can only happen at the fixed point.
// A hardware (RCU) task has no resource to wait for: it is scheduled in the
// cycle it becomes ready, start = asap, finish = asap + texe. A software task
// is scheduled when its processor manager raises grant, at the date sw_start
// the manager computed. The scheduled state and dates are registered, so a
// chain of dependent tasks costs one clock cycle per task.
//
// Timing: clear (one cycle, when a pass starts) zeroes the dates and marks
// an unused slot (IMPL_NONE) as already scheduled; the urgency is not
// cleared, so a mapping applied a few cycles before the pass starts has
// final urgencies at once. While run is high the scheduled state updates
// once per clock. Inputs must stay stable for the whole pass. Time arithmetic is TW bits wide and wraps on overflow: the
// caller keeps total times below 2**TW.
//
// As in the original scheduler design: the per-task IP, the Ready, ASAP and
// urgency characteristics, the one-cycle launch of RCU tasks, the urgency rule with its feedback
// through same-unit successors. This design's own choices: the free-running
// iterative evaluation of the urgency, the register set-up and the time width.
module task_ip
  import sched_pkg::*;
#(
  parameter int unsigned N  = N_TASKS_DEF,
  parameter int unsigned TW = TW_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          run,
  input  impl_e         impl,
  input  logic [TW-1:0] texe,
  input  logic [N-1:0]  pred_mask,
  input  logic [N-1:0]  succ_mask,
  input  logic [N-1:0]  done_vec,
  input  logic [TW-1:0] finish_vec [N],
  input  impl_e         impl_vec   [N],
  input  logic [TW-1:0] texe_vec   [N],
  input  logic [TW-1:0] urg_vec    [N],
  input  logic          grant,
  input  logic [TW-1:0] sw_start,
  output logic          ready,
  output logic [TW-1:0] asap,
  output logic [TW-1:0] urg,
  output logic          urg_stable,
  output logic          done,
  output logic [TW-1:0] start_time,
  output logic [TW-1:0] finish_time
);

  logic [TW-1:0] urg_calc;

  // ASAP date and Ready state.
  always_comb begin
    asap = '0;
    for (int p = 0; p < N; p++)
      if (pred_mask[p] && finish_vec[p] > asap) asap = finish_vec[p];
  end

  assign ready = run && !done && ((pred_mask & ~done_vec) == '0);

  // One step of the urgency iteration.
  always_comb begin
    logic [TW-1:0] v;
    urg_calc = '0;
    for (int s = 0; s < N; s++) begin
      v = (impl_vec[s] != impl) ? texe_vec[s] : urg_vec[s];
      if (succ_mask[s] && impl_vec[s] != IMPL_NONE && v > urg_calc) urg_calc = v;
    end
  end

  assign urg_stable = (urg_calc == urg);

  // The urgency iterates every cycle, in and out of a pass.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) urg <= '0;
    else        urg <= urg_calc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done        <= 1'b0;
      start_time  <= '0;
      finish_time <= '0;
    end else if (clear) begin
      done        <= (impl == IMPL_NONE);
      start_time  <= '0;
      finish_time <= '0;
    end else if (run) begin
      if (ready && impl == IMPL_HW) begin
        done        <= 1'b1;
        start_time  <= asap;
        finish_time <= asap + texe;
      end else if (ready && grant) begin
        done        <= 1'b1;
        start_time  <= sw_start;
        finish_time <= sw_start + texe;
      end
    end
  end

endmodule
