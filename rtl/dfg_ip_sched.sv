// dfg_ip_sched: the array of task nodes and the control of one scheduling pass.
//
// N task_ip nodes are connected through the dependency matrix dep, whose rows
// are successors and whose columns are predecessors (dep[s][p] = 1 when task
// p must finish before task s starts). Node i takes row i as its predecessor
// mask and column i as its successor mask. The block broadcasts every node's
// scheduled flag, finish date and urgency back to all nodes.
//
// A pulse on start clears the nodes and begins a pass (busy). Each cycle every
// ready hardware task is scheduled, and each processor manager may schedule
// one software task through its one-hot grant (ms_grant, sl_grant) at the
// date it supplies (ms_start, sl_start). urg_valid is high during a pass
// while the urgency iteration sits at its fixed point; the managers wait for
// it. The iteration runs continuously, so it costs no cycle when the inputs
// were applied enough cycles before start (as many as the longest chain of
// same-unit tasks). When all
// tasks are scheduled the block lowers busy, pulses done for one cycle and
// registers total_time, the latest finish date, i.e. the total execution time
// of the mapped graph, and sched_cycles, the number of clock cycles the pass
// spent scheduling (for a chain of k hardware tasks, k cycles).
//
// Inputs impl, texe and dep must stay stable from start until done. The graph
// must be acyclic; a cyclic graph never completes.
//
// As in the original scheduler design: one IP per task, the orientation of
// the dependency matrix, the total execution time computed by this block. This design's own choices: the
// start/busy/done handshake, the cycle counter and the convergence test.
module dfg_ip_sched
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
  input  logic [N-1:0]  ms_grant,
  input  logic [N-1:0]  sl_grant,
  input  logic [TW-1:0] ms_start,
  input  logic [TW-1:0] sl_start,
  output logic [N-1:0]  ready_vec,
  output logic [TW-1:0] asap_vec   [N],
  output logic [TW-1:0] urg_vec    [N],
  output logic          urg_valid,
  output logic [N-1:0]  done_vec,
  output logic [TW-1:0] start_vec  [N],
  output logic [TW-1:0] finish_vec [N],
  output logic          busy,
  output logic          done,
  output logic [TW-1:0] total_time,
  output logic [CW-1:0] sched_cycles
);

  logic [N-1:0]  urg_stable;
  logic          all_done;
  logic [TW-1:0] latest;

  for (genvar i = 0; i < N; i++) begin : g_task
    logic [N-1:0] succ_mask;
    for (genvar s = 0; s < N; s++) begin : g_col
      assign succ_mask[s] = dep[s][i];
    end

    task_ip #(.N(N), .TW(TW)) u_task (
      .clk        (clk),
      .rst_n      (rst_n),
      .clear      (start),
      .run        (busy),
      .impl       (impl[i]),
      .texe       (texe[i]),
      .pred_mask  (dep[i]),
      .succ_mask  (succ_mask),
      .done_vec   (done_vec),
      .finish_vec (finish_vec),
      .impl_vec   (impl),
      .texe_vec   (texe),
      .urg_vec    (urg_vec),
      .grant      (ms_grant[i] | sl_grant[i]),
      .sw_start   (ms_grant[i] ? ms_start : sl_start),
      .ready      (ready_vec[i]),
      .asap       (asap_vec[i]),
      .urg        (urg_vec[i]),
      .urg_stable (urg_stable[i]),
      .done       (done_vec[i]),
      .start_time (start_vec[i]),
      .finish_time(finish_vec[i])
    );
  end

  assign all_done  = &done_vec;
  assign urg_valid = busy && (&urg_stable);

  always_comb begin
    latest = '0;
    for (int i = 0; i < N; i++)
      if (finish_vec[i] > latest) latest = finish_vec[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      total_time   <= '0;
      sched_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy         <= 1'b1;
        sched_cycles <= '0;
      end else if (busy) begin
        if (all_done) begin
          busy       <= 1'b0;
          done       <= 1'b1;
          total_time <= latest;
        end else begin
          sched_cycles <= sched_cycles + 1'b1;
        end
      end
    end
  end

endmodule
