// dfg_update: builds the updated dependency matrix after scheduling.
//
// Scheduling turns the partial order of the data-flow graph into a total
// order on each software processor. This block records it as new edges:
// whenever a processor manager schedules a task, the task scheduled just
// before it on the same processor becomes one of its predecessors. The
// output matrix dep_upd is the original matrix dep with those edges added
// (rows are successors, columns predecessors). Hardware tasks each own a tile
// of the reconfigurable unit and get no extra edge.
//
// Timing: clear (start of a pass) empties the added edges and forgets the
// last task of each processor; a one-hot grant from ms_grant or sl_grant adds
// its edge at the next clock edge. dep must stay stable during the pass.
//
// As in the original scheduler design: the matrix representation and the
// purpose of the block. This design's own choice: how the order is recorded
// (a last-task register per processor).
module dfg_update
  import sched_pkg::*;
#(
  parameter int unsigned N = N_TASKS_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic [N-1:0] dep     [N],
  input  logic [N-1:0] ms_grant,
  input  logic [N-1:0] sl_grant,
  output logic [N-1:0] dep_upd [N]
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  added [N];
  logic          ms_last_vld, sl_last_vld;
  logic [IW-1:0] ms_last, sl_last;
  logic [IW-1:0] ms_idx, sl_idx;

  // Index of a one-hot grant.
  always_comb begin
    ms_idx = '0;
    sl_idx = '0;
    for (int i = 0; i < N; i++) begin
      if (ms_grant[i]) ms_idx = IW'(i);
      if (sl_grant[i]) sl_idx = IW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) added[i] <= '0;
      ms_last_vld <= 1'b0;
      sl_last_vld <= 1'b0;
      ms_last     <= '0;
      sl_last     <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) added[i] <= '0;
      ms_last_vld <= 1'b0;
      sl_last_vld <= 1'b0;
    end else begin
      if (|ms_grant) begin
        if (ms_last_vld) added[ms_idx][ms_last] <= 1'b1;
        ms_last     <= ms_idx;
        ms_last_vld <= 1'b1;
      end
      if (|sl_grant) begin
        if (sl_last_vld) added[sl_idx][sl_last] <= 1'b1;
        sl_last     <= sl_idx;
        sl_last_vld <= 1'b1;
      end
    end
  end

  always_comb
    for (int i = 0; i < N; i++) dep_upd[i] = dep[i] | added[i];

endmodule
