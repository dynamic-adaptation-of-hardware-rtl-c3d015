// tb_partition_sweep: scheduler computation time against the HW/SW
// partitioning, on a 20-task graph at the default size.
//
// The graph has a sequential chain of ten tasks (0..9) and ten more tasks in
// fork, join and sequential branches around it; its longest chain has ten
// tasks. The same graph is scheduled under many partitionings: all on the
// RCU, all on the master, all on the slave, and random mixes. For each pass
// the test checks that the schedule is consistent (every task starts at the
// latest finish of its predecessors in the updated graph, no overlap on a
// processor, total time = latest finish) and that the computation time lies
// within its bounds: at least the ten cycles of the longest chain, at least
// one cycle per task of the busier processor, and at most one cycle per task
// plus the urgency settling time (bounded by the chain length). It reports
// the smallest and largest computation time seen.
module tb_partition_sweep;
  import sched_pkg::*;

  localparam int N  = N_TASKS_DEF;
  localparam int TW = TW_DEF;
  localparam int CHAIN = 10;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  impl_e         impl [N];
  logic [TW-1:0] texe [N];
  logic [N-1:0]  dep  [N];
  logic          busy, done;
  logic [TW-1:0] total_time, ms_total_time, sl_total_time;
  logic [CW-1:0] sched_cycles;
  logic [TW-1:0] start_vec [N];
  logic [TW-1:0] finish_vec [N];
  logic [N-1:0]  dep_upd [N];
  logic [N-1:0]  task_done, ms_tasks_ready, sl_tasks_ready;

  hw_scheduler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int min_cyc = 1 << 30, max_cyc = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_scenario(input string name, input int exp_cycles = -1);
    int cyc, n_ms, n_sl, lat;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 2000) begin
      @(negedge clk);
      cyc++;
    end
    check(done, {name, ": completes"});
    n_ms = 0; n_sl = 0; lat = 0;
    for (int i = 0; i < N; i++) begin
      int est;
      est = 0;
      if (impl[i] == IMPL_MS) n_ms++;
      if (impl[i] == IMPL_SL) n_sl++;
      for (int p = 0; p < N; p++)
        if (dep_upd[i][p] && int'(finish_vec[p]) > est) est = int'(finish_vec[p]);
      check(int'(start_vec[i]) == est, $sformatf("%s: task %0d start %0d, expected %0d", name, i, start_vec[i], est));
      check(finish_vec[i] == start_vec[i] + texe[i], $sformatf("%s: task %0d length", name, i));
      if (int'(finish_vec[i]) > lat) lat = int'(finish_vec[i]);
      if (impl[i] != IMPL_HW)
        for (int j = i + 1; j < N; j++)
          if (impl[j] == impl[i])
            check(finish_vec[i] <= start_vec[j] || finish_vec[j] <= start_vec[i],
                  $sformatf("%s: tasks %0d and %0d overlap", name, i, j));
    end
    check(int'(total_time) == lat, {name, ": total time"});
    check(int'(sched_cycles) >= CHAIN, $sformatf("%s: %0d cycles below the chain length", name, sched_cycles));
    check(int'(sched_cycles) >= n_ms && int'(sched_cycles) >= n_sl, $sformatf("%s: fewer cycles than tasks on a processor", name));
    check(int'(sched_cycles) <= N + CHAIN, $sformatf("%s: %0d cycles above the bound", name, sched_cycles));
    if (exp_cycles >= 0)
      check(int'(sched_cycles) == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", name, sched_cycles, exp_cycles));
    if (int'(sched_cycles) < min_cyc) min_cyc = int'(sched_cycles);
    if (int'(sched_cycles) > max_cyc) max_cyc = int'(sched_cycles);
  endtask

  initial begin
    static int e [][2] = '{'{1,0},'{2,1},'{3,2},'{4,3},'{5,4},'{6,5},'{7,6},'{8,7},'{9,8},
                    '{10,1},'{4,10},'{11,1},'{12,11},'{5,12},'{13,6},'{14,6},'{8,13},
                    '{8,14},'{7,15},'{16,3},'{17,16},'{9,17},'{18,2},'{19,18}};
    for (int i = 0; i < N; i++) begin
      dep[i]  = '0;
      texe[i] = TW'(2 + (i * 5) % 9);
      impl[i] = IMPL_HW;
    end
    foreach (e[k]) dep[e[k][0]][e[k][1]] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    run_scenario("all on the RCU", CHAIN);
    for (int i = 0; i < N; i++) impl[i] = IMPL_MS;
    run_scenario("all on the master", N);
    for (int i = 0; i < N; i++) impl[i] = IMPL_SL;
    run_scenario("all on the slave", N);
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < N; i++) impl[i] = impl_e'($urandom_range(0, 2));
      run_scenario($sformatf("partitioning %0d", t));
    end
    $display("computation time over all partitionings: %0d to %0d cycles", min_cyc, max_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
