// tb_hw_scheduler: end-to-end test of the HW/SW scheduler at its default size
// (20 tasks, 16-bit times).
//
// A behavioural reference model in this file replays the scheduling algorithm
// cycle by cycle (hardware tasks launched when ready, one software task per
// processor and cycle chosen by minimum ASAP, maximum urgency, maximum
// execution time, lowest index; managers held until the urgency iteration,
// which the testbench follows from reset, is stable) and predicts every start and finish date, the total execution time,
// the number of scheduling cycles and the updated dependency matrix. Each pass
// of the scheduler is compared with it. Independently of the model, every pass
// is also checked for consistency: each task starts exactly at the latest
// finish of its predecessors in the updated graph, no two tasks overlap on a
// processor, and the total time is the latest finish.
//
// Cases: a 20-task graph with a 10-task critical chain and fork/join branches,
// all on the RCU (10 scheduling cycles expected), all on the master
// (20 cycles expected, one per task), mixed, and split between the two
// processors with the mapping applied early (no wait for the urgencies); a small graph where the urgency rule
// decides (expected total 18 rather than 23); then random graphs and
// partitionings. The test counts how often each mechanism occurred (RCU
// launch, processor-order decision by ASAP, by urgency, by execution time,
// urgency fed back through a same-unit successor, managers waiting for the
// urgency, a task delayed by a busy processor, both processors scheduling in
// one cycle, an order edge added, an unused slot) and fails on any that never
// did.

module tb_hw_scheduler;
  import sched_pkg::*;

  localparam int N  = N_TASKS_DEF;
  localparam int TW = TW_DEF;
  localparam int NRAND = 300;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
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

  hw_scheduler dut (
    .clk, .rst_n, .start, .impl, .texe, .dep,
    .busy, .done, .total_time, .sched_cycles, .start_vec, .finish_vec,
    .dep_upd, .ms_total_time, .sl_total_time,
    .task_done, .ms_tasks_ready, .sl_tasks_ready
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_hw_launch, n_by_asap, n_by_urg, n_by_texe, n_urg_feedback;
  int n_urg_wait, n_proc_busy, n_dual, n_edge, n_unused, n_multi_ready;

  // Model results.
  int            m_start [N];
  int            m_fin   [N];
  int            m_cycles, m_total;
  logic [N-1:0]  m_dep [N];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  // The urgency iteration runs on every clock edge, in and out of a pass;
  // ref_u follows it from reset, so that the model can start a pass from the
  // same urgency state.
  int ref_u [N];
  always @(posedge clk) begin
    int nu [N];
    for (int i = 0; i < N; i++) begin
      nu[i] = 0;
      if (rst_n)
        for (int s = 0; s < N; s++)
          if (dep[s][i] && impl[s] != IMPL_NONE)
            nu[i] = imax(nu[i], (impl[s] != impl[i]) ? int'(texe[s]) : ref_u[s]);
    end
    ref_u <= nu;
  end

  // Reference model of one scheduling pass, called in its first cycle.
  function automatic void model();
    bit   dn [N], ndn [N], rdy [N];
    int   u [N], un [N], asap [N];
    int   freet [2], last [2];
    bit   valid, any_sw_ready;
    impl_e unit;
    m_cycles = 0;
    freet = '{0, 0};
    last  = '{-1, -1};
    for (int i = 0; i < N; i++) begin
      dn[i] = (impl[i] == IMPL_NONE);
      m_fin[i] = 0; m_start[i] = 0; u[i] = ref_u[i];
      m_dep[i] = dep[i];
      if (impl[i] == IMPL_NONE) n_unused++;
    end
    forever begin
      bit all = 1;
      for (int i = 0; i < N; i++) all &= dn[i];
      if (all || m_cycles > 1000) break;
      // urgency step
      valid = 1;
      for (int i = 0; i < N; i++) begin
        un[i] = 0;
        for (int s = 0; s < N; s++)
          if (dep[s][i] && impl[s] != IMPL_NONE)
            un[i] = imax(un[i], (impl[s] != impl[i]) ? int'(texe[s]) : u[s]);
        if (un[i] != u[i]) valid = 0;
      end
      any_sw_ready = 0;
      for (int i = 0; i < N; i++) begin
        rdy[i] = !dn[i];
        asap[i] = 0;
        for (int p = 0; p < N; p++)
          if (dep[i][p]) begin
            if (!dn[p]) rdy[i] = 0;
            asap[i] = imax(asap[i], m_fin[p]);
          end
        ndn[i] = dn[i];
        if (rdy[i] && impl[i] != IMPL_HW) any_sw_ready = 1;
      end
      if (!valid && any_sw_ready) n_urg_wait++;
      for (int i = 0; i < N; i++)
        if (rdy[i] && impl[i] == IMPL_HW) begin
          m_start[i] = asap[i];
          m_fin[i] = asap[i] + int'(texe[i]);
          ndn[i] = 1;
          n_hw_launch++;
        end
      if (valid) begin
        int nsched = 0;
        for (int k = 0; k < 2; k++) begin
          int best = -1, ncand = 0, nmin = 0, nurg = 0, minasap = 1 << 30, maxurg = -1;
          unit = (k == 0) ? IMPL_MS : IMPL_SL;
          for (int i = 0; i < N; i++)
            if (rdy[i] && impl[i] == unit) begin
              ncand++;
              if (best < 0 ||
                  asap[i] < asap[best] ||
                  (asap[i] == asap[best] && u[i] > u[best]) ||
                  (asap[i] == asap[best] && u[i] == u[best] && texe[i] > texe[best]))
                best = i;
            end
          if (best < 0) continue;
          // which criterion decided
          for (int i = 0; i < N; i++)
            if (rdy[i] && impl[i] == unit && asap[i] < minasap) minasap = asap[i];
          for (int i = 0; i < N; i++)
            if (rdy[i] && impl[i] == unit && asap[i] == minasap) begin
              nmin++;
              if (u[i] > maxurg) maxurg = u[i];
            end
          for (int i = 0; i < N; i++)
            if (rdy[i] && impl[i] == unit && asap[i] == minasap && u[i] == maxurg) nurg++;
          if (ncand > 1 && nmin == 1) n_by_asap++;
          else if (nmin > 1 && nurg == 1) n_by_urg++;
          if (nurg > 1) begin
            n_multi_ready++;
            for (int i = 0; i < N; i++)
              if (i != best && rdy[i] && impl[i] == unit && asap[i] == minasap &&
                  u[i] == maxurg && texe[i] != texe[best]) begin
                n_by_texe++;
                break;
              end
          end
          m_start[best] = imax(asap[best], freet[k]);
          if (m_start[best] > asap[best]) n_proc_busy++;
          m_fin[best] = m_start[best] + int'(texe[best]);
          freet[k] = m_fin[best];
          if (last[k] >= 0) begin
            if (!dep[best][last[k]]) n_edge++;
            m_dep[best][last[k]] = 1'b1;
          end
          last[k] = best;
          ndn[best] = 1;
          nsched++;
        end
        if (nsched == 2) n_dual++;
      end
      for (int i = 0; i < N; i++) begin
        dn[i] = ndn[i];
        u[i] = un[i];
      end
      m_cycles++;
    end
    // urgency fed back through a same-unit successor
    for (int i = 0; i < N; i++) begin
      int direct = 0;
      if (impl[i] == IMPL_NONE || impl[i] == IMPL_HW) continue;
      for (int s = 0; s < N; s++)
        if (dep[s][i] && impl[s] != IMPL_NONE && impl[s] != impl[i])
          direct = imax(direct, int'(texe[s]));
      if (u[i] > direct) n_urg_feedback++;
    end
    m_total = 0;
    for (int i = 0; i < N; i++) m_total = imax(m_total, m_fin[i]);
  endfunction

  // Run the DUT on the current inputs and compare.
  task automatic run_pass(input string name, input int exp_cycles = -1, input int exp_total = -1);
    int cyc = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    model();
    while (!done && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check(done, {name, ": pass completes"});
    check(!busy, {name, ": busy low after done"});
    check(int'(total_time) == m_total,
          $sformatf("%s: total_time %0d, model %0d", name, total_time, m_total));
    check(int'(sched_cycles) == m_cycles,
          $sformatf("%s: sched_cycles %0d, model %0d", name, sched_cycles, m_cycles));
    if (exp_cycles >= 0)
      check(int'(sched_cycles) == exp_cycles,
            $sformatf("%s: sched_cycles %0d, expected %0d", name, sched_cycles, exp_cycles));
    if (exp_total >= 0)
      check(int'(total_time) == exp_total,
            $sformatf("%s: total_time %0d, expected %0d", name, total_time, exp_total));
    for (int i = 0; i < N; i++) begin
      int est = 0;
      check(int'(start_vec[i]) == m_start[i] && int'(finish_vec[i]) == m_fin[i],
            $sformatf("%s: task %0d dates %0d-%0d, model %0d-%0d", name, i,
                      start_vec[i], finish_vec[i], m_start[i], m_fin[i]));
      check(dep_upd[i] == m_dep[i],
            $sformatf("%s: dep_upd row %0d %b, model %b", name, i, dep_upd[i], m_dep[i]));
      // Model-free consistency: start = latest finish of predecessors in the
      // updated graph; execution time respected.
      if (impl[i] == IMPL_NONE) continue;
      for (int p = 0; p < N; p++)
        if (dep_upd[i][p]) est = imax(est, int'(finish_vec[p]));
      check(int'(start_vec[i]) == est,
            $sformatf("%s: task %0d starts %0d, latest predecessor finish %0d", name, i, start_vec[i], est));
      check(finish_vec[i] == start_vec[i] + texe[i], $sformatf("%s: task %0d length", name, i));
      // no overlap on one processor
      if (impl[i] != IMPL_HW)
        for (int j = i + 1; j < N; j++)
          if (impl[j] == impl[i])
            check(finish_vec[i] <= start_vec[j] || finish_vec[j] <= start_vec[i],
                  $sformatf("%s: tasks %0d and %0d overlap", name, i, j));
    end
    begin
      int lat;
      lat = 0;
      for (int i = 0; i < N; i++) lat = imax(lat, int'(finish_vec[i]));
      check(int'(total_time) == lat, {name, ": total time is the latest finish"});
    end
  endtask

  task automatic clear_graph();
    for (int i = 0; i < N; i++) begin
      impl[i] = IMPL_NONE;
      texe[i] = '0;
      dep[i]  = '0;
    end
  endtask

  // Twenty tasks: a chain 0..9 (the sequential application) plus ten tasks
  // in fork/join branches that never lengthen the chain beyond ten tasks.
  task automatic graph20(input impl_e all_impl);
    static int e [][2] = '{'{1,0},'{2,1},'{3,2},'{4,3},'{5,4},'{6,5},'{7,6},'{8,7},'{9,8},
                    '{10,1},'{4,10},'{11,1},'{12,11},'{5,12},'{13,6},'{14,6},'{8,13},
                    '{8,14},'{7,15},'{16,3},'{17,16},'{9,17},'{18,2},'{19,18}};
    clear_graph();
    for (int i = 0; i < N; i++) begin
      impl[i] = all_impl;
      texe[i] = TW'(3 + (i * 7) % 11);
    end
    foreach (e[k]) dep[e[k][0]][e[k][1]] = 1'b1;
  endtask

  initial begin
    clear_graph();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. all on the RCU: one cycle per task of the 10-task chain.
    graph20(IMPL_HW);
    run_pass("graph20 all-RCU", 10);
    // 2. all on the master: one cycle per task.
    graph20(IMPL_MS);
    run_pass("graph20 all-master", 20);
    // 3. mixed partitioning of the same graph.
    graph20(IMPL_HW);
    for (int i = 0; i < N; i++) impl[i] = impl_e'(i % 3);
    run_pass("graph20 mixed");

    // 3b. a mapping written well before start: the urgencies are final at
    //     once, and a software-only mapping takes at most one cycle per task.
    graph20(IMPL_MS);
    for (int i = 0; i < N; i++) impl[i] = (i % 2 == 0) ? IMPL_MS : IMPL_SL;
    repeat (25) @(negedge clk);
    begin
      int w0;
      w0 = n_urg_wait;
      run_pass("graph20 master/slave, applied early");
      check(n_urg_wait == w0, "no urgency wait when the mapping precedes start");
      check(int'(sched_cycles) <= N, "software-only mapping within one cycle per task");
    end

    // 4. Urgency example: A=0 and B=1 on the slave (5 each); A -> D=3 on the
    //    slave (5), B -> C=2 on the RCU (13). B is urgent (13) and goes first:
    //    B 0-5, C 5-18, A 5-10, D 10-15: total 18 (A first would give 23).
    clear_graph();
    impl[0] = IMPL_SL; texe[0] = 5;
    impl[1] = IMPL_SL; texe[1] = 5;
    impl[2] = IMPL_HW; texe[2] = 13;
    impl[3] = IMPL_SL; texe[3] = 5;
    dep[2][1] = 1'b1;
    dep[3][0] = 1'b1;
    run_pass("urgency example", -1, 18);
    check(start_vec[1] == 0 && start_vec[0] == 5, "urgent task goes first");

    // 5. random graphs and partitionings
    for (int t = 0; t < NRAND; t++) begin
      int dens, r;
      dens = 5 + $urandom_range(0, 30);
      clear_graph();
      for (int i = 0; i < N; i++) begin
        r = $urandom_range(0, 99);
        impl[i] = (r < 30) ? IMPL_HW : (r < 62) ? IMPL_MS : (r < 94) ? IMPL_SL : IMPL_NONE;
        texe[i] = TW'($urandom_range(1, 50));
        for (int p = 0; p < i; p++)
          if ($urandom_range(0, 99) < dens) dep[i][p] = 1'b1;
      end
      run_pass($sformatf("random %0d", t));
    end
    // a second pass on the same inputs gives the same result
    run_pass("repeat");

    $display("mechanisms: rcu_launch=%0d by_asap=%0d by_urgency=%0d by_texe=%0d urg_feedback=%0d",
             n_hw_launch, n_by_asap, n_by_urg, n_by_texe, n_urg_feedback);
    $display("            urg_wait=%0d proc_busy=%0d dual=%0d order_edge=%0d unused=%0d multi_ready=%0d",
             n_urg_wait, n_proc_busy, n_dual, n_edge, n_unused, n_multi_ready);
    check(n_hw_launch > 0, "RCU launch happened");
    check(n_by_asap > 0, "ASAP criterion decided");
    check(n_by_urg > 0, "urgency criterion decided");
    check(n_by_texe > 0, "execution-time criterion decided");
    check(n_urg_feedback > 0, "urgency fed back through a same-unit successor");
    check(n_urg_wait > 0, "managers waited for the urgency");
    check(n_proc_busy > 0, "a task waited for a busy processor");
    check(n_dual > 0, "both processors scheduled in one cycle");
    check(n_edge > 0, "an order edge was added");
    check(n_unused > 0, "an unused slot occurred");
    check(n_multi_ready > 0, "Tasks_Ready held several tasks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
