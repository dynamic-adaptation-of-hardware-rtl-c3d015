// tb_dfg_ip_sched: self-checking test of the task-node array (N = 8).
//
// Random acyclic graphs (edges only from lower to higher task index) with
// random partitionings are scheduled; the testbench itself plays both
// processor managers in the simplest way: when urg_valid is high it grants,
// per processor, the lowest-index ready task at a random start date not
// earlier than its ASAP date. Checks:
//   * each RCU task starts at the latest finish of its predecessors, each
//     granted task at the date given, and lasts its execution time;
//   * the final urgencies equal the recursive definition, evaluated here in
//     reverse index order (a successor on another unit contributes its
//     execution time, one on the same unit its urgency);
//   * once urg_valid is high it stays high until the pass ends;
//   * total_time is the latest finish, and for an all-RCU graph sched_cycles
//     is the number of tasks on its longest chain.
module tb_dfg_ip_sched;
  import sched_pkg::*;

  localparam int N  = 8;
  localparam int TW = 16;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  impl_e         impl [N];
  logic [TW-1:0] texe [N];
  logic [N-1:0]  dep  [N];
  logic [N-1:0]  ms_grant, sl_grant;
  logic [TW-1:0] ms_start, sl_start;
  logic [N-1:0]  ready_vec, done_vec;
  logic [TW-1:0] asap_vec [N];
  logic [TW-1:0] urg_vec [N];
  logic [TW-1:0] start_vec [N];
  logic [TW-1:0] finish_vec [N];
  logic          urg_valid, busy, done;
  logic [TW-1:0] total_time;
  logic [CW-1:0] sched_cycles;

  dfg_ip_sched #(.N(N), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_allhw = 0, n_wait = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Drive the manager grants for the current cycle.
  int given [N];
  always @(negedge clk) begin
    ms_grant <= '0;
    sl_grant <= '0;
    if (busy && urg_valid) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (ready_vec[i] && impl[i] == IMPL_MS) begin
          ms_grant <= N'(1) << i;
        end
        if (ready_vec[i] && impl[i] == IMPL_SL) begin
          sl_grant <= N'(1) << i;
        end
      end
    end
  end
  // start dates: ASAP plus a small random delay
  always_comb begin
    ms_start = '0;
    sl_start = '0;
    for (int i = 0; i < N; i++) begin
      if (ms_grant[i]) ms_start = asap_vec[i] + TW'(given[i]);
      if (sl_grant[i]) sl_start = asap_vec[i] + TW'(given[i]);
    end
  end

  initial begin
    int eu [N];
    int depth [N];
    bit allhw, seen_valid;
    int maxd, lat, cyc;
    ms_grant = '0; sl_grant = '0;
    for (int i = 0; i < N; i++) begin
      impl[i] = IMPL_HW; texe[i] = '0; dep[i] = '0; given[i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      allhw = (t % 4 == 0);
      for (int i = 0; i < N; i++) begin
        impl[i] = allhw ? IMPL_HW : impl_e'($urandom_range(0, 3));
        texe[i] = TW'($urandom_range(1, 30));
        given[i] = $urandom_range(0, 3);
        dep[i] = '0;
        for (int p = 0; p < i; p++) dep[i][p] = ($urandom_range(0, 2) == 0);
      end
      // reference urgency and chain depth
      for (int i = N - 1; i >= 0; i--) begin
        eu[i] = 0;
        for (int s = i + 1; s < N; s++)
          if (dep[s][i] && impl[s] != IMPL_NONE) begin
            int v;
            v = (impl[s] != impl[i]) ? int'(texe[s]) : eu[s];
            if (v > eu[i]) eu[i] = v;
          end
      end
      maxd = 0;
      for (int i = 0; i < N; i++) begin
        depth[i] = 1;
        for (int p = 0; p < i; p++)
          if (dep[i][p] && depth[p] + 1 > depth[i]) depth[i] = depth[p] + 1;
        if (depth[i] > maxd) maxd = depth[i];
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      seen_valid = 0;
      cyc = 0;
      while (!done && cyc < 200) begin
        if (seen_valid) check(urg_valid || !busy, "urg_valid stays high");
        if (urg_valid) seen_valid = 1;
        else if (busy && (ready_vec & ~done_vec) != '0) n_wait++;
        @(negedge clk);
        cyc++;
      end
      check(done, "pass completes");
      lat = 0;
      for (int i = 0; i < N; i++) begin
        int est;
        est = 0;
        for (int p = 0; p < N; p++)
          if (dep[i][p] && int'(finish_vec[p]) > est) est = int'(finish_vec[p]);
        check(int'(urg_vec[i]) == eu[i], $sformatf("task %0d urgency %0d expected %0d", i, urg_vec[i], eu[i]));
        if (impl[i] == IMPL_NONE)
          check(finish_vec[i] == 0, "unused slot has no dates");
        else if (impl[i] == IMPL_HW)
          check(int'(start_vec[i]) == est, $sformatf("RCU task %0d start %0d expected %0d", i, start_vec[i], est));
        else
          check(int'(start_vec[i]) == est + given[i], $sformatf("software task %0d start %0d expected %0d", i, start_vec[i], est + given[i]));
        if (impl[i] != IMPL_NONE) check(finish_vec[i] == start_vec[i] + texe[i], "finish = start + texe");
        if (int'(finish_vec[i]) > lat) lat = int'(finish_vec[i]);
      end
      check(int'(total_time) == lat, $sformatf("total_time %0d expected %0d", total_time, lat));
      if (allhw) begin
        n_allhw++;
        check(int'(sched_cycles) == maxd, $sformatf("all-RCU cycles %0d expected %0d", sched_cycles, maxd));
      end
    end
    check(n_wait > 0, "urgency convergence delayed software tasks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
