// tb_dfg_update: self-checking test of the graph update block (N = 5).
//
// A random original matrix is applied, then random sequences of one-hot (or
// empty) master and slave grants. The test keeps, for each processor, the list
// of tasks in the order they were granted, and expects the output matrix to be
// the original one plus, for each pair of consecutive tasks of one processor,
// the edge from the earlier task to the later one. A clear must drop the
// added edges and restart both orders.
module tb_dfg_update;
  import sched_pkg::*;

  localparam int N = 5;

  logic         clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [N-1:0] dep     [N];
  logic [N-1:0] dep_upd [N];
  logic [N-1:0] ms_grant, sl_grant;

  dfg_update #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_added = 0;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    int order [2][$];
    logic [N-1:0] exp_m [N];
    ms_grant = '0; sl_grant = '0;
    for (int i = 0; i < N; i++) dep[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 300; pass++) begin
      for (int i = 0; i < N; i++) dep[i] = N'($urandom);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      order[0] = {};
      order[1] = {};
      for (int c = 0; c < 8; c++) begin
        ms_grant = '0; sl_grant = '0;
        if ($urandom_range(0, 3) != 0) ms_grant[$urandom_range(0, N - 1)] = 1'b1;
        if ($urandom_range(0, 3) != 0) sl_grant[$urandom_range(0, N - 1)] = 1'b1;
        for (int i = 0; i < N; i++) begin
          if (ms_grant[i]) order[0].push_back(i);
          if (sl_grant[i]) order[1].push_back(i);
        end
        @(negedge clk);
        ms_grant = '0; sl_grant = '0;
        for (int i = 0; i < N; i++) exp_m[i] = dep[i];
        for (int k = 0; k < 2; k++)
          for (int j = 1; j < order[k].size(); j++) begin
            if (!exp_m[order[k][j]][order[k][j-1]]) n_added++;
            exp_m[order[k][j]][order[k][j-1]] = 1'b1;
          end
        for (int i = 0; i < N; i++)
          check(dep_upd[i] == exp_m[i],
                $sformatf("pass %0d row %0d: %b expected %b", pass, i, dep_upd[i], exp_m[i]));
      end
    end
    check(n_added > 0, "edges were added");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
