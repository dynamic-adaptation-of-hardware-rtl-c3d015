// tb_sw_manager: self-checking test of the processor task manager (N = 6).
//
// Two instances, one for the master (UNIT = IMPL_MS) and one for the slave
// (UNIT = IMPL_SL), see the same random ready tasks, ASAP dates, urgencies and
// execution times, drawn from small ranges so that ties are frequent. The
// expected choice is found by comparing candidates pairwise: the winner is
// the candidate no other candidate beats (earlier ASAP, then higher urgency,
// then longer execution time, then lower index). The expected Tasks_Ready set,
// start date max(ASAP, processor free date) and the processor free date kept
// here are compared each cycle. enable low must stop all choices; clear must
// reset the free date.
module tb_sw_manager;
  import sched_pkg::*;

  localparam int N  = 6;
  localparam int TW = 16;

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0, enable = 1'b0;
  impl_e         impl [N];
  logic [N-1:0]  ready_vec;
  logic [TW-1:0] asap_vec [N];
  logic [TW-1:0] urg_vec  [N];
  logic [TW-1:0] texe     [N];
  logic [N-1:0]  tr [2];
  logic [N-1:0]  ts [2];
  logic [TW-1:0] st [2];
  logic [TW-1:0] tot [2];

  sw_manager #(.N(N), .TW(TW), .UNIT(IMPL_MS)) dut_ms (
    .clk, .rst_n, .clear, .enable, .impl, .ready_vec, .asap_vec, .urg_vec, .texe,
    .tasks_ready(tr[0]), .task_scheduled(ts[0]), .sched_start(st[0]), .sw_total_time(tot[0]));
  sw_manager #(.N(N), .TW(TW), .UNIT(IMPL_SL)) dut_sl (
    .clk, .rst_n, .clear, .enable, .impl, .ready_vec, .asap_vec, .urg_vec, .texe,
    .tasks_ready(tr[1]), .task_scheduled(ts[1]), .sched_start(st[1]), .sw_total_time(tot[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_by_urg = 0, n_by_texe = 0, n_by_idx = 0, n_late = 0;

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

  function automatic bit beats(int a, int b);
    if (asap_vec[a] != asap_vec[b]) return asap_vec[a] < asap_vec[b];
    if (urg_vec[a]  != urg_vec[b])  return urg_vec[a]  > urg_vec[b];
    if (texe[a]     != texe[b])     return texe[a]     > texe[b];
    return a < b;
  endfunction

  initial begin
    int free_t [2];
    impl_e unit;
    ready_vec = '0;
    for (int i = 0; i < N; i++) begin
      impl[i] = IMPL_HW; asap_vec[i] = '0; urg_vec[i] = '0; texe[i] = '0;
    end
    free_t = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      clear  = ($urandom_range(0, 19) == 0);
      enable = ($urandom_range(0, 9) != 0) && !clear;
      ready_vec = N'($urandom);
      for (int i = 0; i < N; i++) begin
        impl[i]     = impl_e'($urandom_range(0, 3));
        asap_vec[i] = TW'($urandom_range(0, 4) * 5);
        urg_vec[i]  = TW'($urandom_range(0, 2));
        texe[i]     = TW'($urandom_range(1, 3));
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        logic [N-1:0] e_tr, e_ts;
        int win, e_st;
        win = -1;
        unit = (k == 0) ? IMPL_MS : IMPL_SL;
        e_tr = '0; e_ts = '0;
        for (int i = 0; i < N; i++) begin
          bit c, best;
          c = enable && ready_vec[i] && impl[i] == unit;
          if (!c) continue;
          best = 1;
          for (int j = 0; j < N; j++)
            if (j != i && enable && ready_vec[j] && impl[j] == unit && beats(j, i)) best = 0;
          if (best) win = i;
        end
        if (win >= 0) begin
          e_ts[win] = 1'b1;
          for (int i = 0; i < N; i++)
            if (enable && ready_vec[i] && impl[i] == unit &&
                asap_vec[i] == asap_vec[win] && urg_vec[i] == urg_vec[win]) e_tr[i] = 1'b1;
          if ($countones(e_tr) > 1) begin
            bit difft;
            difft = 0;
            foreach (e_tr[i]) if (e_tr[i] && texe[i] != texe[win]) difft = 1;
            if (difft) n_by_texe++; else n_by_idx++;
          end
          for (int i = 0; i < N; i++)
            if (i != win && enable && ready_vec[i] && impl[i] == unit &&
                asap_vec[i] == asap_vec[win] && urg_vec[i] != urg_vec[win]) begin
              n_by_urg++;
              break;
            end
        end
        check(tr[k] == e_tr, $sformatf("unit %0d tasks_ready %b expected %b", k, tr[k], e_tr));
        check(ts[k] == e_ts, $sformatf("unit %0d task_scheduled %b expected %b", k, ts[k], e_ts));
        check(int'(tot[k]) == free_t[k], $sformatf("unit %0d total time %0d expected %0d", k, tot[k], free_t[k]));
        if (win >= 0) begin
          e_st = (int'(asap_vec[win]) > free_t[k]) ? int'(asap_vec[win]) : free_t[k];
          if (e_st > int'(asap_vec[win])) n_late++;
          check(int'(st[k]) == e_st, $sformatf("unit %0d start %0d expected %0d", k, st[k], e_st));
          free_t[k] = e_st + int'(texe[win]);
        end
        if (clear) free_t[k] = 0;
      end
      @(negedge clk);
    end
    check(n_by_urg > 0 && n_by_texe > 0 && n_by_idx > 0 && n_late > 0, "all criteria exercised");
    $display("urgency decided %0d, execution time decided %0d, index decided %0d, late starts %0d",
             n_by_urg, n_by_texe, n_by_idx, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
