// tb_task_ip: self-checking test of one task node (N = 4 tasks, 16-bit times).
//
// Each round clears the node with a random implementation (an unused slot
// must come out already scheduled, and the urgency keeps iterating), then
// applies random predecessor and successor masks, scheduled flags, finish
// dates, urgencies and a random manager grant. Before the clock edge it checks Ready, the ASAP date and the
// urgency-stable flag; after it, the new urgency and the scheduled state and
// dates. Expected values are computed here from the definitions: ASAP is the
// latest predecessor finish, urgency the largest successor execution time on
// another unit or urgency on the same unit, an RCU task is scheduled when
// ready at its ASAP date, a software task only on a grant at the given date.
module tb_task_ip;
  import sched_pkg::*;

  localparam int N  = 4;
  localparam int TW = 16;

  logic          clk = 1'b0, rst_n = 1'b0, clear = 1'b0, run = 1'b0;
  impl_e         impl;
  logic [TW-1:0] texe, sw_start;
  logic [N-1:0]  pred_mask, succ_mask, done_vec;
  logic [TW-1:0] finish_vec [N];
  impl_e         impl_vec [N];
  logic [TW-1:0] texe_vec [N];
  logic [TW-1:0] urg_vec  [N];
  logic          grant;
  logic          ready, urg_stable, done;
  logic [TW-1:0] asap, urg, start_time, finish_time;

  task_ip #(.N(N), .TW(TW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hw = 0, n_sw = 0, n_wait = 0;

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

  function automatic int exp_urg();
    int v;
    v = 0;
    foreach (impl_vec[s])
      if (succ_mask[s] && impl_vec[s] != IMPL_NONE)
        v = (int'(impl_vec[s] == impl ? urg_vec[s] : texe_vec[s]) > v) ?
            int'(impl_vec[s] == impl ? urg_vec[s] : texe_vec[s]) : v;
    return v;
  endfunction

  initial begin
    int e_asap, e_urg, e_start, e_fin;
    bit e_ready, e_sched;
    int cand [$];
    impl = IMPL_HW; texe = '0; sw_start = '0; pred_mask = '0; succ_mask = '0;
    done_vec = '0; grant = 1'b0;
    for (int i = 0; i < N; i++) begin
      finish_vec[i] = '0; impl_vec[i] = IMPL_HW; texe_vec[i] = '0; urg_vec[i] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 3000; t++) begin
      // clear with a random implementation
      impl = impl_e'($urandom_range(0, 3));
      texe = TW'($urandom_range(1, 60));
      clear = 1'b1; run = 1'b0;
      #1;
      e_urg = exp_urg();
      @(negedge clk);
      clear = 1'b0;
      check(done == (impl == IMPL_NONE), "done after clear");
      check(start_time == 0 && finish_time == 0, "cleared dates");
      check(int'(urg) == e_urg, "urgency keeps iterating during clear");

      // one run cycle with random surroundings (task 0 is this node)
      run = 1'b1;
      pred_mask = N'($urandom) & 4'b1110;
      succ_mask = N'($urandom) & 4'b1110 & ~pred_mask;
      done_vec  = N'($urandom);
      done_vec[0] = done;
      grant    = 1'($urandom_range(0, 1));
      sw_start = TW'($urandom_range(0, 200));
      for (int i = 0; i < N; i++) begin
        finish_vec[i] = TW'($urandom_range(0, 100));
        impl_vec[i]   = impl_e'($urandom_range(0, 3));
        texe_vec[i]   = TW'($urandom_range(1, 60));
        urg_vec[i]    = TW'($urandom_range(0, 60));
      end
      impl_vec[0] = impl;
      texe_vec[0] = texe;
      #1;
      cand = {};
      foreach (finish_vec[p]) if (pred_mask[p]) cand.push_back(int'(finish_vec[p]));
      e_asap = (cand.size() == 0) ? 0 : cand.max()[0];
      cand = {};
      foreach (impl_vec[s])
        if (succ_mask[s] && impl_vec[s] != IMPL_NONE)
          cand.push_back(int'(impl_vec[s] == impl ? urg_vec[s] : texe_vec[s]));
      e_urg = (cand.size() == 0) ? 0 : cand.max()[0];
      check(e_urg == exp_urg(), "urgency references agree");
      e_ready = !done && ((pred_mask & done_vec) == pred_mask);
      check(ready == e_ready, $sformatf("ready %0b expected %0b", ready, e_ready));
      check(int'(asap) == e_asap, $sformatf("asap %0d expected %0d", asap, e_asap));
      check(urg_stable == (e_urg == int'(urg)), "urg_stable before the update");
      e_sched = e_ready && (impl == IMPL_HW || grant);
      e_start = (impl == IMPL_HW) ? e_asap : int'(sw_start);
      e_fin   = e_start + int'(texe);
      if (e_sched && impl == IMPL_HW) n_hw++;
      if (e_sched && impl != IMPL_HW) n_sw++;
      if (e_ready && !e_sched) n_wait++;
      @(negedge clk);
      check(int'(urg) == e_urg, $sformatf("urg %0d expected %0d", urg, e_urg));
      if (e_sched)
        check(done && int'(start_time) == e_start && int'(finish_time) == e_fin,
              $sformatf("scheduled dates %0d-%0d expected %0d-%0d", start_time, finish_time, e_start, e_fin));
      else
        check(done == (impl == IMPL_NONE) && start_time == 0, "not scheduled");
      // a scheduled task is no longer ready
      done_vec[0] = done;
      #1;
      check(!(done && ready), "scheduled task not ready");
      run = 1'b0;
    end
    check(n_hw > 0 && n_sw > 0 && n_wait > 0, "all cases covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
