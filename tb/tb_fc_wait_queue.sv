// tb_fc_wait_queue - self-checking test of the Wait Queue.
//
// Loads delay counters for several tasks, drives system ticks and checks
// that each task expires after exactly its number of ticks, that expired
// counters are presented highest priority first (lowest ID among equals)
// and one at a time, and that `ack` removes the presented task. A random
// part compares against a reference list of (deadline, priority, ID).
module tb_fc_wait_queue;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tick = 0, load = 0, ack = 0, exp_valid;
  task_id_t load_id = 0, exp_id;
  prio_t load_prio = 0, exp_prio;
  logic [15:0] load_time = 0;
  logic [NTASK-1:0] waiting;
  int checks = 0, failures = 0, cycles = 0;
  int ref_left [NTASK];   // -1 = not waiting
  prio_t ref_prio [NTASK];

  fc_wait_queue #(.TIME_W(16)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  function automatic int ref_pick();
    int best;
    best = -1;
    for (int t = 0; t < int'(NTASK); t++)
      if (ref_left[t] == 0 && (best < 0 || ref_prio[t] > ref_prio[best])) best = t;
    return best;
  endfunction

  task automatic do_load(int id, int pr, int ticks);
    load = 1; load_id = task_id_t'(id); load_prio = prio_t'(pr); load_time = 16'(ticks);
    @(posedge clk); #1; load = 0;
    ref_left[id] = ticks; ref_prio[id] = prio_t'(pr);
  endtask

  task automatic do_tick();
    tick = 1;
    @(posedge clk); #1; tick = 0;
    for (int t = 0; t < int'(NTASK); t++) if (ref_left[t] > 0) ref_left[t]--;
  endtask

  // check the presented task, acknowledge it
  task automatic serve_all();
    int e;
    e = ref_pick();
    while (e >= 0) begin
      chk(exp_valid && exp_id == task_id_t'(e) && exp_prio == ref_prio[e],
          $sformatf("expired %0d/%0d expected %0d", exp_id, exp_prio, e));
      ack = 1; @(posedge clk); #1; ack = 0;
      ref_left[e] = -1;
      e = ref_pick();
    end
    chk(!exp_valid, "nothing else expired");
  endtask

  initial begin
    for (int t = 0; t < int'(NTASK); t++) begin ref_left[t] = -1; ref_prio[t] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(!exp_valid && waiting == '0, "idle after reset");
    // directed: three tasks, two expire together
    do_load(10, 2, 3);
    do_load(20, 6, 3);
    do_load(30, 4, 5);
    do_load(31, 6, 3);
    for (int k = 1; k <= 5; k++) begin
      do_tick();
      chk(exp_valid == (k == 3 || k == 5), $sformatf("expiry after %0d ticks", k));
      if (k == 3) begin
        chk(exp_id == 6'd20, "highest priority, lowest ID first");
        serve_all();
      end
      if (k == 5) serve_all();
    end
    // delay of zero ticks expires at once
    do_load(63, 1, 0);
    chk(exp_valid && exp_id == 6'd63, "zero delay");
    serve_all();
    // random
    repeat (400) begin
      int r;
      r = $urandom_range(3);
      if (r == 0) begin
        int id;
        id = $urandom_range(NTASK - 1);
        if (ref_left[id] < 0) do_load(id, $urandom_range(7), $urandom_range(6));
      end else if (r == 1) do_tick();
      else serve_all();
      for (int t = 0; t < int'(NTASK); t++) chk(waiting[t] == (ref_left[t] >= 0), "waiting set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
