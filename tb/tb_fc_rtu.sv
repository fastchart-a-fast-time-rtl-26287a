// tb_fc_rtu - self-checking test of the Real-Time Unit and its control unit.
//
// The CPU is replaced by a stub that issues real-time calls, drives
// switch_req and the Not-Switch-Flag, and models the two register sets
// (the shadow set the RTU reads and writes, exchanged on `swap`). Directed
// steps check: activation and preemption with the exact latency (fetch of
// NEW, 11-cycle context load, one-cycle switch), the write-back of the
// preempted context and its reload later, refused activations, replacement
// of NEW by a higher-priority task, a preemption held off by the
// Not-Switch-Flag, DELAY with a voluntary switch and expiry after the right
// number of ticks, TERM with a fresh start context on reactivation, and the
// idle state when nothing is ready.
module tb_fc_rtu;
  import fc_pkg::*;
  localparam int TICK = 10;
  logic clk = 0, rst_n = 0;
  logic rt_req = 0, rt_ack, rt_err, switch_req = 0, nsf = 0, run, swap, sh_we;
  rt_op_e rt_op = RT_ACT;
  word_t rt_arg0 = 0, sh_wdata, sh_rdata;
  prio_t rt_arg1 = 0;
  logic [CTX_IDX_W-1:0] sh_idx;
  task_ref_t old_q, new_q;
  rtu_ev_t ev;
  word_t act_set [TCB_SIZE], shd_set [TCB_SIZE];
  int checks = 0, failures = 0, cycles = 0;
  int n_swap = 0, n_pre = 0, n_vol = 0, n_idle = 0, n_rep = 0, n_exp = 0, n_err = 0;

  fc_rtu #(.TICK_DIV(TICK)) dut (.*);
  always #5 clk = !clk;

  assign sh_rdata = shd_set[sh_idx];
  always @(posedge clk) begin
    cycles++;
    if (sh_we) shd_set[sh_idx] <= sh_wdata;
    if (swap) begin
      for (int i = 0; i < int'(TCB_SIZE); i++) begin
        act_set[i] <= (sh_we && sh_idx == 4'(i)) ? sh_wdata : shd_set[i];
        shd_set[i] <= act_set[i];
      end
    end
    n_swap += int'(ev.swap); n_pre += int'(ev.preempt); n_vol += int'(ev.voluntary);
    n_idle += int'(ev.idle); n_rep += int'(ev.replace); n_exp += int'(ev.expire);
    n_err += int'(ev.act_err);
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  // issue one call, wait for its acknowledge; returns the error bit
  task automatic call(rt_op_e op, int a0, int a1, output logic err);
    rt_req = 1; rt_op = op; rt_arg0 = 16'(a0); rt_arg1 = 3'(a1);
    #1;
    while (!rt_ack) begin @(posedge clk); #1; end
    err = rt_err;
    @(posedge clk); #1;
    rt_req = 0;
  endtask

  // cycles until the next swap edge (the swap cycle itself counts)
  task automatic wait_swap(output int n);
    n = 1;
    #1;
    while (!swap && n < 500) begin @(posedge clk); #1; n++; end
    @(posedge clk); #1;
  endtask

  function automatic word_t start_word(int t, int i);
    if (i == 0) return 16'((t + 1) * 1024);
    if (i == int'(CTX_PC)) return 16'(t * 1024);
    if (i == int'(CTX_IL)) return 16'hF000;
    return 16'h0;
  endfunction

  logic e;
  int n;

  initial begin
    for (int i = 0; i < int'(TCB_SIZE); i++) begin act_set[i] = 16'h0A00 + 16'(i); shd_set[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(run && old_q == '{1'b1, 6'd0, 3'd0} && !new_q.valid, "reset: task 0 runs");

    // 1. ACT task 5 priority 3: load and preempt task 0 after 1 + 11 + 1 cycles
    call(RT_ACT, 5, 3, e);
    chk(!e, "ACT 5 accepted");
    wait_swap(n);
    chk(n == 1 + 11 + 1, $sformatf("preemption latency %0d cycles", n));
    chk(act_set[int'(CTX_PC)] == 16'd5120 && act_set[0] == 16'd6144, "task 5 start context switched in");
    // write-back of task 0, then OLD=5 and task 0 fetched back as NEW and reloaded
    repeat (11 + 1 + 11) @(posedge clk); #1;
    chk(old_q == '{1'b1, 6'd5, 3'd3} && new_q == '{1'b1, 6'd0, 3'd0}, "OLD=5, NEW=0");
    begin
      logic ok = 1;
      for (int i = 0; i < int'(TCB_SIZE); i++) ok &= (shd_set[i] == 16'h0A00 + 16'(i));
      chk(ok, "context of task 0 written back and reloaded");
    end

    // 2. refused activations
    call(RT_ACT, 5, 1, e); chk(e, "ACT of an active task refused");
    call(RT_ACT, 0, 1, e); chk(e, "ACT of a preempted task refused");
    call(RT_ACT, 70, 1, e); chk(e, "ACT of a task ID out of range refused");

    // 3. Not-Switch-Flag holds off a preemption; NEW (task 0) replaced by task 6
    nsf = 1;
    call(RT_ACT, 6, 7, e); chk(!e, "ACT 6 accepted");
    repeat (40) @(posedge clk); #1;
    chk(n_swap == 1 && new_q == '{1'b1, 6'd6, 3'd7} && n_rep == 1, "NEW replaced by task 6, no switch while NSF");
    nsf = 0;
    wait_swap(n);
    chk(n == 1 && n_pre == 2, "switch as soon as NSF drops");
    repeat (30) @(posedge clk); #1;
    chk(old_q.id == 6'd6 && new_q == '{1'b1, 6'd5, 3'd3}, "OLD=6, NEW=5");

    // 4. task 6 delays 3 ticks: voluntary switch to task 5, expiry, preemption
    call(RT_DELAY, 3, 0, e);
    switch_req = 1;
    wait_swap(n);
    switch_req = 0;
    chk(n == 1 && n_vol == 1, "voluntary switch at once");
    n = 0;
    while (n_exp == 0 && n < 100) begin @(posedge clk); #1; n++; end
    chk(n_exp == 1 && n >= 2 * TICK && n <= 4 * TICK, $sformatf("expiry after %0d cycles", n));
    wait_swap(n);
    chk(n_pre == 3, "task 6 preempts task 5 after expiry");
    repeat (30) @(posedge clk); #1;
    chk(old_q.id == 6'd6, "task 6 running again");

    // 5. task 6 terminates; later reactivation starts from the beginning
    act_set[int'(CTX_PC)] = 16'h1234;
    call(RT_TERM, 0, 0, e);
    switch_req = 1;
    wait_swap(n);
    switch_req = 0;
    repeat (30) @(posedge clk); #1;
    chk(old_q.id == 6'd5 && new_q.id == 6'd0, "task 5 runs, task 0 next");
    call(RT_ACT, 6, 4, e); chk(!e, "terminated task 6 activated again");
    wait_swap(n);
    chk(act_set[int'(CTX_PC)] == 16'd6144, "task 6 restarts from its start address");
    repeat (30) @(posedge clk); #1;

    // 6. every task gives up: 6, 5, 0 terminate, then the CPU idles
    repeat (3) begin
      call(RT_TERM, 0, 0, e);
      switch_req = 1;
      wait_swap(n);
      switch_req = 0;
      repeat (30) @(posedge clk); #1;
    end
    chk(!run && n_idle == 1 && !old_q.valid, "idle when nothing is ready");
    // activation while idle: switch without preemption
    rt_req = 1; rt_op = RT_ACT; rt_arg0 = 9; rt_arg1 = 4; #1;
    chk(!rt_ack, "no call accepted while idle");
    rt_req = 0;
    $display("events: swap=%0d preempt=%0d voluntary=%0d idle=%0d replace=%0d expire=%0d err=%0d",
             n_swap, n_pre, n_vol, n_idle, n_rep, n_exp, n_err);
    chk(n_err == 3, "three refused activations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
