// tb_fc_ready_queue - self-checking test of the Ready Queue.
//
// A reference model keeps one SystemVerilog queue per priority. Random
// pushes and pops (also both in one cycle) are applied; every cycle the
// head (valid, ID, priority) must be the first entry of the highest
// non-empty reference queue, and a push into a full FIFO must raise
// overflow and be dropped. A directed part fills one FIFO to its depth.
module tb_fc_ready_queue;
  import fc_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, head_valid, overflow;
  task_id_t push_id = 0, head_id;
  prio_t push_prio = 0, head_prio;
  task_id_t model [NPRIO][$];
  int checks = 0, failures = 0, cycles = 0, n_overflow = 0;

  fc_ready_queue #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  // compare the head with the model, then apply one cycle of push/pop
  task automatic step(logic do_push, task_id_t id, prio_t pr, logic do_pop);
    int hp;
    logic full_now;
    hp = -1;
    for (int p = 0; p < int'(NPRIO); p++) if (model[p].size() > 0) hp = p;
    push = do_push; push_id = id; push_prio = pr; pop = do_pop;
    #1;
    chk(head_valid == (hp >= 0), "head_valid");
    if (hp >= 0) chk(head_prio == prio_t'(hp) && head_id == model[hp][0],
                     $sformatf("head %0d/%0d expected %0d/%0d", head_id, head_prio, model[hp][0], hp));
    full_now = (model[pr].size() == DEPTH) && !(do_pop && hp == int'(pr));
    chk(overflow == (do_push && full_now), "overflow flag");
    if (overflow) n_overflow++;
    @(posedge clk); #1;
    if (do_pop && hp >= 0) void'(model[hp].pop_front());
    if (do_push && !full_now) model[pr].push_back(id);
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // fill priority 3 beyond its depth
    for (int i = 0; i < DEPTH + 2; i++) step(1, task_id_t'(i), 3'd3, 0);
    // higher priority arrives and is served first
    step(1, 6'd40, 3'd6, 0);
    step(0, 0, 0, 1);
    // push and pop of the same FIFO in one cycle while full
    step(1, 6'd50, 3'd3, 1);
    repeat (2000) step($urandom_range(1), task_id_t'($urandom), prio_t'($urandom), $urandom_range(1));
    while (head_valid) step(0, 0, 0, 1);
    chk(n_overflow >= 2, "overflow seen");
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
