// tb_fastchart_64tasks - FASTCHART at full capacity: 64 tasks, 8 priorities.
//
// Task 0 holds the Not-Switch-Flag and activates tasks 1..63, task n at
// priority n mod 8, so that every ready FIFO fills to its depth of 8 (FIFO 0
// counts task 0 itself once it is preempted). Then it releases the flag and
// terminates. Every other task runs the same position-independent program:
// three times it increments a counter in its own memory slice and delays for
// ((n+1) mod 4) + 1 ticks, then it terminates. Default parameters throughout.
//
// Checks: no ready FIFO overflows; every task's counter reaches 3; every
// task ends inactive and the CPU idle; exactly 63 x 3 delays expire; and at
// every task switch the ready queue holds no task of higher priority than
// the one switched in (the static-priority rule).
module tb_fastchart_64tasks;
  import fc_pkg::*;
  import fc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] mem_addr;
  logic mem_re, mem_we, cpu_run, cpu_retire;
  word_t mem_rdata, mem_wdata;
  task_ref_t old_task, new_task;
  rtu_ev_t ev;
  int checks = 0, failures = 0, cycles = 0;
  int max_full = 0, max_ready = 0;
  int fifo_count [8];
  for (genvar p = 0; p < 8; p++) begin : g_cnt
    assign fifo_count[p] = int'(dut.u_rtu.u_rq.g_fifo[p].u_fifo.count);
  end
  int n_swap = 0, n_pre = 0, n_vol = 0, n_exp = 0, n_ovf = 0, n_rep = 0, n_bad_order = 0;

  fastchart dut (.*);
  fc_main_mem u_mem (.clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = !clk;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_swap += int'(ev.swap); n_pre += int'(ev.preempt); n_vol += int'(ev.voluntary);
    n_exp += int'(ev.expire); n_ovf += int'(ev.overflow); n_rep += int'(ev.replace);
    if ($countones(dut.u_rtu.u_rq.full) > max_full) max_full = $countones(dut.u_rtu.u_rq.full);
    begin
      int r;
      r = 0;
      for (int p = 0; p < 8; p++) r += fifo_count[p];
      if (r > max_ready) max_ready = r;
    end
    if (ev.swap && new_task.valid && dut.u_rtu.rq_head_valid &&
        dut.u_rtu.rq_head_prio > new_task.prio) n_bad_order++;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t body [$];
    word_t boot [$];
    boot = '{a_snsf(), a_ldi(1, 1), a_ldi(3, 7), a_ldi(4, 64),
             a_alu(ALU_MOV, 2, 1), a_alu(ALU_AND, 2, 3), a_act(1, 2),    // 4-6
             a_addi(1, 1), a_alu(ALU_CMP, 1, 4), a_bcc(CC_NE, -6),        // 7-9
             a_cnsf(), a_term()};
    body = '{a_alu(ALU_MOV, 1, 0), a_addi(1, -256), a_ldi(2, 3), a_ldi(5, 0),
             a_addi(5, 1), a_store(5, 1),                                 // 4-5 loop
             a_alu(ALU_MOV, 6, 0, SH_SWAP), a_alu(ALU_MOV, 6, 6, SH_SHR),
             a_alu(ALU_MOV, 6, 6, SH_SHR), a_ldi(7, 3), a_alu(ALU_AND, 6, 7),
             a_addi(6, 1), a_dly(6), a_addi(2, -1), a_bcc(CC_NE, -11),    // 12-14
             a_term()};
    foreach (boot[i]) u_mem.mem[i] = boot[i];
    for (int t = 1; t < 64; t++) begin
      foreach (body[i]) u_mem.mem[t * 1024 + i] = body[i];
      u_mem.mem[(t + 1) * 1024 - 256] = 16'hDEAD;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // all FIFOs full once task 0 is back in FIFO 0
    wait (dut.u_rtu.u_cu.old_r.id != 0);
    wait (dut.u_rtu.u_tq.inac == '1 && !cpu_run);
    repeat (20) @(posedge clk);
    for (int t = 1; t < 64; t++)
      chk(u_mem.mem[16'((t + 1) * 1024 - 256)] == 16'd3, $sformatf("task %0d counted to 3", t));
    chk(!cpu_run && !old_task.valid, "CPU idle at the end");
    chk(n_ovf == 0, "no ready FIFO overflow");
    chk(n_exp == 63 * 3, $sformatf("%0d delays expired", n_exp));
    chk(n_pre > 0, "preemptions");
    chk(max_ready == 63, $sformatf("ready queue held %0d tasks at most", max_ready));
    chk(max_full >= 7, $sformatf("%0d FIFOs full at once", max_full));
    chk(n_bad_order == 0, "static priority order at every switch");
    $display("events: swaps=%0d preempt=%0d voluntary=%0d replace=%0d expire=%0d cycles=%0d",
             n_swap, n_pre, n_vol, n_rep, n_exp, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
