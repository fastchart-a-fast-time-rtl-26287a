// tb_fastchart - end-to-end test of FASTCHART with all parameters at their
// defaults (64 tasks, 8 priorities, ready FIFOs of depth 8, 1000 cycles per
// time tick).
//
// Five tasks run from a behavioural main memory, each in its own 1024-word
// space. Task 0 (priority 0, running after reset) activates task 1
// (priority 2), which preempts it, stores a marker and delays itself for one
// tick. Task 0 then has an activation refused (task 1 is waiting), sets the
// Not-Switch-Flag, activates task 3 (priority 5) and busy-loops: task 3 may
// only take over when the flag is cleared. Task 3 activates task 2
// (priority 1) and later task 4 (priority 4), which replaces the lower task
// held as NEW; it delays three ticks and lets task 4 run a subroutine.
// Tasks 1 and 3 expire and continue, task 0 sums a table with LOAD (r)+,
// calls a subroutine, delays two ticks and finishes; every task terminates
// and the CPU ends idle. The test checks every stored result and counts
// each scheduling mechanism (preemption, voluntary switch, replacement of
// NEW, expiry, refused activation, switch held by the Not-Switch-Flag, idle
// switch, two-cycle instructions); one that never happens is a failure.
module tb_fastchart;
  import fc_pkg::*;
  import fc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] mem_addr;
  logic mem_re, mem_we, cpu_run, cpu_retire;
  word_t mem_rdata, mem_wdata;
  task_ref_t old_task, new_task;
  rtu_ev_t ev;
  int checks = 0, failures = 0, cycles = 0;
  int n_swap = 0, n_pre = 0, n_vol = 0, n_idle = 0, n_rep = 0, n_exp = 0, n_err = 0, n_nsf_hold = 0;
  int n_retire = 0, n_two_cycle = 0;

  fastchart dut (.*);
  fc_main_mem u_mem (.clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = !clk;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_swap += int'(ev.swap); n_pre += int'(ev.preempt); n_vol += int'(ev.voluntary);
    n_idle += int'(ev.idle); n_rep += int'(ev.replace); n_exp += int'(ev.expire);
    n_err += int'(ev.act_err); n_retire += int'(cpu_retire);
    if (ev.swap) $display("cycle %0d: switch from %s to %s%s", cycles,
                          dut.cpu_run ? $sformatf("task %0d", old_task.id) : "idle",
                          new_task.valid ? $sformatf("task %0d", new_task.id) : "idle",
                          ev.preempt ? " (preemption)" : ev.voluntary ? " (voluntary)" : "");
    if (dut.u_cpu.phase == 2'd1) n_two_cycle++;
    if (ev.preempt) begin
      checks++;
      if (dut.u_cpu.nsf_prog || dut.u_cpu.phase == 2'd1) begin
        failures++;
        $display("FAIL preemption at cycle %0d while switching is not allowed", cycles);
      end
    end
    // NEW outranks OLD but the Not-Switch-Flag keeps the current task
    if (new_task.valid && old_task.valid && new_task.prio > old_task.prio &&
        dut.u_cpu.nsf_prog && dut.u_rtu.u_cu.state == 2'd0) n_nsf_hold++;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(int base, word_t prog [$]);
    foreach (prog[i]) u_mem.mem[base + i] = prog[i];
  endtask

  localparam int T0 = 16'h0000, T1 = 16'h0400, T2 = 16'h0800, T3 = 16'h0C00, T4 = 16'h1000;
  int sum;

  initial begin
    // task 0, priority 0
    put(T0, '{
      a_ldi(1, 1), a_ldi(2, 2), a_act(1, 2),                 // 0-2  activate task 1, prio 2
      a_ldi(7, 10), a_addi(7, -1), a_bcc(CC_NE, -2),         // 3-5  task 1 preempts in here
      a_act(1, 2),                                           // 6    refused: task 1 is waiting
      a_ldi(5, 0), a_bcc(CC_EC, 1), a_ldi(5, 1),             // 7-9  r5 = SR.E
      a_ldi(6, 0), a_ldhi(6, 2), a_store(5, 6, AM_POSTINC),  // 10-12 [0x200] = 1
      a_snsf(), a_ldi(3, 3), a_ldi(4, 5), a_act(3, 4),       // 13-16 activate task 3, prio 5
      a_ldi(7, 60), a_addi(7, -1), a_bcc(CC_NE, -2),         // 17-19 busy loop, no switch
      a_store(7, 6, AM_POSTINC), a_cnsf(),                   // 20-21 [0x201] = 0, allow switch
      a_ldi(2, 16), a_ldhi(2, 2), a_ldi(3, 0), a_ldi(4, 5),  // 22-25 table at 0x210, 5 words
      a_load(5, 2, AM_POSTINC), a_alu(ALU_ADD, 3, 5), a_addi(4, -1), a_bcc(CC_NE, -4), // 26-29
      a_store(3, 6, AM_POSTINC),                             // 30   [0x202] = sum
      a_csr(6),                                              // 31   call 38
      a_store(3, 6, AM_POSTINC),                             // 32   [0x203] = 2*sum
      a_ldi(1, 2), a_dly(1),                                 // 33-34 delay 2 ticks
      a_ldi(5, 7), a_store(5, 6, AM_POSTINC),                // 35-36 [0x204] = 7
      a_term(),                                              // 37
      a_alu(ALU_MOV, 3, 3, SH_SHL), a_rsr()});               // 38-39 subroutine
    for (int i = 0; i < 5; i++) u_mem.mem[16'h210 + i] = 16'(3 * i + 1);
    sum = 1 + 4 + 7 + 10 + 13;
    // task 1, priority 2
    put(T1, '{a_ldi(1, 0), a_ldhi(1, 6), a_ldi(2, 16'h11), a_store(2, 1, AM_POSTINC),
              a_ldi(3, 1), a_dly(3), a_ldi(2, 16'h12), a_store(2, 1, AM_POSTINC), a_term()});
    // task 2, priority 1
    put(T2, '{a_ldi(1, 0), a_ldhi(1, 16'h0A), a_ldi(2, 16'h22), a_store(2, 1), a_term()});
    // task 3, priority 5
    put(T3, '{a_ldi(1, 0), a_ldhi(1, 16'h0E), a_ldi(2, 16'h33), a_store(2, 1, AM_POSTINC),
              a_ldi(3, 2), a_ldi(4, 1), a_act(3, 4),         // activate task 2, prio 1
              a_ldi(7, 20), a_addi(7, -1), a_bcc(CC_NE, -2), // let NEW be fetched and loaded
              a_ldi(3, 4), a_ldi(4, 4), a_act(3, 4),         // activate task 4, prio 4
              a_ldi(5, 3), a_dly(5),
              a_ldi(2, 16'h34), a_store(2, 1, AM_POSTINC), a_term()});
    // task 4, priority 4
    put(T4, '{a_ldi(1, 0), a_ldhi(1, 16'h12), a_ldi(2, 16'h44), a_csr(2),
              a_store(2, 1, AM_POSTINC), a_term(),
              a_addi(2, 1), a_rsr()});
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (dut.u_rtu.u_tq.inac == '1 && !cpu_run);
    repeat (20) @(posedge clk);
    chk(!cpu_run && !old_task.valid && !new_task.valid, "all tasks finished, CPU idle");
    chk(u_mem.mem[16'h200] == 16'd1,        "task 0: ACT of a waiting task refused");
    chk(u_mem.mem[16'h201] == 16'd0,        "task 0: busy loop ran to its end");
    chk(u_mem.mem[16'h202] == 16'(sum),     "task 0: table sum with LOAD (r)+");
    chk(u_mem.mem[16'h203] == 16'(2 * sum), "task 0: subroutine result");
    chk(u_mem.mem[16'h204] == 16'd7,        "task 0: resumed after its delay");
    chk(u_mem.mem[16'h3FF] == 16'd32,       "task 0: return address on its stack");
    chk(u_mem.mem[16'h600] == 16'h11 && u_mem.mem[16'h601] == 16'h12, "task 1: before and after its delay");
    chk(u_mem.mem[16'hA00] == 16'h22,       "task 2 ran");
    chk(u_mem.mem[16'hE00] == 16'h33 && u_mem.mem[16'hE01] == 16'h34, "task 3: before and after its delay");
    chk(u_mem.mem[16'h1200] == 16'h45,      "task 4: subroutine incremented");
    chk(u_mem.mem[16'h13FF] == 16'h1004,    "task 4: return address on its stack");
    chk(dut.u_rtu.u_tq.inac == '1,         "every task terminated");
    $display("events: swaps=%0d preempt=%0d voluntary=%0d replace=%0d expire=%0d act_err=%0d nsf_hold=%0d idle=%0d two_cycle=%0d retired=%0d cycles=%0d",
             n_swap, n_pre, n_vol, n_rep, n_exp, n_err, n_nsf_hold, n_idle, n_two_cycle, n_retire, cycles);
    chk(n_pre >= 2, "preemptions by task 1 and by task 3");
    chk(n_vol == 8, "voluntary switches (3 delays + 5 terminations)");
    chk(n_rep > 0,  "NEW replaced by a higher-priority task");
    chk(n_exp == 3, "three delays expired");
    chk(n_err == 1, "one refused activation");
    chk(n_nsf_hold > 0, "switch held off by the Not-Switch-Flag");
    chk(n_idle > 0, "idle switch");
    chk(n_two_cycle > 0, "two-cycle instructions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
