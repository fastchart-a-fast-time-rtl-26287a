// tb_fc_tcb_memory - self-checking test of the TCB memory.
//
// Fresh tasks must read back their start context (PC at ID*1024, stack
// pointer at the top of the task's 1024-word space). Whole contexts written
// word by word for random tasks must read back unchanged and must not
// disturb other tasks (address = ID*11 + register counter); reinit must
// return a task to its start context.
module tb_fc_tcb_memory;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0;
  task_id_t id = 0, reinit_id = 0;
  logic [CTX_IDX_W-1:0] reg_cnt = 0;
  logic we = 0, reinit = 0;
  word_t wdata = 0, rdata;
  word_t model [NTASK][TCB_SIZE];
  logic  written [NTASK];
  int checks = 0, failures = 0, cycles = 0;

  fc_tcb_memory dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t start_word(int t, int i);
    if (i == 0) return 16'((t + 1) * 1024);
    if (i == 9) return 16'(t * 1024);
    if (i == 10) return 16'hF000;
    return 16'h0000;
  endfunction

  task automatic check_task(int t);
    for (int i = 0; i < int'(TCB_SIZE); i++) begin
      id = task_id_t'(t); reg_cnt = 4'(i); #1;
      chk(rdata == (written[t] ? model[t][i] : start_word(t, i)),
          $sformatf("task %0d word %0d = %h", t, i, rdata));
    end
  endtask

  task automatic write_task(int t);
    for (int i = 0; i < int'(TCB_SIZE); i++) begin
      id = task_id_t'(t); reg_cnt = 4'(i); wdata = 16'($urandom); we = 1;
      model[t][i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    written[t] = 1;
  endtask

  initial begin
    for (int t = 0; t < int'(NTASK); t++) written[t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check_task(0); check_task(1); check_task(63);
    for (int t = 0; t < int'(NTASK); t++) write_task(t);
    for (int t = 0; t < int'(NTASK); t++) check_task(t);
    reinit = 1; reinit_id = 6'd17; @(posedge clk); #1; reinit = 0;
    written[17] = 0;
    check_task(17); check_task(16); check_task(18);
    repeat (50) begin
      int t;
      t = $urandom_range(NTASK - 1);
      write_task(t);
      check_task($urandom_range(NTASK - 1));
      check_task(t);
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
