// tb_fc_terminate_queue - self-checking test of the Terminate Queue.
//
// Checks the reset state (only task 0 active), activation of inactive tasks
// (act_ok, flag cleared), refusal of active tasks (act_err), termination,
// and random sequences against a reference flag array.
module tb_fc_terminate_queue;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic term = 0, act = 0, act_ok, act_err;
  task_id_t term_id = 0, act_id = 0;
  logic [NTASK-1:0] inac_q, ref_inac;
  int checks = 0, failures = 0, cycles = 0;

  fc_terminate_queue dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_act(task_id_t id);
    act = 1; act_id = id; #1;
    chk(act_ok == ref_inac[id] && act_err == !ref_inac[id], $sformatf("act %0d ok=%b err=%b", id, act_ok, act_err));
    @(posedge clk); #1; act = 0;
    ref_inac[id] = 1'b0;
  endtask

  task automatic do_term(task_id_t id);
    term = 1; term_id = id;
    @(posedge clk); #1; term = 0;
    ref_inac[id] = 1'b1;
  endtask

  initial begin
    ref_inac = '1; ref_inac[0] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(inac_q == ref_inac, "reset state");
    do_act(6'd5);
    do_act(6'd5);          // already active -> error
    do_act(6'd0);          // task 0 active after reset -> error
    do_term(6'd5);
    chk(inac_q[5] == 1'b1, "terminated flag");
    do_act(6'd5);
    repeat (300) begin
      if ($urandom_range(1)) do_act(task_id_t'($urandom));
      else                   do_term(task_id_t'($urandom));
      chk(inac_q == ref_inac, "flags match reference");
    end
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
