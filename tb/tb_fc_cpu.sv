// tb_fc_cpu - self-checking test of the FASTCHART CPU.
//
// Runs a small program from a behavioural main memory with a stub in place
// of the RTU. The program covers ALU and shifter, immediates, a taken
// conditional branch, LOAD/STORE with (rs)+, a subroutine call and return
// through the return stack (R0), an ACT call that the stub acknowledges
// only after three cycles and refuses (SR.E must be set), SNSF/CNSF and a
// DELAY call. Results are checked in memory; the cycle count up to the
// DELAY must equal 19 one-cycle + 9 two-cycle instructions + 3 stall cycles
// = 40. The stub then loads a second context into the shadow set and swaps:
// the CPU must continue in that context and the saved one must hold the
// first task's R0, SR and PC.
module tb_fc_cpu;
  import fc_pkg::*;
  import fc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ADDR_W-1:0] mem_addr;
  logic mem_re, mem_we, rt_req, rt_ack, rt_err, switch_req, nsf, run, swap, sh_we, retire;
  word_t mem_rdata, mem_wdata, rt_arg0, sh_wdata, sh_rdata;
  rt_op_e rt_op;
  prio_t rt_arg1;
  logic [CTX_IDX_W-1:0] sh_idx;
  int checks = 0, failures = 0, cycles = 0, run_cycles = 0, stall = 0, nsf_cycles = 0;
  int n_act = 0, n_dly = 0, n_term = 0;
  logic seen_nsf_prog = 0;

  fc_cpu dut (.*);
  fc_main_mem #(.WORDS(65536)) u_mem (.clk, .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  // RTU stub: ACT acknowledged on the fourth request cycle with an error,
  // DELAY and TERM at once
  always_comb begin
    rt_ack = 1'b0;
    rt_err = 1'b0;
    if (rt_req) begin
      if (rt_op == RT_ACT) begin rt_ack = (stall == 3); rt_err = 1'b1; end
      else rt_ack = 1'b1;
    end
  end
  always @(posedge clk) begin
    if (rt_req && !rt_ack) stall <= stall + 1; else stall <= 0;
    if (run && !switch_req && n_dly == 0) run_cycles <= run_cycles + 1;
    if (rt_req && rt_ack) begin
      if (rt_op == RT_ACT) begin
        n_act++;
        chk(rt_arg0 == 16'd9 && rt_arg1 == 3'd3, "ACT arguments");
      end
      if (rt_op == RT_DELAY) begin n_dly++; chk(rt_arg0 == 16'd3, "DELAY argument"); end
      if (rt_op == RT_TERM) n_term++;
    end
    if (nsf) nsf_cycles <= nsf_cycles + 1;
    if (dut.nsf_prog) seen_nsf_prog <= 1;
  end

  initial begin
    word_t p [$];
    p = '{a_ldi(1, 5), a_ldi(2, -3), a_alu(ALU_ADD, 1, 2), a_ldi(3, 0), a_ldhi(3, 2),
          a_store(1, 3, AM_POSTINC), a_alu(ALU_SUB, 1, 1), a_bcc(CC_EQ, 1), a_ldi(4, 99),
          a_ldi(4, 7), a_store(4, 3, AM_POSTINC), a_csr(18), a_store(5, 3, AM_POSTINC),
          a_ldi(6, 0), a_ldhi(6, 2), a_load(7, 6, AM_POSTINC), a_load(5, 6, AM_POSTINC),
          a_alu(ALU_ADD, 7, 5, SH_SHL), a_store(7, 3, AM_POSTINC), a_ldi(1, 9), a_ldi(2, 3),
          a_act(1, 2), a_bcc(CC_ES, 1), a_ldi(4, 0), a_store(4, 3, AM_POSTINC),
          a_snsf(), a_cnsf(), a_dly(2)};
    foreach (p[i]) u_mem.mem[i] = p[i];
    u_mem.mem[30] = a_ldi(5, 16'h55);
    u_mem.mem[31] = a_rsr();
    u_mem.mem[16'h100] = a_store(1, 3, AM_POSTINC);
    u_mem.mem[16'h101] = a_term();
    run = 0; swap = 0; sh_we = 0; sh_idx = 0; sh_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); run = 1;
    wait (switch_req);
    @(negedge clk);
    chk(n_dly == 1 && n_act == 1, "ACT and DELAY calls seen once");
    chk(run_cycles == 40, $sformatf("cycles to DELAY = %0d, expected 40", run_cycles));
    chk(u_mem.mem[16'h200] == 16'd2,   "ADD result stored with (r)+");
    chk(u_mem.mem[16'h201] == 16'd7,   "taken BEQ");
    chk(u_mem.mem[16'h202] == 16'h55,  "subroutine result");
    chk(u_mem.mem[16'h203] == 16'd18,  "LOAD (r)+ twice, ADD with SHL");
    chk(u_mem.mem[16'h204] == 16'd7,   "BES taken after refused ACT");
    chk(u_mem.mem[1023]    == 16'd12,  "return address on return stack");
    chk(nsf_cycles >= 9 && seen_nsf_prog, "Not-Switch-Flag raised");
    chk(!nsf, "Not-Switch-Flag cleared by CNSF");
    // stay idle while waiting for the switch
    repeat (5) @(negedge clk);
    chk(mem_we == 0 && n_dly == 1, "idle while waiting for the switch");
    // RTU loads the next context into the shadow set
    for (int i = 0; i < int'(TCB_SIZE); i++) begin
      sh_we = 1; sh_idx = 4'(i);
      sh_wdata = (i == 1) ? 16'hABCD : (i == 3) ? 16'h0300 : (i == int'(CTX_PC)) ? 16'h0100 : 16'h0;
      @(negedge clk);
    end
    sh_we = 0;
    swap = 1; @(negedge clk); swap = 0;
    // the saved context of the first task
    sh_idx = 0;            #1 chk(sh_rdata == 16'd1024, "saved R0 back at top of stack");
    sh_idx = 4'(CTX_SR);   #1 chk(sh_rdata[SR_E] == 1'b1, "saved SR.E set");
    sh_idx = 4'(CTX_PC);   #1 chk(sh_rdata == 16'd28, "saved PC after DELAY");
    wait (switch_req);
    @(negedge clk);
    chk(u_mem.mem[16'h300] == 16'hABCD, "second context executed");
    chk(n_term == 1, "TERM call seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
