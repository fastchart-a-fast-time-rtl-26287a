// tb_fc_regbank - self-checking test of the double register file.
//
// Checks the reset context (task 0 start context in the active set), CPU
// writes through both ports (port A winning on a clash) and the SR/PC/IL
// ports, RTU writes into the shadow set that must stay invisible to the CPU,
// and the one-cycle exchange: after `swap` the CPU sees what the RTU wrote
// and the RTU sees what the CPU had, including a CPU write made in the swap
// cycle itself. Random traffic is compared with a two-set reference model.
module tb_fc_regbank;
  import fc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] ra_addr = 0, rb_addr = 0, wa_addr = 0, wb_addr = 0;
  word_t ra_data, rb_data, wa_data = 0, wb_data = 0;
  logic wa_en = 0, wb_en = 0, sr_we = 0, pc_we = 0, il_we = 0, sh_we = 0, swap = 0;
  word_t sr_q, pc_q, il_q, sr_d = 0, pc_d = 0, il_d = 0, sh_wdata = 0, sh_rdata;
  logic [CTX_IDX_W-1:0] sh_idx = 0;
  logic active_set;
  word_t model [2][TCB_SIZE];
  int act_m = 0;
  int checks = 0, failures = 0, cycles = 0, swaps = 0;

  fc_regbank dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) cycles++;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0d)", what, cycles); end
  endtask

  task automatic compare_all();
    for (int i = 0; i < int'(NREG); i++) begin
      ra_addr = 3'(i); rb_addr = 3'(7 - i); sh_idx = 4'(i); #1;
      chk(ra_data == model[act_m][i], $sformatf("ra R%0d", i));
      chk(rb_data == model[act_m][7 - i], $sformatf("rb R%0d", 7 - i));
      chk(sh_rdata == model[1 - act_m][i], $sformatf("shadow R%0d", i));
    end
    for (int i = int'(NREG); i < int'(TCB_SIZE); i++) begin
      sh_idx = 4'(i); #1;
      chk(sh_rdata == model[1 - act_m][i], $sformatf("shadow word %0d", i));
    end
    chk(sr_q == model[act_m][CTX_SR] && pc_q == model[act_m][CTX_PC] && il_q == model[act_m][CTX_IL], "SR/PC/IL");
    chk(active_set == 1'(act_m), "active set");
  endtask

  // one random cycle
  task automatic random_cycle(logic allow_swap);
    wa_en = 1'($urandom); wa_addr = 3'($urandom); wa_data = 16'($urandom);
    wb_en = 1'($urandom); wb_addr = 3'($urandom); wb_data = 16'($urandom);
    sr_we = 1'($urandom); sr_d = 16'($urandom);
    pc_we = 1'($urandom); pc_d = 16'($urandom);
    il_we = 1'($urandom); il_d = 16'($urandom);
    sh_we = 1'($urandom); sh_idx = 4'($urandom_range(TCB_SIZE - 1)); sh_wdata = 16'($urandom);
    swap  = allow_swap && ($urandom_range(3) == 0);
    @(posedge clk); #1;
    if (wb_en) model[act_m][wb_addr] = wb_data;
    if (wa_en) model[act_m][wa_addr] = wa_data;
    if (sr_we) model[act_m][CTX_SR] = sr_d;
    if (pc_we) model[act_m][CTX_PC] = pc_d;
    if (il_we) model[act_m][CTX_IL] = il_d;
    if (sh_we) model[1 - act_m][sh_idx] = sh_wdata;
    if (swap) begin act_m = 1 - act_m; swaps++; end
    {wa_en, wb_en, sr_we, pc_we, il_we, sh_we, swap} = '0;
  endtask

  initial begin
    for (int i = 0; i < int'(TCB_SIZE); i++) begin model[0][i] = 0; model[1][i] = 0; end
    model[0][0] = 16'd1024; model[0][CTX_IL] = 16'hF000;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    compare_all();
    // clash: both ports to R3, port A wins
    wa_en = 1; wa_addr = 3; wa_data = 16'hAAAA; wb_en = 1; wb_addr = 3; wb_data = 16'hBBBB;
    @(posedge clk); #1; wa_en = 0; wb_en = 0; model[0][3] = 16'hAAAA;
    compare_all();
    // RTU fills the shadow set; invisible until swap
    for (int i = 0; i < int'(TCB_SIZE); i++) begin
      sh_we = 1; sh_idx = 4'(i); sh_wdata = 16'h5000 + 16'(i);
      @(posedge clk); #1; model[1][i] = sh_wdata;
    end
    sh_we = 0;
    compare_all();
    // swap with a simultaneous CPU write: the write goes to the old set
    swap = 1; wa_en = 1; wa_addr = 5; wa_data = 16'h1234;
    @(posedge clk); #1; swap = 0; wa_en = 0;
    model[0][5] = 16'h1234; act_m = 1;
    compare_all();
    repeat (500) begin random_cycle(1); compare_all(); end
    chk(swaps > 50, "swaps happened");
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
