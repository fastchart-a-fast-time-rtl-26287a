// fc_tcb_memory - Task Control Block memory of the FASTCHART RTU.
//
// Holds the saved context of every task: R0-R7, SR, PC and IL, TCB_SIZE
// (11) words per task. As in the RTU schematic the word address is
// ID * TCB_SIZE + register counter, where the control unit's register
// counter steps through the words of one context. Reads are combinational,
// writes clocked; one word moves per cycle, so a context is written back or
// fetched in TCB_SIZE cycles.
//
// Besides the array there is one "fresh" bit per task. While it is set, a
// read returns the task's start context (code at the bottom of its memory
// space, return stack at the top, see fc_pkg::initial_context) instead of
// the array, and the first write of the task's context clears it. `reinit`
// sets it, which is how a terminated task is reset in one cycle so that a
// later activation starts it from the beginning. All bits are set at reset,
// so the array itself needs no reset. The fresh bits and the start context
// are this design's own choice; the address rule follows the RTU schematic.
module fc_tcb_memory
  import fc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  task_id_t             id,
  input  logic [CTX_IDX_W-1:0] reg_cnt,
  input  logic                 we,
  input  word_t                wdata,
  output word_t                rdata,
  input  logic                 reinit,
  input  task_id_t             reinit_id
);
  localparam int unsigned DEPTH  = NTASK * TCB_SIZE;
  localparam int unsigned ADR_W  = $clog2(DEPTH);

  word_t            mem [DEPTH];
  logic [NTASK-1:0] fresh;
  logic [ADR_W-1:0] adr;

  // ADR = ID * TCB SIZE + REGISTER COUNTER
  assign adr   = ADR_W'(id) * ADR_W'(TCB_SIZE) + ADR_W'(reg_cnt);
  assign rdata = fresh[id] ? initial_context(id, int'(reg_cnt)) : mem[adr];

  always_ff @(posedge clk) begin
    if (we) mem[adr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= '1;
    end else begin
      if (we)     fresh[id]        <= 1'b0;
      if (reinit) fresh[reinit_id] <= 1'b1;
    end
  end
endmodule
