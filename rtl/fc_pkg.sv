// fc_pkg - shared types and constants of the FASTCHART processor.
//
// FASTCHART pairs a small deterministic 16-bit RISC CPU with a Real-Time
// Unit (RTU) that holds the whole real-time kernel in hardware. The system
// size (64 tasks, 8 priorities, ready FIFOs of depth 8) and the context
// layout (R0-R7, SR, PC, IL) follow the FASTCHART description; the
// instruction encoding, status-register bit positions, task memory layout
// and the initial context of a task are this design's own choices.
package fc_pkg;

  localparam int unsigned DATA_W     = 16;  // "16-bit FASTCHART"
  localparam int unsigned ADDR_W     = 16;
  localparam int unsigned NTASK      = 64;
  localparam int unsigned NPRIO      = 8;
  localparam int unsigned ID_W       = $clog2(NTASK);
  localparam int unsigned PRIO_W     = $clog2(NPRIO);
  localparam int unsigned NREG       = 8;   // R0..R7, R0 = return stack pointer
  localparam int unsigned TCB_SIZE   = NREG + 3;  // R0-R7, SR, PC, IL
  localparam int unsigned CTX_IDX_W  = $clog2(TCB_SIZE);
  localparam int unsigned TASK_SPACE = 1024; // words of main memory per task (own choice)

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ID_W-1:0]   task_id_t;
  typedef logic [PRIO_W-1:0] prio_t;

  // A task reference as held in the OLD and NEW registers.
  typedef struct packed {
    logic     valid;
    task_id_t id;
    prio_t    prio;
  } task_ref_t;

  // Word index of a context inside a TCB entry and inside a register bank.
  localparam int unsigned CTX_SR = NREG;
  localparam int unsigned CTX_PC = NREG + 1;
  localparam int unsigned CTX_IL = NREG + 2;

  // Status register bits.
  localparam int unsigned SR_Z = 0;  // zero
  localparam int unsigned SR_N = 1;  // negative
  localparam int unsigned SR_C = 2;  // carry
  localparam int unsigned SR_V = 3;  // overflow
  localparam int unsigned SR_E = 4;  // error code of the last ACT call

  // Major opcodes, instruction bits [15:12].
  typedef enum logic [3:0] {
    OP_ALU   = 4'h0,  // rd <= shift(rd op rs)
    OP_ADDI  = 4'h1,  // rd <= rd + sext(imm9)
    OP_LDI   = 4'h2,  // rd <= sext(imm9)
    OP_LDHI  = 4'h3,  // rd[15:8] <= imm8
    OP_LOAD  = 4'h4,  // rd <= mem[rs] with address mode, 2 cycles
    OP_STORE = 4'h5,  // mem[rs] <= rd with address mode, 2 cycles
    OP_BCC   = 4'h6,  // if cond: PC <= PC+1+sext(off9)
    OP_BRA   = 4'h7,  // PC <= PC+1+sext(off12)
    OP_CSR   = 4'h8,  // call subroutine, PC relative, 2 cycles
    OP_RSR   = 4'h9,  // return from subroutine, 2 cycles
    OP_RT    = 4'hA,  // real-time function call / Not-Switch-Flag control
    OP_NOP   = 4'hF
  } opcode_e;

  // ALU operations, instruction bits [5:3] of OP_ALU.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR = 3'd3,
    ALU_XOR = 3'd4, ALU_MOV = 3'd5, ALU_CMP = 3'd6, ALU_NOT = 3'd7
  } alu_op_e;

  // Shifter operations, instruction bits [2:0] of OP_ALU.
  typedef enum logic [2:0] {
    SH_NONE = 3'd0, SH_SHL = 3'd1, SH_SHR = 3'd2, SH_ASR = 3'd3,
    SH_ROL  = 3'd4, SH_ROR = 3'd5, SH_SWAP = 3'd6, SH_CLR = 3'd7
  } shift_op_e;

  // Address modes of LOAD/STORE, instruction bits [5:4].
  typedef enum logic [1:0] {
    AM_PLAIN = 2'd0,  // (rs)
    AM_POSTINC = 2'd1,  // (rs)+
    AM_PREDEC  = 2'd2,  // -(rs)
    AM_POSTDEC = 2'd3   // (rs)-
  } addr_mode_e;

  // Branch conditions, instruction bits [11:9] of OP_BCC.
  typedef enum logic [2:0] {
    CC_EQ = 3'd0, CC_NE = 3'd1, CC_CS = 3'd2, CC_CC = 3'd3,
    CC_MI = 3'd4, CC_PL = 3'd5, CC_ES = 3'd6, CC_EC = 3'd7
  } cond_e;

  // Real-time sub-operations, instruction bits [11:9] of OP_RT.
  typedef enum logic [2:0] {
    RTF_ACT  = 3'd0,  // activate task: ID in ra, priority in rb
    RTF_TERM = 3'd1,  // terminate the current task
    RTF_DLY  = 3'd2,  // delay the current task by ra time ticks
    RTF_SNSF = 3'd3,  // set Not-Switch-Flag
    RTF_CNSF = 3'd4   // reset Not-Switch-Flag
  } rt_fn_e;

  // Real-time call as delivered by the CPU decoder to the RTU.
  typedef enum logic [1:0] {
    RT_ACT = 2'd0, RT_TERM = 2'd1, RT_DELAY = 2'd2
  } rt_op_e;

  // Event pulses of the RTU, one cycle each, for observation and counting.
  typedef struct packed {
    logic swap;       // register sets exchanged
    logic preempt;    // switch because a higher-priority task was ready
    logic voluntary;  // switch after DELAY or TERM
    logic idle;       // switch to no task (nothing ready)
    logic replace;    // NEW given back for a higher-priority ready task
    logic expire;     // a wait counter ran out, its task made ready
    logic act_err;    // ACT of a task that is already active
    logic overflow;   // ready FIFO full, push dropped
  } rtu_ev_t;

  // Context a task starts from (after reset or after it terminated): code at
  // the bottom of its memory space, return stack at the top.
  function automatic word_t initial_context(task_id_t id, int unsigned idx);
    word_t base;
    base = word_t'(id) * word_t'(TASK_SPACE);
    if (idx == 0)           return base + word_t'(TASK_SPACE); // stack pointer, pre-decrement
    else if (idx == CTX_PC) return base;
    else if (idx == CTX_IL) return {OP_NOP, 12'h000};
    else                    return '0;
  endfunction

endpackage
