// fc_cpu - the time-deterministic CPU of FASTCHART.
//
// A 16-bit load/store RISC core with no pipeline, no cache and no
// interrupts, so every instruction takes a fixed number of cycles: one for
// register, immediate, branch and real-time instructions, two for those
// with a second main-memory access (LOAD, STORE, CSR call, RSR return). In
// the first cycle the instruction is read from main memory (combinational
// read), decoded and, for one-cycle instructions, executed; two-cycle
// instructions keep it in the instruction latch IL and make their memory
// access in the second cycle. LOAD/STORE support (rs)+, -(rs) and (rs)-, so
// "LOAD R3,(R4)+" loads and steps the pointer in one instruction. R0 is the
// return stack pointer: CSR pushes the return address to -(R0), RSR pops
// it from (R0)+. Branches and calls are PC-relative through an adder fed by
// PC and IL.
//
// All registers (R0-R7, SR, PC, IL) live in a double register file
// (fc_regbank) whose shadow set is brought out to the RTU; `swap` from the
// RTU exchanges the sets at an instruction boundary, a one-cycle task
// switch. The decoder hands the real-time calls ACT (ID, priority), DELAY
// (time) and TERM to the RTU with a request/acknowledge handshake and stalls
// until it is acknowledged; an ACT that the RTU refuses sets SR.E. After
// DELAY or TERM the CPU asserts switch_req and idles until the swap. The
// Not-Switch-Flag (nsf) forbids preemption: it is high during a two-cycle
// instruction and while the program has set it with SNSF (until CNSF).
// When `run` is low no task is loaded and the CPU does nothing.
//
// Cycle counts, the register set, IL, the real-time instructions and the
// Not-Switch-Flag follow FASTCHART. The encoding, the operation set, the
// status bits, clearing nsf at a swap and relative call targets are this
// design's own choices.
module fc_cpu
  import fc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // main memory bus (combinational read, clocked write)
  output logic [ADDR_W-1:0]    mem_addr,
  output logic                 mem_re,
  input  word_t                mem_rdata,
  output logic                 mem_we,
  output word_t                mem_wdata,
  // real-time calls to the RTU
  output logic                 rt_req,
  output rt_op_e               rt_op,
  output word_t                rt_arg0,   // ACT: task ID, DELAY: ticks
  output prio_t                rt_arg1,   // ACT: priority
  input  logic                 rt_ack,
  input  logic                 rt_err,
  output logic                 switch_req,
  output logic                 nsf,
  // task switch control from the RTU
  input  logic                 run,
  input  logic                 swap,
  // shadow register set, RTU side
  input  logic [CTX_IDX_W-1:0] sh_idx,
  input  logic                 sh_we,
  input  word_t                sh_wdata,
  output word_t                sh_rdata,
  // an instruction completed in this cycle
  output logic                 retire
);
  typedef enum logic [1:0] {PH_FETCH, PH_EXEC2, PH_WAITSW} phase_e;
  phase_e phase;
  logic   nsf_prog;

  // register file interface
  logic [2:0] ra_addr, rb_addr, wa_addr, wb_addr;
  word_t      ra_data, rb_data, wa_data, wb_data;
  logic       wa_en, wb_en;
  word_t      sr_q, pc_q, il_q, sr_d, pc_d, il_d;
  logic       sr_we, pc_we, il_we;


  fc_regbank u_regs (
    .clk, .rst_n,
    .ra_addr, .ra_data, .rb_addr, .rb_data,
    .wa_en, .wa_addr, .wa_data, .wb_en, .wb_addr, .wb_data,
    .sr_q, .sr_we, .sr_d, .pc_q, .pc_we, .pc_d, .il_q, .il_we, .il_d,
    .sh_idx, .sh_we, .sh_wdata, .sh_rdata,
    .swap, .active_set()
  );

  // decode
  word_t      instr;
  opcode_e    opc;
  logic [2:0] f_rd, f_rs;
  logic       multi;
  assign instr = (phase == PH_EXEC2) ? il_q : mem_rdata;
  assign opc   = opcode_e'(instr[15:12]);
  assign f_rd  = instr[11:9];
  assign f_rs  = instr[8:6];
  assign multi = (opc == OP_LOAD) || (opc == OP_STORE) || (opc == OP_CSR) || (opc == OP_RSR);

  // ALU and shifter
  alu_op_e    alu_op;
  word_t      alu_b, alu_y, sh_q;
  logic [3:0] alu_flags;
  logic       sh_c, sh_used;
  fc_alu     u_alu (.op(alu_op), .a(ra_data), .b(alu_b), .y(alu_y), .flags(alu_flags));
  fc_shifter u_sh  (.op(shift_op_e'(instr[2:0])), .d(alu_y), .q(sh_q), .c_out(sh_c), .shifted(sh_used));

  // PC incrementer and the branch adder (ADD/SUB in the schematic)
  word_t pc_inc, br_target;
  logic  cond_true;
  assign pc_inc = pc_q + 1'b1;
  always_comb begin
    if (phase == PH_EXEC2)         br_target = pc_q + {{4{il_q[11]}}, il_q[11:0]};
    else if (opc == OP_BRA)        br_target = pc_inc + {{4{instr[11]}}, instr[11:0]};
    else                           br_target = pc_inc + {{7{instr[8]}}, instr[8:0]};
  end
  always_comb begin
    unique case (cond_e'(instr[11:9]))
      CC_EQ: cond_true =  sr_q[SR_Z];
      CC_NE: cond_true = !sr_q[SR_Z];
      CC_CS: cond_true =  sr_q[SR_C];
      CC_CC: cond_true = !sr_q[SR_C];
      CC_MI: cond_true =  sr_q[SR_N];
      CC_PL: cond_true = !sr_q[SR_N];
      CC_ES: cond_true =  sr_q[SR_E];
      CC_EC: cond_true = !sr_q[SR_E];
      default: cond_true = 1'b0;
    endcase
  end

  // effective address of LOAD/STORE in the second cycle
  word_t ea, ptr_next;
  always_comb begin
    ea       = rb_data;
    ptr_next = rb_data;
    unique case (addr_mode_e'(instr[5:4]))
      AM_PLAIN:   ;
      AM_POSTINC: ptr_next = rb_data + 1'b1;
      AM_PREDEC:  begin ea = rb_data - 1'b1; ptr_next = rb_data - 1'b1; end
      AM_POSTDEC: ptr_next = rb_data - 1'b1;
      default:    ;
    endcase
  end

  phase_e phase_n;
  logic   nsf_prog_n;

  always_comb begin
    // defaults: nothing happens
    phase_n    = phase;
    nsf_prog_n = nsf_prog;
    ra_addr    = f_rd;
    rb_addr    = f_rs;
    alu_op     = alu_op_e'(instr[5:3]);
    alu_b      = rb_data;
    wa_en = 1'b0; wa_addr = f_rd; wa_data = sh_q;
    wb_en = 1'b0; wb_addr = f_rs; wb_data = ptr_next;
    sr_we = 1'b0; sr_d = sr_q;
    pc_we = 1'b0; pc_d = pc_inc;
    il_we = 1'b0; il_d = instr;
    mem_addr  = pc_q;
    mem_re    = 1'b0;
    mem_we    = 1'b0;
    mem_wdata = ra_data;
    rt_req  = 1'b0;
    rt_op   = RT_ACT;
    rt_arg0 = ra_data;
    rt_arg1 = rb_data[PRIO_W-1:0];
    retire  = 1'b0;

    if (opc == OP_RT) begin
      ra_addr = instr[8:6];
      rb_addr = instr[5:3];
    end

    if (run) begin
      unique case (phase)
        PH_FETCH: begin
          mem_re = 1'b1;
          il_we  = 1'b1;
          pc_we  = 1'b1;
          retire = !multi;
          unique case (opc)
            OP_ALU: begin
              wa_en = (alu_op != ALU_CMP);
              sr_we = 1'b1;
              if (alu_op == ALU_CMP)
                sr_d[3:0] = alu_flags;
              else
                sr_d[3:0] = {alu_flags[3], sh_used ? sh_c : alu_flags[2],
                             sh_q[DATA_W-1], (sh_q == '0)};
            end
            OP_ADDI: begin
              alu_op = ALU_ADD;
              alu_b  = {{7{instr[8]}}, instr[8:0]};
              wa_en  = 1'b1;
              wa_data = alu_y;
              sr_we  = 1'b1;
              sr_d[3:0] = alu_flags;
            end
            OP_LDI: begin
              wa_en   = 1'b1;
              wa_data = {{7{instr[8]}}, instr[8:0]};
            end
            OP_LDHI: begin
              wa_en   = 1'b1;
              wa_data = {instr[7:0], ra_data[7:0]};
            end
            OP_BCC:  if (cond_true) pc_d = br_target;
            OP_BRA:  pc_d = br_target;
            OP_LOAD, OP_STORE, OP_CSR, OP_RSR: phase_n = PH_EXEC2;
            OP_RT: begin
              unique case (rt_fn_e'(instr[11:9]))
                RTF_ACT: begin
                  rt_req = 1'b1;
                  rt_op  = RT_ACT;
                  pc_we  = rt_ack;
                  retire = rt_ack;
                  sr_we  = rt_ack;
                  sr_d[SR_E] = rt_err;
                end
                RTF_TERM, RTF_DLY: begin
                  rt_req = 1'b1;
                  rt_op  = (rt_fn_e'(instr[11:9]) == RTF_TERM) ? RT_TERM : RT_DELAY;
                  pc_we  = rt_ack;
                  retire = rt_ack;
                  if (rt_ack) phase_n = PH_WAITSW;
                end
                RTF_SNSF: nsf_prog_n = 1'b1;
                RTF_CNSF: nsf_prog_n = 1'b0;
                default: ;
              endcase
            end
            default: ;  // NOP and unused opcodes
          endcase
        end

        PH_EXEC2: begin
          retire  = 1'b1;
          phase_n = PH_FETCH;
          unique case (opc)
            OP_LOAD: begin
              mem_addr = ea;
              mem_re   = 1'b1;
              wb_en    = (addr_mode_e'(instr[5:4]) != AM_PLAIN);
              wa_en    = 1'b1;
              wa_data  = mem_rdata;
            end
            OP_STORE: begin
              mem_addr = ea;
              mem_we   = 1'b1;
              wb_en    = (addr_mode_e'(instr[5:4]) != AM_PLAIN);
            end
            OP_CSR: begin
              ra_addr   = 3'd0;
              mem_addr  = ra_data - 1'b1;
              mem_we    = 1'b1;
              mem_wdata = pc_q;
              wa_en     = 1'b1;
              wa_addr   = 3'd0;
              wa_data   = ra_data - 1'b1;
              pc_we     = 1'b1;
              pc_d      = br_target;
            end
            OP_RSR: begin
              ra_addr  = 3'd0;
              mem_addr = ra_data;
              mem_re   = 1'b1;
              wa_en    = 1'b1;
              wa_addr  = 3'd0;
              wa_data  = ra_data + 1'b1;
              pc_we    = 1'b1;
              pc_d     = mem_rdata;
            end
            default: ;
          endcase
        end

        default: ;  // PH_WAITSW: idle until the RTU exchanges the sets
      endcase
    end

    if (swap) begin
      phase_n    = PH_FETCH;
      nsf_prog_n = 1'b0;
    end
  end

  assign switch_req = (phase == PH_WAITSW);
  assign nsf = nsf_prog || (phase == PH_EXEC2) || (run && phase == PH_FETCH && multi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= PH_FETCH;
      nsf_prog <= 1'b0;
    end else begin
      phase    <= phase_n;
      nsf_prog <= nsf_prog_n;
    end
  end

  // A switch may only happen between instructions.
  a_swap_at_boundary: assert property (@(posedge clk) disable iff (!rst_n)
    swap |-> (phase != PH_EXEC2));
endmodule
