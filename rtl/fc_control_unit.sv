// fc_control_unit - control unit and task-switch part of the FASTCHART RTU.
//
// Holds the OLD register (ID and priority of the task the CPU executes) and
// the NEW register (the next task, taken from the ready queue, whose
// context already sits in the shadow register set), the register counter
// that addresses TCB memory, and the system time tick. It accepts the
// CPU's real-time calls and moves task IDs between the queues:
//   ACT   - the terminate queue checks INAC; an inactive task is put into
//           the ready queue with the priority of the call, an active one
//           returns an error.
//   DELAY - the wait counter of OLD is loaded with the delay time.
//   TERM  - INAC of OLD is set.
//   expiry of a wait counter - its task goes to the ready queue.
// Task switch, as in the RTU description: when NEW is loaded and either the
// CPU asks for a switch (after DELAY/TERM), the CPU is idle, or NEW has a
// higher priority than OLD and the Not-Switch-Flag is low, `swap` exchanges
// the register sets in one cycle; a preempted OLD goes back to the ready
// queue. Afterwards the old context is written from the shadow set to TCB
// memory at OLD*TCB_SIZE (TCB_SIZE cycles; a terminated task's TCB is
// instead reset in one cycle), NEW is copied to OLD, and the next NEW is
// fetched from the ready queue and its context copied from TCB memory into
// the shadow set (TCB_SIZE cycles) while the CPU keeps running. If the CPU
// gives up the processor and nothing is ready it switches to "no task" and
// idles (run low) until a task becomes ready.
//
// One action per cycle, in this order: give NEW back if a higher-priority
// task became ready, switch, accept a CPU call (acknowledged in the same
// cycle), move one expired task, fetch NEW. Calls wait (the CPU stalls)
// while a context transfer is running. This ordering, the idle state, the
// give-back of NEW and the tick divider TICK_DIV are this design's choices;
// the OLD/NEW handling and the address rule follow the RTU description.
// Several outputs are plain wires from inputs (shadow data to TCB data and
// back, call arguments to the queues): the control unit only steers them.
module fc_control_unit
  import fc_pkg::*;
#(
  parameter int unsigned TICK_DIV = 1000,  // clock cycles per system time tick
  parameter int unsigned TIME_W   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU
  input  logic                 rt_req,
  input  rt_op_e               rt_op,
  input  word_t                rt_arg0,
  input  prio_t                rt_arg1,
  output logic                 rt_ack,
  output logic                 rt_err,
  input  logic                 switch_req,
  input  logic                 nsf,
  output logic                 run,
  output logic                 swap,
  // shadow register set
  output logic [CTX_IDX_W-1:0] sh_idx,
  output logic                 sh_we,
  output word_t                sh_wdata,
  input  word_t                sh_rdata,
  // ready queue
  output logic                 rq_push,
  output task_id_t             rq_push_id,
  output prio_t                rq_push_prio,
  output logic                 rq_pop,
  input  logic                 rq_head_valid,
  input  task_id_t             rq_head_id,
  input  prio_t                rq_head_prio,
  // wait queue
  output logic                 wq_tick,
  output logic                 wq_load,
  output task_id_t             wq_load_id,
  output prio_t                wq_load_prio,
  output logic [TIME_W-1:0]    wq_load_time,
  input  logic                 wq_exp_valid,
  input  task_id_t             wq_exp_id,
  input  prio_t                wq_exp_prio,
  output logic                 wq_ack,
  // terminate queue
  output logic                 tq_term,
  output task_id_t             tq_term_id,
  output logic                 tq_act,
  output task_id_t             tq_act_id,
  input  logic                 tq_act_ok,
  input  logic                 tq_act_err,
  // TCB memory
  output task_id_t             tcb_id,
  output logic [CTX_IDX_W-1:0] tcb_reg_cnt,
  output logic                 tcb_we,
  output word_t                tcb_wdata,
  input  word_t                tcb_rdata,
  output logic                 tcb_reinit,
  output task_id_t             tcb_reinit_id,
  // status
  output task_ref_t            old_q,
  output task_ref_t            new_q,
  output rtu_ev_t              ev
);
  typedef enum logic [1:0] {CU_RUN, CU_WB, CU_LOAD} cu_state_e;

  cu_state_e            state, state_n;
  task_ref_t            old_r, old_n, new_r, new_n;
  logic                 cur_valid, cur_valid_n;
  logic                 leaving_term, leaving_term_n;
  logic [CTX_IDX_W-1:0] reg_cnt, reg_cnt_n;
  logic                 last_word;

  assign old_q     = old_r;
  assign new_q     = new_r;
  assign run       = cur_valid;
  assign last_word = (reg_cnt == CTX_IDX_W'(TCB_SIZE - 1));

  // system time tick
  localparam int unsigned TW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  logic [TW-1:0] tick_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 tick_cnt <= '0;
    else if (tick_cnt == TW'(TICK_DIV - 1))     tick_cnt <= '0;
    else                                        tick_cnt <= tick_cnt + 1'b1;
  end
  assign wq_tick = (tick_cnt == TW'(TICK_DIV - 1));

  // decisions in CU_RUN
  logic want_replace, want_swap, id_in_range;
  assign want_replace = new_r.valid && rq_head_valid && (rq_head_prio > new_r.prio);
  assign want_swap    = (new_r.valid && (switch_req || !cur_valid ||
                                         (!nsf && new_r.prio > old_r.prio)))
                     || (switch_req && !new_r.valid && !rq_head_valid);
  assign id_in_range  = (rt_arg0 < word_t'(NTASK));

  always_comb begin
    state_n        = state;
    old_n          = old_r;
    new_n          = new_r;
    cur_valid_n    = cur_valid;
    leaving_term_n = leaving_term;
    reg_cnt_n      = reg_cnt;

    rt_ack = 1'b0;
    rt_err = 1'b0;
    swap   = 1'b0;
    sh_idx = reg_cnt;
    sh_we  = 1'b0;
    sh_wdata = tcb_rdata;
    rq_push = 1'b0; rq_push_id = '0; rq_push_prio = '0;
    rq_pop  = 1'b0;
    wq_load = 1'b0; wq_load_id = old_r.id; wq_load_prio = old_r.prio;
    wq_load_time = rt_arg0[TIME_W-1:0];
    wq_ack  = 1'b0;
    tq_term = 1'b0; tq_term_id = old_r.id;
    tq_act  = 1'b0; tq_act_id = rt_arg0[ID_W-1:0];
    tcb_id  = old_r.id;
    tcb_reg_cnt = reg_cnt;
    tcb_we  = 1'b0;
    tcb_wdata = sh_rdata;
    tcb_reinit = 1'b0; tcb_reinit_id = old_r.id;
    ev = '0;

    unique case (state)
      CU_RUN: begin
        if (want_replace) begin
          // a task of higher priority than NEW became ready: give NEW back
          rq_push      = 1'b1;
          rq_push_id   = new_r.id;
          rq_push_prio = new_r.prio;
          rq_pop       = 1'b1;
          new_n        = '{valid: 1'b1, id: rq_head_id, prio: rq_head_prio};
          reg_cnt_n    = '0;
          state_n      = CU_LOAD;
          ev.replace   = 1'b1;
        end else if (want_swap) begin
          swap         = 1'b1;
          ev.swap      = 1'b1;
          ev.voluntary = switch_req;
          ev.idle      = !new_r.valid;
          cur_valid_n  = new_r.valid;
          leaving_term_n = 1'b0;
          if (cur_valid && !switch_req) begin
            // preemption: OLD goes back into the ready queue
            rq_push      = 1'b1;
            rq_push_id   = old_r.id;
            rq_push_prio = old_r.prio;
            ev.preempt   = 1'b1;
          end
          if (cur_valid && !leaving_term) begin
            reg_cnt_n = '0;
            state_n   = CU_WB;
          end else begin
            // nothing to save: a terminated task's TCB is reset instead
            tcb_reinit  = cur_valid;
            old_n       = new_r;
            new_n.valid = 1'b0;
          end
        end else if (rt_req && cur_valid) begin
          rt_ack = 1'b1;
          unique case (rt_op)
            RT_ACT: begin
              tq_act = id_in_range;
              rt_err = !id_in_range || tq_act_err;
              if (tq_act_ok) begin
                rq_push      = 1'b1;
                rq_push_id   = tq_act_id;
                rq_push_prio = rt_arg1;
              end
              ev.act_err = rt_err;
            end
            RT_DELAY: wq_load = 1'b1;
            RT_TERM: begin
              tq_term        = 1'b1;
              leaving_term_n = 1'b1;
            end
            default: ;
          endcase
        end else if (wq_exp_valid) begin
          rq_push      = 1'b1;
          rq_push_id   = wq_exp_id;
          rq_push_prio = wq_exp_prio;
          wq_ack       = 1'b1;
          ev.expire    = 1'b1;
        end else if (!new_r.valid && rq_head_valid) begin
          rq_pop    = 1'b1;
          new_n     = '{valid: 1'b1, id: rq_head_id, prio: rq_head_prio};
          reg_cnt_n = '0;
          state_n   = CU_LOAD;
        end
      end

      CU_WB: begin
        // shadow set -> TCB memory at OLD * TCB_SIZE + register counter
        tcb_id    = old_r.id;
        tcb_we    = 1'b1;
        reg_cnt_n = reg_cnt + 1'b1;
        if (last_word) begin
          old_n       = new_r;
          new_n.valid = 1'b0;
          state_n     = CU_RUN;
        end
      end

      CU_LOAD: begin
        // TCB memory at NEW * TCB_SIZE + register counter -> shadow set
        tcb_id    = new_r.id;
        sh_we     = 1'b1;
        reg_cnt_n = reg_cnt + 1'b1;
        if (last_word) state_n = CU_RUN;
      end

      default: state_n = CU_RUN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= CU_RUN;
      old_r        <= '{valid: 1'b1, id: '0, prio: '0};
      new_r        <= '0;
      cur_valid    <= 1'b1;
      leaving_term <= 1'b0;
      reg_cnt      <= '0;
    end else begin
      state        <= state_n;
      old_r        <= old_n;
      new_r        <= new_n;
      cur_valid    <= cur_valid_n;
      leaving_term <= leaving_term_n;
      reg_cnt      <= reg_cnt_n;
    end
  end

  // a switch only ever happens from the steady state
  a_swap_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    swap |-> state == CU_RUN);
endmodule
