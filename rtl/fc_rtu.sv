// fc_rtu - the Real-Time Unit of FASTCHART: a real-time kernel in hardware.
//
// The task state diagram (executing, ready, waiting, terminated) is built
// directly as hardware: the Ready Queue (fc_ready_queue), the Wait Queue
// (fc_wait_queue), the Terminate Queue (fc_terminate_queue), the TCB
// memory (fc_tcb_memory) and the Control Unit with the OLD/NEW registers
// and the system time tick (fc_control_unit). It runs beside the CPU and
// needs no CPU time: scheduling, delays, activation and context transfer
// all happen in parallel with task execution. The CPU side is the
// real-time call handshake (rt_req/rt_ack/rt_err), switch_req and the
// Not-Switch-Flag from the CPU, run and swap to the CPU, and the word-wide
// port into the CPU's shadow register set. `ev` pulses for each scheduling
// event; old_q/new_q show the OLD and NEW registers.
module fc_rtu
  import fc_pkg::*;
#(
  parameter int unsigned TICK_DIV = 1000,
  parameter int unsigned TIME_W   = 16,
  parameter int unsigned RQ_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
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
  output logic [CTX_IDX_W-1:0] sh_idx,
  output logic                 sh_we,
  output word_t                sh_wdata,
  input  word_t                sh_rdata,
  output task_ref_t            old_q,
  output task_ref_t            new_q,
  output rtu_ev_t              ev
);
  logic     rq_push, rq_pop, rq_head_valid, rq_overflow;
  task_id_t rq_push_id, rq_head_id;
  prio_t    rq_push_prio, rq_head_prio;

  logic              wq_tick, wq_load, wq_exp_valid, wq_ack;
  task_id_t          wq_load_id, wq_exp_id;
  prio_t             wq_load_prio, wq_exp_prio;
  logic [TIME_W-1:0] wq_load_time;

  logic     tq_term, tq_act, tq_act_ok, tq_act_err;
  task_id_t tq_term_id, tq_act_id;

  task_id_t             tcb_id, tcb_reinit_id;
  logic [CTX_IDX_W-1:0] tcb_reg_cnt;
  logic                 tcb_we, tcb_reinit;
  word_t                tcb_wdata, tcb_rdata;
  rtu_ev_t              cu_ev;

  fc_control_unit #(.TICK_DIV(TICK_DIV), .TIME_W(TIME_W)) u_cu (.ev(cu_ev), .*);

  fc_ready_queue #(.DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n,
    .push(rq_push), .push_id(rq_push_id), .push_prio(rq_push_prio),
    .pop(rq_pop), .head_valid(rq_head_valid), .head_id(rq_head_id),
    .head_prio(rq_head_prio), .overflow(rq_overflow)
  );

  fc_wait_queue #(.TIME_W(TIME_W)) u_wq (
    .clk, .rst_n, .tick(wq_tick),
    .load(wq_load), .load_id(wq_load_id), .load_prio(wq_load_prio), .load_time(wq_load_time),
    .exp_valid(wq_exp_valid), .exp_id(wq_exp_id), .exp_prio(wq_exp_prio),
    .ack(wq_ack), .waiting()
  );

  fc_terminate_queue u_tq (
    .clk, .rst_n,
    .term(tq_term), .term_id(tq_term_id),
    .act(tq_act), .act_id(tq_act_id), .act_ok(tq_act_ok), .act_err(tq_act_err),
    .inac_q()
  );

  fc_tcb_memory u_tcb (
    .clk, .rst_n,
    .id(tcb_id), .reg_cnt(tcb_reg_cnt), .we(tcb_we), .wdata(tcb_wdata), .rdata(tcb_rdata),
    .reinit(tcb_reinit), .reinit_id(tcb_reinit_id)
  );

  always_comb begin
    ev          = cu_ev;
    ev.overflow = rq_overflow;
  end
endmodule
