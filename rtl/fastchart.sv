// fastchart - top level of FASTCHART: a time-deterministic CPU and a
// hardware real-time kernel (RTU) working side by side.
//
// The CPU (fc_cpu) executes the current task; the RTU (fc_rtu) schedules up
// to 64 tasks at 8 priorities in parallel with it and prepares the next
// task's context in the CPU's shadow register set, so a task switch costs
// one cycle and the kernel costs no CPU time. Main memory is outside this
// block: the CPU's bus is brought out with a combinational read (rdata
// must follow addr in the same cycle) and a clocked write. After reset task
// 0 runs at priority 0 from address 0; every other task is inactive until
// task 0 (or another task) activates it. old_task/new_task and the event
// pulses in `ev` show the RTU's scheduling for observation.
module fastchart
  import fc_pkg::*;
#(
  parameter int unsigned TICK_DIV = 1000,  // clock cycles per system time tick
  parameter int unsigned TIME_W   = 16,    // width of a delay time
  parameter int unsigned RQ_DEPTH = 8      // depth of each ready FIFO
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_re,
  input  word_t             mem_rdata,
  output logic              mem_we,
  output word_t             mem_wdata,
  output logic              cpu_run,
  output logic              cpu_retire,
  output task_ref_t         old_task,
  output task_ref_t         new_task,
  output rtu_ev_t           ev
);
  logic                 rt_req, rt_ack, rt_err, switch_req, nsf, swap, sh_we;
  rt_op_e               rt_op;
  word_t                rt_arg0, sh_wdata, sh_rdata;
  prio_t                rt_arg1;
  logic [CTX_IDX_W-1:0] sh_idx;

  fc_cpu u_cpu (
    .clk, .rst_n,
    .mem_addr, .mem_re, .mem_rdata, .mem_we, .mem_wdata,
    .rt_req, .rt_op, .rt_arg0, .rt_arg1, .rt_ack, .rt_err, .switch_req, .nsf,
    .run(cpu_run), .swap,
    .sh_idx, .sh_we, .sh_wdata, .sh_rdata,
    .retire(cpu_retire)
  );

  fc_rtu #(.TICK_DIV(TICK_DIV), .TIME_W(TIME_W), .RQ_DEPTH(RQ_DEPTH)) u_rtu (
    .clk, .rst_n,
    .rt_req, .rt_op, .rt_arg0, .rt_arg1, .rt_ack, .rt_err, .switch_req, .nsf,
    .run(cpu_run), .swap,
    .sh_idx, .sh_we, .sh_wdata, .sh_rdata,
    .old_q(old_task), .new_q(new_task), .ev
  );
endmodule
