// fc_ready_queue - the Ready Queue of the FASTCHART RTU.
//
// Static priority scheduling: one FIFO of task IDs per priority level
// (NPRIO FIFOs of DEPTH entries, 8 x 8 in FASTCHART). A task that becomes
// ready is pushed into the FIFO of its priority, so only its ID is stored
// and the priority is implied by the FIFO. The head output is the first ID
// of the highest-priority non-empty FIFO; `pop` removes it. One push and one
// pop may happen in the same cycle, also into the same FIFO. A push into a
// full FIFO is dropped and reported with a one-cycle `overflow` pulse.
//
// Priority NPRIO-1 is the highest (the description does not say which end
// is highest; this is this design's choice). Head outputs are
// combinational from the FIFO state; push and pop take effect at the clock.
module fc_ready_queue
  import fc_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  task_id_t push_id,
  input  prio_t    push_prio,
  input  logic     pop,
  output logic     head_valid,
  output task_id_t head_id,
  output prio_t    head_prio,
  output logic     overflow
);
  logic [NPRIO-1:0] empty, full, f_push, f_pop;
  task_id_t         f_head [NPRIO];

  for (genvar p = 0; p < int'(NPRIO); p++) begin : g_fifo
    assign f_push[p] = push && (push_prio == prio_t'(p));
    assign f_pop[p]  = pop && head_valid && (head_prio == prio_t'(p));
    fc_fifo #(.WIDTH(ID_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(f_push[p]), .din(push_id),
      .pop(f_pop[p]), .head(f_head[p]),
      .empty(empty[p]), .full(full[p])
    );
  end

  // highest non-empty FIFO
  always_comb begin
    head_valid = 1'b0;
    head_prio  = '0;
    for (int p = 0; p < int'(NPRIO); p++) begin
      if (!empty[p]) begin
        head_valid = 1'b1;
        head_prio  = prio_t'(p);
      end
    end
    head_id = f_head[head_prio];
  end

  assign overflow = push && full[push_prio] && !f_pop[push_prio];
endmodule
