// fc_terminate_queue - the Terminate Queue of the FASTCHART RTU.
//
// One INAC flag per task, held in a small RAM indexed by the task ID; a set
// flag means the task is inactive (terminated). `term` sets the flag of
// term_id. `act` asks to activate act_id: if its flag is set the flag is
// cleared and act_ok is high in the same cycle (the control unit then puts
// the ID with the priority of the call into the ready queue); if the task is
// already active act_err is high and nothing changes. After reset every
// task except task 0 is inactive; that start state is this design's choice.
module fc_terminate_queue
  import fc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     term,
  input  task_id_t term_id,
  input  logic     act,
  input  task_id_t act_id,
  output logic     act_ok,
  output logic     act_err,
  output logic [NTASK-1:0] inac_q
);
  logic [NTASK-1:0] inac;
  assign inac_q  = inac;
  assign act_ok  = act &&  inac[act_id];
  assign act_err = act && !inac[act_id];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inac    <= '1;
      inac[0] <= 1'b0;
    end else begin
      if (act_ok) inac[act_id]  <= 1'b0;
      if (term)   inac[term_id] <= 1'b1;
    end
  end
endmodule
