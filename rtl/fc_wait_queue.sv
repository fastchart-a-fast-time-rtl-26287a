// fc_wait_queue - the Wait Queue of the FASTCHART RTU.
//
// One down-counter per task (NTASK = 64), selected by the task ID, plus
// the priority of the delayed task and an active bit. `load` starts the
// counter of load_id with the delay time and records its priority. Every
// system time tick decrements each active, non-zero counter. An active
// counter that has reached zero is "empty" and raises its signal; of all
// signalling counters the one with the highest priority is presented on
// exp_id / exp_prio (lowest ID among equals), so simultaneous expiries are
// served one after the other in priority order. `ack` from the control unit
// (after it moved the ID to the ready queue) sets that counter inactive.
//
// Counter width, the tie rule among equal priorities and a delay of 0
// (expires at once) are this design's choices. Outputs are combinational
// from the counter state; load, tick and ack act at the clock edge.
module fc_wait_queue
  import fc_pkg::*;
#(
  parameter int unsigned TIME_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              load,
  input  task_id_t          load_id,
  input  prio_t             load_prio,
  input  logic [TIME_W-1:0] load_time,
  output logic              exp_valid,
  output task_id_t          exp_id,
  output prio_t             exp_prio,
  input  logic              ack,
  output logic [NTASK-1:0]  waiting
);
  logic [TIME_W-1:0] timer [NTASK];
  prio_t             prio  [NTASK];
  logic [NTASK-1:0]  active, empty;

  assign waiting = active;

  for (genvar t = 0; t < int'(NTASK); t++) begin : g_cnt
    assign empty[t] = active[t] && (timer[t] == '0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active[t] <= 1'b0;
        timer[t]  <= '0;
        prio[t]   <= '0;
      end else if (load && load_id == task_id_t'(t)) begin
        active[t] <= 1'b1;
        timer[t]  <= load_time;
        prio[t]   <= load_prio;
      end else begin
        if (tick && active[t] && timer[t] != '0) timer[t] <= timer[t] - 1'b1;
        if (ack && exp_valid && exp_id == task_id_t'(t)) active[t] <= 1'b0;
      end
    end
  end

  // serve the empty counter with the highest priority, lowest ID first
  always_comb begin
    exp_valid = 1'b0;
    exp_id    = '0;
    exp_prio  = '0;
    for (int t = 0; t < int'(NTASK); t++) begin
      if (empty[t] && (!exp_valid || prio[t] > exp_prio)) begin
        exp_valid = 1'b1;
        exp_id    = task_id_t'(t);
        exp_prio  = prio[t];
      end
    end
  end
endmodule
