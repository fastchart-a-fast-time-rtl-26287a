// fc_regbank - the double register file of FASTCHART ("register file 1/0"
// and "register file 0/1").
//
// Two complete register sets, each holding R0-R7, the status register SR,
// the program counter PC and the instruction latch IL. One set is active and
// serves the CPU; the other is the shadow set that the RTU fills with the
// context of the next task and empties into TCB memory after a switch. A
// one-cycle pulse on `swap` exchanges the two at the clock edge, which is
// the one-cycle task switch of FASTCHART; what the CPU writes in that same
// cycle still lands in the set that was active.
//
// CPU side: two combinational read ports, two write ports (port A has
// priority when both address the same register; port B serves the pointer
// update of (rs)+ style addressing), and dedicated SR, PC and IL ports.
// RTU side: one word-wide port into the shadow set, indexed like a TCB
// entry (0-7 = R0-R7, 8 = SR, 9 = PC, 10 = IL), combinational read and
// clocked write. After reset set 0 is active and holds the start context of
// task 0; which set is active at reset is this design's own choice.
module fc_regbank
  import fc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // CPU side, active set
  input  logic [2:0]           ra_addr,
  output word_t                ra_data,
  input  logic [2:0]           rb_addr,
  output word_t                rb_data,
  input  logic                 wa_en,
  input  logic [2:0]           wa_addr,
  input  word_t                wa_data,
  input  logic                 wb_en,
  input  logic [2:0]           wb_addr,
  input  word_t                wb_data,
  output word_t                sr_q,
  input  logic                 sr_we,
  input  word_t                sr_d,
  output word_t                pc_q,
  input  logic                 pc_we,
  input  word_t                pc_d,
  output word_t                il_q,
  input  logic                 il_we,
  input  word_t                il_d,
  // RTU side, shadow set
  input  logic [CTX_IDX_W-1:0] sh_idx,
  input  logic                 sh_we,
  input  word_t                sh_wdata,
  output word_t                sh_rdata,
  // exchange of the two sets
  input  logic                 swap,
  output logic                 active_set
);
  word_t bank [2][TCB_SIZE];
  logic  act;

  assign active_set = act;
  assign ra_data  = bank[act][{1'b0, ra_addr}];
  assign rb_data  = bank[act][{1'b0, rb_addr}];
  assign sr_q     = bank[act][CTX_SR];
  assign pc_q     = bank[act][CTX_PC];
  assign il_q     = bank[act][CTX_IL];
  assign sh_rdata = (sh_idx < CTX_IDX_W'(TCB_SIZE)) ? bank[!act][sh_idx] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0;
      for (int i = 0; i < int'(TCB_SIZE); i++) begin
        bank[0][i] <= initial_context('0, i);
        bank[1][i] <= '0;
      end
    end else begin
      if (wb_en) bank[act][{1'b0, wb_addr}] <= wb_data;
      if (wa_en) bank[act][{1'b0, wa_addr}] <= wa_data;
      if (sr_we) bank[act][CTX_SR]  <= sr_d;
      if (pc_we) bank[act][CTX_PC]  <= pc_d;
      if (il_we) bank[act][CTX_IL]  <= il_d;
      if (sh_we && sh_idx < CTX_IDX_W'(TCB_SIZE)) bank[!act][sh_idx] <= sh_wdata;
      if (swap) act <= !act;
    end
  end
endmodule
