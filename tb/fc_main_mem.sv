// fc_main_mem - behavioural main memory for the FASTCHART testbenches.
//
// Not part of the design: FASTCHART's main memory is external. WORDS words
// of 16 bits, combinational read (rdata follows addr in the same cycle, as
// the one-cycle fetch-and-execute of the CPU requires) and clocked write.
// The testbench fills it through the `mem` array by hierarchical access.
module fc_main_mem
  import fc_pkg::*;
#(
  parameter int unsigned WORDS = 65536
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  word_t             wdata,
  output word_t             rdata
);
  word_t mem [WORDS];
  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = {OP_NOP, 12'h000};
  assign rdata = mem[addr];
  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
endmodule
