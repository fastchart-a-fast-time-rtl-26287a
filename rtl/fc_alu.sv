// fc_alu - arithmetic/logic unit of the FASTCHART CPU.
//
// Purely combinational. Computes y = a op b for the eight operations of
// alu_op_e and the Z, N, C, V flags that go to the status register. CMP
// computes a - b like SUB; the CPU writes only its flags. MOV passes b and
// NOT inverts b. Logic operations clear C and V. The CPU schematic shows an
// ALU fed by two register-file outputs or by the internal data bus; the
// set of operations and the flag rules are this design's own choice.
module fc_alu
  import fc_pkg::*;
(
  input  alu_op_e     op,
  input  word_t       a,
  input  word_t       b,
  output word_t       y,
  output logic [3:0]  flags   // {V, C, N, Z}
);
  logic [DATA_W:0] wide;
  logic            c, v;

  always_comb begin
    wide = '0;
    c    = 1'b0;
    v    = 1'b0;
    unique case (op)
      ALU_ADD: begin
        wide = {1'b0, a} + {1'b0, b};
        c    = wide[DATA_W];
        v    = (a[DATA_W-1] == b[DATA_W-1]) && (wide[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_SUB, ALU_CMP: begin
        wide = {1'b0, a} - {1'b0, b};
        c    = wide[DATA_W];  // borrow
        v    = (a[DATA_W-1] != b[DATA_W-1]) && (wide[DATA_W-1] != a[DATA_W-1]);
      end
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      ALU_XOR: wide = {1'b0, a ^ b};
      ALU_MOV: wide = {1'b0, b};
      ALU_NOT: wide = {1'b0, ~b};
      default: wide = '0;
    endcase
    y     = wide[DATA_W-1:0];
    flags = {v, c, y[DATA_W-1], (y == '0)};
  end
endmodule
