// fc_shifter - shifter behind the ALU of the FASTCHART CPU.
//
// Purely combinational. Shifts or rotates the ALU result by one bit (or
// swaps its bytes, or clears it) so that one ALU instruction can combine an
// operation and a shift. The CPU schematic places the SHIFTER between the
// ALU and the register file and lets it deliver the flags; the operation set
// is this design's own choice. c_out is the bit shifted out (0 where none is).
module fc_shifter
  import fc_pkg::*;
(
  input  shift_op_e op,
  input  word_t     d,
  output word_t     q,
  output logic      c_out,
  output logic      shifted  // 1 when op changes the ALU carry
);
  always_comb begin
    q       = d;
    c_out   = 1'b0;
    shifted = 1'b1;
    unique case (op)
      SH_NONE: shifted = 1'b0;
      SH_SHL:  begin q = {d[DATA_W-2:0], 1'b0};        c_out = d[DATA_W-1]; end
      SH_SHR:  begin q = {1'b0, d[DATA_W-1:1]};        c_out = d[0];        end
      SH_ASR:  begin q = {d[DATA_W-1], d[DATA_W-1:1]}; c_out = d[0];        end
      SH_ROL:  begin q = {d[DATA_W-2:0], d[DATA_W-1]}; c_out = d[DATA_W-1]; end
      SH_ROR:  begin q = {d[0], d[DATA_W-1:1]};        c_out = d[0];        end
      SH_SWAP: begin q = {d[7:0], d[15:8]};            shifted = 1'b0;      end
      SH_CLR:  begin q = '0;                           shifted = 1'b0;      end
      default: shifted = 1'b0;
    endcase
  end
endmodule
