// tb_fc_shifter - self-checking test of the FASTCHART shifter.
//
// Every shift operation on random and corner data, compared with a
// reference built from bit-level expressions written independently here.
module tb_fc_shifter;
  import fc_pkg::*;
  shift_op_e op;
  word_t     d, q;
  logic      c_out, shifted;
  int checks = 0, failures = 0;

  fc_shifter dut (.op, .d, .q, .c_out, .shifted);

  task automatic check_one();
    word_t eq; logic ec, es;
    int unsigned v;
    v = d;
    es = 1; ec = 0;
    case (op)
      SH_NONE: begin eq = d; es = 0; end
      SH_SHL:  begin eq = 16'(v * 2); ec = d[15]; end
      SH_SHR:  begin eq = 16'(v / 2); ec = d[0]; end
      SH_ASR:  begin eq = 16'(v / 2) | (d & 16'h8000); ec = d[0]; end
      SH_ROL:  begin eq = 16'(v * 2) | 16'(v / 32768); ec = d[15]; end
      SH_ROR:  begin eq = 16'(v / 2) | (d[0] ? 16'h8000 : 16'h0); ec = d[0]; end
      SH_SWAP: begin eq = 16'((v % 256) * 256 + v / 256); es = 0; end
      default: begin eq = 0; es = 0; end
    endcase
    #1;
    checks++;
    if (q !== eq || c_out !== ec || shifted !== es) begin
      failures++;
      $display("FAIL op=%s d=%h q=%h exp=%h c=%b/%b", op.name(), d, q, eq, c_out, ec);
    end
  endtask

  initial begin
    for (int o = 0; o < 8; o++) begin
      op = shift_op_e'(o);
      d = 16'h8001; check_one();
      d = 16'h0000; check_one();
      d = 16'hFFFF; check_one();
      repeat (100) begin d = 16'($urandom); check_one(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
