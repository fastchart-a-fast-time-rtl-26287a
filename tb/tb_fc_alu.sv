// tb_fc_alu - self-checking test of the FASTCHART ALU.
//
// Applies random and corner operands to every operation and compares the
// result and the Z, N, C, V flags with a reference computed here from
// 32-bit integer arithmetic.
module tb_fc_alu;
  import fc_pkg::*;
  alu_op_e    op;
  word_t      a, b, y;
  logic [3:0] flags;
  int checks = 0, failures = 0;

  fc_alu dut (.op, .a, .b, .y, .flags);

  task automatic check_one();
    int unsigned ua, ub, r;
    logic ey_c, ey_v;
    word_t ey;
    ua = a; ub = b; ey_c = 0; ey_v = 0;
    case (op)
      ALU_ADD: begin r = ua + ub; ey = r[15:0]; ey_c = r[16];
                 ey_v = (a[15] == b[15]) && (ey[15] != a[15]); end
      ALU_SUB, ALU_CMP: begin r = ua - ub; ey = r[15:0]; ey_c = (ua < ub);
                 ey_v = (a[15] != b[15]) && (ey[15] != a[15]); end
      ALU_AND: ey = a & b;
      ALU_OR:  ey = a | b;
      ALU_XOR: ey = a ^ b;
      ALU_MOV: ey = b;
      default: ey = ~b;
    endcase
    #1;
    checks++;
    if (y !== ey || flags !== {ey_v, ey_c, ey[15], ey == 0}) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h flags=%b", op.name(), a, b, y, ey, flags);
    end
  endtask

  initial begin
    for (int o = 0; o < 8; o++) begin
      op = alu_op_e'(o);
      a = 16'h7FFF; b = 16'h0001; check_one();
      a = 16'hFFFF; b = 16'h0001; check_one();
      a = 16'h0000; b = 16'h0001; check_one();
      a = 16'h8000; b = 16'h0001; check_one();
      a = 16'h1234; b = 16'h1234; check_one();
      repeat (200) begin a = 16'($urandom); b = 16'($urandom); check_one(); end
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
