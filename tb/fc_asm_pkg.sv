// fc_asm_pkg - instruction encoders for FASTCHART test programs.
//
// One function per instruction format of the FASTCHART CPU (see fc_pkg for
// the encoding). Branch and call offsets are relative to the address of the
// following instruction.
package fc_asm_pkg;
  import fc_pkg::*;

  function automatic word_t a_alu(alu_op_e op, int rd, int rs, shift_op_e sh = SH_NONE);
    return {OP_ALU, 3'(rd), 3'(rs), op, sh};
  endfunction
  function automatic word_t a_addi(int rd, int imm);
    return {OP_ADDI, 3'(rd), 9'(imm)};
  endfunction
  function automatic word_t a_ldi(int rd, int imm);
    return {OP_LDI, 3'(rd), 9'(imm)};
  endfunction
  function automatic word_t a_ldhi(int rd, int imm8);
    return {OP_LDHI, 3'(rd), 1'b0, 8'(imm8)};
  endfunction
  function automatic word_t a_load(int rd, int rs, addr_mode_e am = AM_PLAIN);
    return {OP_LOAD, 3'(rd), 3'(rs), am, 4'h0};
  endfunction
  function automatic word_t a_store(int rd, int rs, addr_mode_e am = AM_PLAIN);
    return {OP_STORE, 3'(rd), 3'(rs), am, 4'h0};
  endfunction
  function automatic word_t a_bcc(cond_e cc, int off);
    return {OP_BCC, cc, 9'(off)};
  endfunction
  function automatic word_t a_bra(int off);
    return {OP_BRA, 12'(off)};
  endfunction
  function automatic word_t a_csr(int off);
    return {OP_CSR, 12'(off)};
  endfunction
  function automatic word_t a_rsr();
    return {OP_RSR, 12'h000};
  endfunction
  function automatic word_t a_act(int ra, int rb);
    return {OP_RT, RTF_ACT, 3'(ra), 3'(rb), 3'b000};
  endfunction
  function automatic word_t a_term();
    return {OP_RT, RTF_TERM, 9'h000};
  endfunction
  function automatic word_t a_dly(int ra);
    return {OP_RT, RTF_DLY, 3'(ra), 6'h00};
  endfunction
  function automatic word_t a_snsf();
    return {OP_RT, RTF_SNSF, 9'h000};
  endfunction
  function automatic word_t a_cnsf();
    return {OP_RT, RTF_CNSF, 9'h000};
  endfunction
  function automatic word_t a_nop();
    return {OP_NOP, 12'h000};
  endfunction
endpackage
