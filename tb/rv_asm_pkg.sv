// rv_asm_pkg: a tiny RV32I assembler for the testbenches. Each function
// returns the 32-bit encoding of one instruction, written from the RISC-V base
// encoding tables, plus the six SHA-256 extension instructions (opcode 0x0F,
// func3 0, func7 1, 2, 4, 8, 16, 32).
package rv_asm_pkg;
  typedef logic [31:0] ins_t;

  function automatic ins_t r_type(input int f7, input int rs2, input int rs1, input int f3, input int rd, input int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic ins_t i_type(input int imm, input int rs1, input int f3, input int rd, input int opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic ins_t s_type(input int imm, input int rs2, input int rs1, input int f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'h23};
  endfunction
  function automatic ins_t b_type(input int off, input int rs2, input int rs1, input int f3);
    logic [12:0] b = 13'(off);
    return {b[12], b[10:5], 5'(rs2), 5'(rs1), 3'(f3), b[4:1], b[11], 7'h63};
  endfunction

  function automatic ins_t add (input int rd, rs1, rs2); return r_type(0, rs2, rs1, 0, rd, 'h33); endfunction
  function automatic ins_t sub (input int rd, rs1, rs2); return r_type('h20, rs2, rs1, 0, rd, 'h33); endfunction
  function automatic ins_t sll (input int rd, rs1, rs2); return r_type(0, rs2, rs1, 1, rd, 'h33); endfunction
  function automatic ins_t slt (input int rd, rs1, rs2); return r_type(0, rs2, rs1, 2, rd, 'h33); endfunction
  function automatic ins_t sltu(input int rd, rs1, rs2); return r_type(0, rs2, rs1, 3, rd, 'h33); endfunction
  function automatic ins_t xor_(input int rd, rs1, rs2); return r_type(0, rs2, rs1, 4, rd, 'h33); endfunction
  function automatic ins_t srl (input int rd, rs1, rs2); return r_type(0, rs2, rs1, 5, rd, 'h33); endfunction
  function automatic ins_t sra (input int rd, rs1, rs2); return r_type('h20, rs2, rs1, 5, rd, 'h33); endfunction
  function automatic ins_t or_ (input int rd, rs1, rs2); return r_type(0, rs2, rs1, 6, rd, 'h33); endfunction
  function automatic ins_t and_(input int rd, rs1, rs2); return r_type(0, rs2, rs1, 7, rd, 'h33); endfunction

  function automatic ins_t addi(input int rd, rs1, imm); return i_type(imm, rs1, 0, rd, 'h13); endfunction
  function automatic ins_t slti(input int rd, rs1, imm); return i_type(imm, rs1, 2, rd, 'h13); endfunction
  function automatic ins_t xori(input int rd, rs1, imm); return i_type(imm, rs1, 4, rd, 'h13); endfunction
  function automatic ins_t ori (input int rd, rs1, imm); return i_type(imm, rs1, 6, rd, 'h13); endfunction
  function automatic ins_t andi(input int rd, rs1, imm); return i_type(imm, rs1, 7, rd, 'h13); endfunction
  function automatic ins_t slli(input int rd, rs1, sh);  return i_type(sh, rs1, 1, rd, 'h13); endfunction
  function automatic ins_t srli(input int rd, rs1, sh);  return i_type(sh, rs1, 5, rd, 'h13); endfunction
  function automatic ins_t srai(input int rd, rs1, sh);  return i_type('h400 | sh, rs1, 5, rd, 'h13); endfunction

  function automatic ins_t lb (input int rd, off, rs1); return i_type(off, rs1, 0, rd, 'h03); endfunction
  function automatic ins_t lh (input int rd, off, rs1); return i_type(off, rs1, 1, rd, 'h03); endfunction
  function automatic ins_t lw (input int rd, off, rs1); return i_type(off, rs1, 2, rd, 'h03); endfunction
  function automatic ins_t lbu(input int rd, off, rs1); return i_type(off, rs1, 4, rd, 'h03); endfunction
  function automatic ins_t lhu(input int rd, off, rs1); return i_type(off, rs1, 5, rd, 'h03); endfunction
  function automatic ins_t sb (input int rs2, off, rs1); return s_type(off, rs2, rs1, 0); endfunction
  function automatic ins_t sh (input int rs2, off, rs1); return s_type(off, rs2, rs1, 1); endfunction
  function automatic ins_t sw (input int rs2, off, rs1); return s_type(off, rs2, rs1, 2); endfunction

  function automatic ins_t beq (input int rs1, rs2, off); return b_type(off, rs2, rs1, 0); endfunction
  function automatic ins_t bne (input int rs1, rs2, off); return b_type(off, rs2, rs1, 1); endfunction
  function automatic ins_t blt (input int rs1, rs2, off); return b_type(off, rs2, rs1, 4); endfunction
  function automatic ins_t bge (input int rs1, rs2, off); return b_type(off, rs2, rs1, 5); endfunction
  function automatic ins_t bltu(input int rs1, rs2, off); return b_type(off, rs2, rs1, 6); endfunction
  function automatic ins_t bgeu(input int rs1, rs2, off); return b_type(off, rs2, rs1, 7); endfunction

  function automatic ins_t lui  (input int rd, imm20); return {20'(imm20), 5'(rd), 7'h37}; endfunction
  function automatic ins_t auipc(input int rd, imm20); return {20'(imm20), 5'(rd), 7'h17}; endfunction
  function automatic ins_t jal(input int rd, off);
    logic [20:0] j = 21'(off);
    return {j[20], j[10:1], j[11], j[19:12], 5'(rd), 7'h6F};
  endfunction
  function automatic ins_t jalr(input int rd, rs1, off); return i_type(off, rs1, 0, rd, 'h67); endfunction

  // SHA-256 extension
  function automatic ins_t sha2rst();               return r_type(1,  0, 0,   0, 0,  'h0F); endfunction
  function automatic ins_t sha2push(input int rs1); return r_type(2,  0, rs1, 0, 0,  'h0F); endfunction
  function automatic ins_t sha2start();             return r_type(4,  0, 0,   0, 0,  'h0F); endfunction
  function automatic ins_t sha2perform();           return r_type(8,  0, 0,   0, 0,  'h0F); endfunction
  function automatic ins_t sha2finish();            return r_type(16, 0, 0,   0, 0,  'h0F); endfunction
  function automatic ins_t sha2read(input int rs1, input int rd); return r_type(32, 0, rs1, 0, rd, 'h0F); endfunction
endpackage
