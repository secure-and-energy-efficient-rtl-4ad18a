// tb_controller: decodes one instruction of each class and compares the
// control bundle with the expected settings, including all six SHA-256
// instructions and encodings with opcode 0x0F that must be no-ops.
module tb_controller;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  controller dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr=%h)", what, instr); end
  endtask

  initial begin
    instr = add(3, 1, 2); #1;
    expect_("add", ctrl.reg_we && !ctrl.b_imm && ctrl.alu_op == ALU_ADD && ctrl.wb_sel == WB_ALU && !ctrl.mem_we && ctrl.sha_op == SHA_NONE);
    instr = sub(3, 1, 2); #1;  expect_("sub", ctrl.alu_op == ALU_SUB);
    instr = sra(3, 1, 2); #1;  expect_("sra", ctrl.alu_op == ALU_SRA);
    instr = srai(3, 1, 4); #1; expect_("srai", ctrl.alu_op == ALU_SRA && ctrl.b_imm);
    instr = addi(3, 1, -1); #1; expect_("addi -1 is add not sub", ctrl.alu_op == ALU_ADD && ctrl.b_imm && ctrl.imm_sel == IMM_I);
    instr = lw(5, 8, 2); #1;
    expect_("lw", ctrl.mem_re && ctrl.reg_we && ctrl.wb_sel == WB_MEM && ctrl.mem_size == 3'd2);
    instr = sb(5, 8, 2); #1;
    expect_("sb", ctrl.mem_we && !ctrl.reg_we && ctrl.imm_sel == IMM_S && ctrl.mem_size == 3'd0);
    instr = bltu(1, 2, 8); #1;
    expect_("bltu", ctrl.br_kind == BR_COND && ctrl.alu_op == ALU_SLTU && ctrl.br_cond == 3'd6 && !ctrl.reg_we);
    instr = bne(1, 2, 8); #1;  expect_("bne", ctrl.br_kind == BR_COND && ctrl.alu_op == ALU_SUB);
    instr = jal(1, 16); #1;    expect_("jal", ctrl.br_kind == BR_JAL && ctrl.wb_sel == WB_PC4 && ctrl.reg_we);
    instr = jalr(0, 1, 0); #1; expect_("jalr", ctrl.br_kind == BR_JALR && ctrl.b_imm);
    instr = lui(4, 'h12345); #1; expect_("lui", ctrl.alu_op == ALU_PASS_B && ctrl.imm_sel == IMM_U && ctrl.reg_we);
    instr = auipc(4, 1); #1;   expect_("auipc", ctrl.a_sel == ASRC_PC && ctrl.imm_sel == IMM_U);

    instr = sha2rst(); #1;     expect_("sha2rst", ctrl.sha_op == SHA_RST && !ctrl.reg_we && !ctrl.mem_we);
    instr = sha2push(1); #1;   expect_("sha2push", ctrl.sha_op == SHA_PUSH && !ctrl.reg_we);
    instr = sha2start(); #1;   expect_("sha2start", ctrl.sha_op == SHA_START);
    instr = sha2perform(); #1; expect_("sha2perform", ctrl.sha_op == SHA_PERFORM);
    instr = sha2finish(); #1;  expect_("sha2finish", ctrl.sha_op == SHA_FINISH);
    instr = sha2read(1, 2); #1; expect_("sha2read", ctrl.sha_op == SHA_READ && ctrl.reg_we && ctrl.wb_sel == WB_SHA);
    // raw Table encodings: opcode 0x0F, func7 one-hot
    instr = 32'h0400_000F | (32'd7 << 15); #1; expect_("raw push x7", ctrl.sha_op == SHA_PUSH);
    instr = {7'd3, 18'd0, 7'h0F}; #1;   expect_("func7=3 is no-op", ctrl.sha_op == SHA_NONE && !ctrl.reg_we);
    instr = {7'd8, 10'd0, 3'd1, 5'd0, 7'h0F}; #1; expect_("func3!=0 is no-op", ctrl.sha_op == SHA_NONE);
    instr = 32'h0000_0073; #1; expect_("ecall no-op", !ctrl.reg_we && !ctrl.mem_we && ctrl.br_kind == BR_NONE && ctrl.sha_op == SHA_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
