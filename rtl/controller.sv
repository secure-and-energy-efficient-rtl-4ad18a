// controller: instruction decoder of the single-cycle processor.
// From the opcode, func3 and func7 fields it produces the control bundle ctrl_t
// for the datapath: register write, ALU operand selects and operation, the
// immediate format, the write-back source (ALU, memory, SHA-256, PC+4), memory
// read/write, branch kind, and the SHA-256 operation.
// SHA-256 instructions are R-type with opcode 0x0F and func3 0; func7 is one-hot:
// 1 sha2rst, 2 sha2push (word from rs1), 4 sha2start, 8 sha2perform,
// 16 sha2finish, 32 sha2read (index in rs1, digest word to rd). These codes are
// the design's. Because 0x0F is the RISC-V MISC-MEM slot, FENCE is not
// supported. Any other encoding (FENCE, ECALL/EBREAK, CSR, unknown opcodes)
// decodes as a no-op: this is a local choice. Combinational.
module controller
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [6:0] opcode, func7;
  logic [2:0] func3;
  assign opcode = instr[6:0];
  assign func3  = instr[14:12];
  assign func7  = instr[31:25];

  function automatic alu_op_e alu_from_f3(input logic [2:0] f3, input logic alt);
    unique case (f3)
      3'b000:  return alt ? ALU_SUB : ALU_ADD;
      3'b001:  return ALU_SLL;
      3'b010:  return ALU_SLT;
      3'b011:  return ALU_SLTU;
      3'b100:  return ALU_XOR;
      3'b101:  return alt ? ALU_SRA : ALU_SRL;
      3'b110:  return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl = '{reg_we: 1'b0, a_sel: ASRC_RS1, b_imm: 1'b0, imm_sel: IMM_I,
             alu_op: ALU_ADD, wb_sel: WB_ALU, mem_re: 1'b0, mem_we: 1'b0,
             mem_size: func3, br_kind: BR_NONE, br_cond: func3, sha_op: SHA_NONE};
    unique case (opcode)
      OP_LUI: begin
        ctrl.reg_we = 1'b1; ctrl.b_imm = 1'b1; ctrl.imm_sel = IMM_U; ctrl.alu_op = ALU_PASS_B;
      end
      OP_AUIPC: begin
        ctrl.reg_we = 1'b1; ctrl.a_sel = ASRC_PC; ctrl.b_imm = 1'b1; ctrl.imm_sel = IMM_U;
      end
      OP_JAL: begin
        ctrl.reg_we = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.imm_sel = IMM_J; ctrl.br_kind = BR_JAL;
      end
      OP_JALR: begin
        ctrl.reg_we = 1'b1; ctrl.wb_sel = WB_PC4; ctrl.b_imm = 1'b1; ctrl.imm_sel = IMM_I;
        ctrl.br_kind = BR_JALR;
      end
      OP_BRANCH: begin
        ctrl.imm_sel = IMM_B; ctrl.br_kind = BR_COND;
        unique case (func3)
          3'b100, 3'b101: ctrl.alu_op = ALU_SLT;
          3'b110, 3'b111: ctrl.alu_op = ALU_SLTU;
          default:        ctrl.alu_op = ALU_SUB;   // beq, bne
        endcase
      end
      OP_LOAD: begin
        ctrl.reg_we = 1'b1; ctrl.b_imm = 1'b1; ctrl.imm_sel = IMM_I; ctrl.wb_sel = WB_MEM;
        ctrl.mem_re = 1'b1;
      end
      OP_STORE: begin
        ctrl.b_imm = 1'b1; ctrl.imm_sel = IMM_S; ctrl.mem_we = 1'b1;
      end
      OP_IMM: begin
        ctrl.reg_we = 1'b1; ctrl.b_imm = 1'b1; ctrl.imm_sel = IMM_I;
        // only srai carries the alternate bit among immediates
        ctrl.alu_op = alu_from_f3(func3, func3 == 3'b101 && instr[30]);
      end
      OP_REG: begin
        ctrl.reg_we = 1'b1;
        ctrl.alu_op = alu_from_f3(func3, instr[30]);
      end
      OP_SHA: begin
        if (func3 == 3'b000) begin
          unique case (func7)
            F7_SHA2RST:     ctrl.sha_op = SHA_RST;
            F7_SHA2PUSH:    ctrl.sha_op = SHA_PUSH;
            F7_SHA2START:   ctrl.sha_op = SHA_START;
            F7_SHA2PERFORM: ctrl.sha_op = SHA_PERFORM;
            F7_SHA2FINISH:  ctrl.sha_op = SHA_FINISH;
            F7_SHA2READ: begin
              ctrl.sha_op = SHA_READ; ctrl.reg_we = 1'b1; ctrl.wb_sel = WB_SHA;
            end
            default: ;
          endcase
        end
      end
      default: ;
    endcase
  end
endmodule
