// imm_gen: the sign-extension unit. Extracts the immediate of an I, S, B, U or
// J format RISC-V instruction and sign-extends it to 32 bits (U is placed in
// the upper 20 bits). Combinational. Formats are those of the RISC-V base ISA.
module imm_gen
  import rv_pkg::*;
(
  input  logic [31:0] instr,
  input  imm_sel_e    sel,
  output logic [31:0] imm
);
  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S:   imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B:   imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_U:   imm = {instr[31:12], 12'b0};
      IMM_J:   imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = '0;
    endcase
  end
endmodule
