// alu: RV32I arithmetic and logic unit of the single-cycle processor.
// Purely combinational: y = a op b for add, sub, shifts (amount b[4:0]), signed
// and unsigned set-less-than, xor, or, and, and pass-b (used by LUI). The zero
// flag lets the datapath resolve branches from a SUB/SLT/SLTU result, since the
// processor has no separate comparator. The operation set is the RISC-V base
// ISA; the design itself only names the ALU.
module alu
  import rv_pkg::*;
#(
  parameter int XLEN_P = 32
) (
  input  alu_op_e           op,
  input  logic [XLEN_P-1:0] a,
  input  logic [XLEN_P-1:0] b,
  output logic [XLEN_P-1:0] y,
  output logic              zero
);
  localparam int SHW = $clog2(XLEN_P);
  logic [SHW-1:0] sh;
  assign sh = b[SHW-1:0];

  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << sh;
      ALU_SLT:    y = XLEN_P'($signed(a) < $signed(b));
      ALU_SLTU:   y = XLEN_P'(a < b);
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> sh;
      ALU_SRA:    y = XLEN_P'($signed(a) >>> sh);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_PASS_B: y = b;
      default:    y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
