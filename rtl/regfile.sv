// regfile: the processor's 32 x 32-bit integer register file.
// Two asynchronous read ports (rs1 -> rd1, rs2 -> rd2) and one write port
// written at the rising clock edge when we is high. Register x0 always reads
// zero and ignores writes. Reads of the register being written in the same
// cycle return the old value; the new value is visible from the next cycle,
// which is what a single-cycle processor needs. The registers are not reset.
module regfile #(
  parameter int NREGS  = 32,
  parameter int XLEN_P = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] rs1,
  input  logic [$clog2(NREGS)-1:0] rs2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rd,
  input  logic [XLEN_P-1:0]        wd,
  output logic [XLEN_P-1:0]        rd1,
  output logic [XLEN_P-1:0]        rd2
);
  logic [XLEN_P-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && rd != '0) regs[rd] <= wd;
  end

  assign rd1 = (rs1 == '0) ? '0 : regs[rs1];
  assign rd2 = (rs2 == '0) ? '0 : regs[rs2];
endmodule
