// rv_pkg: types and constants shared by the customized RV32I processor and its
// platform. It holds the base-ISA opcodes, the custom SHA-256 opcode and the
// one-hot func7 codes of the six SHA instructions, the ALU and immediate
// selectors, the decoded control bundle passed from the controller to the
// datapath, and the device select used on the data bus.
// The SHA encodings (opcode 0x0F, func3 0, func7 1/2/4/8/16/32) follow the
// instruction table of the design; everything else is standard RISC-V or a
// local choice (the memory map constants at the end).
package rv_pkg;

  localparam int XLEN = 32;

  // Base RV32I major opcodes
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  // Custom SHA-256 extension (R-type, takes the MISC-MEM slot 0x0F)
  localparam logic [6:0] OP_SHA    = 7'h0F;

  // func7 of the SHA instructions (func3 = 0)
  localparam logic [6:0] F7_SHA2RST     = 7'd1;
  localparam logic [6:0] F7_SHA2PUSH    = 7'd2;
  localparam logic [6:0] F7_SHA2START   = 7'd4;
  localparam logic [6:0] F7_SHA2PERFORM = 7'd8;
  localparam logic [6:0] F7_SHA2FINISH  = 7'd16;
  localparam logic [6:0] F7_SHA2READ    = 7'd32;

  typedef enum logic [2:0] {
    SHA_NONE, SHA_RST, SHA_PUSH, SHA_START, SHA_PERFORM, SHA_FINISH, SHA_READ
  } sha_op_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASS_B
  } alu_op_e;

  typedef enum logic [2:0] { IMM_I, IMM_S, IMM_B, IMM_U, IMM_J } imm_sel_e;

  // Write-back source: the three-way mux after ALU, data memory and SHA-256
  typedef enum logic [1:0] { WB_ALU, WB_MEM, WB_SHA, WB_PC4 } wb_sel_e;

  typedef enum logic [1:0] { ASRC_RS1, ASRC_PC, ASRC_ZERO } a_sel_e;

  typedef enum logic [1:0] { BR_NONE, BR_COND, BR_JAL, BR_JALR } br_kind_e;

  typedef struct packed {
    logic      reg_we;     // write rd
    a_sel_e    a_sel;      // ALU operand A
    logic      b_imm;      // ALU operand B from the immediate (else rs2)
    imm_sel_e  imm_sel;
    alu_op_e   alu_op;
    wb_sel_e   wb_sel;
    logic      mem_re;     // load
    logic      mem_we;     // store
    logic [2:0] mem_size;  // func3 of the load/store
    br_kind_e  br_kind;
    logic [2:0] br_cond;   // func3 of the branch
    sha_op_e   sha_op;
  } ctrl_t;

  // Platform device select (addr_valid -> rdata)
  typedef enum logic [1:0] { DEV_NONE, DEV_MEM, DEV_UART, DEV_ETH } dev_sel_e;

  // Memory map: region chosen by address bits 31..28
  localparam logic [3:0] REGION_MEM  = 4'h0;
  localparam logic [3:0] REGION_UART = 4'h1;
  localparam logic [3:0] REGION_ETH  = 4'h2;

endpackage
