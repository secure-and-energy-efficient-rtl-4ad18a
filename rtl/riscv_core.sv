// riscv_core: single-cycle RV32I processor with the SHA-256 engine as an
// instruction extension.
//
// Every instruction completes in one clock cycle. The PC addresses the
// instruction memory; the controller decodes the word; the register file is
// read (rs1, rs2); the sign-extension unit forms the immediate; a mux picks
// rs2 or the immediate as ALU operand B. The SHA-256 core sits beside the ALU:
// it takes rs1 as its push word or read index and its operation from the
// controller. A write-back mux selects the ALU result, the loaded data, the
// SHA-256 digest word or PC+4 for rd. Branch conditions come from the ALU
// (SUB/SLT/SLTU result and zero flag). This structure follows the design's
// block diagram; branch/jump target logic and the byte-lane handling of loads
// and stores are standard RISC-V filled in here.
//
// Data accesses leave the core on a simple bus: d_addr, d_wdata (store data
// already shifted to its byte lane), d_be, d_we, d_re, and d_rdata (the whole
// addressed word, returned in the same cycle). The data memory and peripherals
// are outside the core. ld_* loads the instruction memory. pc, sha_op (the
// SHA operation issued this cycle) and sha_round (rounds since sha2start) are
// for observation.
// Reset is asynchronous, active low, to PC = RESET_PC.
module riscv_core
  import rv_pkg::*;
#(
  parameter int          IMEM_WORDS = 4096,
  parameter logic [31:0] RESET_PC   = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory load port
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  // data bus
  output logic [31:0] d_addr,
  output logic [31:0] d_wdata,
  output logic [3:0]  d_be,
  output logic        d_we,
  output logic        d_re,
  input  logic [31:0] d_rdata,
  // observation
  output logic [31:0] pc,
  output sha_op_e     sha_op,
  output logic [6:0]  sha_round
);

  logic [31:0] pc_q, pc_next, pc_plus4, instr;
  ctrl_t       ctrl;
  logic [31:0] rd1, rd2, imm, alu_a, alu_b, alu_y, wb_data, sha_rdata, load_data;
  logic        alu_zero, take_branch;

  // PC register and +4 adder
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_q <= RESET_PC;
    else        pc_q <= pc_next;
  end
  assign pc_plus4 = pc_q + 32'd4;

  instr_mem #(.IMEM_WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc_q), .instr, .ld_we, .ld_addr, .ld_data
  );

  controller u_ctrl (.instr, .ctrl);

  regfile u_rf (
    .clk, .rs1(instr[19:15]), .rs2(instr[24:20]),
    .we(ctrl.reg_we), .rd(instr[11:7]), .wd(wb_data), .rd1, .rd2
  );

  imm_gen u_imm (.instr, .sel(ctrl.imm_sel), .imm);

  always_comb begin
    unique case (ctrl.a_sel)
      ASRC_PC:   alu_a = pc_q;
      ASRC_ZERO: alu_a = '0;
      default:   alu_a = rd1;
    endcase
  end
  assign alu_b = ctrl.b_imm ? imm : rd2;

  alu u_alu (.op(ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .zero(alu_zero));

  sha256_core u_sha (
    .clk, .rst_n, .op(ctrl.sha_op), .wdata(rd1), .rd_idx(rd1[2:0]),
    .rdata(sha_rdata), .round(sha_round)
  );

  // Branch resolution from the ALU result
  always_comb begin
    unique case (ctrl.br_cond)
      3'b000:  take_branch = alu_zero;        // beq
      3'b001:  take_branch = !alu_zero;       // bne
      3'b100,
      3'b110:  take_branch = alu_y[0];        // blt, bltu
      3'b101,
      3'b111:  take_branch = !alu_y[0];       // bge, bgeu
      default: take_branch = 1'b0;
    endcase
  end

  always_comb begin
    unique case (ctrl.br_kind)
      BR_COND: pc_next = take_branch ? pc_q + imm : pc_plus4;
      BR_JAL:  pc_next = pc_q + imm;
      BR_JALR: pc_next = alu_y & ~32'd1;
      default: pc_next = pc_plus4;
    endcase
  end

  // Data bus: address from the ALU, store data and byte enables by lane
  logic [1:0] lane;
  assign lane    = alu_y[1:0];
  assign d_addr  = alu_y;
  assign d_we    = ctrl.mem_we;
  assign d_re    = ctrl.mem_re;
  assign d_wdata = rd2 << (8 * lane);
  always_comb begin
    unique case (ctrl.mem_size[1:0])
      2'b00:   d_be = 4'b0001 << lane;
      2'b01:   d_be = 4'b0011 << lane;
      default: d_be = 4'b1111;
    endcase
  end

  // Load alignment and extension (func3: lb, lh, lw, lbu, lhu)
  logic [31:0] shifted;
  assign shifted = d_rdata >> (8 * lane);
  always_comb begin
    unique case (ctrl.mem_size)
      3'b000:  load_data = {{24{shifted[7]}}, shifted[7:0]};
      3'b001:  load_data = {{16{shifted[15]}}, shifted[15:0]};
      3'b100:  load_data = {24'b0, shifted[7:0]};
      3'b101:  load_data = {16'b0, shifted[15:0]};
      default: load_data = d_rdata;
    endcase
  end

  // Write-back mux: ALU / memory / SHA-256 / PC+4
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = load_data;
      WB_SHA:  wb_data = sha_rdata;
      WB_PC4:  wb_data = pc_plus4;
      default: wb_data = alu_y;
    endcase
  end

  assign pc     = pc_q;
  assign sha_op = ctrl.sha_op;

endmodule
