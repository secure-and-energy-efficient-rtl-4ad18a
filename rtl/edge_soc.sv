// edge_soc: the FPGA side of the secure edge computing platform.
//
// The customized RISC-V processor (single-cycle RV32I with the SHA-256
// instruction extension) is joined to its peripherals by a small data bus:
// the processor's address goes to addr_valid, which raises one of m_valid,
// u_valid, e_valid and gives rdata_mux its select; the store data (wdata) goes
// to every interface; rdata_mux returns the selected interface's read data to
// the processor in the same cycle. Behind the memory interface is the on-chip
// data memory; the UART interface drives the serial pins. The Ethernet
// interface is not part of this RTL: its select, address, store data, byte
// enables and read data are ports of this module, so an Ethernet controller
// (or a test model) can be attached. This partition into processor, address
// decoder, read-data multiplexer and per-device interfaces follows the
// platform's description; the bus signalling (single-cycle, byte enables) and
// the memory map are local choices.
// Memory map: 0x0xxx_xxxx data memory, 0x1xxx_xxxx UART,
// 0x2xxx_xxxx Ethernet. The program is loaded through ld_* while the
// processor is held in reset or is not fetching the words being written.
module edge_soc
  import rv_pkg::*;
#(
  parameter int IMEM_WORDS   = 4096,
  parameter int DMEM_WORDS   = 8192,
  parameter int CLKS_PER_BIT = 234
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  output logic        uart_tx,
  input  logic        uart_rx,
  output logic        e_valid,
  output logic        e_we,
  output logic [3:0]  e_be,
  output logic [31:0] e_addr,
  output logic [31:0] e_wdata,
  input  logic [31:0] e_rdata,
  output logic [31:0] pc,
  output sha_op_e     sha_op,
  output logic [6:0]  sha_round
);
  logic [31:0] d_addr, d_wdata, d_rdata, m_rdata, u_rdata;
  logic [3:0]  d_be;
  logic        d_we, d_re, m_valid, u_valid;
  dev_sel_e    sel;

  riscv_core #(.IMEM_WORDS(IMEM_WORDS)) u_core (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_data,
    .d_addr, .d_wdata, .d_be, .d_we, .d_re, .d_rdata,
    .pc, .sha_op, .sha_round
  );

  addr_valid u_dec (
    .addr(d_addr), .req(d_re | d_we), .m_valid, .u_valid, .e_valid, .sel
  );

  data_mem #(.DMEM_WORDS(DMEM_WORDS)) u_mem (
    .clk, .valid(m_valid), .we(d_we), .be(d_be), .addr(d_addr),
    .wdata(d_wdata), .rdata(m_rdata)
  );

  uart_if #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .valid(u_valid), .we(d_we), .addr(d_addr[3:0]),
    .wdata(d_wdata), .rdata(u_rdata), .tx(uart_tx), .rx(uart_rx)
  );

  rdata_mux u_rmux (
    .sel, .m_rdata, .u_rdata, .e_rdata, .rdata(d_rdata)
  );

  assign e_we    = d_we;
  assign e_be    = d_be;
  assign e_addr  = d_addr;
  assign e_wdata = d_wdata;

  // Bus rule: at most one interface is selected per access
  a_one_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (2'(m_valid) + 2'(u_valid) + 2'(e_valid)) <= 2'd1);
endmodule
