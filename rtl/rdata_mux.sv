// rdata_mux: read-data multiplexer of the platform's data bus ("rdata").
// Returns to the processor the read data of the interface chosen by the
// address decoder's sel: memory, UART or Ethernet; zero for an unmapped
// address (a local choice). Combinational.
module rdata_mux
  import rv_pkg::*;
(
  input  dev_sel_e    sel,
  input  logic [31:0] m_rdata,
  input  logic [31:0] u_rdata,
  input  logic [31:0] e_rdata,
  output logic [31:0] rdata
);
  always_comb begin
    unique case (sel)
      DEV_MEM:  rdata = m_rdata;
      DEV_UART: rdata = u_rdata;
      DEV_ETH:  rdata = e_rdata;
      default:  rdata = '0;
    endcase
  end
endmodule
