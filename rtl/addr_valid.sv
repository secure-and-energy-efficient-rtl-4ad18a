// addr_valid: address decoder of the platform's data bus.
// When the processor makes a load or store (req), the region in address bits
// 31..28 selects one interface: 0 the memory interface (m_valid), 1 the UART
// interface (u_valid), 2 the Ethernet interface (e_valid). sel tells the rdata
// multiplexer which interface answers a load; it follows the address even
// without req so that a combinational load path needs no extra gating.
// Addresses in other regions select nothing and read as zero. The decoder and
// its outputs are the design's; the memory map is a local choice.
// Combinational.
module addr_valid
  import rv_pkg::*;
(
  input  logic [31:0] addr,
  input  logic        req,
  output logic        m_valid,
  output logic        u_valid,
  output logic        e_valid,
  output dev_sel_e    sel
);
  always_comb begin
    unique case (addr[31:28])
      REGION_MEM:  sel = DEV_MEM;
      REGION_UART: sel = DEV_UART;
      REGION_ETH:  sel = DEV_ETH;
      default:     sel = DEV_NONE;
    endcase
  end
  assign m_valid = req && (sel == DEV_MEM);
  assign u_valid = req && (sel == DEV_UART);
  assign e_valid = req && (sel == DEV_ETH);
endmodule
