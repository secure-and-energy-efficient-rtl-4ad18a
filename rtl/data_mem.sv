// data_mem: main data memory behind the platform's memory interface.
// DMEM_WORDS x 32-bit words with per-byte write enables. Asynchronous read of
// the word at addr[..:2] (the processor completes a load in one cycle);
// writes at the rising clock edge when valid and we are high, only the bytes
// whose be bit is set. valid is the m_valid select from the address decoder.
// Size (32 KiB) and byte enables are local choices; the design places the data
// memory in on-chip block RAM. Addresses past the end wrap around.
module data_mem #(
  parameter int DMEM_WORDS = 8192
) (
  input  logic        clk,
  input  logic        valid,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);
  localparam int AW = $clog2(DMEM_WORDS);
  logic [31:0] mem [DMEM_WORDS];
  logic [AW-1:0] widx;
  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (valid && we) begin
      for (int b = 0; b < 4; b++)
        if (be[b]) mem[widx][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  assign rdata = mem[widx];
endmodule
