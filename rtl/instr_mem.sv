// instr_mem: instruction memory of the single-cycle processor.
// IMEM_WORDS x 32-bit words. The PC (a byte address) reads the word at
// addr[..:2] combinationally, so an instruction is fetched in the cycle it
// executes. A synchronous write port (ld_we, ld_addr as a word index, ld_data)
// loads the program; how programs are loaded is not specified by the design
// and this port is a local choice, as is the default size of 16 KiB.
// Addresses past the end wrap around.
module instr_mem #(
  parameter int IMEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        ld_we,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data
);
  localparam int AW = $clog2(IMEM_WORDS);
  logic [31:0] mem [IMEM_WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr[AW-1:0]] <= ld_data;
  end

  assign instr = mem[addr[AW+1:2]];
endmodule
