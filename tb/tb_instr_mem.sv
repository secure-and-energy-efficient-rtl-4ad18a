// tb_instr_mem: loads random words through the load port and reads them back
// by byte address (PC), including the low address bits being ignored.
module tb_instr_mem;
  localparam int W = 256;
  logic clk = 0, ld_we = 0;
  logic [31:0] addr = 0, instr, ld_addr = 0, ld_data = 0;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  instr_mem #(.IMEM_WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); ld_we = 1; ld_addr = i; ld_data = $urandom; model[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 600; n++) begin
      automatic int i = $urandom_range(W - 1);
      addr = {22'b0, 8'(i), 2'($urandom)}; #1;
      checks++;
      if (instr !== model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
