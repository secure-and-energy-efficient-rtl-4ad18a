// tb_data_mem: random byte-enabled writes and reads against a shadow array.
// Writes with valid low must leave memory unchanged.
module tb_data_mem;
  localparam int W = 256;
  logic clk = 0, valid = 0, we = 0;
  logic [3:0] be = 0;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  data_mem #(.DMEM_WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk); valid = 1; we = 1; be = 4'hF; addr = i * 4; wdata = $urandom; model[i] = wdata;
    end
    for (int n = 0; n < 2000; n++) begin
      automatic int i = $urandom_range(W - 1);
      @(negedge clk);
      valid = ($urandom_range(9) != 0); we = $urandom_range(1); be = 4'($urandom);
      addr = i * 4; wdata = $urandom;
      #1;
      if (!we) begin
        checks++;
        if (rdata !== model[i]) begin failures++; $display("FAIL read word %0d", i); end
      end
      if (valid && we)
        for (int b = 0; b < 4; b++) if (be[b]) model[i][8*b +: 8] = wdata[8*b +: 8];
    end
    @(negedge clk); valid = 0; we = 0;
    for (int i = 0; i < W; i++) begin
      addr = i * 4; #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL final word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
