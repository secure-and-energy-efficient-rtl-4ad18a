// tb_regfile: writes random values to random registers, keeps a shadow copy,
// and checks both read ports against it; x0 must always read zero, and a
// write becomes visible only after the clock edge.
module tb_regfile;
  logic clk = 0, we = 0;
  logic [4:0] rs1 = 0, rs2 = 0, rd = 0;
  logic [31:0] wd = 0, rd1, rd2;
  logic [31:0] shadow [32];
  bit known [32];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [4:0] r, input logic [31:0] v);
    rd = r; wd = v; we = 1;
    rs1 = r; #1;
    // before the edge the old value is read
    if (known[r]) begin
      checks++; if (rd1 !== shadow[r]) begin failures++; $display("FAIL early write r%0d", r); end
    end
    @(posedge clk); #1;
    we = 0;
    if (r != 0) begin shadow[r] = v; known[r] = 1; end
  endtask

  initial begin
    shadow[0] = 0; known[0] = 1;
    for (int i = 1; i < 32; i++) begin
      @(negedge clk); write(5'(i), 32'(i * 32'h01010101));
    end
    for (int n = 0; n < 500; n++) begin
      if (n % 2 == 0) write(5'($urandom), $urandom);
      rs1 = 5'($urandom); rs2 = 5'($urandom); #1;
      checks++; if (rd1 !== shadow[rs1]) begin failures++; $display("FAIL rd1 x%0d", rs1); end
      checks++; if (rd2 !== shadow[rs2]) begin failures++; $display("FAIL rd2 x%0d", rs2); end
    end
    write(0, 32'hDEADBEEF);
    rs1 = 0; rs2 = 0; #1;
    checks++; if (rd1 !== 0 || rd2 !== 0) begin failures++; $display("FAIL x0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
