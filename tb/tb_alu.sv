// tb_alu: checks every ALU operation on corner values and random operands
// against results computed in the testbench with SystemVerilog operators.
module tb_alu;
  import rv_pkg::*;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    int signed sx = x, sz = z;
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_SLL:  return x << z[4:0];
      ALU_SLT:  return (sx < sz) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return x >> z[4:0];
      ALU_SRA:  return sx >>> z[4:0];
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      ALU_PASS_B: return z;
      default:  return 0;
    endcase
  endfunction

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};

  task automatic try(input alu_op_e o, input logic [31:0] x, input logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z; #1;
    e = model(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h", o.name(), x, z, y, e);
    end
  endtask

  initial begin
    for (int o = 0; o <= ALU_PASS_B; o++) begin
      foreach (corner[i]) foreach (corner[j]) try(alu_op_e'(o), corner[i], corner[j]);
      for (int k = 0; k < 200; k++) try(alu_op_e'(o), $urandom, $urandom);
    end
    // explicit spot values
    try(ALU_SRA, 32'h8000_0010, 32'd4);
    checks++; if (y !== 32'hF800_0001) failures++;
    try(ALU_SLT, 32'hFFFF_FFFF, 32'd1);
    checks++; if (y !== 32'd1) failures++;
    try(ALU_SLTU, 32'hFFFF_FFFF, 32'd1);
    checks++; if (y !== 32'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
