// tb_imm_gen: builds instructions from known immediates of each format and
// checks that the sign-extension unit recovers them.
module tb_imm_gen;
  import rv_pkg::*;
  logic [31:0] instr, imm;
  imm_sel_e sel;
  int checks = 0, failures = 0;

  imm_gen dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input imm_sel_e s, input logic [31:0] ins, input logic [31:0] exp);
    sel = s; instr = ins; #1;
    checks++;
    if (imm !== exp) begin failures++; $display("FAIL %s instr=%h imm=%h exp=%h", s.name(), ins, imm, exp); end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic logic [31:0] r = $urandom;          // random other fields
      automatic int signed i12 = int'($signed(12'($urandom)));
      automatic int signed b13 = int'($signed({12'($urandom), 1'b0}));
      automatic int signed j21 = int'($signed({20'($urandom), 1'b0}));
      automatic logic [19:0] u20 = 20'($urandom);
      automatic logic [11:0] i = 12'(i12);
      automatic logic [12:0] b = 13'(b13);
      automatic logic [20:0] j = 21'(j21);
      chk(IMM_I, {i, r[19:0]}, 32'(i12));
      chk(IMM_S, {i[11:5], r[24:12], i[4:0], r[6:0]}, 32'(i12));
      chk(IMM_B, {b[12], b[10:5], r[24:12], b[4:1], b[11], r[6:0]}, 32'(b13));
      chk(IMM_U, {u20, r[11:0]}, {u20, 12'b0});
      chk(IMM_J, {j[20], j[10:1], j[11], j[19:12], r[11:0]}, 32'(j21));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
