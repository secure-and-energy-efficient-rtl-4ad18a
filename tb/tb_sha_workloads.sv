// tb_sha_workloads: hashes messages of 8, 16, 64, 256, 1024, 8192 and 16384
// bytes on the full-size platform, the message sizes of the platform's
// execution-time evaluation. The message is placed, already padded, in data
// memory (padding is the software's job); the program runs the extension
// instruction flow (sha2rst; per block 16 x lw/sha2push, sha2start,
// 64 x sha2perform, sha2finish; then 8 x sha2read/sw). For each size the
// digest is compared with the reference model and the cycle count with the
// instruction count of the program, and the execution time at 27, 50 and
// 75 MHz is printed.
module tb_sha_workloads;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  import sha256_ref_pkg::*;

  logic clk = 0, rst_n = 0, ld_we = 0, uart_rx = 1, uart_tx;
  logic [31:0] ld_addr = 0, ld_data = 0;
  logic e_valid, e_we;
  logic [3:0] e_be;
  logic [31:0] e_addr, e_wdata, pc;
  sha_op_e sha_op;
  logic [6:0] sha_round;
  int checks = 0, failures = 0;

  edge_soc dut (.*, .e_rdata(32'h0));
  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int MSG = 'h100, OUT = 'h7F00;
  ins_t prog[$];
  function automatic int here(); return prog.size() * 4; endfunction
  function automatic void emit(input ins_t i); prog.push_back(i); endfunction

  task automatic build(input int nblk);
    int bl, pl, rl, rdl, patch;
    prog = {};
    emit(addi(1, 0, MSG));
    emit(addi(2, 0, nblk));
    emit(lui(3, 8)); emit(addi(3, 3, OUT - 'h8000));
    emit(sha2rst());
    bl = here();
    patch = prog.size(); emit(32'h0);
    emit(addi(7, 0, 16));
    pl = here();
    emit(lw(6, 0, 1)); emit(sha2push(6)); emit(addi(1, 1, 4)); emit(addi(7, 7, -1));
    emit(bne(7, 0, pl - here()));
    emit(sha2start());
    emit(addi(5, 0, 64));
    rl = here();
    emit(sha2perform()); emit(addi(5, 5, -1)); emit(bne(5, 0, rl - here()));
    emit(sha2finish());
    emit(addi(2, 2, -1));
    emit(jal(0, bl - here()));
    prog[patch] = beq(2, 0, here() - bl);
    emit(addi(9, 0, 0)); emit(addi(10, 0, 8));
    rdl = here();
    emit(sha2read(9, 8)); emit(sw(8, 0, 3)); emit(addi(3, 3, 4)); emit(addi(9, 9, 1));
    emit(blt(9, 10, rdl - here()));
    emit(jal(0, 0));
  endtask

  int sizes[7] = '{8, 16, 64, 256, 1024, 8192, 16384};

  initial begin
    foreach (sizes[s]) begin
      bytes_q m;
      words_q w;
      logic [255:0] exp, got;
      int nblk, cyc;
      m = {};
      for (int i = 0; i < sizes[s]; i++) m.push_back(8'($urandom));
      w = pad(m);
      exp = digest(w);
      nblk = w.size() / 16;
      build(nblk);
      rst_n = 0;
      for (int i = 0; i < prog.size(); i++) begin
        @(negedge clk); ld_we = 1; ld_addr = i; ld_data = prog[i];
      end
      @(negedge clk); ld_we = 0;
      foreach (w[i]) dut.u_mem.mem[MSG / 4 + i] = w[i];
      @(negedge clk); rst_n = 1;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!(dut.u_core.instr == jal(0, 0)));
      for (int i = 0; i < 8; i++) got[255 - 32*i -: 32] = dut.u_mem.mem[OUT / 4 + i];
      check(got == exp, $sformatf("digest of %0d bytes", sizes[s]));
      check(cyc == 5 + nblk * 279 + 1 + 2 + 40, $sformatf("%0d bytes: %0d cycles", sizes[s], cyc));
      $display("%6d bytes  %4d blocks  %8d cycles  %9.2f us @27MHz  %9.2f us @50MHz  %9.2f us @75MHz",
        sizes[s], nblk, cyc, cyc / 27.0, cyc / 50.0, cyc / 75.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
