// tb_riscv_core: runs real programs on the single-cycle processor with a data
// memory attached to its data bus.
// Program 1 exercises the RV32I datapath: ALU register and immediate forms,
// shifts, compares, byte/half/word stores and sign/zero-extending loads,
// LUI/AUIPC, JAL/JALR and every branch condition, and stores results that
// the testbench compares with values it computes itself.
// Program 2 follows the SHA-256 flow of the platform: sha2rst, then per 64-byte
// block 16 x (lw, sha2push), sha2start, 64 x sha2perform, sha2finish, and at
// the end 8 x (sha2read, sw). The digest in memory is compared with the
// reference model for one- and three-block messages. The testbench also checks
// single-cycle timing: the PC moves every cycle, 64 perform operations reach
// the SHA core per block, and the number of cycles from sha2start to
// sha2finish equals the instruction count of the round loop. Program 3 is the
// same flow fully unrolled (102 cycles per block).
module tb_riscv_core;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  import sha256_ref_pkg::*;

  localparam int IMW = 1024, DMW = 1024;
  logic clk = 0, rst_n = 0, ld_we = 0;
  logic [31:0] ld_addr = 0, ld_data = 0;
  logic [31:0] d_addr, d_wdata, d_rdata, pc;
  logic [3:0] d_be;
  logic d_we, d_re;
  sha_op_e sha_op;
  logic [6:0] sha_round;
  int checks = 0, failures = 0;

  riscv_core #(.IMEM_WORDS(IMW)) dut (.*);
  data_mem #(.DMEM_WORDS(DMW)) u_dmem (.clk, .valid(d_we | d_re), .we(d_we), .be(d_be),
    .addr(d_addr), .wdata(d_wdata), .rdata(d_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  ins_t prog[$];
  function automatic int here(); return prog.size() * 4; endfunction
  function automatic void emit(input ins_t i); prog.push_back(i); endfunction

  // Load program, clear memory, run until the PC stops at a self-loop
  int cyc, n_perform, t_start, t_finish, pc_moves;
  task automatic run(input int max_cycles);
    rst_n = 0;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); ld_we = 1; ld_addr = i; ld_data = prog[i];
    end
    @(negedge clk); ld_we = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0; n_perform = 0; pc_moves = 0; t_start = -1; t_finish = -1;
    forever begin
      logic [31:0] pc_before = pc;
      @(posedge clk);
      if (sha_op == SHA_PERFORM) n_perform++;
      if (sha_op == SHA_START && t_start < 0) t_start = cyc;
      if (sha_op == SHA_FINISH && t_finish < 0) t_finish = cyc;
      #1;
      cyc++;
      if (pc == pc_before) break;
      pc_moves++;
      if (cyc > max_cycles) break;
    end
  endtask

  function automatic logic [31:0] rdw(input int byte_addr);
    return u_dmem.mem[byte_addr / 4];
  endfunction

  // ------------------------------------------------------------------
  task automatic test_isa();
    int base = 'h600, j_at, b0, jr_at;
    logic [31:0] a = 32'h12345678, b = 32'hFFFF_FFFB;
    prog = {};
    for (int i = 0; i < DMW; i++) u_dmem.mem[i] = '0;
    emit(lui(11, 'h12345));            // x11 = 0x12345000
    emit(addi(11, 11, 'h678));         // x11 = 0x12345678
    emit(addi(12, 0, -5));             // x12 = 0xFFFFFFFB
    emit(add(13, 11, 12));
    emit(sub(14, 11, 12));
    emit(xor_(15, 11, 12));
    emit(or_(16, 11, 12));
    emit(and_(17, 11, 12));
    emit(slt(18, 12, 11));
    emit(sltu(19, 12, 11));
    emit(srai(20, 12, 1));
    emit(srli(21, 12, 28));
    emit(slli(22, 11, 4));
    emit(addi(23, 0, base));
    for (int r = 13; r <= 22; r++) emit(sw(r, (r - 13) * 4, 23));
    emit(sb(11, 40, 23));              // 0x78 at base+40
    emit(sb(12, 41, 23));              // 0xFB at base+41
    emit(sh(11, 46, 23));              // 0x5678 at base+46
    emit(lb(24, 41, 23));
    emit(lbu(25, 41, 23));
    emit(lh(26, 40, 23));
    emit(lhu(27, 46, 23));
    for (int r = 24; r <= 27; r++) emit(sw(r, 48 + (r - 24) * 4, 23));
    b0 = here();                       // address of the auipc
    emit(auipc(28, 1));                // x28 = pc + 0x1000
    emit(sw(28, 64, 23));
    // JAL over one instruction; x30 counts correct paths
    emit(addi(30, 0, 0));
    j_at = here();
    emit(jal(29, 8));
    emit(addi(30, 30, 100));           // skipped
    emit(sw(29, 68, 23));
    // branches: each correct one adds 1, wrong path adds 100
    emit(beq(11, 11, 8)); emit(addi(30, 30, 100)); emit(addi(30, 30, 1));
    emit(beq(11, 12, 8)); emit(addi(30, 30, 1));   emit(addi(30, 30, 0));
    emit(bne(11, 12, 8)); emit(addi(30, 30, 100)); emit(addi(30, 30, 1));
    emit(blt(12, 11, 8)); emit(addi(30, 30, 100)); emit(addi(30, 30, 1));
    emit(bge(12, 11, 8)); emit(addi(30, 30, 1));   emit(addi(30, 30, 0));
    emit(bltu(11, 12, 8)); emit(addi(30, 30, 100)); emit(addi(30, 30, 1));
    emit(bgeu(11, 12, 8)); emit(addi(30, 30, 1));   emit(addi(30, 30, 0));
    // backward loop: x31 counts 5 iterations
    emit(addi(31, 0, 0)); emit(addi(5, 0, 5));
    emit(addi(31, 31, 1)); emit(addi(5, 5, -1)); emit(bne(5, 0, -8));
    // JALR to an absolute target (skipping one instruction), link in x6
    emit(addi(7, 0, here() + 12));
    jr_at = here();
    emit(jalr(6, 7, 0));
    emit(addi(30, 30, 100));           // skipped
    emit(sw(30, 72, 23));
    emit(sw(31, 76, 23));
    emit(sw(6, 80, 23));
    emit(jal(0, 0));                   // halt
    run(1000);

    check(rdw(base + 0)  == a + b, "add");
    check(rdw(base + 4)  == a - b, "sub");
    check(rdw(base + 8)  == (a ^ b), "xor");
    check(rdw(base + 12) == (a | b), "or");
    check(rdw(base + 16) == (a & b), "and");
    check(rdw(base + 20) == 1, "slt");
    check(rdw(base + 24) == 0, "sltu");
    check(rdw(base + 28) == 32'hFFFF_FFFD, "srai");
    check(rdw(base + 32) == 32'hF, "srli");
    check(rdw(base + 36) == 32'h2345_6780, "slli");
    check(rdw(base + 40) == 32'h0000_FB78, "sb");
    check(rdw(base + 44) == 32'h5678_0000, "sh");
    check(rdw(base + 48) == 32'hFFFF_FFFB, "lb");
    check(rdw(base + 52) == 32'h0000_00FB, "lbu");
    check(rdw(base + 56) == 32'hFFFF_FB78, "lh");
    check(rdw(base + 60) == 32'h0000_5678, "lhu");
    check(rdw(base + 64) == b0 + 32'h1000, "auipc");
    check(rdw(base + 68) == j_at + 4, "jal link");
    check(rdw(base + 72) == 7, $sformatf("branches/jumps (x30=%0d)", rdw(base + 72)));
    check(rdw(base + 76) == 5, "loop count");
    check(rdw(base + 80) == jr_at + 4, "jalr link");
    // executed = all but the halt, minus 6 skipped, plus 4 extra loop passes of 3
    check(pc_moves == prog.size() - 1 - 6 + 12, $sformatf("one instruction per cycle (%0d moves)", pc_moves));
  endtask

  // ------------------------------------------------------------------
  // Fig.-5 style SHA-256 program: x1 message pointer, x2 block count,
  // x3 digest pointer
  task automatic test_sha(input int nbytes);
    words_q w;
    bytes_q m;
    logic [255:0] exp;
    int msg = 'h100, out = 'hC00, blk_loop, push_loop, rnd_loop, rd_loop, nblk, to_read;
    for (int i = 0; i < nbytes; i++) m.push_back(8'($urandom));
    w = pad(m);
    exp = digest(w);
    nblk = w.size() / 16;
    for (int i = 0; i < DMW; i++) u_dmem.mem[i] = '0;
    foreach (w[i]) u_dmem.mem[msg / 4 + i] = w[i];

    prog = {};
    emit(addi(1, 0, msg));
    emit(addi(2, 0, nblk));
    emit(lui(3, 1)); emit(addi(3, 3, out - 'h1000));
    emit(sha2rst());
    blk_loop = here();
    emit(32'h0);                       // patched: beq x2, x0, read
    emit(addi(7, 0, 16));
    push_loop = here();
    emit(lw(6, 0, 1));
    emit(sha2push(6));
    emit(addi(1, 1, 4));
    emit(addi(7, 7, -1));
    emit(bne(7, 0, push_loop - here()));
    emit(sha2start());
    emit(addi(5, 0, 64));
    rnd_loop = here();
    emit(sha2perform());
    emit(addi(5, 5, -1));
    emit(bne(5, 0, rnd_loop - here()));
    emit(sha2finish());
    emit(addi(2, 2, -1));
    emit(jal(0, blk_loop - here()));
    to_read = here();
    prog[blk_loop / 4] = beq(2, 0, to_read - blk_loop);
    emit(addi(9, 0, 0));
    emit(addi(10, 0, 8));
    rd_loop = here();
    emit(sha2read(9, 8));
    emit(sw(8, 0, 3));
    emit(addi(3, 3, 4));
    emit(addi(9, 9, 1));
    emit(blt(9, 10, rd_loop - here()));
    emit(jal(0, 0));
    run(200000);

    begin
      logic [255:0] got;
      for (int i = 0; i < 8; i++) got[255 - 32*i -: 32] = rdw(out + 4*i);
      check(got == exp, $sformatf("SHA-256 digest of %0d bytes", nbytes));
      if (got != exp) $display("  got %h\n  exp %h", got, exp);
    end
    check(n_perform == 64 * nblk, $sformatf("%0d perform operations", n_perform));
    check(t_finish - t_start == 2 + 3 * 64, $sformatf("start to finish %0d cycles", t_finish - t_start));
    // total cycles = instructions executed: prologue 5, per block 1+1+16*5+2+64*3+3,
    // exit 1, readout 2+8*5, halt
    check(cyc == 5 + nblk * (2 + 80 + 2 + 192 + 3) + 1 + 2 + 40 + 1,
          $sformatf("total cycles %0d", cyc));
  endtask

  // The same flow fully unrolled, with the register use of the published
  // flowchart: x2 message base, x1 data word and read index
  // (sha2read x1, x1), x3 digest pointer. A block costs 1 + 32 + 1 + 64 + 1 + 3
  // = 102 cycles.
  task automatic test_sha_unrolled(input int nbytes);
    words_q w;
    bytes_q m;
    logic [255:0] exp, got;
    int msg = 'h100, out = 'hC00, bl, patch, nblk;
    for (int i = 0; i < nbytes; i++) m.push_back(8'($urandom));
    w = pad(m);
    exp = digest(w);
    nblk = w.size() / 16;
    for (int i = 0; i < DMW; i++) u_dmem.mem[i] = '0;
    foreach (w[i]) u_dmem.mem[msg / 4 + i] = w[i];
    prog = {};
    emit(addi(2, 0, msg));
    emit(lui(3, 1)); emit(addi(3, 3, out - 'h1000));
    emit(addi(4, 0, nblk));
    emit(sha2rst());
    bl = here();
    patch = prog.size(); emit(32'h0);
    for (int i = 0; i < 16; i++) begin emit(lw(1, 4 * i, 2)); emit(sha2push(1)); end
    emit(sha2start());
    for (int t = 0; t < 64; t++) emit(sha2perform());
    emit(sha2finish());
    emit(addi(2, 2, 64));
    emit(addi(4, 4, -1));
    emit(jal(0, bl - here()));
    prog[patch] = beq(4, 0, here() - bl);
    for (int i = 0; i < 8; i++) begin emit(addi(1, 0, i)); emit(sha2read(1, 1)); emit(sw(1, 4 * i, 3)); end
    emit(jal(0, 0));
    run(100000);
    for (int i = 0; i < 8; i++) got[255 - 32*i -: 32] = rdw(out + 4*i);
    check(got == exp, $sformatf("unrolled SHA-256 digest of %0d bytes", nbytes));
    check(t_finish - t_start == 65, $sformatf("unrolled start to finish %0d cycles", t_finish - t_start));
    check(cyc == 5 + nblk * 102 + 1 + 24 + 1, $sformatf("unrolled total cycles %0d", cyc));
  endtask

  initial begin
    test_isa();
    test_sha_unrolled(100);
    test_sha(3);
    test_sha(150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
