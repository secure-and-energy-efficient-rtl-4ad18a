// tb_edge_soc: end-to-end test of the edge platform at its default sizes
// (16 KiB instruction memory, 32 KiB data memory, 234 clocks per UART bit).
// One program plays the whole edge-device role:
//   1. collect 64 bytes of "sensor data" from the UART (polling the status
//      register), packing them into big-endian words in data memory;
//   2. append the SHA-256 padding block;
//   3. hash the two blocks with the extension instructions (sha2rst, 16 x
//      lw/sha2push, sha2start, 64 x sha2perform, sha2finish per block);
//   4. copy the digest to memory with sha2read/sw;
//   5. send the 32 digest bytes out of the UART (polling tx busy);
//   6. write the digest to the Ethernet interface and read one word back.
// The testbench drives the UART rx line, decodes uart_tx, models the Ethernet
// read data, and checks digest (in memory, on the UART, on the Ethernet
// port) against the reference model, and the single-cycle timing of the round
// loop. It counts each mechanism (each SHA operation, UART rx and tx bytes,
// busy polling, Ethernet writes and reads, memory accesses, taken branches)
// and counts a failure for any that never happened.
module tb_edge_soc;
  import rv_pkg::*;
  import rv_asm_pkg::*;
  import sha256_ref_pkg::*;

  localparam int CPB = 234;           // must match the default of edge_soc
  logic clk = 0, rst_n = 0, ld_we = 0, uart_rx = 1, uart_tx;
  logic [31:0] ld_addr = 0, ld_data = 0;
  logic e_valid, e_we;
  logic [3:0] e_be;
  logic [31:0] e_addr, e_wdata, e_rdata, pc;
  sha_op_e sha_op;
  logic [6:0] sha_round;
  int checks = 0, failures = 0;

  edge_soc dut (.*);

  always #5 clk = ~clk;

  // Ethernet interface model: one readable status word at offset 0x100
  localparam logic [31:0] ETH_STATUS = 32'hC0DE_0001;
  assign e_rdata = (e_addr[11:0] == 12'h100) ? ETH_STATUS : 32'h0;

  initial begin
    repeat (1_000_000) @(posedge clk);
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

  // ---------------- mechanism counters ----------------
  int n_op[sha_op_e];
  int n_eth_wr = 0, n_eth_rd = 0, n_mem_rd = 0, n_mem_wr = 0, n_uart_acc = 0, n_busy_poll = 0, n_taken = 0;
  int t_start = -1, t_finish = -1, cyc = 0;
  logic [31:0] eth_words[$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_op[sha_op]++;
    if (sha_op == SHA_START && t_start < 0) t_start = cyc;
    if (sha_op == SHA_FINISH && t_finish < 0) t_finish = cyc;
    if (e_valid && e_we) begin n_eth_wr++; eth_words.push_back(e_wdata); end
    if (e_valid && !e_we) n_eth_rd++;
    if (dut.m_valid && dut.d_we) n_mem_wr++;
    if (dut.m_valid && dut.d_re) n_mem_rd++;
    if (dut.u_valid) n_uart_acc++;
    if (dut.u_valid && !dut.d_we && dut.d_addr[3:0] == 4'h4 && dut.u_rdata[0]) n_busy_poll++;
    if (dut.u_core.ctrl.br_kind == BR_COND && dut.u_core.pc_next != pc + 4) n_taken++;
  end

  // ---------------- UART line models ----------------
  logic [7:0] tx_bytes[$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_tx; end
      repeat (CPB) @(posedge clk);
      check(uart_tx == 1, "uart stop bit");
      tx_bytes.push_back(b);
    end
  end

  task automatic send_rx(input logic [7:0] b);
    @(negedge clk); uart_rx = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rx = b[i]; repeat (CPB) @(negedge clk); end
    uart_rx = 1; repeat (CPB) @(negedge clk);
  endtask

  // ---------------- program ----------------
  localparam int MSG = 'h100, OUT = 'h400, ETHST = 'h500;
  task automatic build();
    int outer, rxpoll, zl, bl, pl, rl, rdl, sw_out, sw_in, txp, el, patch;
    emit(lui(20, 'h10000));              // x20 = UART
    emit(lui(21, 'h20000));              // x21 = Ethernet
    emit(addi(1, 0, MSG));
    emit(addi(12, 0, MSG));              // write pointer
    emit(addi(7, 0, 16));                // 16 words
    outer = here();
    emit(addi(8, 0, 0));
    emit(addi(9, 0, 4));
    rxpoll = here();
    emit(lw(10, 4, 20));
    emit(andi(10, 10, 2));
    emit(beq(10, 0, rxpoll - here()));
    emit(lw(11, 0, 20));
    emit(slli(8, 8, 8));
    emit(or_(8, 8, 11));
    emit(addi(9, 9, -1));
    emit(bne(9, 0, rxpoll - here()));
    emit(sw(8, 0, 12));
    emit(addi(12, 12, 4));
    emit(addi(7, 7, -1));
    emit(bne(7, 0, outer - here()));
    // padding block for a 64-byte message
    emit(addi(13, 0, 16));
    zl = here();
    emit(sw(0, 0, 12)); emit(addi(12, 12, 4)); emit(addi(13, 13, -1)); emit(bne(13, 0, zl - here()));
    emit(lui(14, 'h80000)); emit(sw(14, 64, 1));
    emit(addi(14, 0, 512)); emit(sw(14, 124, 1));
    // hash: x1 message, x2 blocks, x3 digest
    emit(addi(2, 0, 2));
    emit(addi(3, 0, OUT));
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
    // send digest over the UART, most significant byte first
    emit(addi(3, 0, OUT));
    emit(addi(15, 0, 8));
    sw_out = here();
    emit(lw(16, 0, 3));
    emit(addi(17, 0, 4));
    sw_in = here();
    emit(srli(18, 16, 24));
    txp = here();
    emit(lw(10, 4, 20)); emit(andi(10, 10, 1)); emit(bne(10, 0, txp - here()));
    emit(sw(18, 0, 20));
    emit(slli(16, 16, 8));
    emit(addi(17, 17, -1)); emit(bne(17, 0, sw_in - here()));
    emit(addi(3, 3, 4));
    emit(addi(15, 15, -1)); emit(bne(15, 0, sw_out - here()));
    // wait for the last byte to leave
    txp = here();
    emit(lw(10, 4, 20)); emit(andi(10, 10, 1)); emit(bne(10, 0, txp - here()));
    // digest to the Ethernet interface, then read its status word
    emit(addi(3, 0, OUT)); emit(addi(22, 21, 0)); emit(addi(15, 0, 8));
    el = here();
    emit(lw(16, 0, 3)); emit(sw(16, 0, 22)); emit(addi(3, 3, 4)); emit(addi(22, 22, 4));
    emit(addi(15, 15, -1)); emit(bne(15, 0, el - here()));
    emit(lw(23, 'h100, 21));
    emit(sw(23, ETHST, 0));
    emit(jal(0, 0));
  endtask

  initial begin
    bytes_q m;
    words_q w;
    logic [255:0] exp, got;
    build();
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); ld_we = 1; ld_addr = i; ld_data = prog[i];
    end
    @(negedge clk); ld_we = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) m.push_back(8'($urandom));
    w = pad(m);
    exp = digest(w);
    foreach (m[i]) send_rx(m[i]);
    // wait for the halt loop
    do @(posedge clk); while (!(dut.u_core.instr == jal(0, 0)));
    repeat (4) @(posedge clk);

    for (int i = 0; i < 32; i++) check(dut.u_mem.mem[MSG / 4 + i] == w[i], $sformatf("message word %0d in memory", i));
    for (int i = 0; i < 8; i++) got[255 - 32*i -: 32] = dut.u_mem.mem[OUT / 4 + i];
    check(got == exp, "digest in memory");
    if (got != exp) $display("  got %h\n  exp %h", got, exp);
    check(tx_bytes.size() == 32, $sformatf("%0d bytes sent on uart", tx_bytes.size()));
    for (int i = 0; i < 32 && i < tx_bytes.size(); i++)
      check(tx_bytes[i] == exp[255 - 8*i -: 8], $sformatf("uart digest byte %0d", i));
    check(eth_words.size() == 8, "8 Ethernet writes");
    for (int i = 0; i < 8 && i < eth_words.size(); i++)
      check(eth_words[i] == exp[255 - 32*i -: 32], $sformatf("Ethernet digest word %0d", i));
    check(dut.u_mem.mem[ETHST / 4] == ETH_STATUS, "Ethernet read data reached memory");
    check(t_finish - t_start == 2 + 3 * 64, $sformatf("sha2start to sha2finish %0d cycles", t_finish - t_start));

    // mechanisms
    check(n_op[SHA_RST] == 1,         $sformatf("sha2rst %0d", n_op[SHA_RST]));
    check(n_op[SHA_PUSH] == 32,       $sformatf("sha2push %0d", n_op[SHA_PUSH]));
    check(n_op[SHA_START] == 2,       $sformatf("sha2start %0d", n_op[SHA_START]));
    check(n_op[SHA_PERFORM] == 128,   $sformatf("sha2perform %0d", n_op[SHA_PERFORM]));
    check(n_op[SHA_FINISH] == 2,      $sformatf("sha2finish %0d", n_op[SHA_FINISH]));
    check(n_op[SHA_READ] == 8,        $sformatf("sha2read %0d", n_op[SHA_READ]));
    check(n_eth_wr == 8,  $sformatf("Ethernet writes %0d", n_eth_wr));
    check(n_eth_rd == 1,  $sformatf("Ethernet reads %0d", n_eth_rd));
    check(n_mem_rd > 0 && n_mem_wr > 0, "memory interface used");
    check(n_uart_acc > 0, "UART interface used");
    check(n_busy_poll > 0, $sformatf("tx busy polls %0d", n_busy_poll));
    check(n_taken > 0, "branches taken");
    $display("mechanisms: rst=%0d push=%0d start=%0d perform=%0d finish=%0d read=%0d eth_wr=%0d eth_rd=%0d mem_rd=%0d mem_wr=%0d uart=%0d busy_polls=%0d taken=%0d cycles=%0d",
      n_op[SHA_RST], n_op[SHA_PUSH], n_op[SHA_START], n_op[SHA_PERFORM], n_op[SHA_FINISH], n_op[SHA_READ],
      n_eth_wr, n_eth_rd, n_mem_rd, n_mem_wr, n_uart_acc, n_busy_poll, n_taken, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
