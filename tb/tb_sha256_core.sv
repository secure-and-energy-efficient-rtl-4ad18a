// tb_sha256_core: self-checking test of the SHA-256 engine on its own.
// Drives the operation sequence the processor issues (rst, 16 push, start,
// 64 perform, finish per block, then 8 reads) and compares the digest with
// published test vectors ("abc", the 56-byte two-block vector) and with the
// reference model for random messages of 1 to 4 blocks. Also checks that each
// operation takes one cycle (round counter after each perform), that the
// counter stops at 64, and that rst restarts a stream.
module tb_sha256_core;
  import rv_pkg::*;
  import sha256_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  sha_op_e op = SHA_NONE;
  logic [31:0] wdata = '0, rdata;
  logic [2:0] rd_idx = '0;
  logic [6:0] round;
  int checks = 0, failures = 0;

  sha256_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input sha_op_e o, input logic [31:0] d = '0);
    op = o; wdata = d;
    @(posedge clk); #1;
    op = SHA_NONE;
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hash_and_check(input words_q w, input logic [255:0] exp, input string name);
    logic [255:0] got;
    step(SHA_RST);
    for (int b = 0; b < w.size() / 16; b++) begin
      for (int i = 0; i < 16; i++) step(SHA_PUSH, w[16*b + i]);
      step(SHA_START);
      check(round == 0, {name, ": round count cleared by start"});
      for (int t = 0; t < 64; t++) begin
        step(SHA_PERFORM);
        if (t == 0 || t == 63) check(round == 7'(t + 1), {name, ": one round per cycle"});
      end
      step(SHA_FINISH);
    end
    for (int i = 0; i < 8; i++) begin
      rd_idx = 3'(i); #1;
      got[255 - 32*i -: 32] = rdata;
    end
    check(got == exp, {name, ": digest"});
    if (got != exp) $display("  got %h\n  exp %h", got, exp);
  endtask

  initial begin
    words_q w;
    bytes_q m;
    #12 rst_n = 1;
    @(posedge clk); #1;
    // After reset H holds the initial hash value
    rd_idx = 0; #1; check(rdata == 32'h6a09e667, "H0 after reset");
    rd_idx = 7; #1; check(rdata == 32'h5be0cd19, "H7 after reset");

    hash_and_check(pad(str_bytes("abc")),
      256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc");
    hash_and_check(pad(str_bytes("abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq")),
      256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, "two-block");
    hash_and_check(pad(str_bytes("")),
      256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, "empty");
    for (int n = 0; n < 6; n++) begin
      m = {};
      for (int i = 0; i < 20 + n * 41; i++) m.push_back(8'($urandom));
      w = pad(m);
      hash_and_check(w, digest(w), $sformatf("random %0d bytes", m.size()));
    end

    // Round counter saturates at 64
    step(SHA_START);
    for (int t = 0; t < 70; t++) step(SHA_PERFORM);
    check(round == 64, "round counter stops at 64");
    // rst restores the initial value
    step(SHA_FINISH);
    step(SHA_RST);
    rd_idx = 3; #1; check(rdata == 32'ha54ff53a, "H3 after sha2rst");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
