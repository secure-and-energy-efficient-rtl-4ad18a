// tb_uart_if: tests the memory-mapped UART with 8 clocks per bit.
// Transmit: bytes written to register 0 are decoded from the tx pin by a
// serial receiver in the testbench, which also checks the frame timing
// (start bit, 8 data bits LSB first, stop bit, CPB cycles each) and the busy
// flag. Receive: the testbench sends frames on rx and reads them back through
// the registers, including the valid flag cleared by a read, overrun on an
// unread byte, and a short low glitch that must not start a frame.
module tb_uart_if;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, valid = 0, we = 0, tx, rx = 1;
  logic [3:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] rx_seen [$];

  uart_if #(.CLKS_PER_BIT(CPB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); valid = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); valid = 0; we = 0;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); valid = 1; we = 0; addr = a; #1; d = rdata;
    @(negedge clk); valid = 0;
  endtask

  // Serial decoder on tx: waits for the falling edge of the start bit,
  // samples each bit in its middle and checks the line holds for the bit time
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge tx);
      repeat (CPB / 2) @(posedge clk);
      check(tx == 0, "tx start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = tx;
      end
      repeat (CPB) @(posedge clk);
      check(tx == 1, "tx stop bit");
      rx_seen.push_back(b);
    end
  end

  task automatic send_rx(input logic [7:0] b);
    @(negedge clk); rx = 0;
    repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(negedge clk); end
    rx = 1; repeat (CPB) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    logic [7:0] sent [$];
    int t0;
    repeat (3) @(negedge clk); rst_n = 1;
    check(tx == 1, "tx idle high");
    // ---- transmit ----
    for (int n = 0; n < 6; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      bus_write(0, {24'hABCDEF, b}); sent.push_back(b);
      bus_read(4, d); check(d[0] == 1, "busy during frame");
      bus_write(0, 32'h55);             // ignored while busy
      t0 = 0;
      do begin bus_read(4, d); t0 += 2; end while (d[0]);
      check(t0 >= 10 * CPB - 6 && t0 <= 10 * CPB + 4, $sformatf("frame length %0d cycles", t0));
    end
    repeat (2 * CPB) @(posedge clk);
    check(rx_seen.size() == sent.size(), "number of frames on tx");
    foreach (sent[i]) check(i < rx_seen.size() && rx_seen[i] == sent[i], $sformatf("tx byte %0d", i));

    // ---- receive ----
    bus_read(4, d); check(d[1] == 0, "no rx byte after reset");
    for (int n = 0; n < 5; n++) begin
      automatic logic [7:0] b = 8'($urandom);
      send_rx(b);
      bus_read(4, d); check(d[1] == 1, "rx valid after frame");
      bus_read(0, d); check(d[7:0] == b, $sformatf("rx byte %h got %h", b, d[7:0]));
      bus_read(4, d); check(d[1] == 0, "rx valid cleared by read");
    end
    // glitch of 2 cycles must not start a frame
    @(negedge clk); rx = 0; repeat (2) @(negedge clk); rx = 1;
    repeat (20 * CPB) @(negedge clk);
    bus_read(4, d); check(d[1] == 0, "glitch rejected");
    // overrun
    send_rx(8'h11); send_rx(8'h22);
    bus_read(4, d); check(d[2] == 1 && d[1] == 1, "overrun flagged");
    bus_read(0, d); check(d[7:0] == 8'h22, "newest byte kept");
    bus_write(4, 0);
    bus_read(4, d); check(d[2] == 0, "overrun cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
