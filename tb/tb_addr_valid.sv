// tb_addr_valid: sweeps the address regions with and without a request and
// checks the valid lines and the select against the platform memory map
// (0x0 memory, 0x1 UART, 0x2 Ethernet, others none).
module tb_addr_valid;
  import rv_pkg::*;
  logic [31:0] addr;
  logic req, m_valid, u_valid, e_valid;
  dev_sel_e sel;
  int checks = 0, failures = 0;

  addr_valid dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      automatic logic [3:0] reg_ = 4'(n % 16);
      dev_sel_e es;
      addr = {reg_, 28'($urandom)}; req = $urandom_range(1); #1;
      es = (reg_ == 0) ? DEV_MEM : (reg_ == 1) ? DEV_UART : (reg_ == 2) ? DEV_ETH : DEV_NONE;
      checks++;
      if (sel !== es || m_valid !== (req && reg_ == 0) || u_valid !== (req && reg_ == 1) || e_valid !== (req && reg_ == 2)) begin
        failures++; $display("FAIL addr=%h req=%b", addr, req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
