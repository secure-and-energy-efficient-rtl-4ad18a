// tb_rdata_mux: random read data on the three inputs, every select value,
// output compared with the expected source (zero for no device).
module tb_rdata_mux;
  import rv_pkg::*;
  dev_sel_e sel;
  logic [31:0] m_rdata, u_rdata, e_rdata, rdata, exp;
  int checks = 0, failures = 0;

  rdata_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      m_rdata = $urandom; u_rdata = $urandom; e_rdata = $urandom;
      sel = dev_sel_e'(n % 4); #1;
      exp = (n % 4 == 1) ? m_rdata : (n % 4 == 2) ? u_rdata : (n % 4 == 3) ? e_rdata : 32'h0;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL sel=%0d", n % 4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
