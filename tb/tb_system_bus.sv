// tb_system_bus: random requests from all four masters; for each owner the
// memory side must show exactly that master's address, write strobe and
// data.
`timescale 1ns/1ps
module tb_system_bus;
  import fft_pkg::*;
  bus_owner_t grant; logic [3:0][10:0] m_addr; logic [3:0] m_we; logic [3:0][15:0] m_wdata;
  logic [10:0] addr; logic we; logic [15:0] wdata;
  int checks = 0, failures = 0;
  system_bus dut (.grant, .m_addr, .m_we, .m_wdata, .addr, .we, .wdata);
  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 4; i++) begin m_addr[i] = 11'($urandom); m_wdata[i] = 16'($urandom); end
      m_we = 4'($urandom); grant = bus_owner_t'($urandom_range(3));
      #1;
      checks++;
      if (addr != m_addr[grant] || we != m_we[grant] || wdata != m_wdata[grant]) begin
        failures++; if (failures < 5) $display("FAIL owner %0d", grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
