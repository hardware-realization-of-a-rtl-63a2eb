// tb_io_port: random producer and consumer on the one-word port, checked
// against a model: full flag, data handed over in order, loss and sticky
// overrun on a write to a full port, and clearing by clr.
`timescale 1ns/1ps
module tb_io_port;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0, full, overrun;
  logic [23:0] din = 0, dout;
  int checks = 0, failures = 0, ovr_events = 0;
  logic m_full = 0, m_ovr = 0; logic [23:0] m_data = 0;
  always #5 clk = ~clk;
  io_port #(.W(24)) dut (.clk, .rst_n, .clr, .wr, .din, .rd, .full, .dout, .overrun);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      wr = ($urandom_range(2) == 0); din = 24'($urandom);
      rd = full && ($urandom_range(2) == 0);
      clr = (t % 700 == 699);
      @(negedge clk);
      if (clr) begin m_full = 0; m_ovr = 0; end
      else begin
        if (wr && m_full && !rd) begin m_ovr = 1; ovr_events++; end
        if (wr && (!m_full || rd)) begin m_data = din; m_full = 1; end
        else if (rd) m_full = 0;
      end
      checks++;
      if (full != m_full || overrun != m_ovr || (m_full && dout != m_data)) begin
        failures++; if (failures < 5) $display("FAIL t=%0d full=%0b ovr=%0b dout=%h exp %0b %0b %h", t, full, overrun, dout, m_full, m_ovr, m_data);
      end
    end
    checks++; if (ovr_events == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
