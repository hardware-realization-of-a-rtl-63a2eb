// tb_data_memory: writes random words at random addresses of both pages,
// keeps a model, and checks asynchronous reads of every address, including
// that the real and imaginary page of one word address are independent.
`timescale 1ns/1ps
module tb_data_memory;
  localparam int L = 10;
  logic clk = 0; logic [L:0] addr; logic we; logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [2 << L];
  always #5 clk = ~clk;
  data_memory dut (.clk, .addr, .we, .wdata, .rdata);
  initial begin
    we = 0; addr = 0; wdata = 0;
    foreach (model[i]) model[i] = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      addr = (L+1)'($urandom); wdata = 16'($urandom); we = $urandom_range(1);
      #1;
      checks++;
      if (rdata != model[addr]) begin failures++; if (failures < 5) $display("FAIL read %0d = %h exp %h", addr, rdata, model[addr]); end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
    end
    we = 0;
    // same word address in both pages
    @(negedge clk); addr = 11'h005; wdata = 16'h1234; we = 1;
    @(negedge clk); addr = 11'h405; wdata = 16'hbeef;
    @(negedge clk); we = 0; addr = 11'h005; #1;
    checks++; if (rdata != 16'h1234) begin failures++; $display("FAIL: page 0 overwritten"); end
    addr = 11'h405; #1;
    checks++; if (rdata != 16'hbeef) begin failures++; $display("FAIL: page 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
