// tb_input_latches: loads the four latches with random words through their
// REG strobes (sometimes several at once), holds them while other words are
// on the bus, and reads each back through its OD strobe.
`timescale 1ns/1ps
module tb_input_latches;
  logic clk = 0, rst_n = 0; logic [11:0] bus_in, lbus; logic [3:0] reg_ld, od;
  int checks = 0, failures = 0;
  logic [11:0] model [4];
  always #5 clk = ~clk;
  input_latches dut (.clk, .rst_n, .bus_in, .reg_ld, .od, .lbus);
  initial begin
    reg_ld = 0; od = 0; bus_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin od = 4'(1 << i); #1; checks++; if (lbus != 0) failures++; end
    foreach (model[i]) model[i] = 0;
    for (int t = 0; t < 400; t++) begin
      bus_in = 12'($urandom); reg_ld = 4'($urandom);
      od = 4'(1 << $urandom_range(3));
      #1;
      checks++;
      begin
        automatic int l = 0;
        for (int i = 0; i < 4; i++) if (od[i]) l = i;
        if (lbus != model[l]) begin failures++; $display("FAIL t=%0d latch %0d = %h exp %h", t, l, lbus, model[l]); end
      end
      @(negedge clk);
      for (int i = 0; i < 4; i++) if (reg_ld[i]) model[i] = bus_in;
    end
    od = 0; #1; checks++; if (lbus != 0) begin failures++; $display("FAIL: idle bus not 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
