// tb_mac_unit: random sequences of load / accumulate / subtract / hold on the
// multiplier-accumulator, compared with 64-bit integer arithmetic, including
// the extreme operands -2048 x -2048.
`timescale 1ns/1ps
module tb_mac_unit;
  logic clk = 0, rst_n = 0; logic signed [11:0] x, y; logic acc, sub, clk_out; logic signed [26:0] p;
  int checks = 0, failures = 0;
  longint model = 0;
  always #5 clk = ~clk;
  mac_unit dut (.clk, .rst_n, .x, .y, .acc, .sub, .clk_out, .p);
  initial begin
    x = 0; y = 0; acc = 0; sub = 0; clk_out = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      if (t % 50 == 0) begin x = -2048; y = -2048; end
      else begin x = 12'($urandom); y = 12'($urandom); end
      acc = (t % 4 != 0); sub = $urandom_range(1); clk_out = ($urandom_range(7) != 0);
      @(negedge clk);
      if (clk_out) model = (acc ? model : 0) + (sub ? -1 : 1) * longint'(x) * longint'(y);
      checks++;
      if (longint'(p) != model) begin failures++; if (failures < 5) $display("FAIL t=%0d p=%0d exp %0d", t, p, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
