// tb_counter_chain: checks the counter chain at a reduced size (16 points,
// 8-clock frame): the phase, butterfly and stage sequence of a whole run
// against a software counter, the exact run length and the done pulse.
`timescale 1ns/1ps
module tb_counter_chain;
  localparam int L = 4, CW = 3;
  logic clk = 0, rst_n = 0, start = 0;
  logic [CW-1:0] cyc; logic [L-2:0] bfly; logic [3:0] stage; logic busy, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  counter_chain #(.LOG2N(L), .CYC_W(CW)) dut (.clk, .rst_n, .start, .cyc, .bfly, .stage, .busy, .done);

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int total;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); chk(!busy && !done, "idle after reset");
    start = 1; @(negedge clk); start = 0;
    total = L * (1 << (L - 1)) * (1 << CW);
    for (int t = 0; t < total; t++) begin
      automatic int e_cyc = t % (1 << CW);
      automatic int e_bf  = (t >> CW) % (1 << (L - 1));
      automatic int e_st  = t >> (CW + L - 1);
      chk(busy && !done && cyc == e_cyc && bfly == e_bf && stage == e_st,
          $sformatf("t=%0d cyc=%0d bfly=%0d stage=%0d busy=%0b", t, cyc, bfly, stage, busy));
      @(negedge clk);
    end
    chk(done && !busy, "done pulse after last clock");
    @(negedge clk); chk(!done && !busy, "done lasts one clock");
    // restart mid-run
    start = 1; @(negedge clk); start = 0;
    repeat (37) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    chk(busy && cyc == 0 && bfly == 0 && stage == 0, "restart clears chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
