// tb_mem_addr_gen: checks the node addresses of every butterfly of every stage
// of a 1024-point transform against k = group * 2**(s+1) + offset and
// k + 2**s, and that each stage touches every word exactly once.
`timescale 1ns/1ps
module tb_mem_addr_gen;
  localparam int L = 10, N = 1 << L;
  logic [3:0] stage; logic [L-2:0] bfly; logic [L-1:0] addr_top, addr_bot;
  int checks = 0, failures = 0;
  mem_addr_gen #(.LOG2N(L)) dut (.stage, .bfly, .addr_top, .addr_bot);
  initial begin
    for (int s = 0; s < L; s++) begin
      bit seen [N];
      for (int i = 0; i < N; i++) seen[i] = 0;
      for (int b = 0; b < N / 2; b++) begin
        automatic int h = 1 << s, k;
        k = (b / h) * 2 * h + (b % h);
        stage = 4'(s); bfly = (L-1)'(b); #1;
        checks++;
        if (addr_top != k || addr_bot != k + h) begin
          failures++;
          if (failures < 5) $display("FAIL s=%0d b=%0d: %0d/%0d exp %0d/%0d", s, b, addr_top, addr_bot, k, k + h);
        end
        seen[addr_top] = 1; seen[addr_bot] = 1;
      end
      checks++;
      foreach (seen[i]) if (!seen[i]) begin failures++; $display("FAIL: stage %0d misses word %0d", s, i); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
