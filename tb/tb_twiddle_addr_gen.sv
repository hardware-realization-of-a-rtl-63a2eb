// tb_twiddle_addr_gen: checks the twiddle exponent of every butterfly of a
// 1024-point transform: p = (b mod 2**s) * N / 2**(s+1).
`timescale 1ns/1ps
module tb_twiddle_addr_gen;
  localparam int L = 10, N = 1 << L;
  logic [3:0] stage; logic [L-2:0] bfly; logic [L-2:0] p;
  int checks = 0, failures = 0;
  twiddle_addr_gen #(.LOG2N(L)) dut (.stage, .bfly, .p);
  initial begin
    for (int s = 0; s < L; s++)
      for (int b = 0; b < N / 2; b++) begin
        automatic int e = (b % (1 << s)) * (N / (1 << (s + 1)));
        stage = 4'(s); bfly = (L-1)'(b); #1;
        checks++;
        if (p != e) begin failures++; if (failures < 5) $display("FAIL s=%0d b=%0d p=%0d exp %0d", s, b, p, e); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
