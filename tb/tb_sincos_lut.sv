// tb_sincos_lut: checks all 512 entries of the 1024-point sin/cos table:
// each code is within half an LSB of 128 cos / 128 sin, values of +1 come out
// as the unity flag with code 0, and the flag appears exactly where
// 128 cos or 128 sin rounds to 128.
`timescale 1ns/1ps
module tb_sincos_lut;
  localparam int L = 10, N = 1 << L;
  logic [L-2:0] p; logic [7:0] cos_v, sin_v; logic cos_one, sin_one;
  int checks = 0, failures = 0, ones = 0;
  sincos_lut #(.LOG2N(L)) dut (.p, .cos_v, .sin_v, .cos_one, .sin_one);

  function automatic bit ok(real v, logic [7:0] code, logic one);
    real s = v * 128.0;
    if (s >= 127.5) return one && code == 0;
    if (one) return 0;
    return ($itor($signed(code)) - s <= 0.5) && (s - $itor($signed(code)) <= 0.5);
  endfunction

  initial begin
    for (int i = 0; i < N / 2; i++) begin
      automatic real th = 2.0 * 3.14159265358979323846 * i / N;
      p = (L-1)'(i); #1;
      checks += 2;
      if (!ok($cos(th), cos_v, cos_one)) begin failures++; $display("FAIL cos p=%0d code=%0d one=%0b", i, $signed(cos_v), cos_one); end
      if (!ok($sin(th), sin_v, sin_one)) begin failures++; $display("FAIL sin p=%0d code=%0d one=%0b", i, $signed(sin_v), sin_one); end
      ones += cos_one + sin_one;
    end
    p = 0; #1; checks++; if (!cos_one || sin_v != 0 || sin_one) begin failures++; $display("FAIL: W^0"); end
    p = 256; #1; checks++; if (!sin_one || cos_v != 0) begin failures++; $display("FAIL: W^256"); end
    checks++; if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
