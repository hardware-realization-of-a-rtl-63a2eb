// tb_arithmetic_unit: drives three-term sums through the arithmetic unit with
// every coefficient mode: unity "01" (0.5), "10" (1.0), twiddle codes
// (t / 256) and none, and compares the 12-bit result with
// floor(sum / 1024) saturated to 12 bits.  Also checks the bit layout of the
// Y latch for a few codes and that saturation is flagged.
`timescale 1ns/1ps
module tb_arithmetic_unit;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, clk_in = 0, acc = 0, sub = 0, clk_out = 0;
  logic [11:0] xin, result; logic [7:0] tw; coef_sel_t coef_sel; logic sat;
  int checks = 0, failures = 0, sats = 0;
  always #5 clk = ~clk;
  arithmetic_unit dut (.clk, .rst_n, .xin, .clk_in, .coef_sel, .tw, .acc, .sub, .clk_out, .result, .sat);

  function automatic longint coef_val(coef_sel_t c, logic [7:0] t);
    case (c)
      COEF_ONE: return 512;
      COEF_TWO: return 1024;
      COEF_TW:  return 4 * longint'($signed(t));
      default:  return 0;
    endcase
  endfunction

  initial begin
    xin = 0; tw = 0; coef_sel = COEF_NONE;
    repeat (2) @(negedge clk); rst_n = 1;
    // Y latch layout
    @(negedge clk); coef_sel = COEF_ONE; clk_in = 1; @(negedge clk); clk_in = 0;
    checks++; if (dut.y_lat != 12'b001000000000) begin failures++; $display("FAIL: '01' -> %b", dut.y_lat); end
    coef_sel = COEF_TWO; clk_in = 1; @(negedge clk); clk_in = 0;
    checks++; if (dut.y_lat != 12'b010000000000) begin failures++; $display("FAIL: '10' -> %b", dut.y_lat); end
    coef_sel = COEF_TW; tw = 8'h81; clk_in = 1; @(negedge clk); clk_in = 0;
    checks++; if (dut.y_lat != 12'b111000000100) begin failures++; $display("FAIL: tw 81 -> %b", dut.y_lat); end
    coef_sel = COEF_ONE; tw = 8'h7f; clk_in = 1; @(negedge clk); clk_in = 0;
    checks++; if (dut.y_lat != 12'b001000000000) begin failures++; $display("FAIL: AND gate open in unity mode"); end

    for (int t = 0; t < 600; t++) begin
      automatic longint sum = 0, q;
      int e;
      for (int k = 0; k < 3; k++) begin
        automatic logic [11:0] xv = (t % 40 == 0) ? 12'h800 : 12'($urandom);
        automatic coef_sel_t cs = coef_sel_t'($urandom_range(3));
        automatic logic [7:0] tv = 8'($urandom);
        automatic bit sb = $urandom_range(1);
        xin = xv; coef_sel = cs; tw = tv; clk_in = 1;
        acc = (k != 0); // applied with the clk_out of the previous term below
        @(negedge clk);
        clk_in = 0; clk_out = 1; acc = (k != 0); sub = sb;
        @(negedge clk);
        clk_out = 0;
        sum += (sb ? -1 : 1) * longint'($signed(xv)) * coef_val(cs, tv);
      end
      q = sum >>> 10;
      e = (q > 2047) ? 2047 : (q < -2048) ? -2048 : int'(q);
      checks++;
      if (int'($signed(result)) != e || sat != (q > 2047 || q < -2048)) begin
        failures++; if (failures < 5) $display("FAIL t=%0d result=%0d sat=%0b exp %0d", t, $signed(result), sat, e);
      end
      sats += sat;
    end
    checks++; if (sats == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("saturated results: %0d", sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
