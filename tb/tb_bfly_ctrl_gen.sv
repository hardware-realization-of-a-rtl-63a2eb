// tb_bfly_ctrl_gen: executes the 64-word butterfly program symbolically and
// checks that it implements the four butterfly equations.  Reads fill a
// model of the four latches; each CLK IN takes the OD-selected latch and the
// coefficient named by the word; each CLK OUT adds or subtracts the pending
// product (ACC clears first); each write records which sum went to which
// node and page.  The recorded sums must be
//   X1' = X1 + X2 c + Y2 s, Y1' = Y1 - X2 s + Y2 c,
//   X2' = X1 - X2 c - Y2 s, Y2' = Y1 + X2 s - Y2 c.
// Sums are held as signed counts per (operand, coefficient) term.
`timescale 1ns/1ps
module tb_bfly_ctrl_gen;
  import fft_pkg::*;
  logic [5:0] cyc; bfly_ctrl_t ctrl;
  int checks = 0, failures = 0;
  bfly_ctrl_gen dut (.cyc, .ctrl);

  // term index: operand (0 X1, 1 Y1, 2 X2, 3 Y2) * 3 + coefficient (0 one, 1 cos, 2 sin)
  typedef int sum_t [12];
  sum_t acc_s, written [4];   // written[node*2 + page]
  int   lat_src [4];          // which operand each latch holds
  int   xsrc, csrc, pend_op, pend_cf;
  int   nwrites, nreads;

  function automatic sum_t expect_sum(int out);
    sum_t e;
    foreach (e[i]) e[i] = 0;
    case (out)
      0: begin e[0*3+0] = 1;  e[2*3+1] = 1;  e[3*3+2] = 1;  end
      1: begin e[1*3+0] = 1;  e[2*3+2] = -1; e[3*3+1] = 1;  end
      2: begin e[0*3+0] = 1;  e[2*3+1] = -1; e[3*3+2] = -1; end
      default: begin e[1*3+0] = 1; e[2*3+2] = 1; e[3*3+1] = -1; end
    endcase
    return e;
  endfunction

  initial begin
    foreach (acc_s[i]) acc_s[i] = 0;
    foreach (lat_src[i]) lat_src[i] = -1;
    pend_op = -1; pend_cf = -1; nwrites = 0; nreads = 0;
    for (int c = 0; c < 64; c++) begin
      cyc = 6'(c); #1;
      checks++;
      if ($countones(ctrl.od) > 1 || (ctrl.mem_rd && ctrl.mem_wr)) begin failures++; $display("FAIL c=%0d: bus conflict", c); end
      // CLK OUT uses the product loaded by the previous CLK IN
      if (ctrl.clk_out) begin
        if (!ctrl.acc) foreach (acc_s[i]) acc_s[i] = 0;
        if (pend_op >= 0) acc_s[pend_op * 3 + pend_cf] += ctrl.sub ? -1 : 1;
      end
      if (ctrl.clk_in) begin
        automatic int l = -1;
        for (int i = 0; i < 4; i++) if (ctrl.od[i]) l = i;
        pend_op = (l >= 0) ? lat_src[l] : -1;
        pend_cf = ctrl.tw_unit ? 0 : (ctrl.tw_sel == TW_COS ? 1 : 2);
      end
      if (ctrl.mem_rd) begin
        for (int i = 0; i < 4; i++) if (ctrl.reg_ld[i]) lat_src[i] = 2 * ctrl.node_bot + ctrl.page_im;
        nreads++;
      end
      if (ctrl.mem_wr) begin
        written[2 * ctrl.node_bot + ctrl.page_im] = acc_s;
        nwrites++;
      end
    end
    checks += 2;
    if (nreads != 4) begin failures++; $display("FAIL: %0d reads", nreads); end
    if (nwrites != 4) begin failures++; $display("FAIL: %0d writes", nwrites); end
    // latch mapping of the published figure: REG1 X2, REG2 Y2, REG3 X1, REG4 Y1
    checks++;
    if (lat_src[0] != 2 || lat_src[1] != 3 || lat_src[2] != 0 || lat_src[3] != 1) begin
      failures++; $display("FAIL: latch assignment %0d %0d %0d %0d", lat_src[0], lat_src[1], lat_src[2], lat_src[3]);
    end
    for (int o = 0; o < 4; o++) begin
      automatic sum_t e = expect_sum(o);
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (written[o][i] != e[i]) begin failures++; $display("FAIL: output %0d term %0d = %0d exp %0d", o, i, written[o][i], e[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
