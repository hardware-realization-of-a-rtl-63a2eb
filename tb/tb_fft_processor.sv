// tb_fft_processor: self-checking test of the sequential FFT processor at its
// default size (1024 points, 12-bit data, 64 clocks per butterfly).
//
// Two records are loaded into a data memory in bit-reversed order: random
// full-range complex data, then two real tones (one per page).  After each
// transform every word is compared with
//   - a bit-exact fixed-point model of the butterfly written here from the
//     butterfly equations (coefficients: unity 0.5, twiddles round(128 cos),
//     round(128 sin) halved, truncation and saturation to 12 bits), and
//   - for the tone record, a double-precision DFT divided by N, within a
//     tolerance of a few LSBs.
// The run length must be exactly LOG2N * N/2 * 64 clocks, and the unity
// twiddle substitution must have happened.
`timescale 1ns/1ps
module tb_fft_processor;
  localparam int L  = 10;
  localparam int N  = 1 << L;
  localparam int DW = 12;
  localparam int MW = 16;
  localparam longint EXP_CYCLES = longint'(L) * (N / 2) * 64;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, mem_we, unit_coef_used, sat_event;
  logic [L:0]    p_addr, t_addr, m_addr;
  logic [MW-1:0] p_wdata, t_wdata, m_wdata, m_rdata;
  logic          t_we, m_we_mux;

  int checks = 0, failures = 0;
  int unit_seen = 0;

  always #40 clk = ~clk;   // 12.5 MHz

  fft_processor dut (
    .clk, .rst_n, .start, .busy, .done,
    .mem_addr(p_addr), .mem_we, .mem_wdata(p_wdata), .mem_rdata(m_rdata),
    .unit_coef_used, .sat_event
  );

  assign m_addr   = busy ? p_addr  : t_addr;
  assign m_we_mux = busy ? mem_we  : t_we;
  assign m_wdata  = busy ? p_wdata : t_wdata;

  data_memory #(.LOG2N(L), .MW(MW)) u_mem (
    .clk, .addr(m_addr), .we(m_we_mux), .wdata(m_wdata), .rdata(m_rdata)
  );

  always @(posedge clk) if (rst_n && unit_coef_used) unit_seen++;

  // ---------------- reference models ----------------
  int gre [N], gim [N];     // golden fixed-point, natural index = memory word
  real xr [N], xi [N];      // natural-order input for the DFT

  function automatic int brev(int a);
    int r = 0;
    for (int i = 0; i < L; i++) if (a & (1 << i)) r |= 1 << (L - 1 - i);
    return r;
  endfunction

  function automatic int q8(real v, output bit one);
    real s = v * 128.0;
    int q = (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
    one = (q >= 128);
    return one ? 0 : q;
  endfunction

  function automatic int sat12(longint a);
    longint q = a >>> 10;
    if (q > 2047)  return 2047;
    if (q < -2048) return -2048;
    return int'(q);
  endfunction

  task automatic golden_fft();
    for (int s = 0; s < L; s++) begin
      int h = 1 << s;
      for (int b = 0; b < N / 2; b++) begin
        int j = b % h, g = b / h;
        int k = g * 2 * h + j, k2 = k + h;
        int p = j << (L - 1 - s);
        bit co, so;
        int c = q8($cos(2.0 * 3.14159265358979323846 * p / N), co);
        int sn = q8($sin(2.0 * 3.14159265358979323846 * p / N), so);
        longint cy = co ? 512 : c * 4;
        longint sy = so ? 512 : sn * 4;
        longint x1 = gre[k], y1 = gim[k], x2 = gre[k2], y2 = gim[k2];
        gre[k]  = sat12(x1 * 512 + x2 * cy + y2 * sy);
        gim[k]  = sat12(y1 * 512 - x2 * sy + y2 * cy);
        gre[k2] = sat12(x1 * 512 - x2 * cy - y2 * sy);
        gim[k2] = sat12(y1 * 512 + x2 * sy - y2 * cy);
      end
    end
  endtask

  // ---------------- memory access by the testbench ----------------
  task automatic mem_write(int a, int v);
    @(negedge clk);
    t_addr = (L+1)'(a); t_wdata = MW'(v); t_we = 1'b1;
    @(negedge clk);
    t_we = 1'b0;
  endtask

  function automatic int mem_read(int a);
    return int'($signed(u_mem.mem[a][DW-1:0]));
  endfunction

  task automatic load(input int re [N], input int im [N]);
    for (int n = 0; n < N; n++) begin
      xr[n] = re[n]; xi[n] = im[n];
      mem_write(brev(n), re[n]);
      mem_write(N + brev(n), im[n]);
      gre[brev(n)] = re[n]; gim[brev(n)] = im[n];
    end
  endtask

  task automatic run_and_time();
    longint cnt = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin @(negedge clk); cnt++; end
    checks++;
    // busy rose one clock after start; done follows the last busy clock
    if (cnt != EXP_CYCLES) begin
      failures++;
      $display("FAIL: transform took %0d clocks, expected %0d", cnt, EXP_CYCLES);
    end
  endtask

  task automatic compare_golden(string tag);
    int bad = 0;
    golden_fft();
    for (int k = 0; k < N; k++) begin
      int r = mem_read(k), i = mem_read(N + k);
      checks += 2;
      if (r != gre[k]) begin bad++; if (bad < 5) $display("FAIL %s: re[%0d]=%0d exp %0d", tag, k, r, gre[k]); end
      if (i != gim[k]) begin bad++; if (bad < 5) $display("FAIL %s: im[%0d]=%0d exp %0d", tag, k, i, gim[k]); end
    end
    failures += bad;
  endtask

  task automatic compare_dft(real tol);
    real maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < N; n++) begin
        real th = 2.0 * 3.14159265358979323846 * ((k * n) % N) / N;
        sr += xr[n] * $cos(th) + xi[n] * $sin(th);
        si += xi[n] * $cos(th) - xr[n] * $sin(th);
      end
      sr /= N; si /= N;
      begin
        real er = sr - mem_read(k), ei = si - mem_read(N + k);
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > maxerr) maxerr = er;
        if (ei > maxerr) maxerr = ei;
      end
    end
    checks++;
    $display("DFT comparison: largest error %0.2f LSB", maxerr);
    if (maxerr > tol) begin failures++; $display("FAIL: DFT error above %0.1f LSB", tol); end
  endtask

  int re_in [N], im_in [N];

  initial begin
    t_addr = '0; t_wdata = '0; t_we = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: random full-range complex record
    for (int n = 0; n < N; n++) begin
      re_in[n] = int'($urandom_range(4095)) - 2048;
      im_in[n] = int'($urandom_range(4095)) - 2048;
    end
    load(re_in, im_in);
    run_and_time();
    compare_golden("random");

    // 2: two real tones, one per page (bins 102 and 338)
    for (int n = 0; n < N; n++) begin
      re_in[n] = $rtoi(1500.0 * $cos(2.0 * 3.14159265358979323846 * 102 * n / N));
      im_in[n] = $rtoi(1200.0 * $sin(2.0 * 3.14159265358979323846 * 338 * n / N));
    end
    load(re_in, im_in);
    run_and_time();
    compare_golden("tones");
    compare_dft(8.0);

    checks++;
    if (unit_seen == 0) begin failures++; $display("FAIL: unity twiddle never used"); end
    $display("unity twiddle substitutions: %0d", unit_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
