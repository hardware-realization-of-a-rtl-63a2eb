// tb_fft_system: end-to-end test of the whole system at its default size
// (1024 points, 12-bit data, 12.5 MHz clock), three processing cycles:
//   1. two real signals at once, sampled at 10 kHz in real time (one sample
//      every 1250 clocks): a 1 kHz sine in the real channel and a 3.3 kHz
//      sine in the imaginary channel;
//   2. a 200 Hz square wave and a linear FM sweep (3.5 kHz centre, 250 Hz
//      band, noise at 10 dB SNR), delivered fast, starting with a burst of
//      three samples whose third is lost (DAU port overrun);
//   3. a record built so that the second-stage butterflies overflow and the
//      processor saturates.
// For each cycle the displayed {bin, magnitude} stream, taken with a display
// that is busy at random, is compared with a bit-exact fixed-point model of
// the transform written here (butterfly equations, 8-bit rounded twiddles,
// halving per stage, truncation and saturation) followed by L + floor(3S/8).
// Also checked: host writes and reads through the bus while idle, the
// transform phase length (10 * 512 * 64 clocks), spectral peaks of cycle 1 at
// the tone bins, and that every mechanism happened: host access,
// acquisition, overrun, unity twiddle substitution, saturation, display
// stall, and all four bus phases.
`timescale 1ns/1ps
module tb_fft_system;
  localparam int L  = 10;
  localparam int N  = 1 << L;
  localparam real PI = 3.14159265358979323846;
  localparam int FFT_CLOCKS = L * (N / 2) * 64;

  logic clk = 0, rst_n = 0, start = 0, smp_valid = 0, host_we = 0, disp_ready = 0;
  logic [11:0] smp_re = 0, smp_im = 0;
  logic [L:0]  host_addr = 0;
  logic [15:0] host_wdata = 0, host_rdata;
  logic disp_valid, busy, done, overrun, fft_unit_coef, fft_sat, mag_stall;
  logic [L-1:0] disp_index; logic [11:0] disp_mag; logic [1:0] phase;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_host = 0, n_overrun = 0, n_unit = 0, n_sat = 0, n_stall = 0;
  int n_phase [4];

  always #40 clk = ~clk;

  fft_system dut (
    .clk, .rst_n, .start, .smp_valid, .smp_re, .smp_im,
    .host_addr, .host_we, .host_wdata, .host_rdata,
    .disp_valid, .disp_ready, .disp_index, .disp_mag,
    .phase, .busy, .done, .overrun, .fft_unit_coef, .fft_sat, .mag_stall
  );

  // ---------------- golden model ----------------
  int gre [N], gim [N];
  int disp_got [N];
  int fft_len;

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
        int c = q8($cos(2.0 * PI * p / N), co);
        int sn = q8($sin(2.0 * PI * p / N), so);
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

  function automatic int mag(int r, int i);
    int a = (r < 0) ? -r : r, b = (i < 0) ? -i : i;
    return (a > b) ? a + (3 * b) / 8 : b + (3 * a) / 8;
  endfunction

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n) begin
    n_phase[phase]++;
    if (fft_unit_coef) n_unit++;
    if (fft_sat) n_sat++;
    if (mag_stall) n_stall++;
    if (phase == 2) fft_len++;
  end

  // display: random readiness, records what it takes
  int n_disp;
  always @(negedge clk) disp_ready <= ($urandom_range(3) == 0);
  always @(posedge clk) if (rst_n && disp_valid && disp_ready) begin
    if (disp_index != n_disp[L-1:0]) begin failures++; $display("FAIL: display bin %0d out of order (expected %0d)", disp_index, n_disp); end
    disp_got[disp_index] = disp_mag;
    n_disp++;
  end

  // ---------------- stimulus helpers ----------------
  int sre [N], sim [N];

  task automatic host_write(int a, int v);
    @(negedge clk); host_addr = (L+1)'(a); host_wdata = 16'(v); host_we = 1;
    @(negedge clk); host_we = 0;
  endtask

  task automatic host_check(int a, int v);
    @(negedge clk); host_addr = (L+1)'(a); #1;
    checks++;
    if (host_rdata != 16'(v)) begin failures++; $display("FAIL: host read %0d = %h exp %h", a, host_rdata, 16'(v)); end
    n_host++;
  endtask

  task automatic send(int re, int im, int gap);
    @(negedge clk); smp_re = 12'(re); smp_im = 12'(im); smp_valid = 1;
    @(negedge clk); smp_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  // one processing cycle: start, deliver samples, wait, compare
  task automatic run_cycle(string tag, int gap, bit burst);
    int first;
    for (int n = 0; n < N; n++) begin gre[brev(n)] = sre[n]; gim[brev(n)] = sim[n]; end
    golden_fft();
    n_disp = 0; fft_len = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    first = 0;
    if (burst) begin
      // three samples on consecutive clocks: the third finds the port full
      @(negedge clk); smp_re = 12'(sre[0]); smp_im = 12'(sim[0]); smp_valid = 1;
      @(negedge clk); smp_re = 12'(sre[1]); smp_im = 12'(sim[1]);
      @(negedge clk); smp_re = 12'h555;     smp_im = 12'h555;
      @(negedge clk); smp_valid = 0;
      repeat (4) @(negedge clk);
      checks++;
      if (!overrun) begin failures++; $display("FAIL: %s burst did not overrun", tag); end
      else n_overrun++;
      first = 2;
    end
    for (int n = first; n < N; n++) send(sre[n], sim[n], gap);
    while (!done) @(negedge clk);
    // done comes when the last bin enters the display port; let the display take it
    for (int w = 0; w < 200 && n_disp < N; w++) @(negedge clk);
    // the transform phase is the processor's run plus one clock for its
    // start pulse and one for its done pulse
    checks++;
    if (fft_len != FFT_CLOCKS + 2) begin failures++; $display("FAIL: %s transform phase %0d clocks, expected %0d", tag, fft_len, FFT_CLOCKS + 2); end
    checks++;
    if (n_disp != N) begin failures++; $display("FAIL: %s displayed %0d bins", tag, n_disp); end
    begin
      int bad = 0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (disp_got[k] != mag(gre[k], gim[k])) begin
          bad++; if (bad < 5) $display("FAIL: %s bin %0d magnitude %0d exp %0d", tag, k, disp_got[k], mag(gre[k], gim[k]));
        end
      end
      failures += bad;
    end
    // the host sees the spectrum in memory afterwards
    host_check(5, gre[5] & 16'hffff);
    host_check(N + 5, gim[5] & 16'hffff);
    $display("%s: done, transform phase %0d clocks", tag, fft_len);
  endtask

  function automatic bit is_peak_near(int bin);
    int best = 0;
    for (int k = bin - 1; k <= bin + 1; k++) if (disp_got[k] > best) best = disp_got[k];
    for (int k = 1; k < N; k++)
      if ((k < bin - 3 || k > bin + 3) && disp_got[k] * 4 > best) begin
        // allowed only near the other expected peaks
        if (!(k >= 99 && k <= 105) && !(k >= 919 && k <= 925) &&
            !(k >= 335 && k <= 341) && !(k >= 683 && k <= 689)) return 0;
      end
    return best > 200;
  endfunction

  initial begin
    foreach (n_phase[i]) n_phase[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // host access while idle
    host_write(7, 16'h0123); host_write(N + 7, 16'hfedc);
    host_check(7, 16'h0123); host_check(N + 7, 16'hfedc);

    // cycle 1: 1 kHz and 3.3 kHz sines at fs = 10 kHz, real time
    for (int n = 0; n < N; n++) begin
      sre[n] = $rtoi(1800.0 * $sin(2.0 * PI * 1000.0 * n / 10000.0));
      sim[n] = $rtoi(1800.0 * $sin(2.0 * PI * 3300.0 * n / 10000.0));
    end
    run_cycle("sines", 1248, 0);
    checks += 4;
    if (!is_peak_near(102)) begin failures++; $display("FAIL: no 1 kHz peak at bin 102"); end
    if (!is_peak_near(922)) begin failures++; $display("FAIL: no 1 kHz image at bin 922"); end
    if (!is_peak_near(338)) begin failures++; $display("FAIL: no 3.3 kHz peak at bin 338"); end
    if (!is_peak_near(686)) begin failures++; $display("FAIL: no 3.3 kHz image at bin 686"); end

    // cycle 2: 200 Hz square wave and LFM 3375..3625 Hz with noise, fast delivery
    for (int n = 0; n < N; n++) begin
      real t = n / 10000.0, f0 = 3375.0, k = 250.0 / (N / 10000.0);
      real noise = 0.0;
      sre[n] = (((n * 200) % 10000) < 5000) ? 1500 : -1500;
      for (int u = 0; u < 12; u++) noise += $itor($urandom_range(1000)) / 1000.0;
      noise = (noise - 6.0) * 1000.0 * 0.316;   // sigma ~ 316: 10 dB below a 1000-rms sweep
      sim[n] = $rtoi(1414.0 * $sin(2.0 * PI * (f0 * t + 0.5 * k * t * t)) + noise);
      if (sim[n] > 2047) sim[n] = 2047;
      if (sim[n] < -2048) sim[n] = -2048;
    end
    run_cycle("square+lfm", 6, 1);
    begin
      int fund = 0, rest = 0;
      for (int k = 18; k <= 23; k++) if (disp_got[k] > fund) fund = disp_got[k];
      for (int k = 25; k < 330; k++) if (disp_got[k] > rest) rest = disp_got[k];
      checks++;
      if (fund <= rest) begin failures++; $display("FAIL: square-wave fundamental not dominant below the sweep (%0d vs %0d)", fund, rest); end
    end

    // cycle 3: a record whose second-stage butterflies overflow
    for (int n = 0; n < N; n++) begin sre[n] = 0; sim[n] = 0; end
    for (int w = 0; w < 8; w++) begin
      // memory words 0..7 repeat a 4-word pattern of full-scale values; after
      // two stages the 45-degree butterfly of the third stage overflows
      automatic int re_v [4] = '{2047, 2047, 2047, -2047};
      automatic int im_v [4] = '{2047, -2047, -2047, 2047};
      sre[brev(w)] = re_v[w % 4];
      sim[brev(w)] = im_v[w % 4];
    end
    run_cycle("overflow", 3, 0);

    // mechanisms
    checks += 9;
    if (n_host == 0)     begin failures++; $display("FAIL: no host access"); end
    if (n_overrun == 0)  begin failures++; $display("FAIL: no overrun"); end
    if (n_unit == 0)     begin failures++; $display("FAIL: no unity twiddle"); end
    if (n_sat == 0)      begin failures++; $display("FAIL: no saturation"); end
    if (n_stall == 0)    begin failures++; $display("FAIL: no display stall"); end
    for (int i = 0; i < 4; i++) if (n_phase[i] == 0) begin failures++; $display("FAIL: phase %0d never seen", i); end
    $display("mechanisms: host reads %0d, overruns %0d, unity twiddles %0d, saturations %0d, display stalls %0d",
             n_host, n_overrun, n_unit, n_sat, n_stall);
    $display("phase clocks: host %0d, acquisition %0d, transform %0d, display %0d", n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
