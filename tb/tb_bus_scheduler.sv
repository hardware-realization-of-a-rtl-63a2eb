// tb_bus_scheduler: runs two processing cycles with unit done pulses after
// random delays and checks the bus owner sequence host -> DAU -> FFT ->
// magnitude -> host, the one-clock start pulses, that stray done pulses of a
// unit that does not own the bus are ignored, and the final done pulse.
`timescale 1ns/1ps
module tb_bus_scheduler;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dau_done = 0, fft_done = 0, mag_done = 0;
  logic dau_start, fft_start, mag_start, done; bus_owner_t grant;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  bus_scheduler dut (.clk, .rst_n, .start, .dau_done, .fft_done, .mag_done, .grant, .dau_start, .fft_start, .mag_start, .done);

  task automatic chk(bit ok, string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); chk(grant == OWN_HOST, "host owns bus after reset");
    for (int r = 0; r < 2; r++) begin
      // stray done pulses while idle
      pulse(fft_done); chk(grant == OWN_HOST, "ignores fft_done in idle");
      pulse(start);
      chk(grant == OWN_DAU && dau_start, "DAU phase starts");
      @(negedge clk); chk(!dau_start, "dau_start one clock");
      pulse(mag_done); chk(grant == OWN_DAU, "ignores mag_done in DAU phase");
      repeat ($urandom_range(20)) @(negedge clk);
      pulse(dau_done); chk(grant == OWN_FFT && fft_start, "FFT phase starts");
      repeat ($urandom_range(20)) @(negedge clk);
      chk(grant == OWN_FFT, "FFT phase holds");
      pulse(fft_done); chk(grant == OWN_MAG && mag_start, "display phase starts");
      repeat ($urandom_range(20)) @(negedge clk);
      pulse(mag_done); chk(grant == OWN_HOST && done, "back to host with done");
      @(negedge clk); chk(!done, "done one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
