// tb_mag_unit: fills a 64-bin spectrum memory with random values (and the
// extremes -2048 / 2047), runs the magnitude unit with a display port that
// is slow at random, and checks every bin index and L + floor(3S/8) in
// order, that the unit stalled while the port was full, and done.
`timescale 1ns/1ps
module tb_mag_unit;
  localparam int L = 6, N = 1 << L;
  logic clk = 0, rst_n = 0, start = 0, port_full = 0, port_wr, stall, busy, done;
  logic [L:0] mem_addr; logic [15:0] mem_rdata; logic [L+11:0] port_data;
  int checks = 0, failures = 0, stalls = 0, got = 0, dones = 0;
  logic [15:0] mem [2 << L];
  always #5 clk = ~clk;
  mag_unit #(.LOG2N(L)) dut (.clk, .rst_n, .start, .mem_addr, .mem_rdata, .port_full, .port_wr,
                             .port_data, .stall, .busy, .done);
  assign mem_rdata = mem[mem_addr];

  function automatic int expect_mag(int k);
    int a = $signed(mem[k][11:0]), b = $signed(mem[N + k][11:0]);
    if (a < 0) a = -a;
    if (b < 0) b = -b;
    return (a > b) ? a + (3 * b) / 8 : b + (3 * a) / 8;
  endfunction

  always @(posedge clk) begin
    if (stall && rst_n) stalls++;
    if (done && rst_n) dones++;
  end

  initial begin
    foreach (mem[i]) mem[i] = {4'h0, 12'($urandom)};
    mem[3] = 16'h0800; mem[N + 3] = 16'h0800;
    mem[4] = 16'h07ff; mem[N + 4] = 16'h0800;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (got < N) begin
      if (port_wr) begin
        checks++;
        if (port_data[L+11:12] != got || port_data[11:0] != expect_mag(got)) begin
          failures++; if (failures < 5) $display("FAIL bin %0d: got %0d/%0d exp %0d", got, port_data[L+11:12], port_data[11:0], expect_mag(got));
        end
        got++;
      end
      @(negedge clk);
      if (port_full) port_full = ($urandom_range(3) != 0);
      else if (port_wr) port_full = 1;
    end
    port_full = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (stalls == 0) begin failures++; $display("FAIL: no stall seen"); end
    if (dones != 1 || busy) begin failures++; $display("FAIL: done %0d", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
