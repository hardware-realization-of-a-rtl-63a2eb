// tb_dau: feeds a 64-point record of sample pairs to the DAU through a port
// model with random gaps and a grant that sometimes drops, and checks that
// every sample lands sign-extended at its bit-reversed address in the right
// page, that nothing is written without the grant, and the done pulse.
`timescale 1ns/1ps
module tb_dau;
  localparam int L = 6, N = 1 << L;
  logic clk = 0, rst_n = 0, start = 0, grant = 0, port_full = 0, port_rd, mem_we, busy, done;
  logic [23:0] port_data = 0; logic [L:0] mem_addr; logic [15:0] mem_wdata;
  int checks = 0, failures = 0, dones = 0;
  logic [15:0] mem [2 << L];
  logic [11:0] sre [N], sim [N];
  int sent = 0;
  always #5 clk = ~clk;
  dau #(.LOG2N(L)) dut (.clk, .rst_n, .start, .grant, .port_full, .port_data, .port_rd,
                        .mem_addr, .mem_we, .mem_wdata, .busy, .done);

  function automatic int brev(int a);
    int r = 0;
    for (int i = 0; i < L; i++) if (a & (1 << i)) r |= 1 << (L - 1 - i);
    return r;
  endfunction

  logic took = 0;
  always @(posedge clk) begin
    took <= port_rd;
    if (mem_we) begin
      mem[mem_addr] <= mem_wdata;
      if (!grant) begin failures++; $display("FAIL: write without grant"); end
    end
    if (done && rst_n) dones++;
  end

  initial begin
    foreach (mem[i]) mem[i] = 16'hdead;
    for (int n = 0; n < N; n++) begin sre[n] = 12'($urandom); sim[n] = 12'($urandom); end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!busy || sent < N || port_full) begin
      grant = ($urandom_range(5) != 0);
      @(negedge clk);
      if (took) port_full = 0;
      if (!port_full && sent < N && $urandom_range(1)) begin
        port_data = {sre[sent], sim[sent]}; port_full = 1; sent++;
      end
    end
    grant = 1;
    repeat (6) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      checks += 2;
      if (mem[brev(n)] != {{4{sre[n][11]}}, sre[n]}) begin failures++; if (failures < 5) $display("FAIL re %0d", n); end
      if (mem[N + brev(n)] != {{4{sim[n][11]}}, sim[n]}) begin failures++; if (failures < 5) $display("FAIL im %0d", n); end
    end
    checks++; if (dones != 1 || busy) begin failures++; $display("FAIL: done pulses %0d busy %0b", dones, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
