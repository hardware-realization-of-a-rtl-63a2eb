// mag_unit: magnitude of the computed spectrum for display.
//
// For every bin k = 0 .. N-1 in natural order (the transform of bit-reversed
// input leaves its spectrum in natural order) it reads the real and the
// imaginary word, takes L = max(|re|, |im|) and S = min(|re|, |im|) and
// forms the approximation  |X| ~ L + 3/8 S  (3S/8 truncated).  The pair
// {k, magnitude} is written to the display I/O port; while the port is still
// full the unit waits (a stall).  In the published system this step is a
// program on the host microprocessor; here it is a small sequential unit on
// the bus.  Timing: two read clocks, one compute clock and at least one
// clock at the port per bin.  Only the low DW bits of each memory word are
// read, the upper bits being the sign extension written by the processor.  done pulses after bin N-1 has been handed over.
module mag_unit #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned DW    = fft_pkg::DW,
  parameter int unsigned MW    = fft_pkg::MW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic [LOG2N:0]      mem_addr,
  input  logic [MW-1:0]       mem_rdata,
  input  logic                port_full,
  output logic                port_wr,
  output logic [LOG2N+DW-1:0] port_data,
  output logic                stall,
  output logic                busy,
  output logic                done
);
  typedef enum logic [2:0] {S_IDLE, S_RD_RE, S_RD_IM, S_CALC, S_OUT} state_t;
  state_t           st;
  logic [LOG2N-1:0] k;
  logic [DW-1:0]    re, im, mag;

  function automatic logic [DW-1:0] absval(input logic [DW-1:0] v);
    // |-2**(DW-1)| = 2**(DW-1) still fits as an unsigned DW-bit value
    return v[DW-1] ? DW'(-v) : v;
  endfunction

  assign mem_addr  = {(st == S_RD_IM), k};
  assign port_wr   = (st == S_OUT) && !port_full;
  assign port_data = {k, mag};
  assign stall     = (st == S_OUT) && port_full;
  assign busy      = (st != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      k    <= '0;
      re   <= '0;
      im   <= '0;
      mag  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE:  if (start) begin k <= '0; st <= S_RD_RE; end
        S_RD_RE: begin re <= mem_rdata[DW-1:0]; st <= S_RD_IM; end
        S_RD_IM: begin im <= mem_rdata[DW-1:0]; st <= S_CALC; end
        S_CALC:  begin
                   logic [DW-1:0] a, b, l, s;
                   logic [DW+1:0] s3;
                   a   = absval(re);
                   b   = absval(im);
                   l   = (a > b) ? a : b;
                   s   = (a > b) ? b : a;
                   s3  = (DW+2)'(s) * 3;
                   mag <= l + DW'(s3 >> 3);
                   st  <= S_OUT;
                 end
        S_OUT:   if (port_wr) begin
                   k <= k + 1'b1;
                   if (k == LOG2N'((1 << LOG2N) - 1)) begin
                     st   <= S_IDLE;
                     done <= 1'b1;
                   end else begin
                     st <= S_RD_RE;
                   end
                 end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
