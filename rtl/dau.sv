// dau: data acquisition unit.  Takes N sample pairs from its I/O port and
// writes them into the data memory in bit-reversed (scrambled) order, the
// order the in-place FFT expects.
//
// A pair is {re, im}: the first DW bits go to the real page and the others to
// the imaginary page at the same word address, so the unit fills a complex
// record or two independent real records that the processor then transforms
// together.  Samples are stored sign-extended to the memory width.  Sample n
// goes to word bitrev(n); the published system produced this order in
// software, here it is the sample counter with its bits reversed.
// Sequence: start clears the counter; while `grant` is high and the port is
// full the unit takes the pair (port_rd), writes the real page, then the
// imaginary page, three clocks per sample.  Without the grant the unit neither
// writes nor advances.  done pulses after the N-th pair.
module dau #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned DW    = fft_pkg::DW,
  parameter int unsigned MW    = fft_pkg::MW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            grant,
  input  logic            port_full,
  input  logic [2*DW-1:0] port_data,
  output logic            port_rd,
  output logic [LOG2N:0]  mem_addr,
  output logic            mem_we,
  output logic [MW-1:0]   mem_wdata,
  output logic            busy,
  output logic            done
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_WR_RE, S_WR_IM} state_t;
  state_t               st;
  logic [LOG2N:0]       n;       // one extra bit to count to N
  logic [DW-1:0]        s_re, s_im;
  logic [LOG2N-1:0]     waddr;

  assign waddr   = fft_pkg::bitrev(n[LOG2N-1:0], LOG2N);
  assign port_rd = (st == S_WAIT) && grant && port_full;
  assign busy    = (st != S_IDLE);

  always_comb begin
    mem_we    = 1'b0;
    mem_addr  = {1'b0, waddr};
    mem_wdata = MW'($signed(s_re));
    if (st == S_WR_RE) begin
      mem_we = grant;
    end else if (st == S_WR_IM) begin
      mem_we    = grant;
      mem_addr  = {1'b1, waddr};
      mem_wdata = MW'($signed(s_im));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      n    <= '0;
      s_re <= '0;
      s_im <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE:  if (start) begin n <= '0; st <= S_WAIT; end
        S_WAIT:  if (port_rd) begin
                   {s_re, s_im} <= port_data;
                   st <= S_WR_RE;
                 end
        S_WR_RE: if (grant) st <= S_WR_IM;
        S_WR_IM: if (grant) begin
                   n <= n + 1'b1;
                   if (n == (LOG2N+1)'((1 << LOG2N) - 1)) begin
                     st   <= S_IDLE;
                     done <= 1'b1;
                   end else begin
                     st <= S_WAIT;
                   end
                 end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
