// counter_chain: the chain of counters that addresses the address, twiddle and
// control PROMs of the FFT processor.
//
// Three cascaded synchronous counters: the clock phase inside a butterfly
// (0 .. 2**CYC_W-1), the butterfly inside a stage (0 .. N/2-1) and the stage
// (0 .. LOG2N-1).  Each counter advances when all lower ones wrap, like the
// ripple-carry enables of a TTL counter chain.  A pulse on `start` clears the
// chain and sets `busy`; on the last clock of the last butterfly of the last
// stage `done` pulses for one cycle and `busy` drops.  A run therefore lasts
// exactly LOG2N * N/2 * 2**CYC_W clocks (327 680 clocks, 26.2 ms at 12.5 MHz,
// for the 1024-point default).  The widths and the start/done handshake are
// this design's choice; the counter chain itself and the 64-clock butterfly
// frame are the published design's.
module counter_chain #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned CYC_W = fft_pkg::CYC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [CYC_W-1:0] cyc,
  output logic [LOG2N-2:0] bfly,
  output logic [3:0]       stage,
  output logic             busy,
  output logic             done
);
  logic cyc_wrap, bfly_wrap, stage_wrap;

  assign cyc_wrap   = (cyc == CYC_W'((1 << CYC_W) - 1));
  assign bfly_wrap  = cyc_wrap && (bfly == (LOG2N-1)'((1 << (LOG2N - 1)) - 1));
  assign stage_wrap = bfly_wrap && (stage == 4'(LOG2N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc   <= '0;
      bfly  <= '0;
      stage <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        cyc   <= '0;
        bfly  <= '0;
        stage <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        cyc <= cyc + 1'b1;
        if (cyc_wrap)  bfly  <= bfly + 1'b1;
        if (bfly_wrap) stage <= stage + 1'b1;
        if (stage_wrap) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          stage <= '0;
        end
      end
    end
  end
endmodule
