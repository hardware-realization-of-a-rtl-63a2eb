// twiddle_addr_gen: exponent p of the twiddle factor W**p of the current
// butterfly, which addresses the sin/cos table.
//
// At stage s of an in-place transform of bit-reversed input, butterfly b with
// offset j = b mod 2**s inside its group uses W_N**(j * N / 2**(s+1)), that is
// p = j << (LOG2N-1-s), in the range 0 .. N/2-1.  Stage 0 always uses p = 0.
// The published processor holds this sequence in a PROM; it is computed here.
// Combinational.
module twiddle_addr_gen #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N
) (
  input  logic [3:0]       stage,
  input  logic [LOG2N-2:0] bfly,
  output logic [LOG2N-2:0] p
);
  always_comb begin
    logic [LOG2N-2:0] j;
    j = bfly & (LOG2N-1)'((1 << stage) - 1);
    p = j << (4'(LOG2N - 1) - stage);
  end
endmodule
