// mem_addr_gen: data memory addresses of the two nodes of the current
// butterfly.
//
// At stage s (counted from 0) of an in-place transform of bit-reversed input
// the butterflies pair node k with node k + 2**s.  Butterfly b of the stage
// lies in group g = b >> s at offset j = b mod 2**s, so the top node is
// k = g * 2**(s+1) + j: the bits of b above position s move up by one and a
// zero is inserted at bit s.  The published processor reads these addresses
// from bipolar PROMs addressed by the counter chain; the same table is formed
// here by that bit insertion, which is purely combinational.
module mem_addr_gen #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N
) (
  input  logic [3:0]       stage,
  input  logic [LOG2N-2:0] bfly,
  output logic [LOG2N-1:0] addr_top,
  output logic [LOG2N-1:0] addr_bot
);
  always_comb begin
    logic [LOG2N-1:0] b_ext, low_mask;
    b_ext    = {1'b0, bfly};
    low_mask = (LOG2N)'((1 << stage) - 1);
    addr_top = ((b_ext & ~low_mask) << 1) | (b_ext & low_mask);
    addr_bot = addr_top | (LOG2N)'(1 << stage);
  end
endmodule
