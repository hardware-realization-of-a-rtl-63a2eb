// data_memory: the data segment of the system memory, two pages of N words
// of MW bits: page 0 holds real parts, page 1 imaginary parts, and the two
// parts of one complex sample share a word address.
//
// Address bit LOG2N selects the page (this design's choice).  Reads are
// asynchronous, like a static RAM: rdata follows addr in the same clock.
// Writes take effect at the clock edge where we is high.  The contents start
// at zero.  One port, shared by all bus masters through the system bus.
module data_memory #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned MW    = fft_pkg::MW
) (
  input  logic             clk,
  input  logic [LOG2N:0]   addr,
  input  logic             we,
  input  logic [MW-1:0]    wdata,
  output logic [MW-1:0]    rdata
);
  logic [MW-1:0] mem [2 << LOG2N];

  initial begin
    for (int i = 0; i < (2 << LOG2N); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
