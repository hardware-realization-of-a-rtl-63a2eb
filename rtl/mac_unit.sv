// mac_unit: 12 x 12 signed multiplier-accumulator, the function of the
// single-chip multiplier-accumulator used as the FFT arithmetic unit.
//
// The product x*y (two's complement, 24 bits) is formed combinationally.  On
// a clock with clk_out high the accumulator register p takes
//   acc=0: +x*y or -x*y (sub)       acc=1: p + x*y or p - x*y
// The register is ACC_W bits wide (24 + 3 guard bits by default) so that a
// sum of several full-scale products cannot wrap.  Operand registers are the
// X and Y latches of the arithmetic unit, outside this module.  One result
// per clock; the register is the only state.
module mac_unit #(
  parameter int unsigned DW    = fft_pkg::DW,
  parameter int unsigned ACC_W = fft_pkg::ACC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DW-1:0]    x,
  input  logic signed [DW-1:0]    y,
  input  logic                    acc,
  input  logic                    sub,
  input  logic                    clk_out,
  output logic signed [ACC_W-1:0] p
);
  logic signed [2*DW-1:0]  prod;
  logic signed [ACC_W-1:0] term, base;

  always_comb begin
    prod = x * y;
    term = sub ? -ACC_W'(prod) : ACC_W'(prod);
    base = acc ? p : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       p <= '0;
    else if (clk_out) p <= base + term;
  end
endmodule
