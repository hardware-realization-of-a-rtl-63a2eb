// input_latches: the four operand latches of the FFT processor, for X2, Y2,
// X1 and Y1 (latches 1 to 4, in the numbering of the published design).
//
// Latch i loads the 12-bit data bus on a clock where its REG strobe reg_ld[i]
// is high, and holds it.  OD strobe od[i] places latch i on the arithmetic
// bus feeding the multiplier's X latch.  The original parts are tri-state;
// here the bus is a one-hot multiplexer that reads 0 when no OD is asserted.
// An assertion checks that at most one OD is asserted at a time, the rule
// that keeps the tri-state bus free of contention.  The latches keep the
// operands of a butterfly while its results are written back to the same
// memory locations (in-place computation).
module input_latches #(
  parameter int unsigned DW = fft_pkg::DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] bus_in,
  input  logic [3:0]    reg_ld,
  input  logic [3:0]    od,
  output logic [DW-1:0] lbus
);
  logic [DW-1:0] lat [4];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) lat[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (reg_ld[i]) lat[i] <= bus_in;
    end
  end

  always_comb begin
    lbus = '0;
    for (int i = 0; i < 4; i++)
      if (od[i]) lbus = lbus | lat[i];
  end

  a_one_od: assert property (@(posedge clk) disable iff (!rst_n) $countones(od) <= 1)
    else $error("input_latches: more than one OD strobe drives the latch bus");
endmodule
