// bfly_ctrl_gen: the butterfly control generator, a 64-word control PROM
// addressed by the clock-phase counter of the counter chain.
//
// Each word (fft_pkg::bfly_ctrl_t) carries the memory read/write and page /
// node selects, the REG1-REG4 load strobes and OD1-OD4 output enables of the
// operand latches, and the CLK IN, ACC, SUB and CLK OUT controls of the
// multiplier-accumulator, plus the twiddle component (cos or sin) and the
// unity-coefficient request for the Y latch multiplexer.  The contents are
// fft_pkg::build_ctrl_prom(): operand reads in cycles 0-3, four outputs of
// three multiply-accumulates and one write each in cycles 4-23, idle to the
// end of the frame.  The read is combinational, like a bipolar PROM.
module bfly_ctrl_gen #(
  parameter int unsigned CYC_W = fft_pkg::CYC_W
) (
  input  logic [CYC_W-1:0]   cyc,
  output fft_pkg::bfly_ctrl_t ctrl
);
  localparam fft_pkg::ctrl_prom_t PROM = fft_pkg::build_ctrl_prom();

  // The program occupies the first 2**fft_pkg::CYC_W words; a longer frame
  // is idle beyond them.
  always_comb begin
    if (int'(cyc) < int'(fft_pkg::CYCLES))
      ctrl = PROM[fft_pkg::CYC_W'(cyc)];
    else
      ctrl = fft_pkg::CTRL_IDLE;
  end
endmodule
