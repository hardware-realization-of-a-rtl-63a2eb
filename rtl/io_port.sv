// io_port: one-word I/O port between a peripheral (data acquisition unit or
// display) and the system bus.
//
// A write (wr) stores din and sets `full`; a read (rd) while full hands dout
// to the consumer and clears `full` at the clock edge.  A write while full
// and not being read in the same clock is lost and sets the sticky `overrun`
// flag, which only clr or reset clear.  A write and a read in the same clock
// replace the word and leave the port full.  The published design only names
// these ports; the one-entry buffer with full and overrun flags is this
// design's choice.
module io_port #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr,
  input  logic [W-1:0] din,
  input  logic         rd,
  output logic         full,
  output logic [W-1:0] dout,
  output logic         overrun
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      full    <= 1'b0;
      dout    <= '0;
      overrun <= 1'b0;
    end else begin
      if (wr && (!full || rd)) begin
        dout <= din;
        full <= 1'b1;
      end else if (rd) begin
        full <= 1'b0;
      end
      if (wr && full && !rd) overrun <= 1'b1;
    end
  end
endmodule
