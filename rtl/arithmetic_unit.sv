// arithmetic_unit: X latch, Y latch with its coefficient multiplexer, the
// multiplier-accumulator and the output latch of the FFT processor.
//
// On a clock with clk_in high the X latch takes the operand from the latch
// bus and the Y latch takes a 12-bit coefficient built, as in the published
// block diagram, from bit fields numbered 1 (sign, MSB) to 12:
//   bit 1      sign of the twiddle factor (0 in the constant modes)
//   bits 2,3   from a multiplexer: constant "01", constant "10", or the
//              twiddle sign repeated (sign extension)
//   bits 4-10  the 7 low twiddle bits through an AND gate (0 in constant modes)
//   bits 11,12 tied to 0
// This design places the binary point after bit 2, so the Y latch value is
// Y / 2**10: "01" is 0.5, "10" is 1.0, and an 8-bit twiddle code t becomes
// t / 256, i.e. the twiddle (t / 128) halved.  Using 0.5 for the unscaled
// operand and halved twiddles divides every butterfly output by 2, which keeps
// ten stages of a 12-bit transform in range (scaling is this design's choice).
// The accumulator (mac_unit) is updated on clk_out; `result` is the
// accumulator divided by 2**10, truncated toward minus infinity and
// saturated to 12 bits, with `sat` high while clipping.  result is valid the
// clock after the last clk_out of a sum.
module arithmetic_unit #(
  parameter int unsigned DW    = fft_pkg::DW,
  parameter int unsigned TW_W  = fft_pkg::TW_W,
  parameter int unsigned ACC_W = fft_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DW-1:0]        xin,
  input  logic                 clk_in,
  input  fft_pkg::coef_sel_t   coef_sel,
  input  logic [TW_W-1:0]      tw,
  input  logic                 acc,
  input  logic                 sub,
  input  logic                 clk_out,
  output logic [DW-1:0]        result,
  output logic                 sat
);
  localparam int unsigned FRAC = fft_pkg::COEF_FRAC;

  logic [DW-1:0]           x_lat, y_lat, y_next;
  logic signed [ACC_W-1:0] p;

  // Y latch input: MUX, AND gate and grounded bits (DW = 12 layout).
  always_comb begin
    logic       sgn, and_en;
    logic [1:0] mux;
    and_en = (coef_sel == fft_pkg::COEF_TW);
    sgn    = and_en & tw[TW_W-1];
    unique case (coef_sel)
      fft_pkg::COEF_ONE: mux = 2'b01;
      fft_pkg::COEF_TWO: mux = 2'b10;
      fft_pkg::COEF_TW:  mux = {sgn, sgn};
      default:           mux = 2'b00;
    endcase
    y_next = {sgn, mux, tw[TW_W-2:0] & {(TW_W-1){and_en}}, {(DW-3-(TW_W-1)){1'b0}}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_lat <= '0;
      y_lat <= '0;
    end else if (clk_in) begin
      x_lat <= xin;
      y_lat <= y_next;
    end
  end

  mac_unit #(.DW(DW), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .x(x_lat), .y(y_lat),
    .acc, .sub, .clk_out,
    .p
  );

  // Output latch view: scale and saturate.
  always_comb begin
    logic signed [ACC_W-1:0] q;
    q = p >>> FRAC;
    if (q > ACC_W'((1 << (DW - 1)) - 1)) begin
      result = {1'b0, {(DW-1){1'b1}}};
      sat    = 1'b1;
    end else if (q < -ACC_W'(1 << (DW - 1))) begin
      result = {1'b1, {(DW-1){1'b0}}};
      sat    = 1'b1;
    end else begin
      result = DW'(q);
      sat    = 1'b0;
    end
  end
endmodule
