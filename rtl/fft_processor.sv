// fft_processor: sequential radix-2 FFT processor working in place on the
// two-page data memory, one butterfly every 2**CYC_W (64) clocks.
//
// Structure, as in the published block diagram: a counter chain clocked at the
// basic clock addresses the memory address generator, the twiddle address
// generator (which addresses the sin/cos table) and the butterfly control
// PROM.  The control words load the four operand latches from the memory
// data bus, feed one operand and one coefficient per clock to the
// multiplier-accumulator, and write the four results back over the operands.
//
// Each butterfly computes, with W**p = cos t - j sin t,
//   X1' = (X1 + X2 cos t + Y2 sin t) / 2     Y1' = (Y1 - X2 sin t + Y2 cos t) / 2
//   X2' = (X1 - X2 cos t - Y2 sin t) / 2     Y2' = (Y1 + X2 sin t - Y2 cos t) / 2
// The input must be stored in bit-reversed order; at stage s the butterflies
// pair word k with word k + 2**s, and the spectrum comes out in natural order,
// scaled by 1/N (the halving per stage is this design's choice).
//
// Interface: a start pulse begins the transform; busy stays high for exactly
// LOG2N * 2**(LOG2N-1) * 2**CYC_W clocks and done pulses on the clock after
// the last one.  While busy the processor expects to own the memory port:
// mem_addr / mem_we / mem_wdata out, asynchronous mem_rdata in.  Only the
// low DW bits of a memory word are read; results are written sign-extended.
// unit_coef_used and sat_event are status strobes (a twiddle of +1 replaced
// by the unity constant; a written result clipped).
module fft_processor #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned DW    = fft_pkg::DW,
  parameter int unsigned MW    = fft_pkg::MW,
  parameter int unsigned CYC_W = fft_pkg::CYC_W,
  parameter int unsigned TW_W  = fft_pkg::TW_W,
  parameter int unsigned ACC_W = fft_pkg::ACC_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [LOG2N:0] mem_addr,
  output logic           mem_we,
  output logic [MW-1:0]  mem_wdata,
  input  logic [MW-1:0]  mem_rdata,
  output logic           unit_coef_used,
  output logic           sat_event
);
  import fft_pkg::*;

  logic [CYC_W-1:0] cyc;
  logic [LOG2N-2:0] bfly, p;
  logic [3:0]       stage;
  logic [LOG2N-1:0] addr_top, addr_bot;
  logic [TW_W-1:0]  cos_v, sin_v, tw;
  logic             cos_one, sin_one, tw_one;
  bfly_ctrl_t       prom_word, ctrl;
  coef_sel_t        coef_sel;
  logic [DW-1:0]    lbus, result;
  logic             sat;

  counter_chain #(.LOG2N(LOG2N), .CYC_W(CYC_W)) u_cnt (
    .clk, .rst_n, .start, .cyc, .bfly, .stage, .busy, .done
  );

  mem_addr_gen #(.LOG2N(LOG2N)) u_maddr (
    .stage, .bfly, .addr_top, .addr_bot
  );

  twiddle_addr_gen #(.LOG2N(LOG2N)) u_taddr (
    .stage, .bfly, .p
  );

  sincos_lut #(.LOG2N(LOG2N), .TW_W(TW_W)) u_lut (
    .p, .cos_v, .sin_v, .cos_one, .sin_one
  );

  bfly_ctrl_gen #(.CYC_W(CYC_W)) u_ctrl (
    .cyc, .ctrl(prom_word)
  );

  assign ctrl = busy ? prom_word : CTRL_IDLE;

  // Memory side
  assign mem_addr  = {ctrl.page_im, ctrl.node_bot ? addr_bot : addr_top};
  assign mem_we    = ctrl.mem_wr;
  assign mem_wdata = MW'($signed(result));

  input_latches #(.DW(DW)) u_lat (
    .clk, .rst_n,
    .bus_in(mem_rdata[DW-1:0]),
    .reg_ld(ctrl.mem_rd ? ctrl.reg_ld : 4'b0000),
    .od(ctrl.od),
    .lbus
  );

  // Twiddle component and Y latch multiplexer control
  always_comb begin
    tw     = '0;
    tw_one = 1'b0;
    unique case (ctrl.tw_sel)
      TW_COS:  begin tw = cos_v; tw_one = cos_one; end
      TW_SIN:  begin tw = sin_v; tw_one = sin_one; end
      default: ;
    endcase
    if (ctrl.tw_unit || tw_one)     coef_sel = COEF_ONE;
    else if (ctrl.tw_sel != TW_NONE) coef_sel = COEF_TW;
    else                             coef_sel = COEF_NONE;
  end

  arithmetic_unit #(.DW(DW), .TW_W(TW_W), .ACC_W(ACC_W)) u_au (
    .clk, .rst_n,
    .xin(lbus), .clk_in(ctrl.clk_in),
    .coef_sel, .tw,
    .acc(ctrl.acc), .sub(ctrl.sub), .clk_out(ctrl.clk_out),
    .result, .sat
  );

  assign unit_coef_used = ctrl.clk_in && (ctrl.tw_sel != TW_NONE) && tw_one;
  assign sat_event      = mem_we && sat;
endmodule
