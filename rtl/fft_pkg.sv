// fft_pkg: constants, types and the butterfly control program shared by the
// sequential FFT processor and the system around it.
//
// The processor runs a radix-2, in-place, decimation-in-time transform of
// 2**LOG2N points held in a memory of two pages (real and imaginary).  Every
// butterfly takes a fixed frame of CYCLES basic clocks; within the frame a
// 64-word control program (the "butterfly control PROM") sequences memory
// reads, the four operand latches, the multiplier-accumulator and the
// write-backs.  The program below is this design's own slot assignment; the
// 64-clock frame, the 12-bit data path, the 8-bit twiddle factor and the
// REG/OD/CLK IN/ACC/SUB/CLK OUT control names follow the published design.
package fft_pkg;

  // Sizes taken from the published design.
  localparam int unsigned LOG2N  = 10;   // 1024-point transform
  localparam int unsigned DW     = 12;   // data bus and operand width
  localparam int unsigned MW     = 16;   // memory word width (1k x 16 pages)
  localparam int unsigned TW_W   = 8;    // twiddle factor width
  localparam int unsigned CYC_W  = 6;    // 64 clocks per butterfly
  localparam int unsigned CYCLES = 1 << CYC_W;
  // Design choices.
  localparam int unsigned ACC_W  = 27;   // 24-bit product + 3 guard bits
  localparam int unsigned COEF_FRAC = 10; // Y latch binary point: value = Y / 2**10

  // Y latch coefficient source (the MUX of the arithmetic unit).
  typedef enum logic [1:0] {
    COEF_NONE = 2'd0,
    COEF_ONE  = 2'd1,   // MUX constant "01": 0.5, the scaled unity
    COEF_TWO  = 2'd2,   // MUX constant "10": 1.0
    COEF_TW   = 2'd3    // sign-extended twiddle factor: t / 256
  } coef_sel_t;

  // Which twiddle component feeds the arithmetic unit.
  typedef enum logic [1:0] {
    TW_NONE = 2'd0,
    TW_COS  = 2'd1,
    TW_SIN  = 2'd2
  } tw_sel_t;

  // One word of the butterfly control PROM.
  typedef struct packed {
    logic       mem_rd;    // read memory onto the data bus
    logic       mem_wr;    // write the output latch to memory
    logic       page_im;   // 0: real page, 1: imaginary page
    logic       node_bot;  // 0: node k, 1: node k + span
    logic [3:0] reg_ld;    // REG1..REG4 (bit 0 = REG1): latch X2, Y2, X1, Y1
    logic [3:0] od;        // OD1..OD4: drive latch onto the arithmetic bus
    logic       clk_in;    // CLK IN: load X and Y latches
    tw_sel_t    tw_sel;    // cos or sin for a twiddle coefficient
    logic       tw_unit;   // coefficient is the scaled unity ("01")
    logic       acc;       // ACC: accumulate on top of previous result
    logic       sub;       // SUB: subtract the product
    logic       clk_out;   // CLK OUT: update accumulator / output latch
  } bfly_ctrl_t;

  localparam bfly_ctrl_t CTRL_IDLE = '0;

  // Latch numbering of the published figure: REG1/OD1 -> X2, REG2 -> Y2,
  // REG3 -> X1, REG4 -> Y1.
  localparam int unsigned L_X2 = 0, L_Y2 = 1, L_X1 = 2, L_Y1 = 3;

  typedef bfly_ctrl_t [CYCLES-1:0] ctrl_prom_t;   // packed: one word per clock phase

  // Output r (0: X1', 1: Y1', 2: X2', 3: Y2'), term k (0: unscaled operand,
  // 1: X2 term, 2: Y2 term): which latch, which twiddle component, which sign.
  function automatic int unsigned term_latch(input int r, input int k);
    if (k == 1) return L_X2;
    if (k == 2) return L_Y2;
    return (r % 2 == 0) ? L_X1 : L_Y1;
  endfunction

  function automatic tw_sel_t term_tw(input int r, input int k);
    if (k == 0) return TW_NONE;
    // real outputs use X2 cos + Y2 sin, imaginary ones X2 sin, Y2 cos
    if (r % 2 == 0) return (k == 1) ? TW_COS : TW_SIN;
    return (k == 1) ? TW_SIN : TW_COS;
  endfunction

  // Eqns: X1' = X1 + X2c + Y2s, Y1' = Y1 - X2s + Y2c,
  //       X2' = X1 - X2c - Y2s, Y2' = Y1 + X2s - Y2c  (all halved)
  function automatic logic term_sub(input int r, input int k);
    case (r)
      0: return 1'b0;
      1: return (k == 1);
      2: return (k != 0);
      default: return (k == 2);
    endcase
  endfunction

  // Builds the 64-word program.
  //  cycles 0..3   : read X1, Y1 (node k) and X2, Y2 (node k+span) into latches
  //  per output r  : 4 cycles of multiply-accumulate, then one write
  //    X1' = X1/2 + (X2 cos + Y2 sin)/2
  //    Y1' = Y1/2 + (Y2 cos - X2 sin)/2
  //    X2' = X1/2 - (X2 cos + Y2 sin)/2
  //    Y2' = Y1/2 - (Y2 cos - X2 sin)/2
  //  the remaining cycles are idle.
  function automatic ctrl_prom_t build_ctrl_prom();
    ctrl_prom_t t;
    int unsigned c;
    t = '0;
    // operand reads
    t[0].mem_rd = 1'b1; t[0].page_im = 1'b0; t[0].node_bot = 1'b0; t[0].reg_ld[L_X1] = 1'b1;
    t[1].mem_rd = 1'b1; t[1].page_im = 1'b1; t[1].node_bot = 1'b0; t[1].reg_ld[L_Y1] = 1'b1;
    t[2].mem_rd = 1'b1; t[2].page_im = 1'b0; t[2].node_bot = 1'b1; t[2].reg_ld[L_X2] = 1'b1;
    t[3].mem_rd = 1'b1; t[3].page_im = 1'b1; t[3].node_bot = 1'b1; t[3].reg_ld[L_Y2] = 1'b1;
    for (int r = 0; r < 4; r++) begin
      c = 4 + 5 * r;
      for (int k = 0; k < 3; k++) begin
        // load operand and coefficient
        t[c + k].od[term_latch(r, k)] = 1'b1;
        t[c + k].clk_in        = 1'b1;
        t[c + k].tw_sel        = term_tw(r, k);
        t[c + k].tw_unit       = (k == 0);
        // multiply-accumulate one cycle later
        t[c + k + 1].clk_out   = 1'b1;
        t[c + k + 1].acc       = (k != 0);
        t[c + k + 1].sub       = term_sub(r, k);
      end
      t[c + 4].mem_wr   = 1'b1;
      t[c + 4].node_bot = (r >= 2);
      t[c + 4].page_im  = r[0];
    end
    return t;
  endfunction

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] a, input int unsigned n);
    logic [LOG2N-1:0] r;
    r = '0;
    for (int i = 0; i < int'(LOG2N); i++)
      if (i < int'(n)) r[i] = a[int'(n) - 1 - i];
    return r;
  endfunction

  // Bus owners on the common system bus.
  typedef enum logic [1:0] {
    OWN_HOST = 2'd0,
    OWN_DAU  = 2'd1,
    OWN_FFT  = 2'd2,
    OWN_MAG  = 2'd3
  } bus_owner_t;

endpackage
