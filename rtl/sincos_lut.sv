// sincos_lut: the SIN/COS look-up table of the FFT processor.
//
// For twiddle exponent p (0 .. N/2-1) it returns cos(2*pi*p/N) and
// sin(2*pi*p/N) as 8-bit two's complement fractions (value = code / 128,
// rounded to nearest), the 8-bit twiddle factor width of the published design.
// W**p = cos - j sin.  Because +1.0 does not fit in this format, a value that
// rounds to +1 is returned as code 0 with the flag cos_one / sin_one set; the
// arithmetic unit then uses its unity constant instead of the table value.
// Over p in 0 .. N/2-1 neither component reaches -1 except through rounding,
// which -128 holds.  The contents are computed when the design is elaborated;
// the read is combinational, like a bipolar PROM.
module sincos_lut #(
  parameter int unsigned LOG2N = fft_pkg::LOG2N,
  parameter int unsigned TW_W  = fft_pkg::TW_W
) (
  input  logic [LOG2N-2:0] p,
  output logic [TW_W-1:0]  cos_v,
  output logic [TW_W-1:0]  sin_v,
  output logic             cos_one,
  output logic             sin_one
);
  localparam int unsigned HALF = 1 << (LOG2N - 1);
  localparam int          FULL = 1 << (TW_W - 1);   // code of +1.0

  // entry: {one flag, code}
  typedef logic [TW_W:0] rom_t [HALF];

  function automatic logic [TW_W:0] quant(input real v);
    real s;
    int  q;
    s = v * real'(FULL);
    q = (s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(-s + 0.5);
    if (q >= FULL) return {1'b1, {TW_W{1'b0}}};
    return {1'b0, TW_W'(q)};
  endfunction

  function automatic rom_t build(input logic want_sin);
    rom_t t;
    real  th;
    for (int i = 0; i < int'(HALF); i++) begin
      th   = 2.0 * 3.14159265358979323846 * real'(i) / real'(2 * HALF);
      t[i] = want_sin ? quant($sin(th)) : quant($cos(th));
    end
    return t;
  endfunction

  localparam rom_t COS_ROM = build(1'b0);
  localparam rom_t SIN_ROM = build(1'b1);

  assign {cos_one, cos_v} = COS_ROM[p];
  assign {sin_one, sin_v} = SIN_ROM[p];
endmodule
