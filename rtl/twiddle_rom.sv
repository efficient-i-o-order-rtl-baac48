// twiddle_rom: constant table of the twiddle factors of an M-point stage,
// W_M^m = cos(2*pi*m/M) - j*sin(2*pi*m/M) for m = 0 .. M/2-1, M = 2^LOGM.
//
// The table is computed at elaboration by a constant function and read
// combinationally (it becomes a small LUT-based ROM). Values are in Q2.14,
// rounded to nearest. The document names twiddle factors but gives neither
// their format nor how they are stored; both are this design's choice.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int LOGM = 8
) (
  input  logic [LOGM-2:0] addr,
  output twid_t           w
);
  localparam int  HALF  = 2 ** (LOGM - 1);
  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = real'(2 ** TW_FRAC);

  function automatic tw_t quant(real x);
    real s;
    s = x * SCALE;
    return tw_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic twid_t [HALF-1:0] build();
    twid_t [HALF-1:0] t;
    for (int m = 0; m < HALF; m++) begin
      t[m].re = quant($cos(2.0 * PI * real'(m) / real'(2 * HALF)));
      t[m].im = quant(-$sin(2.0 * PI * real'(m) / real'(2 * HALF)));
    end
    return t;
  endfunction

  localparam twid_t [HALF-1:0] TABLE = build();

  assign w = TABLE[addr];

  initial assert (LOGM >= 2) else $error("twiddle_rom: LOGM must be >= 2");
endmodule
