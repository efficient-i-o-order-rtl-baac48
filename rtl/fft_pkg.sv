// fft_pkg: types and constants shared by the FFT datapath.
//
// Samples are complex numbers with 16-bit signed real and imaginary parts
// (the 16-bit input width follows the source article). Twiddle factors use the same
// 16-bit width with 14 fraction bits (Q2.14), so that +1.0 = 16384 is exact;
// the twiddle format is this design's own choice.
package fft_pkg;

  localparam int DW     = 16;  // data width of re and im
  localparam int TW     = 16;  // twiddle width of re and im
  localparam int TW_FRAC = TW - 2;  // fraction bits of a twiddle

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [TW-1:0] tw_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } twid_t;

endpackage
