// butterfly: radix-2 butterfly (BF) with scaling by 1/2.
//
// y0 = (a + b) / 2 and y1 = (a - b) / 2 for the real and the imaginary
// parts, each rounded half up; the one result that would not fit in 16 bits,
// 65535/2 rounded up, is clipped to 32767. Over log2(N)
// stages the FFT output is therefore X(k)/N. One register at the output:
// y0 and y1 appear one clock after a and b. The sum/difference follows the
// document's BF; the scaling and the register are this design's choices.
module butterfly
  import fft_pkg::*;
(
  input  logic  clk,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t y0,
  output cplx_t y1
);
  function automatic data_t half(logic signed [DW:0] v);
    logic signed [DW+1:0] r;
    r = ((DW+2)'(v) + (DW+2)'(1)) >>> 1;
    // only (32767 - (-32768) + 1) / 2 can leave the 16-bit range
    if (r > (DW+2)'(2 ** (DW - 1) - 1)) return data_t'(2 ** (DW - 1) - 1);
    return data_t'(r);
  endfunction

  cplx_t s, d;
  always_comb begin
    s.re = half((DW+1)'(a.re) + (DW+1)'(b.re));
    s.im = half((DW+1)'(a.im) + (DW+1)'(b.im));
    d.re = half((DW+1)'(a.re) - (DW+1)'(b.re));
    d.im = half((DW+1)'(a.im) - (DW+1)'(b.im));
  end

  always_ff @(posedge clk) begin
    y0 <= s;
    y1 <= d;
  end
endmodule
