// sw: 2x2 switch (SW). With sel = 0 the lanes pass straight through
// (o0 = i0, o1 = i1); with sel = 1 they cross (o0 = i1, o1 = i0).
// Combinational. The select polarity is this design's choice.
module sw
  import fft_pkg::*;
(
  input  logic  sel,
  input  cplx_t i0,
  input  cplx_t i1,
  output cplx_t o0,
  output cplx_t o1
);
  assign o0 = sel ? i1 : i0;
  assign o1 = sel ? i0 : i1;
endmodule
