// cmul: complex multiplier (twiddle rotator) built on Vedic multipliers.
//
// y = x * w with x a 16-bit complex sample and w a Q2.14 twiddle:
//   re = x.re*w.re - x.im*w.im,  im = x.re*w.im + x.im*w.re.
// The four real products come from four signed Vedic multipliers. Each sum
// is rounded to nearest, shifted right by the 14 twiddle fraction bits and
// saturated to 16 bits. One register at the output: y appears one clock
// after x and w. Using Vedic multipliers follows the source article; the
// four-multiplier form, rounding and saturation are this design's choices.
module cmul
  import fft_pkg::*;
(
  input  logic  clk,
  input  cplx_t x,
  input  twid_t w,
  output cplx_t y
);
  localparam int PW = DW + TW;  // width of one real product

  logic signed [PW-1:0] p_rr, p_ii, p_ri, p_ir;

  vedic_mul_signed #(.W(DW)) u_rr (.a(x.re), .b(w.re), .p(p_rr));
  vedic_mul_signed #(.W(DW)) u_ii (.a(x.im), .b(w.im), .p(p_ii));
  vedic_mul_signed #(.W(DW)) u_ri (.a(x.re), .b(w.im), .p(p_ri));
  vedic_mul_signed #(.W(DW)) u_ir (.a(x.im), .b(w.re), .p(p_ir));

  function automatic data_t round_sat(logic signed [PW:0] v);
    logic signed [PW:0] r;
    r = (v + (PW+1)'(2 ** (TW_FRAC - 1))) >>> TW_FRAC;
    if (r > (PW+1)'(2 ** (DW - 1) - 1))         return data_t'(2 ** (DW - 1) - 1);
    else if (r < -(PW+1)'(2 ** (DW - 1)))       return data_t'(-(2 ** (DW - 1)));
    else                                        return data_t'(r);
  endfunction

  cplx_t y_d;
  always_comb begin
    y_d.re = round_sat((PW+1)'(p_rr) - (PW+1)'(p_ii));
    y_d.im = round_sat((PW+1)'(p_ri) + (PW+1)'(p_ir));
  end

  always_ff @(posedge clk) y <= y_d;
endmodule
