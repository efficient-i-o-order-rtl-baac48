// vedic_mul_signed: W x W two's-complement multiplier around the unsigned
// Vedic multiplier.
//
// Both operands are converted to magnitudes (a W-bit magnitude holds even
// -2^(W-1)), multiplied by vedic_mul, and the 2W-bit product is negated when
// the operand signs differ. Combinational. The sign-magnitude wrapping is
// this design's choice; the source article does not say how signs are handled.
module vedic_mul_signed #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);
  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] mag_p;
  logic           neg;

  always_comb begin
    mag_a = a[W-1] ? W'(-a) : W'(a);
    mag_b = b[W-1] ? W'(-b) : W'(b);
    neg   = a[W-1] ^ b[W-1];
  end

  vedic_mul #(.W(W)) u_mul (.a(mag_a), .b(mag_b), .p(mag_p));

  assign p = neg ? -signed'(mag_p) : signed'(mag_p);
endmodule
