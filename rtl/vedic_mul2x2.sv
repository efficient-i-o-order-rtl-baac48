// vedic_mul2x2: 2x2-bit unsigned multiplier, the basic cell of the
// Urdhva-Tiryagbhyam ("vertically and crosswise") multiplier.
//
// Vertical products a0*b0 and a1*b1 and the two crosswise products a1*b0,
// a0*b1 are formed with AND gates; the crosswise pair is summed by a half
// adder, whose carry joins a1*b1 in a second half adder. Purely
// combinational. The document draws this cell only as a box; the gates are
// the usual 2x2 Urdhva cell.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic v0, v1, c0, c1, k;

  always_comb begin
    v0   = a[0] & b[0];          // vertical, bit 0
    v1   = a[1] & b[1];          // vertical, bit 2 weight
    c0   = a[1] & b[0];          // crosswise
    c1   = a[0] & b[1];          // crosswise
    k    = c0 & c1;              // carry of the crosswise half adder
    p[0] = v0;
    p[1] = c0 ^ c1;
    p[2] = v1 ^ k;
    p[3] = v1 & k;
  end
endmodule
