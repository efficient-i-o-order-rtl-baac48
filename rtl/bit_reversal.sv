// bit_reversal: one-lane circuit that reverses the low LOGN-2 bits of the
// time index of a frame of N/2 samples (N = 2^LOGN, one sample per clock).
//
// It is a cascade of bit_exchange cells; cell k swaps time bits k and
// LOGN-3-k and has a delay of N/(8*2^k) - 2^k (31, 14 and 4 for N = 256),
// two multiplexers per cell. These delays follow the source article's bit-reversal
// cascade. Latency is the sum of the cell delays (49 clocks at N = 256).
// With an odd LOGN-2 the middle bit stays in place.
module bit_reversal
  import fft_pkg::*;
#(
  parameter int LOGN = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_sof,
  input  cplx_t d,
  output logic  out_sof,
  output cplx_t q
);
  localparam int LOGT = LOGN - 1;
  localparam int NX   = (LOGN - 2) / 2;  // number of exchange cells

  logic  sof [NX+1];
  cplx_t dat [NX+1];

  assign sof[0] = in_sof;
  assign dat[0] = d;

  for (genvar k = 0; k < NX; k++) begin : g_cell
    bit_exchange #(.LOGT(LOGT), .I(k), .J(LOGN - 3 - k)) u_x (
      .clk, .rst_n, .in_sof(sof[k]), .d(dat[k]),
      .out_sof(sof[k+1]), .q(dat[k+1]));
  end

  assign out_sof = sof[NX];
  assign q       = dat[NX];
endmodule
