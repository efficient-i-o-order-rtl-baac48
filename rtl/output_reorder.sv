// output_reorder: turns the last stage's pairs X(k), X(k+N/2) into
// natural-order pairs X(2k), X(2k+1).
//
// A delay commutator with K = 0 makes the lane bit the frequency LSB; a
// cascade of bit_exchange cells on each lane, swapping time bits (0,1),
// (1,2), ..., (LOGN-3, LOGN-2) with delays 1, 2, 4, ..., then rotates the
// remaining time bits into place. Latency N/4 clocks (64 at N = 256). The
// X(2k), X(2k+1) output order follows the source article; the way it is reached
// is this design's own.
module output_reorder
  import fft_pkg::*;
#(
  parameter int LOGN = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_sof,
  input  cplx_t in0,
  input  cplx_t in1,
  output logic  out_sof,
  output cplx_t out0,
  output cplx_t out1
);
  localparam int LOGT = LOGN - 1;
  localparam int NX   = LOGN - 2;

  logic  sof [NX+1];
  cplx_t d0 [NX+1];
  cplx_t d1 [NX+1];

  delay_commutator #(.LOGT(LOGT), .K(0)) u_comm (
    .clk, .rst_n, .in_sof, .in0, .in1,
    .out_sof(sof[0]), .out0(d0[0]), .out1(d1[0]));

  for (genvar j = 0; j < NX; j++) begin : g_rot
    logic sof_unused;
    bit_exchange #(.LOGT(LOGT), .I(j), .J(j + 1)) u_x0 (
      .clk, .rst_n, .in_sof(sof[j]), .d(d0[j]),
      .out_sof(sof[j+1]), .q(d0[j+1]));
    bit_exchange #(.LOGT(LOGT), .I(j), .J(j + 1)) u_x1 (
      .clk, .rst_n, .in_sof(sof[j]), .d(d1[j]),
      .out_sof(sof_unused), .q(d1[j+1]));
  end

  assign out_sof = sof[NX];
  assign out0    = d0[NX];
  assign out1    = d1[NX];
endmodule
