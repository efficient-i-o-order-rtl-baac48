// input_reorder: brings natural-order input pairs x(2n), x(2n+1) into the
// bit-reversed order that the decimation-in-time stages need.
//
// Each lane first goes through a bit_reversal cascade (reversing time bits
// 0 .. LOGN-3), then a delay commutator with K = LOGN-2 exchanges the lane
// bit with the top time bit. Pair m of the output frame then holds
// x(bitrev(2m)) and x(bitrev(2m+1)). Latency: the bit_reversal delay plus
// N/4 clocks (49 + 64 = 113 at N = 256). The bit-reversal cascade and the
// N/4 delay commutator follow the source article; splitting them into a per-lane
// cascade followed by the commutator is this design's arrangement.
module input_reorder
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
  logic  r_sof, r_sof_unused;
  cplx_t r0, r1;

  bit_reversal #(.LOGN(LOGN)) u_rev0 (
    .clk, .rst_n, .in_sof, .d(in0), .out_sof(r_sof), .q(r0));
  bit_reversal #(.LOGN(LOGN)) u_rev1 (
    .clk, .rst_n, .in_sof, .d(in1), .out_sof(r_sof_unused), .q(r1));

  delay_commutator #(.LOGT(LOGN - 1), .K(LOGN - 2)) u_comm (
    .clk, .rst_n, .in_sof(r_sof), .in0(r0), .in1(r1),
    .out_sof, .out0, .out1);
endmodule
