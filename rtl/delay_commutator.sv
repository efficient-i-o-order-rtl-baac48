// delay_commutator: two-lane delay commutator that exchanges the lane bit
// with time bit K of a stream of sample pairs (2^LOGT pairs per frame).
//
// The lower lane is delayed by 2^K clocks, a 2x2 switch crosses the two
// lanes while time bit K of the entering pair is 1, and the upper switch
// output is delayed by 2^K clocks. Of four samples (lane p, time bit
// t_K) the output holds (p=0,t=0),(p=0,t=1) in one pair and
// (p=1,t=0),(p=1,t=1) 2^K clocks later. Latency 2^K clocks, also for
// out_sof. The delay - SW - delay structure follows the source article; the
// switch select is this design's derivation.
module delay_commutator
  import fft_pkg::*;
#(
  parameter int LOGT = 7,
  parameter int K    = 6
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
  localparam int L = 2 ** K;

  logic [LOGT-1:0] cnt, pos;
  logic            sel;
  cplx_t           low_d, s0;

  assign pos = in_sof ? '0 : cnt;
  assign sel = pos[K];

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= pos + 1'b1;
  end

  delay_line #(.W($bits(cplx_t)), .L(L)) u_low (
    .clk, .rst_n, .d(in1), .q(low_d));

  sw u_sw (.sel, .i0(in0), .i1(low_d), .o0(s0), .o1(out1));

  delay_line #(.W($bits(cplx_t)), .L(L)) u_up (
    .clk, .rst_n, .d(s0), .q(out0));
  delay_line #(.W(1), .L(L), .RESET(1'b1)) u_sof (
    .clk, .rst_n, .d(in_sof), .q(out_sof));

  initial assert (0 <= K && K < LOGT)
    else $error("delay_commutator: need 0 <= K < LOGT");
endmodule
