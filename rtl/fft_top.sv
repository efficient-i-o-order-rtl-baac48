// fft_top: N-point (N = 2^LOGN, 256 by default) radix-2 FFT with natural
// input and output order, two samples per clock, twiddle rotation by Vedic
// multipliers.
//
// Input: one pair x(2n), x(2n+1) per clock, frames of N/2 pairs back to
// back, in_sof high with the first pair of each frame. Output: pairs
// X(2k)/N, X(2k+1)/N, one per clock, out_sof high with X(0), X(1).
// Chain: input_reorder (bit reversal and N/4 delay commutator) ->
// fft_stage 1 .. LOGN (commutator, Vedic twiddle multiplier, butterfly) ->
// output_reorder. Latency from in_sof to out_sof, at N = 256:
// 113 + 1 + (127 + 2*7) + 64 = 319 clocks; in general
// (bit reversal delays) + N/4 + 1 + (N/2 - 1 + 2*(LOGN-1)) + N/4.
// The data stream never stops: a new frame follows the last pair of the
// previous one directly, and in_sof may only come on a frame boundary (an
// assertion checks this). The stream itself, the sof-based timing and the
// decimation-in-time order are this design's choices; the 256-point size,
// the 16-bit samples, the Vedic multipliers, the delay commutator, the
// bit-reversal delays and the X(2k), X(2k+1) output order follow the source
// article.
module fft_top
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
  logic  sof [LOGN+1];
  cplx_t d0  [LOGN+1];
  cplx_t d1  [LOGN+1];

  input_reorder #(.LOGN(LOGN)) u_in (
    .clk, .rst_n, .in_sof, .in0, .in1,
    .out_sof(sof[0]), .out0(d0[0]), .out1(d1[0]));

  for (genvar s = 1; s <= LOGN; s++) begin : g_stage
    fft_stage #(.LOGN(LOGN), .S(s)) u_stage (
      .clk, .rst_n, .in_sof(sof[s-1]), .in0(d0[s-1]), .in1(d1[s-1]),
      .out_sof(sof[s]), .out0(d0[s]), .out1(d1[s]));
  end

  output_reorder #(.LOGN(LOGN)) u_out (
    .clk, .rst_n, .in_sof(sof[LOGN]), .in0(d0[LOGN]), .in1(d1[LOGN]),
    .out_sof, .out0, .out1);

  // Interface rule: once frames have started, in_sof may only come N/2
  // clocks after the previous one (or a multiple of that). Every unit keeps
  // its own frame counter, so a misplaced in_sof would scramble the frames
  // still in flight.
  logic [LOGN-2:0] in_pos;
  logic            started;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started <= 1'b0;
      in_pos  <= '0;
    end else begin
      if (in_sof) started <= 1'b1;
      in_pos <= (in_sof ? '0 : in_pos) + 1'b1;
    end
  end

  a_sof_on_frame_boundary: assert property (
    @(posedge clk) disable iff (!rst_n) (started && in_sof) |-> (in_pos == '0))
    else $error("fft_top: in_sof not on a frame boundary");

  initial assert (LOGN >= 3) else $error("fft_top: LOGN must be >= 3");
endmodule
