// fft_stage: stage S (1 .. LOGN) of the radix-2 decimation-in-time pipeline.
//
// Input pairs arrive one per clock in the order left by stage S-1. A delay
// commutator with K = S-2 puts the two butterfly partners, 2^(S-1) apart in
// the bit-reversed sequence, into one pair. The lower sample is rotated by
// W_(2^S)^m, m = the pair's time index mod 2^(S-1), in a Vedic complex
// multiplier while the upper one waits one register; a butterfly then gives
// (a + W b)/2 and (a - W b)/2. Stage 1 needs neither commutator nor
// multiplier (all its twiddles are 1) and is the butterfly alone.
// Latency: 1 clock for S = 1, 2^(S-2) + 2 clocks otherwise. The radix-2
// butterfly with a Vedic twiddle multiplier follows the source article; the
// decimation-in-time order is this design's choice.
module fft_stage
  import fft_pkg::*;
#(
  parameter int LOGN = 8,
  parameter int S    = 2
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

  logic  bf_sof;
  cplx_t bf_a, bf_b;

  if (S == 1) begin : g_first
    assign bf_sof = in_sof;
    assign bf_a   = in0;
    assign bf_b   = in1;
  end else begin : g_rot
    logic            c_sof;
    cplx_t           c0, c1;
    logic [LOGT-1:0] cnt, pos;
    twid_t           w;

    delay_commutator #(.LOGT(LOGT), .K(S - 2)) u_comm (
      .clk, .rst_n, .in_sof, .in0, .in1,
      .out_sof(c_sof), .out0(c0), .out1(c1));

    assign pos = c_sof ? '0 : cnt;
    always_ff @(posedge clk) begin
      if (!rst_n) cnt <= '0;
      else        cnt <= pos + 1'b1;
    end

    twiddle_rom #(.LOGM(S)) u_rom (.addr(pos[S-2:0]), .w);

    cmul u_mul (.clk, .x(c1), .w, .y(bf_b));

    always_ff @(posedge clk) bf_a <= c0;

    always_ff @(posedge clk) begin
      if (!rst_n) bf_sof <= 1'b0;
      else        bf_sof <= c_sof;
    end
  end

  butterfly u_bf (.clk, .a(bf_a), .b(bf_b), .y0(out0), .y1(out1));

  always_ff @(posedge clk) begin
    if (!rst_n) out_sof <= 1'b0;
    else        out_sof <= bf_sof;
  end

  initial assert (1 <= S && S <= LOGN)
    else $error("fft_stage: need 1 <= S <= LOGN");
endmodule
