// bit_exchange: one-lane circuit that swaps two bits, t_I and t_J (I < J),
// of the time index of a continuous sample stream.
//
// A frame has 2^LOGT samples, one per clock, the first one marked by
// in_sof. Samples with t_J = 0, t_I = 1 must trade places with the samples
// L = 2^J - 2^I later, which have t_J = 1, t_I = 0. The cell is a delay of
// L registers between two multiplexers: normally a sample goes through the
// delay; when a (t_J = 1, t_I = 0) sample arrives it bypasses the delay to
// the output, and the sample leaving the delay at that moment is fed back
// into it, so it waits a second L cycles. Latency is L clocks for the data
// and for out_sof. The mux - delay - mux cell and its delays follow the
// block diagrams; the mux control is this design's own derivation.
module bit_exchange
  import fft_pkg::*;
#(
  parameter int LOGT = 7,
  parameter int I    = 0,
  parameter int J    = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_sof,
  input  cplx_t d,
  output logic  out_sof,
  output cplx_t q
);
  localparam int L = 2 ** J - 2 ** I;

  logic [LOGT-1:0] cnt, pos;
  logic            byp;
  cplx_t           din, dout;

  assign pos = in_sof ? '0 : cnt;
  assign byp = pos[J] & ~pos[I];

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= pos + 1'b1;
  end

  assign din = byp ? dout : d;
  assign q   = byp ? d : dout;

  delay_line #(.W($bits(cplx_t)), .L(L)) u_data (
    .clk, .rst_n, .d(din), .q(dout));
  delay_line #(.W(1), .L(L), .RESET(1'b1)) u_sof (
    .clk, .rst_n, .d(in_sof), .q(out_sof));

  initial assert (0 <= I && I < J && J < LOGT)
    else $error("bit_exchange: need 0 <= I < J < LOGT");
endmodule
