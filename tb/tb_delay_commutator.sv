// tb_delay_commutator: index-tagged pairs (lane 0 = index 2t, lane 1 =
// index 2t+1, so the index is {t, lane}) through the default commutator
// (K = 6, 128 pairs per frame). After it, the pair at time t' must hold the
// indices with the lane bit and time bit 6 exchanged; out_sof 64 clocks
// after in_sof.
`timescale 1ns/1ps
module tb_delay_commutator;
  import fft_pkg::*;
  localparam int T = 128, NF = 3, K = 6, LAT = 64;

  logic  clk = 1'b0, rst_n = 1'b0, in_sof = 1'b0, out_sof;
  cplx_t in0 = '0, in1 = '0, out0, out1;
  int checks = 0, failures = 0, cycle = 0, start = 0;

  delay_commutator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // index held at output time t, lane p
  function automatic int want(int t, int p);
    int tk = (t >> K) & 1;
    int tt = (t & ~(1 << K)) | (p << K);
    return 2 * tt + tk;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < T; t++) begin
        @(negedge clk);
        in_sof = (t == 0);
        if (f == 0 && t == 0) start = cycle;
        in0.re = data_t'(f); in0.im = data_t'(2 * t);
        in1.re = data_t'(f); in1.im = data_t'(2 * t + 1);
      end
  end

  int p = -1, fr = 0, swaps = 0;
  always @(posedge clk) if (rst_n && dut.sel) swaps++;
  always @(negedge clk) if (rst_n) begin
    if (out_sof) begin
      p = 0;
      if (fr == 0) begin
        checks++;
        if (cycle - start != LAT) begin failures++; $display("FAIL latency %0d", cycle - start); end
      end
    end
    if (p >= 0 && fr < NF) begin
      checks++;
      if (int'(out0.re) != fr || int'(out0.im) != want(p, 0) ||
          int'(out1.re) != fr || int'(out1.im) != want(p, 1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: %0d %0d", p, out0.im, out1.im);
      end
      if (++p == T) begin p = -1; fr++; end
    end
  end

  initial begin
    wait (fr == NF);
    checks++;
    if (swaps == 0) begin failures++; $display("FAIL switch never crossed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NF * T + LAT + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
