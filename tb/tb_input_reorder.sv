// tb_input_reorder: frames of index-tagged pairs (re = frame, im = sample
// index n) go through the default 256-point input reorder. Output pair m
// must hold x(bitrev(2m)) and x(bitrev(2m+1)) (8-bit reversal), with
// out_sof 113 clocks after in_sof and frames back to back.
`timescale 1ns/1ps
module tb_input_reorder;
  import fft_pkg::*;

  localparam int LOGN = 8, HALF = 128, NF = 3, LAT = 49 + 64;

  logic  clk = 1'b0, rst_n = 1'b0, in_sof = 1'b0, out_sof;
  cplx_t in0 = '0, in1 = '0, out0, out1;
  int checks = 0, failures = 0, cycle = 0, start = 0;

  input_reorder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int brev(int x);
    int r = 0;
    for (int i = 0; i < LOGN; i++) r |= ((x >> i) & 1) << (LOGN - 1 - i);
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < HALF; m++) begin
        @(negedge clk);
        in_sof = (m == 0);
        if (f == 0 && m == 0) start = cycle;
        in0.re = data_t'(f); in0.im = data_t'(2 * m);
        in1.re = data_t'(f); in1.im = data_t'(2 * m + 1);
      end
  end

  int p = -1, fr = 0;
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
      if (int'(out0.re) != fr || int'(out0.im) != brev(2 * p) ||
          int'(out1.re) != fr || int'(out1.im) != brev(2 * p + 1)) begin
        failures++;
        if (failures < 10) $display("FAIL pair %0d: (%0d,%0d) (%0d,%0d)", p, out0.re, out0.im, out1.re, out1.im);
      end
      if (++p == HALF) begin p = -1; fr++; end
    end
  end

  initial begin
    wait (fr == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NF * HALF + LAT + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
