// tb_bit_reversal: index-tagged frames of 128 samples through the default
// (N = 256) cascade. Output position t must hold the input sample whose
// index is t with its low 6 bits reversed (bit 6 unchanged); out_sof must
// come 31 + 14 + 4 = 49 clocks after in_sof.
`timescale 1ns/1ps
module tb_bit_reversal;
  import fft_pkg::*;
  localparam int T = 128, NF = 3, LAT = 49;

  logic  clk = 1'b0, rst_n = 1'b0, in_sof = 1'b0, out_sof;
  cplx_t d = '0, q;
  int checks = 0, failures = 0, cycle = 0, start = 0;

  bit_reversal dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int rev6(int t);
    int r = t & 64;
    for (int i = 0; i < 6; i++) r |= ((t >> i) & 1) << (5 - i);
    return r;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < T; t++) begin
        @(negedge clk);
        in_sof = (t == 0);
        if (f == 0 && t == 0) start = cycle;
        d.re = data_t'(f); d.im = data_t'(t);
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
      if (int'(q.re) != fr || int'(q.im) != rev6(p)) begin
        failures++;
        if (failures < 10) $display("FAIL pos %0d: (%0d,%0d)", p, q.re, q.im);
      end
      if (++p == T) begin p = -1; fr++; end
    end
  end

  initial begin
    wait (fr == NF);
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
