// tb_bit_exchange: streams frames of position-tagged samples (re = frame,
// im = time index) through two exchange cells, the default one (swapping
// time bits 0 and 5 of a 128-sample frame, delay 31) and a small one
// (bits 1 and 2 of 16, delay 2). Output position t must hold the input
// sample whose index is t with the two bits swapped, with out_sof exactly
// L clocks after in_sof.
`timescale 1ns/1ps
module tb_bit_exchange;
  import fft_pkg::*;

  localparam int NF = 4;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  sof_a = 1'b0, sof_b = 1'b0, osof_a, osof_b;
  cplx_t d_a = '0, d_b = '0, q_a, q_b;
  int checks = 0, failures = 0, cycle = 0;

  bit_exchange                             dut_a (.clk, .rst_n, .in_sof(sof_a), .d(d_a), .out_sof(osof_a), .q(q_a));
  bit_exchange #(.LOGT(4), .I(1), .J(2))   dut_b (.clk, .rst_n, .in_sof(sof_b), .d(d_b), .out_sof(osof_b), .q(q_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int swp(int t, int i, int j);
    int bi = (t >> i) & 1, bj = (t >> j) & 1;
    return (t & ~((1 << i) | (1 << j))) | (bi << j) | (bj << i);
  endfunction

  int start_a, start_b;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int f = 0; f < NF; f++)
        for (int t = 0; t < 128; t++) begin
          @(negedge clk);
          sof_a = (t == 0);
          if (f == 0 && t == 0) start_a = cycle;
          d_a.re = data_t'(f); d_a.im = data_t'(t);
        end
      for (int f = 0; f < NF; f++)
        for (int t = 0; t < 16; t++) begin
          @(negedge clk);
          sof_b = (t == 0);
          if (f == 0 && t == 0) start_b = cycle;
          d_b.re = data_t'(f); d_b.im = data_t'(t);
        end
    join_none
  end

  int pa = -1, fa = 0, pb = -1, fb = 0;
  always @(negedge clk) if (rst_n) begin
    if (osof_a) begin
      pa = 0;
      if (fa == 0) begin checks++; if (cycle - start_a != 31) begin failures++; $display("FAIL latency a %0d", cycle - start_a); end end
    end
    if (pa >= 0 && fa < NF) begin
      checks++;
      if (int'(q_a.re) != fa || int'(q_a.im) != swp(pa, 0, 5)) begin
        failures++; $display("FAIL a pos %0d: (%0d,%0d)", pa, q_a.re, q_a.im);
      end
      if (++pa == 128) begin pa = -1; fa++; end
    end
    if (osof_b) begin
      pb = 0;
      if (fb == 0) begin checks++; if (cycle - start_b != 2) begin failures++; $display("FAIL latency b %0d", cycle - start_b); end end
    end
    if (pb >= 0 && fb < NF) begin
      checks++;
      if (int'(q_b.re) != fb || int'(q_b.im) != swp(pb, 1, 2)) begin
        failures++; $display("FAIL b pos %0d: (%0d,%0d)", pb, q_b.re, q_b.im);
      end
      if (++pb == 16) begin pb = -1; fb++; end
    end
  end

  initial begin
    wait (fa == NF && fb == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NF * 128 + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
