// tb_butterfly: random and extreme inputs; checks y0 = round((a+b)/2) and
// y1 = round((a-b)/2) (halves rounded up, clipped to 32767) one clock later.
`timescale 1ns/1ps
module tb_butterfly;
  import fft_pkg::*;

  logic  clk = 1'b0;
  cplx_t a, b, y0, y1;
  int checks = 0, failures = 0;

  butterfly dut (.*);
  always #5 clk = ~clk;

  function automatic int half(int v);
    int r = $rtoi($floor(real'(v) / 2.0 + 0.5));
    return r > 32767 ? 32767 : r;
  endfunction

  task automatic check(int ar, int ai, int br, int bi);
    @(negedge clk);
    a.re = data_t'(ar); a.im = data_t'(ai);
    b.re = data_t'(br); b.im = data_t'(bi);
    @(negedge clk);
    checks++;
    if (int'(y0.re) != half(ar + br) || int'(y0.im) != half(ai + bi) ||
        int'(y1.re) != half(ar - br) || int'(y1.im) != half(ai - bi)) begin
      failures++;
      if (failures < 10) $display("FAIL a=(%0d,%0d) b=(%0d,%0d): (%0d,%0d) (%0d,%0d)",
                                  ar, ai, br, bi, y0.re, y0.im, y1.re, y1.im);
    end
  endtask

  initial begin
    check(32767, 32767, 32767, 32767);
    check(-32768, -32768, -32768, -32768);
    check(32767, -32768, -32768, 32767);
    check(3, -3, 0, 0);
    for (int n = 0; n < 1000; n++)
      check(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
