// tb_cmul: random complex samples times random Q2.14 twiddles of unit
// magnitude, compared one clock later with round(x*w) worked out in real
// arithmetic; also a saturation corner.
`timescale 1ns/1ps
module tb_cmul;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0;
  cplx_t x, y;
  twid_t w;
  int checks = 0, failures = 0;

  cmul dut (.*);
  always #5 clk = ~clk;

  function automatic int sat(real v);
    real r = $floor(v + 0.5);
    if (r > 32767.0) return 32767;
    if (r < -32768.0) return -32768;
    return $rtoi(r);
  endfunction

  task automatic check(int xr, int xi, int wr, int wi);
    int er, ei;
    @(negedge clk);
    x.re = data_t'(xr); x.im = data_t'(xi);
    w.re = tw_t'(wr);   w.im = tw_t'(wi);
    er = sat((real'(xr) * wr - real'(xi) * wi) / 16384.0);
    ei = sat((real'(xr) * wi + real'(xi) * wr) / 16384.0);
    @(negedge clk);
    checks++;
    if (int'(y.re) != er || int'(y.im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d)*(%0d,%0d) = (%0d,%0d) want (%0d,%0d)",
                                  xr, xi, wr, wi, y.re, y.im, er, ei);
    end
  endtask

  initial begin
    check(1000, -2000, 16384, 0);
    check(32767, 32767, 11585, -11585);    // 45 degrees: the real part saturates
    check(-32768, -32768, 11585, 11585);
    check(12345, 0, 0, -16384);
    for (int n = 0; n < 1000; n++) begin
      real a;
      a = 2.0 * PI * real'($urandom_range(1023)) / 1024.0;
      check(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            $rtoi($floor(16384.0 * $cos(a) + 0.5)), $rtoi($floor(-16384.0 * $sin(a) + 0.5)));
    end
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
