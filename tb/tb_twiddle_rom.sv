// tb_twiddle_rom: every entry of the default 256-point table and of an
// 8-point table against cos/-sin in Q2.14, within one LSB.
`timescale 1ns/1ps
module tb_twiddle_rom;
  import fft_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic [6:0] addr8;
  logic [1:0] addr3;
  twid_t      w8, w3;
  int checks = 0, failures = 0;

  twiddle_rom               dut8 (.addr(addr8), .w(w8));
  twiddle_rom #(.LOGM(3))   dut3 (.addr(addr3), .w(w3));

  task automatic cmp(int m, int M, twid_t w);
    real c = 16384.0 * $cos(2.0 * PI * m / M);
    real s = -16384.0 * $sin(2.0 * PI * m / M);
    checks++;
    if ((real'(w.re) - c) > 1.0 || (c - real'(w.re)) > 1.0 ||
        (real'(w.im) - s) > 1.0 || (s - real'(w.im)) > 1.0) begin
      failures++;
      $display("FAIL W_%0d^%0d = (%0d,%0d) want (%f,%f)", M, m, w.re, w.im, c, s);
    end
  endtask

  initial begin
    for (int m = 0; m < 128; m++) begin
      addr8 = 7'(m);
      #1 cmp(m, 256, w8);
    end
    for (int m = 0; m < 4; m++) begin
      addr3 = 2'(m);
      #1 cmp(m, 8, w3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
