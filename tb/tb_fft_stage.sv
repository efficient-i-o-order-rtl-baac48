// tb_fft_stage: random frames of 128 pairs through three decimation-in-
// time stages of a 256-point pipeline, S = 1, the default S = 2 and S = 6,
// all fed the same input. For each output time t the expected pair is
// worked out from the input: the commutator exchange (lane <-> time bit
// S-2), the twiddle W_(2^S)^(t mod 2^(S-1)) in real arithmetic, and the
// halved sum and difference. Allowed error: 2 LSB. Latency must be 1 clock
// for S = 1 and 2^(S-2) + 2 clocks otherwise.
`timescale 1ns/1ps
module tb_fft_stage;
  import fft_pkg::*;
  localparam int T = 128, NF = 3;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0, rst_n = 1'b0, in_sof = 1'b0;
  cplx_t in0 = '0, in1 = '0;
  logic  sof1, sof2, sof6;
  cplx_t a1, b1, a2, b2, a6, b6;
  int checks = 0, failures = 0, cycle = 0, start = 0;
  int xr [NF][T][2], xi [NF][T][2];

  fft_stage #(.S(1)) dut1 (.clk, .rst_n, .in_sof, .in0, .in1, .out_sof(sof1), .out0(a1), .out1(b1));
  fft_stage          dut  (.clk, .rst_n, .in_sof, .in0, .in1, .out_sof(sof2), .out0(a2), .out1(b2));
  fft_stage #(.S(6)) dut6 (.clk, .rst_n, .in_sof, .in0, .in1, .out_sof(sof6), .out0(a6), .out1(b6));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < T; t++)
        for (int p = 0; p < 2; p++) begin
          xr[f][t][p] = int'($urandom_range(32766)) - 16383;
          xi[f][t][p] = int'($urandom_range(32766)) - 16383;
        end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < T; t++) begin
        @(negedge clk);
        in_sof = (t == 0);
        if (f == 0 && t == 0) start = cycle;
        in0.re = data_t'(xr[f][t][0]); in0.im = data_t'(xi[f][t][0]);
        in1.re = data_t'(xr[f][t][1]); in1.im = data_t'(xi[f][t][1]);
      end
  end

  function automatic int absdiff(real a, int b);
    real d = a - real'(b);
    return $rtoi(d < 0.0 ? -d : d);
  endfunction

  task automatic check(int s, int f, int t, cplx_t ya, cplx_t yb);
    int   k = s - 2, t0, t1, l0, l1;
    real  ar, ai, br, bi, wr, wi, mr, mi, ang;
    if (s == 1) begin
      t0 = t; l0 = 0; t1 = t; l1 = 1;
      wr = 1.0; wi = 0.0;
    end else begin
      t0 = (t & ~(1 << k));            l0 = (t >> k) & 1;
      t1 = (t & ~(1 << k)) | (1 << k); l1 = (t >> k) & 1;
      ang = 2.0 * PI * real'(t % (2 ** (s - 1))) / real'(2 ** s);
      wr = $cos(ang); wi = -$sin(ang);
    end
    ar = xr[f][t0][l0]; ai = xi[f][t0][l0];
    br = xr[f][t1][l1]; bi = xi[f][t1][l1];
    mr = br * wr - bi * wi;
    mi = br * wi + bi * wr;
    checks++;
    if (absdiff((ar + mr) / 2.0, int'(ya.re)) > 2 || absdiff((ai + mi) / 2.0, int'(ya.im)) > 2 ||
        absdiff((ar - mr) / 2.0, int'(yb.re)) > 2 || absdiff((ai - mi) / 2.0, int'(yb.im)) > 2) begin
      failures++;
      if (failures < 10) $display("FAIL S=%0d t=%0d", s, t);
    end
  endtask

  int p1 = -1, p2 = -1, p6 = -1, f1 = 0, f2 = 0, f6 = 0;
  always @(negedge clk) if (rst_n) begin
    if (sof1) begin p1 = 0; if (f1 == 0) begin checks++; if (cycle - start != 1) begin failures++; $display("FAIL latency S=1"); end end end
    if (sof2) begin p2 = 0; if (f2 == 0) begin checks++; if (cycle - start != 3) begin failures++; $display("FAIL latency S=2"); end end end
    if (sof6) begin p6 = 0; if (f6 == 0) begin checks++; if (cycle - start != 18) begin failures++; $display("FAIL latency S=6"); end end end
    if (p1 >= 0 && f1 < NF) begin check(1, f1, p1, a1, b1); if (++p1 == T) begin p1 = -1; f1++; end end
    if (p2 >= 0 && f2 < NF) begin check(2, f2, p2, a2, b2); if (++p2 == T) begin p2 = -1; f2++; end end
    if (p6 >= 0 && f6 < NF) begin check(6, f6, p6, a6, b6); if (++p6 == T) begin p6 = -1; f6++; end end
  end

  initial begin
    wait (f1 == NF && f2 == NF && f6 == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (NF * T + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
