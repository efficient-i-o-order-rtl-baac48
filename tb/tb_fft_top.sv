// tb_fft_top: end-to-end test of fft_top at a reduced size (N = 32).
//
// Streams NF frames back to back: random data, an impulse, a complex tone
// of amplitude 16000 and more random frames.
// Each output frame is compared with a double-precision DFT of its input,
// divided by N as the design scales, within TOL LSB per component. The
// latency from in_sof to out_sof is checked against the pipeline formula,
// and out_sof must recur every N/2 clocks. Coverage counters confirm that
// the bit-exchange bypass/recirculation, the commutator lane swap and
// non-trivial twiddle rotations all happened.
`timescale 1ns/1ps
module tb_fft_top;
  import fft_pkg::*;

  localparam int LOGN = 5;
  localparam int N    = 2 ** LOGN;
  localparam int HALF = N / 2;
  localparam int NF   = 6;
  localparam int TOL  = 3;
  localparam real PI  = 3.14159265358979323846;

  function automatic int exp_latency();
    int l = 0;
    for (int k = 0; k < (LOGN - 2) / 2; k++) l += 2 ** (LOGN - 3 - k) - 2 ** k;
    l += N / 4;                                      // input commutator
    l += 1;                                          // stage 1
    for (int s = 2; s <= LOGN; s++) l += 2 ** (s - 2) + 2;
    l += N / 4;                                      // output reorder
    return l;
  endfunction

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_sof = 1'b0, out_sof;
  cplx_t in0 = '0, in1 = '0, out0, out1;

  fft_top #(.LOGN(LOGN)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int xr [NF][N], xi [NF][N];
  real rr [NF][N], ri [NF][N];
  int in_sof_cycle [NF];
  int out_frames = 0, last_out_sof = -1, max_err = 0;
  int cov_bypass = 0, cov_swap = 0, cov_rot = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // stimulus and reference
  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N; i++) begin
        case (f)
          1: begin xr[f][i] = (i == 3) ? 20000 : 0; xi[f][i] = (i == 3) ? -12000 : 0; end
          2: begin
               xr[f][i] = $rtoi(16000.0 * $cos(2.0 * PI * 5.0 * i / N));
               xi[f][i] = $rtoi(16000.0 * $sin(2.0 * PI * 5.0 * i / N));
             end
          default: begin
               xr[f][i] = int'($urandom_range(32766)) - 16383;
               xi[f][i] = int'($urandom_range(32766)) - 16383;
             end
        endcase
      end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < N; k++) begin
        real sr, si, c, s;
        sr = 0.0;
        si = 0.0;
        for (int i = 0; i < N; i++) begin
          c = $cos(2.0 * PI * real'((i * k) % N) / N);
          s = $sin(2.0 * PI * real'((i * k) % N) / N);
          sr += xr[f][i] * c + xi[f][i] * s;
          si += xi[f][i] * c - xr[f][i] * s;
        end
        rr[f][k] = sr / N;
        ri[f][k] = si / N;
      end
  end

  task automatic cmp(int f, int k, cplx_t y);
    int er, ei;
    er = int'(y.re) - $rtoi(rr[f][k] + (rr[f][k] >= 0 ? 0.5 : -0.5));
    ei = int'(y.im) - $rtoi(ri[f][k] + (ri[f][k] >= 0 ? 0.5 : -0.5));
    er = er < 0 ? -er : er;
    ei = ei < 0 ? -ei : ei;
    if (er > max_err) max_err = er;
    if (ei > max_err) max_err = ei;
    checks++;
    if (er > TOL || ei > TOL) begin
      failures++;
      if (failures < 10)
        $display("FAIL frame %0d X(%0d): got (%0d,%0d) want (%f,%f)", f, k, int'(y.re), int'(y.im), rr[f][k], ri[f][k]);
    end
  endtask

  // drive on the falling edge
  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < HALF; m++) begin
        @(negedge clk);
        in_sof = (m == 0);
        if (m == 0) in_sof_cycle[f] = cycle;
        in0.re = data_t'(xr[f][2*m]);   in0.im = data_t'(xi[f][2*m]);
        in1.re = data_t'(xr[f][2*m+1]); in1.im = data_t'(xi[f][2*m+1]);
      end
    @(negedge clk);
    in_sof = 1'b0; in0 = '0; in1 = '0;
  end

  // monitor on the falling edge
  int pos = -1;
  always @(negedge clk) if (rst_n) begin
    if (out_sof) begin
      if (out_frames < NF) begin
        checks++;
        if (cycle - in_sof_cycle[out_frames] != exp_latency()) begin
          failures++;
          $display("FAIL latency frame %0d: %0d, expected %0d", out_frames,
                   cycle - in_sof_cycle[out_frames], exp_latency());
        end
      end
      if (last_out_sof >= 0) begin
        checks++;
        if (cycle - last_out_sof != HALF) begin
          failures++;
          $display("FAIL out_sof spacing %0d", cycle - last_out_sof);
        end
      end
      last_out_sof = cycle;
      pos = 0;
    end
    if (pos >= 0 && out_frames < NF) begin
      cmp(out_frames, 2 * pos, out0);
      cmp(out_frames, 2 * pos + 1, out1);
      pos++;
      if (pos == HALF) begin
        pos = -1;
        out_frames++;
      end
    end
  end

  // coverage of the mechanisms
  always @(posedge clk) if (rst_n) begin
    if (dut.u_in.u_rev0.g_cell[0].u_x.byp) cov_bypass++;
    if (dut.u_in.u_comm.sel) cov_swap++;
    if (dut.g_stage[LOGN].u_stage.g_rot.w.im != 0) cov_rot++;
  end

  initial begin
    wait (out_frames == NF);
    repeat (2) @(negedge clk);
    checks += 3;
    if (cov_bypass == 0) begin failures++; $display("FAIL no exchange bypass seen"); end
    if (cov_swap == 0)   begin failures++; $display("FAIL no commutator swap seen"); end
    if (cov_rot == 0)    begin failures++; $display("FAIL no twiddle rotation seen"); end
    $display("latency=%0d frames=%0d max_err=%0d bypass=%0d swap=%0d rot=%0d",
             exp_latency(), out_frames, max_err, cov_bypass, cov_swap, cov_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * HALF + exp_latency() + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog: only %0d frames out", out_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
