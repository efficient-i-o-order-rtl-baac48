// tb_delay_line: a random word stream through the default 4-stage line
// and a 1-bit line with reset; each output must equal the input of L
// clocks earlier, and the reset line must read 0 right after reset.
`timescale 1ns/1ps
module tb_delay_line;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] d = '0, q;
  logic        d1 = 1'b1, q1;
  logic [31:0] hist [64];
  int checks = 0, failures = 0, cycle = 0;

  delay_line                                dut  (.clk, .rst_n, .d, .q);
  delay_line #(.W(1), .L(7), .RESET(1'b1))  dut1 (.clk, .rst_n, .d(d1), .q(q1));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (q1 !== 1'b0) begin failures++; $display("FAIL reset line not cleared"); end
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n >= 8) begin
        checks++;
        if (q !== hist[(n - 4) % 64]) begin failures++; $display("FAIL word at %0d", n); end
        checks++;
        if (q1 !== hist[(n - 7) % 64][0]) begin failures++; $display("FAIL bit at %0d", n); end
      end
      d = $urandom;
      d1 = d[0];
      hist[n % 64] = d;
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
