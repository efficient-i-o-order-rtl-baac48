// tb_vedic_mul2x2: exhaustive test of the 2x2 Urdhva cell against a*b.
`timescale 1ns/1ps
module tb_vedic_mul2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul2x2 dut (.*);

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
