// tb_vedic_mul: tests the Vedic multiplier at W = 4 exhaustively and at the
// default W = 16 with corner values and random operands, against a*b.
`timescale 1ns/1ps
module tb_vedic_mul;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  vedic_mul #(.W(4)) dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul          dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check16(logic [15:0] x, logic [15:0] y);
    logic [31:0] want;
    a16 = x; b16 = y;
    #1;
    want = 32'(x) * 32'(y);
    checks++;
    if (p16 !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d, want %0d", x, y, p16, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (int'(p4) != i * j) begin
          failures++;
          $display("FAIL 4x4 %0d*%0d = %0d", i, j, p4);
        end
      end
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    check16(16'h0000, 16'h1234);
    check16(16'h00FF, 16'hFF00);
    for (int n = 0; n < 2000; n++) check16(16'($urandom), 16'($urandom));
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
