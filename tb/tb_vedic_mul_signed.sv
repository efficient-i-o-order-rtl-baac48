// tb_vedic_mul_signed: signed 16x16 products, corners and random operands,
// against the built-in signed multiplication.
`timescale 1ns/1ps
module tb_vedic_mul_signed;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  vedic_mul_signed dut (.*);

  task automatic check(int x, int y);
    longint want;
    a = 16'(x); b = 16'(y);
    #1;
    want = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d, want %0d", a, b, p, want);
    end
  endtask

  initial begin
    check(-32768, -32768);
    check(-32768, 32767);
    check(32767, 32767);
    check(-1, 1);
    check(0, -5);
    check(-16384, 12345);
    for (int n = 0; n < 2000; n++) check(int'($urandom), int'($urandom));
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
