// tb_sw: random pairs through the 2x2 switch with both select values.
`timescale 1ns/1ps
module tb_sw;
  import fft_pkg::*;
  logic  sel;
  cplx_t i0, i1, o0, o1;
  int checks = 0, failures = 0;

  sw dut (.*);

  initial begin
    for (int n = 0; n < 200; n++) begin
      sel = n[0];
      i0 = cplx_t'($urandom);
      i1 = cplx_t'($urandom);
      #1;
      checks++;
      if ((sel == 1'b0 && (o0 !== i0 || o1 !== i1)) ||
          (sel == 1'b1 && (o0 !== i1 || o1 !== i0))) begin
        failures++;
        $display("FAIL sel=%0d", sel);
      end
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
