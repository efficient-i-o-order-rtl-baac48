// delay_line: L-stage shift register ("L D" in the block diagrams).
//
// q is d delayed by L clocks; L = 0 is a plain wire. With RESET = 1 the
// stages are cleared by the synchronous active-low rst_n (used for the
// start-of-frame flags); with RESET = 0 rst_n is ignored and the chain has
// no reset, so it can map to shift-register primitives.
module delay_line #(
  parameter int W     = 32,
  parameter int L     = 4,
  parameter bit RESET = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (L == 0) begin : g_wire
    assign q = d;
    logic unused;
    assign unused = clk ^ rst_n;
  end else begin : g_chain
    logic [W-1:0] r [L];
    always_ff @(posedge clk) begin
      if (RESET && !rst_n) begin
        for (int i = 0; i < L; i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < L; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[L-1];
  end
endmodule
