// vedic_mul: W x W unsigned Vedic (Urdhva-Tiryagbhyam) multiplier.
//
// Both operands are cut into 2-bit digits and every digit pair is
// multiplied by a 2x2 cell (vedic_mul2x2). Products are then merged level by
// level: four B x B products of neighbouring chunks give one 2B x 2B
// product as in the source article's 4x4 partial product array - lo*lo and hi*hi
// are concatenated into one row ({hi*hi, lo*lo}) and the two crosswise
// products hi*lo and lo*hi are added in, shifted left by B. The first merge
// level is exactly the 4x4 multiplier the source article draws; 8x8 and 16x16
// repeat the same split. W must be a power of two, at least 2. Purely
// combinational: p is valid in the same cycle as a and b.
module vedic_mul #(
  parameter int W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int LEVELS = $clog2(W);  // level 1: 2-bit chunks, level LEVELS: W bits
  localparam int ND     = W / 2;      // number of 2-bit digits

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int B  = 2 ** l;       // chunk width at this level
    localparam int NC = W / B;        // chunks per operand
    logic [2*B-1:0] pp [NC][NC];      // pp[i][j] = a chunk i * b chunk j

    for (genvar i = 0; i < NC; i++) begin : g_i
      for (genvar j = 0; j < NC; j++) begin : g_j
        if (l == 1) begin : g_cell
          vedic_mul2x2 u_cell (.a(a[2*i +: 2]), .b(b[2*j +: 2]), .p(pp[i][j]));
        end else begin : g_merge
          localparam int H = B / 2;
          logic [B:0] xsum;           // crosswise sum, one carry bit
          always_comb begin
            xsum     = {1'b0, g_lvl[l-1].pp[2*i+1][2*j]} + {1'b0, g_lvl[l-1].pp[2*i][2*j+1]};
            pp[i][j] = {g_lvl[l-1].pp[2*i+1][2*j+1], g_lvl[l-1].pp[2*i][2*j]}
                     + ({{(B-1){1'b0}}, xsum} << H);
          end
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].pp[0][0];

  initial assert (W >= 2 && (W & (W - 1)) == 0 && ND >= 1)
    else $error("vedic_mul: W must be a power of two >= 2");
endmodule
