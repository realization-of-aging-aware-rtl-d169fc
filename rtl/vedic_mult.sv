// N x N unsigned Vedic (Urdhva Tiryakbhyam, "vertically and crosswise")
// multiplier, the datapath of the aging-aware multiplier.
//
// The operands are cut into 2-bit digits and every digit pair is multiplied
// by a vedic_2x2 cell (level 0). Each further level doubles the operand
// width: a product of two W-bit blocks a = {aH,aL}, b = {bH,bL} is made from
// the four half-width products of the level below, the vertical ones aL*bL
// and aH*bH and the crosswise ones aH*bL and aL*bH:
//   p = aL*bL + ((aH*bL + aL*bH) << W/2) + (aH*bH << W).
// After log2(N/2) levels the single remaining block is the full product.
// N must be a power of two, at least 2.
//
// Interface: a (multiplicand), b (multiplier), p (2N-bit product).
// Timing: combinational; in the full design it is the path between the input
// flip-flops and the Razor register. Using the Vedic scheme at 32 bits
// follows the described design; the 2-bit leaves, the level-by-level
// combination and the adder layout are the usual construction for it.
module vedic_mult #(
  parameter int unsigned N = aam_pkg::WIDTH
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned D  = N / 2;        // 2-bit digits per operand
  localparam int unsigned LV = $clog2(D);    // levels above the leaves

  for (genvar k = 0; k <= LV; k++) begin : g_lvl
    localparam int unsigned W = 2 << k;      // block width at this level
    localparam int unsigned C = D >> k;      // blocks per operand

    logic [2*W-1:0] pr [C][C];               // pr[i][j] = a block i * b block j

    if (k == 0) begin : g_leaf
      for (genvar i = 0; i < C; i++) begin : g_i
        for (genvar j = 0; j < C; j++) begin : g_j
          vedic_2x2 u_cell (.a(a[2*i +: 2]), .b(b[2*j +: 2]), .p(pr[i][j]));
        end
      end
    end else begin : g_comb
      localparam int unsigned H = W / 2;
      for (genvar i = 0; i < C; i++) begin : g_i
        for (genvar j = 0; j < C; j++) begin : g_j
          logic [W:0] p_cross;  // aH*bL + aL*bH, one carry bit wider
          always_comb begin
            p_cross  = {1'b0, g_lvl[k-1].pr[2*i+1][2*j]}
                     + {1'b0, g_lvl[k-1].pr[2*i][2*j+1]};
            pr[i][j] = {g_lvl[k-1].pr[2*i+1][2*j+1], g_lvl[k-1].pr[2*i][2*j]}
                     + {{(W-H-1){1'b0}}, p_cross, {H{1'b0}}};
          end
        end
      end
    end
  end

  assign p = g_lvl[LV].pr[0][0];
endmodule
