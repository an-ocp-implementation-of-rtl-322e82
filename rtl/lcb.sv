// lcb: Line Coefficient Block. For the position col (0..7) of the incoming
// pixel within its line, it gives Line Block k the coefficient M(k,col) of the
// transform matrix: M = A for the forward DCT (INVERSE = 0) and M = A^T for the
// inverse (INVERSE = 1), with A(u,i) = C(u) cos((2i+1) u pi / 16) as in
// dct_pkg. Coefficients are signed with COEF_FRAC fractional bits. The lookup
// is combinational: a ROM of 8 x 8 constants computed at elaboration.
// That the LCB holds these cosine values, and that only they change between
// DCT and IDCT, follows the published design; the fixed-point format is this design's.
module lcb
  import dct_pkg::*;
#(
  parameter bit          INVERSE   = 1'b0,
  parameter int unsigned COEF_FRAC = 12,
  localparam int unsigned COEF_W   = COEF_FRAC + 2
) (
  input  logic [2:0]               col,
  output logic signed [COEF_W-1:0] coef [N]
);

  logic signed [COEF_W-1:0] rom [N][N];  // [position][block]

  for (genvar p = 0; p < N; p++) begin : g_pos
    for (genvar k = 0; k < N; k++) begin : g_blk
      localparam int VAL = xform_coef(INVERSE, k, p, COEF_FRAC);
      assign rom[p][k] = COEF_W'(VAL);
    end
  end

  always_comb
    for (int k = 0; k < N; k++) coef[k] = rom[col][k];

endmodule
