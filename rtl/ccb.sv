// ccb: Column Coefficient Block. While the Line Multiplexer streams the line
// results of one column, row (0..7) says which line the current value belongs
// to, and Column Block k receives the coefficient M(k,row): M = A for the
// forward DCT (INVERSE = 0) and M = A^T for the inverse (INVERSE = 1), with
// A(u,i) = C(u) cos((2i+1) u pi / 16) as in dct_pkg, signed with COEF_FRAC
// fractional bits. The lookup is combinational from a ROM built at
// elaboration. The published design places the column cosine values in this block and
// lets DCT and IDCT differ only in them; the number format is this design's.
module ccb
  import dct_pkg::*;
#(
  parameter bit          INVERSE   = 1'b0,
  parameter int unsigned COEF_FRAC = 12,
  localparam int unsigned COEF_W   = COEF_FRAC + 2
) (
  input  logic [2:0]               row,
  output logic signed [COEF_W-1:0] coef [N]
);

  logic signed [COEF_W-1:0] rom [N][N];  // [line index][block]

  for (genvar p = 0; p < N; p++) begin : g_pos
    for (genvar k = 0; k < N; k++) begin : g_blk
      localparam int VAL = xform_coef(INVERSE, k, p, COEF_FRAC);
      assign rom[p][k] = COEF_W'(VAL);
    end
  end

  always_comb
    for (int k = 0; k < N; k++) coef[k] = rom[row][k];

endmodule
