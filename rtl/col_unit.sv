// col_unit: Column Unit. Eight Column Blocks receive the same fl(i) stream, one
// line result per clock, eight per column of the intermediate block; the Column
// Coefficient Block gives Column Block k the coefficient for the line index
// row. After the eighth value, Column Block k holds point k of the 1-D
// transform of that column: F[0..7] is one column of the 2-D result, flagged by
// done for one cycle. Interface and timing are those of cb, shared by the
// eight blocks. The structure is the published design's (its Figure 1).
module col_unit
  import dct_pkg::*;
#(
  parameter bit          INVERSE   = 1'b0,
  parameter int unsigned A_W       = 14,
  parameter int unsigned COEF_FRAC = 12,
  localparam int unsigned COEF_W   = COEF_FRAC + 2,
  localparam int unsigned ACC_W    = A_W + COEF_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [2:0]              row,
  input  logic signed [A_W-1:0]   fl,
  output logic signed [ACC_W-1:0] F [N],
  output logic                    done
);

  logic signed [COEF_W-1:0] coef [N];
  logic [N-1:0]             done_k;

  ccb #(.INVERSE(INVERSE), .COEF_FRAC(COEF_FRAC)) u_ccb (.row, .coef);

  for (genvar k = 0; k < N; k++) begin : g_cb
    cb #(.A_W(A_W), .COEF_W(COEF_W)) u_cb (
      .clk, .rst_n, .en, .row, .fl, .coef(coef[k]), .F(F[k]), .done(done_k[k])
    );
  end

  assign done = &done_k;

endmodule
