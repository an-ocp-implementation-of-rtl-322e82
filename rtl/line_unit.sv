// line_unit: Line Unit. Eight Line Blocks share the incoming pixel stream; the
// Line Coefficient Block gives each its own cosine coefficient for the pixel's
// position col in the line, so after eight pixels Line Block k holds point k
// of the 1-D transform of that line. The line results go to each block's
// MEM INT at the line number, so Line Block k ends up holding column k of the
// intermediate 8x8 block, which the column pass then reads out.
// The incoming value is IN_W bits wide: an unsigned pixel for the forward DCT,
// a signed coefficient for the inverse; it is extended to IN_W+1 signed bits.
// Interface and timing are those of lb, with the memory controls shared by the
// eight blocks and fl[k] the read port of Line Block k.
// Eight parallel blocks fed by one coefficient block follow the published design
// (its Figure 1); the sign handling of the input is this design's.
module line_unit
  import dct_pkg::*;
#(
  parameter bit          INVERSE   = 1'b0,
  parameter int unsigned IN_W      = 8,
  parameter int unsigned COEF_FRAC = 12,
  parameter int unsigned LINE_FRAC = 3,
  localparam int unsigned A_W      = IN_W + 1,
  localparam int unsigned LINE_W   = IN_W + LINE_FRAC + 3,
  localparam int unsigned COEF_W   = COEF_FRAC + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  logic [IN_W-1:0]          pix,
  input  logic [2:0]               col,
  input  logic                     we,
  input  logic [2:0]               waddr,
  input  logic                     wbank,
  input  logic [2:0]               raddr,
  input  logic                     rbank,
  output logic signed [LINE_W-1:0] fl [N]
);

  logic signed [A_W-1:0]    f;
  logic signed [COEF_W-1:0] coef [N];

  assign f = INVERSE ? A_W'(signed'(pix)) : signed'({1'b0, pix});

  lcb #(.INVERSE(INVERSE), .COEF_FRAC(COEF_FRAC)) u_lcb (.col, .coef);

  for (genvar k = 0; k < N; k++) begin : g_lb
    lb #(.A_W(A_W), .COEF_FRAC(COEF_FRAC), .LINE_FRAC(LINE_FRAC), .LINE_W(LINE_W)) u_lb (
      .clk, .rst_n,
      .en(pix_valid), .clr(col == 3'd0), .f, .coef(coef[k]),
      .we, .waddr, .wbank, .raddr, .rbank,
      .fl(fl[k])
    );
  end

endmodule
