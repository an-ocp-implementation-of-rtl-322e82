// cb: Column Block. One MACC multiplies the line results fl(i) of one column by
// the coefficients from the Column Coefficient Block and sums eight of them,
// which gives one coefficient of the 2-D transform. The first term of a column
// is marked by row = 0 and the last by row = 7; done pulses on the edge after
// the last term, together with the finished sum in F, which then stays until
// the next enabled edge. The single MACC is the published design's (its Figure 3); the
// done strobe is this design's.
module cb #(
  parameter int unsigned A_W    = 14,
  parameter int unsigned COEF_W = 14,
  localparam int unsigned ACC_W = A_W + COEF_W + 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [2:0]               row,
  input  logic signed [A_W-1:0]    fl,
  input  logic signed [COEF_W-1:0] coef,
  output logic signed [ACC_W-1:0]  F,
  output logic                     done
);

  macc #(.A_W(A_W), .B_W(COEF_W), .ACC_W(ACC_W)) u_macc (
    .clk, .rst_n, .en, .clr(row == 3'd0), .a(fl), .b(coef), .acc(F)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) done <= 1'b0;
    else        done <= en && (row == 3'd7);
  end

endmodule
