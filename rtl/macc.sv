// macc: multiplier-accumulator used inside every Line Block and Column Block.
//
// On a clock edge with en = 1 the register takes clr ? a*b : acc + a*b, so a
// sum of eight products is formed over eight enabled cycles, the first of them
// marked with clr. The result is in acc from the edge after the last term until
// the next enabled edge. All arithmetic is two's complement; ACC_W must hold
// the full sum (the instantiating blocks size it with three bits of growth for
// eight terms). The multiply-accumulate function is the published design's; the
// registered accumulator with a clear-on-first-term input and the synchronous
// active-low reset are this design's choice.
module macc #(
  parameter int unsigned A_W   = 9,
  parameter int unsigned B_W   = 14,
  parameter int unsigned ACC_W = A_W + B_W + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [A_W+B_W-1:0] prod;
  logic signed [ACC_W-1:0]   base;

  always_comb begin
    prod = a * b;
    base = clr ? '0 : acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + ACC_W'(prod);
  end

endmodule
