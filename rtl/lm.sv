// lm: Line Multiplexer. Puts the output of Line Block sel onto the fl(i) bus
// that feeds every Column Block, through one pipeline register: q takes
// d[sel] on every clock edge. Selecting one of the eight Line Blocks is the
// document's function for this block; the output register is this design's.
module lm
  import dct_pkg::*;
#(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic signed [W-1:0] d [N],
  input  logic [2:0]          sel,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk) q <= d[sel];

endmodule
