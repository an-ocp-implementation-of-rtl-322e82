// lb: Line Block. One MACC forms the sum of eight products f(i)*Coef(i) over a
// line of the block; the rounded sum is then stored in the internal memory
// MEM INT, which the Line Multiplexer reads as fl(i) during the column pass.
//
// MEM INT has two banks of eight words (one word per line of a block): while
// the column pass reads one bank, the lines of the next block are written to
// the other, so blocks can follow each other without a gap. A word is the MACC
// sum rounded (half up) from COEF_FRAC to LINE_FRAC fractional bits.
// Timing: the MACC takes a product on each edge with en = 1 (clr marks the
// first pixel of a line); on the edge after the eighth product the caller
// pulses we with the line number in waddr to store the sum. The read port is
// combinational (fl = MEM INT[rbank][raddr]).
// The MACC + MEM INT structure is the published design's (its Figure 2); the two banks,
// the rounding and the word width are this design's choices.
module lb
  import dct_pkg::*;
#(
  parameter int unsigned A_W       = 9,
  parameter int unsigned COEF_FRAC = 12,
  parameter int unsigned LINE_FRAC = 3,
  parameter int unsigned LINE_W    = 14,
  localparam int unsigned COEF_W   = COEF_FRAC + 2,
  localparam int unsigned ACC_W    = A_W + COEF_W + 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     clr,
  input  logic signed [A_W-1:0]    f,
  input  logic signed [COEF_W-1:0] coef,
  input  logic                     we,
  input  logic [2:0]               waddr,
  input  logic                     wbank,
  input  logic [2:0]               raddr,
  input  logic                     rbank,
  output logic signed [LINE_W-1:0] fl
);

  localparam int unsigned SH = COEF_FRAC - LINE_FRAC;

  logic signed [ACC_W-1:0]  acc;
  logic signed [LINE_W-1:0] rounded;
  logic signed [LINE_W-1:0] mem_int [2][N];

  macc #(.A_W(A_W), .B_W(COEF_W), .ACC_W(ACC_W)) u_macc (
    .clk, .rst_n, .en, .clr, .a(f), .b(coef), .acc
  );

  always_comb rounded = LINE_W'((acc + (ACC_W'(1) <<< (SH - 1))) >>> SH);

  always_ff @(posedge clk)
    if (we) mem_int[wbank][waddr] <= rounded;

  assign fl = mem_int[rbank][raddr];

endmodule
