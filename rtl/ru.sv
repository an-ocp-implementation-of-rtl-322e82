// ru: Round Unit. Converts the wide integer result, which carries SH fractional
// bits, into an OUT_W-bit signed value: it adds one half (2^(SH-1)), shifts
// right arithmetically by SH and saturates to the OUT_W-bit range. The result
// is registered, with its valid and first flags, one cycle after the input.
// Reducing each coefficient to 12 bits is the published design's function; rounding
// half up and saturating are this design's choices.
module ru #(
  parameter int unsigned IN_W  = 31,
  parameter int unsigned SH    = 15,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  d,
  input  logic                    d_valid,
  input  logic                    d_first,
  output logic signed [OUT_W-1:0] q,
  output logic                    q_valid,
  output logic                    q_first
);

  localparam logic signed [IN_W-1:0] MAXV = IN_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W-1:0] MINV = -IN_W'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W:0]   sum;
  logic signed [IN_W-1:0] shifted;
  logic signed [OUT_W-1:0] sat;

  always_comb begin
    sum     = {d[IN_W-1], d} + ((IN_W+1)'(1) <<< (SH - 1));
    shifted = IN_W'(sum >>> SH);
    if (shifted > MAXV)      sat = MAXV[OUT_W-1:0];
    else if (shifted < MINV) sat = MINV[OUT_W-1:0];
    else                     sat = shifted[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_first <= 1'b0;
      q       <= '0;
    end else begin
      q_valid <= d_valid;
      q_first <= d_first && d_valid;
      q       <= d_valid ? sat : '0;
    end
  end

endmodule
