// su: Serialization Unit. Takes the eight results of the Column Unit at once
// (load) and sends them out one per clock, d[0] first: q/q_valid show element
// 0 in the cycle after load and the following elements in the next seven
// cycles. first marks the column that starts a block; q_first is set with the
// first element of that column only. A new load may come in the cycle in which
// the last element of the previous one is shown, so columns every eight cycles
// give a gap-free output stream. The serialization is the published design's function;
// the shift register and the first-flag handling are this design's.
module su
  import dct_pkg::*;
#(
  parameter int unsigned W = 31
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                first,
  input  logic signed [W-1:0] d [N],
  output logic signed [W-1:0] q,
  output logic                q_valid,
  output logic                q_first
);

  logic signed [W-1:0] sreg [N];
  logic [N-1:0]        vld;  // vld[i]: sreg[i] holds a value still to send
  logic                fst;  // sreg[0] is the first value of a block

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      fst <= 1'b0;
    end else if (load) begin
      sreg <= d;
      vld  <= '1;
      fst  <= first;
    end else begin
      for (int i = 0; i < N - 1; i++) sreg[i] <= sreg[i+1];
      vld <= {1'b0, vld[N-1:1]};
      fst <= 1'b0;
    end
  end

  assign q       = sreg[0];
  assign q_valid = vld[0];
  assign q_first = fst && vld[0];

endmodule
