// tb_lm: checks that the Line Multiplexer registers the selected input:
// after each clock edge q equals the value of d[sel] before the edge.
module tb_lm;
  logic clk = 1'b0;
  logic signed [13:0] d [8];
  logic [2:0] sel;
  logic signed [13:0] q;
  int checks = 0, failures = 0;

  lm dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic signed [13:0] exp_q;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) d[k] = 14'($urandom);
      sel   = 3'($urandom);
      exp_q = d[sel];
      @(posedge clk); #1;
      d[sel] = ~d[sel];
      checks++;
      if (q != exp_q) begin failures++; $display("FAIL sel %0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
