// tb_cb: checks a Column Block: eight products of random line values and
// coefficients, marked row 0..7, must sum to the value computed here, and
// done must pulse once, on the edge after the row-7 term, with the sum in F.
module tb_cb;
  logic clk = 1'b0, rst_n, en, done;
  logic [2:0] row;
  logic signed [13:0] fl, coef;
  logic signed [30:0] F;
  int checks = 0, failures = 0;

  cb dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint s;
    rst_n = 1'b0; en = 1'b0; row = '0; fl = '0; coef = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      s = 0;
      for (int r = 0; r < 8; r++) begin
        en = 1'b1; row = 3'(r);
        fl = 14'($urandom); coef = 14'(int'($urandom % 4097) - 2048);
        s += longint'(fl) * longint'(coef);
        @(negedge clk);
        checks++;
        if (done != (r == 7)) begin failures++; $display("FAIL done at row %0d", r); end
      end
      en = 1'b0; fl = '0;
      checks += 2;
      if (longint'(F) != s) begin failures++; $display("FAIL sum %0d exp %0d", F, s); end
      @(negedge clk);
      if (done != 1'b0) begin failures++; $display("FAIL done too long"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // done must rise exactly one edge after a row-7 term
  logic last_q = 1'b0;
  always @(posedge clk) last_q <= en && row == 3'd7;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (done != last_q) begin failures++; $display("FAIL done timing"); end
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
