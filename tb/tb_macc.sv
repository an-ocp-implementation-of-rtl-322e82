// tb_macc: checks the multiplier-accumulator with random signed operands.
// Sums of eight products (first term marked by clr) are compared with sums
// computed here; disabled cycles must hold the value, and reset clears it.
module tb_macc;
  logic clk = 1'b0, rst_n, en, clr;
  logic signed [8:0]  a;
  logic signed [13:0] b;
  logic signed [25:0] acc;
  int checks = 0, failures = 0;

  macc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; a = '0; b = '0;
    @(posedge clk); #1;
    checks++; if (acc != 0) failures++;
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      sum = 0;
      for (int i = 0; i < 8; i++) begin
        a   = 9'($urandom);
        b   = 14'($urandom);
        if (t % 7 == 0) begin a = (i % 2 != 0) ? -9'sd256 : 9'sd255; b = -14'sd8192; end
        en  = 1'b1;
        clr = (i == 0);
        sum += longint'(a) * longint'(b);
        @(posedge clk); #1;
        // a random idle cycle must not change the sum
        if ($urandom % 5 == 0) begin
          en = 1'b0; a = 9'($urandom);
          @(posedge clk); #1;
        end
      end
      checks++;
      if (longint'(acc) != sum) begin
        failures++;
        $display("FAIL sum %0d got %0d", sum, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
