// tb_line_unit: checks the Line Unit of the forward DCT. Random 8x8 pixel
// blocks are fed one pixel per clock in line order, the line results written
// after each line, alternating banks per block. Reading word r of Line Block k
// must give point k of the 1-D DCT of line r, in units of 1/8, within 0.35
// of the value computed here with real arithmetic.
module tb_line_unit;
  logic clk = 1'b0, rst_n, pix_valid, we, wbank, rbank;
  logic [7:0] pix;
  logic [2:0] col, waddr, raddr;
  logic signed [13:0] fl [8];
  int checks = 0, failures = 0;

  line_unit dut (.*);
  always #5 clk = ~clk;

  int x [8][8];

  function automatic real a_ref(int u, int i);
    real c;
    c = (u == 0) ? 1.0 / (2.0 * $sqrt(2.0)) : 0.5;
    return c * $cos((2*i+1)*u*3.14159265358979/16.0);
  endfunction

  initial begin
    real y, e;
    rst_n = 1'b0; pix_valid = 1'b0; we = 1'b0; wbank = 1'b0; rbank = 1'b0;
    pix = '0; col = '0; waddr = '0; raddr = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int b = 0; b < 4; b++) begin
      for (int r = 0; r < 8; r++)
        for (int i = 0; i < 8; i++) begin
          x[r][i] = (b == 1) ? 255 : int'($urandom % 256);
          @(negedge clk);
          pix_valid = 1'b1; pix = 8'(x[r][i]); col = 3'(i);
          // line r-1's result is written while line r's first pixel goes in
          we = (i == 0 && r > 0); waddr = 3'(r - 1);
        end
      @(negedge clk);
      pix_valid = 1'b0; we = 1'b1; waddr = 3'd7;
      @(negedge clk);
      we = 1'b0;
      rbank = wbank;
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) begin
          raddr = 3'(r);
          #1;
          y = 0.0;
          for (int i = 0; i < 8; i++) y += a_ref(k, i) * real'(x[r][i]);
          e = real'(fl[k]) / 8.0 - y;
          checks++;
          if (e > 0.35 || e < -0.35) begin
            failures++;
            $display("FAIL block %0d line %0d point %0d: %f vs %f", b, r, k, real'(fl[k]) / 8.0, y);
          end
        end
      wbank = ~wbank;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
