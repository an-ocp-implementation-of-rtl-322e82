// tb_lb: checks one Line Block. Eight lines of eight random pixels are
// multiplied by random signed coefficients; each line sum, rounded half up
// from 12 to 3 fractional bits, must be found in MEM INT at the line number
// of the bank it was written to. Two blocks go to the two banks, and both are
// read back afterwards, so writing one bank must leave the other intact.
module tb_lb;
  logic clk = 1'b0, rst_n, en, clr, we, wbank, rbank;
  logic signed [8:0]  f;
  logic signed [13:0] coef;
  logic [2:0] waddr, raddr;
  logic signed [13:0] fl;
  int checks = 0, failures = 0;

  lb dut (.*);
  always #5 clk = ~clk;

  longint expv [2][8];

  function automatic longint rnd(longint s);
    longint r;
    r = s + 256;
    return (r >= 0) ? r / 512 : -((-r + 511) / 512);
  endfunction

  initial begin
    longint s;
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; we = 1'b0; wbank = 1'b0; rbank = 1'b0;
    waddr = '0; raddr = '0; f = '0; coef = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 8; r++) begin
        s = 0;
        for (int i = 0; i < 8; i++) begin
          @(negedge clk);
          we   = 1'b0;
          f    = 9'($urandom % 256);
          coef = 14'(int'($urandom % 4097) - 2048);
          en   = 1'b1; clr = (i == 0);
          s   += longint'(f) * longint'(coef);
        end
        expv[b][r] = rnd(s);
        @(negedge clk);
        en = 1'b0; we = 1'b1; waddr = 3'(r); wbank = 1'(b);
      end
    @(negedge clk); we = 1'b0;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 8; r++) begin
        rbank = 1'(b); raddr = 3'(r);
        #1;
        checks++;
        if (longint'(fl) != expv[b][r]) begin
          failures++;
          $display("FAIL bank %0d line %0d got %0d exp %0d", b, r, fl, expv[b][r]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
