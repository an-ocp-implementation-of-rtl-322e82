// tb_col_unit: checks the Column Unit of the forward DCT. Columns of random
// line values (signed, 3 fractional bits) are streamed one value per clock,
// back to back. When done pulses, F[k] must be point k of the 1-D DCT of the
// column, computed here with real arithmetic, in units of 2^-12, within
// 0.6 LSB per input magnitude of the coefficient rounding.
module tb_col_unit;
  logic clk = 1'b0, rst_n, en, done;
  logic [2:0] row;
  logic signed [13:0] fl;
  logic signed [30:0] F [8];
  int checks = 0, failures = 0, cols_done = 0;

  col_unit dut (.*);
  always #5 clk = ~clk;

  int colv [8];
  int cols_sent = 0;
  int hist [$][8];

  function automatic real a_ref(int u, int i);
    real c;
    c = (u == 0) ? 1.0 / (2.0 * $sqrt(2.0)) : 0.5;
    return c * $cos((2*i+1)*u*3.14159265358979/16.0);
  endfunction

  always @(negedge clk) if (rst_n && done) begin
    real y, tol, e;
    for (int k = 0; k < 8; k++) begin
      y = 0.0; tol = 0.0;
      for (int r = 0; r < 8; r++) begin
        y   += a_ref(k, r) * real'(hist[0][r]) * 4096.0;
        tol += 0.6 * ((hist[0][r] < 0) ? -hist[0][r] : hist[0][r]);
      end
      e = real'(F[k]) - y;
      checks++;
      if (e > tol + 1.0 || e < -tol - 1.0) begin
        failures++;
        $display("FAIL point %0d: %0d vs %f", k, F[k], y);
      end
    end
    void'(hist.pop_front());
    cols_done++;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; row = '0; fl = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 40; c++) begin
      for (int r = 0; r < 8; r++) colv[r] = int'($urandom % 16384) - 8192;
      hist.push_back(colv);
      for (int r = 0; r < 8; r++) begin
        en = 1'b1; row = 3'(r); fl = 14'(colv[r]);
        @(negedge clk);
      end
      if (c % 10 == 9) begin en = 1'b0; repeat (3) @(negedge clk); end
    end
    en = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (cols_done != 40) begin failures++; $display("FAIL %0d columns done", cols_done); end
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
