// tb_lcb: checks the Line Coefficient Block of the forward DCT and of the
// inverse against C(u) cos((2i+1) u pi / 16) computed with real arithmetic
// (within 0.6 LSB of 2^-12), and against the three-decimal coefficients of
// the line equations F(0)..F(7) (within 0.001).
module tb_lcb;
  logic [2:0] col;
  logic signed [13:0] cf [8];
  logic signed [13:0] ci [8];
  int checks = 0, failures = 0;
  // three-decimal magnitudes of C(u) cos(k pi / 16) for k = 0..8, u > 0
  real pub [9] = '{0.5, 0.490, 0.462, 0.416, 0.354, 0.278, 0.191, 0.098, 0.0};

  lcb #(.INVERSE(1'b0)) dut_f (.col, .coef(cf));
  lcb #(.INVERSE(1'b1)) dut_i (.col, .coef(ci));

  function automatic real a_ref(int u, int i);
    real c;
    c = (u == 0) ? 1.0 / (2.0 * $sqrt(2.0)) : 0.5;
    return c * $cos((2*i+1)*u*3.14159265358979/16.0);
  endfunction

  function automatic real a_pub(int u, int i);
    int k; real s;
    if (u == 0) return 0.354;
    k = ((2*i+1)*u) % 32;
    s = 1.0;
    if (k > 16) k = 32 - k;
    if (k > 8) begin k = 16 - k; s = -1.0; end
    return s * pub[k];
  endfunction

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin
      col = 3'(i);
      #1;
      for (int k = 0; k < 8; k++) begin
        checks += 3;
        if (absr(real'(cf[k]) / 4096.0 - a_ref(k, i)) > 0.6 / 4096.0) begin
          failures++; $display("FAIL dct coef blk %0d pos %0d = %0d", k, i, cf[k]);
        end
        if (absr(real'(ci[k]) / 4096.0 - a_ref(i, k)) > 0.6 / 4096.0) begin
          failures++; $display("FAIL idct coef blk %0d pos %0d = %0d", k, i, ci[k]);
        end
        if (absr(real'(cf[k]) / 4096.0 - a_pub(k, i)) > 0.001) begin
          failures++; $display("FAIL published coef blk %0d pos %0d", k, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
