// tb_idct_direct: drives the inverse core (INVERSE = 1, 12-bit signed input)
// directly with coefficient blocks and checks its output against a real-valued
// 2-D IDCT. Blocks are sent as the transposed block in line order, which is
// the order a forward core emits, so the pixels come back in line order. It
// uses random sparse blocks, a block of large coefficients whose results
// exceed 12 bits (checked for saturation at -2048 / 2047), and blocks with a
// single non-zero coefficient. The tolerance is the error bound of the
// fixed-point arithmetic: 0.5 for the final rounding, 0.25 for the rounding of
// the line results, and sum|F| / 8192 for the 12-fractional-bit coefficients
// (each product of two coefficients is off by at most 2^-13).
module tb_idct_direct;
  localparam int NBLK = 20;

  logic Clock = 1'b0, MReset_n;
  logic [17:0] MAddr;
  logic [2:0]  MCmd;
  logic [5:0]  Control = 6'd3;
  logic        SCmdAccept;
  logic [15:0] SData;
  logic [1:0]  SResp;

  dct2d_ocp #(.INVERSE(1'b1), .IN_W(12)) dut (.*);

  always #5 Clock = ~Clock;

  int checks = 0, failures = 0, n_sat = 0;
  int cf [NBLK][8][8];      // cf[b][u][v] = F(u,v)
  real px [NBLK][64];       // expected pixels, line order
  real tolb [NBLK];         // error bound of each block
  int ob = 0, ok = 0;

  function automatic real cu(int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  always @(negedge Clock) if (SResp == 2'b01) begin
    int got;
    real e, lim;
    got = int'($signed(SData[11:0]));
    checks++;
    if (ob >= NBLK) begin
      failures++; $display("FAIL extra output");
    end else begin
      e = px[ob][ok];
      if (e > 2047.0) e = 2047.0;
      if (e < -2048.0) e = -2048.0;
      if (px[ob][ok] > 2048.0 || px[ob][ok] < -2049.0) n_sat++;
      lim = tolb[ob];
      if (real'(got) - e > lim || e - real'(got) > lim) begin
        failures++;
        $display("FAIL block %0d pixel %0d: %0d vs %f", ob, ok, got, px[ob][ok]);
      end
      ok++;
      if (ok == 64) begin ok = 0; ob++; end
    end
  end

  initial begin
    repeat (5000) @(posedge Clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s;
    for (int b = 0; b < NBLK; b++)
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          if (b == 0) cf[b][u][v] = (u + v < 3) ? 2047 : 0;          // saturates high
          else if (b == 1) cf[b][u][v] = (u + v < 3) ? -2048 : 0;    // saturates low
          else if (b < 6) cf[b][u][v] = (u == b && v == 7 - b) ? 1000 : 0;
          else cf[b][u][v] = ($urandom % 4 == 0) ? int'($urandom % 4096) - 2048 : 0;
        end
    for (int b = 0; b < NBLK; b++) begin
      tolb[b] = 0.75;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++)
          tolb[b] += real'((cf[b][u][v] < 0) ? -cf[b][u][v] : cf[b][u][v]) / 8192.0;
    end
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              s += 0.25 * cu(u) * cu(v) * real'(cf[b][u][v])
                   * $cos((2*i+1)*u*3.14159265358979/16.0)
                   * $cos((2*j+1)*v*3.14159265358979/16.0);
          px[b][i*8+j] = s;
        end
    MReset_n = 1'b0; MCmd = 3'b000; MAddr = '0;
    repeat (2) @(negedge Clock);
    MReset_n = 1'b1;
    MCmd = 3'b001; MAddr = {6'd3, 12'd0};
    @(negedge Clock);
    for (int b = 0; b < NBLK; b++)
      for (int v = 0; v < 8; v++)
        for (int u = 0; u < 8; u++) begin
          MCmd = 3'b010; MAddr = {6'd3, 12'(cf[b][u][v])};
          @(negedge Clock);
        end
    MCmd = 3'b000;
    repeat (100) @(negedge Clock);
    checks++;
    if (ob != NBLK) begin failures++; $display("FAIL %0d blocks back", ob); end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("saturated outputs: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
