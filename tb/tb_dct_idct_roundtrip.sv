// tb_dct_idct_roundtrip: the image-reconstruction experiment at block level.
// A forward core (default parameters) and an inverse core (INVERSE = 1,
// 12-bit signed input) are chained: every valid SData word of the forward core
// is passed as a pixel read to the inverse core. The forward core's output
// order (column by column) is exactly the line order the inverse core expects
// for the transposed block, so the inverse core returns the pixels in their
// original line order. The reference 8x8 block must be reconstructed within
// +-1 of the original and of the published reconstruction, and 40 random
// blocks, sent back to back, within +-1 of the original. The chained stream
// runs at one value per clock with no gaps.
module tb_dct_idct_roundtrip;
  localparam int NBLK = 41;

  logic Clock = 1'b0, MReset_n;
  logic [13:0] MAddr_f;
  logic [2:0]  MCmd_f, MCmd_i;
  logic [17:0] MAddr_i;
  logic [5:0]  Control = 6'd1;
  logic        acc_f, acc_i;
  logic [15:0] SData_f, SData_i;
  logic [1:0]  SResp_f, SResp_i;
  logic        init_i;

  dct2d_ocp u_fwd (.Clock, .MReset_n, .MAddr(MAddr_f), .MCmd(MCmd_f), .Control,
                   .SCmdAccept(acc_f), .SData(SData_f), .SResp(SResp_f));

  dct2d_ocp #(.INVERSE(1'b1), .IN_W(12)) u_inv (
    .Clock, .MReset_n, .MAddr(MAddr_i), .MCmd(MCmd_i), .Control,
    .SCmdAccept(acc_i), .SData(SData_i), .SResp(SResp_i));

  // chain: forward results become pixel reads of the inverse core
  always_comb begin
    if (init_i) begin
      MCmd_i  = 3'b001;
      MAddr_i = {6'd1, 12'd0};
    end else begin
      MCmd_i  = (SResp_f == 2'b01) ? 3'b010 : 3'b000;
      MAddr_i = {6'd1, SData_f[11:0]};
    end
  end

  always #5 Clock = ~Clock;

  int checks = 0, failures = 0;
  int fig_a [64] = '{98,92,95,80,75,82,68,50, 97,91,94,79,74,81,67,49,
                     95,89,92,100,72,79,65,47, 93,87,90,75,70,100,63,45,
                     91,85,88,73,68,75,61,43, 89,83,86,71,66,73,59,41,
                     87,81,84,69,64,71,57,39, 85,79,82,67,62,69,55,37};
  // published reconstruction of fig_a
  int fig_c [64] = '{98,92,96,80,75,82,68,49, 97,91,94,79,74,81,66,49,
                     95,89,92,100,72,80,65,47, 93,87,90,76,70,100,63,45,
                     91,85,88,73,68,75,61,43, 89,83,86,72,66,73,59,41,
                     87,81,84,69,64,71,57,39, 85,79,82,67,62,69,55,37};
  int blk [NBLK][64];
  int ob = 0, ok = 0, maxerr = 0;
  int prev_cyc = -1, cyc = 0, gaps = 0;

  always @(posedge Clock) cyc <= cyc + 1;

  always @(negedge Clock) if (SResp_i == 2'b01) begin
    int got, d;
    got = int'($signed(SData_i[11:0]));
    checks++;
    if (ob >= NBLK) begin
      failures++; $display("FAIL extra output");
    end else begin
      d = got - blk[ob][ok];
      if (d < 0) d = -d;
      if (d > maxerr) maxerr = d;
      if (d > 1) begin
        failures++;
        $display("FAIL block %0d pixel %0d: %0d vs %0d", ob, ok, got, blk[ob][ok]);
      end
      checks++;
      if (SData_i[12] != (ok == 0)) begin failures++; $display("FAIL first flag"); end
      if (ob == 0) begin
        checks++;
        if (got - fig_c[ok] > 1 || fig_c[ok] - got > 1) begin
          failures++; $display("FAIL vs published pixel %0d", ok);
        end
      end
      if (prev_cyc >= 0 && cyc != prev_cyc + 1) gaps++;
      prev_cyc = cyc;
      ok++;
      if (ok == 64) begin ok = 0; ob++; end
    end
  end

  initial begin
    repeat (20000) @(posedge Clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) blk[0][k] = fig_a[k];
    for (int b = 1; b < NBLK; b++)
      for (int k = 0; k < 64; k++) blk[b][k] = int'($urandom % 256);
    MReset_n = 1'b0; MCmd_f = 3'b000; MAddr_f = '0; init_i = 1'b0;
    repeat (2) @(negedge Clock);
    MReset_n = 1'b1;
    MCmd_f = 3'b001; MAddr_f = {6'd1, 8'd0}; init_i = 1'b1;
    @(negedge Clock);
    init_i = 1'b0;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < 64; k++) begin
        MCmd_f = 3'b010; MAddr_f = {6'd1, 8'(blk[b][k])};
        @(negedge Clock);
      end
    MCmd_f = 3'b000;
    repeat (200) @(negedge Clock);
    checks++;
    if (ob != NBLK) begin failures++; $display("FAIL only %0d blocks back", ob); end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d gaps in the output stream", gaps); end
    $display("round trip: %0d blocks, max |error| %0d", ob, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
