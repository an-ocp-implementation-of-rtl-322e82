// tb_dct2d_ocp: end-to-end test of the DCT-2D OCP core at its default
// parameters. It initializes the core through OCP, streams pixel blocks
// (the 8x8 example block of the reference results, random blocks, flat and
// extreme blocks) and checks every output word against a real-valued 2-D DCT
// computed here (|error| <= 1 after rounding), the SData format (first flag,
// zero upper bits), SResp, the output order (column by column), the latency
// of 14 edges from the last accepted pixel to F(0,0), and that back-to-back
// blocks give a gap-free output stream of one coefficient per clock. It also
// exercises and counts: ignored commands (before initialization or to another
// address), idle gaps in the input, back-to-back blocks (MEM INT bank swaps),
// and re-initialization in the middle of a block, which discards that block.
module tb_dct2d_ocp;

  localparam int NBLK = 12;

  logic        Clock = 1'b0;
  logic        MReset_n;
  logic [13:0] MAddr;
  logic [2:0]  MCmd;
  logic [5:0]  Control;
  logic        SCmdAccept;
  logic [15:0] SData;
  logic [1:0]  SResp;

  dct2d_ocp dut (.*);

  always #5 Clock = ~Clock;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge Clock) cyc <= cyc + 1;

  // reference block from the reference results (8x8 pixel example)
  int fig_a [64] = '{98,92,95,80,75,82,68,50, 97,91,94,79,74,81,67,49,
                     95,89,92,100,72,79,65,47, 93,87,90,75,70,100,63,45,
                     91,85,88,73,68,75,61,43, 89,83,86,71,66,73,59,41,
                     87,81,84,69,64,71,57,39, 85,79,82,67,62,69,55,37};
  // its published DCT coefficients, F(u,v) at index u*8+v
  int fig_b [64] = '{597,105,-24,30,-34,17,21,-5, 38,0,-3,-1,1,2,0,-4,
                     -7,3,4,-4,2,-1,-4,7, -4,1,6,0,-2,-4,-1,8,
                     -1,-3,2,6,-6,-4,5,1, 5,-2,-3,4,-3,0,4,-5,
                     2,2,-4,-5,5,5,-4,-3, -1,4,-2,-8,7,5,-7,0};

  int   blk [NBLK][64];
  real  ref_f [NBLK][64];   // expected output stream order: index v*8+u
  bit   expect_blk [NBLK];

  int n_ignored = 0, n_idle = 0, n_init = 0, n_b2b = 0, n_reinit = 0;

  function automatic real cu(int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  task automatic make_ref(int b);
    real s;
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        s = 0.0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            s += real'(blk[b][i*8+j]) * $cos((2*i+1)*u*3.14159265358979/16.0)
                                      * $cos((2*j+1)*v*3.14159265358979/16.0);
        ref_f[b][v*8+u] = 0.25 * cu(u) * cu(v) * s;
      end
  endtask

  task automatic cmd(logic [2:0] c, logic [5:0] a, logic [7:0] p);
    @(negedge Clock);
    MCmd  = c;
    MAddr = {a, p};
  endtask

  task automatic idle(int n);
    repeat (n) cmd(3'b000, 6'd0, 8'd0);
  endtask

  int last_accept_cyc [NBLK];

  // sends pixels [from, to) of block b; gaps = 1 inserts random idle cycles
  // and commands to another address
  task automatic send(int b, int from, int to, bit gaps);
    for (int k = from; k < to; k++) begin
      if (gaps && ($urandom % 4 == 0)) begin
        if (($urandom % 2) != 0) begin idle(1 + $urandom % 3); n_idle++; end
        else begin cmd(3'b010, 6'd9, 8'hAA); n_ignored++; end
      end
      cmd(3'b010, 6'd1, 8'(blk[b][k]));
      if (k == 63) last_accept_cyc[b] = cyc + 1;
    end
  endtask

  // ---------------- output monitor ----------------
  int out_blk = 0, out_k = 0;
  int last_first_cyc = -1000;
  int prev_valid_cyc = -1000;
  int d_max = 0;

  always @(negedge Clock) begin
    if (MReset_n && SResp == 2'b01) begin
      int  got, exp_r;
      bit  first;
      real e;
      while (out_blk < NBLK && !expect_blk[out_blk]) out_blk++;
      got   = int'($signed(SData[11:0]));
      first = SData[12];
      checks++;
      if (out_blk >= NBLK) begin
        failures++;
        $display("FAIL unexpected output %0d at cycle %0d", got, cyc);
      end else begin
        e = ref_f[out_blk][out_k];
        if ((real'(got) - e > 1.0) || (e - real'(got) > 1.0)) begin
          failures++;
          $display("FAIL blk %0d k %0d got %0d exp %f", out_blk, out_k, got, e);
        end
        checks++;
        if (first != (out_k == 0) || SData[15:13] != 3'b000) begin
          failures++;
          $display("FAIL format blk %0d k %0d SData %h", out_blk, out_k, SData);
        end
        if (out_k == 0) begin
          checks++;
          if (cyc != last_accept_cyc[out_blk] + 14) begin
            failures++;
            $display("FAIL latency blk %0d: %0d cycles", out_blk,
                     cyc - last_accept_cyc[out_blk]);
          end
          if (cyc - last_first_cyc == 64) n_b2b++;
          last_first_cyc = cyc;
        end else begin
          checks++;
          if (cyc != prev_valid_cyc + 1) begin
            failures++;
            $display("FAIL gap inside block %0d at k %0d", out_blk, out_k);
          end
        end
        if (out_blk == 0) begin
          // compare with the published coefficients (index u*8+v)
          int u, v, pb;
          u  = out_k % 8;
          v  = out_k / 8;
          pb = fig_b[u*8+v];
          checks++;
          if (got - pb > 1 || pb - got > 1) begin
            failures++;
            $display("FAIL published F(%0d,%0d) = %0d, got %0d", u, v, pb, got);
          end
        end
        prev_valid_cyc = cyc;
        out_k++;
        if (out_k == 64) begin out_k = 0; out_blk++; end
      end
    end else if (MReset_n) begin
      checks++;
      if (SData != 16'h0000 || SResp != 2'b00) begin
        failures++;
        $display("FAIL idle output SData %h SResp %b", SData, SResp);
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (30000) @(posedge Clock);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // test data
    for (int k = 0; k < 64; k++) blk[0][k] = fig_a[k];
    for (int b = 1; b < NBLK; b++)
      for (int k = 0; k < 64; k++)
        case (b)
          3:       blk[b][k] = 255;
          4:       blk[b][k] = 0;
          5:       blk[b][k] = (((k / 8) + (k % 8)) % 2 != 0) ? 255 : 0;
          default: blk[b][k] = $urandom % 256;
        endcase
    for (int b = 0; b < NBLK; b++) begin
      make_ref(b);
      expect_blk[b] = 1'b1;
    end
    expect_blk[9] = 1'b0;  // cut by a re-initialization

    Control  = 6'b000001;
    MCmd     = 3'b000;
    MAddr    = '0;
    MReset_n = 1'b0;
    repeat (3) @(posedge Clock);
    @(negedge Clock) MReset_n = 1'b1;

    // before initialization: pixel reads and writes to another address are ignored
    cmd(3'b010, 6'd1, 8'd77);   n_ignored++;
    cmd(3'b001, 6'd2, 8'd0);    n_ignored++;
    idle(2);
    checks++;
    if (SCmdAccept !== 1'b0) begin failures++; $display("FAIL early SCmdAccept"); end

    // initialization step
    cmd(3'b001, 6'd1, 8'd0);
    n_init++;
    @(negedge Clock);
    checks++;
    if (SCmdAccept !== 1'b1) begin failures++; $display("FAIL SCmdAccept after init"); end

    // blocks 0..5 back to back: one pixel per clock
    for (int b = 0; b < 6; b++) send(b, 0, 64, 1'b0);
    // blocks 6..8 with idle cycles and foreign commands between pixels
    for (int b = 6; b < 9; b++) send(b, 0, 64, 1'b1);
    idle(120);
    // block 9 cut off by re-initialization, then blocks 10, 11
    send(9, 0, 20, 1'b0);
    cmd(3'b001, 6'd1, 8'd0);
    n_reinit++;
    n_init++;
    send(10, 0, 64, 1'b0);
    send(11, 0, 64, 1'b0);
    idle(120);

    checks++;
    if (out_blk != NBLK || out_k != 0) begin
      failures++;
      $display("FAIL %0d blocks / %0d words received", out_blk, out_k);
    end
    $display("events: init=%0d reinit=%0d ignored=%0d idle_gaps=%0d back_to_back=%0d",
             n_init, n_reinit, n_ignored, n_idle, n_b2b);
    checks++;
    if (n_init == 0 || n_reinit == 0 || n_ignored == 0 || n_idle == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
