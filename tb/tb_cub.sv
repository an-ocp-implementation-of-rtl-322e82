// tb_cub: checks the Control Unit Block on its own. From the OCP commands it
// sends, the testbench works out when each control signal must be active and
// compares every cycle: initialization (SCmdAccept, datapath clear), ignored
// commands, pixel capture with its column, the MEM INT write after each line,
// the bank swap after each block, the 64-cycle column-pass read schedule
// (lm_sel, lb_raddr, lb_rbank), cb_en/cb_row one cycle later, su_first, and
// the SData/SResp formatting of the Round Unit's results one cycle later.
module tb_cub;
  logic clk = 1'b0, rst_n;
  logic [13:0] MAddr;
  logic [2:0]  MCmd;
  logic [5:0]  Control;
  logic        SCmdAccept;
  logic [15:0] SData;
  logic [1:0]  SResp;
  logic dp_rst_n, pix_valid, lb_we, lb_wbank, lb_rbank, cb_en, cb_done, su_first;
  logic [7:0] pix;
  logic [2:0] pix_col, lb_waddr, lb_raddr, lm_sel, cb_row;
  logic signed [11:0] ru_q;
  logic ru_valid, ru_first;
  int checks = 0, failures = 0;

  cub dut (.*);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // the Column Unit's done, as the real one makes it
  always @(posedge clk) cb_done <= !dp_rst_n ? 1'b0 : (cb_en && cb_row == 3'd7);

  // expectations, keyed by the cycle whose negedge checks them
  int  e_pix [int];     // pixel value (pix_valid must be 1)
  int  e_col [int];
  int  e_we [int];      // line number written
  int  e_rd [int];      // column-pass step 0..63
  int  e_cb [int];      // cb_row expected with cb_en
  bit  e_sf [int];
  int  e_rb [int];      // read bank
  int  e_sd [int];      // SData with SResp = 01
  int  bank = 0;
  int  nblocks = 0, nswaps = 0;

  task automatic cmd(logic [2:0] c, logic [5:0] a, logic [7:0] p);
    @(negedge clk);
    MCmd = c; MAddr = {a, p};
    // random Round Unit result, to appear on SData one edge later
    ru_valid = ($urandom % 3 == 0);
    ru_first = ru_valid && ($urandom % 2 == 0);
    ru_q     = 12'($urandom);
    if (ru_valid) e_sd[cyc + 1] = int'({3'b000, ru_first, ru_q});
  endtask

  int k = 0;  // pixel index since initialization
  task automatic pixel(logic [7:0] p);
    int n;
    cmd(3'b010, 6'd5, p);
    n = cyc + 1;                  // accepting edge
    e_pix[n] = int'(p);
    e_col[n] = k % 8;
    if (k % 8 == 7) e_we[n + 1] = (k / 8) % 8;
    if (k % 64 == 63) begin
      for (int c = 0; c < 64; c++) begin
        e_rd[n + 2 + c] = c;
        e_rb[n + 2 + c] = bank;
        e_cb[n + 3 + c] = c % 8;
      end
      e_sf[n + 11] = 1'b1;
      bank = 1 - bank;
      nblocks++;
    end
    k++;
  endtask

  always @(negedge clk) if (rst_n && dp_rst_n) begin
    checks++;
    if (pix_valid != e_pix.exists(cyc) ||
        (pix_valid && (pix != 8'(e_pix[cyc]) || pix_col != 3'(e_col[cyc])))) begin
      failures++; $display("FAIL pixel at %0d", cyc);
    end
    checks++;
    if (lb_we != e_we.exists(cyc) || (lb_we && lb_waddr != 3'(e_we[cyc]))) begin
      failures++; $display("FAIL MEM INT write at %0d", cyc);
    end
    if (e_rd.exists(cyc)) begin
      checks++;
      if (lm_sel != 3'(e_rd[cyc] / 8) || lb_raddr != 3'(e_rd[cyc] % 8) ||
          lb_rbank != 1'(e_rb[cyc])) begin
        failures++; $display("FAIL column read at %0d", cyc);
      end
      if (e_rd[cyc] == 0) begin
        checks++;
        if (lb_wbank == lb_rbank) begin failures++; $display("FAIL bank clash"); end
        nswaps++;
      end
    end
    checks++;
    if (cb_en != e_cb.exists(cyc) || (cb_en && cb_row != 3'(e_cb[cyc]))) begin
      failures++; $display("FAIL cb_en at %0d", cyc);
    end
    checks++;
    if (su_first != e_sf.exists(cyc)) begin failures++; $display("FAIL su_first at %0d", cyc); end
    checks++;
    if (e_sd.exists(cyc) ? (SResp != 2'b01 || SData != 16'(e_sd[cyc]))
                         : (SResp != 2'b00 || SData != 16'h0)) begin
      failures++; $display("FAIL SData/SResp at %0d", cyc);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; MCmd = 3'b000; MAddr = '0; Control = 6'd5;
    ru_valid = 1'b0; ru_first = 1'b0; ru_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ignored: pixel before initialization, write to another address
    cmd(3'b010, 6'd5, 8'd1);
    cmd(3'b001, 6'd6, 8'd0);
    @(negedge clk);
    checks++;
    if (SCmdAccept != 1'b0) begin failures++; $display("FAIL SCmdAccept before init"); end
    // initialization: the datapath clear is active while the write is presented
    cmd(3'b001, 6'd5, 8'd0);
    #1;
    checks++;
    if (dp_rst_n != 1'b0) begin failures++; $display("FAIL no datapath clear"); end
    e_sd.delete();
    @(negedge clk);
    MCmd = 3'b000;
    checks++;
    if (SCmdAccept != 1'b1) begin failures++; $display("FAIL SCmdAccept after init"); end
    // two blocks back to back, then one with idle cycles and foreign reads
    for (int i = 0; i < 128; i++) pixel(8'($urandom));
    for (int i = 0; i < 64; i++) begin
      if ($urandom % 4 == 0) cmd(3'b000, 6'd5, 8'd0);
      if ($urandom % 4 == 0) cmd(3'b010, 6'd7, 8'd3);
      pixel(8'($urandom));
    end
    repeat (90) cmd(3'b000, 6'd0, 8'd0);
    checks++;
    if (nswaps != 3 || nblocks != 3) begin failures++; $display("FAIL %0d column passes", nswaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
