// cub: Control Unit Block. It is the OCP slave port of the core and produces
// every sequencing signal of the datapath.
//
// OCP side: a write (MCmd = 001) whose address field MAddr[ADDR_W+IN_W-1:IN_W]
// equals the Control input initializes the core: the datapath is cleared, the
// pixel counter goes to zero, and SCmdAccept rises on the next edge and stays
// high. After that every read (MCmd = 010) to the same address delivers one
// pixel in MAddr[IN_W-1:0]; idle cycles (000) simply pause the input. Results
// leave on SData[OUT_W-1:0] with SData[OUT_W] set on the first coefficient of
// each block, SData[15:OUT_W+1] zero, and SResp = 01 marks a valid word.
//
// Sequencing: the 64 accepted pixels of a block are counted in line order.
// Line pass (stage 1): pix_* carries the pixel with its column, one edge after
// it was accepted; one edge after the last pixel of a line lb_we writes the
// Line Blocks' sums into MEM INT bank lb_wbank at line lb_waddr. Writing line 7
// completes a block: the banks swap and a 64-cycle column pass starts, in
// which cycle c reads word c%8 of Line Block c/8 from the other bank (lm_sel,
// lb_raddr, lb_rbank). The Line Multiplexer registers that value; cb_en/cb_row
// follow it one edge later, and su_first is registered with the Column Unit's
// done so that the Serialization Unit can flag the first column. The next
// block's pixels may arrive without a gap: they use the other bank.
// From the edge that accepts the last pixel of a block to the edge that
// presents F(0,0) on SData there are 14 edges; a block then takes 64
// consecutive output cycles.
//
// That the CUB makes the OCP handshake and all control signals, the command
// codes, address check, pixel field and SData/SResp formats follow the
// document. The reset input, the clearing on initialization, the pixel command
// (read, as in the published design's waveforms) and the banked schedule are this
// design's reading of it.
module cub
  import dct_pkg::*;
#(
  parameter int unsigned ADDR_W = 6,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned OUT_W  = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // OCP slave
  input  logic [ADDR_W+IN_W-1:0]  MAddr,
  input  logic [2:0]              MCmd,
  input  logic [ADDR_W-1:0]       Control,
  output logic                    SCmdAccept,
  output logic [15:0]             SData,
  output logic [1:0]              SResp,
  // datapath clear (initialization or reset)
  output logic                    dp_rst_n,
  // line pass
  output logic                    pix_valid,
  output logic [IN_W-1:0]         pix,
  output logic [2:0]              pix_col,
  output logic                    lb_we,
  output logic [2:0]              lb_waddr,
  output logic                    lb_wbank,
  // column pass
  output logic [2:0]              lb_raddr,
  output logic                    lb_rbank,
  output logic [2:0]              lm_sel,
  output logic                    cb_en,
  output logic [2:0]              cb_row,
  input  logic                    cb_done,
  output logic                    su_first,
  // rounded result
  input  logic signed [OUT_W-1:0] ru_q,
  input  logic                    ru_valid,
  input  logic                    ru_first
);

  logic       addr_hit, init_cmd, pix_cmd;
  logic       active;          // initialized
  logic [5:0] pix_cnt;         // position of the next pixel in its block
  logic [2:0] pix_row;
  logic       col_active;
  logic [5:0] col_cnt;
  logic [2:0] cb_col;
  logic       block_done;

  assign addr_hit = MAddr[ADDR_W+IN_W-1:IN_W] == Control;
  assign init_cmd = (ocp_cmd_e'(MCmd) == OCP_WRITE) && addr_hit;
  assign pix_cmd  = (ocp_cmd_e'(MCmd) == OCP_READ) && addr_hit && active;
  assign dp_rst_n = rst_n && !init_cmd;
  assign SCmdAccept = active;

  // input capture
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      pix_cnt   <= '0;
      pix_valid <= 1'b0;
    end else if (init_cmd) begin
      active    <= 1'b1;
      pix_cnt   <= '0;
      pix_valid <= 1'b0;
    end else begin
      pix_valid <= pix_cmd;
      if (pix_cmd) pix_cnt <= pix_cnt + 6'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (pix_cmd) begin
      pix     <= MAddr[IN_W-1:0];
      pix_col <= pix_cnt[2:0];
      pix_row <= pix_cnt[5:3];
    end
  end

  // line results into MEM INT, bank swap and column pass
  assign block_done = lb_we && (lb_waddr == 3'd7);

  always_ff @(posedge clk) begin
    if (!dp_rst_n) begin
      lb_we      <= 1'b0;
      lb_waddr   <= '0;
      lb_wbank   <= 1'b0;
      col_active <= 1'b0;
      col_cnt    <= '0;
    end else begin
      lb_we    <= pix_valid && (pix_col == 3'd7);
      lb_waddr <= pix_row;
      if (block_done) begin
        lb_wbank   <= !lb_wbank;
        col_active <= 1'b1;
        col_cnt    <= '0;
      end else if (col_active) begin
        col_cnt <= col_cnt + 6'd1;
        if (col_cnt == 6'd63) col_active <= 1'b0;
      end
    end
  end

  assign lb_rbank = !lb_wbank;
  assign lb_raddr = col_cnt[2:0];
  assign lm_sel   = col_cnt[5:3];

  always_ff @(posedge clk) begin
    if (!dp_rst_n) begin
      cb_en    <= 1'b0;
      cb_row   <= '0;
      cb_col   <= '0;
      su_first <= 1'b0;
    end else begin
      cb_en    <= col_active;
      cb_row   <= col_cnt[2:0];
      cb_col   <= col_cnt[5:3];
      su_first <= cb_en && (cb_row == 3'd7) && (cb_col == 3'd0);
    end
  end

  // OCP response
  always_ff @(posedge clk) begin
    if (!dp_rst_n) begin
      SData <= '0;
      SResp <= OCP_RESP_NULL;
    end else begin
      SData <= ru_valid ? 16'({ru_first, ru_q}) : '0;
      SResp <= ru_valid ? OCP_RESP_DVA : OCP_RESP_NULL;
    end
  end

  // a new block may only complete once the previous column pass is at its end
  a_no_overrun: assert property (@(posedge clk) disable iff (!dp_rst_n)
    block_done |-> (!col_active || col_cnt == 6'd63));
  // the Column Unit finishes a column exactly when the schedule says so
  a_done_sched: assert property (@(posedge clk) disable iff (!dp_rst_n)
    cb_done == $past(cb_en && cb_row == 3'd7));

endmodule
