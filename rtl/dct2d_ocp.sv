// dct2d_ocp: 8x8 two-dimensional DCT (or, with INVERSE = 1, inverse DCT) as an
// OCP slave core.
//
// The 2-D transform is computed as 1-D transforms of the eight lines of a block
// followed by 1-D transforms of the eight columns of the result. Pixels arrive
// one per clock through the Control Unit Block (cub), in line order. The Line
// Unit's eight Line Blocks each compute one point of the line transform with a
// multiplier-accumulator and keep it in their memory, so that Line Block k
// ends with column k of the intermediate block. The Line Multiplexer (lm) then
// streams those columns, one value per clock, into the Column Unit, whose
// eight Column Blocks produce one column of the 2-D result every eight cycles.
// The Serialization Unit (su) sends these out one per clock and the Round Unit
// (ru) reduces them to OUT_W bits for SData.
//
// Interface (OCP basic signals plus the Control sideband): Clock, MReset_n,
// MAddr = {chip address, pixel}, MCmd, Control (this core's address),
// SCmdAccept, SData = {3'b000, first, coefficient}, SResp (01 = data valid).
// A write to the core's address initializes it; reads to that address then
// carry the pixels. Throughput is one pixel per clock (64 cycles per block,
// blocks back to back); the first coefficient of a block appears on SData 14
// edges after the edge that accepted the block's last pixel.
// Output order: column by column of the 2-D result, F(0,v), F(1,v) ... F(7,v)
// for v = 0..7, where F(u,v) has u along the lines' direction of arrival.
// Feeding this order into an inverse core gives the pixels back in line order.
//
// The block structure, the OCP signal set and formats and the 12-bit output
// follow the published design. MReset_n, the number formats (COEF_FRAC, LINE_FRAC),
// the input width of the inverse core and the output order are this design's.
module dct2d_ocp
  import dct_pkg::*;
#(
  parameter bit          INVERSE   = 1'b0,
  parameter int unsigned ADDR_W    = 6,
  parameter int unsigned IN_W      = 8,
  parameter int unsigned OUT_W     = 12,
  parameter int unsigned COEF_FRAC = 12,
  parameter int unsigned LINE_FRAC = 3
) (
  input  logic                   Clock,
  input  logic                   MReset_n,
  input  logic [ADDR_W+IN_W-1:0] MAddr,
  input  logic [2:0]             MCmd,
  input  logic [ADDR_W-1:0]      Control,
  output logic                   SCmdAccept,
  output logic [15:0]            SData,
  output logic [1:0]             SResp
);

  localparam int unsigned LINE_W = IN_W + LINE_FRAC + 3;
  localparam int unsigned COEF_W = COEF_FRAC + 2;
  localparam int unsigned ACC_W  = LINE_W + COEF_W + 3;

  logic                    dp_rst_n;
  logic                    pix_valid;
  logic [IN_W-1:0]         pix;
  logic [2:0]              pix_col;
  logic                    lb_we, lb_wbank, lb_rbank;
  logic [2:0]              lb_waddr, lb_raddr, lm_sel;
  logic                    cb_en, cb_done, su_first;
  logic [2:0]              cb_row;
  logic signed [LINE_W-1:0] fl [N];
  logic signed [LINE_W-1:0] fl_q;
  logic signed [ACC_W-1:0]  F [N];
  logic signed [ACC_W-1:0]  su_q;
  logic                     su_valid, su_qfirst;
  logic signed [OUT_W-1:0]  ru_q;
  logic                     ru_valid, ru_first;

  cub #(.ADDR_W(ADDR_W), .IN_W(IN_W), .OUT_W(OUT_W)) u_cub (
    .clk(Clock), .rst_n(MReset_n),
    .MAddr, .MCmd, .Control, .SCmdAccept, .SData, .SResp,
    .dp_rst_n,
    .pix_valid, .pix, .pix_col, .lb_we, .lb_waddr, .lb_wbank,
    .lb_raddr, .lb_rbank, .lm_sel, .cb_en, .cb_row, .cb_done, .su_first,
    .ru_q, .ru_valid, .ru_first
  );

  line_unit #(.INVERSE(INVERSE), .IN_W(IN_W), .COEF_FRAC(COEF_FRAC), .LINE_FRAC(LINE_FRAC))
  u_line_unit (
    .clk(Clock), .rst_n(dp_rst_n),
    .pix_valid, .pix, .col(pix_col),
    .we(lb_we), .waddr(lb_waddr), .wbank(lb_wbank),
    .raddr(lb_raddr), .rbank(lb_rbank),
    .fl
  );

  lm #(.W(LINE_W)) u_lm (.clk(Clock), .d(fl), .sel(lm_sel), .q(fl_q));

  col_unit #(.INVERSE(INVERSE), .A_W(LINE_W), .COEF_FRAC(COEF_FRAC)) u_col_unit (
    .clk(Clock), .rst_n(dp_rst_n), .en(cb_en), .row(cb_row), .fl(fl_q), .F, .done(cb_done)
  );

  su #(.W(ACC_W)) u_su (
    .clk(Clock), .rst_n(dp_rst_n), .load(cb_done), .first(su_first), .d(F),
    .q(su_q), .q_valid(su_valid), .q_first(su_qfirst)
  );

  ru #(.IN_W(ACC_W), .SH(COEF_FRAC + LINE_FRAC), .OUT_W(OUT_W)) u_ru (
    .clk(Clock), .rst_n(dp_rst_n), .d(su_q), .d_valid(su_valid), .d_first(su_qfirst),
    .q(ru_q), .q_valid(ru_valid), .q_first(ru_first)
  );

endmodule
