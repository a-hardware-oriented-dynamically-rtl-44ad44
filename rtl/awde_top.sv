// awde_top: reconfigurable disparity estimation module (adaptive window
// size disparity estimation, AWDE).
//
// Estimates, for every pixel of the left image, the horizontal disparity
// (0..dmax) to the right image of a rectified stereo pair.  Pixels are
// searched in 7x7 blocks; each block gets a 7x7, 13x13 or 25x25 window from
// the texture around its centre, always sampled as 49 pixels.  Costs are a
// Census Hamming distance, weighted by a window-size dependent penalty,
// plus a binary-window SAD; the minimum-cost disparity of each pixel is then
// refined to the most frequent disparity among 17 neighbours of the same
// object.
//
// Structure: 62 line buffers (31 rows of each image) -> data allocation
// (select, rotate, 31x25 register array, weaver) -> metrics (Census, Shape,
// Hamming, BW-SAD, deviation) -> disparity selection -> refinement, all
// sequenced by the control unit.
//
// Interface:
//  * wr_*: line-buffer write port of the external memory side.  Image row y
//    of the left (wr_img = 0) or right (wr_img = 1) image goes to buffer
//    wr_row = y mod 31; rows above or below the image are supplied by the
//    writer (for example as copies of the edge row).
//  * band_start / band_y0: start the band of rows band_y0 .. band_y0 + 6
//    once rows band_y0 - 12 .. band_y0 + 18 of both images are in the
//    buffers; band_done pulses when its last disparity has left.  The
//    buffers must not be written while a band runs.
//  * cfg_dmax (disparity range, default use 120) and cfg_color (component
//    searched, 0 = Y) are sampled throughout a band and must stay constant.
//  * out_valid / out_x / out_y0 / out_disp: one refined column of seven
//    disparities (rows out_y0 .. out_y0 + 6) per beat, from left to right.
// Throughput: one block per dmax + 62 cycles when dmax >= 91; below that
// the refinement (127 cycles per block) sets the pace and the control unit
// stalls.
module awde_top
  import awde_pkg::*;
#(
  parameter int IMG_W = 1024,
  parameter int TR7   = TR7_DEF,
  parameter int TR13  = TR13_DEF,
  parameter int AP7   = AP7_DEF,
  parameter int AP13  = AP13_DEF,
  parameter int AP25  = AP25_DEF,
  parameter int THR_W = THRW_DEF,
  parameter int AW    = $clog2(IMG_W)
)(
  input  logic clk,
  input  logic rst_n,
  // line-buffer write port
  input  logic          wr_en,
  input  logic          wr_img,
  input  logic [4:0]    wr_row,
  input  logic [AW-1:0] wr_addr,
  input  logic [RAW_W-1:0] wr_data,
  // configuration
  input  logic [DISP_W-1:0] cfg_dmax,
  input  logic [1:0]    cfg_color,
  // band protocol
  input  logic          band_start,
  input  logic [10:0]   band_y0,
  output logic          band_done,
  output logic          busy,
  // refined disparities
  output logic          out_valid,
  output logic [11:0]   out_x,
  output logic [10:0]   out_y0,
  output disp_t [BLK-1:0] out_disp,
  // status
  output logic          stall,
  output logic [1:0]    block_ws,
  output logic [BLK-1:0] refine_changed
);
  logic [ROWS-1:0][RAW_W-1:0] bram_r, bram_l;
  logic [AW-1:0] rd_addr;
  logic rd_en;
  img_t   img_sel_q;
  logic [4:0] rot;
  wsize_t ws;
  win_t [BLK-1:0] prow;
  win_t dev7, dev13;
  logic cap_dev, cap_left, search;
  logic [2:0] cap_col;
  logic [7:0] search_j;
  shape_t [BLK-1:0][BLK-1:0] shape_l;
  logic met_valid;
  logic [7:0] met_j;
  ham_t [BLK-1:0][BLK-1:0] ham;
  sad_t [2:0][2:0] bwsad;
  logic ads_valid;
  disp_t  [BLK-1:0][BLK-1:0] ads_disp;
  shape_t [BLK-1:0][BLK-1:0] ads_shape;
  wsize_t ads_ws;
  logic dr_clear, flush_req, dr_ready, dr_idle, dr_done, dr_done_blank;
  logic dr_take, dr_blank_take, dr_out_valid;
  disp_t [BLK-1:0] dr_disp;
  logic [11:0] xcnt;

  // line buffers: 31 per image
  for (genvar i = 0; i < ROWS; i++) begin : g_bram
    awde_line_bram #(.DEPTH(IMG_W), .WIDTH(RAW_W)) u_r (
      .clk(clk), .we(wr_en && wr_img && wr_row == 5'(i)), .waddr(wr_addr), .wdata(wr_data),
      .re(rd_en), .raddr(rd_addr), .rdata(bram_r[i]));
    awde_line_bram #(.DEPTH(IMG_W), .WIDTH(RAW_W)) u_l (
      .clk(clk), .we(wr_en && !wr_img && wr_row == 5'(i)), .waddr(wr_addr), .wdata(wr_data),
      .re(rd_en), .raddr(rd_addr), .rdata(bram_l[i]));
  end

  awde_control #(.IMG_W(IMG_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .band_start(band_start), .band_y0(band_y0), .dmax(cfg_dmax),
    .band_done(band_done), .busy(busy), .stall(stall),
    .rd_addr(rd_addr), .rd_en(rd_en), .img_sel_q(img_sel_q), .rot(rot),
    .cap_dev(cap_dev), .cap_left(cap_left), .cap_col(cap_col),
    .search(search), .search_j(search_j),
    .dr_clear(dr_clear), .flush_req(flush_req),
    .dr_take(dr_take), .dr_blank_take(dr_blank_take),
    .dr_block_done(dr_done), .dr_idle(dr_idle));

  awde_data_alloc u_alloc (
    .clk(clk), .rst_n(rst_n), .bram_r(bram_r), .bram_l(bram_l),
    .img_sel(img_sel_q), .color_sel(color_t'(cfg_color)), .rot(rot), .shift(1'b1),
    .ws(ws), .prow(prow), .dev7(dev7), .dev13(dev13));

  awde_rcm #(.TR7(TR7), .TR13(TR13), .THR_W(THR_W)) u_rcm (
    .clk(clk), .rst_n(rst_n), .prow(prow), .dev7(dev7), .dev13(dev13),
    .cap_dev(cap_dev), .cap_left(cap_left), .cap_col(cap_col),
    .search(search), .search_j(search_j),
    .ws(ws), .shape_l(shape_l), .met_valid(met_valid), .met_j(met_j),
    .ham(ham), .bwsad(bwsad));

  awde_ads #(.AP7(AP7), .AP13(AP13), .AP25(AP25)) u_ads (
    .clk(clk), .rst_n(rst_n), .dmax(cfg_dmax), .ws(ws),
    .met_valid(met_valid), .met_j(met_j), .ham(ham), .bwsad(bwsad),
    .shape_in(shape_l), .res_valid(ads_valid), .res_disp(ads_disp),
    .res_shape(ads_shape), .res_ws(ads_ws), .res_take(dr_take));

  assign dr_take       = ads_valid && dr_ready;
  assign dr_blank_take = !ads_valid && flush_req && dr_ready;

  awde_dr u_dr (
    .clk(clk), .rst_n(rst_n), .clear(dr_clear),
    .load(dr_take || dr_blank_take), .load_blank(dr_blank_take),
    .in_disp(ads_disp), .in_shape(ads_shape), .in_ws(ads_ws),
    .load_ready(dr_ready), .idle(dr_idle),
    .block_done(dr_done), .block_done_blank(dr_done_blank),
    .out_valid(dr_out_valid), .out_disp(dr_disp), .out_changed(refine_changed));

  // column position of the refined output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xcnt   <= '0;
      out_y0 <= '0;
    end else if (band_start && !busy) begin
      xcnt   <= '0;
      out_y0 <= band_y0;
    end else if (dr_out_valid) begin
      xcnt <= xcnt + 12'd1;
    end
  end

  assign out_valid = dr_out_valid && (int'(xcnt) < IMG_W);
  assign out_x     = xcnt;
  assign out_disp  = dr_disp;
  assign block_ws  = ws;
endmodule
