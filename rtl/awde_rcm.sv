// awde_rcm: reconfigurable computation of metrics.
//
// Works in the two phases of a block search.
//  * Left phase: while the seven columns of the block pass the weaver tap
//    (cap_left with the block column cap_col = 0..6), the Census and Shape of
//    each of the 7 process rows are stored as Census[r][c] and Shape[r][c],
//    and the windows of the nine BW-SAD pixels (rows and columns 1, 3, 5,
//    counted from 0) are stored.  One cycle earlier (cap_dev) the deviation
//    unit decides the block's window size from the two deviation windows.
//  * Search phase: every cycle with search = 1 one right-image column is at
//    the tap.  For each process row r its Census is compared with the 7
//    stored Census values of row r (49 Hamming distances) and, in rows 1, 3
//    and 5, its window is matched with the three stored windows of that row
//    (9 BW-SADs).  Block column c sees disparity d + c when column 0 sees d.
//
// Outputs are registered: met_valid / met_j follow search / search_j by one
// cycle.  Census, Shape, Hamming and BW-SAD are the document's; the exact
// pipeline depth (one register stage) is this design's choice.
module awde_rcm
  import awde_pkg::*;
#(
  parameter int TR7   = TR7_DEF,
  parameter int TR13  = TR13_DEF,
  parameter int THR_W = THRW_DEF
)(
  input  logic clk,
  input  logic rst_n,
  input  win_t [BLK-1:0] prow,
  input  win_t   dev7,
  input  win_t   dev13,
  input  logic   cap_dev,
  input  logic   cap_left,
  input  logic [2:0] cap_col,
  input  logic   search,
  input  logic [7:0] search_j,
  output wsize_t ws,                                  // window size of the block
  output shape_t [BLK-1:0][BLK-1:0] shape_l,          // Shapes of the block pixels
  output logic   met_valid,
  output logic [7:0] met_j,
  output ham_t [BLK-1:0][BLK-1:0] ham,                // Hamming results
  output sad_t [2:0][2:0] bwsad                       // BW-SAD results
);
  census_t [BLK-1:0] cen;
  shape_t  [BLK-1:0] shp;
  census_t [BLK-1:0][BLK-1:0] census_l;
  win_t    [2:0][2:0] win_l;
  ham_t    [BLK-1:0][BLK-1:0] ham_c;
  sad_t    [2:0][2:0] sad_c;
  wsize_t  ws_dev;

  for (genvar r = 0; r < BLK; r++) begin : g_row
    awde_census u_cen (.win(prow[r]), .census(cen[r]));
    awde_shape #(.THR_W(THR_W)) u_shp (.win(prow[r]), .shape(shp[r]));
    for (genvar c = 0; c < BLK; c++) begin : g_col
      awde_hamming u_ham (.a(census_l[r][c]), .b(cen[r]), .hd(ham_c[r][c]));
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_sad_r
    for (genvar k = 0; k < 3; k++) begin : g_sad_c
      awde_bwsad u_sad (.win_l(win_l[i][k]), .win_r(prow[2*i+1]),
                        .shape(shape_l[2*i+1][2*k+1]), .sad(sad_c[i][k]));
    end
  end

  awde_deviation #(.TR7(TR7), .TR13(TR13)) u_dev (
    .win7(dev7), .win13(dev13), .sum7(), .sum13(), .ws(ws_dev));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws        <= WS7;
      census_l  <= '0;
      shape_l   <= '0;
      win_l     <= '0;
      met_valid <= 1'b0;
      met_j     <= '0;
      ham       <= '0;
      bwsad     <= '0;
    end else begin
      if (cap_dev) ws <= ws_dev;
      if (cap_left) begin
        for (int r = 0; r < BLK; r++) begin
          census_l[r][cap_col] <= cen[r];
          shape_l[r][cap_col]  <= shp[r];
        end
        if (cap_col[0])
          for (int i = 0; i < 3; i++) win_l[i][cap_col[2:1]] <= prow[2*i+1];
      end
      met_valid <= search;
      met_j     <= search_j;
      if (search) begin
        ham   <= ham_c;
        bwsad <= sad_c;
      end
    end
  end
endmodule
