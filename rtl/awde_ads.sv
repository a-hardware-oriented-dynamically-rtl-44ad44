// awde_ads: adaptive disparity selection.
//
// Input: every search cycle j (met_j) the metrics unit delivers 49 Hamming
// distances and 9 BW-SADs.  Block column c sees disparity dmax + c - j, so
// the results of column c are delayed by 6 - c cycles; after that all 49
// pixels carry the costs of one disparity d = dmax + 6 - j, valid for
// j = 6 .. dmax + 6 (d = dmax down to 0).
//
// The BW-SAD of the 40 pixels without their own BW-SAD is interpolated
// from the 3x3 computed ones: for block coordinate x the two nearest
// computed rows/columns are (0,0),(0,0),(0,1),(1,1),(1,2),(2,2),(2,2) for
// x = 0..6, and the four corner values are averaged (>> 2), which is exact
// at the nine computed pixels and linear between them, with the edge
// pixels taking the nearest value.  The hybrid cost is
// HC = BW-SAD + (Hamming << log2(ap)), ap picked by the block's window size
// (equations 5 and 6).  49 comparators keep the smallest HC and its
// disparity; on equal cost the first (larger) disparity is kept.
//
// One cycle after the last disparity the 49 results, with the block's
// Shapes and window size, are copied into a hold register (res_valid) that
// stays until the refinement unit takes it (res_take).
module awde_ads
  import awde_pkg::*;
#(
  parameter int AP7  = AP7_DEF,
  parameter int AP13 = AP13_DEF,
  parameter int AP25 = AP25_DEF
)(
  input  logic clk,
  input  logic rst_n,
  input  logic [DISP_W-1:0] dmax,
  input  wsize_t ws,
  input  logic met_valid,
  input  logic [7:0] met_j,
  input  ham_t [BLK-1:0][BLK-1:0] ham,
  input  sad_t [2:0][2:0] bwsad,
  input  shape_t [BLK-1:0][BLK-1:0] shape_in,
  output logic res_valid,
  output disp_t  [BLK-1:0][BLK-1:0] res_disp,
  output shape_t [BLK-1:0][BLK-1:0] res_shape,
  output wsize_t res_ws,
  input  logic res_take
);
  localparam int SH7  = log2i(AP7);
  localparam int SH13 = log2i(AP13);
  localparam int SH25 = log2i(AP25);

  // delay lines: stage k holds the input delayed by k + 1 cycles
  ham_t [5:0][BLK-1:0][BLK-1:0] ham_dl;
  sad_t [4:0][2:0][2:0]         sad_dl;

  ham_t  [BLK-1:0][BLK-1:0] ham_a;
  sad_t  [2:0][2:0]         sad_a;
  logic  [HC_W-1:0] hc [BLK][BLK];
  logic  [HC_W-1:0] best [BLK][BLK];
  disp_t [BLK-1:0][BLK-1:0] best_d;
  logic  aligned, first, last, done_q;
  disp_t d_cur;
  int    sh;

  // alignment
  always_comb begin
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        ham_a[r][c] = (c == BLK - 1) ? ham[r][c] : ham_dl[5 - c][r][c];
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 3; k++)
        sad_a[i][k] = (k == 2) ? sad_dl[0][i][k] : sad_dl[4 - 2 * k][i][k];
  end

  always_comb begin
    aligned = met_valid && (met_j >= 8'd6) && (met_j <= 8'(dmax) + 8'd6);
    first   = met_valid && (met_j == 8'd6);
    last    = met_valid && (met_j == 8'(dmax) + 8'd6);
    d_cur   = disp_t'(8'(dmax) + 8'd6 - met_j);
    case (ws)
      WS7:     sh = SH7;
      WS13:    sh = SH13;
      default: sh = SH25;
    endcase
  end

  // interpolation and hybrid cost
  function automatic int lo_idx(int x);
    return (x <= 2) ? 0 : (x <= 4) ? 1 : 2;
  endfunction
  function automatic int hi_idx(int x);
    return (x <= 1) ? 0 : (x <= 3) ? 1 : 2;
  endfunction

  always_comb begin
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        automatic logic [SAD_W+1:0] s4 =
            (SAD_W+2)'(sad_a[lo_idx(r)][lo_idx(c)]) + (SAD_W+2)'(sad_a[lo_idx(r)][hi_idx(c)]) +
            (SAD_W+2)'(sad_a[hi_idx(r)][lo_idx(c)]) + (SAD_W+2)'(sad_a[hi_idx(r)][hi_idx(c)]);
        hc[r][c] = HC_W'(s4 >> 2) + (HC_W'(ham_a[r][c]) << sh);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ham_dl    <= '0;
      sad_dl    <= '0;
      best_d    <= '0;
      done_q    <= 1'b0;
      res_valid <= 1'b0;
      res_disp  <= '0;
      res_shape <= '0;
      res_ws    <= WS7;
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) best[r][c] <= '0;
    end else begin
      ham_dl[0] <= ham;
      sad_dl[0] <= bwsad;
      for (int k = 1; k < 6; k++) ham_dl[k] <= ham_dl[k-1];
      for (int k = 1; k < 5; k++) sad_dl[k] <= sad_dl[k-1];
      if (aligned)
        for (int r = 0; r < BLK; r++)
          for (int c = 0; c < BLK; c++)
            if (first || hc[r][c] < best[r][c]) begin
              best[r][c]   <= hc[r][c];
              best_d[r][c] <= d_cur;
            end
      done_q <= last;
      if (res_take) res_valid <= 1'b0;
      if (done_q) begin
        res_valid <= 1'b1;
        res_disp  <= best_d;
        res_shape <= shape_in;
        res_ws    <= ws;
      end
    end
  end

  // a finished block must never overwrite one the refinement has not taken
  assert property (@(posedge clk) disable iff (!rst_n) done_q |-> (!res_valid || res_take));
endmodule
