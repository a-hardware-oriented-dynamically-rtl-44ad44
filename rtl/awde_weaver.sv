// awde_weaver: selects the sampled windows from the DFF array ("weaving").
//
// Process row r (0..6) is the window centred on array row 12 + r, column 12.
// Its sample (i, j) is taken from array row 12 + r + (i - 3) * s and column
// 12 - (j - 3) * s, where s = 1, 2 or 4 for the 7x7, 13x13 and 25x25 window;
// the column index decreases with j because older (further left in the
// image) pixels sit further right in the array.  Each stride is plain
// wiring and the window size drives one 3-way multiplexer per sample.
//
// The two deviation windows are woven around array position (15, 8) with
// strides 1 and 2; the window-size decision of a block is taken there.
// They are brought out on their own buses rather than through process row 4.
// Their stride is fixed, so these two outputs are nothing but wires from the
// array registers; no logic sits between.
// Purely combinational.
module awde_weaver
  import awde_pkg::*;
(
  input  pix_t [ROWS-1:0][ARR_COLS-1:0] arr,
  input  wsize_t ws,
  output win_t [BLK-1:0] prow,
  output win_t           dev7,
  output win_t           dev13
);
  function automatic win_t weave(pix_t [ROWS-1:0][ARR_COLS-1:0] a,
                                 int row, int col, int s);
    win_t w;
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++)
        w[7*i + j] = a[row + (i - 3) * s][col - (j - 3) * s];
    return w;
  endfunction

  always_comb begin
    for (int r = 0; r < BLK; r++) begin
      case (ws)
        WS7:     prow[r] = weave(arr, TAP_ROW0 + r, TAP_COL, 1);
        WS13:    prow[r] = weave(arr, TAP_ROW0 + r, TAP_COL, 2);
        default: prow[r] = weave(arr, TAP_ROW0 + r, TAP_COL, 4);
      endcase
    end
    dev7  = weave(arr, DEV_ROW, DEV_COL, 1);
    dev13 = weave(arr, DEV_ROW, DEV_COL, 2);
  end
endmodule
