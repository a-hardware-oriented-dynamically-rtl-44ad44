// awde_pkg: types and constants shared by the adaptive-window disparity
// estimator.
//
// A "block" is the 7x7 group of left-image pixels searched in parallel.  A
// "window" is the 49 pixels sampled around one pixel on a 7x7 grid whose
// stride is 1, 2 or 4, so that it spans 7x7, 13x13 or 25x25 image pixels.
// Window samples are indexed n = 7*i + j, i the sample row (top to bottom)
// and j the sample column (left to right in image coordinates); n = 24 is
// the centre.  Census and Shape vectors have one bit per non-centre sample:
// bit b stands for n = b for b < 24 and n = b + 1 otherwise.
//
// The algorithm thresholds and penalties default to the published parameter
// set (tr7 = 5, tr13 = 2, ap = 32/16/4, threshold_w = 8).  The geometry
// constants (31 line buffers, 31x25 register array, centre tap in column 12,
// deviation tap at row 15 column 8, 35-column refinement array refined in
// column 14) follow the architecture description.
package awde_pkg;

  localparam int PIX_W    = 8;            // one colour component
  localparam int RAW_W    = 24;           // Y, Cb, Cr as stored in the line buffers
  localparam int BLK      = 7;            // block is BLK x BLK pixels
  localparam int WIN_N    = 49;           // sampled pixels per window
  localparam int CEN_W    = 48;           // Census / Shape bits
  localparam int ROWS     = 31;           // line buffers per image, DFF-array rows
  localparam int ARR_COLS = 25;           // DFF-array columns
  localparam int TAP_COL  = 12;           // column where the 7 process rows are woven
  localparam int TAP_ROW0 = 12;           // array row of process row 1
  localparam int DEV_ROW  = 15;           // deviation tap (block centre)
  localparam int DEV_COL  = 8;
  localparam int DISP_W   = 7;            // disparity 0..127
  localparam int HAM_W    = 6;            // Hamming distance 0..48
  localparam int SAD_W    = 14;           // BW-SAD 0..49*255
  localparam int HC_W     = 15;           // hybrid cost
  localparam int DEVS_W   = 14;           // sum of 48 absolute deviations
  localparam int DR_COLS  = 35;           // refinement array: five blocks
  localparam int DR_COL   = 14;           // refined column of the refinement array
  localparam int DR_LOAD0 = 28;           // first column a new block is loaded into
  localparam int NCONTR   = 17;           // refinement contributors

  // Published algorithm parameters
  localparam int TR7_DEF  = 5;
  localparam int TR13_DEF = 2;
  localparam int AP7_DEF  = 32;
  localparam int AP13_DEF = 16;
  localparam int AP25_DEF = 4;
  localparam int THRW_DEF = 8;

  typedef logic [PIX_W-1:0]           pix_t;
  typedef logic [WIN_N-1:0][PIX_W-1:0] win_t;    // one sampled window
  typedef logic [CEN_W-1:0]           census_t;
  typedef logic [CEN_W-1:0]           shape_t;
  typedef logic [DISP_W-1:0]          disp_t;
  typedef logic [HAM_W-1:0]           ham_t;
  typedef logic [SAD_W-1:0]           sad_t;

  typedef enum logic [1:0] {WS7 = 2'd0, WS13 = 2'd1, WS25 = 2'd2} wsize_t;
  typedef enum logic [1:0] {COL_Y = 2'd0, COL_CB = 2'd1, COL_CR = 2'd2} color_t;
  typedef enum logic {IMG_LEFT = 1'b0, IMG_RIGHT = 1'b1} img_t;

  // Sampling stride of a window size: 1, 2 or 4 pixels.
  function automatic int stride(wsize_t ws);
    case (ws)
      WS7:     return 1;
      WS13:    return 2;
      default: return 4;
    endcase
  endfunction

  // Window sample index of Census/Shape bit b.
  function automatic int bit2sample(int b);
    return (b < 24) ? b : b + 1;
  endfunction

  // Shift amount of a power-of-two penalty.
  function automatic int log2i(int v);
    int r = 0;
    while ((1 << (r + 1)) <= v) r++;
    return r;
  endfunction

endpackage
