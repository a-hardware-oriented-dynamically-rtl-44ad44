// awde_data_alloc: reconfigurable data allocation unit.
//
// The 31 right-image and 31 left-image line buffers are read at the same
// address.  Per row the image select picks the left or right buffer, the
// colour select picks one 8-bit component of the 24-bit pixel (bits 23:16 =
// Y, 15:8 = Cb, 7:0 = Cr, this design's packing), the vertical rotator puts
// the rows in image order and the column is shifted into the DFF array.
// The weaver then presents seven 49-pixel process rows and the two
// deviation windows.
//
// Timing: the select inputs apply to the buffer data of the same cycle (the
// cycle after the address); that column enters array column 0 at the next
// clock edge.  Everything after the array is combinational.
module awde_data_alloc
  import awde_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic [ROWS-1:0][RAW_W-1:0] bram_r,
  input  logic [ROWS-1:0][RAW_W-1:0] bram_l,
  input  img_t   img_sel,
  input  color_t color_sel,
  input  logic [4:0] rot,
  input  logic   shift,
  input  wsize_t ws,
  output win_t [BLK-1:0] prow,
  output win_t   dev7,
  output win_t   dev13
);
  pix_t [ROWS-1:0] comp;
  pix_t [ROWS-1:0] lines;
  pix_t [ROWS-1:0][ARR_COLS-1:0] arr;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      automatic logic [RAW_W-1:0] px = (img_sel == IMG_RIGHT) ? bram_r[r] : bram_l[r];
      case (color_sel)
        COL_Y:   comp[r] = px[23:16];
        COL_CB:  comp[r] = px[15:8];
        default: comp[r] = px[7:0];
      endcase
    end
  end

  awde_vrotator u_rot (.lines_in(comp), .rot(rot), .lines_out(lines));

  awde_dff_array u_arr (.clk(clk), .rst_n(rst_n), .shift(shift), .col_in(lines), .arr(arr));

  awde_weaver u_weave (.arr(arr), .ws(ws), .prow(prow), .dev7(dev7), .dev13(dev13));
endmodule
