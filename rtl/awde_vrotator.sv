// awde_vrotator: vertical rotator of the data allocation unit.
//
// Image row y is kept in line buffer y mod 31, so the 31 buffers hold a
// window of rows in circular order.  The rotator restores the image order:
// output line i carries buffer (i + rot) mod 31, so with rot = (y_top mod 31)
// line 0 is the topmost row y_top of the window.  Purely combinational.
module awde_vrotator
  import awde_pkg::*;
(
  input  pix_t [ROWS-1:0] lines_in,
  input  logic [4:0]      rot,
  output pix_t [ROWS-1:0] lines_out
);
  always_comb begin
    for (int i = 0; i < ROWS; i++) begin
      automatic int k = i + int'(rot);
      if (k >= ROWS) k -= ROWS;
      lines_out[i] = lines_in[k];
    end
  end
endmodule
