// awde_census: Census transform of one 49-pixel sampled window.
//
// Bit b of the 48-bit result is 1 when the non-centre sample it stands for
// (see awde_pkg) is darker than the centre sample.  The window has already
// been sampled with the block's stride, so the same unit serves the 7x7,
// 13x13 and 25x25 windows.  Purely combinational.  The comparison direction
// (neighbour < centre) is this design's choice.
module awde_census
  import awde_pkg::*;
(
  input  win_t    win,
  output census_t census
);
  always_comb begin
    for (int b = 0; b < CEN_W; b++)
      census[b] = win[bit2sample(b)] < win[24];
  end
endmodule
