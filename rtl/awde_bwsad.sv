// awde_bwsad: binary-window sum of absolute differences (equation 4).
//
// Adds |L(n) - R(n)| over the 49 samples of a stored left window and the
// current right-image window, keeping only the samples whose Shape bit is 1;
// the multiplication by the Shape bit is done by forcing the absolute
// difference to zero.  The centre sample is always kept, since its own
// deviation from the centre is zero.  Purely combinational; the result fits
// 14 bits (49 * 255).
module awde_bwsad
  import awde_pkg::*;
(
  input  win_t   win_l,
  input  win_t   win_r,
  input  shape_t shape,
  output sad_t   sad
);
  always_comb begin
    sad = '0;
    for (int n = 0; n < WIN_N; n++) begin
      automatic logic keep = (n == 24) ? 1'b1 : shape[(n < 24) ? n : n - 1];
      automatic pix_t ad = (win_l[n] > win_r[n]) ? win_l[n] - win_r[n]
                                                 : win_r[n] - win_l[n];
      if (keep) sad = sad + sad_t'(ad);
    end
  end
endmodule
