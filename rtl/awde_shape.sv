// awde_shape: binary window ("Shape") of one 49-pixel sampled window.
//
// Bit b is 1 when the sample it stands for differs from the centre by no
// more than THR_W (equation 3 of the algorithm: w = 0 when |I(q) - I(p)| >
// threshold_w, else 1).  The Shape gates the absolute differences of the
// BW-SAD and supplies the activation bits of the disparity refinement.
// Purely combinational.
module awde_shape
  import awde_pkg::*;
#(
  parameter int THR_W = THRW_DEF
)(
  input  win_t   win,
  output shape_t shape
);
  always_comb begin
    for (int b = 0; b < CEN_W; b++) begin
      automatic int q = int'(win[bit2sample(b)]);
      automatic int c = int'(win[24]);
      shape[b] = ((q > c) ? q - c : c - q) <= THR_W;
    end
  end
endmodule
