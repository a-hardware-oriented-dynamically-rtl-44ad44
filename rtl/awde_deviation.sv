// awde_deviation: window-size decision of a block (equations 1 and 2).
//
// The mean absolute deviation of the block centre from its 48 sampled
// neighbours is computed for the 7x7 window and for the 13x13 window.  The
// block gets a 7x7 window when MAD7 > tr7, else a 13x13 window when
// MAD13 > tr13, else a 25x25 window.  The division by 48 is avoided by
// comparing the sum of deviations with 48 * threshold, which gives the same
// decision for integer thresholds.  Purely combinational.
module awde_deviation
  import awde_pkg::*;
#(
  parameter int TR7  = TR7_DEF,
  parameter int TR13 = TR13_DEF
)(
  input  win_t   win7,      // 7x7 window (stride 1) around the block centre
  input  win_t   win13,     // 13x13 window (stride 2) around the block centre
  output logic [DEVS_W-1:0] sum7,
  output logic [DEVS_W-1:0] sum13,
  output wsize_t ws
);
  function automatic logic [DEVS_W-1:0] devsum(win_t w);
    logic [DEVS_W-1:0] s = '0;
    for (int n = 0; n < WIN_N; n++)
      s = s + DEVS_W'(pix_t'((w[n] > w[24]) ? w[n] - w[24] : w[24] - w[n]));
    return s;
  endfunction

  always_comb begin
    sum7  = devsum(win7);
    sum13 = devsum(win13);
    if (int'(sum7) > 48 * TR7)       ws = WS7;
    else if (int'(sum13) > 48 * TR13) ws = WS13;
    else                              ws = WS25;
  end
endmodule
