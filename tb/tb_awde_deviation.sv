// tb_awde_deviation: windows whose mean absolute deviation is set on and
// around the thresholds; checks the sums and the window-size decision of
// equation 2 with tr7 = 5 and tr13 = 2 (MAD > threshold picks the window).
module tb_awde_deviation;
  import awde_pkg::*;
  win_t w7, w13;
  logic [DEVS_W-1:0] s7, s13;
  wsize_t ws;
  int checks = 0, failures = 0;
  awde_deviation dut (.win7(w7), .win13(w13), .sum7(s7), .sum13(s13), .ws(ws));

  // window with centre c whose deviations add up to total
  function automatic win_t mk(int c, int total);
    win_t w;
    int rest = total;
    for (int n = 0; n < WIN_N; n++) w[n] = pix_t'(c);
    for (int n = 0; n < WIN_N && rest > 0; n++)
      if (n != 24) begin
        int dv;
        dv = (rest > 20) ? 20 : rest;
        w[n] = pix_t'((n % 2) ? c + dv : c - dv);
        rest -= dv;
      end
    return w;
  endfunction

  initial begin
    int tot7 [] = '{0, 100, 240, 241, 500, 240, 240, 240, 30};
    int tot13[] = '{0, 96, 96, 0, 0, 97, 500, 30, 97};
    for (int t = 0; t < tot7.size(); t++) begin
      wsize_t exp;
      w7 = mk(120, tot7[t]);
      w13 = mk(60, tot13[t]);
      #1;
      exp = (tot7[t] > 48 * 5) ? WS7 : (tot13[t] > 48 * 2) ? WS13 : WS25;
      checks += 3;
      if (int'(s7) != tot7[t]) begin failures++; $display("sum7 %0d exp %0d", s7, tot7[t]); end
      if (int'(s13) != tot13[t]) begin failures++; $display("sum13 %0d exp %0d", s13, tot13[t]); end
      if (ws != exp) begin failures++; $display("case %0d ws %0d expected %0d", t, ws, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
