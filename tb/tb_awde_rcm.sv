// tb_awde_rcm: drives the metrics unit as the control unit would.  The
// deviation capture is given flat, medium and textured windows (expected
// window sizes 25x25, 13x13, 7x7).  Seven left columns of random process
// rows are captured; then random right columns are searched and, one cycle
// later, all 49 Hamming distances and 9 BW-SADs are compared with values
// recomputed here from the captured windows.
module tb_awde_rcm;
  import awde_pkg::*;
  logic clk = 0, rst_n = 0;
  win_t [BLK-1:0] prow;
  win_t dev7, dev13;
  logic cap_dev = 0, cap_left = 0, search = 0;
  logic [2:0] cap_col = '0;
  logic [7:0] search_j = '0;
  wsize_t ws;
  shape_t [BLK-1:0][BLK-1:0] shape_l;
  logic met_valid;
  logic [7:0] met_j;
  ham_t [BLK-1:0][BLK-1:0] ham;
  sad_t [2:0][2:0] bwsad;
  win_t [BLK-1:0][BLK-1:0] lwin;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  awde_rcm dut (.clk(clk), .rst_n(rst_n), .prow(prow), .dev7(dev7), .dev13(dev13),
    .cap_dev(cap_dev), .cap_left(cap_left), .cap_col(cap_col), .search(search),
    .search_j(search_j), .ws(ws), .shape_l(shape_l), .met_valid(met_valid), .met_j(met_j),
    .ham(ham), .bwsad(bwsad));

  function automatic logic [47:0] cen_ref(win_t w);
    logic [47:0] v; int b = 0;
    for (int n = 0; n < 49; n++) if (n != 24) begin v[b] = w[n] < w[24]; b++; end
    return v;
  endfunction
  function automatic logic [47:0] shp_ref(win_t w);
    logic [47:0] v; int b = 0;
    for (int n = 0; n < 49; n++) if (n != 24) begin
      v[b] = (int'(w[n]) - int'(w[24]) <= 8) && (int'(w[24]) - int'(w[n]) <= 8); b++;
    end
    return v;
  endfunction
  function automatic int sad_ref(win_t a, win_t b, logic [47:0] s);
    int acc = 0, k = 0;
    for (int n = 0; n < 49; n++) begin
      int keep;
      keep = 1;
      if (n != 24) begin keep = s[k]; k++; end
      if (keep) acc += (a[n] > b[n]) ? a[n] - b[n] : b[n] - a[n];
    end
    return acc;
  endfunction
  function automatic win_t rnd_win(int amp);
    win_t w;
    for (int n = 0; n < 49; n++) w[n] = pix_t'(100 + $urandom_range(0, amp));
    return w;
  endfunction

  task automatic one_block(int amp7, int amp13, wsize_t exp_ws);
    @(negedge clk);
    dev7 = rnd_win(amp7); dev13 = rnd_win(amp13);
    dev7[24] = 8'd100; dev13[24] = 8'd100;
    cap_dev = 1;
    @(negedge clk);
    cap_dev = 0;
    checks++;
    if (ws != exp_ws) begin failures++; $display("window size %0d expected %0d", ws, exp_ws); end
    for (int c = 0; c < BLK; c++) begin
      for (int r = 0; r < BLK; r++) begin
        prow[r] = rnd_win(40);
        lwin[r][c] = prow[r];
      end
      cap_left = 1; cap_col = 3'(c);
      @(negedge clk);
    end
    cap_left = 0;
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        checks++;
        if (shape_l[r][c] !== shp_ref(lwin[r][c])) begin failures++; $display("shape %0d %0d", r, c); end
      end
    for (int j = 0; j < 30; j++) begin
      win_t [BLK-1:0] rw;
      for (int r = 0; r < BLK; r++) begin
        rw[r] = (j == 5) ? lwin[r][3] : rnd_win(40);
        prow[r] = rw[r];
      end
      search = 1; search_j = 8'(j);
      @(negedge clk);
      search = 0;
      checks++;
      if (!met_valid || met_j != 8'(j)) begin failures++; $display("met_valid/met_j wrong"); end
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          checks++;
          if (int'(ham[r][c]) != $countones(cen_ref(lwin[r][c]) ^ cen_ref(rw[r]))) begin
            failures++;
            if (failures < 5) $display("hamming %0d %0d wrong", r, c);
          end
        end
      for (int i = 0; i < 3; i++)
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (int'(bwsad[i][k]) != sad_ref(lwin[2*i+1][2*k+1], rw[2*i+1], shp_ref(lwin[2*i+1][2*k+1]))) begin
            failures++;
            if (failures < 5) $display("bwsad %0d %0d wrong", i, k);
          end
        end
    end
  endtask

  initial begin
    prow = '0; dev7 = '0; dev13 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one_block(0, 0, WS25);
    one_block(2, 30, WS13);
    one_block(60, 60, WS7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
