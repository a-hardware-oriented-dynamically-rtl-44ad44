// tb_awde_dr: a band of six random blocks (disparities from a small range,
// random Shapes, a random window size per block) followed by two blank
// blocks is pushed through the refinement unit.  Every refined column is
// compared with a reference computed in image coordinates: for pixel
// (r, x) with h = 3, 6 or 12 the 17 contributors are (r,x), its four
// neighbours and, per window corner at (r -/+ h clipped to rows 0..6,
// x -/+ h), the corner and its horizontal and vertical neighbours towards
// the pixel, gated by Shape bits 0, 6, 41, 47; pixels outside rows 0..6 or
// outside the band are inactive.  The result is the most frequent active
// value, the lowest-numbered contributor winning ties.
module tb_awde_dr;
  import awde_pkg::*;
  localparam int B = 6;
  localparam int NX = B * BLK;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, load_blank = 0;
  disp_t  [BLK-1:0][BLK-1:0] in_disp;
  shape_t [BLK-1:0][BLK-1:0] in_shape;
  wsize_t in_ws;
  logic load_ready, idle, block_done, block_done_blank, out_valid;
  disp_t [BLK-1:0] out_disp;
  logic [BLK-1:0] out_changed;
  int dsp [BLK][NX];
  shape_t shp [BLK][NX];
  wsize_t bws [B];
  int xo = 0, checks = 0, failures = 0, ndone = 0, nblank = 0;
  always #5 clk = ~clk;

  awde_dr dut (.clk(clk), .rst_n(rst_n), .clear(clear), .load(load), .load_blank(load_blank),
    .in_disp(in_disp), .in_shape(in_shape), .in_ws(in_ws), .load_ready(load_ready), .idle(idle),
    .block_done(block_done), .block_done_blank(block_done_blank), .out_valid(out_valid),
    .out_disp(out_disp), .out_changed(out_changed));

  function automatic int refine(int r, int x);
    int h, rt, rb;
    int rr [17], cc [17];
    logic [16:0] en;
    int bestc, besti;
    h = 3 * stride(bws[x / BLK]);
    rt = (r - h < 0) ? 0 : r - h;
    rb = (r + h > 6) ? 6 : r + h;
    rr = '{r, r-1, r+1, r, r, rt, rt, rt+1, rt, rt, rt+1, rb, rb, rb-1, rb, rb, rb-1};
    cc = '{x, x, x, x-1, x+1, x-h, x-h+1, x-h, x+h, x+h-1, x+h, x-h, x-h+1, x-h, x+h, x+h-1, x+h};
    for (int k = 0; k < 17; k++) begin
      logic g;
      g = (k < 5) ? 1'b1 : (k < 8) ? shp[r][x][0] : (k < 11) ? shp[r][x][6] :
          (k < 14) ? shp[r][x][41] : shp[r][x][47];
      en[k] = g && rr[k] >= 0 && rr[k] < BLK && cc[k] >= 0 && cc[k] < NX;
    end
    bestc = -1; besti = 0;
    for (int i = 0; i < 17; i++) begin
      int cnt;
      cnt = 0;
      for (int k = 0; k < 17; k++)
        if (en[i] && en[k] && dsp[rr[i]][cc[i]] == dsp[rr[k]][cc[k]]) cnt++;
      if (cnt > bestc) begin bestc = cnt; besti = i; end
    end
    return en[besti] ? dsp[rr[besti]][cc[besti]] : dsp[r][x];
  endfunction

  always @(posedge clk) begin
    if (block_done) ndone++;
    if (block_done_blank) nblank++;
    if (out_valid) begin
      for (int r = 0; r < BLK; r++) begin
        int e;
        e = (xo < NX) ? refine(r, xo) : -1;
        checks += 2;
        if (int'(out_disp[r]) != e) begin
          failures++;
          if (failures < 8) $display("x=%0d row %0d: %0d expected %0d", xo, r, out_disp[r], e);
        end
        if (xo < NX && out_changed[r] != (e != dsp[r][xo])) begin
          failures++;
          $display("x=%0d row %0d: change flag wrong", xo, r);
        end
      end
      xo++;
    end
  end

  task automatic push(input bit blank, input int b);
    @(negedge clk);
    while (!load_ready) @(negedge clk);
    load = 1; load_blank = blank;
    if (!blank) begin
      in_ws = bws[b];
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          in_disp[r][c] = disp_t'(dsp[r][b * BLK + c]);
          in_shape[r][c] = shp[r][b * BLK + c];
        end
    end
    @(negedge clk);
    load = 0; load_blank = 0;
  endtask

  initial begin
    in_disp = '0; in_shape = '0; in_ws = WS7;
    for (int b = 0; b < B; b++) bws[b] = wsize_t'(b % 3);
    for (int r = 0; r < BLK; r++)
      for (int x = 0; x < NX; x++) begin
        dsp[r][x] = $urandom_range(0, (x % 3 == 0) ? 2 : 5) + 40;
        shp[r][x] = {$urandom, $urandom};
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill the array with stale valid-looking data, then clear it
    push(0, 0);
    while (!idle) @(negedge clk);
    xo = -1000;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    xo = 0; ndone = 0;
    for (int b = 0; b < B; b++) push(0, b);
    push(1, 0);
    push(1, 0);
    @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (5) @(negedge clk);
    checks += 3;
    if (xo != NX) begin failures++; $display("%0d columns out, expected %0d", xo, NX); end
    if (ndone != B) begin failures++; $display("%0d blocks done", ndone); end
    if (nblank != 2) begin failures++; $display("%0d blank blocks done", nblank); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
