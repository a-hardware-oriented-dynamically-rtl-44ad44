// tb_awde_ads: feeds the selection unit with random costs in the skewed
// order the metrics unit produces (block column c sees disparity
// dmax + c - j at step j) and checks the 49 selected disparities against a
// reference that, per pixel, interpolates the BW-SAD from the four nearest
// computed pixels (positions 1, 3, 5; floor of the average of four),
// adds Hamming * ap (32, 16, 4 for 7x7, 13x13, 25x25) and keeps the first
// minimum scanning from dmax down to 0.  Also checks that the result is
// held two cycles after the last step, with the Shapes and window size,
// until it is taken.
module tb_awde_ads;
  import awde_pkg::*;
  localparam int DMAX = 20;
  logic clk = 0, rst_n = 0;
  logic [DISP_W-1:0] dmax = DISP_W'(DMAX);
  wsize_t ws = WS7;
  logic met_valid = 0;
  logic [7:0] met_j = '0;
  ham_t [BLK-1:0][BLK-1:0] ham;
  sad_t [2:0][2:0] bwsad;
  shape_t [BLK-1:0][BLK-1:0] shape_in;
  logic res_valid, res_take = 0;
  disp_t [BLK-1:0][BLK-1:0] res_disp;
  shape_t [BLK-1:0][BLK-1:0] res_shape;
  wsize_t res_ws;
  int hc [BLK][BLK][DMAX+1];
  int hv [BLK][BLK][DMAX+1];
  int bv [3][3][DMAX+1];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  awde_ads dut (.clk(clk), .rst_n(rst_n), .dmax(dmax), .ws(ws), .met_valid(met_valid),
    .met_j(met_j), .ham(ham), .bwsad(bwsad), .shape_in(shape_in), .res_valid(res_valid),
    .res_disp(res_disp), .res_shape(res_shape), .res_ws(res_ws), .res_take(res_take));

  // the computed pixel(s) nearest to block coordinate x
  function automatic int near_a(int x);
    if (x <= 1) return 0; else if (x == 2) return 0; else if (x == 3) return 1;
    else if (x == 4) return 1; else return 2;
  endfunction
  function automatic int near_b(int x);
    if (x <= 1) return 0; else if (x == 2) return 1; else if (x == 3) return 1;
    else if (x == 4) return 2; else return 2;
  endfunction

  task automatic one_block(wsize_t w);
    int ap;
    ap = (w == WS7) ? 32 : (w == WS13) ? 16 : 4;
    ws = w;
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        shape_in[r][c] = {$urandom, $urandom};
        for (int d = 0; d <= DMAX; d++) hv[r][c][d] = $urandom_range(0, 48);
      end
    for (int i = 0; i < 3; i++)
      for (int k = 0; k < 3; k++)
        for (int d = 0; d <= DMAX; d++) bv[i][k][d] = $urandom_range(0, 3000);
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++)
        for (int d = 0; d <= DMAX; d++)
          hc[r][c][d] = (bv[near_a(r)][near_a(c)][d] + bv[near_a(r)][near_b(c)][d] +
                         bv[near_b(r)][near_a(c)][d] + bv[near_b(r)][near_b(c)][d]) / 4 +
                        hv[r][c][d] * ap;
    for (int j = 0; j <= DMAX + 6; j++) begin
      @(negedge clk);
      met_valid = 1; met_j = 8'(j);
      for (int r = 0; r < BLK; r++)
        for (int c = 0; c < BLK; c++) begin
          int d;
          d = DMAX + c - j;
          ham[r][c] = (d >= 0 && d <= DMAX) ? ham_t'(hv[r][c][d]) : ham_t'($urandom_range(0, 48));
        end
      for (int i = 0; i < 3; i++)
        for (int k = 0; k < 3; k++) begin
          int d;
          d = DMAX + 2 * k + 1 - j;
          bwsad[i][k] = (d >= 0 && d <= DMAX) ? sad_t'(bv[i][k][d]) : sad_t'($urandom_range(0, 3000));
        end
    end
    @(negedge clk);
    met_valid = 0;
    checks++;
    if (res_valid) begin failures++; $display("result one cycle early"); end
    @(negedge clk);
    checks++;
    if (!res_valid) begin failures++; $display("result not ready two cycles after the last step"); end
    for (int r = 0; r < BLK; r++)
      for (int c = 0; c < BLK; c++) begin
        int best, bd;
        best = hc[r][c][DMAX]; bd = DMAX;
        for (int d = DMAX - 1; d >= 0; d--) if (hc[r][c][d] < best) begin best = hc[r][c][d]; bd = d; end
        checks++;
        if (int'(res_disp[r][c]) != bd) begin
          failures++;
          if (failures < 8) $display("ws %0d pixel (%0d,%0d): %0d expected %0d", w, r, c, res_disp[r][c], bd);
        end
      end
    checks += 2;
    if (res_shape !== shape_in) begin failures++; $display("shapes not held"); end
    if (res_ws != w) begin failures++; $display("window size not held"); end
    repeat (3) @(negedge clk);
    checks++;
    if (!res_valid) begin failures++; $display("hold register dropped"); end
    res_take = 1;
    @(negedge clk);
    res_take = 0;
    checks++;
    if (res_valid) begin failures++; $display("hold register not freed"); end
  endtask

  initial begin
    ham = '0; bwsad = '0; shape_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    one_block(WS7);
    one_block(WS13);
    one_block(WS25);
    one_block(WS13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
