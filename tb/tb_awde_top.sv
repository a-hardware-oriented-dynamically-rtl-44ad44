// tb_awde_top: end-to-end test of the disparity estimator at reduced width.
//
// A synthetic stereo pair is generated: the left image is noise whose
// amplitude depends on the column range (full 0..255 texture, 0..7 noise
// and 0..1 noise, so that all three window sizes are chosen) and the right
// image is the left one shifted by D pixels, R(x, y) = L(x + D, y).  Rows
// above and below the image repeat the edge rows in both images, so every
// pixel whose windows stay inside the image has a unique exact match at
// disparity D, and every refined output there must equal D.
//
// Runs: two bands at a 10-pixel range (the refinement is then slower than
// the search, so the control unit must stall), and one band at a 100-pixel
// range, where blocks must follow each other every dmax + 62 cycles with
// no stall.  Counted mechanisms: each window size, stalls, blank flush
// blocks, and refinement changing a disparity (the weak 0..1 noise region
// gives some wrong raw matches, which the refinement must correct).
module tb_awde_top;
  import awde_pkg::*;

  localparam int W = 98;
  localparam int H = 14;
  localparam int D = 4;
  localparam int AW = $clog2(W);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic wr_en, wr_img;
  logic [4:0] wr_row;
  logic [AW-1:0] wr_addr;
  logic [23:0] wr_data;
  logic [DISP_W-1:0] cfg_dmax;
  logic band_start;
  logic [10:0] band_y0;
  logic band_done, busy, out_valid, stall;
  logic [11:0] out_x;
  logic [10:0] out_y0;
  disp_t [BLK-1:0] out_disp;
  logic [1:0] block_ws;
  logic [BLK-1:0] refine_changed;

  int checks = 0, failures = 0;
  int n_ws [3] = '{0, 0, 0};
  int n_stall = 0, n_blank = 0, n_changed = 0, n_out = 0;
  int cur_y0 = 0;
  int last_dev = -1, n_period = 0, n_period_bad = 0, cyc = 0, period_want = 0;

  awde_top #(.IMG_W(W)) dut (
    .clk(clk), .rst_n(rst_n),
    .wr_en(wr_en), .wr_img(wr_img), .wr_row(wr_row), .wr_addr(wr_addr), .wr_data(wr_data),
    .cfg_dmax(cfg_dmax), .cfg_color(2'd0),
    .band_start(band_start), .band_y0(band_y0), .band_done(band_done), .busy(busy),
    .out_valid(out_valid), .out_x(out_x), .out_y0(out_y0), .out_disp(out_disp),
    .stall(stall), .block_ws(block_ws), .refine_changed(refine_changed));

  function automatic int hash(int x, int y);
    int unsigned v = 32'(x) * 32'd1103515245 + 32'(y) * 32'd2654435761 + 32'h9e37;
    v = v ^ (v >> 13);
    v = v * 32'h5bd1e995;
    v = v ^ (v >> 15);
    return int'(v & 32'h7fffffff);
  endfunction

  // left image, defined for any column so the right image can be shifted
  function automatic int lpix(int x, int y);
    if (x < 40)      return hash(x, y) & 255;
    else if (x < 68) return 100 + (hash(x, y) & 7);
    else             return 100 + (hash(x, y) & 1);
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic wr(input logic img, input int row, input int x, input int v);
    @(negedge clk);
    wr_en = 1'b1; wr_img = img; wr_row = 5'(row); wr_addr = AW'(x);
    wr_data = {8'(v), 8'h80, 8'h80};
  endtask

  task automatic load_band(input int y0);
    for (int y = y0 - 12; y <= y0 + 18; y++) begin
      automatic int yy = clampi(y, 0, H - 1);
      automatic int row = ((y % ROWS) + ROWS) % ROWS;
      for (int x = 0; x < W; x++) begin
        wr(1'b0, row, x, lpix(x, yy));
        wr(1'b1, row, x, lpix(x + D, yy));
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic run_band(input int y0, input int dmax);
    cfg_dmax = DISP_W'(dmax);
    cur_y0 = y0;
    period_want = dmax + 62;
    last_dev = -1;
    @(negedge clk);
    band_y0 = 11'(y0);
    band_start = 1'b1;
    @(negedge clk);
    band_start = 1'b0;
    @(posedge band_done);
    @(negedge clk);
  endtask

  // output check
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (stall) n_stall++;
      if (dut.dr_blank_take) n_blank++;
      if (dut.dr_take) n_ws[int'(dut.ads_ws)]++;
      n_changed += $countones(refine_changed);
      if (dut.cap_dev) begin
        if (last_dev >= 0) begin
          n_period++;
          if (cyc - last_dev != period_want) n_period_bad++;
        end
        last_dev = cyc;
      end
      if (out_valid) begin
        n_out++;
        checks++;
        if (int'(out_y0) != cur_y0) begin
          failures++;
          $display("band mismatch: out_y0=%0d expected %0d", out_y0, cur_y0);
        end
        if (int'(out_x) >= D + 13 && int'(out_x) <= W - 14) begin
          for (int r = 0; r < BLK; r++) begin
            if (cur_y0 + r < H) begin
              checks++;
              if (int'(out_disp[r]) != D) begin
                failures++;
                $display("x=%0d y=%0d disparity %0d expected %0d", out_x, cur_y0 + r,
                         out_disp[r], D);
              end
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int stall_before;
  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_img = 1'b0; wr_row = '0; wr_addr = '0; wr_data = '0;
    cfg_dmax = 7'd10; band_start = 1'b0; band_y0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    load_band(0);
    run_band(0, 10);
    load_band(7);
    run_band(7, 10);
    // every column of both bands must have come out
    checks++;
    if (n_out != 2 * W) begin
      failures++;
      $display("%0d output columns, expected %0d", n_out, 2 * W);
    end
    // block rate at a range where the search sets the pace
    stall_before = n_stall;
    n_period = 0; n_period_bad = 0;
    load_band(0);
    run_band(0, 100);
    checks++;
    if (n_period != (W + 6) / 7 - 1 || n_period_bad != 0 || n_stall != stall_before) begin
      failures++;
      $display("rate: %0d periods, %0d not %0d cycles, %0d stall cycles", n_period,
               n_period_bad, 162, n_stall - stall_before);
    end

    $display("mechanisms: ws7=%0d ws13=%0d ws25=%0d stall_cycles=%0d blank_blocks=%0d refined_changes=%0d",
             n_ws[0], n_ws[1], n_ws[2], n_stall, n_blank, n_changed);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_ws[i] == 0) begin failures++; $display("window size %0d never chosen", i); end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    checks++;
    if (n_blank != 6) begin failures++; $display("blank flush blocks %0d, expected 6", n_blank); end
    checks++;
    if (n_changed == 0) begin failures++; $display("refinement never changed a disparity"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
