// tb_awde_top_full: one complete XGA frame (1024 x 768) at the default
// parameters and a 120-pixel disparity range.
//
// The stereo pair is synthetic: the left image is noise whose amplitude
// depends on the column range (0..255, 0..7 and 0..1, so that all three
// window sizes occur) and the right image is the left one shifted by
// D = 37 pixels.  Before each band only the seven new rows are written
// into the line buffers, as an external memory interface would; rows
// outside the image repeat the edge rows.  Every refined disparity whose
// windows lie inside the image must equal D.  The block period must be
// dmax + 62 = 182 cycles with no stall, and the cycles per frame are
// converted into frames per second at 190 MHz (at least 60 expected),
// counting only the search time, not the row writes of this testbench.
module tb_awde_top_full;
  import awde_pkg::*;

  localparam int W = 1024;
  localparam int H = 768;
  localparam int D = 37;
  localparam int DMAX = 120;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic wr_en, wr_img;
  logic [4:0] wr_row;
  logic [9:0] wr_addr;
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

  longint checks = 0, failures = 0;
  int n_ws [3] = '{0, 0, 0};
  int n_stall = 0, n_changed = 0, n_out = 0, cur_y0 = 0;
  int last_dev = -1, n_period = 0, n_period_bad = 0, cyc = 0;
  longint busy_cycles = 0;

  awde_top dut (
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

  function automatic int lpix(int x, int y);
    if (x < 340)      return hash(x, y) & 255;
    else if (x < 680) return 100 + (hash(x, y) & 7);
    else              return 100 + (hash(x, y) & 1);
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic load_rows(input int y_first, input int y_last);
    for (int y = y_first; y <= y_last; y++) begin
      automatic int yy = clampi(y, 0, H - 1);
      automatic int row = ((y % ROWS) + ROWS) % ROWS;
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_img = 1'b0; wr_row = 5'(row); wr_addr = 10'(x);
        wr_data = {8'(lpix(x, yy)), 8'h80, 8'h80};
        @(negedge clk);
        wr_img = 1'b1;
        wr_data = {8'(lpix(x + D, yy)), 8'h80, 8'h80};
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (busy) busy_cycles++;
      if (stall) n_stall++;
      if (dut.dr_take) n_ws[int'(dut.ads_ws)]++;
      n_changed += $countones(refine_changed);
      if (dut.cap_dev) begin
        if (last_dev >= 0) begin
          n_period++;
          if (cyc - last_dev != DMAX + 62) n_period_bad++;
        end
        last_dev = cyc;
      end
      if (out_valid) begin
        n_out++;
        checks++;
        if (int'(out_y0) != cur_y0) failures++;
        if (int'(out_x) >= D + 13 && int'(out_x) <= W - 14) begin
          for (int r = 0; r < BLK; r++) begin
            if (cur_y0 + r < H) begin
              checks++;
              if (int'(out_disp[r]) != D) begin
                failures++;
                if (failures < 10)
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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real fps;
    rst_n = 1'b0; wr_en = 1'b0; wr_img = 1'b0; wr_row = '0; wr_addr = '0; wr_data = '0;
    cfg_dmax = DISP_W'(DMAX); band_start = 1'b0; band_y0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_rows(-12, 18);
    for (int y0 = 0; y0 < H; y0 += BLK) begin
      if (y0 > 0) load_rows(y0 + 12, y0 + 18);
      cur_y0 = y0;
      last_dev = -1;
      @(negedge clk);
      band_y0 = 11'(y0);
      band_start = 1'b1;
      @(negedge clk);
      band_start = 1'b0;
      @(posedge band_done);
    end
    fps = 190.0e6 / real'(busy_cycles);
    $display("frame: %0d bands, %0d search cycles, %.1f fps at 190 MHz", (H + BLK - 1) / BLK,
             busy_cycles, fps);
    $display("mechanisms: ws7=%0d ws13=%0d ws25=%0d stall_cycles=%0d refined_changes=%0d",
             n_ws[0], n_ws[1], n_ws[2], n_stall, n_changed);
    checks += 6;
    if (n_out != W * ((H + BLK - 1) / BLK)) begin failures++; $display("%0d columns out", n_out); end
    if (n_period_bad != 0 || n_stall != 0) begin
      failures++; $display("%0d block periods not %0d cycles, %0d stall cycles", n_period_bad, DMAX + 62, n_stall);
    end
    if (fps < 60.0) begin failures++; $display("below 60 fps"); end
    for (int i = 0; i < 3; i++) if (n_ws[i] == 0) begin failures++; $display("window size %0d never chosen", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
