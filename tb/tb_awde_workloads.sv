// tb_awde_workloads: the two smaller video formats of the hardware
// comparison, each as one complete frame at a 60-pixel disparity range:
// VGA 640 x 480 (224 fps quoted for the original design) and CIF 352 x 288
// (680 fps quoted).
//
// The line length is an elaboration parameter of awde_top, so each format
// has its own instance (IMG_W = 640 and IMG_W = 352, everything else at the
// defaults).  The frames are run one after the other; the same synthetic
// stereo pair as in the full-size test is used (noise of three amplitudes
// so that all three window sizes occur, right image shifted by D = 20).
// Every refined disparity whose windows lie inside the image must equal D
// and every column of every band must come out once.
//
// Timing: at this range the refinement (127 cycles per block) sets the
// pace, so the search waits (stall) on every block.  The search cycles per
// frame are counted, converted to frames per second at 190 MHz and printed
// next to the quoted rates; the check is against this design's own bound of
// 127 cycles per block plus 1,500 cycles per band for fill and flush.
module tb_awde_workloads;
  import awde_pkg::*;

  localparam int D    = 20;
  localparam int DMAX = 60;
  localparam int NF   = 2;
  localparam int FW [NF] = '{640, 352};
  localparam int FH [NF] = '{480, 288};
  localparam real FPS_DOC [NF] = '{224.0, 680.0};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n;
  logic wr_img;
  logic [4:0] wr_row;
  logic [9:0] wr_addr;
  logic [23:0] wr_data;
  logic [NF-1:0] wr_en, band_start;
  logic [10:0] band_y0;
  logic [NF-1:0] band_done, busy, out_valid, stall;
  logic [11:0] out_x [NF];
  logic [10:0] out_y0 [NF];
  disp_t [BLK-1:0] out_disp [NF];

  longint checks = 0, failures = 0;
  longint busy_cycles [NF] = '{0, 0};
  int n_stall [NF] = '{0, 0};
  int n_out [NF] = '{0, 0};
  int n_ws [3] = '{0, 0, 0};
  int cur_y0 = 0;
  int sel = 0;

  for (genvar f = 0; f < NF; f++) begin : g_dut
    logic [$clog2(FW[f])-1:0] waddr_f;
    logic [1:0] ws_f;
    logic [BLK-1:0] chg_f;
    assign waddr_f = wr_addr[$clog2(FW[f])-1:0];
    awde_top #(.IMG_W(FW[f])) u_top (
      .clk(clk), .rst_n(rst_n),
      .wr_en(wr_en[f]), .wr_img(wr_img), .wr_row(wr_row), .wr_addr(waddr_f), .wr_data(wr_data),
      .cfg_dmax(DISP_W'(DMAX)), .cfg_color(2'd0),
      .band_start(band_start[f]), .band_y0(band_y0), .band_done(band_done[f]), .busy(busy[f]),
      .out_valid(out_valid[f]), .out_x(out_x[f]), .out_y0(out_y0[f]), .out_disp(out_disp[f]),
      .stall(stall[f]), .block_ws(ws_f), .refine_changed(chg_f));
  end

  function automatic int hash(int x, int y);
    int unsigned v = 32'(x) * 32'd1103515245 + 32'(y) * 32'd2654435761 + 32'h9e37;
    v = v ^ (v >> 13);
    v = v * 32'h5bd1e995;
    v = v ^ (v >> 15);
    return int'(v & 32'h7fffffff);
  endfunction

  // noise amplitude by thirds of the width: 7x7, 13x13 and 25x25 regions
  function automatic int lpix(int x, int y, int w);
    if (x < w / 3)          return hash(x, y) & 255;
    else if (x < 2 * w / 3) return 100 + (hash(x, y) & 7);
    else                    return 100 + (hash(x, y) & 1);
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic load_rows(input int f, input int y_first, input int y_last);
    for (int y = y_first; y <= y_last; y++) begin
      int yy, row;
      yy = clampi(y, 0, FH[f] - 1);
      row = ((y % ROWS) + ROWS) % ROWS;
      for (int x = 0; x < FW[f]; x++) begin
        @(negedge clk);
        wr_en[f] = 1'b1; wr_img = 1'b0; wr_row = 5'(row); wr_addr = 10'(x);
        wr_data = {8'(lpix(x, yy, FW[f])), 8'h80, 8'h80};
        @(negedge clk);
        wr_img = 1'b1;
        wr_data = {8'(lpix(x + D, yy, FW[f])), 8'h80, 8'h80};
      end
    end
    @(negedge clk);
    wr_en = '0;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (busy[sel]) busy_cycles[sel]++;
      if (stall[sel]) n_stall[sel]++;
      if (sel == 0 && g_dut[0].u_top.dr_take) n_ws[int'(g_dut[0].u_top.ads_ws)]++;
      if (sel == 1 && g_dut[1].u_top.dr_take) n_ws[int'(g_dut[1].u_top.ads_ws)]++;
      for (int f = 0; f < NF; f++) begin
        if (out_valid[f]) begin
          n_out[f]++;
          checks++;
          if (f != sel || int'(out_y0[f]) != cur_y0) failures++;
          if (int'(out_x[f]) >= D + 13 && int'(out_x[f]) <= FW[f] - 14) begin
            for (int r = 0; r < BLK; r++) begin
              if (cur_y0 + r < FH[f]) begin
                checks++;
                if (int'(out_disp[f][r]) != D) begin
                  failures++;
                  if (failures < 10)
                    $display("format %0d x=%0d y=%0d disparity %0d expected %0d", f, out_x[f],
                             cur_y0 + r, out_disp[f][r], D);
                end
              end
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_en = '0; wr_img = 1'b0; wr_row = '0; wr_addr = '0; wr_data = '0;
    band_start = '0; band_y0 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      int nb, nbands;
      real fps;
      longint bound;
      sel = f;
      nb = (FW[f] + BLK - 1) / BLK;
      nbands = (FH[f] + BLK - 1) / BLK;
      load_rows(f, -12, 18);
      for (int y0 = 0; y0 < FH[f]; y0 += BLK) begin
        if (y0 > 0) load_rows(f, y0 + 12, y0 + 18);
        cur_y0 = y0;
        @(negedge clk);
        band_y0 = 11'(y0);
        band_start[f] = 1'b1;
        @(negedge clk);
        band_start[f] = 1'b0;
        @(posedge band_done[f]);
      end
      fps = 190.0e6 / real'(busy_cycles[f]);
      bound = longint'(nbands) * (longint'(nb) * 127 + 1500);
      $display("%0dx%0d range %0d: %0d bands, %0d search cycles (bound %0d), %.1f fps at 190 MHz (quoted %.0f), %0d stall cycles",
               FW[f], FH[f], DMAX, nbands, busy_cycles[f], bound, fps, FPS_DOC[f], n_stall[f]);
      checks += 3;
      if (n_out[f] != FW[f] * nbands) begin failures++; $display("%0d columns out", n_out[f]); end
      if (busy_cycles[f] > bound) begin failures++; $display("slower than 127 cycles per block"); end
      if (n_stall[f] == 0) begin failures++; $display("no stall at a short range"); end
    end
    $display("mechanisms: ws7=%0d ws13=%0d ws25=%0d", n_ws[0], n_ws[1], n_ws[2]);
    checks += 3;
    for (int i = 0; i < 3; i++) if (n_ws[i] == 0) begin failures++; $display("window size %0d never chosen", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
