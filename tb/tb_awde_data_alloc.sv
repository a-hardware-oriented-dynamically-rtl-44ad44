// tb_awde_data_alloc: random 24-bit pixels on all 62 buffer outputs, with
// random image select, colour select and rotate amount.  A reference keeps
// the columns that should have entered the array (selected image, selected
// 8-bit component, rows rotated) and the process rows and deviation windows
// are compared with windows woven from that reference in image terms:
// sample (i, j) of process row r is pixel row 12 + r + (i-3)s of the column
// read (12 - (j-3)s) + 1 shifts ago.
module tb_awde_data_alloc;
  import awde_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0][RAW_W-1:0] bram_r, bram_l;
  img_t img_sel;
  color_t color_sel;
  logic [4:0] rot;
  wsize_t ws;
  win_t [BLK-1:0] prow;
  win_t dev7, dev13;
  pix_t [ROWS-1:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  awde_data_alloc dut (.clk(clk), .rst_n(rst_n), .bram_r(bram_r), .bram_l(bram_l),
    .img_sel(img_sel), .color_sel(color_sel), .rot(rot), .shift(1'b1), .ws(ws),
    .prow(prow), .dev7(dev7), .dev13(dev13));

  function automatic pix_t ref_px(int row, int age);
    return hist[age][row];
  endfunction

  task automatic chk(win_t w, int row, int col, int s, string what);
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        checks++;
        if (w[7*i+j] !== ref_px(row + (i - 3) * s, col - (j - 3) * s)) begin
          failures++;
          if (failures < 5) $display("%s (%0d,%0d) wrong", what, i, j);
        end
      end
  endtask

  initial begin
    bram_r = '0; bram_l = '0; img_sel = IMG_LEFT; color_sel = COL_Y; rot = '0; ws = WS7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      pix_t [ROWS-1:0] colv;
      @(negedge clk);
      if (t % 40 == 0) begin
        img_sel = img_t'($urandom_range(0, 1));
        color_sel = color_t'($urandom_range(0, 2));
        rot = 5'($urandom_range(0, 30));
      end
      ws = wsize_t'($urandom_range(0, 2));
      for (int i = 0; i < ROWS; i++) begin
        bram_r[i] = 24'($urandom);
        bram_l[i] = 24'($urandom);
      end
      for (int i = 0; i < ROWS; i++) begin
        logic [23:0] px;
        px = (img_sel == IMG_RIGHT) ? bram_r[(i + rot) % ROWS] : bram_l[(i + rot) % ROWS];
        colv[i] = (color_sel == COL_Y) ? px[23:16] : (color_sel == COL_CB) ? px[15:8] : px[7:0];
      end
      @(posedge clk);
      hist.push_front(colv);
      #1;
      if (t >= ARR_COLS) begin
        for (int r = 0; r < BLK; r++) chk(prow[r], 12 + r, 12, stride(ws), "process row");
        chk(dev7, 15, 8, 1, "dev7");
        chk(dev13, 15, 8, 2, "dev13");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
