// tb_awde_weaver: the array is filled with a pattern that encodes each
// position, so every selected sample tells where it came from.  Process row
// r, sample (i, j) must come from array row 12 + r + (i-3)s and column
// 12 - (j-3)s for strides s = 1, 2, 4; the deviation windows from around
// (15, 8) with strides 1 and 2.
module tb_awde_weaver;
  import awde_pkg::*;
  pix_t [ROWS-1:0][ARR_COLS-1:0] arr;
  wsize_t ws;
  win_t [BLK-1:0] prow;
  win_t dev7, dev13;
  int checks = 0, failures = 0;
  awde_weaver dut (.arr(arr), .ws(ws), .prow(prow), .dev7(dev7), .dev13(dev13));

  function automatic pix_t code(int r, int c, int salt);
    return pix_t'((r * 25 + c) * 7 + salt);
  endfunction

  task automatic expect_win(win_t w, int row, int col, int s, int salt, string what);
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++) begin
        checks++;
        if (w[7*i+j] !== code(row + (i - 3) * s, col - (j - 3) * s, salt)) begin
          failures++;
          if (failures < 5) $display("%s sample (%0d,%0d) wrong", what, i, j);
        end
      end
  endtask

  initial begin
    for (int salt = 0; salt < 3; salt++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < ARR_COLS; c++) arr[r][c] = code(r, c, salt);
      for (int k = 0; k < 3; k++) begin
        ws = wsize_t'(k);
        #1;
        for (int r = 0; r < BLK; r++)
          expect_win(prow[r], 12 + r, 12, 1 << k, salt, "process row");
        expect_win(dev7, 15, 8, 1, salt, "dev7");
        expect_win(dev13, 15, 8, 2, salt, "dev13");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
