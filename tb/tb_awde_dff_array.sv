// tb_awde_dff_array: shifts random columns in with a random shift enable
// and compares the whole array with a list of the columns shifted in so
// far (column c = the (c+1)-th most recent one).
module tb_awde_dff_array;
  import awde_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0;
  pix_t [ROWS-1:0] col_in;
  pix_t [ROWS-1:0][ARR_COLS-1:0] arr;
  pix_t [ROWS-1:0] hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  awde_dff_array dut (.clk(clk), .rst_n(rst_n), .shift(shift), .col_in(col_in), .arr(arr));
  initial begin
    col_in = '0;
    for (int c = 0; c < ARR_COLS; c++) hist.push_front('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) col_in[r] = pix_t'($urandom);
      shift = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (shift) hist.push_front(col_in);
      #1;
      for (int c = 0; c < ARR_COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          checks++;
          if (arr[r][c] !== hist[c][r]) begin
            failures++;
            if (failures < 5) $display("t=%0d arr[%0d][%0d] wrong", t, r, c);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
