// tb_awde_census: random windows; the expected Census is built bit by bit
// from the sample order (row-major, centre skipped) and neighbour < centre.
module tb_awde_census;
  import awde_pkg::*;
  win_t win;
  census_t census;
  int checks = 0, failures = 0;
  awde_census dut (.win(win), .census(census));
  initial begin
    for (int t = 0; t < 500; t++) begin
      census_t exp;
      int b;
      for (int n = 0; n < WIN_N; n++) win[n] = pix_t'($urandom_range(0, (t % 3 == 0) ? 3 : 255));
      #1;
      b = 0;
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++)
          if (!(i == 3 && j == 3)) begin
            exp[b] = win[7*i+j] < win[24];
            b++;
          end
      checks++;
      if (census !== exp) begin
        failures++;
        if (failures < 5) $display("census %h expected %h", census, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
