// tb_awde_bwsad: random left/right windows and Shapes; the expected BW-SAD
// is the sum of |L - R| over the centre and every sample whose Shape bit is 1.
module tb_awde_bwsad;
  import awde_pkg::*;
  win_t wl, wr;
  shape_t shape;
  sad_t sad;
  int checks = 0, failures = 0;
  awde_bwsad dut (.win_l(wl), .win_r(wr), .shape(shape), .sad(sad));
  initial begin
    for (int t = 0; t < 500; t++) begin
      int exp, b;
      exp = 0; b = 0;
      for (int n = 0; n < WIN_N; n++) begin
        wl[n] = pix_t'($urandom_range(0, 255));
        wr[n] = pix_t'($urandom_range(0, 255));
      end
      shape = (t == 0) ? '1 : {$urandom, $urandom};
      #1;
      for (int n = 0; n < WIN_N; n++) begin
        int keep;
        keep = 1;
        if (n != 24) begin keep = shape[b]; b++; end
        if (keep) exp += (wl[n] > wr[n]) ? wl[n] - wr[n] : wr[n] - wl[n];
      end
      checks++;
      if (int'(sad) != exp) begin
        failures++;
        if (failures < 5) $display("bwsad %0d expected %0d", sad, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
