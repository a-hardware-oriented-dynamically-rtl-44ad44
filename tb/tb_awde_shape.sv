// tb_awde_shape: random windows near the centre value; a Shape bit must be
// 1 exactly when the sample is within threshold_w = 8 of the centre.
module tb_awde_shape;
  import awde_pkg::*;
  win_t win;
  shape_t shape;
  int checks = 0, failures = 0;
  awde_shape dut (.win(win), .shape(shape));
  initial begin
    for (int t = 0; t < 500; t++) begin
      shape_t exp;
      int b, c;
      c = $urandom_range(0, 255);
      for (int n = 0; n < WIN_N; n++) begin
        int v;
        v = c + $urandom_range(0, 24) - 12;
        win[n] = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
      win[24] = pix_t'(c);
      #1;
      b = 0;
      for (int n = 0; n < WIN_N; n++)
        if (n != 24) begin
          int dlt;
          dlt = int'(win[n]) - c;
          exp[b] = (dlt >= -8) && (dlt <= 8);
          b++;
        end
      checks++;
      if (shape !== exp) begin
        failures++;
        if (failures < 5) $display("shape %h expected %h", shape, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
