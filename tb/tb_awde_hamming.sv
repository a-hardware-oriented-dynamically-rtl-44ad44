// tb_awde_hamming: random Census pairs with a known number of flipped bits.
module tb_awde_hamming;
  import awde_pkg::*;
  census_t a, b;
  ham_t hd;
  int checks = 0, failures = 0;
  awde_hamming dut (.a(a), .b(b), .hd(hd));
  initial begin
    for (int t = 0; t < 400; t++) begin
      int nflip;
      int pos [$];
      nflip = t % 49;
      a = {$urandom, $urandom};
      b = a;
      pos.delete();
      for (int i = 0; i < CEN_W; i++) pos.push_back(i);
      pos.shuffle();
      for (int i = 0; i < nflip; i++) b[pos[i]] = ~b[pos[i]];
      #1;
      checks++;
      if (int'(hd) != nflip) begin
        failures++;
        if (failures < 5) $display("distance %0d expected %0d", hd, nflip);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
