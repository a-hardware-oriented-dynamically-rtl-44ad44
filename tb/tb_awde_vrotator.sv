// tb_awde_vrotator: every rotate amount with random lines; output line i
// must carry input line (i + rot) mod 31.
module tb_awde_vrotator;
  import awde_pkg::*;
  pix_t [ROWS-1:0] li, lo;
  logic [4:0] rot;
  int checks = 0, failures = 0;
  awde_vrotator dut (.lines_in(li), .rot(rot), .lines_out(lo));
  initial begin
    for (int t = 0; t < 3 * ROWS; t++) begin
      for (int i = 0; i < ROWS; i++) li[i] = pix_t'($urandom);
      rot = 5'(t % ROWS);
      #1;
      for (int i = 0; i < ROWS; i++) begin
        checks++;
        if (lo[i] !== li[(i + t % ROWS) % ROWS]) begin
          failures++;
          if (failures < 5) $display("rot %0d line %0d wrong", rot, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
