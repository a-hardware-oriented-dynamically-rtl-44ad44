// tb_awde_line_bram: writes a full row of random pixels, then reads random
// addresses (one-cycle latency) while writing others, against a copy.
module tb_awde_line_bram;
  localparam int DEPTH = 1024;
  logic clk = 0;
  logic we = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [23:0] wdata = '0, rdata;
  logic [23:0] model [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  awde_line_bram dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .re(1'b1), .raddr(raddr), .rdata(rdata));
  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = 24'($urandom); model[a] = wdata;
    end
    for (int t = 0; t < 2000; t++) begin
      logic [9:0] ra;
      @(negedge clk);
      ra = 10'($urandom);
      raddr = ra;
      we = ($urandom_range(0, 1) == 1);
      waddr = 10'($urandom);
      if (waddr == ra) we = 0;
      wdata = 24'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== model[ra]) begin
        failures++;
        if (failures < 5) $display("addr %0d read %h expected %h", ra, rdata, model[ra]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
