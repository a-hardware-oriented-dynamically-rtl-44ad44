// tb_awde_dr_pe: random sets of 17 disparities from a small range with
// random activation, started back to back as fast as the element accepts
// them.  Each result must be the value with the most active copies, the
// lowest-numbered contributor winning equal counts (contributor 0 when
// none is active), and must appear 35 cycles after its start.
module tb_awde_dr_pe;
  import awde_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  disp_t [NCONTR-1:0] vals;
  logic  [NCONTR-1:0] act;
  logic acc_busy, cs_busy, res_valid;
  disp_t res_disp;
  int exp_q [$];
  int t_q [$];
  int cyc = 0, checks = 0, failures = 0, nres = 0;
  localparam int N = 60;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  awde_dr_pe dut (.clk(clk), .rst_n(rst_n), .start(start), .vals(vals), .act(act),
    .acc_busy(acc_busy), .cs_busy(cs_busy), .res_valid(res_valid), .res_disp(res_disp));

  function automatic int mode_ref(disp_t [NCONTR-1:0] v, logic [NCONTR-1:0] a);
    int bestc = -1, besti = 0;
    for (int i = 0; i < NCONTR; i++) begin
      int cnt = 0;
      for (int k = 0; k < NCONTR; k++) if (a[i] && a[k] && v[i] == v[k]) cnt++;
      if (cnt > bestc) begin bestc = cnt; besti = i; end
    end
    return int'(v[besti]);
  endfunction

  always @(posedge clk) if (res_valid) begin
    int e, t0;
    nres++;
    checks += 2;
    e = exp_q.pop_front();
    t0 = t_q.pop_front();
    if (int'(res_disp) != e) begin failures++; $display("refined %0d expected %0d", res_disp, e); end
    if (cyc - t0 != 35) begin failures++; $display("latency %0d", cyc - t0); end
  end

  initial begin
    vals = '0; act = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N; t++) begin
      while (acc_busy) @(negedge clk);
      for (int i = 0; i < NCONTR; i++) vals[i] = disp_t'($urandom_range(0, (t % 2) ? 3 : 6));
      act = (t == 5) ? '0 : NCONTR'($urandom) | 17'h1F;
      if (t % 7 == 3) act[0] = 1'b0;
      exp_q.push_back(mode_ref(vals, act));
      t_q.push_back(cyc);
      start = 1;
      @(negedge clk);
      start = 0;
      if (t % 5 == 4) repeat ($urandom_range(1, 30)) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    checks++;
    if (nres != N) begin failures++; $display("%0d results for %0d starts", nres, N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
