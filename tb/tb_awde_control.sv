// tb_awde_control: runs one band of a 21-pixel-wide image (three blocks)
// at a 5-pixel range with an emulated refinement unit that takes each
// result 3 cycles after the last search step and needs 130 cycles per
// block, so the control unit has to stall.  Checked: every read address
// (left phase clamp(x0 - 12 + k), k = 0..30, then right phase
// clamp(x0 - dmax - 12 + k), k = 0..dmax + 30), the image select one cycle
// after each read, the tags 14 cycles (metrics) and 10 cycles (deviation)
// after the reads they belong to, the rotate amount, the two blank flush
// blocks and band_done.
module tb_awde_control;
  import awde_pkg::*;
  localparam int W = 21;
  localparam int DM = 5;
  localparam int Y0 = 7;
  localparam int NB = 3;
  logic clk = 0, rst_n = 0;
  logic band_start = 0;
  logic [10:0] band_y0 = 11'(Y0);
  logic [DISP_W-1:0] dmax = DISP_W'(DM);
  logic band_done, busy, stall;
  logic [4:0] rd_addr;
  logic rd_en;
  img_t img_sel_q;
  logic [4:0] rot;
  logic cap_dev, cap_left, search, dr_clear, flush_req;
  logic [2:0] cap_col;
  logic [7:0] search_j;
  logic dr_take = 0, dr_blank_take = 0, dr_block_done = 0, dr_idle;
  int cyc = 0, checks = 0, failures = 0;
  // expected per cycle: read phase (0 left, 1 right, -1 none) and k
  int rph [int];
  int rk [int];
  int exp_addr [$];
  int nread = 0, nstall = 0, ntake = 0, nblank_req = 0, ndone_band = 0;
  int take_at = -1, srv_free = 0;
  int done_at [$];
  int blank_busy = 0;
  always #5 clk = ~clk;

  awde_control #(.IMG_W(W)) dut (.clk(clk), .rst_n(rst_n), .band_start(band_start),
    .band_y0(band_y0), .dmax(dmax), .band_done(band_done), .busy(busy), .stall(stall),
    .rd_addr(rd_addr), .rd_en(rd_en), .img_sel_q(img_sel_q), .rot(rot), .cap_dev(cap_dev),
    .cap_left(cap_left), .cap_col(cap_col), .search(search), .search_j(search_j),
    .dr_clear(dr_clear), .flush_req(flush_req), .dr_take(dr_take), .dr_blank_take(dr_blank_take),
    .dr_block_done(dr_block_done), .dr_idle(dr_idle));

  function automatic int clampx(int v);
    return (v < 0) ? 0 : (v > W - 1) ? W - 1 : v;
  endfunction

  assign dr_idle = (done_at.size() == 0) && (blank_busy == 0) && (take_at < 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    dr_take <= 1'b0;
    dr_blank_take <= 1'b0;
    dr_block_done <= 1'b0;
    if (!rst_n) begin
      // nothing to check before the reset has taken effect
    end else begin
    if (stall) nstall++;
    if (band_done) ndone_band++;
    if (blank_busy > 0) blank_busy--;
    // reads
    if (rd_en) begin
      int e;
      e = exp_addr.pop_front();
      checks++;
      if (int'(rd_addr) != e) begin
        failures++;
        if (failures < 6) $display("read %0d: address %0d expected %0d", nread, rd_addr, e);
      end
      nread++;
    end
    // image select follows the read by one cycle
    if (rph.exists(cyc - 1)) begin
      checks++;
      if (int'(img_sel_q) != rph[cyc - 1]) begin failures++; $display("image select wrong"); end
    end
    // tags
    begin
      logic el, es, ed;
      int ec, ej;
      el = 0; es = 0; ed = 0; ec = 0; ej = 0;
      if (rph.exists(cyc - 14)) begin
        int k;
        k = rk[cyc - 14];
        if (rph[cyc - 14] == 0 && k >= 12 && k <= 18) begin el = 1; ec = k - 12; end
        if (rph[cyc - 14] == 1 && k >= 12 && k <= DM + 18) begin es = 1; ej = k - 12; end
      end
      if (rph.exists(cyc - 10) && rph[cyc - 10] == 0 && rk[cyc - 10] == 15) ed = 1;
      checks++;
      if (cap_left != el || (el && int'(cap_col) != ec) || search != es ||
          (es && int'(search_j) != ej) || cap_dev != ed) begin
        failures++;
        if (failures < 6) $display("cycle %0d: tags wrong", cyc);
      end
    end
    // emulated selection and refinement
    if (search && int'(search_j) == DM + 6) take_at = cyc + 3;
    if (take_at >= 0 && cyc >= take_at && srv_free <= cyc) begin
      dr_take <= 1'b1;
      ntake++;
      take_at = -1;
      srv_free = cyc + 130;
      done_at.push_back(cyc + 130);
    end
    if (done_at.size() > 0 && done_at[0] == cyc) begin
      void'(done_at.pop_front());
      dr_block_done <= 1'b1;
    end
    if (flush_req && blank_busy == 0 && !dr_blank_take) begin
      dr_blank_take <= 1'b1;
      nblank_req++;
      blank_busy = 20;
    end
    end
  end

  // record what each read cycle should be (mirrors the schedule, not the FSM)
  always @(negedge clk) if (rd_en) begin
    int idx;
    idx = nread;
    for (int b = 0; b < NB; b++) begin
      if (idx < 31) begin rph[cyc] = 0; rk[cyc] = idx; break; end
      idx -= 31;
      if (idx < DM + 31) begin rph[cyc] = 1; rk[cyc] = idx; break; end
      idx -= DM + 31;
    end
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < 31; k++) exp_addr.push_back(clampx(7 * b - 12 + k));
      for (int k = 0; k < DM + 31; k++) exp_addr.push_back(clampx(7 * b - DM - 12 + k));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    band_start = 1;
    @(negedge clk);
    band_start = 0;
    checks++;
    if (int'(rot) != (Y0 - 12 + 31) % 31) begin failures++; $display("rotate amount %0d", rot); end
    while (!band_done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 5;
    if (nread != NB * (62 + DM)) begin failures++; $display("%0d reads", nread); end
    if (ntake != NB) begin failures++; $display("%0d takes", ntake); end
    if (nblank_req != 2) begin failures++; $display("%0d blank blocks", nblank_req); end
    if (nstall == 0) begin failures++; $display("never stalled"); end
    if (ndone_band != 1 || busy) begin failures++; $display("band_done %0d busy %0d", ndone_band, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
