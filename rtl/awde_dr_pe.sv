// awde_dr_pe: processing element of the disparity refinement.
//
// Finds the most frequent value among 17 contributor disparities, counting
// only the active ones, in two overlapped 17-cycle stages:
//  * Comparison of disparities (start): the 17 values and activation flags
//    are loaded twice, once fixed and once into a rotating register.  For 17
//    cycles each Compare-and-Accumulate cell adds one to its count when its
//    fixed value equals the rotating value and both are active; the rotating
//    register turns by one place per cycle.  After 17 cycles cell i holds
//    how many active contributors equal contributor i (0 if i is inactive).
//  * Comparison of frequencies: the counts and values are loaded into two
//    shift registers that move one place per cycle towards the
//    Compare-and-Select cell, which keeps the value with the largest count.
//    Element 16 arrives first and element 0 last; on equal counts the later
//    one wins, so contributor 0 (the pixel's own disparity) wins ties.
// A new start is accepted when acc_busy is low, i.e. every 18 cycles; the
// refined disparity appears (res_valid) 35 cycles after its start.  The two-stage structure is the document's; tie handling is this
// design's choice.
module awde_dr_pe
  import awde_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  disp_t [NCONTR-1:0] vals,
  input  logic  [NCONTR-1:0] act,
  output logic  acc_busy,
  output logic  acc_last,     // last accumulation cycle
  output logic  cs_busy,
  output logic  res_valid,
  output disp_t res_disp
);
  localparam int CW = $clog2(NCONTR + 1);

  disp_t [NCONTR-1:0] fix_v, rot_v, frq_v;
  logic  [NCONTR-1:0] fix_a, rot_a;
  logic  [NCONTR-1:0][CW-1:0] cnt, cnt_nxt, frq_c;
  logic  [4:0] acc_k, cs_k;
  disp_t best_v;
  logic  [CW-1:0] best_c;

  assign acc_busy = acc_k != 0;
  assign acc_last = acc_k == 5'd1;
  assign cs_busy  = cs_k != 0;

  always_comb begin
    for (int i = 0; i < NCONTR; i++)
      cnt_nxt[i] = cnt[i] + CW'(fix_a[i] && rot_a[i] && fix_v[i] == rot_v[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fix_v <= '0; rot_v <= '0; frq_v <= '0;
      fix_a <= '0; rot_a <= '0;
      cnt <= '0; frq_c <= '0;
      acc_k <= '0; cs_k <= '0;
      best_v <= '0; best_c <= '0;
      res_valid <= 1'b0; res_disp <= '0;
    end else begin
      res_valid <= 1'b0;
      // comparison of disparities
      if (start && !acc_busy) begin
        fix_v <= vals;  rot_v <= vals;
        fix_a <= act;   rot_a <= act;
        cnt   <= '0;
        acc_k <= 5'(NCONTR);
      end else if (acc_busy) begin
        cnt <= cnt_nxt;
        for (int i = 0; i < NCONTR; i++) begin
          rot_v[i] <= rot_v[(i + 1) % NCONTR];
          rot_a[i] <= rot_a[(i + 1) % NCONTR];
        end
        acc_k <= acc_k - 5'd1;
      end
      // comparison of frequencies
      if (acc_k == 5'd1) begin
        frq_v  <= fix_v;
        frq_c  <= cnt_nxt;
        cs_k   <= 5'(NCONTR);
        best_c <= '0;
        best_v <= fix_v[0];
      end else if (cs_busy) begin
        if (frq_c[NCONTR-1] >= best_c) begin
          best_c <= frq_c[NCONTR-1];
          best_v <= frq_v[NCONTR-1];
        end
        for (int i = NCONTR - 1; i > 0; i--) begin
          frq_c[i] <= frq_c[i-1];
          frq_v[i] <= frq_v[i-1];
        end
        frq_c[0] <= '0;
        frq_v[0] <= '0;
        cs_k <= cs_k - 5'd1;
        if (cs_k == 5'd1) begin
          res_valid <= 1'b1;
          res_disp  <= (frq_c[NCONTR-1] >= best_c) ? frq_v[NCONTR-1] : best_v;
        end
      end
    end
  end

  // the frequency stage must be free when an accumulation finishes
  assert property (@(posedge clk) disable iff (!rst_n) (acc_k == 5'd1) |-> (cs_k <= 5'd1));
endmodule
