// awde_dr: disparity refinement unit.
//
// The DR-array holds disparities, Shapes, a valid flag per pixel and the
// window size per column for five blocks: 7 rows x 35 columns.  A block of
// 49 disparities from the selection unit is loaded into columns 28..34
// (load / load_ready); the array then shifts left one column at a time,
// and before each shift seven processing elements refine the seven pixels
// of column 14.  A column takes 18 cycles (one start cycle and 17
// accumulation cycles, the shift coinciding with the last of them), so a
// block takes 127 cycles including its load.  After seven shifts the next
// block can be loaded.
//
// Contributors of the pixel in row r (17 in all, chosen by fixed wiring
// selected by the row and the column's window size, 21 masks):
//   0      the pixel itself;
//   1..4   its four neighbours (up, down, left, right);
//   5..16  for each window corner, at h = 3, 6 or 12 columns and rows from
//          the pixel (rows clipped to the seven processed rows), the corner
//          pixel and its horizontal and vertical neighbours towards the
//          pixel.  The three of a corner are active when the pixel's Shape
//          bit of that window corner is 1 (the activation bits).
// A contributor outside the seven rows, or in a column that holds no block
// (array cleared by clear, or a blank block loaded with load_blank at the
// end of a band), is inactive.  The refined column leaves on out_valid /
// out_disp only when it belongs to a real block.  block_done pulses after
// the seventh shift of a block (block_done_blank tells a blank one).
module awde_dr
  import awde_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic load,
  input  logic load_blank,
  input  disp_t  [BLK-1:0][BLK-1:0] in_disp,
  input  shape_t [BLK-1:0][BLK-1:0] in_shape,
  input  wsize_t in_ws,
  output logic   load_ready,
  output logic   idle,
  output logic   block_done,
  output logic   block_done_blank,
  output logic   out_valid,
  output disp_t  [BLK-1:0] out_disp,
  output logic   [BLK-1:0] out_changed     // refined value differs from the raw one
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT} state_t;

  disp_t  [BLK-1:0][DR_COLS-1:0] d_a;
  shape_t [BLK-1:0][DR_COLS-1:0] s_a;
  logic   [BLK-1:0][DR_COLS-1:0] v_a;
  wsize_t [DR_COLS-1:0]          ws_a;

  state_t st;
  logic [2:0] col_n;
  logic cur_blank;
  logic acc_colvalid, cs_colvalid;
  disp_t [BLK-1:0] acc_raw, cs_raw;

  disp_t [BLK-1:0][NCONTR-1:0] c_val;
  logic  [BLK-1:0][NCONTR-1:0] c_act;
  logic  [BLK-1:0] pe_acc_busy, pe_acc_last, pe_cs_busy, pe_res_valid;
  disp_t [BLK-1:0] pe_res;
  logic pe_start;

  // contributor selection for the pixels of column DR_COL
  always_comb begin
    for (int r = 0; r < BLK; r++) begin
      automatic int h  = 3 * stride(ws_a[DR_COL]);
      automatic int rt = (r - h < 0) ? 0 : r - h;
      automatic int rb = (r + h > BLK - 1) ? BLK - 1 : r + h;
      automatic int cl = DR_COL - h;
      automatic int cr = DR_COL + h;
      automatic int rr [NCONTR];
      automatic int cc [NCONTR];
      automatic logic [NCONTR-1:0] en;
      automatic shape_t sh = s_a[r][DR_COL];
      rr = '{r, r-1, r+1, r, r,  rt, rt, rt+1,  rt, rt, rt+1,  rb, rb, rb-1,  rb, rb, rb-1};
      cc = '{DR_COL, DR_COL, DR_COL, DR_COL-1, DR_COL+1,
             cl, cl+1, cl,  cr, cr-1, cr,  cl, cl+1, cl,  cr, cr-1, cr};
      en = {{3{sh[47]}}, {3{sh[41]}}, {3{sh[6]}}, {3{sh[0]}}, 5'b11111};
      for (int k = 0; k < NCONTR; k++) begin
        if (rr[k] >= 0 && rr[k] < BLK) begin
          c_val[r][k] = d_a[rr[k]][cc[k]];
          c_act[r][k] = en[k] && v_a[rr[k]][cc[k]];
        end else begin
          c_val[r][k] = '0;
          c_act[r][k] = 1'b0;
        end
      end
    end
  end

  for (genvar r = 0; r < BLK; r++) begin : g_pe
    awde_dr_pe u_pe (
      .clk(clk), .rst_n(rst_n), .start(pe_start),
      .vals(c_val[r]), .act(c_act[r]),
      .acc_busy(pe_acc_busy[r]), .acc_last(pe_acc_last[r]), .cs_busy(pe_cs_busy[r]),
      .res_valid(pe_res_valid[r]), .res_disp(pe_res[r]));
  end

  assign load_ready = (st == S_IDLE) && !clear;
  assign idle       = (st == S_IDLE) && !(|pe_cs_busy) && !(|pe_acc_busy);
  assign pe_start   = (st == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      for (int c = 0; c < DR_COLS; c++) begin
        for (int r = 0; r < BLK; r++) begin
          d_a[r][c] <= '0; s_a[r][c] <= '0; v_a[r][c] <= 1'b0;
        end
        ws_a[c] <= WS7;
      end
      col_n <= '0;
      cur_blank <= 1'b0;
      acc_colvalid <= 1'b0; cs_colvalid <= 1'b0;
      acc_raw <= '0; cs_raw <= '0;
      block_done <= 1'b0; block_done_blank <= 1'b0;
    end else begin
      block_done <= 1'b0;
      block_done_blank <= 1'b0;
      if (clear) begin
        v_a <= '0;
        st  <= S_IDLE;
      end else begin
        case (st)
          S_IDLE: if (load) begin
            for (int r = 0; r < BLK; r++)
              for (int c = 0; c < BLK; c++) begin
                d_a[r][DR_LOAD0 + c] <= load_blank ? '0 : in_disp[r][c];
                s_a[r][DR_LOAD0 + c] <= load_blank ? '0 : in_shape[r][c];
                v_a[r][DR_LOAD0 + c] <= !load_blank;
              end
            for (int c = 0; c < BLK; c++) ws_a[DR_LOAD0 + c] <= in_ws;
            cur_blank <= load_blank;
            col_n <= '0;
            st <= S_START;
          end
          S_START: begin
            acc_colvalid <= v_a[0][DR_COL];
            for (int r = 0; r < BLK; r++) acc_raw[r] <= d_a[r][DR_COL];
            st <= S_WAIT;
          end
          S_WAIT: if (pe_acc_last[0]) begin
            cs_colvalid <= acc_colvalid;
            cs_raw <= acc_raw;
            // shift left by one column
            for (int r = 0; r < BLK; r++) begin
              for (int c = 0; c < DR_COLS - 1; c++) begin
                d_a[r][c] <= d_a[r][c+1];
                s_a[r][c] <= s_a[r][c+1];
                v_a[r][c] <= v_a[r][c+1];
              end
              d_a[r][DR_COLS-1] <= '0;
              s_a[r][DR_COLS-1] <= '0;
              v_a[r][DR_COLS-1] <= 1'b0;
            end
            for (int c = 0; c < DR_COLS - 1; c++) ws_a[c] <= ws_a[c+1];
            col_n <= col_n + 3'd1;
            if (col_n == 3'(BLK - 1)) begin
              st <= S_IDLE;
              block_done <= !cur_blank;
              block_done_blank <= cur_blank;
            end else begin
              st <= S_START;
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    out_valid = pe_res_valid[0] && cs_colvalid;
    out_disp  = pe_res;
    for (int r = 0; r < BLK; r++) out_changed[r] = out_valid && (pe_res[r] != cs_raw[r]);
  end
endmodule
