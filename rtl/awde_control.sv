// awde_control: control unit of the disparity estimator.
//
// A band is seven image rows, searched block by block from left to right.
// For the block at x0 the unit reads, at one address per cycle from all
// line buffers at once:
//   left phase:   31 left-image columns  x0 - 12 .. x0 + 18
//   search phase: dmax + 31 right-image columns x0 - dmax - 12 .. x0 + 18
// so a block takes dmax + 62 cycles (182 for a 120-pixel range) and the next
// block follows without a gap.  Addresses outside the row are clamped to
// its first or last pixel.  A column read at cycle t is at the weaver tap
// (array column 12) at t + 14 and at the deviation tap (column 8) at t + 10,
// so the unit delays its tags by those amounts:
//   cap_dev            the block centre x0 + 3 is at the deviation tap;
//   cap_left, cap_col  block column x0 + cap_col is at the tap (left image);
//   search, search_j   right column x0 - dmax + j is at the tap, j = 0..dmax+6.
// The rotate amount is (y0 - 12) mod 31 for the band whose top block row is
// y0, since image row y lives in line buffer y mod 31.
//
// Stall: a new block starts only while fewer than two started blocks are
// still unfinished in the refinement unit, so the selection unit's hold
// register can never be overwritten.  At 120-pixel range this never
// stalls; at small ranges the refinement (127 cycles per block) sets
// the pace.  At the end of a band two blank blocks are pushed through the
// refinement to flush the last two real ones, then band_done pulses.
// The block schedule is derived from the document's description; the
// handshakes, tag timing and band protocol are this design's.
module awde_control
  import awde_pkg::*;
#(
  parameter int IMG_W = 1024,
  parameter int AW    = $clog2(IMG_W)
)(
  input  logic clk,
  input  logic rst_n,
  // band protocol
  input  logic        band_start,
  input  logic [10:0] band_y0,
  input  logic [DISP_W-1:0] dmax,
  output logic        band_done,
  output logic        busy,
  output logic        stall,
  // line buffers and data allocation
  output logic [AW-1:0] rd_addr,
  output logic        rd_en,
  output img_t        img_sel_q,    // aligned with the line-buffer data
  output logic [4:0]  rot,
  // metrics unit tags
  output logic        cap_dev,
  output logic        cap_left,
  output logic [2:0]  cap_col,
  output logic        search,
  output logic [7:0]  search_j,
  // refinement unit
  output logic        dr_clear,
  output logic        flush_req,
  input  logic        dr_take,        // a real block was loaded
  input  logic        dr_blank_take,  // a blank block was loaded
  input  logic        dr_block_done,  // a real block left the refinement
  input  logic        dr_idle
);
  localparam int NB    = (IMG_W + BLK - 1) / BLK;
  localparam int TAPD  = 14;
  localparam int DEVD  = 10;

  typedef enum logic [2:0] {S_IDLE, S_WAITBLK, S_READ, S_DRAIN, S_FLUSH, S_END} state_t;
  typedef struct packed {
    logic       cap_left;
    logic [2:0] col;
    logic       search;
    logic [7:0] j;
  } tag_t;

  state_t st;
  img_t   phase;
  logic [8:0]  k;
  logic [11:0] x0;
  logic [$clog2(NB+1)-1:0] nblk, ntaken;
  logic [1:0]  inflight, nblank;
  logic        can_start, reading, block_last;
  tag_t        tag_now;
  tag_t        tag_dl [TAPD];
  logic        dev_dl [DEVD];
  int          xa;

  assign can_start  = (inflight < 2'd2) || dr_block_done;
  assign reading    = (st == S_READ);
  assign rd_en      = reading;
  assign block_last = reading && (phase == IMG_RIGHT) && (k == 9'(dmax) + 9'd30);
  assign stall      = (st == S_WAITBLK) && !can_start;
  assign busy       = (st != S_IDLE);
  assign flush_req  = (st == S_FLUSH);

  // read address
  always_comb begin
    if (phase == IMG_LEFT) xa = int'(x0) - 12 + int'(k);
    else                   xa = int'(x0) - int'(dmax) - 12 + int'(k);
    if (xa < 0)             rd_addr = '0;
    else if (xa > IMG_W - 1) rd_addr = AW'(IMG_W - 1);
    else                    rd_addr = AW'(xa);
  end

  always_comb begin
    tag_now = '0;
    if (reading && phase == IMG_LEFT && k >= 9'd12 && k <= 9'd18) begin
      tag_now.cap_left = 1'b1;
      tag_now.col      = 3'(k - 9'd12);
    end
    if (reading && phase == IMG_RIGHT && k >= 9'd12 && k <= 9'(dmax) + 9'd18) begin
      tag_now.search = 1'b1;
      tag_now.j      = 8'(k - 9'd12);
    end
  end

  assign cap_left = tag_dl[TAPD-1].cap_left;
  assign cap_col  = tag_dl[TAPD-1].col;
  assign search   = tag_dl[TAPD-1].search;
  assign search_j = tag_dl[TAPD-1].j;
  assign cap_dev  = dev_dl[DEVD-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPD; i++) tag_dl[i] <= '0;
      for (int i = 0; i < DEVD; i++) dev_dl[i] <= 1'b0;
      img_sel_q <= IMG_LEFT;
    end else begin
      tag_dl[0] <= tag_now;
      for (int i = 1; i < TAPD; i++) tag_dl[i] <= tag_dl[i-1];
      dev_dl[0] <= reading && phase == IMG_LEFT && k == 9'd15;
      for (int i = 1; i < DEVD; i++) dev_dl[i] <= dev_dl[i-1];
      img_sel_q <= phase;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; phase <= IMG_LEFT; k <= '0; x0 <= '0;
      nblk <= '0; ntaken <= '0; inflight <= '0; nblank <= '0;
      rot <= '0; band_done <= 1'b0; dr_clear <= 1'b0;
    end else begin
      band_done <= 1'b0;
      dr_clear  <= 1'b0;
      if (dr_take) ntaken <= ntaken + 1'b1;
      if (dr_blank_take) nblank <= nblank + 2'd1;
      // in-flight blocks: started, not yet finished by the refinement
      if (st == S_WAITBLK && can_start || block_last && can_start && int'(nblk) != NB - 1) begin
        if (!dr_block_done) inflight <= inflight + 2'd1;
      end else if (dr_block_done) inflight <= inflight - 2'd1;
      case (st)
        S_IDLE: if (band_start) begin
          rot      <= 5'((int'(band_y0) + ROWS * 64 - 12) % ROWS);
          x0       <= '0;
          nblk     <= '0;
          ntaken   <= '0;
          nblank   <= '0;
          inflight <= '0;
          dr_clear <= 1'b1;
          st       <= S_WAITBLK;
        end
        S_WAITBLK: if (can_start) begin
          phase <= IMG_LEFT; k <= '0; st <= S_READ;
        end
        S_READ: begin
          if (phase == IMG_LEFT) begin
            if (k == 9'd30) begin phase <= IMG_RIGHT; k <= '0; end
            else k <= k + 9'd1;
          end else if (block_last) begin
            x0   <= x0 + 12'(BLK);
            nblk <= nblk + 1'b1;
            phase <= IMG_LEFT;
            k <= '0;
            if (int'(nblk) == NB - 1)  st <= S_DRAIN;
            else if (!can_start) st <= S_WAITBLK;
          end else k <= k + 9'd1;
        end
        S_DRAIN: if (int'(ntaken) == NB) st <= S_FLUSH;
        S_FLUSH: if (nblank == 2'd2 || (nblank == 2'd1 && dr_blank_take)) st <= S_END;
        S_END: if (dr_idle) begin
          band_done <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
