// awde_dff_array: the 31 x 25 array of 8-bit registers of the data
// allocation unit.
//
// Every cycle with shift = 1 a new column of 31 pixels (one per window row,
// in image order) enters column 0 and every column moves one place to the
// right, so column c holds the pixels read c + 1 shifts ago.  The pixels of
// one image column flow from left to right; the weaver taps the array with
// fixed wiring.  Reset clears the array.
module awde_dff_array
  import awde_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  pix_t [ROWS-1:0] col_in,
  output pix_t [ROWS-1:0][ARR_COLS-1:0] arr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) arr <= '0;
    else if (shift) begin
      for (int r = 0; r < ROWS; r++) begin
        arr[r][0] <= col_in[r];
        for (int c = 1; c < ARR_COLS; c++) arr[r][c] <= arr[r][c-1];
      end
    end
  end
endmodule
