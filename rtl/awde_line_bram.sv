// awde_line_bram: one image-row line buffer, a dual-port block RAM.
//
// Port A writes pixels arriving from external memory; port B is read by the
// disparity search with one cycle of latency (registered output, as a block
// RAM has); with re low the output keeps its value.  The estimator uses 62 of them: 31 consecutive rows of the right
// image and 31 of the left image.  DEPTH is one row of the image (1024 for
// XGA); WIDTH is one 24-bit Y/Cb/Cr pixel.
module awde_line_bram #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 24,
  parameter int AW    = $clog2(DEPTH)
)(
  input  logic             clk,
  // write port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
