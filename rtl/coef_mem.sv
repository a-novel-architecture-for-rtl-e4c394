// coef_mem - image and coefficient memory of the 2D-DWT.
//
// One word per pixel position, N*N words of DW bits, row-major (address =
// row * N + column). It holds the input image, is transformed in place, and
// holds the wavelet coefficients at the end (each level's LL band in the top
// left corner, the LH, HL and HH bands beside and below it). Storing the image
// and writing the transformed coefficients back follow the document; the
// organisation as one simple dual-port memory (one write and one read per
// clock, read data registered, one clock of latency) is this design's choice,
// the usual shape of an FPGA block RAM. A write and a read of the same address
// in one clock return the old word.
module coef_mem #(
  parameter int unsigned DEPTH = 512 * 512,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
