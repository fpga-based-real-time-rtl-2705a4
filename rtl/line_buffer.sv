// line_buffer: one scan line of storage for the raw image pipeline.
//
// A simple dual-port memory of DEPTH words (one per image column). The write
// port stores the current line's value at column waddr; the read port returns
// the word stored at raddr one clock later, i.e. the value written there on the
// previous scan line. Colour prediction uses it to see the raw pixel and the
// class directly above the current one, the noise filter to see the classes of
// the two lines above.
//
// The document only says that the image is scanned line by line and that the
// neighbourhood of every four pixels is used; keeping one line in on-chip
// memory is what that takes. The registered read suits FPGA block RAM, which
// is this design's choice. Memory contents are not reset; users ignore the
// first lines of each frame.
module line_buffer #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 1280,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
