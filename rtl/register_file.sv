// Operand register file of the DF-ECC processor: 36 words of 132 bits.
//
// Holds the nine field elements of a scalar multiplication, each as four
// consecutive 132-bit words (4 x 132 = 528 >= 521 bits): the curve
// coefficient a, the input point Q0, the two working points Q1 and Q2 of the
// double-and-add-always ladder and a temporary pair QT. Depth and width are
// the published 36 x 132; the single read/write port with asynchronous read
// and synchronous write is this design's choice.
//
// Timing: rdata follows addr combinationally; a write with we takes effect
// on the rising clock edge.
module register_file #(
  parameter  int unsigned DEPTH = 36,
  parameter  int unsigned WIDTH = 132,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = (int'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
