// ram_2r1w: word memory with one synchronous write port and two combinational read ports.
//
// Used twice in the processor: as the frame memory that holds the image and, in place, its
// sub-band coefficients (DEPTH = N*N), and as the line buffer that holds one row or column
// while it is filtered (DEPTH = N). A write lands at the clock edge; a read returns the
// stored word in the same cycle (distributed-RAM style). Contents are not reset: the
// controller writes every word before it reads it. The paper only says that the image is
// held in a memory and the decomposed outputs are stored back; the port arrangement and the
// in-place use are this design's.
module ram_2r1w #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
