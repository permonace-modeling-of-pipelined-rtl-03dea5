// Shared vector storage of the matrix-vector engine.
//
// Holds the DEPTH elements of the vector x in one on-chip memory that every
// MAC pipeline reads, so each element is fetched from outside once and then
// reused for all rows of the matrix (the document's reason for storing it).
// The organisation is this design's choice: a register array with one
// synchronous write port (we/waddr/wdata, written at the clock edge) and one
// combinational read port (rdata shows element raddr in the same cycle),
// whose output is broadcast to all pipelines. Contents are not reset.
module vector_store
  import linalg_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned DW    = 5,
  localparam int unsigned AW   = idx_width(DEPTH)
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
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
