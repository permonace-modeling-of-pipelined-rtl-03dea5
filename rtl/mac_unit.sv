// Multiply-accumulate (MAC) unit: the pipeline of the matrix engines.
//
// As in the document, a multiplier feeds an adder whose other input is the
// stored running sum, and the adder output is written back to that storage.
// Each cycle with en high adds a*x to the sum; with clr also high the sum
// restarts at a*x (clr is this design's way of beginning a new result without
// a dead cycle). acc shows the stored sum, updated one cycle after the
// operands are presented. Operands are unsigned; AW must hold the largest sum
// (2*DW + clog2(terms) bits for `terms` products). rst (active high,
// synchronous) clears the sum.
module mac_unit #(
  parameter int unsigned DW = 5,
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          clr,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] x,
  output logic [AW-1:0] acc
);

  logic [AW-1:0] prod;
  logic [AW-1:0] base;

  assign prod = AW'(a) * AW'(x);
  assign base = clr ? '0 : acc;

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= base + prod;
  end

endmodule
