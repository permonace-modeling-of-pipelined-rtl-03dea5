// One dot-product pipeline: two multipliers and an adder.
//
// It computes y = a0*b0 + a1*b1, the contribution of two neighbouring vector
// elements (a_i, b_i) and (a_i+1, b_i+1) to a dot product, as the basic
// pipeline of the dot-product engine. The two-multiplier/one-adder structure
// follows the document; the two register stages (products, then sum) are this
// design's choice, so the pipeline accepts one operand set per cycle and
// delivers its result two cycles later with out_valid.
//
// Operands are unsigned DW-bit integers; y has 2*DW+1 bits and never
// overflows. Reset (rst, active high, synchronous) clears the valid bits only.
module dp_pipeline #(
  parameter int unsigned DW = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic [DW-1:0]   a0,
  input  logic [DW-1:0]   b0,
  input  logic [DW-1:0]   a1,
  input  logic [DW-1:0]   b1,
  output logic            out_valid,
  output logic [2*DW:0]   y
);

  logic [2*DW-1:0] p0_q, p1_q;   // stage 1: the two products
  logic            v1_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
    end
  end

  always_ff @(posedge clk) begin
    p0_q <= (2*DW)'(a0) * (2*DW)'(b0);
    p1_q <= (2*DW)'(a1) * (2*DW)'(b1);
    y    <= {1'b0, p0_q} + {1'b0, p1_q};
  end

endmodule
