// Dot-product engine: N/2 two-element pipelines followed by an adder tree.
//
// A pair of N-element vectors a, b is taken in one cycle (one iteration).
// Pipeline k multiplies elements 2k and 2k+1 of both vectors and adds the two
// products (dp_pipeline); the N/2 pipeline results are then summed in a
// pipelined adder tree (adder_tree). This organisation (N/2 pipelines, one
// iteration, adder tree) follows the document; the register placement is this
// design's choice. A new vector pair may be presented every cycle.
//
// Timing: pair_y/pair_valid (the per-pipeline results) follow in_valid by 2
// cycles, y/out_valid by 2 + clog2(N/2) cycles (4 for N = 8). Operands are
// unsigned DW-bit integers, y is exact. N must be even.
module dot_product
#(
  parameter int unsigned N  = 8,
  parameter int unsigned DW = 1,
  localparam int unsigned PW = 2 * DW + 1,                          // pipeline result
  localparam int unsigned YW = PW + (((N/2) > 1) ? $clog2(N/2) : 0) // dot product
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] a [N],
  input  logic [DW-1:0] b [N],
  output logic          pair_valid,
  output logic [PW-1:0] pair_y [N/2],
  output logic          out_valid,
  output logic [YW-1:0] y
);

  if (N < 2 || (N % 2) != 0) begin : g_bad_n
    $error("dot_product: N must be even and at least 2");
  end

  logic [N/2-1:0] pv;

  for (genvar k = 0; k < N/2; k++) begin : g_pipe
    dp_pipeline #(.DW(DW)) u_pipe (
      .clk, .rst, .in_valid,
      .a0(a[2*k]), .b0(b[2*k]), .a1(a[2*k+1]), .b1(b[2*k+1]),
      .out_valid(pv[k]), .y(pair_y[k])
    );
  end

  assign pair_valid = &pv;   // all pipelines run in lockstep

  adder_tree #(.IW(PW), .LEAVES(N/2)) u_tree (
    .clk, .rst,
    .in_valid(pair_valid),
    .in(pair_y),
    .out_valid,
    .sum(y)
  );

endmodule
