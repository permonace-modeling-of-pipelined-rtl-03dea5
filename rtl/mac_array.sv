// D x D array of MAC units for basic-block matrix multiplication.
//
// One iteration presents column k of a D x D block of A (a_col) and row k of
// a D x D block of B (b_row); MAC (i, j) multiplies a_col[i] by b_row[j] and
// adds the product to its running sum, so after D iterations acc holds the
// block product A*B (outer-product order, as the document describes). en
// accumulates, en with clr starts new sums; acc updates one cycle after the
// operands. Operands are unsigned; AW must hold the largest sum. rst (active
// high, synchronous) clears all sums.
module mac_array #(
  parameter int unsigned D  = 2,
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 17
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          clr,
  input  logic [DW-1:0] a_col [D],
  input  logic [DW-1:0] b_row [D],
  output logic [AW-1:0] acc [D][D]
);

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      mac_unit #(.DW(DW), .AW(AW)) u_mac (
        .clk, .rst, .en, .clr,
        .a(a_col[i]), .x(b_row[j]),
        .acc(acc[i][j])
      );
    end
  end

endmodule
