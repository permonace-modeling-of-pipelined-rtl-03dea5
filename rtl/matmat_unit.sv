// Block matrix-multiplication engine: C = A B on a D x D MAC array.
//
// A (M x N) and B (N x P) are written element by element into local operand
// buffers; start then computes C (M x P) one D x D output block at a time.
// For output block (bi, bj) the MAC array runs N iterations: iteration k
// presents column k of rows bi*D .. bi*D+D-1 of A and row k of columns
// bj*D .. bj*D+D-1 of B, and every MAC (i, j) adds A[.][k]*B[k][.] to its sum.
// That is N/D products of D x D basic blocks, each taking D iterations on
// D^2 MACs as in the document, accumulated without clearing in between; for
// M = N = P = D it is the plain N^2-MAC, N-iteration multiplication. The
// finished block is copied into the result array c while the array already
// starts the next block, so there is no dead cycle between blocks.
//
// The D x D MAC array and the column-times-row iteration follow the document;
// the operand buffers, the block order (bj fastest) and the control are this
// design's choices. M and P must be multiples of D.
//
// Timing: busy rises the cycle after start and a product takes
// (M/D)*(P/D)*N cycles; blk_valid pulses in the cycle each finished block
// first shows on c, and done pulses with the last one. The buffers must not be
// written while busy (assertion). Operands are unsigned, results exact (AW =
// 2*DW + clog2(N)). rst is active high and synchronous.
module matmat_unit
  import linalg_pkg::*;
#(
  parameter int unsigned M  = 2,
  parameter int unsigned N  = 2,
  parameter int unsigned P  = 2,
  parameter int unsigned D  = 2,
  parameter int unsigned DW = 8,
  localparam int unsigned AW  = sum_width(DW, N),
  localparam int unsigned MW  = idx_width(M),
  localparam int unsigned NW  = idx_width(N),
  localparam int unsigned PW  = idx_width(P),
  localparam int unsigned BM  = M / D,
  localparam int unsigned BP  = P / D,
  localparam int unsigned BMW = idx_width(BM),
  localparam int unsigned BPW = idx_width(BP)
) (
  input  logic          clk,
  input  logic          rst,
  // operand loading
  input  logic          a_we,
  input  logic [MW-1:0] a_r,
  input  logic [NW-1:0] a_c,
  input  logic [DW-1:0] a_wdata,
  input  logic          b_we,
  input  logic [NW-1:0] b_r,
  input  logic [PW-1:0] b_c,
  input  logic [DW-1:0] b_wdata,
  // control and result
  input  logic          start,
  output logic          busy,
  output logic          blk_valid,
  output logic          done,
  output logic [AW-1:0] c [M][P]
);

  if ((M % D) != 0 || (P % D) != 0 || D == 0) begin : g_bad_d
    $error("matmat_unit: M and P must be multiples of D");
  end

  logic [DW-1:0]  a_buf [M][N];
  logic [DW-1:0]  b_buf [N][P];

  logic [BMW-1:0] bi_q, st_bi_q;
  logic [BPW-1:0] bj_q, st_bj_q;
  logic [NW-1:0]  k_q;
  logic           store_q, last_q;
  logic           last_k, last_bi, last_bj;

  logic [DW-1:0]  a_col [D];
  logic [DW-1:0]  b_row [D];
  logic [AW-1:0]  acc   [D][D];

  assign last_k  = (32'(k_q)  == N  - 1);
  assign last_bi = (32'(bi_q) == BM - 1);
  assign last_bj = (32'(bj_q) == BP - 1);

  // operand buffers
  always_ff @(posedge clk) begin
    if (a_we) a_buf[a_r][a_c] <= a_wdata;
    if (b_we) b_buf[b_r][b_c] <= b_wdata;
  end

  // column k of the A block and row k of the B block
  always_comb begin
    for (int i = 0; i < D; i++) begin
      a_col[i] = a_buf[32'(bi_q) * D + i][k_q];
      b_row[i] = b_buf[k_q][32'(bj_q) * D + i];
    end
  end

  mac_array #(.D(D), .DW(DW), .AW(AW)) u_array (
    .clk, .rst,
    .en(busy), .clr(k_q == '0),
    .a_col, .b_row,
    .acc
  );

  // block sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      bi_q    <= '0;
      bj_q    <= '0;
      k_q     <= '0;
      store_q <= 1'b0;
      last_q  <= 1'b0;
      st_bi_q <= '0;
      st_bj_q <= '0;
    end else begin
      store_q <= busy && last_k;
      last_q  <= busy && last_k && last_bi && last_bj;
      if (busy && last_k) begin
        st_bi_q <= bi_q;
        st_bj_q <= bj_q;
      end
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          bi_q <= '0;
          bj_q <= '0;
          k_q  <= '0;
        end
      end else if (!last_k) begin
        k_q <= k_q + 1'b1;
      end else begin
        k_q <= '0;
        if (!last_bj) begin
          bj_q <= bj_q + 1'b1;
        end else begin
          bj_q <= '0;
          if (!last_bi) begin
            bi_q <= bi_q + 1'b1;
          end else begin
            bi_q <= '0;
            busy <= 1'b0;
          end
        end
      end
    end
  end

  // result array: the finished block is copied the cycle after its last
  // iteration, while the MAC array already works on the next block
  always_ff @(posedge clk) begin
    if (rst) begin
      blk_valid <= 1'b0;
      done      <= 1'b0;
      for (int r = 0; r < M; r++)
        for (int q = 0; q < P; q++)
          c[r][q] <= '0;
    end else begin
      blk_valid <= store_q;
      done      <= last_q;
      if (store_q) begin
        for (int i = 0; i < D; i++)
          for (int j = 0; j < D; j++)
            c[32'(st_bi_q) * D + i][32'(st_bj_q) * D + j] <= acc[i][j];
      end
    end
  end

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (rst) !((a_we || b_we) && busy))
    else $error("matmat_unit: operand buffer written while a product is in progress");

endmodule
