// Matrix-vector engine: y = A x with PIPES MAC pipelines and a shared vector.
//
// The vector x (COLS elements) is first written into the shared vector store.
// After start, the matrix A (ROWS x COLS) streams in over a valid/ready port,
// one beat per cycle. A beat holds column j of PIPES consecutive rows; the
// engine reads x_j once from the store and broadcasts it to all pipelines, so
// every pipeline multiplies its own matrix element by the same vector element
// (the vector value is held until every multiplication that needs it is done).
// After COLS beats each pipeline holds one element of y. When there are fewer
// pipelines than rows, the rows are processed in GROUPS = ceil(ROWS/PIPES)
// passes: beat (g, j) carries A[g*PIPES + p][j] on lane p, and lanes beyond
// the last row of the final pass are ignored (y_mask low, send zeros).
//
// The pipeline-per-output organisation and the shared vector memory follow
// the document; the beat order, handshake and control are this design's.
//
// Timing: a_ready is high while busy, so the engine accepts one beat per
// cycle and a product takes GROUPS*COLS beats. y_valid pulses for one cycle
// after the last beat of each pass, with y_group naming the pass and y the
// PIPES results (row y_group*PIPES + p on lane p); done pulses with the final
// y_valid. The vector must not be written while busy (assertion). Operands
// are unsigned; results are exact. rst is active high and synchronous.
module matvec_unit
  import linalg_pkg::*;
#(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned PIPES = 8,
  parameter int unsigned DW    = 5,
  localparam int unsigned GROUPS = (ROWS + PIPES - 1) / PIPES,
  localparam int unsigned AW     = sum_width(DW, COLS),
  localparam int unsigned JW     = idx_width(COLS),
  localparam int unsigned GW     = idx_width(GROUPS)
) (
  input  logic          clk,
  input  logic          rst,
  // vector load
  input  logic          x_we,
  input  logic [JW-1:0] x_addr,
  input  logic [DW-1:0] x_wdata,
  // control
  input  logic          start,
  output logic          busy,
  // matrix stream
  input  logic          a_valid,
  output logic          a_ready,
  input  logic [DW-1:0] a_data [PIPES],
  // results
  output logic             y_valid,
  output logic [GW-1:0]    y_group,
  output logic [PIPES-1:0] y_mask,
  output logic [AW-1:0]    y [PIPES],
  output logic             done
);

  logic [JW-1:0] j_q;
  logic [GW-1:0] g_q;
  logic [DW-1:0] x_j;
  logic          fire, last_col, last_grp;

  assign a_ready  = busy;
  assign fire     = a_valid && a_ready;
  assign last_col = (32'(j_q) == COLS - 1);
  assign last_grp = (32'(g_q) == GROUPS - 1);

  vector_store #(.DEPTH(COLS), .DW(DW)) u_xstore (
    .clk,
    .we(x_we), .waddr(x_addr), .wdata(x_wdata),
    .raddr(j_q), .rdata(x_j)
  );

  for (genvar p = 0; p < PIPES; p++) begin : g_pipe
    mac_unit #(.DW(DW), .AW(AW)) u_mac (
      .clk, .rst,
      .en(fire), .clr(j_q == '0),
      .a(a_data[p]), .x(x_j),
      .acc(y[p])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      j_q     <= '0;
      g_q     <= '0;
      y_valid <= 1'b0;
      y_group <= '0;
      done    <= 1'b0;
    end else begin
      y_valid <= fire && last_col;
      done    <= fire && last_col && last_grp;
      if (fire && last_col) y_group <= g_q;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          j_q  <= '0;
          g_q  <= '0;
        end
      end else if (fire) begin
        if (last_col) begin
          j_q <= '0;
          if (last_grp) begin
            g_q  <= '0;
            busy <= 1'b0;
          end else begin
            g_q <= g_q + 1'b1;
          end
        end else begin
          j_q <= j_q + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < PIPES; p++)
      y_mask[p] = (32'(y_group) * PIPES + 32'(p)) < ROWS;
  end

  // The shared vector must stay stable while pipelines are using it.
  a_no_x_write_while_busy: assert property (@(posedge clk) disable iff (rst) !(x_we && busy))
    else $error("matvec_unit: vector written while a product is in progress");

endmodule
