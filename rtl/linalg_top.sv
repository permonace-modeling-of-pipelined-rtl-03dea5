// Pipelined linear-algebra accelerator: three engines side by side.
//
// The chip holds the three engines the design consists of, each with its own
// ports and sharing only clock and reset:
//   dp_*  dot product of two DP_N-element vectors in one iteration on DP_N/2
//         two-multiplier pipelines plus an adder tree (dot_product);
//   mv_*  matrix-vector product on MV_PIPES MAC pipelines that share one
//         on-chip copy of the vector (matvec_unit);
//   mm_*  matrix-matrix product on an MM_D x MM_D MAC array working on
//         MM_D x MM_D basic blocks (matmat_unit).
// The defaults are the sizes of the document's own examples: 8-element
// vectors of 1-bit elements, an 8 x 8 matrix of 5-bit elements with 8
// pipelines, and 2 x 2 matrices of 8-bit elements. The engines are
// independent, as in the document, which implements each on its own; putting
// them under one top is this design's choice. See each engine for its timing.
module linalg_top
  import linalg_pkg::*;
#(
  parameter int unsigned DP_N     = 8,
  parameter int unsigned DP_DW    = 1,
  parameter int unsigned MV_ROWS  = 8,
  parameter int unsigned MV_COLS  = 8,
  parameter int unsigned MV_PIPES = 8,
  parameter int unsigned MV_DW    = 5,
  parameter int unsigned MM_M     = 2,
  parameter int unsigned MM_N     = 2,
  parameter int unsigned MM_P     = 2,
  parameter int unsigned MM_D     = 2,
  parameter int unsigned MM_DW    = 8,
  localparam int unsigned DP_PW  = 2 * DP_DW + 1,
  localparam int unsigned DP_YW  = DP_PW + (((DP_N/2) > 1) ? $clog2(DP_N/2) : 0),
  localparam int unsigned MV_AW  = sum_width(MV_DW, MV_COLS),
  localparam int unsigned MV_JW  = idx_width(MV_COLS),
  localparam int unsigned MV_GW  = idx_width((MV_ROWS + MV_PIPES - 1) / MV_PIPES),
  localparam int unsigned MM_AW  = sum_width(MM_DW, MM_N),
  localparam int unsigned MM_MW  = idx_width(MM_M),
  localparam int unsigned MM_NW  = idx_width(MM_N),
  localparam int unsigned MM_PW  = idx_width(MM_P)
) (
  input  logic             clk,
  input  logic             rst,
  // dot product
  input  logic             dp_in_valid,
  input  logic [DP_DW-1:0] dp_a [DP_N],
  input  logic [DP_DW-1:0] dp_b [DP_N],
  output logic             dp_pair_valid,
  output logic [DP_PW-1:0] dp_pair_y [DP_N/2],
  output logic             dp_out_valid,
  output logic [DP_YW-1:0] dp_y,
  // matrix-vector
  input  logic                mv_x_we,
  input  logic [MV_JW-1:0]    mv_x_addr,
  input  logic [MV_DW-1:0]    mv_x_wdata,
  input  logic                mv_start,
  output logic                mv_busy,
  input  logic                mv_a_valid,
  output logic                mv_a_ready,
  input  logic [MV_DW-1:0]    mv_a_data [MV_PIPES],
  output logic                mv_y_valid,
  output logic [MV_GW-1:0]    mv_y_group,
  output logic [MV_PIPES-1:0] mv_y_mask,
  output logic [MV_AW-1:0]    mv_y [MV_PIPES],
  output logic                mv_done,
  // matrix-matrix
  input  logic             mm_a_we,
  input  logic [MM_MW-1:0] mm_a_r,
  input  logic [MM_NW-1:0] mm_a_c,
  input  logic [MM_DW-1:0] mm_a_wdata,
  input  logic             mm_b_we,
  input  logic [MM_NW-1:0] mm_b_r,
  input  logic [MM_PW-1:0] mm_b_c,
  input  logic [MM_DW-1:0] mm_b_wdata,
  input  logic             mm_start,
  output logic             mm_busy,
  output logic             mm_blk_valid,
  output logic             mm_done,
  output logic [MM_AW-1:0] mm_c [MM_M][MM_P]
);

  dot_product #(.N(DP_N), .DW(DP_DW)) u_dp (
    .clk, .rst,
    .in_valid(dp_in_valid), .a(dp_a), .b(dp_b),
    .pair_valid(dp_pair_valid), .pair_y(dp_pair_y),
    .out_valid(dp_out_valid), .y(dp_y)
  );

  matvec_unit #(.ROWS(MV_ROWS), .COLS(MV_COLS), .PIPES(MV_PIPES), .DW(MV_DW)) u_mv (
    .clk, .rst,
    .x_we(mv_x_we), .x_addr(mv_x_addr), .x_wdata(mv_x_wdata),
    .start(mv_start), .busy(mv_busy),
    .a_valid(mv_a_valid), .a_ready(mv_a_ready), .a_data(mv_a_data),
    .y_valid(mv_y_valid), .y_group(mv_y_group), .y_mask(mv_y_mask), .y(mv_y),
    .done(mv_done)
  );

  matmat_unit #(.M(MM_M), .N(MM_N), .P(MM_P), .D(MM_D), .DW(MM_DW)) u_mm (
    .clk, .rst,
    .a_we(mm_a_we), .a_r(mm_a_r), .a_c(mm_a_c), .a_wdata(mm_a_wdata),
    .b_we(mm_b_we), .b_r(mm_b_r), .b_c(mm_b_c), .b_wdata(mm_b_wdata),
    .start(mm_start), .busy(mm_busy), .blk_valid(mm_blk_valid), .done(mm_done),
    .c(mm_c)
  );

endmodule
