// End-to-end testbench for linalg_top at reduced parameters.
//
// The sizes are chosen so that every mechanism of the design occurs: 8-bit
// vectors on the dot product (back-to-back issue), a 10 x 6 matrix on four
// matrix-vector pipelines (three passes, the last masked, with stream
// stalls), and a 4 x 6 by 6 x 4 product on a 2 x 2 MAC array (four output
// blocks, each the sum of three basic-block products). Each mechanism that
// never happened counts as a failure.
module tb_linalg_top;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int   checks, failures, n_b2b, n_mp, n_st, n_ti;
  logic finished;

  linalg_top_harness #(
    .DP_N(8), .DP_DW(8), .MV_ROWS(10), .MV_COLS(6), .MV_PIPES(4), .MV_DW(5),
    .MM_M(4), .MM_N(6), .MM_P(4), .MM_D(2), .MM_DW(8),
    .DP_VECS(400), .MV_RUNS(12), .MM_RUNS(12)
  ) u_h (
    .clk, .rst, .checks, .failures, .n_back_to_back(n_b2b), .n_multipass(n_mp), .n_stalls(n_st),
    .n_tiled(n_ti), .finished
  );

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (finished);
    repeat (2) @(posedge clk);
    $display("back-to-back dot products %0d, multi-pass matvec products %0d, stream stalls %0d, tiled matmat products %0d",
             n_b2b, n_mp, n_st, n_ti);
    if (n_b2b == 0) begin failures++; $display("no back-to-back dot product"); end
    if (n_mp == 0) begin failures++; $display("no multi-pass matrix-vector product"); end
    if (n_st == 0) begin failures++; $display("no matrix stream stall"); end
    if (n_ti == 0) begin failures++; $display("no block-tiled matrix product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 4, failures);
    $finish;
  end
endmodule
