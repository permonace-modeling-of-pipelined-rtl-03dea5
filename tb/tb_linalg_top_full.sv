// Full-size testbench for linalg_top: the top with its default parameters
// (8 one-bit vector elements, 8 x 8 matrix of 5-bit elements on 8 MAC
// pipelines, 2 x 2 matrices of 8-bit elements on a 2 x 2 MAC array).
// Runs complete operations on all three engines, including the 2 x 2 matrix
// example [1 2; 3 4] x [5 6; 7 8] = [19 22; 43 50], and checks every result,
// latency and cycle count. At these sizes each matrix product is a single
// pass / single block, so only back-to-back issue and stream stalls occur.
module tb_linalg_top_full;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int   checks, failures, n_b2b, n_mp, n_st, n_ti;
  logic finished;

  linalg_top_harness #(.FULL(1'b1), .DP_VECS(300), .MV_RUNS(10), .MM_RUNS(10)) u_h (
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
    $display("back-to-back dot products %0d, stream stalls %0d", n_b2b, n_st);
    if (n_b2b == 0) begin failures++; $display("no back-to-back dot product"); end
    if (n_st == 0) begin failures++; $display("no matrix stream stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 2, failures);
    $finish;
  end
endmodule
