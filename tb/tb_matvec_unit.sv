// Self-checking testbench for matvec_unit.
//
// Four harnesses run in parallel: the default 8 x 8 matrix on 8 pipelines
// (one pass), a 10 x 5 matrix on 4 pipelines (three passes, the last one
// partly masked) with random gaps in the matrix stream, a 3 x 6 matrix on 4
// pipelines, and a 5 x 3 matrix on a single pipeline (five passes, one result
// each, with stream gaps). Each checks every result row, the pass index and
// mask, and the cycle count (one beat per cycle, GROUPS*COLS beats per product).
module tb_matvec_unit;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int   c0, f0, p0, s0, c1, f1, p1, s1, c2, f2, p2, s2, c3, f3, p3, s3;
  logic d0, d1, d2, d3;
  int   checks, failures;

  matvec_harness #(.RUNS(20)) u_h0 (.clk, .rst, .checks(c0), .failures(f0), .passes_seen(p0),
                                    .stalls_seen(s0), .finished(d0));
  matvec_harness #(.ROWS(10), .COLS(5), .PIPES(4), .DW(5), .RUNS(20), .STALLS(1'b1)) u_h1 (
    .clk, .rst, .checks(c1), .failures(f1), .passes_seen(p1), .stalls_seen(s1), .finished(d1));
  matvec_harness #(.ROWS(3), .COLS(6), .PIPES(4), .DW(4), .RUNS(20)) u_h2 (
    .clk, .rst, .checks(c2), .failures(f2), .passes_seen(p2), .stalls_seen(s2), .finished(d2));
  matvec_harness #(.ROWS(5), .COLS(3), .PIPES(1), .DW(5), .RUNS(20), .STALLS(1'b1)) u_h3 (
    .clk, .rst, .checks(c3), .failures(f3), .passes_seen(p3), .stalls_seen(s3), .finished(d3));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (d0 && d1 && d2 && d3);
    checks = c0 + c1 + c2 + c3 + 3;
    failures = f0 + f1 + f2 + f3;
    // the multi-pass and stalled cases must really have happened
    if (p1 != 20 * 3) begin failures++; $display("multi-pass case ran %0d passes", p1); end
    if (p3 != 20 * 5) begin failures++; $display("single-pipeline case ran %0d passes", p3); end
    if (s1 == 0) begin failures++; $display("no stall was inserted"); end
    $display("passes: %0d %0d %0d %0d, stall cycles: %0d", p0, p1, p2, p3, s1 + s3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
