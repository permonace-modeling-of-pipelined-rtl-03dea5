// Self-checking testbench for matmat_unit.
//
// Three harnesses run in parallel: the default 2 x 2 case on a 2 x 2 MAC
// array (starting with the 2 x 2 example whose product is 13 16 2b 32 hex),
// a 4 x 6 by 6 x 6 product on a 2 x 2 array (six output blocks, each the sum
// of three basic-block products) and a 3 x 2 by 2 x 6 product on a 3 x 3
// array. Each checks every element of C, the number of output blocks and
// the cycle count (M/D)*(P/D)*N.
module tb_matmat_unit;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int   c0, f0, b0, c1, f1, b1, c2, f2, b2;
  logic d0, d1, d2;
  int   checks, failures;

  matmat_harness #(.RUNS(10), .FIG_EXAMPLE(1'b1)) u_h0 (.clk, .rst, .checks(c0), .failures(f0),
                                                         .blocks_seen(b0), .finished(d0));
  matmat_harness #(.M(4), .N(6), .P(6), .D(2), .DW(8), .RUNS(10)) u_h1 (
    .clk, .rst, .checks(c1), .failures(f1), .blocks_seen(b1), .finished(d1));
  matmat_harness #(.M(3), .N(2), .P(6), .D(3), .DW(6), .RUNS(10)) u_h2 (
    .clk, .rst, .checks(c2), .failures(f2), .blocks_seen(b2), .finished(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    if (b1 != 10 * 6) begin failures++; $display("block tiling case wrote %0d blocks", b1); end
    $display("output blocks: %0d %0d %0d", b0, b1, b2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
