// Self-checking testbench for mac_array.
//
// Multiplies random D x D blocks on the default 2 x 2 array (8-bit operands)
// and on a 3 x 3 array: D iterations each present column k of A and row k of
// B, the first with clr. After the D-th iteration acc must equal A*B,
// computed here from the operands; runs are issued back to back, and a run
// of maximal operands checks the accumulator width.
module tb_mac_array;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en, clr;
  logic [7:0]  a2 [2], b2 [2], a3 [3], b3 [3];
  logic [16:0] acc2 [2][2];
  logic [17:0] acc3 [3][3];
  int unsigned A [3][3], Bm [3][3];

  mac_array u_d2 (.clk, .rst, .en, .clr, .a_col(a2), .b_row(b2), .acc(acc2));
  mac_array #(.D(3), .DW(8), .AW(18)) u_d3 (.clk, .rst, .en, .clr, .a_col(a3), .b_row(b3), .acc(acc3));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int d, bit maxval);
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      A[i][j]  = maxval ? 255 : $urandom_range(0, 255);
      Bm[i][j] = maxval ? 255 : $urandom_range(0, 255);
    end
    for (int k = 0; k < d; k++) begin
      en = 1; clr = (k == 0);
      for (int i = 0; i < 2; i++) begin a2[i] = 8'(A[i][k]); b2[i] = 8'(Bm[k][i]); end
      for (int i = 0; i < 3; i++) begin a3[i] = 8'(A[i][k]); b3[i] = 8'(Bm[k][i]); end
      @(posedge clk); #1;
    end
    en = 0;
    for (int i = 0; i < d; i++) for (int j = 0; j < d; j++) begin
      int unsigned s = 0;
      for (int k = 0; k < d; k++) s += A[i][k] * Bm[k][j];
      checks++;
      if ((d == 2 ? 32'(acc2[i][j]) : 32'(acc3[i][j])) != s) begin
        failures++;
        $display("D=%0d C[%0d][%0d]: got %0d expected %0d", d, i, j,
                 d == 2 ? 32'(acc2[i][j]) : 32'(acc3[i][j]), s);
      end
    end
  endtask

  initial begin
    en = 0; clr = 0;
    foreach (a2[i]) begin a2[i] = 0; b2[i] = 0; end
    foreach (a3[i]) begin a3[i] = 0; b3[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    run_block(2, 1);
    run_block(3, 1);
    for (int r = 0; r < 100; r++) begin
      run_block(2, 0);
      run_block(3, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
