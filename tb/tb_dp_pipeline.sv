// Self-checking testbench for dp_pipeline.
//
// Two instances run side by side: the default one-bit elements, driven with
// every operand combination, and an 8-bit one driven with random operands.
// Valid is random, and every cycle out_valid and y are compared with the
// operands presented exactly two cycles earlier (the pipeline latency).
module tb_dp_pipeline;
  localparam int unsigned W8 = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // one-bit instance
  logic       v1;
  logic [0:0] a0_1, b0_1, a1_1, b1_1;
  logic       ov1;
  logic [2:0] y1;
  dp_pipeline u_dut1 (.clk, .rst, .in_valid(v1), .a0(a0_1), .b0(b0_1), .a1(a1_1), .b1(b1_1),
                      .out_valid(ov1), .y(y1));

  // eight-bit instance
  logic          v8;
  logic [W8-1:0] a0_8, b0_8, a1_8, b1_8;
  logic          ov8;
  logic [2*W8:0] y8;
  dp_pipeline #(.DW(W8)) u_dut8 (.clk, .rst, .in_valid(v8), .a0(a0_8), .b0(b0_8), .a1(a1_8),
                                 .b1(b1_8), .out_valid(ov8), .y(y8));

  // expected values of the last three cycles
  logic        ev1 [3], ev8 [3];
  int unsigned ey1 [3], ey8 [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v1 = 0; v8 = 0; a0_1 = 0; b0_1 = 0; a1_1 = 0; b1_1 = 0; a0_8 = 0; b0_8 = 0; a1_8 = 0; b1_8 = 0;
    for (int i = 0; i < 3; i++) begin ev1[i] = 0; ev8[i] = 0; ey1[i] = 0; ey8[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 600; t++) begin
      // drive (just after the edge)
      v1 = (t < 16) ? 1'b1 : 1'($urandom_range(0, 1));
      {a0_1, b0_1, a1_1, b1_1} = (t < 16) ? 4'(t) : 4'($urandom);
      v8 = 1'($urandom_range(0, 3) != 0);
      a0_8 = 8'($urandom); b0_8 = 8'($urandom); a1_8 = 8'($urandom); b1_8 = 8'($urandom);
      if (t % 50 == 0) begin a0_8 = 8'hff; b0_8 = 8'hff; a1_8 = 8'hff; b1_8 = 8'hff; end
      ev1[0] = v1; ey1[0] = a0_1 * b0_1 + a1_1 * b1_1;
      ev8[0] = v8; ey8[0] = a0_8 * b0_8 + a1_8 * b1_8;
      @(posedge clk);
      #1;
      // after this edge the output shows the set from two edges ago
      if (t >= 1) begin
        checks++;
        if (ov1 !== ev1[1] || (ev1[1] && 32'(y1) != ey1[1])) begin
          failures++;
          $display("DW=1 t=%0d: got v=%0d y=%0d, expected v=%0d y=%0d", t, ov1, y1, ev1[1], ey1[1]);
        end
        checks++;
        if (ov8 !== ev8[1] || (ev8[1] && 32'(y8) != ey8[1])) begin
          failures++;
          $display("DW=8 t=%0d: got v=%0d y=%0d, expected v=%0d y=%0d", t, ov8, y8, ev8[1], ey8[1]);
        end
      end
      for (int i = 2; i > 0; i--) begin ev1[i] = ev1[i-1]; ey1[i] = ey1[i-1]; ev8[i] = ev8[i-1]; ey8[i] = ey8[i-1]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
