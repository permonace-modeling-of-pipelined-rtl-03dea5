// Self-checking testbench for adder_tree.
//
// Instances with 4 leaves (the default) and 5 leaves (padded to 8) get random
// inputs with random valid every cycle; each output is compared with the sum
// of the inputs presented clog2(leaves) cycles earlier, checking value,
// valid and latency. Inputs include all-ones sets to check that the growing
// widths never overflow.
module tb_adder_tree;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned IW = 3;
  logic          v4, v5, ov4, ov5;
  logic [IW-1:0] in4 [4];
  logic [IW-1:0] in5 [5];
  logic [IW+1:0] s4;
  logic [IW+2:0] s5;

  adder_tree u_t4 (.clk, .rst, .in_valid(v4), .in(in4), .out_valid(ov4), .sum(s4));
  adder_tree #(.IW(IW), .LEAVES(5)) u_t5 (.clk, .rst, .in_valid(v5), .in(in5), .out_valid(ov5), .sum(s5));

  logic        hv4 [4], hv5 [4];
  int unsigned hs4 [4], hs5 [4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v4 = 0; v5 = 0;
    foreach (in4[i]) in4[i] = 0;
    foreach (in5[i]) in5[i] = 0;
    for (int i = 0; i < 4; i++) begin hv4[i] = 0; hv5[i] = 0; hs4[i] = 0; hs5[i] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 500; t++) begin
      v4 = 1'($urandom_range(0, 1));
      v5 = 1'($urandom_range(0, 1));
      hs4[0] = 0; hs5[0] = 0;
      foreach (in4[i]) begin in4[i] = (t % 40 == 7) ? '1 : IW'($urandom); hs4[0] += in4[i]; end
      foreach (in5[i]) begin in5[i] = (t % 40 == 9) ? '1 : IW'($urandom); hs5[0] += in5[i]; end
      hv4[0] = v4; hv5[0] = v5;
      @(posedge clk);
      #1;
      // after edge t+L the output shows set t: 4 leaves L=2, 5 leaves L=3
      if (t >= 3) begin
        checks++;
        if (ov4 !== hv4[1] || (hv4[1] && 32'(s4) != hs4[1])) begin
          failures++;
          $display("4 leaves t=%0d: got v=%0d s=%0d exp v=%0d s=%0d", t, ov4, s4, hv4[1], hs4[1]);
        end
        checks++;
        if (ov5 !== hv5[2] || (hv5[2] && 32'(s5) != hs5[2])) begin
          failures++;
          $display("5 leaves t=%0d: got v=%0d s=%0d exp v=%0d s=%0d", t, ov5, s5, hv5[2], hs5[2]);
        end
      end
      for (int i = 3; i > 0; i--) begin hv4[i] = hv4[i-1]; hs4[i] = hs4[i-1]; hv5[i] = hv5[i-1]; hs5[i] = hs5[i-1]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
