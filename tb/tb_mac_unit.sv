// Self-checking testbench for mac_unit.
//
// The default instance (5-bit operands, 13-bit sum) accumulates random runs
// of products with random idle cycles, starting each run with clr. A model
// sum is kept alongside and compared with acc after every edge, which checks
// the one-cycle update, the hold while en is low, clear and reset. Runs of
// eight maximal products check that the sum does not overflow.
module tb_mac_unit;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        en, clr;
  logic [4:0]  a, x;
  logic [12:0] acc;
  int unsigned model;

  mac_unit u_dut (.clk, .rst, .en, .clr, .a, .x, .acc);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; a = 0; x = 0; model = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (acc != 0) begin failures++; $display("acc not cleared by reset"); end
    rst = 0;
    for (int run = 0; run < 200; run++) begin
      automatic int len = $urandom_range(1, 8);
      for (int k = 0; k < len; k++) begin
        en  = 1'($urandom_range(0, 4) != 0) || (k == 0);
        clr = (k == 0);
        a   = (run % 10 == 3) ? 5'h1f : 5'($urandom);
        x   = (run % 10 == 3) ? 5'h1f : 5'($urandom);
        if (en) model = (clr ? 0 : model) + a * x;
        @(posedge clk);
        #1;
        checks++;
        if (32'(acc) != model) begin
          failures++;
          $display("run %0d step %0d: acc=%0d expected %0d", run, k, acc, model);
        end
      end
    end
    // synchronous reset clears the sum
    en = 0; rst = 1;
    @(posedge clk); #1;
    checks++;
    if (acc != 0) begin failures++; $display("acc not cleared by reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
