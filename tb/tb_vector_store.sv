// Self-checking testbench for vector_store.
//
// Writes random words to random addresses of the default 8 x 5-bit store,
// sometimes with we low, and after every edge reads a random address through
// the combinational read port, comparing it with a model array. This checks
// the write enable, the addressing and that a write is visible the cycle
// after its edge.
module tb_vector_store;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       we;
  logic [2:0] waddr, raddr;
  logic [4:0] wdata, rdata;
  logic [4:0] model [8];

  vector_store u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word once
    for (int i = 0; i < 8; i++) begin
      we = 1; waddr = 3'(i); wdata = 5'($urandom); model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 1000; t++) begin
      we = 1'($urandom_range(0, 1));
      waddr = 3'($urandom);
      wdata = 5'($urandom);
      if (we) model[waddr] = wdata;
      @(posedge clk); #1;
      we = 0;
      raddr = 3'($urandom);
      #1;
      checks++;
      if (rdata != model[raddr]) begin
        failures++;
        $display("t=%0d addr %0d: read %0d expected %0d", t, raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
