// Test harness for one matvec_unit instance (used by tb_matvec_unit).
//
// Runs RUNS products y = A x with random A and x (some all-ones for the width
// check). It loads x through the vector port, pulses start and streams the
// matrix in beat order (pass g, column j; lane p carries A[g*PIPES+p][j]),
// with random idle cycles when STALLS is set. Every y_valid is compared with
// the rows of its pass, y_mask with the rows that exist, and the cycle count
// from busy to done with GROUPS*COLS beats plus the idle cycles inserted.
// Counts are reported through the output ports once `finished` is high.
module matvec_harness #(
  parameter int unsigned ROWS   = 8,
  parameter int unsigned COLS   = 8,
  parameter int unsigned PIPES  = 8,
  parameter int unsigned DW     = 5,
  parameter int unsigned RUNS   = 20,
  parameter bit          STALLS = 1'b0
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   passes_seen,
  output int   stalls_seen,
  output logic finished
);
  localparam int unsigned GROUPS = (ROWS + PIPES - 1) / PIPES;
  localparam int unsigned AW = 2 * DW + ((COLS > 1) ? $clog2(COLS) : 0);
  localparam int unsigned JW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned GW = (GROUPS > 1) ? $clog2(GROUPS) : 1;

  logic             x_we, start, busy, a_valid, a_ready, y_valid, done;
  logic [JW-1:0]    x_addr;
  logic [DW-1:0]    x_wdata;
  logic [DW-1:0]    a_data [PIPES];
  logic [GW-1:0]    y_group;
  logic [PIPES-1:0] y_mask;
  logic [AW-1:0]    y [PIPES];

  matvec_unit #(.ROWS(ROWS), .COLS(COLS), .PIPES(PIPES), .DW(DW)) u_dut (
    .clk, .rst, .x_we, .x_addr, .x_wdata, .start, .busy, .a_valid, .a_ready, .a_data,
    .y_valid, .y_group, .y_mask, .y, .done
  );

  int unsigned A [ROWS][COLS];
  int unsigned X [COLS];
  int unsigned Y [ROWS];
  int          groups_done, cycles, idles;
  logic        seen_done;

  // result checker: runs on every edge
  always @(posedge clk) begin
    #2;
    if (!rst && y_valid) begin
      passes_seen++;
      checks++;
      if (32'(y_group) != groups_done) begin
        failures++; $display("pass %0d reported as %0d", groups_done, y_group);
      end
      for (int p = 0; p < PIPES; p++) begin
        automatic int r = groups_done * PIPES + p;
        checks++;
        if (y_mask[p] != (r < ROWS)) begin failures++; $display("mask lane %0d wrong: group %0d mask %b rows %0d", p, groups_done, y_mask, ROWS); end
        if (r < ROWS) begin
          checks++;
          if (32'(y[p]) != Y[r]) begin
            failures++; $display("row %0d: got %0d expected %0d", r, y[p], Y[r]);
          end
        end
      end
      groups_done++;
    end
    if (!rst && done) seen_done = 1'b1;
  end

  initial begin
    checks = 0; failures = 0; passes_seen = 0; stalls_seen = 0; finished = 0;
    x_we = 0; start = 0; a_valid = 0; x_addr = 0; x_wdata = 0;
    foreach (a_data[p]) a_data[p] = 0;
    @(negedge rst);
    for (int run = 0; run < RUNS; run++) begin
      automatic bit maxv = (run == 1);
      for (int j = 0; j < COLS; j++) X[j] = maxv ? (1 << DW) - 1 : $urandom_range(0, (1 << DW) - 1);
      for (int r = 0; r < ROWS; r++) begin
        Y[r] = 0;
        for (int j = 0; j < COLS; j++) begin
          A[r][j] = maxv ? (1 << DW) - 1 : $urandom_range(0, (1 << DW) - 1);
          Y[r] += A[r][j] * X[j];
        end
      end
      // load the vector
      @(posedge clk); #1;
      for (int j = 0; j < COLS; j++) begin
        x_we = 1; x_addr = JW'(j); x_wdata = DW'(X[j]);
        @(posedge clk); #1;
      end
      x_we = 0;
      start = 1;
      @(posedge clk); #1;
      start = 0;
      checks++;
      if (!busy) begin failures++; $display("busy not raised after start"); end
      groups_done = 0; cycles = 0; idles = 0; seen_done = 0;
      for (int g = 0; g < GROUPS; g++) begin
        for (int j = 0; j < COLS; j++) begin
          while (STALLS && $urandom_range(0, 3) == 0) begin
            a_valid = 0; idles++; stalls_seen++;
            @(posedge clk); #1; cycles++;
          end
          a_valid = 1;
          for (int p = 0; p < PIPES; p++) begin
            automatic int r = g * PIPES + p;
            a_data[p] = (r < ROWS) ? DW'(A[r][j]) : '0;
          end
          checks++;
          if (!a_ready) begin failures++; $display("a_ready low while busy"); end
          @(posedge clk); #1; cycles++;
        end
      end
      a_valid = 0;
      // done is sampled by the checker 2 time units after the edge
      @(posedge clk); #3;
      checks++;
      if (!seen_done || busy) begin
        failures++; $display("done not seen or still busy after %0d cycles", cycles);
      end
      checks++;
      if (cycles != GROUPS * COLS + idles) begin
        failures++; $display("took %0d cycles, expected %0d", cycles, GROUPS * COLS + idles);
      end
      checks++;
      if (groups_done != GROUPS) begin
        failures++; $display("%0d passes reported, expected %0d", groups_done, GROUPS);
      end
    end
    finished = 1;
  end
endmodule
